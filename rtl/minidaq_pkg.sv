// minidaq_pkg: types and constants shared by the Mini-DAQ TFC and front-end
// emulation.
//
// It holds the two fast-command (TFC) word layouts: the 64-bit word that the
// readout supervisor (S-ODIN) sends to the readout boards (TELL40) and the
// 24-bit word that the interface board (SOL40) forwards to the front ends
// inside each GBT frame. Bit positions follow the published TFC word tables.
// It also holds the GBT frame header codes, the link alignment pattern, the
// front-end encoding selector and the integer hash used to emulate detector
// hits. The LHC orbit length of 3564 crossings is not stated in the source
// material; it is the LHC value, and it agrees with the snapshot interval of
// 0x37B0 = 4 orbits given in the configuration.
package minidaq_pkg;

  localparam int unsigned ORBIT_BX = 3564;  // bunch crossings per LHC orbit
  localparam int unsigned BXID_W   = 12;

  // TFC word to the readout boards, bit 63 first.
  typedef struct packed {
    logic [11:0] bxid;          // 63:52
    logic        reserve;       // 51
    logic        mep_accept;    // 50
    logic [31:0] mep_dest;      // 49:18
    logic [3:0]  trigger_type;  // 17:14
    logic [3:0]  calib_type;    // 13:10
    logic        synch;         // 9
    logic        snapshot;      // 8
    logic        trigger;       // 7
    logic        bx_veto;       // 6
    logic        nzs;           // 5
    logic        header_only;   // 4
    logic        be_reset;      // 3
    logic        fe_reset;      // 2
    logic        eid_reset;     // 1
    logic        bxid_reset;    // 0
  } tfc_tell40_t;

  // TFC word to the front ends, bit 23 first.
  typedef struct packed {
    logic [11:0] bxid;          // 23:12
    logic        reserve;       // 11
    logic        synch;         // 10
    logic        snapshot;      // 9
    logic [3:0]  calib_type;    // 8:5
    logic        bx_veto;       // 4
    logic        nzs;           // 3
    logic        header_only;   // 2
    logic        fe_reset;      // 1
    logic        bxid_reset;    // 0
  } tfc_fe_t;

  // Trigger type codes carried in the TELL40 word (this design's choice).
  localparam logic [3:0] TRG_PHYSICS = 4'h0;
  localparam logic [3:0] TRG_NZS     = 4'h1;
  localparam logic [3:0] TRG_CALIB   = 4'h2;

  // GBT frame header: data frame or idle frame.
  localparam logic [3:0] GBT_HDR_DATA = 4'h5;
  localparam logic [3:0] GBT_HDR_IDLE = 4'h6;

  // Link alignment pattern sent while SYNCH is asserted.
  localparam int unsigned SYNCH_PATTERN_W = 10;
  localparam logic [SYNCH_PATTERN_W-1:0] SYNCH_PATTERN = 10'b1011010011;

  // Front-end packing algorithms:
  //   ENC_VV variable frame length, variable size header
  //   ENC_FV variable frame length, fixed size header
  //   ENC_FF fixed frame length (one event per GBT frame), fixed header
  typedef enum logic [1:0] {ENC_VV = 2'd0, ENC_FV = 2'd1, ENC_FF = 2'd2} fe_enc_e;

  // Kind of a front-end event, decided from the TFC command of its crossing.
  typedef enum logic [1:0] {EV_NODATA = 2'd0, EV_ZS = 2'd1, EV_NZS = 2'd2, EV_SYNCH = 2'd3} ev_kind_e;

  // One front-end event as it enters the derandomizer.
  typedef struct packed {
    logic [11:0] bxid;
    ev_kind_e    kind;
    logic [15:0] hits;   // number of hit channels (zero-suppressed events)
    logic [15:0] seed;   // event number; the data content is derived from it
  } fe_event_t;

  // 32-bit integer mix, truncated to 16 bits. Used for channel hits and
  // channel values: the same (seed, index) always gives the same value, so
  // event content can be rebuilt at readout time from the stored seed.
  function automatic logic [15:0] mix16(input logic [15:0] seed, input logic [15:0] idx);
    logic [31:0] x;
    x = {seed, idx};
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x[15:0];
  endfunction

  // Value of the k-th hit of a zero-suppressed event (the packer keeps the
  // low channel-width bits and turns a zero into one).
  function automatic logic [15:0] zs_value(input logic [15:0] seed, input logic [15:0] k);
    logic [15:0] v;
    v = mix16(seed ^ 16'hA5C3, k);
    return v;
  endfunction

  // Raw value of channel ch in a non-zero-suppressed event.
  function automatic logic [15:0] nzs_value(input logic [15:0] seed, input logic [15:0] ch);
    return mix16(seed ^ 16'h3C5A, ch);
  endfunction

  // Channel ch is hit in event seed when its hash falls under the threshold.
  // occ_e4 is the occupancy in units of 0.01 % (3.1 % -> 310).
  function automatic logic hit(input logic [15:0] seed, input logic [15:0] ch,
                               input int unsigned occ_e4);
    logic [31:0] thr;
    thr = (occ_e4 * 32'd65536) / 32'd10000;
    return {16'd0, mix16(seed, ch)} < thr;
  endfunction

  // Number of bits an event occupies in the link stream for the variable
  // frame length encodings (VV, FV); infow is the FV information field width.
  function automatic int unsigned ev_bits(input fe_enc_e enc, input ev_kind_e kind,
                                          input logic [15:0] hits, input int unsigned bxw,
                                          input int unsigned lenw, input int unsigned infow,
                                          input int unsigned chw, input int unsigned channels);
    int unsigned hdr, nval;
    nval = (kind == EV_ZS) ? int'(hits) : (kind == EV_NZS) ? channels : 0;
    if (enc == ENC_VV) hdr = (kind == EV_NODATA) ? bxw + 1 : bxw + 1 + lenw;
    else               hdr = bxw + infow + lenw;
    return hdr + nval * chw;
  endfunction

endpackage
