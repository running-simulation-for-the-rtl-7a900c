// fe_gbt_packer: packing of front-end events into GBT frames.
//
// Output: one GBT frame per 40 MHz clock, a 4-bit GBT header and a DATA_W-bit
// data field (80 bits, or 112 in WideBus mode). The header is 0x5 for a data
// frame and 0x6 for an idle frame (data field all zero). Bits are sent most
// significant first.
//
// Variable frame length (ENC_VV, ENC_FV). Events are packed back to back
// into a continuous bit stream: a frame can end one event and begin the
// next, and a frame is sent only once DATA_W bits are waiting; otherwise an
// idle frame goes out and the waiting bits stay for the next frame. Each
// event is a header followed by its channel values, CHW bits each:
//   VV header  BXID[BXW-1:0], NoData (1 bit), then Length (LENW bits) only
//              when NoData = 0. Length is the hit count, or the all-ones
//              NZS code for an uncompressed event.
//   FV header  BXID[BXW-1:0], Info (INFO_W bits: {NZS, NoData}), Length
//              (LENW bits), always present; Length = 0 when NoData = 1.
//   data       zero-suppressed: the values of the hit channels;
//              NZS: the raw values of all CHANNELS channels.
// Events come from the derandomizer (desc_*, up to NH oldest at once). Each
// clock, after the frame leaves, pieces are appended to an accumulator until
// the next frame is complete: first up to NPC = DATA_W/CHW further values of
// the event in progress, then new events, each as its header and up to NPC
// values. So the link sends a data frame every clock while DATA_W bits are
// buffered, even when the events are headers only.
//
// Fixed frame length (ENC_FF). One event per frame, taken straight from the
// event input: header BXID, Info, count of values in the frame, then at most
// NPC_FF values; the rest is truncated (counted in n_trunc) and the frame is
// padded with zeros. A clock without event sends an idle frame.
//
// SYNCH event: the frame carries BXID[11:0] and the 10-bit alignment pattern
// at the top of the data field, and the stream is emptied. `flush` (FE
// reset) empties the stream and sends an idle frame.
// Frames are registered: the frame for the state at clock n appears after
// edge n+1. frame_sent marks each stream data frame (for the derandomizer
// occupancy).
// Header fields, header codes, alignment frame and the packing rules follow
// the source; the value order, the Info bit layout and the per-clock piece
// size are this design's choices.
module fe_gbt_packer
  import minidaq_pkg::*;
#(
  parameter fe_enc_e     ENC      = ENC_VV,
  parameter int unsigned DATA_W   = 80,
  parameter int unsigned BXW      = 12,
  parameter int unsigned CHW      = 4,
  parameter int unsigned CHANNELS = 500,
  parameter int unsigned LENW     = $clog2(CHANNELS + 2),
  parameter int unsigned INFO_W   = 2,
  parameter int unsigned NH       = DATA_W / (BXW + 1) + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // direct event input (FF encoding and SYNCH)
  input  logic              ev_valid,
  input  fe_event_t         ev,
  input  logic              flush,
  // derandomizer read side (VV and FV encodings)
  input  logic [$clog2(NH+1)-1:0] desc_avail,
  input  fe_event_t         desc_head [NH],
  output logic [$clog2(NH+1)-1:0] desc_npop,
  // GBT frame
  output logic [3:0]        gbt_hdr,
  output logic [DATA_W-1:0] gbt_data,
  output logic              frame_sent,
  output logic [31:0]       n_trunc
);

  localparam int unsigned NPC     = DATA_W / CHW;
  localparam int unsigned HMAX    = BXW + INFO_W + LENW;
  localparam int unsigned PIECE_W = HMAX + NPC * CHW;
  localparam int unsigned ACC_W   = DATA_W + PIECE_W;
  localparam int unsigned NPC_FF  = (DATA_W - BXW - INFO_W - LENW) / CHW;
  localparam int unsigned CW      = $clog2(ACC_W + 1);
  localparam logic [LENW-1:0] NZS_CODE = '1;

  // Channel-value generator shared by all encodings.
  function automatic logic [CHW-1:0] value_of(input fe_event_t e, input int unsigned k);
    logic [15:0] v;
    if (e.kind == EV_NZS) v = nzs_value(e.seed, 16'(k));
    else begin
      v = zs_value(e.seed, 16'(k));
      if (v[CHW-1:0] == '0) v[0] = 1'b1;
    end
    return v[CHW-1:0];
  endfunction

  function automatic int unsigned n_values(input fe_event_t e);
    return (e.kind == EV_ZS) ? int'(e.hits) : (e.kind == EV_NZS) ? CHANNELS : 0;
  endfunction

  // -------------------------------------------------------------------------
  // Stream state
  logic [ACC_W-1:0] acc;      // waiting bits, first bit at the MSB
  logic [CW-1:0]    acc_cnt;
  fe_event_t        cur;      // event whose values are still being appended
  logic             busy;
  logic [15:0]      idx;      // next value index of cur

  typedef struct packed {
    logic [PIECE_W-1:0] bits;   // MSB aligned
    logic [15:0]        len;
    logic               last;   // the event is complete after this piece
    logic [15:0]        next;   // next value index otherwise
  } piece_t;

  // Header (when `first`) and up to NPC values of event e from value `base`.
  function automatic piece_t make_piece(input fe_event_t e, input int unsigned base,
                                        input logic first);
    piece_t              p;
    int unsigned         total, hlen, nk;
    logic [HMAX-1:0]     hdr;
    logic [NPC*CHW-1:0]  vals;
    logic                nodata, nzs;
    total  = n_values(e);
    nodata = (e.kind == EV_NODATA);
    nzs    = (e.kind == EV_NZS);
    hlen   = 0;
    hdr    = '0;
    vals   = '0;
    if (first) begin
      if (ENC == ENC_VV) begin
        if (nodata) begin
          hlen = BXW + 1;
          hdr  = HMAX'({e.bxid[BXW-1:0], 1'b1});
        end else begin
          hlen = BXW + 1 + LENW;
          hdr  = HMAX'({e.bxid[BXW-1:0], 1'b0, nzs ? NZS_CODE : LENW'(e.hits)});
        end
      end else begin
        hlen = HMAX;
        hdr  = HMAX'({e.bxid[BXW-1:0], INFO_W'({nzs, nodata}),
                      nzs ? NZS_CODE : (nodata ? LENW'(0) : LENW'(e.hits))});
      end
    end
    nk = (total - base > NPC) ? NPC : total - base;
    for (int j = 0; j < int'(NPC); j++)
      if (j < int'(nk))
        vals[(NPC-1-j)*CHW +: CHW] = value_of(e, base + j);
    p.bits = (PIECE_W'(hdr) << (PIECE_W - hlen)) | (PIECE_W'({vals, HMAX'(0)}) >> hlen);
    p.len  = 16'(hlen + nk * CHW);
    p.last = (base + nk >= total);
    p.next = 16'(base + nk);
    return p;
  endfunction

  // Frame out of the stream, then as many pieces as it takes to have the
  // next frame complete: the rest of the current event, then new events.
  logic             send;
  int unsigned      after_pop;
  logic [ACC_W-1:0] chunk;      // appended bits, MSB aligned
  int unsigned      clen;
  int unsigned      npop;
  logic             n_busy;
  fe_event_t        n_cur;
  logic [15:0]      n_idx;

  always_comb begin
    piece_t p;
    p         = '0;
    send      = (int'(acc_cnt) >= DATA_W);
    after_pop = send ? int'(acc_cnt) - DATA_W : int'(acc_cnt);
    chunk     = '0;
    clen      = 0;
    npop      = 0;
    n_busy    = busy;
    n_cur     = cur;
    n_idx     = idx;
    if (busy && after_pop < DATA_W) begin
      p      = make_piece(cur, int'(idx), 1'b0);
      chunk  = ACC_W'({p.bits, DATA_W'(0)});
      clen   = int'(p.len);
      n_busy = !p.last;
      n_idx  = p.next;
    end
    for (int j = 0; j < int'(NH); j++) begin
      if (!n_busy && j < int'(desc_avail) && after_pop + clen < DATA_W) begin
        p      = make_piece(desc_head[j], 0, 1'b1);
        chunk  = chunk | (ACC_W'({p.bits, DATA_W'(0)}) >> clen);
        clen   = clen + int'(p.len);
        npop   = npop + 1;
        n_cur  = desc_head[j];
        n_busy = !p.last;
        n_idx  = p.next;
      end
    end
  end

  assign desc_npop = (ENC != ENC_FF && !flush && !(ev_valid && ev.kind == EV_SYNCH))
                     ? $bits(desc_npop)'(npop) : '0;

  // FF frame
  logic [DATA_W-1:0] ff_data;
  logic              ff_trunc;
  always_comb begin
    int unsigned total, n;
    logic [NPC_FF*CHW-1:0] vals;
    total = n_values(ev);
    n     = (total > NPC_FF) ? NPC_FF : total;
    vals  = '0;
    for (int j = 0; j < int'(NPC_FF); j++)
      if (j < int'(n)) vals[(NPC_FF-1-j)*CHW +: CHW] = value_of(ev, j);
    ff_data = DATA_W'({ev.bxid[BXW-1:0], INFO_W'({ev.kind == EV_NZS, ev.kind == EV_NODATA}),
                       LENW'(n), vals}) << (DATA_W - (BXW + INFO_W + LENW + NPC_FF*CHW));
    ff_trunc = ev_valid && (total > NPC_FF);
  end

  logic [DATA_W-1:0] synch_data;
  assign synch_data = DATA_W'({ev.bxid, SYNCH_PATTERN}) << (DATA_W - 12 - SYNCH_PATTERN_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      acc_cnt    <= '0;
      cur        <= '0;
      busy       <= 1'b0;
      idx        <= '0;
      gbt_hdr    <= GBT_HDR_IDLE;
      gbt_data   <= '0;
      frame_sent <= 1'b0;
      n_trunc    <= '0;
    end else if (flush) begin
      acc        <= '0;
      acc_cnt    <= '0;
      busy       <= 1'b0;
      gbt_hdr    <= GBT_HDR_IDLE;
      gbt_data   <= '0;
      frame_sent <= 1'b0;
    end else if (ev_valid && ev.kind == EV_SYNCH) begin
      acc        <= '0;
      acc_cnt    <= '0;
      busy       <= 1'b0;
      gbt_hdr    <= GBT_HDR_DATA;
      gbt_data   <= synch_data;
      frame_sent <= 1'b0;
    end else if (ENC == ENC_FF) begin
      frame_sent <= 1'b0;
      gbt_hdr    <= ev_valid ? GBT_HDR_DATA : GBT_HDR_IDLE;
      gbt_data   <= ev_valid ? ff_data : '0;
      if (ff_trunc) n_trunc <= n_trunc + 32'd1;
    end else begin
      acc        <= (send ? (acc << DATA_W) : acc) | (chunk >> after_pop);
      acc_cnt    <= CW'(after_pop + clen);
      cur        <= n_cur;
      busy       <= n_busy;
      idx        <= n_idx;
      frame_sent <= send;
      gbt_hdr    <= send ? GBT_HDR_DATA : GBT_HDR_IDLE;
      gbt_data   <= send ? acc[ACC_W-1 -: DATA_W] : '0;
    end
  end

endmodule
