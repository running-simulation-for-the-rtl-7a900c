// fe_event_source: per-crossing event generation of one emulated front end.
//
// Every clock the front end receives the (locally delayed) TFC word of one
// crossing and produces one event descriptor for it (minidaq_pkg::fe_event_t).
// The kind of the event follows the TFC command, in this priority:
//   FE reset                   no event; `flush` empties the derandomizer
//   SYNCH                      EV_SYNCH: the link sends the alignment frame
//   HEADER ONLY or BX VETO     EV_NODATA: header only
//   NZS                        EV_NZS: all CHANNELS channels, uncompressed
//   otherwise                  EV_ZS: the hit channels only
// Hits are emulated: channel ch of event number `seed` is hit when
// minidaq_pkg::hit(seed, ch, OCC_E4) holds, so each channel is hit with
// probability OCC_E4/10000; the number of hit channels is summed over all
// CHANNELS channels in one clock. The event number counts events since the
// last FE reset. The event BXID is the TFC BXID plus BXID_OFFSET, modulo
// the orbit.
//
// Controlled BXID errors, for testing the readout-board decoding:
//   skip  every SKIP_INTERVAL-th event carries BXID + SKIP_JUMP
//   swap  every SWAP_INTERVAL-th event exchanges its BXID with the next one
// Skip has priority over swap, also when both intervals fall on the same
// event. Both are off by default. The descriptor leaves three clocks after the
// TFC word (hit summation register, holding register for the swap, output
// register).
// The commands, occupancy, channel count and width, offsets and the skip and
// swap settings are those of the source's configuration; the hash-based hit
// emulation, the per-event meaning of a skip and the event-number seed are
// this design's choices.
module fe_event_source
  import minidaq_pkg::*;
#(
  parameter int unsigned CHANNELS      = 500,
  parameter int unsigned OCC_E4        = 310,      // occupancy 3.1 %
  parameter logic [11:0] BXID_OFFSET   = 12'h000,  // FE_BXID_offset
  parameter bit          SKIP_BXID     = 1'b0,
  parameter logic [15:0] SKIP_INTERVAL = 16'h0545,
  parameter logic [11:0] SKIP_JUMP     = 12'h00C,
  parameter bit          SWAP_BXID     = 1'b0,
  parameter logic [15:0] SWAP_INTERVAL = 16'h0641
) (
  input  logic      clk,
  input  logic      rst_n,
  input  tfc_fe_t   tfc,
  output logic      ev_valid,
  output fe_event_t ev,
  output logic      flush
);

  function automatic logic [11:0] bx_add(input logic [11:0] a, input logic [11:0] b);
    logic [12:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= 13'(ORBIT_BX)) s = s - 13'(ORBIT_BX);
    return s[11:0];
  endfunction

  logic [15:0] evnum;
  logic [15:0] hits_c;

  always_comb begin
    hits_c = '0;
    for (int ch = 0; ch < int'(CHANNELS); ch++)
      hits_c = hits_c + 16'(hit(evnum, 16'(ch), OCC_E4));
  end

  // Stage 1: classify the crossing and count its hits.
  fe_event_t s1;
  logic      s1_valid, s1_flush;
  logic [15:0] skip_cnt, swap_cnt;
  logic        swap_pend;   // s1 holds an event marked for a BXID swap

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evnum    <= '0;
      s1       <= '0;
      s1_valid <= 1'b0;
      s1_flush <= 1'b0;
      skip_cnt <= '0;
      swap_cnt <= '0;
      swap_pend <= 1'b0;
    end else if (tfc.fe_reset) begin
      evnum    <= '0;
      s1_valid <= 1'b0;
      s1_flush <= 1'b1;
      skip_cnt <= '0;
      swap_cnt <= '0;
    end else begin
      logic skip_now, swap_now;
      skip_now = SKIP_BXID && (skip_cnt == SKIP_INTERVAL - 16'd1);
      swap_now = SWAP_BXID && !skip_now && (swap_cnt == SWAP_INTERVAL - 16'd1);
      evnum    <= evnum + 16'd1;
      skip_cnt <= (skip_cnt == SKIP_INTERVAL - 16'd1) ? 16'd0 : skip_cnt + 16'd1;
      swap_cnt <= (swap_cnt == SWAP_INTERVAL - 16'd1) ? 16'd0 : swap_cnt + 16'd1;
      s1_valid <= 1'b1;
      s1_flush <= 1'b0;
      s1.seed  <= evnum;
      s1.hits  <= hits_c;
      s1.bxid  <= skip_now ? bx_add(bx_add(tfc.bxid, BXID_OFFSET), SKIP_JUMP)
                           : bx_add(tfc.bxid, BXID_OFFSET);
      if (tfc.synch)                          s1.kind <= EV_SYNCH;
      else if (tfc.header_only || tfc.bx_veto) s1.kind <= EV_NODATA;
      else if (tfc.nzs)                        s1.kind <= EV_NZS;
      else                                     s1.kind <= EV_ZS;
      swap_pend <= swap_now;
    end
  end

  // Stage 2: one-event holding register. An event marked for a swap leaves
  // with the BXID of the next event, and the next event takes its BXID.
  fe_event_t q;
  logic      q_valid, q_swap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      q_valid  <= 1'b0;
      q_swap   <= 1'b0;
      ev       <= '0;
      ev_valid <= 1'b0;
      flush    <= 1'b0;
    end else if (s1_flush) begin
      q_valid  <= 1'b0;
      q_swap   <= 1'b0;
      ev_valid <= 1'b0;
      flush    <= 1'b1;
    end else begin
      flush    <= 1'b0;
      ev_valid <= 1'b0;
      if (s1_valid) begin
        ev_valid <= q_valid;
        ev       <= q;
        q        <= s1;
        q_valid  <= 1'b1;
        q_swap   <= swap_pend;
        if (q_valid && q_swap) begin
          ev.bxid <= s1.bxid;
          q.bxid  <= q.bxid;
          q_swap  <= 1'b0;
        end
      end
    end
  end

endmodule
