// fe_derandomizer: front-end derandomizer buffer with BufferFull handling.
//
// Events arrive one per crossing and leave at the link rate, so the buffer
// absorbs the fluctuations of the event size. Its capacity is DEPTH words of
// the GBT data field (DEPTH*DATA_W bits). The buffer keeps one descriptor
// per event (BXID, kind, hit count, event number) in a FIFO, and a bit
// counter of how much link payload the buffered events represent: each new
// event adds its size in the chosen encoding (minidaq_pkg::ev_bits) and each
// data frame sent removes DATA_W bits. The event content itself is rebuilt
// from the event number by the packer when it is read out, so only the size
// is stored; the occupancy and overflow behaviour are those of a buffer that
// stores the bits.
//
// An event that does not fit is turned into a header-only event (BufferFull,
// no data). Since every crossing must keep its header, an event with data is
// accepted only if it leaves room for one more header; a header that does
// not fit, or a full descriptor FIFO, loses the event (counted in n_lost),
// which does not happen while the link keeps sending frames. `flush` (FE reset) and a SYNCH event
// empty the buffer. SYNCH events are not stored: the packer sends the
// alignment frame directly.
// Interface: write side ev_valid/ev/flush; read side desc_avail, desc_head
// (the NH oldest events, combinational, oldest first; desc_avail of them
// valid) and desc_npop (how
// many of them the packer takes at this edge); frame_sent from the packer
// for every data frame leaving the link. NH lets the packer fill a frame
// with the shortest events (header only) at the full link rate.
// The capacity of 160 words comes from the source's configuration; the
// descriptor-and-size organisation, the descriptor FIFO depth and the loss
// policy are this design's choices.
module fe_derandomizer
  import minidaq_pkg::*;
#(
  parameter fe_enc_e     ENC        = ENC_VV,
  parameter int unsigned DEPTH      = 160,   // FE_interface_fifo_depth X"A0"
  parameter int unsigned DATA_W     = 80,
  parameter int unsigned BXW        = 12,
  parameter int unsigned CHW        = 4,
  parameter int unsigned CHANNELS   = 500,
  parameter int unsigned LENW       = $clog2(CHANNELS + 2),
  parameter int unsigned INFO_W     = 2,
  parameter int unsigned DESC_DEPTH = 1024,
  parameter int unsigned NH         = DATA_W / (BXW + 1) + 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ev_valid,
  input  fe_event_t   ev,
  input  logic        flush,
  output logic [$clog2(NH+1)-1:0] desc_avail,
  output fe_event_t   desc_head [NH],
  input  logic [$clog2(NH+1)-1:0] desc_npop,
  input  logic        frame_sent,
  output logic [31:0] occupancy,      // bits held
  output logic [31:0] n_buffer_full,  // events truncated to header only
  output logic [31:0] n_lost          // events lost
);

  localparam int unsigned CAP = DEPTH * DATA_W;
  localparam int unsigned AW  = $clog2(DESC_DEPTH);

  fe_event_t      mem [DESC_DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic [AW:0]    count;

  logic        clear;
  logic        do_wr;
  fe_event_t   wr_ev;
  logic [31:0] wr_bits;
  logic        is_full_conv;

  assign clear = flush || (ev_valid && ev.kind == EV_SYNCH);

  always_comb begin
    int unsigned full_sz, hdr_sz, avail;
    fe_event_t   hdr_ev;
    full_sz = ev_bits(ENC, ev.kind, ev.hits, BXW, LENW, INFO_W, CHW, CHANNELS);
    hdr_ev      = ev;
    hdr_ev.kind = EV_NODATA;
    hdr_ev.hits = '0;
    hdr_sz  = ev_bits(ENC, EV_NODATA, 16'd0, BXW, LENW, INFO_W, CHW, CHANNELS);
    // bits of a frame that has just left no longer count
    avail   = CAP - int'(occupancy) + (frame_sent ? DATA_W : 0);
    do_wr        = 1'b0;
    wr_ev        = ev;
    wr_bits      = 32'(full_sz);
    is_full_conv = 1'b0;
    if (ev_valid && !clear && count != (AW+1)'(DESC_DEPTH)) begin
      if (full_sz + hdr_sz <= avail) do_wr = 1'b1;
      else if (hdr_sz <= avail) begin
        do_wr        = 1'b1;
        wr_ev        = hdr_ev;
        wr_bits      = 32'(hdr_sz);
        is_full_conv = 1'b1;
      end
    end
  end

  assign desc_avail = (count > (AW+1)'(NH)) ? $bits(desc_avail)'(NH) : $bits(desc_avail)'(count);
  for (genvar j = 0; j < int'(NH); j++) begin : g_head
    assign desc_head[j] = mem[rd_ptr + AW'(j)];
  end

  logic [AW:0] pop;
  assign pop = ((AW+1)'(desc_npop) > count) ? count : (AW+1)'(desc_npop);

  always_ff @(posedge clk) if (do_wr) mem[wr_ptr] <= wr_ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr        <= '0;
      rd_ptr        <= '0;
      count         <= '0;
      occupancy     <= '0;
      n_buffer_full <= '0;
      n_lost        <= '0;
    end else if (clear) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      occupancy <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + AW'(1);
      rd_ptr    <= rd_ptr + AW'(pop);
      count     <= count + (AW+1)'(do_wr) - pop;
      occupancy <= occupancy + (do_wr ? wr_bits : 32'd0) - (frame_sent ? 32'(DATA_W) : 32'd0);
      if (is_full_conv && do_wr) n_buffer_full <= n_buffer_full + 32'd1;
      if (ev_valid && !do_wr)    n_lost        <= n_lost + 32'd1;
    end
  end

  // The buffer never holds more than its capacity.
  a_cap: assert property (@(posedge clk) disable iff (!rst_n) occupancy <= 32'(CAP));

endmodule
