// fe_data_gen: one emulated front-end link, from the TFC e-links to the GBT
// frames it sends to the readout board.
//
// Chain: fe_tfc_decoder (double-edge e-link capture, per-command delays) ->
// fe_event_source (one event per crossing, hit emulation, BXID errors) ->
// fe_derandomizer (buffer, BufferFull) -> fe_gbt_packer (VV, FV or FF
// packing, idle and alignment frames). With the FF encoding an event fills
// exactly one frame, so there is no derandomizer and the packer takes the
// events directly.
// Timing: a TFC word on the e-links is retimed after 1 clock, delayed by the
// local delays (13 clocks by default), turned into an event after 3 more
// clocks, and its frame leaves the packer one clock later at the earliest.
// All parameters are the programmable items of the source's generic front
// end: channel count and width, buffer depth, GBT frame width (80 or 112),
// BXID header width, occupancy, encoding, offsets and BXID errors.
module fe_data_gen
  import minidaq_pkg::*;
#(
  parameter fe_enc_e     ENC           = ENC_VV,
  parameter int unsigned CHANNELS      = 500,
  parameter int unsigned CHW           = 4,
  parameter int unsigned OCC_E4        = 310,
  parameter int unsigned DEPTH         = 160,
  parameter int unsigned DATA_W        = 80,
  parameter int unsigned BXW           = 12,
  parameter int unsigned INFO_W        = 2,
  parameter int unsigned DESC_DEPTH    = 1024,
  parameter int unsigned TFC_DLY       = 13,
  parameter logic [11:0] BXID_OFFSET   = 12'h000,
  parameter bit          SKIP_BXID     = 1'b0,
  parameter logic [15:0] SKIP_INTERVAL = 16'h0545,
  parameter logic [11:0] SKIP_JUMP     = 12'h00C,
  parameter bit          SWAP_BXID     = 1'b0,
  parameter logic [15:0] SWAP_INTERVAL = 16'h0641
) (
  input  logic              clk,
  input  logic              clk90,
  input  logic              rst_n,
  input  logic [11:0]       elink,
  output logic [3:0]        gbt_hdr,
  output logic [DATA_W-1:0] gbt_data,
  output tfc_fe_t           tfc,            // locally delayed TFC word
  output logic [31:0]       occupancy,
  output logic [31:0]       n_buffer_full,
  output logic [31:0]       n_lost,
  output logic [31:0]       n_trunc
);

  localparam int unsigned LENW = $clog2(CHANNELS + 2);
  localparam int unsigned NH   = DATA_W / (BXW + 1) + 2;

  tfc_fe_t   tfc_raw;
  logic      ev_valid, flush, frame_sent;
  fe_event_t ev;
  fe_event_t desc_head [NH];
  logic [$clog2(NH+1)-1:0] desc_avail, desc_npop;

  fe_tfc_decoder #(
    .DLY_BXID(TFC_DLY), .DLY_SYNCH(TFC_DLY), .DLY_SNAPSHOT(TFC_DLY), .DLY_CALIB(TFC_DLY),
    .DLY_BXVETO(TFC_DLY), .DLY_NZS(TFC_DLY), .DLY_HDRONLY(TFC_DLY), .DLY_FERESET(TFC_DLY),
    .DLY_BXIDRESET(TFC_DLY)
  ) u_dec (
    .clk, .clk90, .rst_n, .elink, .tfc_raw, .tfc
  );

  fe_event_source #(
    .CHANNELS(CHANNELS), .OCC_E4(OCC_E4), .BXID_OFFSET(BXID_OFFSET),
    .SKIP_BXID(SKIP_BXID), .SKIP_INTERVAL(SKIP_INTERVAL), .SKIP_JUMP(SKIP_JUMP),
    .SWAP_BXID(SWAP_BXID), .SWAP_INTERVAL(SWAP_INTERVAL)
  ) u_src (
    .clk, .rst_n, .tfc, .ev_valid, .ev, .flush
  );

  if (ENC == ENC_FF) begin : g_ff
    assign desc_avail    = '0;
    for (genvar j = 0; j < int'(NH); j++) begin : g_nohead
      assign desc_head[j] = '0;
    end
    assign occupancy     = '0;
    assign n_buffer_full = '0;
    assign n_lost        = '0;
  end else begin : g_buf
    fe_derandomizer #(
      .ENC(ENC), .DEPTH(DEPTH), .DATA_W(DATA_W), .BXW(BXW), .CHW(CHW),
      .CHANNELS(CHANNELS), .LENW(LENW), .INFO_W(INFO_W), .DESC_DEPTH(DESC_DEPTH), .NH(NH)
    ) u_derand (
      .clk, .rst_n, .ev_valid, .ev, .flush, .desc_avail, .desc_head, .desc_npop,
      .frame_sent, .occupancy, .n_buffer_full, .n_lost
    );
  end

  fe_gbt_packer #(
    .ENC(ENC), .DATA_W(DATA_W), .BXW(BXW), .CHW(CHW), .CHANNELS(CHANNELS),
    .LENW(LENW), .INFO_W(INFO_W), .NH(NH)
  ) u_pack (
    .clk, .rst_n, .ev_valid, .ev, .flush, .desc_avail, .desc_head, .desc_npop,
    .gbt_hdr, .gbt_data, .frame_sent, .n_trunc
  );

endmodule
