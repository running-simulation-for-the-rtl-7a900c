// fe_tfc_decoder: front-end reception of the fast commands from the TFC
// e-links, with a local, configurable delay for each command.
//
// The 12 e-links carry two bits per 40 MHz clock: the odd bit during the
// high phase of the clock and the even bit during the low phase. They are
// sampled with clk90, the 40 MHz clock shifted by a quarter period, so that
// each sample falls in the middle of a bit: the rising edge of clk90 takes
// the odd bits, its falling edge the even bits. The rebuilt 24-bit word is
// retimed into the clk domain on the next rising edge of clk.
//
// Because the GBT link has one latency for all its lines, each command is
// then pipelined by its own delay (DLY_*), so that it acts on the crossing it
// names once detector, cable and logic delays are accounted for. The BXID is
// delayed with the data-related commands (DLY_BXID). Default delays of 13
// clocks plus the 3 clocks from the S-ODIN word register to the retimed word
// make up the 16 clocks by which S-ODIN sends commands ahead of the crossing.
// Per-command delays and the double-edge bit order follow the source; the
// quarter-period sampling clock and the delay values are this design's
// choices.
module fe_tfc_decoder
  import minidaq_pkg::*;
#(
  parameter int unsigned DLY_BXID      = 13,
  parameter int unsigned DLY_SYNCH     = 13,
  parameter int unsigned DLY_SNAPSHOT  = 13,
  parameter int unsigned DLY_CALIB     = 13,
  parameter int unsigned DLY_BXVETO    = 13,
  parameter int unsigned DLY_NZS       = 13,
  parameter int unsigned DLY_HDRONLY   = 13,
  parameter int unsigned DLY_FERESET   = 13,
  parameter int unsigned DLY_BXIDRESET = 13
) (
  input  logic        clk,
  input  logic        clk90,
  input  logic        rst_n,
  input  logic [11:0] elink,
  output tfc_fe_t     tfc_raw,   // word as received, before the local delays
  output tfc_fe_t     tfc        // word with each command locally delayed
);

  logic [11:0] odd_s, even_s;
  logic [23:0] w;

  always_ff @(posedge clk90 or negedge rst_n)
    if (!rst_n) odd_s <= '0; else odd_s <= elink;

  always_ff @(negedge clk90 or negedge rst_n)
    if (!rst_n) even_s <= '0; else even_s <= elink;

  always_comb
    for (int i = 0; i < 12; i++) begin
      w[2*i+1] = odd_s[i];
      w[2*i]   = even_s[i];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tfc_raw <= '0; else tfc_raw <= w;

  delay_line #(.W(12), .DEPTH(DLY_BXID))      u_bxid  (.clk, .rst_n, .d(tfc_raw.bxid),        .q(tfc.bxid));
  delay_line #(.W(1),  .DEPTH(DLY_SYNCH))     u_synch (.clk, .rst_n, .d(tfc_raw.synch),       .q(tfc.synch));
  delay_line #(.W(1),  .DEPTH(DLY_SNAPSHOT))  u_snap  (.clk, .rst_n, .d(tfc_raw.snapshot),    .q(tfc.snapshot));
  delay_line #(.W(4),  .DEPTH(DLY_CALIB))     u_calib (.clk, .rst_n, .d(tfc_raw.calib_type),  .q(tfc.calib_type));
  delay_line #(.W(1),  .DEPTH(DLY_BXVETO))    u_veto  (.clk, .rst_n, .d(tfc_raw.bx_veto),     .q(tfc.bx_veto));
  delay_line #(.W(1),  .DEPTH(DLY_NZS))       u_nzs   (.clk, .rst_n, .d(tfc_raw.nzs),         .q(tfc.nzs));
  delay_line #(.W(1),  .DEPTH(DLY_HDRONLY))   u_hdr   (.clk, .rst_n, .d(tfc_raw.header_only), .q(tfc.header_only));
  delay_line #(.W(1),  .DEPTH(DLY_FERESET))   u_fer   (.clk, .rst_n, .d(tfc_raw.fe_reset),    .q(tfc.fe_reset));
  delay_line #(.W(1),  .DEPTH(DLY_BXIDRESET)) u_bxr   (.clk, .rst_n, .d(tfc_raw.bxid_reset),  .q(tfc.bxid_reset));

  assign tfc.reserve = 1'b0;

endmodule
