// minidaq_top: the fast-control and front-end part of the Mini-DAQ
// simulation: one readout supervisor, one interface board and NUM_FE
// emulated front-end links.
//
// S-ODIN (sodin_tfc_gen) emits the 64-bit TFC word for the readout boards
// every clock; it is brought out on `tfc_tell40`. SOL40 (sol40_tfc_relay)
// turns it into the 24-bit front-end word, which gbt_tfc_elink_tx puts on 12
// double-data-rate e-links. Every front-end link (fe_data_gen) decodes the
// e-links, emulates its detector hits with its own occupancy, buffers and
// packs the events, and sends one GBT frame (4-bit header + DATA_W bits) per
// clock on gbt_hdr[i]/gbt_data[i]. The readout boards that decode the frames
// are outside this design.
// The six links and their occupancies (3.6 % down to 3.1 %) are the
// configuration of the source (active_fiber = 0x3F, occupancy_01..06), as
// are the buffer depth, frame width and TFC settings held by the blocks'
// defaults. Clocks: clk is the 40 MHz bunch-crossing clock, clk90 the same
// clock delayed by a quarter period for sampling the e-links.
module minidaq_top
  import minidaq_pkg::*;
#(
  parameter int unsigned NUM_FE   = 6,
  parameter int unsigned OCC_E4 [6] = '{360, 350, 340, 330, 320, 310},
  parameter fe_enc_e     ENC      = ENC_VV,
  parameter int unsigned CHANNELS = 500,
  parameter int unsigned CHW      = 4,
  parameter int unsigned DEPTH    = 160,
  parameter int unsigned DATA_W   = 80,
  parameter int unsigned BXW      = 12
) (
  input  logic              clk,
  input  logic              clk90,
  input  logic              rst_n,
  input  logic              run,
  input  logic              resync,
  input  logic              throttle,
  output tfc_tell40_t       tfc_tell40,
  output logic              running,
  output logic [11:0]       elink,
  output tfc_fe_t           fe_tfc        [NUM_FE],
  output logic [3:0]        gbt_hdr       [NUM_FE],
  output logic [DATA_W-1:0] gbt_data      [NUM_FE],
  output logic [31:0]       occupancy     [NUM_FE],
  output logic [31:0]       n_buffer_full [NUM_FE],
  output logic [31:0]       n_lost        [NUM_FE],
  output logic [31:0]       n_trunc       [NUM_FE]
);

  tfc_fe_t     tfc_sol40;
  logic [11:0] bx_now;

  sodin_tfc_gen u_sodin (
    .clk, .rst_n, .run, .resync, .throttle, .tfc(tfc_tell40), .running, .bx_now
  );

  sol40_tfc_relay u_sol40 (
    .clk, .rst_n, .tfc_in(tfc_tell40), .tfc_fe(tfc_sol40)
  );

  gbt_tfc_elink_tx u_elink (
    .clk, .rst_n, .tfc_fe(tfc_sol40), .elink
  );

  for (genvar i = 0; i < int'(NUM_FE); i++) begin : g_fe
    fe_data_gen #(
      .ENC(ENC), .CHANNELS(CHANNELS), .CHW(CHW), .OCC_E4(OCC_E4[i]), .DEPTH(DEPTH),
      .DATA_W(DATA_W), .BXW(BXW)
    ) u_fe (
      .clk, .clk90, .rst_n, .elink,
      .gbt_hdr(gbt_hdr[i]), .gbt_data(gbt_data[i]), .tfc(fe_tfc[i]),
      .occupancy(occupancy[i]), .n_buffer_full(n_buffer_full[i]),
      .n_lost(n_lost[i]), .n_trunc(n_trunc[i])
    );
  end

endmodule
