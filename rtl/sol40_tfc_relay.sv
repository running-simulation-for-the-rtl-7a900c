// sol40_tfc_relay: interface-board (SOL40) relay of the fast commands from
// the readout-board TFC word to the front-end TFC word.
//
// Each clock it takes the 64-bit word from S-ODIN and builds the 24-bit word
// that travels to the front ends in every GBT frame: BXID, SYNCH, SNAPSHOT,
// calibration type, BX veto, NZS, HEADER ONLY, FE reset and BXID reset keep
// their meaning; trigger, trigger type, MEP, BE reset and EID reset are
// readout-board only and are dropped. The BXID is shifted by BXID_OFFSET
// modulo the orbit length (the configuration value 0xD8B), which aligns the
// front-end BXID with the readout-board BXID. The front-end word is
// registered: one clock of latency. The field mapping and the offset follow
// the source; the register stage is this design's choice.
module sol40_tfc_relay
  import minidaq_pkg::*;
#(
  parameter logic [11:0] BXID_OFFSET = 12'hD8B
) (
  input  logic        clk,
  input  logic        rst_n,
  input  tfc_tell40_t tfc_in,
  output tfc_fe_t     tfc_fe
);

  logic [11:0] bxid_fe;

  always_comb begin
    logic [12:0] s;
    s = {1'b0, tfc_in.bxid} + {1'b0, BXID_OFFSET};
    if (s >= 13'(ORBIT_BX)) s = s - 13'(ORBIT_BX);
    bxid_fe = s[11:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tfc_fe <= '0;
    else begin
      tfc_fe.bxid        <= bxid_fe;
      tfc_fe.reserve     <= 1'b0;
      tfc_fe.synch       <= tfc_in.synch;
      tfc_fe.snapshot    <= tfc_in.snapshot;
      tfc_fe.calib_type  <= tfc_in.calib_type;
      tfc_fe.bx_veto     <= tfc_in.bx_veto;
      tfc_fe.nzs         <= tfc_in.nzs;
      tfc_fe.header_only <= tfc_in.header_only;
      tfc_fe.fe_reset    <= tfc_in.fe_reset;
      tfc_fe.bxid_reset  <= tfc_in.bxid_reset;
    end
  end

endmodule
