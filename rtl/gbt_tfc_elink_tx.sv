// gbt_tfc_elink_tx: double-data-rate output of the 24 front-end TFC bits on
// 12 e-links of 80 Mb/s, as the GBT chip delivers them to the front ends.
//
// The TFC bits are packed so that they all come out for the same 40 MHz
// clock: e-link i carries bit 2i+1 (odd, the more significant of the pair)
// during the high phase of the clock, after the rising edge, and bit 2i
// (even) during the low phase, after the falling edge. The word is captured
// on the rising edge (one clock of latency) and the output is the usual DDR
// output register: two flops and a clock-selected multiplexer. The bit order
// on the edges follows the source; the assignment of bit pairs to e-link
// numbers is this design's choice.
module gbt_tfc_elink_tx
  import minidaq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  tfc_fe_t     tfc_fe,
  output logic [11:0] elink
);

  logic [11:0] odd_q, even_q;
  logic [23:0] w;

  assign w = tfc_fe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_q  <= '0;
      even_q <= '0;
    end else begin
      for (int i = 0; i < 12; i++) begin
        odd_q[i]  <= w[2*i+1];
        even_q[i] <= w[2*i];
      end
    end
  end

  assign elink = clk ? odd_q : even_q;

endmodule
