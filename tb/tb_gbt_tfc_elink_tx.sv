// tb_gbt_tfc_elink_tx: random front-end TFC words in; each e-link is sampled
// in the middle of the high and of the low half of the following clock and
// must carry bit 2i+1 first, then bit 2i.
module tb_gbt_tfc_elink_tx;
  import minidaq_pkg::*;

  logic clk = 0, rst_n = 0;
  tfc_fe_t w;
  logic [11:0] elink;
  always #10 clk = ~clk;

  gbt_tfc_elink_tx dut (.clk, .rst_n, .tfc_fe(w), .elink);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] sent;
    w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sent = 24'($urandom);
      w = sent;
      @(posedge clk);
      #5;   // middle of the high half
      for (int b = 0; b < 12; b++) check(elink[b] == sent[2*b+1], $sformatf("odd bit %0d", 2*b+1));
      #10;  // middle of the low half
      for (int b = 0; b < 12; b++) check(elink[b] == sent[2*b], $sformatf("even bit %0d", 2*b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
