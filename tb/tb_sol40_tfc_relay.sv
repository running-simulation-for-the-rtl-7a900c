// tb_sol40_tfc_relay: random readout-board TFC words in, the front-end word
// is checked one clock later: each forwarded command bit in its front-end
// position, dropped fields absent, BXID shifted by 0xD8B modulo 3564.
module tb_sol40_tfc_relay;
  import minidaq_pkg::*;

  logic clk = 0, rst_n = 0;
  tfc_tell40_t w, w_q;
  tfc_fe_t     f;
  always #5 clk = ~clk;

  sol40_tfc_relay dut (.clk, .rst_n, .tfc_in(w), .tfc_fe(f));

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
    logic [63:0] r;
    logic [23:0] fb;
    int unsigned bx;
    w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        fb = f;
        bx = (int'(w_q[63:52]) + 12'hD8B) % ORBIT_BX;
        check(int'(fb[23:12]) == bx, $sformatf("BXID %0d exp %0d", fb[23:12], bx));
        check(fb[11] == 1'b0, "reserve");
        check(fb[10] == w_q[9], "synch");
        check(fb[9] == w_q[8], "snapshot");
        check(fb[8:5] == w_q[13:10], "calibration type");
        check(fb[4] == w_q[6], "BX veto");
        check(fb[3] == w_q[5], "NZS");
        check(fb[2] == w_q[4], "header only");
        check(fb[1] == w_q[2], "FE reset");
        check(fb[0] == w_q[0], "BXID reset");
      end
      r = {$urandom, $urandom};
      r[63:52] = 12'($urandom_range(0, ORBIT_BX - 1));
      w = r;
      w_q = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
