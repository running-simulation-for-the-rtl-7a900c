// tb_fe_tfc_decoder: the testbench drives the 12 e-links double data rate
// (bit 2i+1 after the rising edge, bit 2i after the falling edge) with random
// TFC words and checks that the received word appears one clock later and
// that every command comes out after its own local delay, here all
// different.
module tb_fe_tfc_decoder;
  import minidaq_pkg::*;

  localparam int D_BX = 3, D_SY = 5, D_SN = 0, D_CA = 2, D_VE = 7, D_NZ = 1, D_HO = 4, D_FR = 6, D_BR = 8;

  logic clk = 0, clk90 = 0, rst_n = 0;
  logic [11:0] elink = '0;
  tfc_fe_t raw, dly;
  always #10 clk = ~clk;
  always @(clk) clk90 <= #5 clk;

  fe_tfc_decoder #(
    .DLY_BXID(D_BX), .DLY_SYNCH(D_SY), .DLY_SNAPSHOT(D_SN), .DLY_CALIB(D_CA), .DLY_BXVETO(D_VE),
    .DLY_NZS(D_NZ), .DLY_HDRONLY(D_HO), .DLY_FERESET(D_FR), .DLY_BXIDRESET(D_BR)
  ) dut (.clk, .clk90, .rst_n, .elink, .tfc_raw(raw), .tfc(dly));

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

  logic [23:0] hist [$];   // hist[0] is the word sent in the current clock
  logic [23:0] cur = '0;

  logic [23:0] tx = '0;     // word on the e-links in this clock
  always @(posedge clk) begin
    tx <= cur;
    for (int b = 0; b < 12; b++) elink[b] <= cur[2*b+1];
  end
  always @(negedge clk) for (int b = 0; b < 12; b++) elink[b] <= tx[2*b];

  function automatic logic [23:0] past(int n);   // word sent n clocks ago
    return (n < hist.size()) ? hist[n] : 24'd0;
  endfunction

  initial begin
    tfc_fe_t e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      // a new word goes out from this rising edge
      cur = 24'($urandom);
      hist.push_front(cur);
      @(posedge clk);
      #2;
      if (i > 12) begin
        e = past(1);
        check(raw == e, "received word one clock later");
        e = past(1 + D_BX); check(dly.bxid == e.bxid, "BXID delay");
        e = past(1 + D_SY); check(dly.synch == e.synch, "SYNCH delay");
        e = past(1 + D_SN); check(dly.snapshot == e.snapshot, "SNAPSHOT delay");
        e = past(1 + D_CA); check(dly.calib_type == e.calib_type, "calibration delay");
        e = past(1 + D_VE); check(dly.bx_veto == e.bx_veto, "BX veto delay");
        e = past(1 + D_NZ); check(dly.nzs == e.nzs, "NZS delay");
        e = past(1 + D_HO); check(dly.header_only == e.header_only, "header only delay");
        e = past(1 + D_FR); check(dly.fe_reset == e.fe_reset, "FE reset delay");
        e = past(1 + D_BR); check(dly.bxid_reset == e.bxid_reset, "BXID reset delay");
      end
      if (hist.size() > 20) void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
