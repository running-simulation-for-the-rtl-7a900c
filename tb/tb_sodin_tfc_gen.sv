// tb_sodin_tfc_gen: checks the S-ODIN command sequence word by word.
//
// Shortened settings (reset wait 20, NZS every 500 clocks in pairs, snapshot
// every 1000 clocks, calibration A every orbit and B every second orbit)
// keep three orbits short. Checked against the rules written out here: the
// start-of-run order and lengths, the BXID advance and continuity, BX veto,
// trigger, calibration BXIDs and periods, NZS pairs and the header-only
// recovery window after them, throttle, snapshot spacing, BXID reset,
// MEP accept every 16 triggers with round-robin destinations, and resync.
module tb_sodin_tfc_gen;
  import minidaq_pkg::*;

  localparam int unsigned RWAIT = 20, NZS_P = 500, TAE = 5, SNAP = 1000;
  localparam int unsigned SLEN = 10, SWAIT = 2, VETO1 = 3444, MEPP = 16;

  logic clk = 0, rst_n = 0, run = 0, resync = 0, throttle = 0;
  tfc_tell40_t w;
  logic running;
  logic [11:0] bx_now;
  always #5 clk = ~clk;

  sodin_tfc_gen #(
    .FE_RESET_WAIT(RWAIT), .NZS_CONSECUTIVE_ENB(1'b1), .NZS_CONSECUTIVE(2), .NZS_TAE_WAIT(TAE),
    .NZS_PERIOD(NZS_P), .CALIB_ENB(4'b0011),
    .CALIB_PERIOD('{16'd1, 16'd2, 16'd1, 16'd1}), .SNAPSHOT_INTERVAL(SNAP),
    .SYNCH_LENGTH(SLEN), .SYNCH_WAIT(SWAIT), .MEP_PACKING(MEPP)
  ) dut (.clk, .rst_n, .run, .resync, .throttle, .tfc(w), .running, .bx_now);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, t_reset = -1, n_reset = 0, n_synch = 0, last_synch = -1;
  int t_run = -1, last_snap = -1, n_snap = 0, n_calA = 0, n_calB = 0, last_calB = -1;
  int n_nzs = 0, nzs_run = 0, wait_left = 0, last_mep = -1, trig_cnt = 0, n_mep = 0;
  int n_hdr = 0, n_thr_hdr = 0, n_veto = 0;
  int unsigned prev_bxid = 0, last_dest = 0;
  bit thr_q = 0, in_run_prev = 0, resync_done = 0;
  int t_resync = -1, n_resynch = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    run = 1;
    forever begin
      @(negedge clk);
      cyc++;
      // BXID advance and continuity
      check(((int'(w.bxid) - int'(bx_now) + ORBIT_BX) % ORBIT_BX) == 16, "BXID 16 crossings ahead");
      if (cyc > 1) check(int'(w.bxid) == (prev_bxid + 1) % ORBIT_BX, "BXID continuity");
      prev_bxid = w.bxid;
      // start-of-run sequence
      if (w.fe_reset) begin
        n_reset++;
        t_reset = cyc;
        check(w.be_reset && w.eid_reset && w.bxid_reset && !w.synch, "reset word");
      end
      if (w.synch) begin
        if (last_synch != cyc - 1) begin
          if (t_resync < 0) check(cyc == t_reset + 1 + RWAIT, $sformatf("first SYNCH %0d after reset", cyc - t_reset));
          else check(cyc == t_resync + 1, "SYNCH right after resync");
          n_synch = 0;
        end
        n_synch++;
        last_synch = cyc;
        if (t_resync >= 0) n_resynch++;
      end
      if (running && !in_run_prev) begin
        check(n_synch == SLEN, $sformatf("SYNCH length %0d", n_synch));
        check(cyc == last_synch + SWAIT + 1, "SYNCH wait");
        if (t_run < 0) t_run = cyc;
      end
      // running words
      if (running) begin
        bit veto, exp_hdr;
        veto = (w.bxid >= VETO1);
        n_veto += veto;
        check(w.bx_veto == veto, "BX veto window");
        check(w.trigger == !veto, "trigger on every non-vetoed crossing");
        check(w.bxid_reset == (w.bxid == 0), "BXID reset on BXID 0");
        check(w.calib_type[0] == (w.bxid == 12'h0C0F), "calibration A BXID");
        if (w.calib_type[0]) n_calA++;
        if (w.calib_type[1]) begin
          check(w.bxid == 12'h04AF, "calibration B BXID");
          if (last_calB >= 0) check(cyc - last_calB == 2 * ORBIT_BX, "calibration B every 2 orbits");
          last_calB = cyc;
          n_calB++;
        end
        check(w.calib_type[3:2] == 0, "disabled calibrations");
        check(w.trigger_type == ((w.calib_type != 0) ? TRG_CALIB : w.nzs ? TRG_NZS : TRG_PHYSICS), "trigger type");
        if (w.snapshot) begin
          if (last_snap >= 0) check(cyc - last_snap == SNAP, "snapshot interval");
          last_snap = cyc;
          n_snap++;
        end
        exp_hdr = !veto && (thr_q || (wait_left > 0 && nzs_run == 0));
        check(w.header_only == exp_hdr, $sformatf("header only (thr %0d wait %0d)", thr_q, wait_left));
        n_hdr += w.header_only;
        n_thr_hdr += (w.header_only && thr_q);
        if (w.nzs) begin
          n_nzs++;
          nzs_run++;
          if (nzs_run == 2) begin wait_left = TAE; nzs_run = 0; end
        end else if (nzs_run == 0 && wait_left > 0) wait_left--;
        else if (nzs_run == 1) check(veto, "NZS triggers come in consecutive pairs");
        if (w.trigger) trig_cnt++;
        if (w.mep_accept) begin
          check(trig_cnt == MEPP, $sformatf("MEP accept after %0d triggers", trig_cnt));
          if (n_mep > 0) check(w.mep_dest == 32'h0A00_0001 + (last_dest - 32'h0A00_0001 + 1) % 4, "MEP destination");
          last_dest = w.mep_dest;
          trig_cnt = 0;
          n_mep++;
        end
      end else if (!w.fe_reset) begin
        check(!w.header_only && !w.nzs && !w.trigger && w.calib_type == 0 && !w.snapshot, "no commands outside RUN");
      end
      if (!running) begin trig_cnt = 0; last_snap = -1; nzs_run = 0; wait_left = 0; end
      in_run_prev = running;
      // stimulus for the next edge
      thr_q = 0;
      throttle = (cyc % 3000 > 2000 && cyc % 3000 < 2040);
      if (running && !w.bx_veto) thr_q = throttle;
      resync = 0;
      if (cyc == 9000) begin resync = 1; t_resync = cyc + 1; end
      if (cyc == 12000) run = 0;
      if (cyc == 12050) break;
    end
    check(n_reset == 1, "one reset word");
    check(n_resynch == SLEN, "resync SYNCH length");
    check(n_snap >= 8, $sformatf("snapshots %0d", n_snap));
    check(n_calA == 3, $sformatf("calibration A %0d", n_calA));
    check(n_calB >= 1, $sformatf("calibration B %0d", n_calB));
    check(n_nzs >= 30, $sformatf("NZS triggers %0d", n_nzs));
    check(n_thr_hdr > 20, "throttle produced header-only words");
    check(n_mep > 500, "MEP accepts");
    check(n_veto > 200, "vetoed crossings");
    check(!running, "run stopped");
    $display("snap %0d calA %0d calB %0d nzs %0d hdr %0d mep %0d", n_snap, n_calA, n_calB, n_nzs, n_hdr, n_mep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
