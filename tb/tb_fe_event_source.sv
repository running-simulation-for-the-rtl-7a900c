// tb_fe_event_source: random TFC commands on consecutive crossings, with
// both BXID errors switched on at short intervals (skip every 37th event by
// 12, swap every 23rd event with the next). A reference model written here
// rebuilds the expected event stream: kind by command priority, hit count
// from the per-channel occupancy rule, event number since FE reset, BXID
// offset, skip before swap. Every event is checked in order and three clocks
// after its TFC word; FE reset must raise `flush` and restart the numbering.
module tb_fe_event_source;
  import minidaq_pkg::*;
  import tell40_model_pkg::*;

  localparam int unsigned CH = 500, OCC = 2000, OFF = 5, SKI = 37, JMP = 12, SWI = 23;

  logic clk = 0, rst_n = 0;
  tfc_fe_t   tfc;
  logic      ev_valid, flush;
  fe_event_t ev;
  always #5 clk = ~clk;

  fe_event_source #(.CHANNELS(CH), .OCC_E4(OCC), .BXID_OFFSET(12'(OFF)),
                    .SKIP_BXID(1'b1), .SKIP_INTERVAL(16'(SKI)), .SKIP_JUMP(12'(JMP)),
                    .SWAP_BXID(1'b1), .SWAP_INTERVAL(16'(SWI)))
    dut (.clk, .rst_n, .tfc, .ev_valid, .ev, .flush);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {fe_event_t e; int t;} tev_t;
  tev_t  expq[$];
  tev_t  pend;
  bit    pend_v = 0, pend_swap = 0;
  int    flush_at[$];
  int unsigned evn = 0, skc = 0, swc = 0;
  int    n_ev = 0, n_skip = 0, n_swap = 0, n_flush = 0, n_kind [4] = '{0, 0, 0, 0};

  initial begin
    int unsigned bx = 100;
    tfc = '0;
    tfc.fe_reset = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // outputs from the previous edge
      if (flush_at.size() > 0 && flush_at[0] == t) begin
        check(flush && !ev_valid, "flush two clocks after FE reset");
        void'(flush_at.pop_front());
        n_flush++;
      end else if (t > 1) check(!flush, "no spurious flush");
      if (ev_valid) begin
        if (expq.size() == 0) check(0, "unexpected event");
        else begin
          tev_t x;
          x = expq.pop_front();
          n_ev++;
          check(t == x.t + 3, $sformatf("latency %0d", t - x.t));
          check(ev == x.e, $sformatf("event bx %0d/%0d kind %0d/%0d hits %0d/%0d seed %0d/%0d",
                ev.bxid, x.e.bxid, ev.kind, x.e.kind, ev.hits, x.e.hits, ev.seed, x.e.seed));
        end
      end
      // new command
      bx = (bx + 1) % ORBIT_BX;
      tfc = '0;
      tfc.bxid = 12'(bx);
      tfc.fe_reset    = ($urandom_range(0, 399) == 0) || t == 1500;
      tfc.synch       = ($urandom_range(0, 49) == 0);
      tfc.header_only = ($urandom_range(0, 9) == 0);
      tfc.bx_veto     = ($urandom_range(0, 9) == 0);
      tfc.nzs         = ($urandom_range(0, 19) == 0);
      if (t >= 2990) tfc.fe_reset = 0;
      // reference model
      if (tfc.fe_reset) begin
        evn = 0; skc = 0; swc = 0;
        pend_v = 0;
        flush_at.push_back(t + 2);
      end else begin
        tev_t n;
        bit sk, sw;
        sk = (skc == SKI - 1);
        sw = !sk && (swc == SWI - 1);
        n_skip += sk;
        n.e.seed = 16'(evn);
        n.e.hits = 16'(ref_hits(evn, CH, OCC));
        n.e.bxid = 12'((bx + OFF + (sk ? JMP : 0)) % ORBIT_BX);
        n.e.kind = tfc.synch ? EV_SYNCH : (tfc.header_only || tfc.bx_veto) ? EV_NODATA :
                   tfc.nzs ? EV_NZS : EV_ZS;
        n_kind[n.e.kind]++;
        n.t = t;
        evn = (evn + 1) % 65536;
        skc = (skc + 1) % SKI;
        swc = (swc + 1) % SWI;
        if (pend_v) begin
          tev_t o;
          bit   nsw;
          o = pend;
          nsw = sw;
          if (pend_swap) begin
            o.e.bxid = n.e.bxid;
            n.e.bxid = pend.e.bxid;
            nsw = 0;
            n_swap++;
          end
          o.t = n.t - 1;  // the held event leaves with its successor
          expq.push_back(o);
          pend_swap = nsw;
        end else pend_swap = sw;
        pend = n;
        pend_v = 1;
      end
    end
    check(n_ev > 2500, $sformatf("events %0d", n_ev));
    check(n_skip > 20 && n_swap > 20, $sformatf("skips %0d swaps %0d", n_skip, n_swap));
    check(n_flush >= 2, "FE resets");
    for (int k = 0; k < 4; k++) check(n_kind[k] > 10, $sformatf("kind %0d seen %0d", k, n_kind[k]));
    $display("events %0d skips %0d swaps %0d flushes %0d", n_ev, n_skip, n_swap, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
