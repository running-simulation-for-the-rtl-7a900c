// tb_minidaq_top: the whole TFC and front-end chain at its default sizes:
// six links of 500 channels x 4 bits, occupancies 3.6 % to 3.1 %, 160-word
// buffers, 80-bit frames, VV packing, and the S-ODIN configuration of the
// source (FE reset wait 250, SYNCH 10 + 2, calibration A, NZS every orbit,
// snapshot every 4 orbits).
//
// One run of 24000 clocks: start of run (resets, SYNCH), normal running
// over four orbits, a throttle window, a resync, end of run. Checked:
//   - every front-end TFC word equals the S-ODIN word of 16 clocks before,
//     mapped field by field, with the SOL40 BXID offset;
//   - every link's stream, cut into events by the readout-side model, holds
//     for each crossing since the FE reset the event its TFC word calls for
//     (BXID, kind, hit count, every channel value), BufferFull excepted;
//   - alignment frames 4 clocks after each SYNCH at the front end.
// Each mechanism is counted and must occur: FE reset, SYNCH/alignment,
// resync, BX veto, NZS, HEADER ONLY by throttle, calibration, snapshot,
// BXID reset, MEP accept, BufferFull, idle frames, frames holding several
// events.
module tb_minidaq_top;
  import minidaq_pkg::*;
  import tell40_model_pkg::*;

  localparam int unsigned NFE = 6, CH = 500, DATA_W = 80;
  localparam int unsigned LENW = $clog2(CH + 2);
  localparam int unsigned OCC [6] = '{360, 350, 340, 330, 320, 310};
  localparam int NCYC = 24000;

  logic clk = 0, clk90 = 0, rst_n = 0, run = 0, resync = 0, throttle = 0;
  always #10 clk = ~clk;
  always @(clk) clk90 <= #5 clk;

  tfc_tell40_t       tfc_tell40;
  logic              running;
  logic [11:0]       elink;
  tfc_fe_t           fe_tfc [NFE];
  logic [3:0]        gbt_hdr [NFE];
  logic [DATA_W-1:0] gbt_data [NFE];
  logic [31:0]       occupancy [NFE], n_buffer_full [NFE], n_lost [NFE], n_trunc [NFE];

  minidaq_top dut (
    .clk, .clk90, .rst_n, .run, .resync, .throttle, .tfc_tell40, .running, .elink,
    .fe_tfc, .gbt_hdr, .gbt_data, .occupancy, .n_buffer_full, .n_lost, .n_trunc);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {int t; fe_event_t e;} xev_t;
  xev_t        expq [NFE][$];
  link_decoder dec [NFE];
  int          reset_t [NFE];
  int          align_due [NFE][$];
  int          align_t [NFE][$];
  logic [11:0] align_bx [NFE][$];
  tfc_tell40_t hist [$];

  // mechanism counters
  int n_fereset = 0, n_align = 0, n_veto_ev = 0, n_nzs_ev = 0, n_hdronly_ev = 0, n_calib = 0;
  int n_snap = 0, n_bxreset = 0, n_mep = 0, n_bf = 0, n_idle = 0, n_multi = 0, n_ev = 0, n_zs = 0;
  int n_resynch = 0;

  task automatic drain(int i, int t);
    dec_event_t d;
    int got = 0;
    while (dec[i].next_event(d)) begin
      xev_t x;
      int unsigned n;
      got++;
      if (expq[i].size() == 0) begin check(0, $sformatf("link %0d: unexpected event", i)); return; end
      x = expq[i].pop_front();
      n_ev++;
      check(d.bxid == int'(x.e.bxid), $sformatf("link %0d: bxid %0d exp %0d", i, d.bxid, x.e.bxid));
      if (x.e.kind != EV_NODATA && d.kind == 0) begin n_bf++; continue; end
      check(d.kind == ((x.e.kind == EV_NODATA) ? 0 : (x.e.kind == EV_ZS) ? 1 : 2),
            $sformatf("link %0d: kind %0d exp %0d", i, d.kind, x.e.kind));
      n_nzs_ev += (d.kind == 2);
      n_zs += (d.kind == 1);
      if (d.kind == 1) check(d.len == ref_hits(x.e.seed, CH, OCC[i]), $sformatf("link %0d: hit count", i));
      n = (d.kind == 1) ? d.len : (d.kind == 2) ? CH : 0;
      check(d.vals.size() == n, "value count");
      for (int k = 0; k < int'(n) && k < d.vals.size(); k++)
        check(d.vals[k] == ((d.kind == 1) ? ref_zs(x.e.seed, k, 4) : ref_nzs(x.e.seed, k, 4)),
              $sformatf("link %0d: value %0d", i, k));
    end
    if (got >= 2) n_multi++;
  endtask

  initial begin
    for (int i = 0; i < int'(NFE); i++) begin
      dec[i] = new(12, LENW, 4, CH, 0);
      reset_t[i] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    run = 1;
    for (int t = 0; t < NCYC; t++) begin
      @(posedge clk);
      #2;
      // ---- S-ODIN word and TFC chain
      hist.push_front(tfc_tell40);
      if (hist.size() > 40) void'(hist.pop_back());
      n_calib   += (tfc_tell40.calib_type != 0);
      n_snap    += tfc_tell40.snapshot;
      n_bxreset += (running && tfc_tell40.bxid_reset);
      n_mep     += tfc_tell40.mep_accept;
      if (hist.size() > 16) begin
        tfc_tell40_t s;
        tfc_fe_t     f;
        s = hist[16];
        f = fe_tfc[0];
        check(int'(f.bxid) == (int'(s.bxid) + 12'hD8B) % ORBIT_BX, "FE BXID = S-ODIN BXID + offset, 16 clocks later");
        check({f.synch, f.snapshot, f.calib_type, f.bx_veto, f.nzs, f.header_only, f.fe_reset, f.bxid_reset}
              == {s.synch, s.snapshot, s.calib_type, s.bx_veto, s.nzs, s.header_only, s.fe_reset, s.bxid_reset},
              "FE commands = S-ODIN commands 16 clocks later");
      end
      // ---- per link
      for (int i = 0; i < int'(NFE); i++) begin
        tfc_fe_t f;
        f = fe_tfc[i];
        // frame visible now
        if (align_due[i].size() > 0 && align_due[i][0] == t) begin
          int ts;
          logic [11:0] abx;
          void'(align_due[i].pop_front());
          ts = align_t[i].pop_front();
          abx = align_bx[i].pop_front();
          check(gbt_hdr[i] == GBT_HDR_DATA && gbt_data[i][79 -: 12] == abx &&
                gbt_data[i][67 -: 10] == SYNCH_PATTERN, $sformatf("link %0d: alignment frame", i));
          if (i == 0) n_align++;
          dec[i].clear();
          while (expq[i].size() > 0 && expq[i][0].t <= ts) void'(expq[i].pop_front());
        end else if (reset_t[i] >= 0 && t > reset_t[i] + 3) begin
          if (gbt_hdr[i] == GBT_HDR_DATA) begin
            dec[i].push_data(112'(gbt_data[i]), DATA_W);
            drain(i, t);
          end else begin
            check(gbt_hdr[i] == GBT_HDR_IDLE && gbt_data[i] == '0, "idle frame");
            n_idle++;
          end
        end
        // command at the front end now
        if (f.fe_reset) begin
          reset_t[i] = t;
          expq[i].delete();
          dec[i].clear();
          align_due[i].delete();
          align_t[i].delete();
          align_bx[i].delete();
          if (i == 0) n_fereset++;
        end else if (reset_t[i] >= 0) begin
          xev_t x;
          x.t = t;
          x.e.bxid = f.bxid;
          x.e.seed = 16'(t - reset_t[i] - 1);
          x.e.hits = '0;
          x.e.kind = f.synch ? EV_SYNCH : (f.header_only || f.bx_veto) ? EV_NODATA : f.nzs ? EV_NZS : EV_ZS;
          if (f.synch) begin
            align_due[i].push_back(t + 4);
            align_t[i].push_back(t);
            align_bx[i].push_back(f.bxid);
            if (i == 0 && t > 1000) n_resynch++;
          end else expq[i].push_back(x);
          if (i == 0) begin
            n_veto_ev    += f.bx_veto;
            n_hdronly_ev += (f.header_only && !f.bx_veto);
          end
        end
      end
      // ---- stimulus
      throttle = (t >= 5000 && t < 5100);
      resync = (t == 9000);
      if (t == NCYC - 200) run = 0;
    end
    for (int i = 0; i < int'(NFE); i++) check(n_lost[i] == 0, $sformatf("link %0d lost %0d events", i, n_lost[i]));
    check(n_fereset == 1, "FE reset");
    check(n_align >= 11 && n_resynch == 10, $sformatf("alignment frames %0d, resync SYNCH %0d", n_align, n_resynch));
    check(n_veto_ev > 0, "BX veto");
    check(n_nzs_ev > 0, "NZS events");
    check(n_hdronly_ev > 0, "HEADER ONLY");
    check(n_calib > 0, "calibration");
    check(n_snap > 0, "snapshot");
    check(n_bxreset > 0, "BXID reset");
    check(n_mep > 0, "MEP accept");
    check(n_bf > 0, "BufferFull");
    check(n_idle > 0, "idle frames");
    check(n_multi > 0, "frames with several events");
    check(n_ev > 50000, $sformatf("decoded events %0d", n_ev));
    $display("events %0d zs %0d | FE reset %0d align %0d resync %0d veto %0d nzs %0d hdr-only %0d calib %0d snap %0d bxreset %0d mep %0d BufferFull %0d idle %0d multi %0d",
             n_ev, n_zs, n_fereset, n_align, n_resynch, n_veto_ev, n_nzs_ev, n_hdronly_ev, n_calib, n_snap,
             n_bxreset, n_mep, n_bf, n_idle, n_multi);
    for (int i = 0; i < int'(NFE); i++)
      $display("link %0d: BufferFull %0d lost %0d occupancy %0d", i, n_buffer_full[i], n_lost[i], occupancy[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
