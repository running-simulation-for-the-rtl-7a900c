// tb_fe_data_gen: one front-end link end to end, from TFC words on the
// e-links to the decoded GBT stream.
//
// The testbench drives the e-links double data rate with: an FE reset, a
// run of crossings with random HEADER ONLY, BX VETO and NZS commands, and
// two SYNCH commands. Occupancy 3.6 % and the 160-word buffer let the buffer
// fill up, so BufferFull events occur. The stream is cut into events by the
// readout-side model and each event is compared with what its TFC word
// calls for: BXID, kind, hit count and every channel value (rebuilt from
// the event number since the FE reset). The alignment frame must appear
// exactly 18 clocks after its SYNCH word left the e-links.
module tb_fe_data_gen;
  import minidaq_pkg::*;
  import tell40_model_pkg::*;

  localparam int unsigned CH = 500, OCC = 360, DEPTH = 160, DATA_W = 80, LAT = 18;
  localparam int unsigned LENW = $clog2(CH + 2);

  logic clk = 0, clk90 = 0, rst_n = 0;
  logic [11:0] elink = '0;
  logic [3:0] hdr;
  logic [DATA_W-1:0] data;
  tfc_fe_t tfc_d;
  logic [31:0] occ, nbf, nlost, ntr;
  always #10 clk = ~clk;
  always @(clk) clk90 <= #5 clk;

  fe_data_gen #(.ENC(ENC_VV), .CHANNELS(CH), .OCC_E4(OCC), .DEPTH(DEPTH)) dut (
    .clk, .clk90, .rst_n, .elink, .gbt_hdr(hdr), .gbt_data(data), .tfc(tfc_d),
    .occupancy(occ), .n_buffer_full(nbf), .n_lost(nlost), .n_trunc(ntr));

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

  logic [23:0] cur = '0, tx = '0;
  always @(posedge clk) begin
    tx <= cur;
    for (int b = 0; b < 12; b++) elink[b] <= cur[2*b+1];
  end
  always @(negedge clk) for (int b = 0; b < 12; b++) elink[b] <= tx[2*b];

  typedef struct {int w; fe_event_t e;} xev_t;
  xev_t expq[$];
  int   synch_at[$];     // edge index at which an alignment frame is due
  int   synch_w[$];      // word index of that SYNCH
  link_decoder dec;
  int n_ev = 0, n_bf_seen = 0, n_lost_seen = 0, n_align = 0, n_nzs = 0, n_zs = 0, n_nod = 0;
  int n_idle = 0, n_span = 0;

  task automatic drain();
    dec_event_t d;
    while (dec.next_event(d)) begin
      xev_t x;
      int unsigned n;
      while (expq.size() > 0 && int'(expq[0].e.bxid) != d.bxid) begin
        void'(expq.pop_front());
        n_lost_seen++;
      end
      if (expq.size() == 0) begin check(0, "event not expected"); return; end
      x = expq.pop_front();
      n_ev++;
      if (x.e.kind != EV_NODATA && d.kind == 0) begin n_bf_seen++; continue; end
      check(d.kind == ((x.e.kind == EV_NODATA) ? 0 : (x.e.kind == EV_ZS) ? 1 : 2),
            $sformatf("kind %0d for bx %0d", d.kind, d.bxid));
      n_nod += (d.kind == 0);
      n_zs  += (d.kind == 1);
      n_nzs += (d.kind == 2);
      if (x.e.kind == EV_ZS) check(d.len == ref_hits(x.e.seed, CH, OCC), "hit count");
      n = (d.kind == 1) ? d.len : (d.kind == 2) ? CH : 0;
      check(d.vals.size() == n, "value count");
      for (int k = 0; k < int'(n) && k < d.vals.size(); k++)
        check(d.vals[k] == ((d.kind == 1) ? ref_zs(x.e.seed, k, 4) : ref_nzs(x.e.seed, k, 4)),
              "channel value");
    end
  endtask

  initial begin
    int unsigned bx = 3000, evn = 0;
    tfc_fe_t w;
    dec = new(12, LENW, 4, CH, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      // word i leaves with the coming rising edge
      bx = (bx + 1) % ORBIT_BX;
      w = '0;
      w.bxid = 12'(bx);
      if (i < 3000 || i > 3200) begin
        w.header_only = ($urandom_range(0, 19) == 0);
        w.bx_veto = (bx >= 3444) || (bx % 800 < 40);
        w.nzs = ($urandom_range(0, 299) == 0);
      end else w.bx_veto = 1;   // empty crossings: the buffer drains
      w.fe_reset = (i == 5);
      w.synch = (i == 1000) || (i == 4000);
      if (i >= 5800) w = '{bxid: 12'(bx), bx_veto: 1'b1, default: '0};
      cur = w;
      if (i > 5) begin
        xev_t x;
        x.w = i;
        x.e.bxid = w.bxid;
        x.e.seed = 16'(evn);
        x.e.hits = '0;
        x.e.kind = w.synch ? EV_SYNCH : (w.header_only || w.bx_veto) ? EV_NODATA : w.nzs ? EV_NZS : EV_ZS;
        if (!w.synch) expq.push_back(x);
        else begin synch_at.push_back(i + LAT); synch_w.push_back(i); end
        evn++;
      end
      @(posedge clk);
      #2;
      // frame visible after this edge
      if (synch_at.size() > 0 && synch_at[0] == i) begin
        int sw;
        sw = synch_w.pop_front();
        void'(synch_at.pop_front());
        check(hdr == GBT_HDR_DATA && data[79 -: 22] == {12'(bx - LAT), SYNCH_PATTERN}, "alignment frame");
        n_align++;
        dec.clear();
        while (expq.size() > 0 && expq[0].w <= sw) void'(expq.pop_front());
      end else if (i > 25 && hdr == GBT_HDR_DATA) begin
        dec.push_data(112'(data), DATA_W);
        drain();
      end else if (i > 25) begin
        check(hdr == GBT_HDR_IDLE, "idle header");
        n_idle++;
      end
    end
    check(n_align == 2, "two alignment frames");
    check(n_ev > 4000, $sformatf("decoded events %0d", n_ev));
    check(n_bf_seen > 0 && n_bf_seen <= int'(nbf), $sformatf("BufferFull seen %0d counted %0d", n_bf_seen, nbf));
    check(n_lost_seen == 0 && nlost == 0, $sformatf("lost seen %0d counted %0d", n_lost_seen, nlost));
    check(n_nzs > 3 && n_zs > 1000 && n_nod > 500, $sformatf("kinds nod %0d zs %0d nzs %0d", n_nod, n_zs, n_nzs));
    check(n_idle > 0, "idle frames");
    $display("events %0d (nodata %0d zs %0d nzs %0d), BufferFull %0d/%0d, lost %0d/%0d, idle %0d",
             n_ev, n_nod, n_zs, n_nzs, n_bf_seen, nbf, n_lost_seen, nlost, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
