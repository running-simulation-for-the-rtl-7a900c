// tb_fe_gbt_packer: checks the three packing algorithms.
//
// VV and FV packers are fed from a testbench descriptor queue (standing in
// for the derandomizer) with random no-data, zero-suppressed and NZS
// events; the frames are decoded by the readout-side model and every field
// and value is compared with the event that was popped. The stream must
// send a data frame exactly when 80 bits are waiting, also when bursts of
// short events must share one frame. A SYNCH event must
// give the alignment frame and restart the stream. The FF packer gets one
// event per clock and each frame is checked field by field, truncation
// included. A channel count of 40 keeps NZS events short.
module tb_fe_gbt_packer;
  import minidaq_pkg::*;
  import tell40_model_pkg::*;

  localparam int unsigned DATA_W = 80, BXW = 12, CHW = 4, CH = 40;
  localparam int unsigned LENW = $clog2(CH + 2);
  localparam int unsigned NPC_FF = (DATA_W - BXW - 2 - LENW) / CHW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // ---------------- variable-length packers (VV = 0, FV = 1) -------------
  fe_event_t  q_ev [2][$];
  fe_event_t  popped [2][$];
  localparam int unsigned NH = DATA_W / (BXW + 1) + 2;
  logic [$clog2(NH+1)-1:0] desc_avail [2], desc_npop [2];
  logic       frame_sent [2];
  fe_event_t  desc_head [2][NH];
  logic [3:0] hdr [2];
  logic [DATA_W-1:0] data [2];
  logic [31:0] ntr [2];
  logic       sy_valid;
  fe_event_t  sy_ev;
  int unsigned pending_bits [2];

  for (genvar g = 0; g < 2; g++) begin : g_var
    always_comb begin
      desc_avail[g] = (q_ev[g].size() > NH) ? $bits(desc_avail[g])'(NH) : $bits(desc_avail[g])'(q_ev[g].size());
      for (int j = 0; j < int'(NH); j++) desc_head[g][j] = (j < q_ev[g].size()) ? q_ev[g][j] : '0;
    end
    fe_gbt_packer #(.ENC(g == 0 ? ENC_VV : ENC_FV), .DATA_W(DATA_W), .BXW(BXW), .CHW(CHW),
                    .CHANNELS(CH)) dut (
      .clk, .rst_n, .ev_valid(sy_valid), .ev(sy_ev), .flush(1'b0),
      .desc_avail(desc_avail[g]), .desc_head(desc_head[g]), .desc_npop(desc_npop[g]),
      .gbt_hdr(hdr[g]), .gbt_data(data[g]), .frame_sent(frame_sent[g]), .n_trunc(ntr[g]));
  end

  // ---------------- fixed-length packer ----------------------------------
  logic       ff_valid;
  fe_event_t  ff_ev, ff_prev;
  logic       ff_prev_valid;
  logic [3:0] ff_hdr;
  logic [DATA_W-1:0] ff_data;
  logic       ff_sent;
  logic [$clog2(NH+1)-1:0] ff_npop;
  fe_event_t  no_head [NH];
  initial for (int j = 0; j < int'(NH); j++) no_head[j] = '0;
  logic [31:0] ff_trunc;
  int unsigned exp_trunc = 0;

  fe_gbt_packer #(.ENC(ENC_FF), .DATA_W(DATA_W), .BXW(BXW), .CHW(CHW), .CHANNELS(CH)) dut_ff (
    .clk, .rst_n, .ev_valid(ff_valid), .ev(ff_ev), .flush(1'b0),
    .desc_avail('0), .desc_head(no_head), .desc_npop(ff_npop),
    .gbt_hdr(ff_hdr), .gbt_data(ff_data), .frame_sent(ff_sent), .n_trunc(ff_trunc));

  function automatic fe_event_t rand_event(int unsigned bx);
    fe_event_t e;
    int unsigned r;
    r = $urandom_range(0, 99);
    e.bxid = 12'(bx % ORBIT_BX);
    e.seed = 16'($urandom);
    e.hits = 16'($urandom_range(0, CH));
    e.kind = (r < 30) ? EV_NODATA : (r < 90) ? EV_ZS : EV_NZS;
    if (e.kind != EV_ZS) e.hits = '0;
    return e;
  endfunction

  function automatic int unsigned ev_len(fe_event_t e, bit fv);
    return ev_bits(fv ? ENC_FV : ENC_VV, e.kind, e.hits, BXW, LENW, 2, CHW, CH);
  endfunction

  link_decoder dec [2];
  int unsigned n_dec [2] = '{0, 0};
  int unsigned n_idle [2] = '{0, 0};
  int unsigned n_data [2] = '{0, 0};
  int unsigned n_synch_seen = 0, n_span = 0;
  int unsigned bx = 0;
  int unsigned n_new;
  bit          synch_next = 0;
  int unsigned pop_now [2];
  int unsigned last_add [2] = '{0, 0};
  fe_event_t   synch_ev;

  // compare decoded events with the popped ones
  task automatic drain(int g);
    dec_event_t d;
    while (dec[g].next_event(d)) begin
      fe_event_t e;
      int unsigned n;
      if (popped[g].size() == 0) begin
        check(0, $sformatf("link %0d: event decoded but none popped", g));
        return;
      end
      e = popped[g].pop_front();
      n_dec[g]++;
      check(d.bxid == int'(e.bxid), $sformatf("link %0d bxid %0d exp %0d", g, d.bxid, e.bxid));
      check(d.kind == ((e.kind == EV_NODATA) ? 0 : (e.kind == EV_ZS) ? 1 : 2),
            $sformatf("link %0d kind %0d exp %0d", g, d.kind, e.kind));
      if (e.kind == EV_ZS) check(d.len == int'(e.hits), $sformatf("link %0d len %0d exp %0d", g, d.len, e.hits));
      if (e.kind == EV_NZS) check(d.len == (1 << LENW) - 1, "NZS code");
      if (g == 1) check(d.info == {e.kind == EV_NZS, e.kind == EV_NODATA}, "FV info");
      n = (e.kind == EV_ZS) ? int'(e.hits) : (e.kind == EV_NZS) ? CH : 0;
      check(d.vals.size() == n, "value count");
      for (int k = 0; k < int'(n) && k < d.vals.size(); k++)
        check(d.vals[k] == ((e.kind == EV_ZS) ? ref_zs(e.seed, k, CHW) : ref_nzs(e.seed, k, CHW)),
              $sformatf("link %0d value %0d", g, k));
    end
  endtask

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec[0] = new(BXW, LENW, CHW, CH, 0);
    dec[1] = new(BXW, LENW, CHW, CH, 1);
    sy_valid = 0; sy_ev = '0; ff_valid = 0; ff_ev = '0;
    pending_bits = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // frames produced by the previous edge
      if (synch_next) begin
        for (int g = 0; g < 2; g++) begin
          check(hdr[g] == GBT_HDR_DATA &&
                data[g] == DATA_W'({synch_ev.bxid, SYNCH_PATTERN}) << (DATA_W - 22),
                "alignment frame");
          dec[g].clear(); popped[g].delete(); q_ev[g].delete(); pending_bits[g] = 0;
        end
        n_synch_seen++;
        synch_next = 0;
      end else begin
        for (int g = 0; g < 2; g++) begin
          if (hdr[g] == GBT_HDR_DATA) begin
            check(pending_bits[g] >= DATA_W, "data frame without 80 waiting bits");
            pending_bits[g] -= DATA_W;
            dec[g].push_data(112'(data[g]), DATA_W);
            n_data[g]++;
            drain(g);
          end else begin
            check(hdr[g] == GBT_HDR_IDLE && data[g] == '0, "idle frame");
            // an idle frame is only allowed when less than a frame is waiting
            check(pending_bits[g] - last_add[g] < DATA_W, "idle frame with a full frame waiting");
            n_idle[g]++;
          end
        end
      end
      // FF frame for the event of the previous clock
      if (ff_prev_valid) begin
        int unsigned n, tot;
        logic [DATA_W-1:0] expd;
        logic [NPC_FF*CHW-1:0] vals;
        tot = (ff_prev.kind == EV_ZS) ? int'(ff_prev.hits) : (ff_prev.kind == EV_NZS) ? CH : 0;
        n = (tot > NPC_FF) ? NPC_FF : tot;
        if (tot > NPC_FF) exp_trunc++;
        vals = '0;
        for (int k = 0; k < int'(n); k++)
          vals[(NPC_FF-1-k)*CHW +: CHW] = CHW'((ff_prev.kind == EV_ZS) ? ref_zs(ff_prev.seed, k, CHW)
                                                                     : ref_nzs(ff_prev.seed, k, CHW));
        expd = '0;
        expd[DATA_W-1 -: BXW] = ff_prev.bxid;
        expd[DATA_W-1-BXW -: 2] = {ff_prev.kind == EV_NZS, ff_prev.kind == EV_NODATA};
        expd[DATA_W-1-BXW-2 -: LENW] = LENW'(n);
        expd[DATA_W-1-BXW-2-LENW -: NPC_FF*CHW] = vals;
        check(ff_hdr == GBT_HDR_DATA && ff_data == expd, $sformatf("FF frame bx %0d", ff_prev.bxid));
      end else if (cyc > 0) check(ff_hdr == GBT_HDR_IDLE, "FF idle frame");
      // descriptors popped at the previous edge are recorded at that edge
      // new inputs
      bx++;
      // one event at 60 % of the clocks; from clock 3000 to 4000 bursts of
      // up to 8 events per clock, mostly headers only, so that a frame must
      // hold several events
      n_new = (cyc < 3000 || (cyc >= 4000 && cyc < 5000)) ? ($urandom_range(0, 99) < 60)
            : (cyc < 4000) ? $urandom_range(0, 8) : 0;
      repeat (n_new) begin
        fe_event_t e;
        e = rand_event(bx);
        if (cyc >= 3000 && cyc < 4000 && $urandom_range(0, 3) != 0) begin
          e.kind = EV_NODATA; e.hits = '0;
        end
        for (int g = 0; g < 2; g++) q_ev[g].push_back(e);
        bx++;
      end
      sy_valid = (cyc == 2500);
      if (sy_valid) begin
        sy_ev = '0; sy_ev.kind = EV_SYNCH; sy_ev.bxid = 12'(bx % ORBIT_BX);
        synch_ev = sy_ev;
      end
      ff_valid = ($urandom_range(0, 9) != 0);
      ff_ev = rand_event(bx);
      #1;
      for (int g = 0; g < 2; g++) pop_now[g] = desc_npop[g];
      @(posedge clk);
      #1;
      if (sy_valid) synch_next = 1;
      for (int g = 0; g < 2; g++) last_add[g] = 0;
      for (int g = 0; g < 2; g++)
        repeat (pop_now[g]) begin
          popped[g].push_back(q_ev[g][0]);
          last_add[g] += ev_len(q_ev[g][0], g == 1);
          pending_bits[g] += ev_len(q_ev[g][0], g == 1);
          q_ev[g].delete(0);
        end
      ff_prev = ff_ev; ff_prev_valid = ff_valid;
    end
    check(n_synch_seen == 1, "one alignment frame");
    check(ff_trunc == exp_trunc, $sformatf("FF truncations %0d exp %0d", ff_trunc, exp_trunc));
    for (int g = 0; g < 2; g++) begin
      check(n_dec[g] > 1000, $sformatf("link %0d decoded %0d events", g, n_dec[g]));
      check(n_idle[g] > 0, "idle frames seen");
      check(pending_bits[g] < DATA_W, $sformatf("link %0d left %0d bits unsent", g, pending_bits[g]));
    end
    $display("data frames %0d/%0d", n_data[0], n_data[1]);
    $display("decoded VV %0d FV %0d, idle %0d/%0d, FF truncated %0d", n_dec[0], n_dec[1],
             n_idle[0], n_idle[1], exp_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
