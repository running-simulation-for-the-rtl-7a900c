// wl_link_check: testbench checker for one front-end link, used by
// tb_workloads. It plays the readout board of one link: from the locally
// delayed TFC word it lists the event each crossing must produce, cuts the
// link's data frames back into events with tell40_model_pkg::link_decoder
// (VV or FV) and compares BXID, kind, hit count and every channel value.
// Alignment frames are expected 4 clocks after SYNCH reaches the front end.
// It counts the crossings with data, those cut to header only by BufferFull,
// idle frames and the bits sent, so that the caller can report the link
// efficiency (data events delivered with their data / data events).
// Sample on the falling edge of clk; `en` starts the checking.
module wl_link_check
  import minidaq_pkg::*;
  import tell40_model_pkg::*;
#(
  parameter fe_enc_e     ENC      = ENC_VV,
  parameter int unsigned CHANNELS = 500,
  parameter int unsigned CHW      = 4,
  parameter int unsigned OCC_E4   = 310,
  parameter int unsigned DATA_W   = 80,
  parameter int unsigned BXW      = 12,
  parameter string       NAME     = "link"
) (
  input logic              clk,
  input tfc_fe_t           fe_tfc,
  input logic [3:0]        gbt_hdr,
  input logic [DATA_W-1:0] gbt_data
);

  localparam int unsigned LENW = $clog2(CHANNELS + 2);

  typedef struct {int t; fe_event_t e;} xev_t;

  int checks = 0, failures = 0;
  int n_ev = 0, n_data_ev = 0, n_bf = 0, n_idle = 0, n_frames = 0, n_align = 0, n_nzs = 0;
  longint n_bits_needed = 0;

  xev_t        expq [$];
  link_decoder dec;
  int          reset_t = -1;
  int          t = 0;
  int          align_due [$];
  int          align_t [$];
  logic [11:0] align_bx [$];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: %s", $time, NAME, msg);
    end
  endtask

  task automatic drain();
    dec_event_t d;
    xev_t       x;
    int unsigned n;
    while (dec.next_event(d)) begin
      if (expq.size() == 0) begin check(0, "unexpected event"); return; end
      x = expq.pop_front();
      n_ev++;
      check(d.bxid == int'(x.e.bxid) % (1 << BXW), $sformatf("bxid %0d exp %0d", d.bxid, x.e.bxid));
      if (x.e.kind != EV_NODATA) n_data_ev++;
      if (x.e.kind != EV_NODATA && d.kind == 0) begin n_bf++; continue; end
      check(d.kind == ((x.e.kind == EV_NODATA) ? 0 : (x.e.kind == EV_ZS) ? 1 : 2),
            $sformatf("kind %0d exp %0d", d.kind, x.e.kind));
      n_nzs += (d.kind == 2);
      if (d.kind == 1) check(d.len == ref_hits(x.e.seed, CHANNELS, OCC_E4), "hit count");
      n = (d.kind == 1) ? d.len : (d.kind == 2) ? CHANNELS : 0;
      check(d.vals.size() == n, "value count");
      for (int k = 0; k < int'(n) && k < d.vals.size(); k++)
        check(d.vals[k] == ((d.kind == 1) ? ref_zs(x.e.seed, k, CHW) : ref_nzs(x.e.seed, k, CHW)),
              $sformatf("value %0d", k));
    end
  endtask

  initial dec = new(BXW, LENW, CHW, CHANNELS, ENC == ENC_FV);

  always @(negedge clk) begin
    tfc_fe_t f;
    xev_t    x;
    int      ts;
    logic [11:0] abx;
    f = fe_tfc;
    if (align_due.size() > 0 && align_due[0] == t) begin
      void'(align_due.pop_front());
      ts  = align_t.pop_front();
      abx = align_bx.pop_front();
      check(gbt_hdr == GBT_HDR_DATA && gbt_data[DATA_W-1 -: 12] == abx &&
            gbt_data[DATA_W-13 -: 10] == SYNCH_PATTERN, "alignment frame");
      n_align++;
      dec.clear();
      while (expq.size() > 0 && expq[0].t <= ts) void'(expq.pop_front());
    end else if (reset_t >= 0 && t > reset_t + 3) begin
      n_frames++;
      if (gbt_hdr == GBT_HDR_DATA) begin
        dec.push_data(112'(gbt_data), DATA_W);
        drain();
      end else begin
        check(gbt_hdr == GBT_HDR_IDLE && gbt_data == '0, "idle frame");
        n_idle++;
      end
    end
    if (f.fe_reset) begin
      reset_t = t;
      expq.delete();
      dec.clear();
      align_due.delete();
      align_t.delete();
      align_bx.delete();
    end else if (reset_t >= 0) begin
      x.t      = t;
      x.e.bxid = f.bxid;
      x.e.seed = 16'(t - reset_t - 1);
      x.e.kind = f.synch ? EV_SYNCH : (f.header_only || f.bx_veto) ? EV_NODATA : f.nzs ? EV_NZS : EV_ZS;
      x.e.hits = (x.e.kind == EV_ZS) ? 16'(ref_hits(x.e.seed, CHANNELS, OCC_E4)) : 16'd0;
      if (f.synch) begin
        align_due.push_back(t + 4);
        align_t.push_back(t);
        align_bx.push_back(f.bxid);
      end else begin
        expq.push_back(x);
        n_bits_needed += ev_bits(ENC, x.e.kind, x.e.hits, BXW, LENW, 2, CHW, CHANNELS);
      end
    end
    t++;
  end

endmodule
