// tb_workloads: the link-efficiency examples, each on one front-end link
// fed by the full S-ODIN / SOL40 / e-link chain:
//   A  500 channels x 4 bits, occupancy 3.1 %, buffer depth 160, 12-bit BXID,
//      VV packing, 80-bit frames (the usual example)
//   B  500 channels x 4 bits, occupancy 3.6 %, buffer depth 160, 4-bit BXID,
//      VV packing, 80-bit frames
//   C  as A with FV packing and 112-bit (WideBus) frames
// Each link is decoded event by event by wl_link_check. Printed per link:
// the bits per crossing the events need, the data frames per crossing sent,
// and the efficiency, i.e. the fraction of events with data that reach the
// readout with their data rather than as a BufferFull header. Checked: every
// event and alignment frame, no lost crossing, efficiency between 0 and 1,
// and for the 112-bit link an efficiency of 1 (its capacity exceeds the
// demand).
module tb_workloads;
  import minidaq_pkg::*;

  localparam int NCYC = 16000;

  logic clk = 0, clk90 = 0, rst_n = 0, run = 0, resync = 0, throttle = 0;
  always #10 clk = ~clk;
  always @(clk) clk90 <= #5 clk;

  tfc_tell40_t tfc_a, tfc_b, tfc_c;
  logic        run_a, run_b, run_c;
  logic [11:0] el_a, el_b, el_c;
  tfc_fe_t     fe_a [1], fe_b [1], fe_c [1];
  logic [3:0]  hdr_a [1], hdr_b [1], hdr_c [1];
  logic [79:0] dat_a [1], dat_b [1];
  logic [111:0] dat_c [1];
  logic [31:0] occ_a [1], occ_b [1], occ_c [1], bf_a [1], bf_b [1], bf_c [1];
  logic [31:0] lost_a [1], lost_b [1], lost_c [1], tr_a [1], tr_b [1], tr_c [1];

  minidaq_top #(.NUM_FE(1), .OCC_E4('{310, 0, 0, 0, 0, 0}), .BXW(12)) u_a (
    .clk, .clk90, .rst_n, .run, .resync, .throttle, .tfc_tell40(tfc_a), .running(run_a),
    .elink(el_a), .fe_tfc(fe_a), .gbt_hdr(hdr_a), .gbt_data(dat_a), .occupancy(occ_a),
    .n_buffer_full(bf_a), .n_lost(lost_a), .n_trunc(tr_a));
  minidaq_top #(.NUM_FE(1), .OCC_E4('{360, 0, 0, 0, 0, 0}), .BXW(4)) u_b (
    .clk, .clk90, .rst_n, .run, .resync, .throttle, .tfc_tell40(tfc_b), .running(run_b),
    .elink(el_b), .fe_tfc(fe_b), .gbt_hdr(hdr_b), .gbt_data(dat_b), .occupancy(occ_b),
    .n_buffer_full(bf_b), .n_lost(lost_b), .n_trunc(tr_b));
  minidaq_top #(.NUM_FE(1), .OCC_E4('{310, 0, 0, 0, 0, 0}), .ENC(ENC_FV), .DATA_W(112)) u_c (
    .clk, .clk90, .rst_n, .run, .resync, .throttle, .tfc_tell40(tfc_c), .running(run_c),
    .elink(el_c), .fe_tfc(fe_c), .gbt_hdr(hdr_c), .gbt_data(dat_c), .occupancy(occ_c),
    .n_buffer_full(bf_c), .n_lost(lost_c), .n_trunc(tr_c));

  wl_link_check #(.OCC_E4(310), .BXW(12), .NAME("A")) k_a (.clk, .fe_tfc(fe_a[0]), .gbt_hdr(hdr_a[0]), .gbt_data(dat_a[0]));
  wl_link_check #(.OCC_E4(360), .BXW(4),  .NAME("B")) k_b (.clk, .fe_tfc(fe_b[0]), .gbt_hdr(hdr_b[0]), .gbt_data(dat_b[0]));
  wl_link_check #(.OCC_E4(310), .ENC(ENC_FV), .DATA_W(112), .NAME("C")) k_c (.clk, .fe_tfc(fe_c[0]), .gbt_hdr(hdr_c[0]), .gbt_data(dat_c[0]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real eff(int n_data, int n_bf);
    return (n_data == 0) ? 0.0 : real'(n_data - n_bf) / real'(n_data);
  endfunction

  task automatic report(string name, int n_ev, int n_data, int n_bf, int n_idle, int n_frames,
                        longint bits, int data_w, int lost, int kc, int kf);
    real e;
    e = eff(n_data, n_bf);
    $display("%s: events %0d with data %0d BufferFull %0d efficiency %0.4f | needed %0.2f bits/crossing, sent %0.2f bits/crossing (%0d idle of %0d frames)",
             name, n_ev, n_data, n_bf, e, real'(bits) / real'(n_ev),
             real'(data_w) * real'(n_frames - n_idle) / real'(n_frames), n_idle, n_frames);
    checks += kc;
    failures += kf;
    check(n_ev > NCYC / 2, {name, ": events decoded"});
    check(lost == 0, {name, ": lost crossings"});
    check(e > 0.0 && e <= 1.0, {name, ": efficiency in range"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    run = 1;
    repeat (NCYC) @(posedge clk);
    @(negedge clk);
    report("A 12-bit BXID, 3.1 %, VV, 80 bits", k_a.n_ev, k_a.n_data_ev, k_a.n_bf, k_a.n_idle, k_a.n_frames,
           k_a.n_bits_needed, 80, lost_a[0], k_a.checks, k_a.failures);
    report("B  4-bit BXID, 3.6 %, VV, 80 bits", k_b.n_ev, k_b.n_data_ev, k_b.n_bf, k_b.n_idle, k_b.n_frames,
           k_b.n_bits_needed, 80, lost_b[0], k_b.checks, k_b.failures);
    report("C 12-bit BXID, 3.1 %, FV, 112 bits", k_c.n_ev, k_c.n_data_ev, k_c.n_bf, k_c.n_idle, k_c.n_frames,
           k_c.n_bits_needed, 112, lost_c[0], k_c.checks, k_c.failures);
    check(k_a.n_align >= 10 && k_b.n_align >= 10 && k_c.n_align >= 10, "alignment frames on every link");
    check(k_c.n_bf == 0, "C: no BufferFull with 112-bit frames");
    check(k_a.n_nzs > 0 && k_b.n_nzs > 0 && k_c.n_nzs > 0, "NZS events on every link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
