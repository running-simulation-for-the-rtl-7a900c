// tb_fe_derandomizer: a small buffer (4 words of 80 bits, 8 descriptors) so
// that it overflows often. Random events are written, descriptors popped
// and frames marked sent at random; a model written here tracks the bit
// occupancy from the VV event sizes, room kept for one more header, (BXID 12 + NoData 1 + Length 6 + 4 bits
// per value), the FIFO order and the NH oldest descriptors, multiple pops, the header-only replacement when an event
// does not fit (BufferFull), the loss when not even a header fits or the
// descriptor FIFO is full, and the clearing by flush and by SYNCH.
module tb_fe_derandomizer;
  import minidaq_pkg::*;

  localparam int unsigned DEPTH = 4, DATA_W = 80, CH = 40, DD = 8;
  localparam int unsigned CAP = DEPTH * DATA_W;

  logic clk = 0, rst_n = 0;
  localparam int unsigned NH = 8;
  logic ev_valid = 0, flush = 0, frame_sent = 0;
  logic [3:0] desc_avail, desc_npop = '0;
  fe_event_t ev;
  fe_event_t desc_head [NH];
  logic [31:0] occ, nbf, nlost;
  always #5 clk = ~clk;

  fe_derandomizer #(.ENC(ENC_VV), .DEPTH(DEPTH), .DATA_W(DATA_W), .BXW(12), .CHW(4),
                    .CHANNELS(CH), .DESC_DEPTH(DD), .NH(NH))
    dut (.clk, .rst_n, .ev_valid, .ev, .flush, .desc_avail, .desc_head, .desc_npop,
         .frame_sent, .occupancy(occ), .n_buffer_full(nbf), .n_lost(nlost));

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

  // The occupancy must never exceed the capacity. Checked on the falling
  // edge, so that an overflow is reported before the block's own assertion
  // stops the simulation at the next rising edge.
  always @(negedge clk) begin
    if (rst_n && occ > 32'(CAP)) begin
      check(0, $sformatf("occupancy %0d over capacity %0d", occ, CAP));
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int unsigned size_vv(fe_event_t e);
    case (e.kind)
      EV_NODATA: return 13;
      EV_ZS:     return 19 + 4 * int'(e.hits);
      EV_NZS:    return 19 + 4 * CH;
      default:   return 0;
    endcase
  endfunction

  fe_event_t   mq[$];
  int unsigned mocc = 0, mbf = 0, mlost = 0;
  int unsigned n_conv = 0, n_lostf = 0, n_clear = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      @(negedge clk);
      // compare state
      check(int'(desc_avail) == ((mq.size() > NH) ? NH : mq.size()), "available count");
      for (int j = 0; j < int'(NH) && j < mq.size(); j++) check(desc_head[j] == mq[j], "head descriptors");
      check(occ == mocc, $sformatf("occupancy %0d exp %0d", occ, mocc));
      check(nbf == mbf && nlost == mlost, "counters");
      // stimulus
      ev_valid = ($urandom_range(0, 3) != 0);
      ev.bxid = 12'($urandom);
      ev.seed = 16'($urandom);
      ev.hits = 16'($urandom_range(0, CH));
      case ($urandom_range(0, 19))
        0:          ev.kind = EV_NZS;
        1, 2, 3:    ev.kind = EV_NODATA;
        4:          ev.kind = ($urandom_range(0, 9) == 0) ? EV_SYNCH : EV_ZS;
        default:    ev.kind = EV_ZS;
      endcase
      flush = ($urandom_range(0, 499) == 0);
      desc_npop = ($urandom_range(0, 1) == 0) ? 4'($urandom_range(0, NH)) : 4'd0;
      frame_sent = (mocc >= DATA_W) && ($urandom_range(0, 2) != 0);
      // model of the coming edge
      if (flush || (ev_valid && ev.kind == EV_SYNCH)) begin
        mq.delete(); mocc = 0; n_clear++;
      end else begin
        int unsigned popped;
        int unsigned pend_occ;
        popped = (desc_npop > mq.size()) ? mq.size() : desc_npop;
        pend_occ = mocc - (frame_sent ? DATA_W : 0);
        repeat (popped) void'(mq.pop_front());
        if (ev_valid) begin
          fe_event_t w;
          w = ev;
          // the space check counts a frame leaving at this edge as gone
          if (mq.size() + popped >= DD) begin mlost++; n_lostf++; end
          else if (size_vv(w) + 13 <= CAP - pend_occ) begin mq.push_back(w); pend_occ += size_vv(w); end
          else if (13 <= CAP - pend_occ) begin
            w.kind = EV_NODATA; w.hits = '0;
            mq.push_back(w); pend_occ += 13; mbf++; n_conv++;
          end else begin mlost++; n_lostf++; end
        end
        mocc = pend_occ;
      end
    end
    check(n_conv > 50, $sformatf("BufferFull conversions %0d", n_conv));
    check(n_lostf > 5, $sformatf("lost events %0d", n_lostf));
    check(n_clear > 5, "clears");
    $display("conversions %0d lost %0d clears %0d", n_conv, n_lostf, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
