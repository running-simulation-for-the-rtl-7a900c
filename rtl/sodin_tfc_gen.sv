// sodin_tfc_gen: readout supervisor (S-ODIN) fast-command emulator.
//
// Every 40 MHz clock it emits one 64-bit TFC word (minidaq_pkg::tfc_tell40_t)
// for the readout boards. The word carries the BXID of the crossing it refers
// to: the word visible while the local crossing counter `bx_now` reads N
// names crossing N + TFC_ADVANCE, so that the commands reach the front ends
// before the crossing takes place.
//
// Run sequence, started by a rising edge of `run`:
//   RESET  one word with FE reset, BE reset, EID reset and BXID reset
//   RWAIT  FE_RESET_WAIT clocks of no commands
//   SYNCH  SYNCH_LENGTH consecutive words with SYNCH (if SYNCH_ENB)
//   SWAIT  SYNCH_WAIT clocks of no commands
//   RUN    normal running until `run` falls; `resync` re-enters SYNCH
// In RUN every crossing is triggered (40 MHz readout) except vetoed ones:
//   - BX veto on the empty crossings BXVETO_FIRST..ORBIT_BX-1 (if BX_VETO_ENB)
//   - calibration A..D on crossing CALIB_BXID[k] every CALIB_PERIOD[k] orbits
//   - NZS: a burst of 1 (or NZS_CONSECUTIVE when NZS_CONSECUTIVE_ENB) NZS
//     triggers every NZS_PERIOD clocks, then NZS_TAE_WAIT clocks with HEADER
//     ONLY so that the front ends recover
//   - SNAPSHOT every SNAPSHOT_INTERVAL clocks
//   - HEADER ONLY while the `throttle` input is high (if HEADER_ONLY_ENB)
//   - BXID reset on BXID 0 of every orbit
//   - MEP accept every MEP_PACKING triggers, MEP destination round-robin
// The enables, periods, BXIDs, reset wait, synch length and wait, and the 16
// clock advance are the configuration package values of the source; the
// order of the start-of-run sequence, the veto window, the NZS period, the
// meaning of the NZS wait, the throttle input, the trigger type codes and the
// MEP scheme are this design's own choices.
module sodin_tfc_gen
  import minidaq_pkg::*;
#(
  parameter int unsigned FE_RESET_WAIT       = 250,    // X"00FA"
  parameter bit          NZS_ENB             = 1'b1,
  parameter bit          NZS_CONSECUTIVE_ENB = 1'b0,
  parameter int unsigned NZS_CONSECUTIVE     = 2,
  parameter int unsigned NZS_TAE_WAIT        = 5,      // X"005"
  parameter int unsigned NZS_PERIOD          = 3564,
  parameter logic [3:0]  CALIB_ENB           = 4'b0001, // A on, B..D off
  parameter logic [15:0] CALIB_PERIOD [4]    = '{16'h0001, 16'h0001, 16'h0001, 16'h0001},
  parameter logic [15:0] CALIB_BXID   [4]    = '{16'h0C0F, 16'h04AF, 16'h09DF, 16'h020F},
  parameter bit          SNAPSHOT_ENB        = 1'b1,
  parameter int unsigned SNAPSHOT_INTERVAL   = 32'h37B0,
  parameter bit          SYNCH_ENB           = 1'b1,
  parameter int unsigned SYNCH_LENGTH        = 32'h000A,
  parameter int unsigned SYNCH_WAIT          = 32'h0002,
  parameter bit          BX_VETO_ENB         = 1'b1,
  parameter bit          HEADER_ONLY_ENB     = 1'b1,
  parameter int unsigned BXVETO_FIRST        = 3444,
  parameter int unsigned TFC_ADVANCE         = 16,
  parameter int unsigned MEP_PACKING         = 16,
  parameter int unsigned MEP_NDEST           = 4,
  parameter logic [31:0] MEP_DEST_BASE       = 32'h0A00_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,        // level: run enabled
  input  logic        resync,     // pulse: repeat the SYNCH sequence
  input  logic        throttle,   // readout boards ask for header-only events
  output tfc_tell40_t tfc,        // TFC word, one per clock
  output logic        running,    // `tfc` is a RUN word
  output logic [11:0] bx_now      // local crossing counter
);

  typedef enum logic [2:0] {S_IDLE, S_RESET, S_RWAIT, S_SYNCH, S_SWAIT, S_RUN} state_e;

  state_e      state;
  logic [15:0] wait_cnt;
  logic        run_q;
  logic [11:0] bx_ev;                  // BXID the current word refers to
  logic        orbit_wrap;
  logic [15:0] orbit_cnt [4];
  logic [31:0] nzs_cnt;
  logic [7:0]  nzs_burst;              // NZS triggers left in the burst
  logic [15:0] nzs_wait;               // header-only clocks left after NZS
  logic [31:0] snap_cnt;
  logic [15:0] mep_cnt;
  logic [7:0]  mep_idx;

  localparam int unsigned NZS_BURST = NZS_CONSECUTIVE_ENB ? NZS_CONSECUTIVE : 1;

  // BXID of the crossing the word refers to. The word is registered, so
  // when it is visible the crossing counter has moved on by one: the word
  // seen at counter value N names crossing N + TFC_ADVANCE.
  always_comb begin
    int unsigned s;
    s = int'(bx_now) + TFC_ADVANCE + 1;
    if (s >= ORBIT_BX) s = s - ORBIT_BX;
    bx_ev = 12'(s);
  end
  assign orbit_wrap = (bx_ev == 12'(ORBIT_BX - 1));

  // Free-running crossing counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bx_now <= '0;
    else        bx_now <= (bx_now == 12'(ORBIT_BX - 1)) ? '0 : bx_now + 12'd1;
  end

  // Run sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      wait_cnt <= '0;
      run_q    <= 1'b0;
    end else begin
      run_q <= run;
      unique case (state)
        S_IDLE:  if (run && !run_q) state <= S_RESET;
        S_RESET: begin state <= S_RWAIT; wait_cnt <= 16'(FE_RESET_WAIT); end
        S_RWAIT: if (wait_cnt <= 16'd1) begin
                   if (SYNCH_ENB) begin state <= S_SYNCH; wait_cnt <= 16'(SYNCH_LENGTH); end
                   else           begin state <= S_SWAIT; wait_cnt <= 16'(SYNCH_WAIT); end
                 end else wait_cnt <= wait_cnt - 16'd1;
        S_SYNCH: if (wait_cnt <= 16'd1) begin state <= S_SWAIT; wait_cnt <= 16'(SYNCH_WAIT); end
                 else wait_cnt <= wait_cnt - 16'd1;
        S_SWAIT: if (wait_cnt <= 16'd1) state <= S_RUN;
                 else wait_cnt <= wait_cnt - 16'd1;
        S_RUN:   if (!run) state <= S_IDLE;
                 else if (resync) begin state <= S_SYNCH; wait_cnt <= 16'(SYNCH_LENGTH); end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Command decisions for the crossing bx_ev.
  logic       veto_c, nzs_c, nzs_hdr_c, snap_c, calib_any_c, trig_c;
  logic [3:0] calib_c;

  always_comb begin
    for (int k = 0; k < 4; k++)
      calib_c[k] = CALIB_ENB[k] && (bx_ev == CALIB_BXID[k][11:0]) && (orbit_cnt[k] == 16'd0);
    calib_any_c = |calib_c;
    veto_c      = BX_VETO_ENB && (int'(bx_ev) >= BXVETO_FIRST);
    nzs_c       = NZS_ENB && !veto_c && (nzs_burst != 8'd0);
    nzs_hdr_c   = (nzs_burst == 8'd0) && (nzs_wait != 16'd0);
    snap_c      = SNAPSHOT_ENB && (snap_cnt == 32'(SNAPSHOT_INTERVAL - 1));
    trig_c      = !veto_c;
  end

  // Periodic counters, advanced only while running.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) orbit_cnt[k] <= '0;
      nzs_cnt   <= '0;
      nzs_burst <= '0;
      nzs_wait  <= '0;
      snap_cnt  <= '0;
      mep_cnt   <= '0;
      mep_idx   <= '0;
    end else if (state != S_RUN) begin
      for (int k = 0; k < 4; k++) orbit_cnt[k] <= '0;
      nzs_cnt   <= '0;
      nzs_burst <= '0;
      nzs_wait  <= '0;
      snap_cnt  <= '0;
      mep_cnt   <= '0;
    end else begin
      if (orbit_wrap)
        for (int k = 0; k < 4; k++)
          orbit_cnt[k] <= (orbit_cnt[k] + 16'd1 >= CALIB_PERIOD[k]) ? 16'd0 : orbit_cnt[k] + 16'd1;
      // NZS burst and recovery window
      if (nzs_cnt == 32'(NZS_PERIOD - 1)) begin
        nzs_cnt   <= '0;
        nzs_burst <= 8'(NZS_BURST);
      end else begin
        nzs_cnt <= nzs_cnt + 32'd1;
        if (nzs_c) begin
          nzs_burst <= nzs_burst - 8'd1;
          if (nzs_burst == 8'd1) nzs_wait <= 16'(NZS_TAE_WAIT);
        end else if (nzs_hdr_c) nzs_wait <= nzs_wait - 16'd1;
      end
      snap_cnt <= snap_c ? '0 : snap_cnt + 32'd1;
      if (trig_c) begin
        if (mep_cnt == 16'(MEP_PACKING - 1)) begin
          mep_cnt <= '0;
          mep_idx <= (mep_idx == 8'(MEP_NDEST - 1)) ? 8'd0 : mep_idx + 8'd1;
        end else mep_cnt <= mep_cnt + 16'd1;
      end
    end
  end

  // Output word register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tfc     <= '0;
      running <= 1'b0;
    end else begin
      running  <= (state == S_RUN);
      tfc      <= '0;
      tfc.bxid <= bx_ev;
      unique case (state)
        S_RESET: begin
          tfc.fe_reset   <= 1'b1;
          tfc.be_reset   <= 1'b1;
          tfc.eid_reset  <= 1'b1;
          tfc.bxid_reset <= 1'b1;
        end
        S_SYNCH: tfc.synch <= 1'b1;
        S_RUN: begin
          tfc.bxid_reset  <= (bx_ev == 12'd0);
          tfc.bx_veto     <= veto_c;
          tfc.trigger     <= trig_c;
          tfc.nzs         <= nzs_c;
          tfc.calib_type  <= calib_c;
          tfc.snapshot    <= snap_c;
          tfc.header_only <= !veto_c && ((HEADER_ONLY_ENB && throttle) || nzs_hdr_c);
          tfc.trigger_type <= calib_any_c ? TRG_CALIB : (nzs_c ? TRG_NZS : TRG_PHYSICS);
          tfc.mep_accept  <= trig_c && (mep_cnt == 16'(MEP_PACKING - 1));
          tfc.mep_dest    <= MEP_DEST_BASE + 32'(mep_idx);
        end
        default: ;
      endcase
    end
  end

endmodule
