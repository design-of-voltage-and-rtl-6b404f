// fcrx_dlf_tb: test of the receiver loop filter in closed loop with a simple
// phase-detector model.
//
// The detector model turns each code into a detector level with a threshold:
//   PD_L1 = X while code1 < TH1, else !X   (X chosen per run: the level at
//           minimum delay, i.e. the stage-1 lock point);
//   stage 2, run A: PD_t = 1 always, PD_c = (code2 < TH2), so at minimum delay
//           (PD_c, PD_t) = (1, 1) and the lock point must be DQS_edge_c;
//   stage 2, run B: PD_c = 0 always, PD_t = (code2 < TH2), so at minimum delay
//           (0, 1) and the lock point must be DQS_edge_t.
// Each run checks the lock points, that the coarse sweep raised the codes in
// steps of 15 to the first multiple of 15 at or past the threshold, that
// tracking then settles both codes next to their thresholds, that every
// tracking step has the programmed gain, and that run = 0 returns to IDLE with
// both codes at 0; during tracking the codes may only move once every SETTLE
// (8) clock cycles. A last run with a threshold past the top checks saturation
// at 89, and one with the coarse sweep off checks that tracking alone reaches
// the lock.
`timescale 1ps / 10fs
module fcrx_dlf_tb;
  import fcrx_pkg::*;
  localparam real T = 2500.0;
  int checks = 0, failures = 0;
  logic              clk, rst_n, run, csweep, pd_l1, pd_t, pd_c, lp1, lp2;
  logic [2:0]        gain1, gain2;
  logic [6:0]        code1, code2;
  fcrx_state_e       state;
  int                th1, th2;
  bit                x1, mode_b;

  fcrx_dlf dut (.clk(clk), .rst_n(rst_n), .run(run), .coarse_sweep(csweep), .gain1(gain1),
                .gain2(gain2), .pd_l1(pd_l1), .pd_t(pd_t), .pd_c(pd_c), .code1(code1),
                .code2(code2), .state(state), .lp1(lp1), .lp2(lp2));

  initial begin
    clk = 0;
    forever #(T / 2.0) clk = ~clk;
  end

  always_comb begin
    pd_l1 = (int'(code1) < th1) ? x1 : !x1;
    if (mode_b) begin
      pd_c = 1'b0;
      pd_t = (int'(code2) < th2);
    end else begin
      pd_t = 1'b1;
      pd_c = (int'(code2) < th2);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(100_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // step-size monitor during tracking
  logic [6:0] p1, p2;
  fcrx_state_e pst;
  int n_track_moves = 0, cyc = 0, last_move = -1;
  always @(posedge clk) begin
    #(1);
    cyc++;
    if (rst_n && run && state == ST_TRACK && pst == ST_TRACK && (code1 != p1 || code2 != p2)) begin
      if (last_move >= 0)
        check((cyc - last_move) % 8 == 0, $sformatf("code moves %0d cycles apart", cyc - last_move));
      last_move = cyc;
    end
    if (rst_n && run && state == ST_TRACK && pst == ST_TRACK) begin
      int d1, d2;
      d1 = int'(code1) - int'(p1);
      d2 = int'(code2) - int'(p2);
      if (d1 != 0) begin
        n_track_moves++;
        check(d1 == gain1 || d1 == -gain1 || code1 == 0 || code1 == 89,
              $sformatf("code1 step %0d, gain %0d", d1, gain1));
      end
      if (d2 != 0)
        check(d2 == gain2 || d2 == -gain2 || code2 == 0 || code2 == 89,
              $sformatf("code2 step %0d, gain %0d", d2, gain2));
    end
    p1 = code1; p2 = code2; pst = state;
  end

  task automatic one_run(input string tag, input int t1, input int t2, input bit x,
                         input bit b, input bit cs, input int g1, input int g2);
    int e1, e2, cs1_end, cs2_end;
    bit seen_cs1, seen_cs2;
    th1 = t1; th2 = t2; x1 = x; mode_b = b; csweep = cs;
    gain1 = 3'(g1); gain2 = 3'(g2);
    run = 1;
    seen_cs1 = 0; seen_cs2 = 0; cs1_end = 0; cs2_end = 0;
    repeat (3000) begin
      @(posedge clk);
      #(2);
      if (state == ST_CS1) seen_cs1 = 1;
      if (state == ST_CS2) begin
        seen_cs2 = 1;
        cs1_end  = code1;
      end
      if (state == ST_TRACK && cs2_end == 0 && (seen_cs2 || !cs)) cs2_end = code2 + 1;
    end
    check(state == ST_TRACK, $sformatf("%s: state %s", tag, state.name()));
    check(lp1 == x, $sformatf("%s: lp1 %b want %b", tag, lp1, x));
    check(lp2 == !b, $sformatf("%s: lp2 %b want %b", tag, lp2, !b));
    if (cs) begin
      e1 = ((t1 + 14) / 15) * 15;
      if (e1 > 75) e1 = 75;
      e2 = ((t2 + 14) / 15) * 15;
      if (e2 > 75) e2 = 75;
      check(seen_cs1 && seen_cs2, $sformatf("%s: coarse sweep states visited", tag));
      check(cs1_end == e1, $sformatf("%s: coarse sweep 1 ended at %0d, want %0d", tag, cs1_end, e1));
      check(cs2_end - 1 == e2, $sformatf("%s: coarse sweep 2 ended at %0d, want %0d", tag, cs2_end - 1, e2));
    end
    if (t1 <= 89) check(int'(code1) >= t1 - g1 && int'(code1) <= t1 + g1 - 1,
                        $sformatf("%s: code1 %0d, threshold %0d", tag, code1, t1));
    else          check(code1 == 89, $sformatf("%s: code1 %0d not saturated", tag, code1));
    check(int'(code2) >= t2 - g2 && int'(code2) <= t2 + g2 - 1,
          $sformatf("%s: code2 %0d, threshold %0d", tag, code2, t2));
    $display("%s: code1 %0d code2 %0d lp %b%b", tag, code1, code2, lp1, lp2);
    run = 0;
    last_move = -1;
    repeat (3) @(posedge clk);
    #(2);
    check(state == ST_IDLE && code1 == 0 && code2 == 0, $sformatf("%s: run = 0 clears", tag));
  endtask

  initial begin
    run = 0; csweep = 1; gain1 = 1; gain2 = 1;
    th1 = 40; th2 = 68; x1 = 0; mode_b = 0;
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    #(3 * T);
    rst_n = 1;
    one_run("A", 40, 68, 0, 0, 1, 1, 1);
    one_run("B", 23, 50, 1, 1, 1, 2, 3);
    one_run("C", 200, 31, 0, 1, 1, 1, 1);
    one_run("D", 12, 20, 1, 0, 0, 1, 1);
    check(n_track_moves > 50, $sformatf("tracking moves: %0d", n_track_moves));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
