// qec_top_tb: end-to-end test of the quadrature error corrector.
//
// Four skewed quadrature clocks at 2.3 GHz drive qec_top. The test:
//  1. calibrates from reset and checks that every adjacent output gap is T/4
//     within 3 LSB, that C_QUAD settles at T/4 / LSB, and that each main code
//     is within 2 LSB of the minimum-delay solution (smallest code 0), which is
//     computed here from the applied skews;
//  2. drops CAL, checks that EN_A falls before EN_B, changes the input skew and
//     checks that the codes stay frozen;
//  3. raises CAL, checks that EN_B rises before EN_A, and that the loop
//     re-locks to the new skew from the held codes.
// It counts how often each mechanism of the loop happened (C_QUAD up / down,
// main code up / down, UDS flip to UP after an underflow, UDS forced DN,
// calibration off and on) and fails if one never did.
`timescale 1ps / 10fs
module qec_top_tb;
  import qec_pkg::*;

  localparam real T_PS   = 434.7826;   // 2.3 GHz
  localparam real LSB    = 1.23;
  localparam int  MW     = 7;
  localparam int  QW     = 8;

  int checks = 0, failures = 0;

  logic                       rst_n, cal;
  logic [3:0]                 clk_in, clk_out;
  logic [3:0][MW-1:0]         code_main;
  logic [QW-1:0]              code_quad;
  logic                       uds_up, en_a, en_b;
  real                        skew [4];

  qec_top dut (
    .rst_n     (rst_n),
    .cal       (cal),
    .clk_in    (clk_in),
    .clk_out   (clk_out),
    .code_main (code_main),
    .code_quad (code_quad),
    .uds_up    (uds_up),
    .en_a      (en_a),
    .en_b      (en_b),
    .mode      ()
  );

  // ---------------------------------------------------------- clock sources
  for (genvar k = 0; k < 4; k++) begin : g_src
    initial begin
      longint n;
      realtime t;
      clk_in[k] = 1'b0;
      n = 1;
      forever begin
        t = n * T_PS + k * T_PS / 4.0 + skew[k];
        #(t - $realtime) clk_in[k] = 1'b1;
        #(T_PS / 2.0)    clk_in[k] = 1'b0;
        n++;
      end
    end
  end

  // ------------------------------------------------- output edge timestamps
  realtime last_rise [4];
  for (genvar k = 0; k < 4; k++) begin : g_mon
    always @(posedge clk_out[k]) last_rise[k] = $realtime;
  end

  // ------------------------------------------------- mechanism counters
  int n_quad_up = 0, n_quad_dn = 0, n_main_up = 0, n_main_dn = 0;
  int n_uds_up = 0, n_uds_dn = 0, n_cal_off = 0, n_cal_on = 0;
  logic [3:0][MW-1:0] prev_main;
  logic [QW-1:0]      prev_quad;
  logic               prev_uds;

  always @(code_main or code_quad or uds_up) begin
    if (rst_n) begin
      for (int k = 0; k < 4; k++) begin
        if (code_main[k] > prev_main[k]) n_main_up++;
        if (code_main[k] < prev_main[k]) n_main_dn++;
      end
      if (code_quad > prev_quad) n_quad_up++;
      if (code_quad < prev_quad) n_quad_dn++;
      if (uds_up && !prev_uds) n_uds_up++;
      if (!uds_up && prev_uds) n_uds_dn++;
    end
    prev_main = code_main;
    prev_quad = code_quad;
    prev_uds  = uds_up;
  end

  // ------------------------------------------------- enable order monitor
  realtime t_ea_fall, t_eb_fall, t_ea_rise, t_eb_rise;
  always @(negedge en_a) t_ea_fall = $realtime;
  always @(negedge en_b) t_eb_fall = $realtime;
  always @(posedge en_a) t_ea_rise = $realtime;
  always @(posedge en_b) t_eb_rise = $realtime;

  // ------------------------------------------------- helpers
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // wait for clock periods of the input clock
  task automatic wait_periods(input int n);
    repeat (n) @(posedge clk_in[0]);
  endtask

  // measure the four adjacent gaps of the outputs after a rising edge of QB_OUT
  task automatic check_gaps(input string tag);
    realtime t0, t1, t2, t3, t4;
    real g [4];
    @(posedge clk_out[0]); t0 = $realtime;
    @(posedge clk_out[1]); t1 = $realtime;
    @(posedge clk_out[2]); t2 = $realtime;
    @(posedge clk_out[3]); t3 = $realtime;
    @(posedge clk_out[0]); t4 = $realtime;
    g[0] = t1 - t0; g[1] = t2 - t1; g[2] = t3 - t2; g[3] = t4 - t3;
    for (int k = 0; k < 4; k++) begin
      check((g[k] - T_PS / 4.0) < 3.0 * LSB && (T_PS / 4.0 - g[k]) < 3.0 * LSB,
            $sformatf("%s: gap %0d = %0.2f ps, want %0.2f", tag, k, g[k], T_PS / 4.0));
    end
  endtask

  // minimum-delay solution: code_k = (max_j s_j - s_k) / LSB
  task automatic check_codes(input string tag);
    real smax, want;
    int  cmin;
    smax = skew[0];
    for (int k = 1; k < 4; k++) if (skew[k] > smax) smax = skew[k];
    cmin = 1 << MW;
    for (int k = 0; k < 4; k++) begin
      want = (smax - skew[k]) / LSB;
      check((real'(code_main[k]) - want) <= 2.0 && (want - real'(code_main[k])) <= 2.0,
            $sformatf("%s: code_main[%0d] = %0d, want %0.1f", tag, k, code_main[k], want));
      if (code_main[k] < cmin) cmin = code_main[k];
    end
    check(cmin <= 1, $sformatf("%s: smallest main code %0d, want 0", tag, cmin));
    want = (T_PS / 4.0) / LSB;
    check((real'(code_quad) - want) <= 2.0 && (want - real'(code_quad)) <= 2.0,
          $sformatf("%s: code_quad = %0d, want %0.1f", tag, code_quad, want));
  endtask

  // ------------------------------------------------- watchdog
  initial begin
    #(40_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------- stimulus
  logic [3:0][MW-1:0] held_main;
  logic [QW-1:0]      held_quad;
  realtime            t_lock;

  initial begin
    skew[0] = 30.0;  skew[1] = -12.0; skew[2] = 8.0; skew[3] = -40.0;
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    cal   = 1'b0;
    #(1000);
    rst_n = 1'b1;
    wait_periods(10);
    check(en_a == 1'b0 && en_b == 1'b0, "enables off while CAL = 0");

    // ---- 1. calibrate from reset
    cal = 1'b1;
    t_lock = $realtime;
    wait_periods(8000);
    check(t_eb_rise < t_ea_rise, "OFF->ON: EN_B rises before EN_A");
    n_cal_on++;
    check_codes("lock 1");
    check_gaps("lock 1");
    $display("lock 1: codes %0d %0d %0d %0d quad %0d", code_main[0], code_main[1],
             code_main[2], code_main[3], code_quad);

    // ---- 2. calibration off: codes freeze although the skew changes
    cal = 1'b0;
    wait_periods(200);
    check(en_a == 1'b0 && en_b == 1'b0, "enables off after CAL falls");
    check(t_ea_fall < t_eb_fall, "ON->OFF: EN_A falls before EN_B");
    n_cal_off++;
    held_main = code_main;
    held_quad = code_quad;
    skew[0] = 10.0; skew[1] = 25.0; skew[2] = -30.0; skew[3] = 0.0;
    wait_periods(2000);
    check(code_main == held_main && code_quad == held_quad, "codes frozen while CAL = 0");

    // ---- 3. calibration on again: re-lock from the held codes
    cal = 1'b1;
    wait_periods(8000);
    check(t_eb_rise < t_ea_rise, "OFF->ON again: EN_B rises before EN_A");
    n_cal_on++;
    check_codes("lock 2");
    check_gaps("lock 2");
    $display("lock 2: codes %0d %0d %0d %0d quad %0d", code_main[0], code_main[1],
             code_main[2], code_main[3], code_quad);

    // ---- mechanisms
    $display("quad up %0d dn %0d, main up %0d dn %0d, UDS->UP %0d UDS->DN %0d, cal off %0d on %0d",
             n_quad_up, n_quad_dn, n_main_up, n_main_dn, n_uds_up, n_uds_dn, n_cal_off, n_cal_on);
    check(n_quad_up > 0, "C_QUAD raised at least once");
    check(n_quad_dn > 0, "C_QUAD lowered at least once");
    check(n_main_up > 0, "a main code raised at least once");
    check(n_main_dn > 0, "a main code lowered at least once");
    check(n_uds_up > 0, "UDS flipped to UP after an underflow at least once");
    check(n_uds_dn > 0, "UDS returned to DN at least once");
    check(n_cal_off > 0 && n_cal_on > 1, "calibration switched off and on");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
