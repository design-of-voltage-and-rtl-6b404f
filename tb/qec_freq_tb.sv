// qec_freq_tb: the quadrature error corrector over its frequency range.
//
// Runs the corrector at 0.8, 1.5 and 2.3 GHz, each time from reset, with the
// input skews spread over 100 ps (the widest spread the corrector is meant to
// correct, about 101.6 ps). For each frequency it checks that:
//  * C_QUAD settles at T/4 / 1.23 ps (at 0.8 GHz this needs 254 of the 255
//    codes of the 8-bit C_QUAD);
//  * the main codes sit at the minimum-delay solution, smallest code 0;
//  * the largest phase error between adjacent outputs, measured over 20
//    output periods, is below 2.18 degrees, the worst residual error the
//    corrector is specified for over this range.
// The largest measured error is printed for each frequency.
`timescale 1ps / 10fs
module qec_freq_tb;
  localparam real LSB = 1.23;
  int checks = 0, failures = 0;

  logic             rst_n, cal, uds_up, en_a, en_b;
  logic [3:0]       clk_in, clk_out;
  logic [3:0][6:0]  code_main;
  logic [7:0]       code_quad;
  real              skew [4];
  real              tp;          // input period
  bit               clk_on;

  qec_top dut (.rst_n(rst_n), .cal(cal), .clk_in(clk_in), .clk_out(clk_out),
               .code_main(code_main), .code_quad(code_quad), .uds_up(uds_up),
               .en_a(en_a), .en_b(en_b), .mode());

  for (genvar k = 0; k < 4; k++) begin : g_src
    initial begin
      realtime t0;
      clk_in[k] = 1'b0;
      forever begin
        wait (clk_on);
        t0 = $realtime + 1000.0;
        for (longint n = 0; clk_on; n++) begin
          #(t0 + n * tp + k * tp / 4.0 + skew[k] - $realtime) clk_in[k] = 1'b1;
          #(tp / 2.0) clk_in[k] = 1'b0;
        end
      end
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
    #(200_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_at(input real f_ghz, input real s0, input real s1, input real s2, input real s3);
    real smax, want, worst, lim;
    int  cmin;
    realtime t [5];
    tp = 1000.0 / f_ghz;
    skew[0] = s0; skew[1] = s1; skew[2] = s2; skew[3] = s3;
    cal    = 1'b0;
    rst_n  = 1'b1;
    #(1);
    rst_n  = 1'b0;
    clk_on = 1'b1;
    #(5 * tp);
    rst_n = 1'b1;
    #(5 * tp);
    cal = 1'b1;
    repeat (16000) @(posedge clk_in[0]);
    smax = skew[0];
    for (int k = 1; k < 4; k++) if (skew[k] > smax) smax = skew[k];
    cmin = 255;
    for (int k = 0; k < 4; k++) begin
      want = (smax - skew[k]) / LSB;
      check(real'(code_main[k]) - want <= 2.0 && want - real'(code_main[k]) <= 2.0,
            $sformatf("%0.1f GHz: code_main[%0d] = %0d, want %0.1f", f_ghz, k, code_main[k], want));
      if (code_main[k] < cmin) cmin = code_main[k];
    end
    check(cmin <= 1, $sformatf("%0.1f GHz: smallest main code %0d", f_ghz, cmin));
    want = tp / 4.0 / LSB;
    check(real'(code_quad) - want <= 2.0 && want - real'(code_quad) <= 2.0,
          $sformatf("%0.1f GHz: code_quad = %0d, want %0.1f", f_ghz, code_quad, want));
    worst = 0.0;
    repeat (20) begin
      @(posedge clk_out[0]); t[0] = $realtime;
      @(posedge clk_out[1]); t[1] = $realtime;
      @(posedge clk_out[2]); t[2] = $realtime;
      @(posedge clk_out[3]); t[3] = $realtime;
      @(posedge clk_out[0]); t[4] = $realtime;
      for (int k = 0; k < 4; k++) begin
        real e;
        e = (t[k+1] - t[k]) - tp / 4.0;
        if (e < 0.0) e = -e;
        if (e > worst) worst = e;
      end
    end
    lim = 2.18 / 360.0 * tp;
    $display("%0.1f GHz: codes %0d %0d %0d %0d quad %0d, largest phase error %0.2f ps = %0.2f deg",
             f_ghz, code_main[0], code_main[1], code_main[2], code_main[3], code_quad,
             worst, worst / tp * 360.0);
    check(worst < lim, $sformatf("%0.1f GHz: phase error %0.2f ps", f_ghz, worst));
    clk_on = 1'b0;
    cal    = 1'b0;
    #(4 * tp);
  endtask

  initial begin
    clk_on = 1'b0;
    rst_n  = 1'b1;
    cal    = 1'b0;
    tp     = 1250.0;
    foreach (skew[k]) skew[k] = 0.0;
    run_at(0.8, 50.0, -50.0, 20.0, -30.0);
    run_at(1.5, -45.0, 10.0, 55.0, 0.0);
    run_at(2.3, 30.0, -12.0, 8.0, -40.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
