// qec_ens_tb: test of the QEC enable sequencer.
//
// clk_ref runs at 2.3 GHz and CLK_LF,PRE at a fifth of it. CAL is toggled at
// random, unaligned times, with both long and very short pulses. Checks:
//  * every EN_A rise comes after an EN_B rise with EN_B still high, and every
//    EN_B fall comes after EN_A has fallen (EN_A is never high without EN_B);
//  * after CAL has been stable for a while, both enables equal CAL;
//  * CLK_LF pulses only while EN_A is high and every CLK_LF high pulse is a
//    full CLK_LF,PRE high pulse (the clock gate makes no glitches);
//  * CLK_LF runs while calibrating and is silent while off.
`timescale 1ps / 10fs
module qec_ens_tb;
  localparam real TR = 434.7826;
  int checks = 0, failures = 0;
  logic clk_ref, rst_n, cal, clk_lf_pre, en_a, en_b, clk_lf;

  qec_ens dut (.clk_ref(clk_ref), .rst_n(rst_n), .cal(cal), .clk_lf_pre(clk_lf_pre),
               .en_a(en_a), .en_b(en_b), .clk_lf(clk_lf));

  initial begin
    clk_ref = 0;
    forever #(TR / 2.0) clk_ref = ~clk_ref;
  end
  initial begin
    clk_lf_pre = 0;
    #(137.0);
    forever begin
      clk_lf_pre = 1; #(2.0 * TR);
      clk_lf_pre = 0; #(3.0 * TR);
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
    #(20_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit mon = 0;
  always @(posedge en_a) if (mon) check(en_b === 1'b1, "EN_A rose while EN_B low");
  always @(negedge en_b) if (mon) check(en_a === 1'b0, "EN_B fell while EN_A high");

  realtime tr_lf;
  int n_lf = 0;
  always @(posedge clk_lf) begin
    tr_lf = $realtime;
    if (mon) check(en_a === 1'b1 && clk_lf_pre === 1'b1, "CLK_LF rose without EN_A");
  end
  always @(negedge clk_lf) if (mon) begin
    n_lf++;
    check($realtime - tr_lf > 2.0 * TR - 0.1 && $realtime - tr_lf < 2.0 * TR + 0.1,
          $sformatf("CLK_LF pulse %0.1f ps", $realtime - tr_lf));
  end

  initial begin
    int n0;
    cal   = 0;
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    #(2000);
    check(en_a === 1'b0 && en_b === 1'b0 && clk_lf === 1'b0, "reset: all off");
    rst_n = 1;
    mon   = 1;
    for (int i = 0; i < 40; i++) begin
      realtime hold;
      cal  = ~cal;
      hold = (i % 4 == 3) ? $urandom_range(300, 4000) : $urandom_range(60_000, 120_000);
      n0 = n_lf;
      #(hold);
      if (hold > 50_000) begin
        check(en_a === cal && en_b === cal, $sformatf("step %0d: enables %b%b, CAL %b", i, en_a, en_b, cal));
        if (cal) check(n_lf - n0 > 20, $sformatf("step %0d: CLK_LF ran %0d pulses", i, n_lf - n0));
        else     check(n_lf - n0 < 8, $sformatf("step %0d: CLK_LF kept running", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
