// qec_dcdl_tb: test of the QEC delay-line model.
//
// A 300 ps clock passes through the line while the code is swept over 0..127
// in random order. For each code the rising and falling output edges must
// come 20 ps + code x 1.23 ps after the input edges (within 10 fs), and the
// output period must stay 300 ps even when the delay exceeds half a period.
`timescale 1ps / 10fs
module qec_dcdl_tb;
  localparam real T = 300.0;
  int checks = 0, failures = 0;
  logic       clk_i, clk_o;
  logic [6:0] code;

  qec_dcdl dut (.clk_i(clk_i), .code(code), .clk_o(clk_o));

  realtime t_in_r, t_in_f;
  initial begin
    clk_i = 0;
    forever begin
      #(T / 2.0) clk_i = 1; t_in_r = $realtime;
      #(T / 2.0) clk_i = 0; t_in_f = $realtime;
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
    #(10_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [128];
    for (int i = 0; i < 128; i++) order[i] = i;
    order.shuffle();
    code = 0;
    for (int i = 0; i < 128; i++) begin
      real want, d;
      realtime r1, r2;
      code = 7'(order[i]);
      want = 20.0 + 1.23 * order[i];
      repeat (3) @(posedge clk_i);
      @(posedge clk_o);
      r1 = $realtime;
      d = r1 - t_in_r;
      if (d < 0.0) d += T;
      if (d < want - T / 2.0) d += T;
      check(d > want - 0.01 && d < want + 0.01, $sformatf("code %0d: rise delay %0.3f want %0.3f", code, d, want));
      @(negedge clk_o);
      d = $realtime - t_in_f;
      if (d < 0.0) d += T;
      check(d > want - 0.01 && d < want + 0.01, $sformatf("code %0d: fall delay %0.3f want %0.3f", code, d, want));
      @(posedge clk_o);
      r2 = $realtime;
      check(r2 - r1 > T - 0.01 && r2 - r1 < T + 0.01, $sformatf("code %0d: period %0.3f", code, r2 - r1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
