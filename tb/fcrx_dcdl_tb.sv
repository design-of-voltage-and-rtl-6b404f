// fcrx_dcdl_tb: test of the receiver delay-line model.
//
// A 312.5 ps clock passes through the line while random thermometer controls
// are applied: U and D coarse stages and interpolator weight w on the D line.
// The rising and falling output delays must equal
// 20 ps + ((15 - w) U + w D) x 2 x 15 ps / 15 within 10 fs, and the output
// period must stay 312.5 ps.
`timescale 1ps / 10fs
module fcrx_dcdl_tb;
  localparam real T = 312.5;
  int checks = 0, failures = 0;
  logic        clk_i, clk_o;
  logic [5:0]  cu, cd;
  logic [14:0] fsel;

  fcrx_dcdl dut (.clk_i(clk_i), .cu(cu), .cd(cd), .fsel(fsel), .clk_o(clk_o));

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

  function automatic real wrap(input real d, input real want);
    real x = d;
    while (x < want - T / 2.0) x += T;
    while (x > want + T / 2.0) x -= T;
    return x;
  endfunction

  initial begin
    #(20_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 150; i++) begin
      int u, d, w;
      real want;
      realtime r1;
      u = $urandom_range(6);
      d = $urandom_range(6);
      w = $urandom_range(15);
      cu   = 6'((1 << u) - 1);
      cd   = 6'((1 << d) - 1);
      fsel = 15'((1 << w) - 1);
      want = 20.0 + ((15 - w) * u + w * d) * 2.0;
      repeat (3) @(posedge clk_i);
      @(posedge clk_o);
      r1 = $realtime;
      check(wrap(r1 - t_in_r, want) > want - 0.01 && wrap(r1 - t_in_r, want) < want + 0.01,
            $sformatf("U %0d D %0d w %0d: rise delay %0.3f want %0.3f", u, d, w, wrap(r1 - t_in_r, want), want));
      @(negedge clk_o);
      check(wrap($realtime - t_in_f, want) > want - 0.01 && wrap($realtime - t_in_f, want) < want + 0.01,
            $sformatf("U %0d D %0d w %0d: fall delay", u, d, w));
      @(posedge clk_o);
      check($realtime - r1 > T - 0.01 && $realtime - r1 < T + 0.01, $sformatf("period %0.3f", $realtime - r1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
