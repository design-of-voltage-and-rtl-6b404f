// fcrx_iq_div_tb: test of the receiver I-Q divider.
//
// A 3.2 GHz clock drives the divider. After reset the test measures the rising
// edges of I, Q, IB and QB: each output must run at half the input frequency
// (period 625 ps) and the edges must follow in the order I, Q, IB, QB, one
// input half period (156.25 ps) apart.
`timescale 1ps / 10fs
module fcrx_iq_div_tb;
  localparam real T = 312.5;
  int checks = 0, failures = 0;
  logic       rst_n, clk;
  logic [3:0] clk_iq;

  fcrx_iq_div dut (.rst_n(rst_n), .clk(clk), .clk_iq(clk_iq));

  initial begin
    clk = 0;
    forever #(T / 2.0) clk = ~clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(1_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t [5];
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    #(1000);
    check(clk_iq === 4'b1100, "reset: I = Q = 0");
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int r = 0; r < 20; r++) begin
      @(posedge clk_iq[0]); t[0] = $realtime;
      @(posedge clk_iq[1]); t[1] = $realtime;
      @(posedge clk_iq[2]); t[2] = $realtime;
      @(posedge clk_iq[3]); t[3] = $realtime;
      @(posedge clk_iq[0]); t[4] = $realtime;
      for (int k = 0; k < 4; k++)
        check(t[k+1] - t[k] > T / 2.0 - 0.1 && t[k+1] - t[k] < T / 2.0 + 0.1,
              $sformatf("round %0d gap %0d = %0.2f ps", r, k, t[k+1] - t[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
