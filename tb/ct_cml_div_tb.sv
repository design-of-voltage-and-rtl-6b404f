// ct_cml_div_tb: test of the clock-tree divide-by-2 model.
//
// A 12 GHz clock (83.33 ps) drives the divider. After reset the four outputs
// must run at 6 GHz with rising edges in the order I, Q, IB, QB, one input
// half period (41.67 ps) apart, and I must rise 5 ps after an input rising
// edge. Reset must hold I = Q = 0.
`timescale 1ps / 10fs
module ct_cml_div_tb;
  localparam real T = 83.3333;
  int checks = 0, failures = 0;
  logic       clk, rst_n;
  logic [3:0] clk_iq;

  ct_cml_div dut (.clk(clk), .rst_n(rst_n), .clk_iq(clk_iq));

  realtime t_clk_r;
  initial begin
    clk = 0;
    forever begin
      #(T / 2.0) clk = 1; t_clk_r = $realtime;
      #(T / 2.0) clk = 0;
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
    #(300);
    check(clk_iq === 4'b1100, "reset: I = Q = 0");
    rst_n = 1;
    #(300);
    for (int r = 0; r < 30; r++) begin
      @(posedge clk_iq[0]); t[0] = $realtime;
      check(t[0] - t_clk_r > 4.99 && t[0] - t_clk_r < 5.01, $sformatf("I rises %0.3f ps after input", t[0] - t_clk_r));
      @(posedge clk_iq[1]); t[1] = $realtime;
      @(posedge clk_iq[2]); t[2] = $realtime;
      @(posedge clk_iq[3]); t[3] = $realtime;
      @(posedge clk_iq[0]); t[4] = $realtime;
      for (int k = 0; k < 4; k++)
        check(t[k+1] - t[k] > T / 2.0 - 0.05 && t[k+1] - t[k] < T / 2.0 + 0.05,
              $sformatf("round %0d gap %0d = %0.3f ps", r, k, t[k+1] - t[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
