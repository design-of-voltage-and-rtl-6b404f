// fcrx_dq_sampler_tb: test of the receiver DQ samplers.
//
// Four quadrature clocks (one rising edge per 156.25 ps unit interval, in the
// order I, Q, IB, QB) and four lanes of random data changing in the middle of
// each unit interval. Just after each clock edge the sampler of that phase
// must hold, for every lane, the bit that was on the lane at the edge.
`timescale 1ps / 10fs
module fcrx_dq_sampler_tb;
  localparam real UI = 156.25;
  int checks = 0, failures = 0;
  logic             rst_n;
  logic [3:0]       clk_iq, dq;
  logic [3:0][3:0]  smp;

  fcrx_dq_sampler dut (.rst_n(rst_n), .clk_iq(clk_iq), .dq(dq), .smp(smp));

  initial begin
    #(1_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] at_edge;
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    clk_iq = 4'b1100;
    dq     = '0;
    #(100);
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (smp[l] !== 4'b0000) begin failures++; $display("FAIL: reset lane %0d", l); end
    end
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int p;
      p = n % 4;
      dq = 4'($urandom);
      #(UI / 2.0);
      at_edge = dq;
      // phase p rises, phase p+2 falls
      clk_iq[p] = 1'b1;
      clk_iq[(p + 2) % 4] = 1'b0;
      #(1);
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (smp[l][p] !== at_edge[l]) begin
          failures++;
          $display("FAIL: step %0d lane %0d phase %0d: %b want %b", n, l, p, smp[l][p], at_edge[l]);
        end
      end
      #(UI / 2.0 - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
