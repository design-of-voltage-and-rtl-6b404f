// qec_sig_sel_tb: test of the QEC signal selector.
//
// Four 2.3 GHz quadrature clocks with skews of up to 40 ps drive the
// selector. On each O_MUX0 rising edge the test identifies the phase that
// caused it (from the known source edge times), and checks that:
//  * the phases come in the order I, Q, IB, QB, I, ...;
//  * O_MUX1 then rises exactly at the next phase's edge (the pair's second
//    clock), i.e. O_MUX1 - O_MUX0 equals that pair's applied spacing;
//  * SEL1 is one-hot with the pair's index in it;
//  * O_MUX0 and O_MUX1 pulses have the full clock high time (no glitch).
`timescale 1ps / 10fs
module qec_sig_sel_tb;
  localparam real T = 434.7826;
  int checks = 0, failures = 0;
  logic       rst_n, o_mux0, o_mux1;
  logic [3:0] clk_ph, sel1;
  real        skew [4] = '{25.0, -15.0, 40.0, -30.0};
  realtime    last_r [4];

  qec_sig_sel dut (.rst_n(rst_n), .clk_ph(clk_ph), .o_mux0(o_mux0), .o_mux1(o_mux1), .sel1(sel1));

  for (genvar k = 0; k < 4; k++) begin : g_src
    initial begin
      clk_ph[k] = 1'b0;
      #(T + k * T / 4.0 + skew[k]);
      forever begin
        clk_ph[k] = 1'b1;
        last_r[k] = $realtime;
        #(T / 2.0) clk_ph[k] = 1'b0;
        #(T / 2.0);
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
    #(2_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime r0, r1;
  always @(posedge o_mux0) r0 = $realtime;
  always @(negedge o_mux0) if ($realtime > 3 * T)
    check($realtime - r0 > T / 2.0 - 0.1 && $realtime - r0 < T / 2.0 + 0.1, "O_MUX0 pulse width");
  always @(posedge o_mux1) r1 = $realtime;
  always @(negedge o_mux1) if ($realtime > 3 * T)
    check($realtime - r1 > T / 2.0 - 0.1 && $realtime - r1 < T / 2.0 + 0.1, "O_MUX1 pulse width");

  initial begin
    int prev_k, k;
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    #(T / 2.0);
    rst_n = 1;
    @(posedge o_mux0);
    #(0.01);
    prev_k = -1;
    for (int q = 0; q < 4; q++) if ($realtime - last_r[q] < 0.1) prev_k = q;
    for (int i = 0; i < 200; i++) begin
      real want;
      @(posedge o_mux0);
      #(0.01);
      k = -1;
      for (int q = 0; q < 4; q++) if ($realtime - last_r[q] < 0.1) k = q;
      check(k == (prev_k + 1) % 4, $sformatf("edge %0d: phase %0d after %0d", i, k, prev_k));
      check($countones(sel1) == 1 && sel1[k], $sformatf("edge %0d: sel1 %b for pair %0d", i, sel1, k));
      want = T / 4.0 + skew[(k + 1) % 4] - skew[k];
      @(posedge o_mux1);
      check($realtime - r0 > want - 0.1 && $realtime - r0 < want + 0.1,
            $sformatf("edge %0d: O_MUX1 - O_MUX0 = %0.2f want %0.2f", i, $realtime - r0, want));
      prev_k = k;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
