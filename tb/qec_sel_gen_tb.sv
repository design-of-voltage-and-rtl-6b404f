// qec_sel_gen_tb: test of the QEC MUX SEL generator.
//
// Four 1 GHz quadrature clocks (I, Q, IB, QB rising 250 ps apart) feed the
// generator; this testbench closes the loop itself with the two multiplexers
// (O_MUX0 = OR of SEL0 & phase, O_MUX1 = OR of SEL1 & next phase). Checks:
//  * SEL0 and SEL1 never have more than one bit set (sampled on every phase
//    edge; a bit is cleared before the next is set, so both may briefly be 0);
//  * each O_MUX0 rising edge comes from the phase after the previous one
//    (I, Q, IB, QB, I, ...), so O_MUX0 has a period of 1.25 clock periods;
//  * on every O_MUX0 rising edge SEL1 selects the same pair as SEL0;
//  * every O_MUX0 / O_MUX1 high pulse is a full half period (no glitches).
`timescale 1ps / 10fs
module qec_sel_gen_tb;
  localparam real T = 1000.0;
  int checks = 0, failures = 0;
  logic       rst_n, o_mux0, o_mux1;
  logic [3:0] clk_ph, sel0, sel1, clk_next;

  qec_sel_gen dut (.rst_n(rst_n), .clk_ph(clk_ph), .o_mux0(o_mux0), .sel0(sel0), .sel1(sel1));

  always_comb clk_next = {clk_ph[0], clk_ph[3:1]};
  always_comb o_mux0 = |(sel0 & clk_ph);
  always_comb o_mux1 = |(sel1 & clk_next);

  for (genvar k = 0; k < 4; k++) begin : g_src
    initial begin
      clk_ph[k] = 1'b0;
      #(T + k * T / 4.0);
      forever begin
        clk_ph[k] = 1'b1;
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

  function automatic int idx(input logic [3:0] v);
    for (int k = 0; k < 4; k++) if (v[k]) return k;
    return -1;
  endfunction

  initial begin
    #(2_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit run = 0;
  always @(clk_ph) if (run) check($countones(sel0) <= 1 && $countones(sel1) <= 1,
                                  $sformatf("at most one bit: sel0 %b sel1 %b", sel0, sel1));

  realtime r0, r1;
  always @(posedge o_mux0) r0 = $realtime;
  always @(negedge o_mux0) if (rst_n && $realtime > 3 * T)
    check($realtime - r0 > T / 2.0 - 0.1 && $realtime - r0 < T / 2.0 + 0.1,
          $sformatf("O_MUX0 pulse %0.1f ps", $realtime - r0));
  always @(posedge o_mux1) r1 = $realtime;
  always @(negedge o_mux1) if (rst_n && $realtime > 3 * T)
    check($realtime - r1 > T / 2.0 - 0.1 && $realtime - r1 < T / 2.0 + 0.1,
          $sformatf("O_MUX1 pulse %0.1f ps", $realtime - r1));

  initial begin
    int prev_k;
    realtime prev_t;
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    #(T / 2.0);
    check(sel0 == 4'b0001 && sel1 == 4'b0001, "reset selects pair (I, Q)");
    rst_n = 1;
    run   = 1;
    @(posedge o_mux0);
    prev_k = idx(sel0);
    prev_t = $realtime;
    for (int i = 0; i < 200; i++) begin
      int k;
      @(posedge o_mux0);
      k = idx(sel0);
      check(k == (prev_k + 1) % 4, $sformatf("edge %0d: pair %0d after %0d", i, k, prev_k));
      check($countones(sel0) == 1 && $countones(sel1) == 1, $sformatf("edge %0d: not one-hot", i));
      check(idx(sel1) == k, $sformatf("edge %0d: sel1 pair %0d, sel0 pair %0d", i, idx(sel1), k));
      check(clk_ph[k] === 1'b1, $sformatf("edge %0d: O_MUX0 edge not from phase %0d", i, k));
      check($realtime - prev_t > 1.25 * T - 0.1 && $realtime - prev_t < 1.25 * T + 0.1,
            $sformatf("edge %0d: O_MUX0 period %0.1f", i, $realtime - prev_t));
      prev_k = k;
      prev_t = $realtime;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
