// fcrx_pd2_tb: test of the stage-2 phase detector flip-flops.
//
// Random DQS_I levels are presented around separate rising edges of
// DQS_edge_t and DQS_edge_c; PD_t must hold the level seen at the last
// DQS_edge_t edge and PD_c the level at the last DQS_edge_c edge. Also checks
// the reset value.
`timescale 1ps / 10fs
module fcrx_pd2_tb;
  int checks = 0, failures = 0;
  logic rst_n, edge_t, edge_c, dqs_i, pd_t, pd_c;

  fcrx_pd2 dut (.rst_n(rst_n), .edge_t(edge_t), .edge_c(edge_c), .dqs_i(dqs_i),
                .pd_t(pd_t), .pd_c(pd_c));

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
    logic et, ec;
    edge_t = 0; edge_c = 0; dqs_i = 1; rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    #(10);
    check(pd_t === 1'b0 && pd_c === 1'b0, "reset value");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      et = 1'($urandom); ec = 1'($urandom);
      dqs_i = et; #(10); edge_t = 1; #(10); edge_t = 0; dqs_i = ~et; #(10);
      check(pd_t === et, $sformatf("step %0d: pd_t %b want %b", i, pd_t, et));
      dqs_i = ec; #(10); edge_c = 1; #(10); edge_c = 0; dqs_i = ~ec; #(10);
      check(pd_c === ec, $sformatf("step %0d: pd_c %b want %b", i, pd_c, ec));
      check(pd_t === et, $sformatf("step %0d: pd_t disturbed by edge_c", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
