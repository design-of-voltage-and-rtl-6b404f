// fcrx_pd_l1_tb: test of the stage-1 phase detector model.
//
// Random data around separate clock edges: 5 ps after an edge the output must
// still hold the previous sample, 15 ps after it the new one (clock-to-output
// delay 10 ps), and a data change away from the edge must not reach it.
`timescale 1ps / 10fs
module fcrx_pd_l1_tb;
  int checks = 0, failures = 0;
  logic clk, d, q;

  fcrx_pd_l1 dut (.clk(clk), .d(d), .q(q));

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
    logic prev, v;
    clk = 0; d = 0;
    #(50);
    check(q === 1'b0, "initial value 0");
    prev = 0;
    for (int i = 0; i < 300; i++) begin
      v = 1'($urandom);
      d = v;
      #(20);
      clk = 1;
      #(5);
      check(q === prev, $sformatf("step %0d: output changed before the clock-to-output delay", i));
      d = ~v;
      #(10);
      check(q === v, $sformatf("step %0d: q %b want %b", i, q, v));
      #(20);
      clk = 0;
      #(20);
      check(q === v, $sformatf("step %0d: q changed without a rising edge", i));
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
