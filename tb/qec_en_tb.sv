// qec_en_tb: test of the QEC input enable gates.
//
// Drives four toggling clocks and the enable EN_B and checks after every
// change that each output is its input while EN_B is high and low while EN_B
// is low. Random patterns, 400 steps.
`timescale 1ps / 10fs
module qec_en_tb;
  int checks = 0, failures = 0;
  logic [3:0] clk_i, clk_o;
  logic       en_b;

  qec_en dut (.clk_i(clk_i), .en_b(en_b), .clk_o(clk_o));

  initial begin
    #(1_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      clk_i = 4'($urandom);
      en_b  = (i % 50) < 30;
      #(10);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (clk_o[k] !== (en_b ? clk_i[k] : 1'b0)) begin
          failures++;
          $display("FAIL: step %0d phase %0d: en %b in %b out %b", i, k, en_b, clk_i[k], clk_o[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
