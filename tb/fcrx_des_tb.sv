// fcrx_des_tb: test of the receiver 1:4 deserializers.
//
// Each I clock cycle the test presents, for each of four lanes, the next four
// bits of that lane's serial stream as the sampler outputs (bit p = sample of
// phase p). Every time valid is high the 16-bit word of each lane must be the
// last 16 serial bits, oldest in bit 0, and valid must come once every four
// cycles. clk_div must run at a quarter of the clock.
`timescale 1ps / 10fs
module fcrx_des_tb;
  localparam real T = 625.0;
  int checks = 0, failures = 0;
  logic                   clk, rst_n, valid, clk_div;
  logic [3:0][3:0]        smp;
  logic [3:0][15:0]       data;

  fcrx_des dut (.clk(clk), .rst_n(rst_n), .smp(smp), .data(data), .valid(valid), .clk_div(clk_div));

  initial begin
    clk = 0;
    forever #(T / 2.0) clk = ~clk;
  end

  initial begin
    #(5_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial history of each lane, newest bit at the top
  logic [3:0][15:0] hist;
  int n_valid = 0, last_valid = -1, cyc = 0, n_div = 0;
  always @(posedge clk_div) n_div++;

  initial begin
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    smp   = '0;
    hist  = '0;
    #(2 * T);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      smp = {$urandom};
      for (int l = 0; l < 4; l++) hist[l] = {smp[l], hist[l][15:4]};
      @(posedge clk);
      #(1);
      cyc++;
      if (valid) begin
        n_valid++;
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (data[l] !== hist[l]) begin
            failures++;
            $display("FAIL: cycle %0d lane %0d: %h want %h", cyc, l, data[l], hist[l]);
          end
        end
        if (last_valid >= 0) begin
          checks++;
          if (cyc - last_valid != 4) begin failures++; $display("FAIL: valid spacing %0d", cyc - last_valid); end
        end
        last_valid = cyc;
      end
    end
    checks++;
    if (n_valid < 95) begin failures++; $display("FAIL: only %0d words", n_valid); end
    checks++;
    if (n_div < 95 || n_div > 101) begin failures++; $display("FAIL: clk_div edges %0d", n_div); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
