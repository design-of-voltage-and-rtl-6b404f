// qec_qed_tb: test of the QEC quadrature error detector (phase detector,
// deserializer and clock divider).
//
// O_MUX0D is a 1 ns clock; O_MUX1D is a copy whose delay is chosen edge by
// edge: +250 ps (O_MUX0D leads, the detector must give 0) or -20 ps (O_MUX1D
// leads, it must give 1). The lead pattern repeats every four edges and
// SEL1<3> marks the fourth edge of each group. For each captured word the
// test finds the tag position p and checks that the bit at every position q
// is the detector result of the edge (q - p) places before the tagged one,
// i.e. that the bits arrive in time order with the newest at bit 0. Several
// patterns are run. CLK_LF,PRE must rise once every four O_MUX1D edges; words are checked
// when it falls (the capture edge).
`timescale 1ps / 10fs
module qec_qed_tb;
  localparam real P = 1000.0;
  int checks = 0, failures = 0;
  logic       rst_n, o_mux0d, o_mux1d, sel1_3, clk_lf_pre;
  logic [3:0] des_bb, des_tag, pat;

  qec_qed dut (.rst_n(rst_n), .o_mux0d(o_mux0d), .o_mux1d(o_mux1d), .sel1_3(sel1_3),
               .des_bb(des_bb), .des_tag(des_tag), .clk_lf_pre(clk_lf_pre));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(5_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge n of O_MUX0D at (n + 2) P; O_MUX1D edge n at that time + delay
  longint n_edge = 0;
  initial begin
    o_mux0d = 0;
    o_mux1d = 0;
    sel1_3  = 0;
    forever begin
      real d;
      #((n_edge + 2) * P - 250.0 - $realtime);
      sel1_3 = (n_edge % 4 == 3);
      d = pat[n_edge % 4] ? -20.0 : 250.0;
      if (d < 0.0) begin
        #(250.0 + d) o_mux1d = 1;
        #(-d)        o_mux0d = 1;
        #(P / 2.0 + d) o_mux1d = 0;
        #(-d)          o_mux0d = 0;
      end else begin
        #(250.0) o_mux0d = 1;
        #(d)     o_mux1d = 1;
        #(P / 2.0 - d) o_mux0d = 0;
        #(d)           o_mux1d = 0;
      end
      n_edge++;
    end
  end

  bit chk_en = 0;
  int n_words = 0;
  always @(negedge clk_lf_pre) if (chk_en) begin
    int p;
    #(1);
    p = -1;
    for (int q = 0; q < 4; q++) if (des_tag[q]) p = q;
    check($countones(des_tag) == 1, $sformatf("tag %b not one-hot", des_tag));
    if (p >= 0) begin
      n_words++;
      // position q holds the edge (q - p) earlier than the tagged one (pattern index 3)
      for (int q = 0; q < 4; q++)
        check(des_bb[q] == pat[(3 - (q - p) + 8) % 4],
              $sformatf("pattern %b: word %b tag %b, bit %0d", pat, des_bb, des_tag, q));
    end
  end

  int n_lf = 0, n_m1 = 0;
  always @(posedge o_mux1d) n_m1++;
  always @(posedge clk_lf_pre) begin
    if (n_lf > 0 && rst_n)
      check(n_m1 == 4, $sformatf("CLK_LF,PRE period %0d O_MUX1D periods", n_m1));
    n_m1 = 0;
    n_lf++;
  end

  initial begin
    logic [3:0] pats [6] = '{4'b0101, 4'b0011, 4'b1000, 4'b0111, 4'b1101, 4'b0010};
    pat   = 4'b0000;
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    #(1500);
    rst_n = 1;
    foreach (pats[i]) begin
      chk_en = 0;
      pat = pats[i];
      #(12 * P);
      chk_en = 1;
      #(40 * P);
    end
    check(n_words > 40, $sformatf("only %0d words checked", n_words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
