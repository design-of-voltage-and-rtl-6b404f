// qec_dlf_tb: test of the QEC digital loop filter against a reference model.
//
// The test drives the deserialized detector word and tag on the falling edge
// of CLK_LF and keeps its own model of the codes and of UDS:
//  * the word is put in pair order from the tag: the tagged bit is pair 3 and
//    each position further from bit 0 is one detector decision older;
//  * BB = 0000 raises C_QUAD, 1111 lowers it (saturating);
//  * otherwise UDS (forced to DN when every main code is above 0) picks the
//    highest-numbered phase k with BB[k] = 0, BB[k-1] = 1 (UP, raise) or
//    BB[k] = 1, BB[k-1] = 0 (DN, lower);
//  * lowering a code at 0 leaves it and sets UDS = UP; raising a code at its
//    maximum leaves it and sets UDS = DN;
//  * a word whose tag is not one-hot changes nothing.
// The filter samples in MODE = COMPUTE and writes in MODE = UPDATE; the model
// follows the MODE output and the codes and UDS are compared every cycle.
// MODE itself must step COMPUTE -> UPDATE -> REST -> COMPUTE, one per cycle,
// so exactly one update happens every three CLK_LF cycles.
// Random words are mixed with long runs of one word that drive a code to its
// top, so underflow, overflow and every kind of update happen.
`timescale 1ps / 10fs
module qec_dlf_tb;
  import qec_pkg::*;
  localparam real T = 10_000.0;
  int checks = 0, failures = 0;
  logic                 clk_lf, rst_n, uds_up;
  logic [3:0]           des_bb, des_tag;
  logic [3:0][6:0]      code_main;
  logic [7:0]           code_quad;
  qec_mode_e            mode;

  qec_dlf dut (.clk_lf(clk_lf), .rst_n(rst_n), .des_bb(des_bb), .des_tag(des_tag),
               .code_main(code_main), .code_quad(code_quad), .uds_up(uds_up), .mode(mode));

  initial begin
    clk_lf = 0;
    forever #(T / 2.0) clk_lf = ~clk_lf;
  end

  initial begin
    #(400_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model
  int m_main [4];
  int m_quad;
  bit m_uds;
  int n_q_up = 0, n_q_dn = 0, n_up = 0, n_dn = 0, n_uflow = 0, n_oflow = 0, n_bad_tag = 0;

  task automatic model_update(input logic [3:0] wbb, input logic [3:0] wtag);
    logic [3:0] bb;
    int p, k;
    bit ueff, all_pos;
    if ($countones(wtag) != 1) begin
      n_bad_tag++;
      return;
    end
    for (int q = 0; q < 4; q++) if (wtag[q]) p = q;
    for (int q = 0; q < 4; q++) bb[(3 - (q - p) + 8) % 4] = wbb[q];
    if (bb == 4'b0000) begin
      if (m_quad < 255) m_quad++;
      n_q_up++;
      all_pos = 1;
      for (int j = 0; j < 4; j++) if (m_main[j] == 0) all_pos = 0;
      m_uds = all_pos ? 0 : m_uds;
      return;
    end
    if (bb == 4'b1111) begin
      if (m_quad > 0) m_quad--;
      n_q_dn++;
      all_pos = 1;
      for (int j = 0; j < 4; j++) if (m_main[j] == 0) all_pos = 0;
      m_uds = all_pos ? 0 : m_uds;
      return;
    end
    all_pos = 1;
    for (int j = 0; j < 4; j++) if (m_main[j] == 0) all_pos = 0;
    ueff = all_pos ? 0 : m_uds;
    k = -1;
    for (int j = 3; j >= 0 && k < 0; j--)
      if (ueff ? (!bb[j] && bb[(j + 3) % 4]) : (bb[j] && !bb[(j + 3) % 4])) k = j;
    m_uds = ueff;
    if (ueff) begin
      if (m_main[k] == 127) begin m_uds = 0; n_oflow++; end
      else begin m_main[k]++; n_up++; end
    end else begin
      if (m_main[k] == 0) begin m_uds = 1; n_uflow++; end
      else begin m_main[k]--; n_dn++; end
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- the word for a given pair-ordered BB and tag position
  function automatic logic [3:0] word_of(input logic [3:0] bb, input int p);
    logic [3:0] w;
    for (int q = 0; q < 4; q++) w[q] = bb[(3 - (q - p) + 8) % 4];
    return w;
  endfunction

  logic [3:0] s_bb, s_tag;
  int cyc = 0;
  always @(posedge clk_lf) if (rst_n) begin
    qec_mode_e m;
    m = mode;
    if (m == MODE_COMPUTE) begin
      s_bb  = des_bb;
      s_tag = des_tag;
    end
    if (m == MODE_UPDATE) model_update(s_bb, s_tag);
    #(1);
    cyc++;
    check(mode == ((m == MODE_COMPUTE) ? MODE_UPDATE : (m == MODE_UPDATE) ? MODE_REST : MODE_COMPUTE),
          $sformatf("MODE %s followed by %s", m.name(), mode.name()));
    for (int j = 0; j < 4; j++)
      check(int'(code_main[j]) == m_main[j], $sformatf("cycle %0d: code_main[%0d] %0d want %0d", cyc, j, code_main[j], m_main[j]));
    check(int'(code_quad) == m_quad, $sformatf("cycle %0d: code_quad %0d want %0d", cyc, code_quad, m_quad));
    check(uds_up == m_uds, $sformatf("cycle %0d: uds %b want %b", cyc, uds_up, m_uds));
  end

  task automatic apply(input logic [3:0] bb, input int p, input bit bad_tag);
    @(negedge clk_lf);
    des_bb  = word_of(bb, p);
    des_tag = bad_tag ? 4'($urandom) : 4'(1 << p);
  endtask

  initial begin
    for (int j = 0; j < 4; j++) m_main[j] = 0;
    m_quad  = 0;
    m_uds   = 0;
    des_bb  = '0;
    des_tag = 4'b0001;
    rst_n   = 1'b1;
    #(1);
    rst_n   = 1'b0;
    #(2 * T);
    @(negedge clk_lf);
    rst_n = 1;
    // random words
    for (int i = 0; i < 3000; i++) apply(4'($urandom), $urandom_range(3), ($urandom_range(9) == 0));
    // a long run of 0001: phase 1 climbs to the top and overflows
    for (int i = 0; i < 1500; i++) apply(4'b0001, i % 4, 0);
    // more random words
    for (int i = 0; i < 1500; i++) apply(4'($urandom), $urandom_range(3), 0);
    $display("model: quad up %0d dn %0d, up %0d dn %0d, underflow %0d overflow %0d, bad tags %0d",
             n_q_up, n_q_dn, n_up, n_dn, n_uflow, n_oflow, n_bad_tag);
    check(n_q_up > 0 && n_q_dn > 0 && n_up > 0 && n_dn > 0, "every update kind happened");
    check(n_uflow > 0 && n_oflow > 0 && n_bad_tag > 0, "underflow, overflow and bad tags happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
