// dram_clk_top_tb: end-to-end test of the whole clock-path top at its default
// parameters, with all three circuits running at the same time.
//
//  * Quadrature error corrector: four 2.3 GHz quadrature clocks with skews
//    {30, -12, 8, -40} ps. After calibration the adjacent output gaps must be
//    T/4 within 3 LSB, C_QUAD must sit at T/4 / 1.23 ps and the main codes at
//    the minimum-delay solution (computed here from the skews). CAL is then
//    dropped (EN_A must fall before EN_B, codes must freeze while the skew is
//    changed), and raised again (EN_B before EN_A, re-lock to the new skew).
//  * Forwarded-clock receiver: 3.2 GHz DQS and four 6.4 Gb/s PRBS7 lanes,
//    with an input-amplifier delay model. The DLL must coarse-sweep, set its
//    lock points and lock where this testbench's delay arithmetic puts it;
//    after write training (DQ eye centred on the measured sampling edge) every
//    received word must obey the PRBS7 recurrence, also while the amplifier
//    delay drifts by +40 ps, which the DLL must cancel (path delay held within
//    6 ps mod 1 UI).
//  * Clock-tree divider: 12 GHz in, 6 GHz quadrature out; period and the
//    three quarter-period gaps are checked.
// Each mechanism (C_QUAD up/down, main code up/down, UDS flip to UP and back,
// calibration off/on, lock-point setting, coarse sweep of both stages,
// tracking up/down of both stages, amplifier drift, divider toggling) is
// counted and the test fails if one never happened.
`timescale 1ps / 10fs
module dram_clk_top_tb;

  // ---------------------------------------------------------------- common
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(60_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // QEC side
  localparam real QT   = 434.7826;   // 2.3 GHz
  localparam real QLSB = 1.23;
  logic             qec_rst_n, qec_cal, qec_uds_up, qec_en_a, qec_en_b;
  logic [3:0]       qec_clk_in, qec_clk_out;
  logic [3:0][6:0]  qec_code_main;
  logic [7:0]       qec_code_quad;
  logic [1:0]       qec_mode;
  real              skew [4];

  // receiver side
  localparam real TCK  = 312.5;      // DQS 3.2 GHz
  localparam real UI   = TCK / 2.0;
  localparam real T0   = 20.0;       // DCDL model intrinsic delay
  localparam real STEP = 2.0;        // DCDL model step
  logic             rx_rst_n, dqs_t, dqs_c, dqs_t_amp, dqs_c_amp, rx_run;
  logic [3:0]       rx_dq, rx_clk_iq;
  logic [3:0][15:0] rx_data;
  logic             rx_valid, rx_lp1, rx_lp2, rx_dqs_i;
  logic [6:0]       rx_code1, rx_code2;
  logic [2:0]       rx_state;
  realtime          amp_dly, dq_off;

  // clock-tree divider side
  localparam real CT_T = 83.3333;    // 12 GHz
  logic             ct_rst_n, ct_clk;
  logic [3:0]       ct_clk_iq;

  dram_clk_top dut (
    .qec_rst_n(qec_rst_n), .qec_cal(qec_cal), .qec_clk_in(qec_clk_in),
    .qec_clk_out(qec_clk_out), .qec_code_main(qec_code_main),
    .qec_code_quad(qec_code_quad), .qec_uds_up(qec_uds_up),
    .qec_en_a(qec_en_a), .qec_en_b(qec_en_b), .qec_mode(qec_mode),
    .rx_rst_n(rx_rst_n), .rx_dqs_t_amp(dqs_t_amp), .rx_dqs_c_amp(dqs_c_amp),
    .rx_dqs_c_in(dqs_c), .rx_dq(rx_dq), .rx_cfg_run(rx_run),
    .rx_cfg_coarse_sweep(1'b1), .rx_cfg_gain1(3'd1), .rx_cfg_gain2(3'd1),
    .rx_data(rx_data), .rx_data_valid(rx_valid), .rx_code1(rx_code1),
    .rx_code2(rx_code2), .rx_dlf_state(rx_state), .rx_lp1(rx_lp1),
    .rx_lp2(rx_lp2), .rx_dqs_i(rx_dqs_i), .rx_clk_iq(rx_clk_iq),
    .ct_rst_n(ct_rst_n), .ct_clk(ct_clk), .ct_clk_iq(ct_clk_iq));

  // ================================================================ QEC
  for (genvar k = 0; k < 4; k++) begin : g_qsrc
    initial begin
      longint n;
      qec_clk_in[k] = 1'b0;
      n = 1;
      forever begin
        #(n * QT + k * QT / 4.0 + skew[k] - $realtime) qec_clk_in[k] = 1'b1;
        #(QT / 2.0) qec_clk_in[k] = 1'b0;
        n++;
      end
    end
  end

  int n_quad_up = 0, n_quad_dn = 0, n_main_up = 0, n_main_dn = 0;
  int n_uds_up = 0, n_uds_dn = 0, n_cal_off = 0, n_cal_on = 0;
  logic [3:0][6:0] prev_main;
  logic [7:0]      prev_quad;
  logic            prev_uds;
  always @(qec_code_main or qec_code_quad or qec_uds_up) begin
    if (qec_rst_n) begin
      for (int k = 0; k < 4; k++) begin
        if (qec_code_main[k] > prev_main[k]) n_main_up++;
        if (qec_code_main[k] < prev_main[k]) n_main_dn++;
      end
      if (qec_code_quad > prev_quad) n_quad_up++;
      if (qec_code_quad < prev_quad) n_quad_dn++;
      if (qec_uds_up && !prev_uds) n_uds_up++;
      if (!qec_uds_up && prev_uds) n_uds_dn++;
    end
    prev_main = qec_code_main;
    prev_quad = qec_code_quad;
    prev_uds  = qec_uds_up;
  end

  realtime t_ea_fall, t_eb_fall, t_ea_rise, t_eb_rise;
  always @(negedge qec_en_a) t_ea_fall = $realtime;
  always @(negedge qec_en_b) t_eb_fall = $realtime;
  always @(posedge qec_en_a) t_ea_rise = $realtime;
  always @(posedge qec_en_b) t_eb_rise = $realtime;

  task automatic qec_wait(input int n);
    repeat (n) @(posedge qec_clk_in[0]);
  endtask

  task automatic qec_check(input string tag);
    realtime t [5];
    real     smax, want;
    @(posedge qec_clk_out[0]); t[0] = $realtime;
    @(posedge qec_clk_out[1]); t[1] = $realtime;
    @(posedge qec_clk_out[2]); t[2] = $realtime;
    @(posedge qec_clk_out[3]); t[3] = $realtime;
    @(posedge qec_clk_out[0]); t[4] = $realtime;
    for (int k = 0; k < 4; k++)
      check((t[k+1] - t[k] - QT / 4.0) < 3.0 * QLSB && (QT / 4.0 - (t[k+1] - t[k])) < 3.0 * QLSB,
            $sformatf("QEC %s: gap %0d = %0.2f ps", tag, k, t[k+1] - t[k]));
    smax = skew[0];
    for (int k = 1; k < 4; k++) if (skew[k] > smax) smax = skew[k];
    for (int k = 0; k < 4; k++) begin
      want = (smax - skew[k]) / QLSB;
      check((real'(qec_code_main[k]) - want) <= 2.0 && (want - real'(qec_code_main[k])) <= 2.0,
            $sformatf("QEC %s: code_main[%0d] = %0d, want %0.1f", tag, k, qec_code_main[k], want));
    end
    want = (QT / 4.0) / QLSB;
    check((real'(qec_code_quad) - want) <= 2.0 && (want - real'(qec_code_quad)) <= 2.0,
          $sformatf("QEC %s: code_quad = %0d, want %0.1f", tag, qec_code_quad, want));
  endtask

  logic [3:0][6:0] held_main;
  logic [7:0]      held_quad;
  bit              qec_done = 0;
  initial begin
    skew[0] = 30.0;  skew[1] = -12.0; skew[2] = 8.0; skew[3] = -40.0;
    qec_rst_n = 1'b1;
    #(1);
    qec_rst_n = 1'b0;
    qec_cal   = 1'b0;
    #(1000);
    qec_rst_n = 1'b1;
    qec_wait(10);
    qec_cal = 1'b1;
    qec_wait(8000);
    check(t_eb_rise < t_ea_rise, "QEC: EN_B rises before EN_A");
    n_cal_on++;
    qec_check("lock 1");
    qec_cal = 1'b0;
    qec_wait(200);
    check(t_ea_fall < t_eb_fall, "QEC: EN_A falls before EN_B");
    n_cal_off++;
    held_main = qec_code_main;
    held_quad = qec_code_quad;
    skew[0] = 10.0; skew[1] = 25.0; skew[2] = -30.0; skew[3] = 0.0;
    qec_wait(2000);
    check(qec_code_main == held_main && qec_code_quad == held_quad, "QEC: codes frozen while CAL = 0");
    qec_cal = 1'b1;
    qec_wait(8000);
    n_cal_on++;
    qec_check("lock 2");
    qec_done = 1;
  end

  // ================================================================ receiver
  bit      dqs_on;
  realtime t_dqs_rise;
  initial begin
    longint n;
    dqs_t = 1'b0;
    dqs_c = 1'b1;
    n = 1;
    forever begin
      #(n * TCK - $realtime);
      if (dqs_on) begin
        dqs_t = 1'b1; dqs_c = 1'b0; t_dqs_rise = $realtime;
        #(UI);
        dqs_t = 1'b0; dqs_c = 1'b1;
      end
      n++;
    end
  end

  realtime at_r = 0.0, at_f = 0.0;
  always @(posedge dqs_t) fork begin #(amp_dly) at_r <= $realtime; end join_none
  always @(negedge dqs_t) fork begin #(amp_dly) at_f <= $realtime; end join_none
  always_comb dqs_t_amp = (at_r > at_f);
  always_comb dqs_c_amp = ~dqs_t_amp;

  logic [6:0] lfsr [4];
  initial begin
    longint n;
    for (int l = 0; l < 4; l++) lfsr[l] = 7'(l * 29 + 5);
    rx_dq = '0;
    n = 4;
    forever begin
      #(n * UI + dq_off - $realtime);
      for (int l = 0; l < 4; l++) begin
        rx_dq[l] = lfsr[l][6];
        lfsr[l]  = {lfsr[l][5:0], lfsr[l][6] ^ lfsr[l][5]};
      end
      n++;
    end
  end

  logic [15:0] hist [4];
  bit          hist_ok = 0, dchk_en = 0;
  int          n_words = 0, n_bad = 0;
  always @(posedge rx_clk_iq[0]) begin
    if (rx_valid && dchk_en) begin
      for (int l = 0; l < 4; l++) begin
        logic [31:0] s;
        bit ok;
        s  = {rx_data[l], hist[l]};
        ok = (rx_data[l] != 16'h0000) && (rx_data[l] != 16'hffff);
        if (hist_ok)
          for (int i = 16; i < 32; i++) if (s[i] != (s[i-7] ^ s[i-6])) ok = 0;
        if (hist_ok) begin
          n_words++;
          if (!ok) n_bad++;
        end
        hist[l] = rx_data[l];
      end
      hist_ok = 1;
    end
  end

  real path_mod;
  always @(posedge rx_dqs_i) begin
    real d;
    d = $realtime - t_dqs_rise;
    while (d >= UI) d -= UI;
    while (d < 0.0) d += UI;
    path_mod = d;
  end

  // state encoding of fcrx_pkg::fcrx_state_e
  localparam logic [2:0] S_LOCKPT = 3'd1, S_CS1 = 3'd2, S_CS2 = 3'd3, S_TRACK = 3'd4;
  int n_lockpt = 0, n_cs1 = 0, n_cs2 = 0, n_up1 = 0, n_dn1 = 0, n_up2 = 0, n_dn2 = 0, n_drift = 0;
  logic [2:0] prev_st;
  logic [6:0] p1, p2;
  always @(rx_code1 or rx_code2 or rx_state) begin
    if (rx_state == S_LOCKPT && prev_st != S_LOCKPT) n_lockpt++;
    if (rx_state == S_CS1 && rx_code1 != p1) n_cs1++;
    if (rx_state == S_CS2 && rx_code2 != p2) n_cs2++;
    if (rx_state == S_TRACK && prev_st == S_TRACK) begin
      if (rx_code1 > p1) n_up1++;
      if (rx_code1 < p1) n_dn1++;
      if (rx_code2 > p2) n_up2++;
      if (rx_code2 < p2) n_dn2++;
    end
    prev_st = rx_state; p1 = rx_code1; p2 = rx_code2;
  end

  function automatic real modui(input real x);
    real d = x;
    while (d >= UI) d -= UI;
    while (d < 0.0) d += UI;
    return d;
  endfunction

  task automatic rx_check(input string tag);
    real e1, e2;
    e1 = (UI - modui(amp_dly + T0)) / STEP;
    e2 = (UI - T0) / STEP;
    check(real'(rx_code1) - e1 <= 2.0 && e1 - real'(rx_code1) <= 2.0,
          $sformatf("RX %s: code1 = %0d, want %0.1f", tag, rx_code1, e1));
    check(real'(rx_code2) - e2 <= 2.0 && e2 - real'(rx_code2) <= 2.0,
          $sformatf("RX %s: code2 = %0d, want %0.1f", tag, rx_code2, e2));
  endtask

  real path0;
  bit  rx_done = 0;
  initial begin
    amp_dly  = 60.0;
    dq_off   = 0.0;
    dqs_on   = 1'b1;
    rx_run   = 1'b0;
    rx_rst_n = 1'b1;
    #(1);
    rx_rst_n = 1'b0;
    #(2000);
    rx_rst_n = 1'b1;
    #(100_000);
    rx_run = 1'b1;
    #(2_000_000);
    check(rx_state == S_TRACK, "RX: DLF reached tracking");
    check(rx_lp1 == 1'b0 && rx_lp2 == 1'b1, "RX: lock points");
    rx_check("lock");
    dq_off = modui(path_mod + UI / 2.0);
    path0  = path_mod;
    #(200_000);
    dchk_en = 1;
    #(1_000_000);
    check(n_words > 200 && n_bad == 0, $sformatf("RX: %0d words, %0d PRBS errors after training", n_words, n_bad));
    for (int i = 0; i < 20; i++) begin
      amp_dly += 2.0;
      #(100_000);
    end
    n_drift++;
    #(1_000_000);
    check(path_mod - path0 < 6.0 && path0 - path_mod < 6.0,
          $sformatf("RX: DQS path delay held %0.2f vs %0.2f", path_mod, path0));
    check(n_bad == 0, $sformatf("RX: PRBS errors during drift: %0d", n_bad));
    rx_check("drift");
    rx_done = 1;
  end

  // ================================================================ divider
  int n_ct_edges = 0;
  initial begin
    ct_clk = 1'b0;
    forever #(CT_T / 2.0) ct_clk = ~ct_clk;
  end
  always @(posedge ct_clk_iq[0]) n_ct_edges++;

  bit ct_done = 0;
  initial begin
    realtime t [5];
    ct_rst_n = 1'b1;
    #(1);
    ct_rst_n = 1'b0;
    #(500);
    ct_rst_n = 1'b1;
    #(2000);
    @(posedge ct_clk_iq[0]); t[0] = $realtime;
    @(posedge ct_clk_iq[1]); t[1] = $realtime;
    @(posedge ct_clk_iq[2]); t[2] = $realtime;
    @(posedge ct_clk_iq[3]); t[3] = $realtime;
    @(posedge ct_clk_iq[0]); t[4] = $realtime;
    for (int k = 0; k < 4; k++)
      check((t[k+1] - t[k]) - CT_T / 2.0 < 0.5 && CT_T / 2.0 - (t[k+1] - t[k]) < 0.5,
            $sformatf("divider: gap %0d = %0.2f ps, want %0.2f", k, t[k+1] - t[k], CT_T / 2.0));
    ct_done = 1;
  end

  // ================================================================ end
  initial begin
    wait (qec_done && rx_done && ct_done);
    $display("QEC: quad up %0d dn %0d main up %0d dn %0d UDS up %0d dn %0d cal off %0d on %0d",
             n_quad_up, n_quad_dn, n_main_up, n_main_dn, n_uds_up, n_uds_dn, n_cal_off, n_cal_on);
    $display("RX: lockpt %0d cs1 %0d cs2 %0d up1 %0d dn1 %0d up2 %0d dn2 %0d words %0d",
             n_lockpt, n_cs1, n_cs2, n_up1, n_dn1, n_up2, n_dn2, n_words);
    $display("CT: divider edges %0d", n_ct_edges);
    check(n_quad_up > 0 && n_quad_dn > 0, "QEC: C_QUAD moved up and down");
    check(n_main_up > 0 && n_main_dn > 0, "QEC: main codes moved up and down");
    check(n_uds_up > 0 && n_uds_dn > 0, "QEC: UDS flipped to UP and back");
    check(n_cal_off > 0 && n_cal_on > 1, "QEC: calibration switched off and on");
    check(n_lockpt > 0, "RX: lock-point setting happened");
    check(n_cs1 > 0 && n_cs2 > 0, "RX: coarse sweep of both stages");
    check(n_up1 > 0 && n_dn1 > 0, "RX: DCDL1 tracked up and down");
    check(n_up2 > 0 && n_dn2 > 0, "RX: DCDL2 tracked up and down");
    check(n_drift > 0, "RX: amplifier drift applied");
    check(n_ct_edges > 100, "CT: divider toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
