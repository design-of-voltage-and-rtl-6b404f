// fcrx_top_tb: end-to-end test of the forwarded-clock receiver.
//
// A behavioural memory-controller model drives a 3.2 GHz DQS and four
// 6.4 Gb/s PRBS7 DQ lanes; a behavioural input-amplifier model adds a DQS
// path delay that can drift. The test:
//  1. starts the DLL with coarse sweep on, checks the lock points and that
//     both codes settle where this testbench's own delay arithmetic puts them
//     (DQS_edge_t on the next DQS_c edge, DQS_I one UI after DQS_edge_t);
//  2. performs write training: places the DQ eye centre on the sampling
//     edges it measures, then checks every received word of every lane obeys
//     the PRBS7 recurrence;
//  3. drifts the amplifier delay by +40 ps, checks that the DLL pulls the
//     DQS path delay back to its trained value (mod 1 UI) and that the data
//     stays error free, and that code1 moved down by the drift;
//  4. stops DQS (a gap between bursts) and restarts it; checks codes held
//     and data still error free.
// Mechanisms counted: lock-point setting, coarse sweep of each stage,
// tracking up and down moves, DQS gap.
`timescale 1ps / 10fs
module fcrx_top_tb;
  import fcrx_pkg::*;

  localparam real TCK   = 312.5;        // DQS period (3.2 GHz)
  localparam real UI    = TCK / 2.0;    // 6.4 Gb/s
  localparam real T0    = 20.0;         // DCDL intrinsic delay of the model
  localparam real STEP  = 2.0;          // 2 t_NAND / 15 with t_NAND = 15 ps
  localparam int  LANES = 4;

  int checks = 0, failures = 0;

  logic                   rst_n, dqs_t, dqs_c, dqs_t_amp, dqs_c_amp, dqs_on;
  logic [LANES-1:0]       dq;
  logic                   run, csweep;
  logic [LANES-1:0][15:0] data;
  logic                   data_valid, dqs_i, lp1, lp2;
  logic [3:0]             clk_iq;
  logic [CODE_W-1:0]      code1, code2;
  fcrx_state_e            st;
  realtime                amp_dly, dq_off;

  fcrx_top dut (
    .rst_n(rst_n), .dqs_t_amp(dqs_t_amp), .dqs_c_amp(dqs_c_amp), .dqs_c_in(dqs_c),
    .dq(dq), .cfg_run(run), .cfg_coarse_sweep(csweep), .cfg_gain1(3'd1), .cfg_gain2(3'd1),
    .data(data), .data_valid(data_valid), .code1(code1), .code2(code2),
    .dlf_state(st), .lp1(lp1), .lp2(lp2), .dqs_i(dqs_i), .clk_iq(clk_iq));

  // ------------------------------------------------ DQS source (t and c)
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

  // ------------------------------------------------ amplifier model
  // single-ended to differential: DQS_t delayed by amp_dly, DQS_c its inverse
  realtime at_r = 0.0, at_f = 0.0;
  always @(posedge dqs_t) fork begin #(amp_dly) at_r <= $realtime; end join_none
  always @(negedge dqs_t) fork begin #(amp_dly) at_f <= $realtime; end join_none
  always_comb dqs_t_amp = (at_r > at_f);
  always_comb dqs_c_amp = ~dqs_t_amp;

  // ------------------------------------------------ DQ source: PRBS7 per lane
  logic [6:0] lfsr [LANES];
  initial begin
    longint n;
    for (int l = 0; l < LANES; l++) lfsr[l] = 7'(l * 29 + 5);
    dq = '0;
    n = 4;
    forever begin
      #(n * UI + dq_off - $realtime);
      for (int l = 0; l < LANES; l++) begin
        dq[l]   = lfsr[l][6];
        lfsr[l] = {lfsr[l][5:0], lfsr[l][6] ^ lfsr[l][5]};
      end
      n++;
    end
  end

  // ------------------------------------------------ received-data checker
  // PRBS7 (x^7 + x^6 + 1): b[n] = b[n-7] ^ b[n-6] on the serial stream.
  logic [15:0] hist [LANES];
  bit          hist_ok;
  bit          dchk_en;
  int          n_words = 0, n_bad = 0;
  always @(posedge clk_iq[0]) begin
    if (data_valid && dchk_en) begin
      for (int l = 0; l < LANES; l++) begin
        logic [31:0] s;
        bit ok;
        s  = {data[l], hist[l]};      // bit 0 oldest
        ok = (data[l] != 16'h0000) && (data[l] != 16'hffff);
        if (hist_ok)
          for (int i = 16; i < 32; i++) if (s[i] != (s[i-7] ^ s[i-6])) ok = 0;
        if (hist_ok) begin
          n_words++;
          if (!ok) n_bad++;
        end
        hist[l] = data[l];
      end
      hist_ok = 1;
    end
  end

  // ------------------------------------------------ path delay monitor
  realtime t_dqsi;
  real     path_mod;   // (DQS_I rise - last DQS_t rise) modulo UI
  always @(posedge dqs_i) begin
    real d;
    t_dqsi = $realtime;
    d = t_dqsi - t_dqs_rise;
    while (d >= UI) d -= UI;
    while (d < 0.0) d += UI;
    path_mod = d;
  end

  // ------------------------------------------------ mechanism counters
  int n_lockpt = 0, n_cs1 = 0, n_cs2 = 0, n_up1 = 0, n_dn1 = 0, n_up2 = 0, n_dn2 = 0, n_gap = 0;
  fcrx_state_e prev_st;
  logic [CODE_W-1:0] p1, p2;
  always @(posedge dut.clk_dlf) begin
    if (st == ST_LOCKPT && prev_st != ST_LOCKPT) n_lockpt++;
    if (st == ST_CS1 && code1 != p1) n_cs1++;
    if (st == ST_CS2 && code2 != p2) n_cs2++;
    if (st == ST_TRACK && prev_st == ST_TRACK) begin
      if (code1 > p1) n_up1++;
      if (code1 < p1) n_dn1++;
      if (code2 > p2) n_up2++;
      if (code2 < p2) n_dn2++;
    end
    prev_st = st; p1 = code1; p2 = code2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real modui(input real x);
    real d = x;
    while (d >= UI) d -= UI;
    while (d < 0.0) d += UI;
    return d;
  endfunction

  // expected codes from delay arithmetic
  task automatic check_codes(input string tag);
    real e1, e2, d1;
    d1 = amp_dly + T0;                      // DQS_edge_t delay at code 0
    e1 = (UI - modui(d1)) / STEP;           // reach next DQS_c edge
    e2 = (UI - T0) / STEP;                  // DQS_I one UI after DQS_edge_t
    check(real'(code1) - e1 <= 2.0 && e1 - real'(code1) <= 2.0,
          $sformatf("%s: code1 = %0d, want %0.1f", tag, code1, e1));
    check(real'(code2) - e2 <= 2.0 && e2 - real'(code2) <= 2.0,
          $sformatf("%s: code2 = %0d, want %0.1f", tag, code2, e2));
  endtask

  task automatic wait_ns(input int n);
    #(n * 1000.0);
  endtask

  initial begin
    #(60_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real path0, e_before;
  int  bad0;
  initial begin
    amp_dly = 60.0;
    dq_off  = 0.0;
    dqs_on  = 1'b1;
    run     = 1'b0;
    csweep  = 1'b1;
    dchk_en = 0;
    hist_ok = 0;
    rst_n = 1'b1;
    #(1);
    rst_n = 1'b0;
    #(2000);
    rst_n = 1'b1;
    wait_ns(100);

    // ---- 1. lock
    run = 1'b1;
    wait_ns(2000);
    check(st == ST_TRACK, "DLF reached tracking");
    check(lp1 == 1'b0, "stage-1 lock point: rising edge of DQS_c (PD_L1 = 0 at minimum delay)");
    check(lp2 == 1'b1, "stage-2 lock point: DQS_edge_c");
    check_codes("lock");
    $display("lock: code1 %0d code2 %0d path_mod %0.2f", code1, code2, path_mod);

    // ---- 2. write training: DQ transitions half a UI away from the sampling edges
    dq_off = modui(path_mod + UI / 2.0);
    path0  = path_mod;
    wait_ns(200);
    dchk_en = 1;
    wait_ns(1000);
    check(n_words > 200, $sformatf("words received after training: %0d", n_words));
    check(n_bad == 0, $sformatf("PRBS errors after training: %0d", n_bad));

    // ---- 3. drift of the DQS path by +40 ps
    bad0 = n_bad;
    e_before = real'(code1);
    for (int i = 0; i < 20; i++) begin
      amp_dly += 2.0;
      wait_ns(100);
    end
    wait_ns(1000);
    $display("drift: code1 %0d code2 %0d path_mod %0.2f (trained %0.2f)", code1, code2, path_mod, path0);
    check(path_mod - path0 < 6.0 && path0 - path_mod < 6.0,
          $sformatf("DQS path delay held: %0.2f vs %0.2f", path_mod, path0));
    check(n_bad == bad0, $sformatf("PRBS errors during drift: %0d", n_bad - bad0));
    check(e_before - real'(code1) > 15.0, "code1 lowered by about 40 ps / 2 ps");
    check_codes("drift");

    // ---- 4. DQS gap between bursts
    dqs_on = 1'b0;
    n_gap++;
    wait_ns(500);
    dchk_en = 0;
    dqs_on  = 1'b1;
    wait_ns(100);
    hist_ok = 0;
    dchk_en = 1;
    wait_ns(1000);
    check(n_bad == bad0, $sformatf("PRBS errors after DQS gap: %0d", n_bad - bad0));
    check_codes("after gap");

    $display("mechanisms: lockpt %0d cs1 %0d cs2 %0d up1 %0d dn1 %0d up2 %0d dn2 %0d gap %0d words %0d",
             n_lockpt, n_cs1, n_cs2, n_up1, n_dn1, n_up2, n_dn2, n_gap, n_words);
    check(n_lockpt > 0, "lock-point setting happened");
    check(n_cs1 > 0, "coarse sweep of DCDL1 happened");
    check(n_cs2 > 0, "coarse sweep of DCDL2 happened");
    check(n_up1 > 0 && n_dn1 > 0, "DCDL1 tracked up and down");
    check(n_up2 > 0 && n_dn2 > 0, "DCDL2 tracked up and down");
    check(n_gap > 0, "DQS gap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
