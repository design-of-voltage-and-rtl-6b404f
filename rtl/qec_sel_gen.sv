// qec_sel_gen: MUX SEL generator of the QEC signal selector.
//
// A 2-bit binary counter advances on every rising edge of O_MUX0 (the leading
// clock the selector currently outputs) and is decoded to a one-hot word
// D<3:0>. D is then retimed into the two select words:
//   SEL0<k> selects phase k for MUX0; it takes D<k> on the falling edge of
//           phase k;
//   SEL1<k> selects phase k+1 for MUX1; it takes SEL0<k> on the falling edge
//           of phase k+1.
// So a bit is set or cleared only while the phase it gates is low, and the old
// bit is cleared before the new one is set: the mux output stays low while the
// selection moves on, and no glitch or early edge reaches the error detector.
// Every retiming flop sees its data stable for at least T/4 on both sides of
// its clock edge, so input skews well below T/4 are tolerated. (Sampling D
// directly for SEL1 would put the SEL1 clock edge on the very instant the
// counter moves.)
// The pair sequence is (I,Q) -> (Q,IB) -> (IB,QB) -> (QB,I), one pair per
// O_MUX0 edge; O_MUX0 therefore runs at 0.8 times the clock frequency.
// The counter and the retiming on falling edges follow the design; using the
// selected phase itself as the retiming clock of each bit is this design's
// reading of "retimed by the negative edge of clocks".
// Reset (asynchronous, active low) puts both words at 0001 (pair I,Q).
`timescale 1ps / 10fs
module qec_sel_gen #(
  parameter int unsigned N_PHASE = 4
) (
  input  logic               rst_n,
  input  logic [N_PHASE-1:0] clk_ph,   // gated phases, index 0 = I
  input  logic               o_mux0,
  output logic [N_PHASE-1:0] sel0,
  output logic [N_PHASE-1:0] sel1
);

  localparam int unsigned CW = $clog2(N_PHASE);

  logic [CW-1:0]      cnt;
  logic [N_PHASE-1:0] d;

  always_ff @(posedge o_mux0 or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    d = '0;
    d[cnt] = 1'b1;
  end

  for (genvar k = 0; k < N_PHASE; k++) begin : g_retime
    localparam int unsigned KN = (k + 1) % N_PHASE;
    logic s0, s1;

    always_ff @(negedge clk_ph[k] or negedge rst_n) begin
      if (!rst_n) s0 <= (k == 0);
      else        s0 <= d[k];
    end

    always_ff @(negedge clk_ph[KN] or negedge rst_n) begin
      if (!rst_n) s1 <= (k == 0);
      else        s1 <= s0;
    end

    always_comb begin
      sel0[k] = s0;
      sel1[k] = s1;
    end
  end

endmodule
