// fcrx_dlf: digital loop filter of the receiver's two-stage cascaded DLL.
//
// Flow (one step per SETTLE slow-clock cycles, so each decision sees a phase
// detector result taken after the last code change):
//   IDLE   : run = 0; both codes at 0.
//   LOCKPT : with both codes at 0, record the lock points.
//            Stage 1: lp1 = PD_L1. PD_L1 = 0 -> align DQS_edge_t with the
//            rising edge of DQS_c; 1 -> with its falling edge.
//            Stage 2: (PD_c, PD_t) = (0,1) -> lock to DQS_edge_t (lp2 = 0,
//            tracked detector PD_t); otherwise lock to DQS_edge_c (lp2 = 1,
//            tracked detector PD_c).
//   CS1    : if coarse_sweep, raise code1 one coarse step (15 codes) at a time
//            until PD_L1 differs from lp1.
//   CS2    : likewise for code2 until the tracked stage-2 detector reads 0.
//   TRACK  : both codes move at once, code1 by gain1 and code2 by gain2:
//              stage 1 up when PD_L1 == lp1, down otherwise;
//              stage 2 up when the tracked detector is 1 (strobe early),
//              down otherwise.
//            Codes saturate at 0 and CODE_MAX.
// "Up while the detector still reads what it read at minimum delay" is the
// polarity table of the design, where a different lock point inverts the
// polarity. The detector outputs come from the fast DQS-domain clocks and are
// brought in through two-flop synchronizers. The synchronizers, SETTLE and
// the gain encoding (step size 1..7 codes, 0 treated as 1) are this design's
// choices. Clocked by clk (the receiver's divided clock); asynchronous
// active-low reset.
`timescale 1ps / 10fs
module fcrx_dlf
  import fcrx_pkg::*;
#(
  parameter int unsigned SETTLE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              coarse_sweep,
  input  logic [2:0]        gain1,
  input  logic [2:0]        gain2,
  input  logic              pd_l1,
  input  logic              pd_t,
  input  logic              pd_c,
  output logic [CODE_W-1:0] code1,
  output logic [CODE_W-1:0] code2,
  output fcrx_state_e       state,
  output logic              lp1,
  output logic              lp2
);

  localparam int unsigned SW = $clog2(SETTLE);

  logic [1:0] s_l1, s_t, s_c;
  logic       pl1, pt, pc, pd2;
  logic [SW-1:0] wcnt;
  logic       tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_l1 <= '0;
      s_t  <= '0;
      s_c  <= '0;
    end else begin
      s_l1 <= {s_l1[0], pd_l1};
      s_t  <= {s_t[0], pd_t};
      s_c  <= {s_c[0], pd_c};
    end
  end

  always_comb begin
    pl1  = s_l1[1];
    pt   = s_t[1];
    pc   = s_c[1];
    pd2  = lp2 ? pc : pt;
    tick = (wcnt == SW'(SETTLE - 1));
  end

  // saturating add / subtract of a step
  function automatic logic [CODE_W-1:0] step(input logic [CODE_W-1:0] c,
                                             input logic up, input logic [2:0] g);
    int unsigned gi;
    logic [CODE_W-1:0] r;
    gi = (g == 3'd0) ? 1 : int'(g);
    if (up) r = (int'(c) + gi > CODE_MAX) ? CODE_W'(CODE_MAX) : CODE_W'(int'(c) + gi);
    else    r = (int'(c) < gi) ? '0 : CODE_W'(int'(c) - gi);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      code1 <= '0;
      code2 <= '0;
      lp1   <= 1'b0;
      lp2   <= 1'b0;
      wcnt  <= '0;
    end else if (!run) begin
      state <= ST_IDLE;
      code1 <= '0;
      code2 <= '0;
      wcnt  <= '0;
    end else begin
      wcnt <= tick ? '0 : wcnt + 1'b1;
      unique case (state)
        ST_IDLE: begin
          state <= ST_LOCKPT;
          wcnt  <= '0;
        end
        ST_LOCKPT: if (tick) begin
          lp1 <= pl1;
          lp2 <= !(pt && !pc);
          state <= coarse_sweep ? ST_CS1 : ST_TRACK;
        end
        ST_CS1: if (tick) begin
          if (pl1 != lp1 || int'(code1) + FINE_STEPS > CODE_MAX) state <= ST_CS2;
          else code1 <= code1 + CODE_W'(FINE_STEPS);
        end
        ST_CS2: if (tick) begin
          if (!pd2 || int'(code2) + FINE_STEPS > CODE_MAX) state <= ST_TRACK;
          else code2 <= code2 + CODE_W'(FINE_STEPS);
        end
        ST_TRACK: if (tick) begin
          code1 <= step(code1, pl1 == lp1, gain1);
          code2 <= step(code2, pd2, gain2);
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
