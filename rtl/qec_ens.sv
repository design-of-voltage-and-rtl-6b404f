// qec_ens: enable sequencer (ENS) for the asynchronous calibration on/off.
//
// CAL may change at any time. It is synchronized (two flops) to clk_ref, a
// clock that always runs (the corrected I clock), and a small state machine
// orders the two enables:
//   OFF -> ON : EN_B rises first (selector inputs run, CLK_LF,PRE starts),
//               EN_A is requested SEQ_DLY reference cycles later;
//   ON -> OFF : the EN_A request drops first, EN_B falls SEQ_DLY reference
//               cycles later.
// The EN_A request is synchronized again (two flops) into the CLK_LF,PRE
// domain, and EN_A gates CLK_LF,PRE into CLK_LF through a latch-based clock
// gate. So the loop filter clock starts only after the selector and detector
// are settled, and stops before their inputs are cut; the loop filter keeps
// its codes and resumes from them. CLK_LF,PRE runs at one fifth of clk_ref,
// so SEQ_DLY = 16 leaves time for the second synchronizer (three CLK_LF,PRE
// cycles). The order of the enables follows the design; the synchronizer
// depth and SEQ_DLY are this design's choices.
// Reset (asynchronous, active low): both enables off.
`timescale 1ps / 10fs
module qec_ens #(
  parameter int unsigned SEQ_DLY = 16
) (
  input  logic clk_ref,
  input  logic rst_n,
  input  logic cal,
  input  logic clk_lf_pre,
  output logic en_a,
  output logic en_b,
  output logic clk_lf
);

  typedef enum logic [1:0] {S_OFF, S_B_ON, S_ON, S_A_OFF} ens_state_e;

  localparam int unsigned DW = $clog2(SEQ_DLY + 1);

  logic [1:0]    cal_sync;
  ens_state_e    state;
  logic [DW-1:0] cnt;
  logic          en_a_req;
  logic [1:0]    a_sync;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) cal_sync <= '0;
    else        cal_sync <= {cal_sync[0], cal};
  end

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_OFF;
      cnt      <= '0;
      en_b     <= 1'b0;
      en_a_req <= 1'b0;
    end else begin
      unique case (state)
        S_OFF: if (cal_sync[1]) begin
          en_b  <= 1'b1;
          cnt   <= '0;
          state <= S_B_ON;
        end
        S_B_ON: begin
          if (!cal_sync[1]) begin
            en_b  <= 1'b0;
            state <= S_OFF;
          end else if (cnt == DW'(SEQ_DLY - 1)) begin
            en_a_req <= 1'b1;
            state    <= S_ON;
          end else cnt <= cnt + 1'b1;
        end
        S_ON: if (!cal_sync[1]) begin
          en_a_req <= 1'b0;
          cnt      <= '0;
          state    <= S_A_OFF;
        end
        S_A_OFF: begin
          if (cnt == DW'(SEQ_DLY - 1)) begin
            en_b  <= 1'b0;
            state <= S_OFF;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_OFF;
      endcase
    end
  end

  always_ff @(posedge clk_lf_pre or negedge rst_n) begin
    if (!rst_n) a_sync <= '0;
    else        a_sync <= {a_sync[0], en_a_req};
  end

  always_comb en_a = a_sync[1];

  qec_clk_gate u_cg (
    .clk  (clk_lf_pre),
    .en   (en_a),
    .gclk (clk_lf)
  );

endmodule
