// qec_qed: digital part of the QEC quadrature error detector.
//
// The two selected clocks arrive already delayed: O_MUX0D by the quadrature
// DCDL (code C_QUAD) and O_MUX1D by an identical DCDL held at its minimum
// code, so O_MUX0D - O_MUX1D compares the gap between the two phases with
// t_quad = C_QUAD x LSB.
//  * Bang-bang phase detector: a flip-flop clocked by O_MUX0D samples O_MUX1D.
//    BB_OUT = 0 when O_MUX0D leads (gap larger than t_quad), 1 when it lags.
//    SEL1<3> is captured with it; it is 1 for the comparison of pair (QB,I).
//  * 1:4 deserializer: BB_OUT and the SEL1<3> tag are shifted in on the
//    falling edge of O_MUX1D (newest in bit 0) and the four-entry words are
//    captured every fourth rising edge of O_MUX1D into des_bb / des_tag.
//  * CLK_LF,PRE = O_MUX1D / 4. O_MUX1D runs at 0.8 f, so CLK_LF,PRE runs at
//    0.2 f, as in the design. It rises two O_MUX1D cycles after a capture,
//    so the loop filter sees stable words.
// The flop structure of the deserializer and divider is this design's choice.
`timescale 1ps / 10fs
module qec_qed #(
  parameter int unsigned DES_W = 4
) (
  input  logic             rst_n,
  input  logic             o_mux0d,
  input  logic             o_mux1d,
  input  logic             sel1_3,
  output logic [DES_W-1:0] des_bb,
  output logic [DES_W-1:0] des_tag,
  output logic             clk_lf_pre
);

  localparam int unsigned CW = $clog2(DES_W);

  logic             bb, tag;
  logic [DES_W-1:0] sh_bb, sh_tag;
  logic [CW-1:0]    div;

  // bang-bang phase detector
  always_ff @(posedge o_mux0d or negedge rst_n) begin
    if (!rst_n) begin
      bb  <= 1'b0;
      tag <= 1'b0;
    end else begin
      bb  <= o_mux1d;
      tag <= sel1_3;
    end
  end

  // serial-in shift register
  always_ff @(negedge o_mux1d or negedge rst_n) begin
    if (!rst_n) begin
      sh_bb  <= '0;
      sh_tag <= '0;
    end else begin
      sh_bb  <= {sh_bb[DES_W-2:0], bb};
      sh_tag <= {sh_tag[DES_W-2:0], tag};
    end
  end

  // divider and parallel capture
  always_ff @(posedge o_mux1d or negedge rst_n) begin
    if (!rst_n) begin
      div     <= '0;
      des_bb  <= '0;
      des_tag <= '0;
    end else begin
      div <= div + 1'b1;
      if (div == CW'(DES_W - 1)) begin
        des_bb  <= sh_bb;
        des_tag <= sh_tag;
      end
    end
  end

  always_comb clk_lf_pre = div[CW-1];

endmodule
