// fcrx_des: 1:4 deserializers of the receiver.
//
// On every rising edge of the I clock the four sampler outputs of each lane
// (taken on I, Q, IB, QB during the last period, in that time order) are
// shifted into a 16-bit register, four bits at a time; after four I cycles
// the word is complete and copied to data with a one-cycle valid strobe.
// Bit 0 of a word is the oldest received bit. The divide-by-4 count that
// frames the words is also the receiver's slow clock (clk_div = count MSB,
// a quarter of the I clock), used by the loop filter.
// Asynchronous active-low reset to 0.
`timescale 1ps / 10fs
module fcrx_des #(
  parameter int unsigned LANES = 4,
  parameter int unsigned RATIO = 4
) (
  input  logic                          clk,     // I clock
  input  logic                          rst_n,
  input  logic [LANES-1:0][3:0]         smp,
  output logic [LANES-1:0][4*RATIO-1:0] data,
  output logic                          valid,
  output logic                          clk_div
);

  localparam int unsigned CW = $clog2(RATIO);

  logic [LANES-1:0][4*RATIO-1:0] sh;
  logic [CW-1:0]                 cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '0;
      data  <= '0;
      valid <= 1'b0;
      cnt   <= '0;
    end else begin
      cnt   <= cnt + 1'b1;
      valid <= 1'b0;
      for (int l = 0; l < LANES; l++)
        sh[l] <= {smp[l], sh[l][4*RATIO-1:4]};
      if (cnt == CW'(RATIO - 1)) begin
        valid <= 1'b1;
        for (int l = 0; l < LANES; l++)
          data[l] <= {smp[l], sh[l][4*RATIO-1:4]};
      end
    end
  end

  always_comb clk_div = cnt[CW-1];

endmodule
