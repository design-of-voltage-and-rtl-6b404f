// qec_dlf: digital loop filter (DLF) of the QEC, with the update controller.
//
// Runs on CLK_LF (0.2 f, gated by EN_A) and cycles its MODE counter through
//   COMPUTE: retime the deserialized bang-bang word, put its bits in pair order
//            using the deserialized SEL1<3> tag, apply the UDS rule, let UCON
//            choose one delay line and direction, and compute the new code;
//   UPDATE : write that code (or nothing, see below) and the new UDS;
//   REST   : one idle cycle while the DCDL settles; the word measured across
//            the update is dropped, which avoids limit cycles.
// UDS (update direction state): before each choice, if all four main codes
// are above 0 the state is forced to DN, so the loop keeps lowering delay until
// one main line sits at its minimum. A lowering that would go below 0 is not
// applied and flips UDS to UP. These rules follow the design. An increase that
// would pass the maximum is likewise not applied and sets UDS to DN; that
// overflow rule and the unit step size are this design's choices.
// A word whose tag is not one-hot (after power-up or a gated restart) is
// ignored. All registers reset asynchronously: codes 0, UDS = DN.
// Outputs change on the rising edge of clk_lf in the UPDATE cycle.
`timescale 1ps / 10fs
module qec_dlf
  import qec_pkg::*;
#(
  parameter int unsigned MAIN_CODE_W = 7,
  parameter int unsigned QUAD_CODE_W = 8
) (
  input  logic                                 clk_lf,
  input  logic                                 rst_n,
  input  logic [N_PHASE-1:0]                   des_bb,
  input  logic [N_PHASE-1:0]                   des_tag,
  output logic [N_PHASE-1:0][MAIN_CODE_W-1:0]  code_main,
  output logic [QUAD_CODE_W-1:0]               code_quad,
  output logic                                 uds_up,
  output qec_mode_e                            mode
);

  localparam logic [MAIN_CODE_W-1:0] MAIN_MAX = '1;
  localparam logic [QUAD_CODE_W-1:0] QUAD_MAX = '1;

  // ---- reorder: deserializer position q holds pair (3 + p - q) mod 4,
  //      where p is the position of the tag (pair 3)
  logic [N_PHASE-1:0] bb_ord;
  logic               tag_ok;

  always_comb begin
    int p;
    p      = 0;
    tag_ok = (des_tag != '0) && ((des_tag & (des_tag - 1'b1)) == '0);
    for (int q = 0; q < N_PHASE; q++)
      if (des_tag[q]) p = q;
    bb_ord = '0;
    for (int q = 0; q < N_PHASE; q++)
      bb_ord[(N_PHASE - 1 + p - q + N_PHASE) % N_PHASE] = des_bb[q];
  end

  // ---- UDS pre-check and update controller
  logic     all_pos, uds_eff;
  qec_sel_e u_sel;
  logic     u_up;

  always_comb begin
    all_pos = 1'b1;
    for (int k = 0; k < N_PHASE; k++)
      if (code_main[k] == '0) all_pos = 1'b0;
    uds_eff = all_pos ? 1'b0 : uds_up;
  end

  qec_ucon u_ucon (
    .bb     (bb_ord),
    .uds_up (uds_eff),
    .sel    (u_sel),
    .up     (u_up)
  );

  // ---- adder with underflow / overflow check
  logic                   n_write, n_uds;
  qec_sel_e               n_sel;
  logic [QUAD_CODE_W-1:0] n_code;   // wide enough for both code widths

  always_comb begin
    n_write = 1'b0;
    n_uds   = uds_eff;
    n_sel   = u_sel;
    n_code  = '0;
    if (!tag_ok) begin
      n_sel = SEL_NONE;
      n_uds = uds_up;
    end else if (u_sel == SEL_QUAD) begin
      if (u_up && code_quad != QUAD_MAX) begin
        n_write = 1'b1;
        n_code  = code_quad + 1'b1;
      end else if (!u_up && code_quad != '0) begin
        n_write = 1'b1;
        n_code  = code_quad - 1'b1;
      end
    end else if (u_sel != SEL_NONE) begin
      if (u_up) begin
        if (code_main[u_sel[1:0]] == MAIN_MAX) n_uds = 1'b0;        // overflow
        else begin
          n_write = 1'b1;
          n_code  = QUAD_CODE_W'(code_main[u_sel[1:0]]) + 1'b1;
        end
      end else begin
        if (code_main[u_sel[1:0]] == '0) n_uds = 1'b1;              // underflow
        else begin
          n_write = 1'b1;
          n_code  = QUAD_CODE_W'(code_main[u_sel[1:0]]) - 1'b1;
        end
      end
    end
  end

  // ---- MODE sequence and registers
  logic                   p_write, p_uds;
  qec_sel_e               p_sel;
  logic [QUAD_CODE_W-1:0] p_code;

  always_ff @(posedge clk_lf or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_COMPUTE;
      code_main <= '0;
      code_quad <= '0;
      uds_up    <= 1'b0;
      p_write   <= 1'b0;
      p_uds     <= 1'b0;
      p_sel     <= SEL_NONE;
      p_code    <= '0;
    end else begin
      unique case (mode)
        MODE_COMPUTE: begin
          p_write <= n_write;
          p_uds   <= n_uds;
          p_sel   <= n_sel;
          p_code  <= n_code;
          mode    <= MODE_UPDATE;
        end
        MODE_UPDATE: begin
          uds_up <= p_uds;
          if (p_write) begin
            if (p_sel == SEL_QUAD) code_quad <= p_code;
            else                   code_main[p_sel[1:0]] <= p_code[MAIN_CODE_W-1:0];
          end
          mode <= MODE_REST;
        end
        default: mode <= MODE_COMPUTE;
      endcase
    end
  end

endmodule
