// qec_ucon_tb: exhaustive test of the QEC update controller.
//
// All 16 bang-bang words, each with UDS = UP and DN. The expected decision is
// worked out here from the rule, phase by phase from the highest number down:
//   BB = 0000 -> C_QUAD up, BB = 1111 -> C_QUAD down;
//   UDS = UP: the highest phase k with BB[k] = 0 and BB[k-1] = 1 goes up;
//   UDS = DN: the highest phase k with BB[k] = 1 and BB[k-1] = 0 goes down.
// (BB[k] is the detector bit of pair (k, k+1), indices mod 4.)
`timescale 1ps / 10fs
module qec_ucon_tb;
  import qec_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] bb;
  logic       uds_up, up;
  qec_sel_e   sel;

  qec_ucon dut (.bb(bb), .uds_up(uds_up), .sel(sel), .up(up));

  initial begin
    #(1_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_quad_up = 0, n_quad_dn = 0, n_main_up = 0, n_main_dn = 0;
    for (int u = 0; u < 2; u++) begin
      for (int w = 0; w < 16; w++) begin
        logic [2:0] e_sel;
        logic       e_up;
        bb     = 4'(w);
        uds_up = 1'(u);
        #(10);
        if (w == 0)       begin e_sel = 3'd4; e_up = 1'b1; end
        else if (w == 15) begin e_sel = 3'd4; e_up = 1'b0; end
        else begin
          e_sel = 3'd7;
          e_up  = 1'(u);
          for (int k = 3; k >= 0; k--) begin
            bit cur, prv;
            cur = bb[k];
            prv = bb[(k + 3) % 4];
            if (e_sel == 3'd7 && ((u == 1 && !cur && prv) || (u == 0 && cur && !prv)))
              e_sel = 3'(k);
          end
        end
        checks++;
        if (3'(sel) !== e_sel || (e_sel != 3'd7 && up !== e_up)) begin
          failures++;
          $display("FAIL: bb %b uds %0d: sel %0d up %b, want sel %0d up %b", bb, u, sel, up, e_sel, e_up);
        end
        if (e_sel == 3'd4) begin if (e_up) n_quad_up++; else n_quad_dn++; end
        else if (e_sel != 3'd7) begin if (e_up) n_main_up++; else n_main_dn++; end
      end
    end
    checks++;
    if (!(n_quad_up > 0 && n_quad_dn > 0 && n_main_up > 0 && n_main_dn > 0)) begin
      failures++;
      $display("FAIL: not every kind of decision was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
