// fcrx_dcdl_dec_tb: exhaustive test of the receiver DCDL code decoder.
//
// For every code 0..127 it checks that CU, CD and FSEL are thermometer codes
// (ones from bit 0 up), that the two coarse lines differ by exactly one stage,
// that the resulting delay in coarse steps, U + (D - U) * w / 15, equals the
// code / 15 (codes above 89 count as 89), and that a coarse line only
// changes between neighbouring codes when the new code gives it zero
// interpolator weight, so the coarse switch cannot disturb the output.
`timescale 1ps / 10fs
module fcrx_dcdl_dec_tb;
  int checks = 0, failures = 0;
  logic [6:0]  code;
  logic [5:0]  cu, cd;
  logic [14:0] fsel;

  fcrx_dcdl_dec dut (.code(code), .cu(cu), .cd(cd), .fsel(fsel));

  function automatic bit is_thermo(input logic [14:0] v);
    return ((v + 15'd1) & v) == '0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(1_000_000);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0]  pcu, pcd;
    for (int c = 0; c < 128; c++) begin
      int u, d, w, eff;
      code = 7'(c);
      #(10);
      u = $countones(cu);
      d = $countones(cd);
      w = $countones(fsel);
      eff = (c > 89) ? 89 : c;
      check(is_thermo(15'(cu)) && is_thermo(15'(cd)) && is_thermo(fsel),
            $sformatf("code %0d: not thermometer (cu %b cd %b fsel %b)", c, cu, cd, fsel));
      check(d - u == 1 || u - d == 1, $sformatf("code %0d: lines %0d and %0d stages", c, u, d));
      check(u * 15 + (d - u) * w == eff, $sformatf("code %0d: delay %0d/15 steps", c, u * 15 + (d - u) * w));
      if (c > 0 && c <= 89) begin
        if (cu != pcu) check(w == 15, $sformatf("code %0d: CLKU changed while weighted", c));
        if (cd != pcd) check(w == 0,  $sformatf("code %0d: CLKD changed while weighted", c));
      end
      pcu = cu; pcd = cd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
