// tb_vpda_bitplane_mac -- self-checking test of the single-bit equalizer.
//
// Drives random bit planes and random complex coefficients (full 8-bit range,
// including -128) and compares both components of the partial result with an
// integer model: for every tap the coefficient is added for a 1 bit and
// subtracted for a 0 bit, in-phase ADCs (XI, YI) as A and quadrature ADCs
// (XQ, YQ) as B rotated by j. Also checks that en = 0 gives zero, and sweeps
// the all-ones / all-zeros extremes that set the output width.
module tb_vpda_bitplane_mac;
  import vpda_pkg::*;

  localparam int unsigned L      = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned PW     = COEF_W + $clog2(NADC * L) + 1;

  logic                     en;
  logic                     bits    [NADC][L];
  logic signed [COEF_W-1:0] coef_re [NADC][L];
  logic signed [COEF_W-1:0] coef_im [NADC][L];
  logic signed [PW-1:0]     p_re, p_im;

  int checks = 0, failures = 0;

  vpda_bitplane_mac #(.L(L), .COEF_W(COEF_W)) dut (.*);

  task automatic check(input string what);
    int er, ei, s;
    er = 0; ei = 0;
    if (en)
      for (int a = 0; a < NADC; a++)
        for (int t = 0; t < L; t++) begin
          s = bits[a][t] ? 1 : -1;
          if (a == 1 || a == 3) begin
            er -= s * int'(coef_im[a][t]);
            ei += s * int'(coef_re[a][t]);
          end else begin
            er += s * int'(coef_re[a][t]);
            ei += s * int'(coef_im[a][t]);
          end
        end
    #1;
    checks++;
    if (int'(p_re) != er || int'(p_im) != ei) begin
      failures++;
      $display("FAIL %s: got (%0d,%0d) expected (%0d,%0d)", what, p_re, p_im, er, ei);
    end
  endtask

  initial begin
    for (int it = 0; it < 400; it++) begin
      en = (it % 10) != 3;
      for (int a = 0; a < NADC; a++)
        for (int t = 0; t < L; t++) begin
          bits[a][t]    = 1'($urandom);
          coef_re[a][t] = COEF_W'($urandom);
          coef_im[a][t] = COEF_W'($urandom);
        end
      check("random");
    end
    // extremes
    for (int m = 0; m < 4; m++) begin
      en = 1'b1;
      for (int a = 0; a < NADC; a++)
        for (int t = 0; t < L; t++) begin
          bits[a][t]    = m[0];
          coef_re[a][t] = m[1] ? -128 : 127;
          coef_im[a][t] = m[1] ? -128 : 127;
        end
      check("extreme");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
