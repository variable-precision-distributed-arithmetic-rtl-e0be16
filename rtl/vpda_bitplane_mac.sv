// vpda_bitplane_mac -- single-bit equalizer of one VPDA sub-equalizer.
//
// Distributed arithmetic replaces each multi-bit multiplication by one
// coefficient per ADC bit: this block handles one bit plane. For each of the
// four ADC streams it takes one bit of every sample in an L-sample window and
// adds or subtracts the complex coefficient of that tap and bit plane (the
// "1-bit to complex multiplier"), then sums everything into one complex
// partial result:
//
//   P = sum_{XI,YI} s*A  +  j * sum_{XQ,YQ} s*B,     s = +1 for bit 1, -1 for bit 0
//
// so Re(P) = sum s*A_re - sum s*B_im and Im(P) = sum s*A_im + sum s*B_re.
// Reading a bit as +/-1 (the SAR weighting (2d-1) of the converter) rather
// than 0/1 is this design's choice: it keeps a result truncated after any bit
// plane unbiased. When en is low the operands are forced to zero (operand
// isolation) so a disabled resolution step does not toggle its adder tree.
//
// Purely combinational; one result per clock. PW must hold the sum of
// 2*NADC*L coefficients (COEF_W + clog2(NADC*L) + 1 bits suffices).
module vpda_bitplane_mac
  import vpda_pkg::*;
#(
  parameter int unsigned L      = 32,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned PW     = COEF_W + $clog2(NADC * L) + 1
) (
  input  logic                     en,
  input  logic                     bits    [NADC][L],
  input  logic signed [COEF_W-1:0] coef_re [NADC][L],
  input  logic signed [COEF_W-1:0] coef_im [NADC][L],
  output logic signed [PW-1:0]     p_re,
  output logic signed [PW-1:0]     p_im
);

  always_comb begin
    logic signed [PW-1:0] acc_re, acc_im;
    logic signed [PW-1:0] cr, ci;
    acc_re = '0;
    acc_im = '0;
    cr     = '0;
    ci     = '0;
    if (en) begin
      for (int unsigned a = 0; a < NADC; a++) begin
        for (int unsigned t = 0; t < L; t++) begin
          cr = PW'(coef_re[a][t]);
          ci = PW'(coef_im[a][t]);
          if (!bits[a][t]) begin
            cr = -cr;
            ci = -ci;
          end
          if (is_b_branch(a)) begin
            // j * (B_re + j B_im) = -B_im + j B_re
            acc_re = acc_re - ci;
            acc_im = acc_im + cr;
          end else begin
            acc_re = acc_re + cr;
            acc_im = acc_im + ci;
          end
        end
      end
    end
    p_re = acc_re;
    p_im = acc_im;
  end

endmodule
