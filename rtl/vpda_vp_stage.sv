// vpda_vp_stage -- one resolution step of the variable-precision pipeline.
//
// Each step adds its bit plane's partial result P (A part plus j times B part,
// from vpda_bitplane_mac) and its share E of the sub-equalizer offset to twice
// the running result of the previous step:
//
//   acc_k = 2 * acc_{k-1} + P_k + E_k
//
// After steps 1..NPLANE-1 a range checker scales acc_k to full resolution
// (shift left by NPLANE-STAGE) and tests whether either component lies within
// +/-thr of a decision boundary (the suspicious region, a cross along both
// axes). If it does, the symbol stays active and the next, one bit finer,
// step is enabled. If not, the sign of each component is taken as the final
// QPSK decision now and every later step stays disabled for this symbol. The
// last step always decides. With vp_en low, or in_force high (full precision
// requested by the adaptation engine), every step is enabled: that is the
// fixed-resolution DA equalizer.
//
// The accumulate-double-add structure, the range check per step and the
// carried decision follow the published VP block; the cross-shaped region
// test, the register layout and the pass-through of a decided symbol are
// this design's reading of it. One register stage: the outputs belong to the
// inputs of the previous clock. Reset is asynchronous, active low, and clears
// the valid and active flags.
module vpda_vp_stage
  import vpda_pkg::*;
#(
  parameter int unsigned STAGE = 1,
  parameter int unsigned PW    = 16,
  parameter int unsigned AW    = 22
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vp_en,
  input  logic [AW-1:0]        thr,
  // symbol state from the previous step
  input  logic                 in_valid,
  input  logic                 in_active,
  input  logic                 in_force,
  input  logic signed [AW-1:0] in_acc_re,
  input  logic signed [AW-1:0] in_acc_im,
  input  qpsk_dec_t            in_dec,
  input  logic [2:0]           in_res,
  // this step's partial product and offset share
  input  logic signed [PW-1:0] p_re,
  input  logic signed [PW-1:0] p_im,
  input  logic signed [PW-1:0] e_re,
  input  logic signed [PW-1:0] e_im,
  // symbol state for the next step
  output logic                 out_valid,
  output logic                 out_active,
  output logic                 out_force,
  output logic signed [AW-1:0] out_acc_re,
  output logic signed [AW-1:0] out_acc_im,
  output qpsk_dec_t            out_dec,
  output logic [2:0]           out_res
);

  localparam int unsigned SH = NPLANE - STAGE;
  localparam int unsigned MW = AW + NPLANE;

  logic signed [AW-1:0] sum_re, sum_im;
  logic [MW-1:0]        mag_re, mag_im;
  logic                 suspicious, cont, decide_now;

  always_comb begin
    sum_re = (in_acc_re <<< 1) + AW'(p_re) + AW'(e_re);
    sum_im = (in_acc_im <<< 1) + AW'(p_im) + AW'(e_im);
    mag_re = MW'(sum_re[AW-1] ? AW'(-sum_re) : sum_re) << SH;
    mag_im = MW'(sum_im[AW-1] ? AW'(-sum_im) : sum_im) << SH;
    suspicious = (mag_re < MW'(thr)) || (mag_im < MW'(thr));
    cont       = (STAGE < NPLANE) && (!vp_en || in_force || suspicious);
    decide_now = in_active && !cont;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_active <= 1'b0;
      out_force  <= 1'b0;
    end else begin
      out_valid  <= in_valid;
      out_active <= in_valid && in_active && cont;
      out_force  <= in_valid && in_force;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_acc_re <= in_active ? sum_re : in_acc_re;
      out_acc_im <= in_active ? sum_im : in_acc_im;
      out_dec    <= decide_now ? qpsk_dec_t'{i: !sum_re[AW-1], q: !sum_im[AW-1]} : in_dec;
      out_res    <= decide_now ? 3'(STAGE) : in_res;
    end
  end

endmodule
