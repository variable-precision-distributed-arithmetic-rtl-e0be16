// vpda_mimo_top -- variable-precision distributed-arithmetic (VPDA) MIMO
// equalizer for a 112 Gb/s dual-polarization QPSK coherent receiver.
//
// The four 56 GS/s 5-bit ADCs (XI, XQ, YI, YQ) each deliver NPAR = 112
// samples per 500 MHz clock, 2x oversampled. The equalizer produces NPAR
// symbols per clock: outputs 0..NPAR/2-1 are the X polarization and
// NPAR/2..NPAR-1 the Y polarization (D_1..D_56 and D_57..D_112). Each output
// is one vpda_subeq, which equalizes chromatic and polarization dispersion,
// the gain/offset/timing mismatch of the interleaved converters and each
// converter's bit-weight error at once, because it has a separate complex
// coefficient for every ADC, tap and bit. Its bit planes are evaluated MSB
// first, and a symbol that is already far from the decision boundaries is
// decided early, leaving the finer steps idle (variable precision). One LMS
// engine (vpda_lms) per polarization adapts the sub-equalizers in turn.
//
// Interface. adc/in_valid: one block of samples per ADC. vp_en: 1 enables
// early decisions, 0 computes every symbol at full precision (DA MIMO).
// thr[k]: suspicious-region half width after step k+1, in full-resolution
// output units (vpda_pkg::sus_threshold gives the published sizes for a
// symbol amplitude). adapt_en/ref_amp: LMS on/off and target amplitude.
// cfg_*: write one coefficient or offset of sub-equalizer cfg_sub; rd_*
// read the addressed one back.
//
// Timing: the decisions of a block appear on out_* with out_valid NPLANE+1
// clocks after the in_valid of the block following it, i.e. a window
// latency of one block plus NPLANE+1 clocks. out_res[j] is the step (1..5)
// that decided symbol j, out_re/out_im its soft value when out_res is 5.
// Module parameters default to the published design point: 112 parallel
// samples, 5-bit ADCs, 8-bit coefficients, 32 taps.
module vpda_mimo_top
  import vpda_pkg::*;
#(
  parameter int unsigned NPAR      = 112,
  parameter int unsigned L         = 32,
  parameter int unsigned ADC_W     = NPLANE,
  parameter int unsigned COEF_W    = 8,
  parameter int unsigned CFRAC     = 8,
  parameter int unsigned MU_SH     = 16,
  parameter int unsigned MU_OFF_SH = 6,
  parameter int unsigned DWELL     = 1,
  parameter int unsigned PW        = COEF_W + $clog2(NADC * L) + 1,
  parameter int unsigned AW        = PW + NPLANE + 1,
  parameter int unsigned OW        = PW + NPLANE - 1,
  parameter int unsigned NSUB      = NPAR,
  parameter int unsigned SUBW      = $clog2(NPAR)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [ADC_W-1:0]         adc [NADC][NPAR],
  input  logic                     vp_en,
  input  logic [AW-1:0]            thr [NPLANE-1],
  input  logic                     adapt_en,
  input  logic [AW-2:0]            ref_amp,
  input  logic                     cfg_we,
  input  logic                     cfg_off_we,
  input  logic [SUBW-1:0]          cfg_sub,
  input  logic [2:0]               cfg_plane,
  input  logic [1:0]               cfg_adc,
  input  logic [$clog2(L)-1:0]     cfg_tap,
  input  logic signed [COEF_W-1:0] cfg_re,
  input  logic signed [COEF_W-1:0] cfg_im,
  input  logic signed [OW-1:0]     cfg_off_re,
  input  logic signed [OW-1:0]     cfg_off_im,
  output logic signed [COEF_W-1:0] rd_re,
  output logic signed [COEF_W-1:0] rd_im,
  output logic signed [OW-1:0]     rd_off_re,
  output logic signed [OW-1:0]     rd_off_im,
  output logic                     out_valid,
  output qpsk_dec_t                out_dec [NSUB],
  output logic [2:0]               out_res [NSUB],
  output logic signed [AW-1:0]     out_re  [NSUB],
  output logic signed [AW-1:0]     out_im  [NSUB]
);

  localparam int unsigned NSYM = NPAR / 2;
  localparam int unsigned EW   = AW + 1;

  logic             win_valid;
  logic [ADC_W-1:0] win [NSYM][NADC][L];

  vpda_window #(.NPAR(NPAR), .L(L), .ADC_W(ADC_W)) u_window (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .adc       (adc),
    .win_valid (win_valid),
    .win       (win)
  );

  logic                     sub_valid [NSUB];
  logic                     sub_full  [NSUB];
  logic                     force_full[NSUB];
  logic                     upd_en    [NSUB];
  logic signed [EW-1:0]     e_re [2], e_im [2];
  logic signed [COEF_W-1:0] sub_rd_re [NSUB], sub_rd_im [NSUB];
  logic signed [OW-1:0]     sub_rd_off_re [NSUB], sub_rd_off_im [NSUB];

  for (genvar j = 0; j < NSUB; j++) begin : g_sub
    vpda_subeq #(
      .L(L), .ADC_W(ADC_W), .COEF_W(COEF_W), .CFRAC(CFRAC), .MU_SH(MU_SH), .MU_OFF_SH(MU_OFF_SH),
      .PW(PW), .AW(AW), .EW(EW)
    ) u_subeq (
      .clk        (clk),
      .rst_n      (rst_n),
      .vp_en      (vp_en),
      .thr        (thr),
      .win_valid  (win_valid),
      .win        (win[j % NSYM]),
      .force_full (force_full[j]),
      .cfg_we     (cfg_we && (32'(cfg_sub) == j)),
      .cfg_off_we (cfg_off_we && (32'(cfg_sub) == j)),
      .cfg_plane  (cfg_plane),
      .cfg_adc    (cfg_adc),
      .cfg_tap    (cfg_tap),
      .cfg_re     (cfg_re),
      .cfg_im     (cfg_im),
      .cfg_off_re (cfg_off_re),
      .cfg_off_im (cfg_off_im),
      .rd_re      (sub_rd_re[j]),
      .rd_im      (sub_rd_im[j]),
      .rd_off_re  (sub_rd_off_re[j]),
      .rd_off_im  (sub_rd_off_im[j]),
      .upd_en     (upd_en[j]),
      .upd_e_re   (e_re[j / NSYM]),
      .upd_e_im   (e_im[j / NSYM]),
      .out_valid  (sub_valid[j]),
      .out_dec    (out_dec[j]),
      .out_res    (out_res[j]),
      .out_full   (sub_full[j]),
      .out_re     (out_re[j]),
      .out_im     (out_im[j])
    );
  end

  // one adaptation engine per polarization
  for (genvar p = 0; p < 2; p++) begin : g_lms
    logic                 l_full  [NSYM];
    qpsk_dec_t            l_dec   [NSYM];
    logic signed [AW-1:0] l_re    [NSYM], l_im [NSYM];
    logic                 l_force [NSYM], l_upd [NSYM];

    for (genvar s = 0; s < NSYM; s++) begin : g_map
      assign l_full[s] = sub_full[p * NSYM + s];
      assign l_dec[s]  = out_dec[p * NSYM + s];
      assign l_re[s]   = out_re[p * NSYM + s];
      assign l_im[s]   = out_im[p * NSYM + s];
      assign force_full[p * NSYM + s] = l_force[s];
      assign upd_en[p * NSYM + s]     = l_upd[s];
    end

    vpda_lms #(.NSUB(NSYM), .AW(AW), .EW(EW), .LAT(NPLANE), .DWELL(DWELL)) u_lms (
      .clk        (clk),
      .rst_n      (rst_n),
      .adapt_en   (adapt_en),
      .ref_amp    (ref_amp),
      .in_full    (l_full),
      .in_dec     (l_dec),
      .in_re      (l_re),
      .in_im      (l_im),
      .force_full (l_force),
      .upd_en     (l_upd),
      .e_re       (e_re[p]),
      .e_im       (e_im[p])
    );
  end

  assign out_valid = sub_valid[0];
  assign rd_re     = sub_rd_re[cfg_sub];
  assign rd_im     = sub_rd_im[cfg_sub];
  assign rd_off_re = sub_rd_off_re[cfg_sub];
  assign rd_off_im = sub_rd_off_im[cfg_sub];

endmodule
