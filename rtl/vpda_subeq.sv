// vpda_subeq -- one VPDA sub-equalizer: produces one recovered QPSK symbol
// per clock from L-sample windows of the four ADC streams.
//
// How it works. Every ADC sample is split into its NPLANE bits. Bit plane k
// (k = 1 is the MSB) has its own complex coefficient for every ADC and tap,
// so the per-bit weights of a non-ideal SAR converter are folded into the
// filter (distributed arithmetic). The planes are evaluated one per pipeline
// step, MSB first, by a vpda_bitplane_mac feeding a vpda_vp_stage. A step is
// enabled only if the previous one left the symbol in the suspicious region;
// otherwise the symbol is decided early and the remaining steps are idle.
// The complex offset C'' is held at full resolution and split over the steps:
// step 1 adds off >>> (NPLANE-1), step k > 1 adds bit (NPLANE-k) of off, so
// every step sees the offset to its own precision and the full-precision
// result includes it exactly.
//
// Adaptation (LMS). When upd_en is high the error e = reference - output of
// the symbol now at the output is applied to every coefficient, using the
// sample window aligned with that output (kept in the window pipeline):
//   A += s * round(e       * 2^(NPLANE-k) / 2^MU_SH)
//   B += s * round(-j * e  * 2^(NPLANE-k) / 2^MU_SH)     s = +/-1 from the bit
//   off += round(e / 2^MU_OFF_SH)
// with saturation to the register widths. The factor 2^(NPLANE-k) is the
// weight of bit plane k in the output, i.e. the true gradient. Each
// coefficient register carries CFRAC fraction bits below the COEF_W bits the
// datapath uses, so that steps smaller than one coefficient LSB accumulate;
// the datapath takes the register rounded to the nearest integer (rd_* read
// that rounded value back).
// The step sizes and the guard bits are this design's choice; MU_SH = 16
// keeps the update stable for 32 taps (mu * sum of squared inputs ~ 0.7).
//
// Interface and timing. win/win_valid come from vpda_window; the symbol
// appears on out_* NPLANE clocks later with out_valid. out_res is the step
// (1..NPLANE) that decided it; out_full marks a symbol computed at full
// precision, for which out_re/out_im hold the soft value. force_full forces
// full precision on the symbol entering now. cfg_* write one coefficient or
// the offset (a write takes precedence over an update in the same clock);
// rd_* read one back. Coefficients reset to zero, like the published
// tracking experiment that starts from zero coefficients.
module vpda_subeq
  import vpda_pkg::*;
#(
  parameter int unsigned L         = 32,
  parameter int unsigned ADC_W     = NPLANE,
  parameter int unsigned COEF_W    = 8,
  parameter int unsigned CFRAC     = 8,
  parameter int unsigned MU_SH     = 16,
  parameter int unsigned MU_OFF_SH = 6,
  parameter int unsigned PW        = COEF_W + $clog2(NADC * L) + 1,
  parameter int unsigned AW        = PW + NPLANE + 1,
  parameter int unsigned EW        = AW + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration
  input  logic                      vp_en,
  input  logic [AW-1:0]             thr [NPLANE-1],
  // sample windows
  input  logic                      win_valid,
  input  logic [ADC_W-1:0]          win [NADC][L],
  input  logic                      force_full,
  // coefficient access
  input  logic                      cfg_we,
  input  logic                      cfg_off_we,
  input  logic [2:0]                cfg_plane,
  input  logic [1:0]                cfg_adc,
  input  logic [$clog2(L)-1:0]      cfg_tap,
  input  logic signed [COEF_W-1:0]  cfg_re,
  input  logic signed [COEF_W-1:0]  cfg_im,
  input  logic signed [PW+NPLANE-2:0] cfg_off_re,
  input  logic signed [PW+NPLANE-2:0] cfg_off_im,
  output logic signed [COEF_W-1:0]  rd_re,
  output logic signed [COEF_W-1:0]  rd_im,
  output logic signed [PW+NPLANE-2:0] rd_off_re,
  output logic signed [PW+NPLANE-2:0] rd_off_im,
  // adaptation
  input  logic                      upd_en,
  input  logic signed [EW-1:0]      upd_e_re,
  input  logic signed [EW-1:0]      upd_e_im,
  // recovered symbol
  output logic                      out_valid,
  output qpsk_dec_t                 out_dec,
  output logic [2:0]                out_res,
  output logic                      out_full,
  output logic signed [AW-1:0]      out_re,
  output logic signed [AW-1:0]      out_im
);

  localparam int unsigned OW = PW + NPLANE - 1;
  localparam int unsigned CW = COEF_W + CFRAC;   // coefficient register width

  // ---------------------------------------------------------------- state
  logic signed [CW-1:0]     c_re [NPLANE][NADC][L];     // with CFRAC guard bits
  logic signed [CW-1:0]     c_im [NPLANE][NADC][L];
  logic signed [COEF_W-1:0] q_re [NPLANE][NADC][L];     // COEF_W bits in use
  logic signed [COEF_W-1:0] q_im [NPLANE][NADC][L];
  logic signed [OW-1:0]     off_re, off_im;
  logic [ADC_W-1:0]         wp [NPLANE][NADC][L];   // window pipeline

  // pipeline step state, index k = step k+1
  logic                 st_valid  [NPLANE];
  logic                 st_active [NPLANE];
  logic                 st_force  [NPLANE];
  logic signed [AW-1:0] st_re     [NPLANE];
  logic signed [AW-1:0] st_im     [NPLANE];
  qpsk_dec_t            st_dec    [NPLANE];
  logic [2:0]           st_res    [NPLANE];

  // Coefficient used by the datapath: register rounded to the nearest
  // integer (half up), saturated at the positive end. Rounding rather than
  // truncating keeps a coefficient that the LMS has moved by a tiny negative
  // amount at 0 instead of -1; over hundreds of taps those -1s would add up.
  function automatic logic signed [COEF_W-1:0] qround(input logic signed [CW-1:0] c);
    logic signed [CW:0]     w;
    logic signed [COEF_W:0] r;
    w = {c[CW-1], c} + ((CFRAC > 0) ? ((CW+1)'(1) <<< (CFRAC - 1)) : '0);
    r = w[CW:CFRAC];
    if (!r[COEF_W] && r[COEF_W-1]) return {1'b0, {(COEF_W-1){1'b1}}};
    return r[COEF_W-1:0];
  endfunction

  always_comb begin
    for (int unsigned k = 0; k < NPLANE; k++)
      for (int unsigned a = 0; a < NADC; a++)
        for (int unsigned t = 0; t < L; t++) begin
          q_re[k][a][t] = qround(c_re[k][a][t]);
          q_im[k][a][t] = qround(c_im[k][a][t]);
        end
  end

  // ---------------------------------------------------------- window pipe
  always_ff @(posedge clk) begin
    wp[0] <= win;
    for (int unsigned k = 1; k < NPLANE; k++) wp[k] <= wp[k-1];
  end

  // --------------------------------------------------------- step chain
  for (genvar k = 0; k < NPLANE; k++) begin : g_step
    logic                 pb [NADC][L];
    logic                 en;
    logic signed [PW-1:0] p_re, p_im, e_re, e_im;
    logic                 i_valid, i_active, i_force;
    logic signed [AW-1:0] i_re, i_im;
    qpsk_dec_t            i_dec;
    logic [2:0]           i_res;
    logic [AW-1:0]        i_thr;

    always_comb begin
      for (int unsigned a = 0; a < NADC; a++)
        for (int unsigned t = 0; t < L; t++)
          pb[a][t] = (k == 0) ? win[a][t][ADC_W-1-k] : wp[(k == 0) ? 0 : k-1][a][t][ADC_W-1-k];
    end

    if (k == 0) begin : g_first
      assign i_valid  = win_valid;
      assign i_active = win_valid;
      assign i_force  = force_full;
      assign i_re     = '0;
      assign i_im     = '0;
      assign i_dec    = '0;
      assign i_res    = '0;
      assign e_re     = PW'(off_re >>> (NPLANE - 1));
      assign e_im     = PW'(off_im >>> (NPLANE - 1));
    end else begin : g_next
      assign i_valid  = st_valid[k-1];
      assign i_active = st_active[k-1];
      assign i_force  = st_force[k-1];
      assign i_re     = st_re[k-1];
      assign i_im     = st_im[k-1];
      assign i_dec    = st_dec[k-1];
      assign i_res    = st_res[k-1];
      assign e_re     = PW'({1'b0, off_re[NPLANE-1-k]});
      assign e_im     = PW'({1'b0, off_im[NPLANE-1-k]});
    end

    assign i_thr = (k < NPLANE - 1) ? thr[(k < NPLANE - 1) ? k : 0] : '0;
    assign en    = i_active;

    vpda_bitplane_mac #(.L(L), .COEF_W(COEF_W), .PW(PW)) u_mac (
      .en      (en),
      .bits    (pb),
      .coef_re (q_re[k]),
      .coef_im (q_im[k]),
      .p_re    (p_re),
      .p_im    (p_im)
    );

    vpda_vp_stage #(.STAGE(k + 1), .PW(PW), .AW(AW)) u_vp (
      .clk        (clk),
      .rst_n      (rst_n),
      .vp_en      (vp_en),
      .thr        (i_thr),
      .in_valid   (i_valid),
      .in_active  (i_active),
      .in_force   (i_force),
      .in_acc_re  (i_re),
      .in_acc_im  (i_im),
      .in_dec     (i_dec),
      .in_res     (i_res),
      .p_re       (p_re),
      .p_im       (p_im),
      .e_re       (e_re),
      .e_im       (e_im),
      .out_valid  (st_valid[k]),
      .out_active (st_active[k]),
      .out_force  (st_force[k]),
      .out_acc_re (st_re[k]),
      .out_acc_im (st_im[k]),
      .out_dec    (st_dec[k]),
      .out_res    (st_res[k])
    );
  end

  assign out_valid = st_valid[NPLANE-1];
  assign out_dec   = st_dec[NPLANE-1];
  assign out_res   = st_res[NPLANE-1];
  assign out_full  = st_valid[NPLANE-1] && (st_res[NPLANE-1] == 3'(NPLANE));
  assign out_re    = st_re[NPLANE-1];
  assign out_im    = st_im[NPLANE-1];

  // ------------------------------------------------------------- LMS
  function automatic logic signed [EW-1:0] rshr(input logic signed [EW-1:0] v,
                                                input int unsigned s);
    logic signed [EW:0] w;
    w = {v[EW-1], v};
    if (s > 0) w = w + ((EW+1)'(1) <<< (s - 1));
    return EW'(w >>> s);
  endfunction

  function automatic logic signed [CW-1:0] sat_c(input logic signed [EW+1:0] v);
    if (v > (EW+2)'((64'sd1 <<< (CW - 1)) - 1)) return {1'b0, {(CW-1){1'b1}}};
    if (v < -(EW+2)'(64'sd1 <<< (CW - 1)))      return {1'b1, {(CW-1){1'b0}}};
    return CW'(v);
  endfunction

  function automatic logic signed [OW-1:0] sat_o(input logic signed [EW+1:0] v);
    if (v > (EW+2)'((64'sd1 <<< (OW - 1)) - 1)) return {1'b0, {(OW-1){1'b1}}};
    if (v < -(EW+2)'(64'sd1 <<< (OW - 1)))      return {1'b1, {(OW-1){1'b0}}};
    return OW'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NPLANE; k++)
        for (int unsigned a = 0; a < NADC; a++)
          for (int unsigned t = 0; t < L; t++) begin
            c_re[k][a][t] <= '0;
            c_im[k][a][t] <= '0;
          end
    end else if (cfg_we) begin
      c_re[cfg_plane][cfg_adc][cfg_tap] <= {cfg_re, {CFRAC{1'b0}}};
      c_im[cfg_plane][cfg_adc][cfg_tap] <= {cfg_im, {CFRAC{1'b0}}};
    end else if (upd_en) begin
      for (int unsigned k = 0; k < NPLANE; k++) begin
        logic signed [EW-1:0] d_re, d_im;
        d_re = rshr(upd_e_re, MU_SH - CFRAC - (NPLANE - 1 - k));
        d_im = rshr(upd_e_im, MU_SH - CFRAC - (NPLANE - 1 - k));
        for (int unsigned a = 0; a < NADC; a++)
          for (int unsigned t = 0; t < L; t++) begin
            logic signed [EW+1:0] ur, ui;
            if (is_b_branch(a)) begin
              ur = (EW+2)'(d_im);      // -j*e = e_im - j e_re
              ui = -(EW+2)'(d_re);
            end else begin
              ur = (EW+2)'(d_re);
              ui = (EW+2)'(d_im);
            end
            if (!wp[NPLANE-1][a][t][ADC_W-1-k]) begin
              ur = -ur;
              ui = -ui;
            end
            c_re[k][a][t] <= sat_c((EW+2)'(c_re[k][a][t]) + ur);
            c_im[k][a][t] <= sat_c((EW+2)'(c_im[k][a][t]) + ui);
          end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_re <= '0;
      off_im <= '0;
    end else if (cfg_off_we) begin
      off_re <= cfg_off_re;
      off_im <= cfg_off_im;
    end else if (upd_en) begin
      off_re <= sat_o((EW+2)'(off_re) + (EW+2)'(rshr(upd_e_re, MU_OFF_SH)));
      off_im <= sat_o((EW+2)'(off_im) + (EW+2)'(rshr(upd_e_im, MU_OFF_SH)));
    end
  end

  assign rd_re     = q_re[cfg_plane][cfg_adc][cfg_tap];
  assign rd_im     = q_im[cfg_plane][cfg_adc][cfg_tap];

  initial begin
    assert (MU_SH >= CFRAC + NPLANE)
      else $error("vpda_subeq: MU_SH must be at least CFRAC + NPLANE");
  end
  assign rd_off_re = off_re;
  assign rd_off_im = off_im;

endmodule
