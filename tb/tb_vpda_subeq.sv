// tb_vpda_subeq -- self-checking test of one VPDA sub-equalizer.
//
// Phase 1 (static coefficients): random coefficients and offset are written
// through the configuration port, then random 5-bit sample windows are
// streamed, with random gaps, random thresholds, random force_full and vp_en
// phases. An integer model evaluates the bit planes MSB first exactly as
// the variable-precision scheme prescribes (acc = 2*acc + P_k + E_k, early
// decision outside the suspicious cross) and predicts decision, deciding
// step and, for full-precision symbols, the soft value. Each output must
// appear exactly NPLANE clocks after its window.
// Phase 2 (LMS): single forced symbols are sent through; when each reaches
// the output a random error is applied with upd_en and every coefficient and
// the offset are read back and compared with the model's LMS step.
// Every deciding step 1..5 must have occurred.
module tb_vpda_subeq;
  import vpda_pkg::*;

  localparam int unsigned L         = 4;
  localparam int unsigned ADC_W     = 5;
  localparam int unsigned COEF_W    = 8;
  localparam int unsigned CFRAC     = 2;
  localparam int unsigned MU_SH     = 8;
  localparam int unsigned MU_OFF_SH = 3;
  localparam int unsigned PW        = COEF_W + $clog2(NADC * L) + 1;
  localparam int unsigned AW        = PW + NPLANE + 1;
  localparam int unsigned EW        = AW + 1;
  localparam int unsigned OW        = PW + NPLANE - 1;
  localparam int          CMAX      = (1 << (COEF_W + CFRAC - 1)) - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     vp_en;
  logic [AW-1:0]            thr [NPLANE-1];
  logic                     win_valid, force_full;
  logic [ADC_W-1:0]         win [NADC][L];
  logic                     cfg_we, cfg_off_we;
  logic [2:0]               cfg_plane;
  logic [1:0]               cfg_adc;
  logic [$clog2(L)-1:0]     cfg_tap;
  logic signed [COEF_W-1:0] cfg_re, cfg_im, rd_re, rd_im;
  logic signed [OW-1:0]     cfg_off_re, cfg_off_im, rd_off_re, rd_off_im;
  logic                     upd_en;
  logic signed [EW-1:0]     upd_e_re, upd_e_im;
  logic                     out_valid, out_full;
  qpsk_dec_t                out_dec;
  logic [2:0]               out_res;
  logic signed [AW-1:0]     out_re, out_im;

  vpda_subeq #(.L(L), .ADC_W(ADC_W), .COEF_W(COEF_W), .CFRAC(CFRAC), .MU_SH(MU_SH),
              .MU_OFF_SH(MU_OFF_SH))
    dut (.*);

  // ---------------------------------------------------------------- model
  int mc_re [NPLANE][NADC][L];
  int mc_im [NPLANE][NADC][L];
  int moff_re, moff_im;

  typedef struct {
    int  re, im, res;
    bit  di, dq;
    int  due;
    int  code [NADC][L];
  } exp_t;
  exp_t q [$];

  int checks = 0, failures = 0, cyc = 0;
  int res_hist [6];
  int n_force = 0, n_novp = 0, n_upd = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  function automatic exp_t model(input int code [NADC][L], input bit force_i, input bit vp);
    exp_t e;
    int acc_re, acc_im, pr, pi_, s, er, ei, mr, mi, sh;
    bit sus;
    acc_re = 0; acc_im = 0;
    e.res = 0;
    for (int k = 1; k <= NPLANE && e.res == 0; k++) begin
      pr = 0; pi_ = 0;
      for (int a = 0; a < NADC; a++)
        for (int t = 0; t < L; t++) begin
          s = (((code[a][t] >> (NPLANE - k)) & 1) != 0) ? 1 : -1;
          if (a == 1 || a == 3) begin
            pr -= s * qr(mc_im[k-1][a][t]);
            pi_ += s * qr(mc_re[k-1][a][t]);
          end else begin
            pr += s * qr(mc_re[k-1][a][t]);
            pi_ += s * qr(mc_im[k-1][a][t]);
          end
        end
      if (k == 1) begin
        er = moff_re >>> (NPLANE - 1);
        ei = moff_im >>> (NPLANE - 1);
      end else begin
        er = (moff_re >> (NPLANE - k)) & 1;
        ei = (moff_im >> (NPLANE - k)) & 1;
      end
      acc_re = 2 * acc_re + pr + er;
      acc_im = 2 * acc_im + pi_ + ei;
      sh = NPLANE - k;
      mr = (acc_re < 0 ? -acc_re : acc_re) << sh;
      mi = (acc_im < 0 ? -acc_im : acc_im) << sh;
      sus = (k < NPLANE) && ((mr < int'(thr[(k < NPLANE) ? k - 1 : 0])) ||
                             (mi < int'(thr[(k < NPLANE) ? k - 1 : 0])));
      if (k == NPLANE || !(!vp || force_i || sus)) begin
        e.res = k;
        e.di  = acc_re >= 0;
        e.dq  = acc_im >= 0;
      end
    end
    e.re = acc_re;
    e.im = acc_im;
    e.code = code;
    return e;
  endfunction

  // datapath value of a coefficient register: rounded half up, saturated
  function automatic int qr(input int c);
    int r;
    r = (c + (CFRAC > 0 ? (1 << (CFRAC - 1)) : 0)) >>> CFRAC;
    return (r > (1 << (COEF_W - 1)) - 1) ? (1 << (COEF_W - 1)) - 1 : r;
  endfunction

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  task automatic write_coef(input int k, input int a, input int t, input int re, input int im);
    @(negedge clk);
    cfg_we = 1; cfg_plane = 3'(k); cfg_adc = 2'(a); cfg_tap = $clog2(L)'(t);
    cfg_re = COEF_W'(re); cfg_im = COEF_W'(im);
    mc_re[k][a][t] = re << CFRAC; mc_im[k][a][t] = im << CFRAC;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // output checker
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected output at cycle %0d", cyc);
      end else begin
        e = q.pop_front();
        expect_eq("latency", cyc, e.due);
        expect_eq("res", out_res, e.res);
        expect_eq("dec.i", out_dec.i, e.di);
        expect_eq("dec.q", out_dec.q, e.dq);
        expect_eq("full", out_full, e.res == NPLANE);
        if (e.res == NPLANE) begin
          expect_eq("soft re", out_re, e.re);
          expect_eq("soft im", out_im, e.im);
        end
        res_hist[e.res]++;
      end
    end
  end

  int code [NADC][L];

  task automatic send(input bit f, input bit vp);
    exp_t e;
    @(negedge clk);
    for (int a = 0; a < NADC; a++)
      for (int t = 0; t < L; t++) begin
        code[a][t] = rnd(0, 31);
        win[a][t]  = ADC_W'(code[a][t]);
      end
    vp_en = vp; force_full = f; win_valid = 1;
    e = model(code, f, vp);
    e.due = cyc + NPLANE;
    q.push_back(e);
    if (f) n_force++;
    if (!vp) n_novp++;
    @(negedge clk);
    win_valid = 0; force_full = 0;
  endtask

  initial begin
    vp_en = 1; win_valid = 0; force_full = 0; cfg_we = 0; cfg_off_we = 0;
    cfg_plane = '0; cfg_adc = '0; cfg_tap = '0; cfg_re = '0; cfg_im = '0;
    cfg_off_re = '0; cfg_off_im = '0; upd_en = 0; upd_e_re = '0; upd_e_im = '0;
    for (int a = 0; a < NADC; a++) for (int t = 0; t < L; t++) win[a][t] = '0;
    for (int k = 0; k < NPLANE - 1; k++) thr[k] = '0;
    for (int k = 0; k < NPLANE; k++)
      for (int a = 0; a < NADC; a++)
        for (int t = 0; t < L; t++) begin
          mc_re[k][a][t] = 0; mc_im[k][a][t] = 0;
        end
    moff_re = 0; moff_im = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // reset clears the coefficients
    for (int k = 0; k < NPLANE; k++) begin
      @(negedge clk);
      cfg_plane = 3'(k); cfg_adc = 2'(k % 4); cfg_tap = '0;
      #1 expect_eq("reset coef", rd_re, 0);
    end

    // ------------------------------------------------------ phase 1
    for (int round = 0; round < 6; round++) begin
      for (int k = 0; k < NPLANE; k++)
        for (int a = 0; a < NADC; a++)
          for (int t = 0; t < L; t++)
            write_coef(k, a, t, rnd(-60, 60), rnd(-60, 60));
      @(negedge clk);
      cfg_off_we = 1; cfg_off_re = OW'(rnd(-300, 300)); cfg_off_im = OW'(rnd(-300, 300));
      moff_re = int'(cfg_off_re); moff_im = int'(cfg_off_im);
      @(negedge clk);
      cfg_off_we = 0;
      for (int k = 0; k < NPLANE - 1; k++) thr[k] = AW'(rnd(0, 9000 >> k));
      for (int n = 0; n < 300; n++) begin
        // back-to-back with occasional gaps
        bit f, vp;
        f  = ($urandom % 8) == 0;
        vp = round != 2;
        fork
          begin
            exp_t e;
            for (int a = 0; a < NADC; a++)
              for (int t = 0; t < L; t++) begin
                code[a][t] = rnd(0, 31);
                win[a][t]  = ADC_W'(code[a][t]);
              end
            vp_en = vp; force_full = f; win_valid = 1;
            e = model(code, f, vp);
            e.due = cyc + NPLANE;
            q.push_back(e);
            if (f) n_force++;
            if (!vp) n_novp++;
          end
        join
        @(negedge clk);
        win_valid = 0; force_full = 0;
        if (($urandom % 5) == 0) @(negedge clk);
        else begin end
      end
      repeat (NPLANE + 2) @(negedge clk);
    end

    // ------------------------------------------------------ phase 2: LMS
    for (int n = 0; n < 20; n++) begin
      int er, ei, d_re, d_im, sgn, ur, ui, sft;
      int wcode [NADC][L];
      send(1'b1, 1'b1);
      wcode = code;
      // wait until the symbol is at the output
      repeat (NPLANE - 1) @(negedge clk);
      if (!out_valid || !out_full) begin
        checks++; failures++;
        $display("FAIL forced symbol not at full precision at output");
      end
      er = rnd(-3000, 3000); ei = rnd(-3000, 3000);
      upd_en = 1; upd_e_re = EW'(er); upd_e_im = EW'(ei);
      @(negedge clk);
      upd_en = 0;
      n_upd++;
      for (int k = 0; k < NPLANE; k++) begin
        sft  = MU_SH - CFRAC - (NPLANE - 1 - k);
        d_re = (er + (1 << (sft - 1))) >>> sft;
        d_im = (ei + (1 << (sft - 1))) >>> sft;
        for (int a = 0; a < NADC; a++)
          for (int t = 0; t < L; t++) begin
            sgn = (((wcode[a][t] >> (NPLANE - 1 - k)) & 1) != 0) ? 1 : -1;
            if (a == 1 || a == 3) begin ur = d_im; ui = -d_re; end
            else begin ur = d_re; ui = d_im; end
            mc_re[k][a][t] = mc_re[k][a][t] + sgn * ur;
            mc_im[k][a][t] = mc_im[k][a][t] + sgn * ui;
            if (mc_re[k][a][t] > CMAX) mc_re[k][a][t] = CMAX;
            if (mc_re[k][a][t] < -CMAX - 1) mc_re[k][a][t] = -CMAX - 1;
            if (mc_im[k][a][t] > CMAX) mc_im[k][a][t] = CMAX;
            if (mc_im[k][a][t] < -CMAX - 1) mc_im[k][a][t] = -CMAX - 1;
            cfg_plane = 3'(k); cfg_adc = 2'(a); cfg_tap = $clog2(L)'(t);
            #1;
            expect_eq("lms re", rd_re, qr(mc_re[k][a][t]));
            expect_eq("lms im", rd_im, qr(mc_im[k][a][t]));
          end
      end
      moff_re += (er + (1 << (MU_OFF_SH - 1))) >>> MU_OFF_SH;
      moff_im += (ei + (1 << (MU_OFF_SH - 1))) >>> MU_OFF_SH;
      expect_eq("lms off re", rd_off_re, moff_re);
      expect_eq("lms off im", rd_off_im, moff_im);
    end
    // the updated coefficients are in use
    for (int n = 0; n < 30; n++) send(1'b0, 1'b1);
    repeat (NPLANE + 3) @(negedge clk);

    expect_eq("all outputs seen", q.size(), 0);
    $display("decided at step 1..5: %0d %0d %0d %0d %0d; forced=%0d no-vp=%0d lms=%0d",
             res_hist[1], res_hist[2], res_hist[3], res_hist[4], res_hist[5],
             n_force, n_novp, n_upd);
    for (int k = 1; k <= NPLANE; k++)
      if (res_hist[k] == 0) begin
        failures++;
        $display("FAIL no symbol decided at step %0d", k);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
