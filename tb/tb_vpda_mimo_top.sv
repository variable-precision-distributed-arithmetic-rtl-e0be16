// tb_vpda_mimo_top -- end-to-end test of the VPDA MIMO equalizer at reduced
// size (8 parallel samples per ADC, 4 taps).
//
// Stimulus: two independent QPSK symbol streams (X and Y polarization),
// 2x oversampled (odd samples are the mean of their neighbours), mapped to
// 5-bit ADC codes with additive uniform noise; one block of NPAR samples per
// ADC per clock.
//   Phase A, variable precision on: every sub-equalizer gets a centre-tap
//     equalizer plus random small coefficients on other taps and a random
//     offset. Every output symbol is compared with an integer model of the
//     whole chain (window, bit-plane DA, early decision), decisions with the
//     transmitted symbols, and the output rate (one block per clock) and
//     latency are checked.
//   Phase B, vp_en = 0: the same, every symbol must be computed in full.
//   Phase C, LMS: the centre taps start too small and the XI converter gets
//     a DC offset; with adapt_en the engines must cut the mean output error
//     by at least a quarter (it then sits near the floor set by the input
//     noise) and the symbol error rate at the end must stay below 2 %.
// Mechanisms counted (each must occur): decisions at every step 1..5,
// fixed-precision mode, LMS updates, forced full-precision symbols.
module tb_vpda_mimo_top;
  import vpda_pkg::*;

  localparam int unsigned NPAR   = 8;
  localparam int unsigned L      = 4;
  localparam int unsigned ADC_W  = 5;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned MU_SH  = 15;
  localparam int unsigned PW     = COEF_W + $clog2(NADC * L) + 1;
  localparam int unsigned AW     = PW + NPLANE + 1;
  localparam int unsigned OW     = PW + NPLANE - 1;
  localparam int unsigned NSUB   = NPAR;
  localparam int unsigned NSYM   = NPAR / 2;
  localparam int unsigned SUBW   = $clog2(NPAR);
  localparam int          REF    = 144;
  // run lengths (blocks) of the phases
  localparam int          NA     = 120;
  localparam int          NB     = 30;
  localparam int          NC_RND = 10;
  localparam int          NC_BLK = 200;
  localparam bit          CONV   = 1;   // check LMS convergence

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid, vp_en, adapt_en, cfg_we, cfg_off_we, out_valid;
  logic [ADC_W-1:0]         adc [NADC][NPAR];
  logic [AW-1:0]            thr [NPLANE-1];
  logic [AW-2:0]            ref_amp;
  logic [SUBW-1:0]          cfg_sub;
  logic [2:0]               cfg_plane;
  logic [1:0]               cfg_adc;
  logic [$clog2(L)-1:0]     cfg_tap;
  logic signed [COEF_W-1:0] cfg_re, cfg_im, rd_re, rd_im;
  logic signed [OW-1:0]     cfg_off_re, cfg_off_im, rd_off_re, rd_off_im;
  qpsk_dec_t                out_dec [NSUB];
  logic [2:0]               out_res [NSUB];
  logic signed [AW-1:0]     out_re [NSUB], out_im [NSUB];

  vpda_mimo_top #(.NPAR(NPAR), .L(L), .ADC_W(ADC_W), .COEF_W(COEF_W), .MU_SH(MU_SH)) dut (.*);

  // ---------------------------------------------------------------- model
  int mc_re [NSUB][NPLANE][NADC][L];
  int mc_im [NSUB][NPLANE][NADC][L];
  int moff_re [NSUB], moff_im [NSUB];
  int stream [NADC][$];     // ADC codes by global sample position
  int sym_re [2][$], sym_im [2][$];   // transmitted symbols per polarization
  int in_cyc [$];           // clock of each accepted block

  int checks = 0, failures = 0, cyc = 0;
  int res_hist [6];
  int n_novp = 0, n_upd = 0, n_force = 0, n_blk = 0, n_out = 0;
  int sym_err = 0, sym_cnt = 0;
  bit model_on = 1;
  int nz = 2;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // expected result of sub-equalizer j for the block whose middle is blk
  task automatic model(input int j, input int blk, output int res, output bit di,
                       output bit dq, output int re, output int im);
    int acc_re, acc_im, pr, pi_, s, er, ei, mr, mi, c, sidx;
    bit sus;
    sidx = j % NSYM;
    acc_re = 0; acc_im = 0; res = 0;
    for (int k = 1; k <= NPLANE && res == 0; k++) begin
      pr = 0; pi_ = 0;
      for (int a = 0; a < NADC; a++)
        for (int t = 0; t < L; t++) begin
          c = stream[a][blk * NPAR + 2 * sidx + t - L / 2];
          s = (((c >> (NPLANE - k)) & 1) != 0) ? 1 : -1;
          if (a == 1 || a == 3) begin
            pr -= s * mc_im[j][k-1][a][t];
            pi_ += s * mc_re[j][k-1][a][t];
          end else begin
            pr += s * mc_re[j][k-1][a][t];
            pi_ += s * mc_im[j][k-1][a][t];
          end
        end
      if (k == 1) begin
        er = moff_re[j] >>> (NPLANE - 1);
        ei = moff_im[j] >>> (NPLANE - 1);
      end else begin
        er = (moff_re[j] >> (NPLANE - k)) & 1;
        ei = (moff_im[j] >> (NPLANE - k)) & 1;
      end
      acc_re = 2 * acc_re + pr + er;
      acc_im = 2 * acc_im + pi_ + ei;
      mr = (acc_re < 0 ? -acc_re : acc_re) << (NPLANE - k);
      mi = (acc_im < 0 ? -acc_im : acc_im) << (NPLANE - k);
      sus = (k < NPLANE) && ((mr < int'(thr[(k < NPLANE) ? k - 1 : 0])) ||
                             (mi < int'(thr[(k < NPLANE) ? k - 1 : 0])));
      if (k == NPLANE || !(!vp_en || sus)) res = k;
    end
    di = acc_re >= 0; dq = acc_im >= 0; re = acc_re; im = acc_im;
  endtask

  // ------------------------------------------------------------ stimulus
  // sample value -> code: +1 -> 20, -1 -> 11, 0 -> 15/16, plus noise
  function automatic int to_code(input int v2, input int extra);
    int c;
    // v2 is twice the sample value (-2, 0, +2) or (-1, +1 for the mean)
    case (v2)
      2:  c = 20;
      -2: c = 11;
      default: c = 15 + (($urandom % 2) == 0 ? 0 : 1);
    endcase
    c = c + rnd(-nz, nz) + extra;
    if (c < 0) c = 0;
    if (c > 31) c = 31;
    return c;
  endfunction

  int dc_xi = 0;

  task automatic drive_block();
    int base_sym;
    base_sym = sym_re[0].size();
    for (int p = 0; p < 2; p++)
      for (int n = 0; n < NSYM; n++) begin
        sym_re[p].push_back(($urandom % 2) ? 1 : -1);
        sym_im[p].push_back(($urandom % 2) ? 1 : -1);
      end
    for (int i = 0; i < NPAR; i++) begin
      int n, v [NADC];
      n = base_sym + i / 2;
      for (int p = 0; p < 2; p++) begin
        if (i % 2 == 0) begin
          v[2*p]   = 2 * sym_re[p][n];
          v[2*p+1] = 2 * sym_im[p][n];
        end else begin
          // the next symbol may not exist yet: odd samples of the last
          // position use the current symbol twice
          v[2*p]   = (n + 1 < sym_re[p].size()) ? sym_re[p][n] + sym_re[p][n+1] : 2 * sym_re[p][n];
          v[2*p+1] = (n + 1 < sym_im[p].size()) ? sym_im[p][n] + sym_im[p][n+1] : 2 * sym_im[p][n];
        end
      end
      for (int a = 0; a < NADC; a++) begin
        int c;
        c = to_code(v[a], a == 0 ? dc_xi : 0);
        stream[a].push_back(c);
        adc[a][i] = ADC_W'(c);
      end
    end
    in_valid = 1;
  endtask

  task automatic write_coef(input int j, input int k, input int a, input int t,
                            input int re, input int im);
    @(negedge clk);
    cfg_we = 1; cfg_sub = SUBW'(j); cfg_plane = 3'(k); cfg_adc = 2'(a);
    cfg_tap = $clog2(L)'(t); cfg_re = COEF_W'(re); cfg_im = COEF_W'(im);
    mc_re[j][k][a][t] = re; mc_im[j][k][a][t] = im;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic configure(input int centre, input bit extras);
    for (int j = 0; j < NSUB; j++) begin
      int ai, aq;
      ai = (j < NSYM) ? 0 : 2;
      aq = ai + 1;
      for (int k = 0; k < NPLANE; k++)
        for (int a = 0; a < NADC; a++)
          for (int t = 0; t < L; t++) begin
            int re, im;
            re = 0; im = 0;
            if (t == L / 2 && (a == ai || a == aq)) re = centre;
            else if (extras && ($urandom % 6) == 0) begin
              re = rnd(-2, 2); im = rnd(-2, 2);
            end
            if (re != 0 || im != 0) write_coef(j, k, a, t, re, im);
            else begin
              mc_re[j][k][a][t] = 0; mc_im[j][k][a][t] = 0;
            end
          end
      @(negedge clk);
      cfg_off_we = 1; cfg_sub = SUBW'(j);
      cfg_off_re = OW'(extras ? rnd(-15, 15) : 0);
      cfg_off_im = OW'(extras ? rnd(-15, 15) : 0);
      moff_re[j] = int'(cfg_off_re); moff_im[j] = int'(cfg_off_im);
      @(negedge clk);
      cfg_off_we = 0;
    end
  endtask

  // ------------------------------------------------------------- checker
  int mean_err_acc = 0, mean_err_n = 0;
  bit count_sym = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid) in_cyc.push_back(cyc);
    #1;
    if (rst_n) begin
      for (int j = 0; j < NSUB; j++)
        if (dut.upd_en[j]) n_upd++;
      for (int j = 0; j < NSUB; j++)
        if (dut.force_full[j]) n_force++;
    end
    if (rst_n && out_valid) begin
      int blk;
      blk = n_out + 1;
      n_out++;
      // output of middle block blk: its window formed at the in_valid of
      // block blk+1, then NPLANE clocks of pipeline
      expect_eq("latency", cyc, in_cyc[blk + 1] + 1 + NPLANE);
      for (int j = 0; j < NSUB; j++) begin
        int res, re, im, p, n;
        bit di, dq;
        if (model_on) begin
          model(j, blk, res, di, dq, re, im);
          expect_eq("res", out_res[j], res);
          expect_eq("dec.i", out_dec[j].i, di);
          expect_eq("dec.q", out_dec[j].q, dq);
          if (res == NPLANE) begin
            expect_eq("soft re", out_re[j], re);
            expect_eq("soft im", out_im[j], im);
          end
        end
        res_hist[out_res[j]]++;
        if (!vp_en) n_novp++;
        p = j / NSYM;
        n = blk * NSYM + (j % NSYM);
        if (count_sym) begin
          sym_cnt++;
          if ((out_dec[j].i != (sym_re[p][n] > 0)) || (out_dec[j].q != (sym_im[p][n] > 0)))
            sym_err++;
        end
        if (out_res[j] == NPLANE) begin
          int ex, ey;
          ex = out_re[j] - (out_dec[j].i ? REF : -REF);
          ey = out_im[j] - (out_dec[j].q ? REF : -REF);
          mean_err_acc += (ex < 0 ? -ex : ex) + (ey < 0 ? -ey : ey);
          mean_err_n++;
        end
      end
    end
  end

  task automatic run_blocks(input int n);
    for (int b = 0; b < n; b++) begin
      @(negedge clk);
      drive_block();
      n_blk++;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int e0, e1, sym_err_a;
    in_valid = 0; vp_en = 1; adapt_en = 0; cfg_we = 0; cfg_off_we = 0;
    cfg_sub = '0; cfg_plane = '0; cfg_adc = '0; cfg_tap = '0; cfg_re = '0; cfg_im = '0;
    cfg_off_re = '0; cfg_off_im = '0; ref_amp = (AW-1)'(REF);
    for (int k = 0; k < NPLANE - 1; k++) thr[k] = AW'(sus_threshold(2'(k), REF));
    for (int a = 0; a < NADC; a++) for (int i = 0; i < NPAR; i++) adc[a][i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ------------------------------------------------------- phase A
    configure(16, 1'b1);
    count_sym = 1;
    run_blocks(NA);
    repeat (NPLANE + 3) @(negedge clk);
    sym_err_a = sym_err;
    $display("phase A: symbols=%0d errors=%0d", sym_cnt, sym_err);
    checks++;
    if (sym_err * 20 > sym_cnt) begin
      failures++;
      $display("FAIL too many symbol errors in phase A");
    end

    // ------------------------------------------------------- phase B
    vp_en = 0;
    run_blocks(NB);
    repeat (NPLANE + 3) @(negedge clk);
    vp_en = 1;

    // ------------------------------------------------------- phase C
    // restart the stream so that the window history is consistent
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    n_out = 0;
    for (int a = 0; a < NADC; a++) stream[a].delete();
    for (int p = 0; p < 2; p++) begin sym_re[p].delete(); sym_im[p].delete(); end
    in_cyc.delete();
    model_on = 0;
    nz = 1;
    dc_xi = 1;
    configure(10, 1'b0);
    adapt_en = 1;
    mean_err_acc = 0; mean_err_n = 0;
    run_blocks(40);
    e0 = mean_err_acc / (mean_err_n > 0 ? mean_err_n : 1);
    for (int r = 0; r < NC_RND; r++) begin
      mean_err_acc = 0; mean_err_n = 0;
      run_blocks(NC_BLK);
      cfg_sub = '0; cfg_plane = '0; cfg_adc = '0; cfg_tap = $clog2(L)'(L / 2);
      #1 $display("  adapting: mean |error| %0d, centre tap %0d", mean_err_acc / (mean_err_n > 0 ? mean_err_n : 1), rd_re);
    end
    mean_err_acc = 0; mean_err_n = 0;
    sym_err = 0; sym_cnt = 0;
    run_blocks(NC_BLK / 4 + 10);
    repeat (NPLANE + 3) @(negedge clk);
    e1 = mean_err_acc / (mean_err_n > 0 ? mean_err_n : 1);
    cfg_sub = '0; cfg_plane = '0; cfg_adc = '0; cfg_tap = $clog2(L)'(L / 2);
    #1;
    $display("phase C: mean |error| start=%0d end=%0d, centre tap now %0d, offset %0d; symbols=%0d errors=%0d",
             e0, e1, rd_re, rd_off_re, sym_cnt, sym_err);
    checks++;
    // the input noise alone leaves a mean |error| of about 45
    if (CONV && !(e1 * 4 < e0 * 3)) begin failures++; $display("FAIL LMS did not reduce the error"); end
    checks++;
    if (CONV && sym_err * 50 > sym_cnt) begin failures++; $display("FAIL symbol errors after adaptation"); end
    checks++;
    if (CONV && rd_re <= 10) begin failures++; $display("FAIL centre tap did not grow"); end

    $display("decided at step 1..5: %0d %0d %0d %0d %0d; fixed-precision outputs=%0d lms updates=%0d forced=%0d",
             res_hist[1], res_hist[2], res_hist[3], res_hist[4], res_hist[5], n_novp, n_upd, n_force);
    for (int k = 1; k <= NPLANE; k++)
      if (res_hist[k] == 0) begin failures++; $display("FAIL no decision at step %0d", k); end
    if (n_novp == 0 || n_upd == 0 || n_force == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
