// tb_vpda_lms -- self-checking test of the LMS adaptation engine.
//
// Emulates NSUB sub-equalizers whose outputs carry random soft values,
// decisions and full-precision flags. Checks that force_full walks through
// the sub-equalizers round robin, advancing every DWELL clocks while
// adapt_en is high; that upd_en is raised LAT clocks later for the same
// sub-equalizer, and only if its output is at full precision; and that the
// broadcast error equals ref_amp*(+/-1 +/- j) minus the soft value.
module tb_vpda_lms;
  import vpda_pkg::*;

  localparam int unsigned NSUB  = 5;
  localparam int unsigned AW    = 14;
  localparam int unsigned EW    = AW + 1;
  localparam int unsigned LAT   = 5;
  localparam int unsigned DWELL = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 adapt_en;
  logic [AW-2:0]        ref_amp;
  logic                 in_full [NSUB];
  qpsk_dec_t            in_dec  [NSUB];
  logic signed [AW-1:0] in_re [NSUB], in_im [NSUB];
  logic                 force_full [NSUB], upd_en [NSUB];
  logic signed [EW-1:0] e_re, e_im;

  vpda_lms #(.NSUB(NSUB), .AW(AW), .LAT(LAT), .DWELL(DWELL)) dut (.*);

  int checks = 0, failures = 0, n_upd = 0, n_skip = 0;
  int forced_hist [$];
  bit en_hist [$];

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int exp_sel, cnt, nf, fsel, osel;
    adapt_en = 0; ref_amp = 13'd1000;
    for (int j = 0; j < NSUB; j++) begin
      in_full[j] = 0; in_dec[j] = '0; in_re[j] = '0; in_im[j] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_sel = 0; cnt = 0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      adapt_en = !(it >= 150 && it < 170);
      for (int j = 0; j < NSUB; j++) begin
        in_full[j] = ($urandom % 4) != 0;
        in_dec[j]  = qpsk_dec_t'($urandom);
        in_re[j]   = AW'(int'($urandom % 4001) - 2000);
        in_im[j]   = AW'(int'($urandom % 4001) - 2000);
      end
      #1;
      // force_full: one-hot at the expected sub-equalizer while enabled
      nf = 0; fsel = -1;
      for (int j = 0; j < NSUB; j++) if (force_full[j]) begin nf++; fsel = j; end
      expect_eq("force count", nf, adapt_en ? 1 : 0);
      if (adapt_en) expect_eq("force sel", fsel, exp_sel);
      forced_hist.push_back(exp_sel);
      en_hist.push_back(adapt_en);
      // upd_en: the sub-equalizer forced LAT clocks ago
      if (forced_hist.size() > LAT) begin
        osel = forced_hist.pop_front();
        nf = 0;
        for (int j = 0; j < NSUB; j++) if (upd_en[j]) nf++;
        if (en_hist.pop_front() && adapt_en) begin
          expect_eq("upd count", nf, in_full[osel] ? 1 : 0);
          if (in_full[osel]) begin
            expect_eq("upd sel", upd_en[osel], 1);
            n_upd++;
          end else n_skip++;
          expect_eq("e_re", e_re, (in_dec[osel].i ? 1000 : -1000) - int'(in_re[osel]));
          expect_eq("e_im", e_im, (in_dec[osel].q ? 1000 : -1000) - int'(in_im[osel]));
        end else begin
          expect_eq("upd idle", nf, 0);
        end
      end
      @(posedge clk);
      if (adapt_en) begin
        cnt++;
        if (cnt == DWELL) begin
          cnt = 0;
          exp_sel = (exp_sel + 1) % NSUB;
        end
      end
    end
    $display("updates=%0d skipped(not full)=%0d", n_upd, n_skip);
    if (n_upd == 0 || n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
