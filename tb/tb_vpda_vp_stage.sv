// tb_vpda_vp_stage -- self-checking test of one variable-precision step.
//
// Two instances: step 2 (range check active) and step 5 (always decides).
// Random previous-step states, partial products, offsets and thresholds are
// applied every clock; an integer model predicts the registered outputs one
// clock later: acc = 2*acc_in + P + E, the full-resolution magnitude test
// against thr (suspicious if either component is inside), early decision by
// sign, pass-through of symbols already decided, and the vp_en / force
// overrides. Counts how often each outcome (continue, decide, pass) was seen
// and fails if one never occurred.
module tb_vpda_vp_stage;
  import vpda_pkg::*;

  localparam int unsigned PW = 12;
  localparam int unsigned AW = 18;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 vp_en;
  logic [AW-1:0]        thr;
  logic                 in_valid, in_active, in_force;
  logic signed [AW-1:0] in_acc_re, in_acc_im;
  qpsk_dec_t            in_dec;
  logic [2:0]           in_res;
  logic signed [PW-1:0] p_re, p_im, e_re, e_im;

  logic                 o_valid [2], o_active [2], o_force [2];
  logic signed [AW-1:0] o_re [2], o_im [2];
  qpsk_dec_t            o_dec [2];
  logic [2:0]           o_res [2];

  vpda_vp_stage #(.STAGE(2), .PW(PW), .AW(AW)) dut2 (
    .clk, .rst_n, .vp_en, .thr, .in_valid, .in_active, .in_force, .in_acc_re, .in_acc_im,
    .in_dec, .in_res, .p_re, .p_im, .e_re, .e_im,
    .out_valid(o_valid[0]), .out_active(o_active[0]), .out_force(o_force[0]),
    .out_acc_re(o_re[0]), .out_acc_im(o_im[0]), .out_dec(o_dec[0]), .out_res(o_res[0]));

  vpda_vp_stage #(.STAGE(5), .PW(PW), .AW(AW)) dut5 (
    .clk, .rst_n, .vp_en, .thr, .in_valid, .in_active, .in_force, .in_acc_re, .in_acc_im,
    .in_dec, .in_res, .p_re, .p_im, .e_re, .e_im,
    .out_valid(o_valid[1]), .out_active(o_active[1]), .out_force(o_force[1]),
    .out_acc_re(o_re[1]), .out_acc_im(o_im[1]), .out_dec(o_dec[1]), .out_res(o_res[1]));

  int checks = 0, failures = 0;
  int n_cont = 0, n_decide = 0, n_pass = 0, n_decide5 = 0;

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int st [2];
    longint sr, si, mr, mi;
    bit sus, cont, dec_now;
    st = '{2, 5};
    vp_en = 1; thr = '0; in_valid = 0; in_active = 0; in_force = 0;
    in_acc_re = '0; in_acc_im = '0; in_dec = '0; in_res = '0;
    p_re = '0; p_im = '0; e_re = '0; e_im = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      vp_en     = ($urandom % 8) != 0;
      in_force  = ($urandom % 10) == 0;
      in_valid  = ($urandom % 6) != 0;
      in_active = ($urandom % 4) != 0;
      in_acc_re = AW'(int'($urandom % 2001) - 1000);
      in_acc_im = AW'(int'($urandom % 2001) - 1000);
      p_re      = PW'(int'($urandom % 801) - 400);
      p_im      = PW'(int'($urandom % 801) - 400);
      e_re      = PW'(int'($urandom % 5) - 2);
      e_im      = PW'(int'($urandom % 5) - 2);
      in_dec    = qpsk_dec_t'($urandom);
      in_res    = 3'($urandom % 2 + 1);
      thr       = AW'($urandom % 20000);
      @(posedge clk);
      #1;
      for (int d = 0; d < 2; d++) begin
        sr = 2 * longint'(in_acc_re) + p_re + e_re;
        si = 2 * longint'(in_acc_im) + p_im + e_im;
        mr = (sr < 0 ? -sr : sr) * (1 << (NPLANE - st[d]));
        mi = (si < 0 ? -si : si) * (1 << (NPLANE - st[d]));
        sus  = (mr < thr) || (mi < thr);
        cont = (st[d] < NPLANE) && (!vp_en || in_force || sus);
        dec_now = in_active && !cont;
        expect_eq("valid", o_valid[d], in_valid);
        expect_eq("active", o_active[d], in_valid && in_active && cont);
        expect_eq("force", o_force[d], in_valid && in_force);
        if (in_valid) begin
          if (in_active) begin
            expect_eq("acc_re", o_re[d], sr);
            expect_eq("acc_im", o_im[d], si);
          end
          if (dec_now) begin
            expect_eq("dec", o_dec[d], {sr >= 0, si >= 0});
            expect_eq("res", o_res[d], st[d]);
            if (d == 0) n_decide++; else n_decide5++;
          end else begin
            expect_eq("dec pass", o_dec[d], in_dec);
            expect_eq("res pass", o_res[d], in_res);
            if (d == 0 && in_active) n_cont++;
            if (d == 0 && !in_active) n_pass++;
          end
        end
      end
    end
    $display("continue=%0d early-decide=%0d pass=%0d last-step-decide=%0d",
             n_cont, n_decide, n_pass, n_decide5);
    if (n_cont == 0 || n_decide == 0 || n_pass == 0 || n_decide5 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
