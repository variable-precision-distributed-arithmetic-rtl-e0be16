// tb_vpda_window -- self-checking test of the tap-window former.
//
// Streams blocks of NPAR samples per ADC, with random gaps in in_valid, where
// every sample carries a value derived from its global stream position and
// ADC. After each accepted block the window of every symbol and ADC is
// compared with the samples at stream positions 2s + t - L/2 of the block
// accepted two blocks earlier. Also checks that win_valid stays low until
// three blocks have arrived and pulses exactly once per accepted block.
module tb_vpda_window;
  import vpda_pkg::*;

  localparam int unsigned NPAR  = 8;
  localparam int unsigned L     = 6;
  localparam int unsigned ADC_W = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid, win_valid;
  logic [ADC_W-1:0] adc [NADC][NPAR];
  logic [ADC_W-1:0] win [NPAR/2][NADC][L];

  vpda_window #(.NPAR(NPAR), .L(L), .ADC_W(ADC_W)) dut (.*);

  int checks = 0, failures = 0;
  int nblk = 0, nwin = 0;

  function automatic int val(input int pos, input int a);
    return (pos * 7 + a * 11 + pos / 5) % 32;
  endfunction

  initial begin
    in_valid = 0;
    for (int a = 0; a < NADC; a++) for (int i = 0; i < NPAR; i++) adc[a][i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int a = 0; a < NADC; a++)
        for (int i = 0; i < NPAR; i++) adc[a][i] = ADC_W'(val(nblk * NPAR + i, a));
      @(posedge clk);
      #1;
      if (in_valid) nblk++;
      checks++;
      if (win_valid != (in_valid && nblk >= 3)) begin
        failures++;
        $display("FAIL win_valid=%0b after block %0d", win_valid, nblk);
      end
      if (win_valid) begin
        int base;
        nwin++;
        base = (nblk - 2) * NPAR;   // first sample of the middle block
        for (int s = 0; s < NPAR / 2; s++)
          for (int a = 0; a < NADC; a++)
            for (int t = 0; t < L; t++) begin
              checks++;
              if (int'(win[s][a][t]) != val(base + 2 * s + t - L / 2, a)) begin
                failures++;
                $display("FAIL win[%0d][%0d][%0d]=%0d expected %0d", s, a, t,
                         win[s][a][t], val(base + 2 * s + t - L / 2, a));
              end
            end
      end
      in_valid = 0;
    end
    $display("blocks=%0d windows=%0d", nblk, nwin);
    if (nwin == 0) failures++;
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
