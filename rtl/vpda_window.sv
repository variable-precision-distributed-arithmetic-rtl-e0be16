// vpda_window -- tap windows of the fractionally spaced sub-equalizers.
//
// The four ADCs each deliver NPAR samples per clock (the outputs of their NPAR
// time-interleaved sub-converters, 2x oversampled). Output symbol s of a
// polarization (s = 0..NPAR/2-1) sits at sample 2s of a block, and every
// sub-equalizer reads L consecutive samples of every ADC around it. This
// block keeps the last three blocks of each ADC and cuts out, for every
// symbol position s, the window
//
//   win[s][a][t] = sample (2s + t - L/2) of the middle block,  t = 0..L-1
//
// where negative or too-large indices reach into the older or newer block.
// Tap t = 0 is the oldest sample. The X and Y outputs of symbol s share the
// same window. Centring the window on the symbol is this design's choice; the
// block-parallel MIMO arrangement follows the published equalizer.
//
// Timing: a block accepted with in_valid shifts the history; win_valid pulses
// one clock later, once three blocks have been received, and the window then
// refers to the block accepted two in_valid pulses earlier. Requires
// L/2 <= NPAR. Reset (asynchronous, active low) empties the history.
module vpda_window
  import vpda_pkg::*;
#(
  parameter int unsigned NPAR  = 112,
  parameter int unsigned L     = 32,
  parameter int unsigned ADC_W = NPLANE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ADC_W-1:0] adc  [NADC][NPAR],
  output logic             win_valid,
  output logic [ADC_W-1:0] win  [NPAR/2][NADC][L]
);

  localparam int unsigned NSYM = NPAR / 2;

  // h[0] newest block, h[2] oldest
  logic [ADC_W-1:0] h [3][NADC][NPAR];
  logic [1:0]       fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && (fill == 2'd2);
      if (in_valid && fill != 2'd2) fill <= fill + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      h[2] <= h[1];
      h[1] <= h[0];
      h[0] <= adc;
    end
  end

  // position p in {h[2], h[1], h[0]} (oldest first): block 2 - p / NPAR
  always_comb begin
    for (int unsigned s = 0; s < NSYM; s++)
      for (int unsigned a = 0; a < NADC; a++)
        for (int unsigned t = 0; t < L; t++) begin
          int unsigned p;
          p = NPAR + 2 * s + t - L / 2;
          win[s][a][t] = h[2 - p / NPAR][a][p % NPAR];
        end
  end

  initial begin
    assert (L / 2 <= NPAR && NPAR % 2 == 0)
      else $error("vpda_window: needs an even NPAR and L/2 <= NPAR");
  end

endmodule
