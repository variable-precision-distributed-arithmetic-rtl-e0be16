// vpda_lms -- LMS adaptation engine shared by the sub-equalizers of one
// polarization.
//
// A single engine serves all NSUB sub-equalizers in turn, so each of them is
// adapted once every NSUB*DWELL clocks. The engine picks a sub-equalizer
// (sel_in) and asks it, through force_full, to compute the symbol entering
// its pipeline now at full precision. LAT clocks later the same
// sub-equalizer (sel_out, a delayed copy of sel_in) presents that symbol; the
// engine takes its soft value y and hard decision d and forms the
// decision-directed error
//
//   e = ref_amp * (+/-1 +/- j) - y
//
// which it broadcasts with upd_en raised for that one sub-equalizer. The
// sub-equalizer applies the LMS step to its own coefficients (vpda_subeq).
// An output not computed at full precision is not used. The round-robin
// order and the error are the published scheme; DWELL, the lead of
// force_full by LAT clocks and the decision-directed reference are this
// design's choices.
//
// Combinational from the sub-equalizer outputs to e and upd_en; sel_in and
// its delay line are registered. Reset (asynchronous, active low) restarts
// at sub-equalizer 0.
module vpda_lms
  import vpda_pkg::*;
#(
  parameter int unsigned NSUB  = 56,
  parameter int unsigned AW    = 22,
  parameter int unsigned EW    = AW + 1,
  parameter int unsigned LAT   = NPLANE,
  parameter int unsigned DWELL = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      adapt_en,
  input  logic [AW-2:0]             ref_amp,
  input  logic                      in_full [NSUB],
  input  qpsk_dec_t                 in_dec  [NSUB],
  input  logic signed [AW-1:0]      in_re   [NSUB],
  input  logic signed [AW-1:0]      in_im   [NSUB],
  output logic                      force_full [NSUB],
  output logic                      upd_en     [NSUB],
  output logic signed [EW-1:0]      e_re,
  output logic signed [EW-1:0]      e_im
);

  localparam int unsigned SW = (NSUB > 1) ? $clog2(NSUB) : 1;
  localparam int unsigned DW = (DWELL > 1) ? $clog2(DWELL) : 1;

  logic [SW-1:0] sel_in;
  logic [DW-1:0] dwell_cnt;
  logic [SW-1:0] sel_pipe [LAT];
  logic          en_pipe  [LAT];
  logic [SW-1:0] sel_out;
  logic          out_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_in    <= '0;
      dwell_cnt <= '0;
      for (int unsigned i = 0; i < LAT; i++) begin
        sel_pipe[i] <= '0;
        en_pipe[i]  <= 1'b0;
      end
    end else begin
      if (adapt_en) begin
        if (32'(dwell_cnt) == DWELL - 1) begin
          dwell_cnt <= '0;
          sel_in    <= (32'(sel_in) == NSUB - 1) ? '0 : sel_in + SW'(1);
        end else begin
          dwell_cnt <= dwell_cnt + DW'(1);
        end
      end
      sel_pipe[0] <= sel_in;
      en_pipe[0]  <= adapt_en;
      for (int unsigned i = 1; i < LAT; i++) begin
        sel_pipe[i] <= sel_pipe[i-1];
        en_pipe[i]  <= en_pipe[i-1];
      end
    end
  end

  assign sel_out = sel_pipe[LAT-1];
  assign out_en  = en_pipe[LAT-1] && adapt_en;

  always_comb begin
    logic signed [EW-1:0] r_re, r_im;
    r_re = in_dec[sel_out].i ? EW'(ref_amp) : -EW'(ref_amp);
    r_im = in_dec[sel_out].q ? EW'(ref_amp) : -EW'(ref_amp);
    e_re = r_re - EW'(in_re[sel_out]);
    e_im = r_im - EW'(in_im[sel_out]);
    for (int unsigned j = 0; j < NSUB; j++) begin
      force_full[j] = adapt_en && (32'(sel_in) == j);
      upd_en[j]     = out_en && (32'(sel_out) == j) && in_full[j];
    end
  end

endmodule
