// Computation unit: one interim value of the Gaussian log-likelihood sum,
//   term = ((o - mu)^2 * v) >>> SHIFT
// for one feature dimension. o and mu share FEAT_FRAC fraction bits, v has VAR_FRAC,
// and SHIFT = 2*FEAT_FRAC + VAR_FRAC - LOG_FRAC brings the product to the log-domain
// format (LOG_FRAC fraction bits, arithmetic shift, rounding toward minus infinity).
// A lane that carries no dimension (en = 0) yields 0. The published design places N of
// these units side by side; its formula gives the function, the three-stage pipeline
// (difference, square, product) and the formats are this design's choice.
//
// Timing: fully pipelined, one operand set per cycle, result LATENCY = 3 cycles after
// the inputs (out_valid follows in_valid).
module gmm_comp_unit
  import asr_gmm_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned OUT_W = ACC_W,
  parameter int unsigned SHIFT = 2*FEAT_FRAC + VAR_FRAC - LOG_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    en,
  input  logic signed [W-1:0]     o,
  input  logic signed [W-1:0]     mu,
  input  logic signed [W-1:0]     v,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] term
);
  localparam int unsigned SQ_W   = 2*(W+1);
  localparam int unsigned PROD_W = SQ_W + W + 1;

  logic                     v1, v2;
  logic signed [W:0]        diff1;
  logic signed [W-1:0]      var1, var2;
  logic        [SQ_W-1:0]   sq2;
  logic signed [PROD_W-1:0] prod;

  always_comb prod = $signed({1'b0, sq2}) * PROD_W'(var2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      diff1 <= '0; var1 <= '0; var2 <= '0; sq2 <= '0; term <= '0;
    end else begin
      // stage 1: difference (masked lanes contribute nothing)
      v1    <= in_valid;
      diff1 <= en ? (W+1)'(o) - (W+1)'(mu) : '0;
      var1  <= v;
      // stage 2: square
      v2    <= v1;
      sq2   <= SQ_W'(diff1 * diff1);
      var2  <= var1;
      // stage 3: weight by v and rescale
      out_valid <= v2;
      term      <= OUT_W'(prod >>> SHIFT);
    end
  end
endmodule
