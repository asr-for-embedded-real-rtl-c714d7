// Log-add unit: out = x (+) y = log(exp(x) + exp(y)), natural log, fixed point.
//
// The exact operator is approximated with the difference z = x - y:
//   z <  -TH       : out = y
//   -TH <= z < 0   : out = y + log(1 + exp(z))
//   0 <= z < TH    : out = x + log(1 + exp(-z))
//   z >= TH        : out = x
// TH = 16 (a power of two, so the range test is a bit test). The correction term
// log(1 + exp(-|z|)) comes from a lookup table indexed by |z| in LOG_FRAC-bit fixed
// point: TH << LOG_FRAC = 128 entries, entry i = round(2^LOG_FRAC * ln(1 + exp(-i / 2^LOG_FRAC))),
// read from gmm_logadd_lut.hex. The piecewise rule, the threshold 16 and the table
// follow the published design; the table resolution and the case z == TH (taken as
// "x") are this design's choices. The sum saturates to DATA_W bits.
//
// Purely combinational: x, y -> out in the same cycle.
module gmm_logadd_unit
  import asr_gmm_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned FRAC = LOG_FRAC,
  parameter int unsigned TH   = LOGADD_TH
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic signed [W-1:0] out
);
  localparam int unsigned LUT_N  = TH << FRAC;
  localparam int unsigned IDX_W  = $clog2(LUT_N);

  logic [7:0] lut [LUT_N];
  initial $readmemh("rtl/gmm_logadd_lut.hex", lut);

  logic signed [W:0]   z;
  logic        [W:0]   zabs;
  logic                big;
  logic signed [W:0]   base;
  logic        [7:0]   corr;
  logic signed [W+1:0] sum;

  always_comb begin
    z    = (W+1)'(x) - (W+1)'(y);
    zabs = z[W] ? (W+1)'(-z) : (W+1)'(z);
    big  = zabs >= (W+1)'(LUT_N);
    base = z[W] ? (W+1)'(y) : (W+1)'(x);
    corr = big ? 8'd0 : lut[zabs[IDX_W-1:0]];
    sum  = (W+2)'(base) + (W+2)'($signed({1'b0, corr}));
    if (sum > (W+2)'(2**(W-1) - 1)) out = W'(2**(W-1) - 1);
    else                            out = W'(sum);
  end
endmodule
