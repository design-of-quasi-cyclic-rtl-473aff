// sel_unit: SEL phase of the layered offset-min-sum algorithm for one lane.
//
// For each block of the layer whose minima the MIN unit has finished, it
// takes the stored temporary message t of that column and
//   - selects the magnitude: the second minimum if this column gave the first
//     minimum, the first minimum otherwise;
//   - subtracts the offset beta, not going below 0, and limits the result to
//     the R-message range +-RMAX;
//   - gives it the sign of the layer's sign product times sign(t), i.e. the
//     product of the other signs: the new check-to-variable message r;
//   - clips r so that t + r stays within +-QMAX (message clipping,
//     clip(r,t) = max(min(r, QMAX - t), -QMAX - t));
//   - forms the new Q message q = t + r.
// r goes to the R memory and q to the Q memory. Purely combinational.
// The steps are the architecture's; limiting r to the 5-bit R range before
// the clipping is this design's reading of the 5-bit R memory.
module sel_unit #(
  parameter int BQ    = ldpc_pkg::BQ,
  parameter int BR    = ldpc_pkg::BR,
  parameter int COL_W = ldpc_pkg::COL_W
) (
  input  logic signed [BQ-1:0] t,
  input  logic [COL_W-1:0]     col,
  input  logic [BQ-2:0]        m1,
  input  logic [BQ-2:0]        m2,
  input  logic [COL_W-1:0]     idx,
  input  logic                 sgn,
  input  logic [2:0]           beta,
  output logic signed [BR-1:0] r_new,
  output logic signed [BQ-1:0] q_new
);

  localparam int QMAX = (1 << (BQ - 1)) - 1;
  localparam int RMAX = (1 << (BR - 1)) - 1;

  int m, r, hi, lo;

  always_comb begin
    m = (col == idx) ? int'(m2) : int'(m1);
    m = (m > int'(beta)) ? m - int'(beta) : 0;
    if (m > RMAX) m = RMAX;
    r  = (sgn ^ t[BQ-1]) ? -m : m;
    hi = QMAX - int'(t);
    lo = -QMAX - int'(t);
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    r_new = BR'(r);
    q_new = BQ'(int'(t) + r);
  end

endmodule
