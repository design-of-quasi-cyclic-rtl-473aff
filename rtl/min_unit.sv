// min_unit: MIN phase of the layered offset-min-sum algorithm for one lane
// (one check node of the current layer).
//
// For every non-zero block of a layer it receives the cyclically shifted Q
// message q and the R message r this check node sent to that variable node
// in the previous iteration, and forms the temporary (variable-to-check)
// message t = q - r, saturated to +-QMAX. t goes out to the T memory. From
// |t| it keeps the smallest and second-smallest magnitude of the layer, the
// column index of the smallest, and the XOR of all signs. When the block
// flagged row_end has been taken in, these four values move to the pipeline
// registers read by the SEL unit, and the accumulators start again at
// (infinity, infinity, -, +). This decouples the two phases: the MIN unit can
// work on layer m+1 while the SEL unit finishes layer m.
//
// r_zero forces r to 0; the decoder sets it during the first iteration,
// which has the same effect as clearing the R memory before each codeword.
// "Infinity" is the largest magnitude, QMAX. The algorithm is the
// architecture's; the widths of the minima and the saturation are this
// design's choices.
//
// Timing: t is combinational; the accumulators and the SEL registers change
// at the rising edge when valid is high.
module min_unit #(
  parameter int BQ    = ldpc_pkg::BQ,
  parameter int BR    = ldpc_pkg::BR,
  parameter int COL_W = ldpc_pkg::COL_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,     // a block of the layer is present
  input  logic                    row_end,   // it is the last block of the layer
  input  logic [COL_W-1:0]        col,       // its prototype column
  input  logic                    r_zero,    // first iteration: previous R is 0
  input  logic signed [BQ-1:0]    q,         // shifted Q message
  input  logic signed [BR-1:0]    r_old,     // R message of the previous iteration
  output logic signed [BQ-1:0]    t,         // temporary message to the T memory
  // pipeline registers towards the SEL unit (values of the last finished layer)
  output logic [BQ-2:0]           sel_m1,
  output logic [BQ-2:0]           sel_m2,
  output logic [COL_W-1:0]        sel_idx,
  output logic                    sel_sgn
);

  localparam int QMAX = (1 << (BQ - 1)) - 1;

  logic [BQ-2:0]    m1, m2, mag;
  logic [COL_W-1:0] idx;
  logic             sgn;
  logic [BQ-2:0]    n_m1, n_m2;
  logic [COL_W-1:0] n_idx;
  logic             n_sgn;
  int               diff;

  always_comb begin
    diff = int'(q) - (r_zero ? 0 : int'(r_old));
    if (diff > QMAX)       diff = QMAX;
    else if (diff < -QMAX) diff = -QMAX;
    t   = BQ'(diff);
    mag = (diff < 0) ? (BQ-1)'(-diff) : (BQ-1)'(diff);

    n_sgn = sgn ^ (diff < 0);
    if (mag < m1) begin
      n_m2 = m1; n_m1 = mag; n_idx = col;
    end else begin
      n_m1 = m1; n_idx = idx;
      n_m2 = (mag < m2) ? mag : m2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= (BQ-1)'(QMAX); m2 <= (BQ-1)'(QMAX); idx <= '0; sgn <= 1'b0;
      sel_m1 <= (BQ-1)'(QMAX); sel_m2 <= (BQ-1)'(QMAX); sel_idx <= '0; sel_sgn <= 1'b0;
    end else if (valid) begin
      if (row_end) begin
        sel_m1 <= n_m1; sel_m2 <= n_m2; sel_idx <= n_idx; sel_sgn <= n_sgn;
        m1 <= (BQ-1)'(QMAX); m2 <= (BQ-1)'(QMAX); idx <= '0; sgn <= 1'b0;
      end else begin
        m1 <= n_m1; m2 <= n_m2; idx <= n_idx; sgn <= n_sgn;
      end
    end
  end

endmodule
