// ncu: one node computation unit, a MIN unit and a SEL unit for one lane.
//
// The MIN unit works on a block of the current layer while the SEL unit, fed
// from the MIN unit's pipeline registers, works on a block of the previous
// layer. Interface and timing are those of min_unit and sel_unit.
module ncu #(
  parameter int BQ    = ldpc_pkg::BQ,
  parameter int BR    = ldpc_pkg::BR,
  parameter int COL_W = ldpc_pkg::COL_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 min_valid,
  input  logic                 min_row_end,
  input  logic [COL_W-1:0]     min_col,
  input  logic                 r_zero,
  input  logic signed [BQ-1:0] q_shift,
  input  logic signed [BR-1:0] r_old,
  output logic signed [BQ-1:0] t_out,
  input  logic signed [BQ-1:0] t_in,
  input  logic [COL_W-1:0]     sel_col,
  input  logic [2:0]           beta,
  output logic signed [BR-1:0] r_new,
  output logic signed [BQ-1:0] q_new
);

  logic [BQ-2:0]    m1, m2;
  logic [COL_W-1:0] idx;
  logic             sgn;

  min_unit #(.BQ(BQ), .BR(BR), .COL_W(COL_W)) u_min (
    .clk, .rst_n, .valid(min_valid), .row_end(min_row_end), .col(min_col),
    .r_zero, .q(q_shift), .r_old, .t(t_out),
    .sel_m1(m1), .sel_m2(m2), .sel_idx(idx), .sel_sgn(sgn)
  );

  sel_unit #(.BQ(BQ), .BR(BR), .COL_W(COL_W)) u_sel (
    .t(t_in), .col(sel_col), .m1, .m2, .idx, .sgn, .beta, .r_new, .q_new
  );

endmodule
