// ncu_group: one clock-gated group of GROUP_SIZE lanes (24 by default), made
// of MCC_PER_GROUP macro computation cells (3 of 8 NCUs). All cells of the
// group share the group's gated clock and the broadcast control; each works
// on its own slice of the lanes. Interface and timing are those of mcc.
module ncu_group #(
  parameter int MCCS    = ldpc_pkg::MCC_PER_GROUP,
  parameter int NCUS    = ldpc_pkg::NCU_PER_MCC,
  parameter int NP      = ldpc_pkg::NP_MAX,
  parameter int NB      = ldpc_pkg::NB_MAX,
  parameter int BQ      = ldpc_pkg::BQ,
  parameter int BR      = ldpc_pkg::BR,
  parameter int COL_W   = ldpc_pkg::COL_W,
  parameter int RADDR_W = ldpc_pkg::RADDR_W
) (
  input  logic                          gclk,
  input  logic                          rst_n,
  input  logic [RADDR_W-1:0]            r_rd_addr,
  input  logic [COL_W-1:0]              t_rd_addr,
  input  logic                          min_valid,
  input  logic                          min_row_end,
  input  logic [COL_W-1:0]              min_col,
  input  logic                          r_zero,
  input  logic [MCCS*NCUS-1:0][BQ-1:0]  q_shift,
  input  logic                          sel_valid,
  input  logic [COL_W-1:0]              sel_col,
  input  logic [RADDR_W-1:0]            r_wr_addr,
  input  logic [2:0]                    beta,
  output logic [MCCS*NCUS-1:0][BQ-1:0]  q_new,
  output logic                          t_fwd_hit
);

  logic [MCCS-1:0] hit;

  for (genvar c = 0; c < MCCS; c++) begin : g_mcc
    mcc #(.NCUS(NCUS), .NP(NP), .NB(NB), .BQ(BQ), .BR(BR),
          .COL_W(COL_W), .RADDR_W(RADDR_W)) u_mcc (
      .clk(gclk), .rst_n, .r_rd_addr, .t_rd_addr,
      .min_valid, .min_row_end, .min_col, .r_zero,
      .q_shift(q_shift[c*NCUS +: NCUS]),
      .sel_valid, .sel_col, .r_wr_addr, .beta,
      .q_new(q_new[c*NCUS +: NCUS]), .t_fwd_hit(hit[c])
    );
  end

  assign t_fwd_hit = |hit;

endmodule
