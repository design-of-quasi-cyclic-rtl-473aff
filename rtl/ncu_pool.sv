// ncu_pool: the N_GROUPS x GROUP_SIZE node computation units (16 x 24 = 384
// by default) that process one block of Z lanes per cycle.
//
// Each group runs on its own gated clock from clock_control, so the groups
// beyond ceil(Z/24) are frozen for smaller lifting sizes. The control fields
// are broadcast to all groups; lane g*GROUP_SIZE + i of the shifted Q vector
// and of the new Q vector belongs to lane i of group g. Interface and timing
// are those of mcc (stage 2 read addresses, stage 3 operation).
module ncu_pool #(
  parameter int N_GROUPS = ldpc_pkg::N_GROUPS,
  parameter int MCCS     = ldpc_pkg::MCC_PER_GROUP,
  parameter int NCUS     = ldpc_pkg::NCU_PER_MCC,
  parameter int NP       = ldpc_pkg::NP_MAX,
  parameter int NB       = ldpc_pkg::NB_MAX,
  parameter int BQ       = ldpc_pkg::BQ,
  parameter int BR       = ldpc_pkg::BR,
  parameter int COL_W    = ldpc_pkg::COL_W,
  parameter int RADDR_W  = ldpc_pkg::RADDR_W,
  localparam int GS      = MCCS * NCUS,
  localparam int LANES   = N_GROUPS * GS
) (
  input  logic [N_GROUPS-1:0]           gclk,
  input  logic                          rst_n,
  input  logic [RADDR_W-1:0]            r_rd_addr,
  input  logic [COL_W-1:0]              t_rd_addr,
  input  logic                          min_valid,
  input  logic                          min_row_end,
  input  logic [COL_W-1:0]              min_col,
  input  logic                          r_zero,
  input  logic [LANES-1:0][BQ-1:0]      q_shift,
  input  logic                          sel_valid,
  input  logic [COL_W-1:0]              sel_col,
  input  logic [RADDR_W-1:0]            r_wr_addr,
  input  logic [2:0]                    beta,
  output logic [LANES-1:0][BQ-1:0]      q_new,
  output logic                          t_fwd_hit
);

  logic [N_GROUPS-1:0] hit;

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    ncu_group #(.MCCS(MCCS), .NCUS(NCUS), .NP(NP), .NB(NB), .BQ(BQ), .BR(BR),
                .COL_W(COL_W), .RADDR_W(RADDR_W)) u_grp (
      .gclk(gclk[g]), .rst_n, .r_rd_addr, .t_rd_addr,
      .min_valid, .min_row_end, .min_col, .r_zero,
      .q_shift(q_shift[g*GS +: GS]),
      .sel_valid, .sel_col, .r_wr_addr, .beta,
      .q_new(q_new[g*GS +: GS]), .t_fwd_hit(hit[g])
    );
  end

  assign t_fwd_hit = |hit;

endmodule
