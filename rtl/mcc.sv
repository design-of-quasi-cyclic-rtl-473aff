// mcc: macro computation cell, NCUS node computation units (8 by default)
// with the T memory and R memory slices of their lanes.
//
// T memory: one word per prototype column (NP words of NCUS x BT bits). The
// MIN phase writes the temporary vector t of column min_col; the SEL phase
// reads it back for column t_rd_addr. If the SEL phase asks for the column
// the MIN phase is writing in that same cycle, the MIN output is forwarded
// directly (T-memory forwarding), which lets the SEL phase of a layer start
// one cycle after its MIN phase ended.
// R memory: one word per non-zero block of the prototype matrix (NB words of
// NCUS x BR bits); the MIN phase reads the block's previous R message, the
// SEL phase writes the new one. Neither memory needs clearing: the first
// iteration uses r = 0 (r_zero).
//
// Timing (decoder pipeline stages): r_rd_addr and t_rd_addr are presented
// one cycle before the operation (stage 2), everything else in the cycle of
// the operation (stage 3); q_new is combinational in stage 3. clk is the
// group's gated clock. Memory sizes follow the architecture's R and T sizes
// divided over the cells; forwarding is the architecture's.
module mcc #(
  parameter int NCUS    = ldpc_pkg::NCU_PER_MCC,
  parameter int NP      = ldpc_pkg::NP_MAX,
  parameter int NB      = ldpc_pkg::NB_MAX,
  parameter int BQ      = ldpc_pkg::BQ,
  parameter int BR      = ldpc_pkg::BR,
  parameter int COL_W   = ldpc_pkg::COL_W,
  parameter int RADDR_W = ldpc_pkg::RADDR_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // stage 2: memory read addresses
  input  logic [RADDR_W-1:0]            r_rd_addr,
  input  logic [COL_W-1:0]              t_rd_addr,
  // stage 3: MIN operation
  input  logic                          min_valid,
  input  logic                          min_row_end,
  input  logic [COL_W-1:0]              min_col,
  input  logic                          r_zero,
  input  logic [NCUS-1:0][BQ-1:0]       q_shift,
  // stage 3: SEL operation
  input  logic                          sel_valid,
  input  logic [COL_W-1:0]              sel_col,
  input  logic [RADDR_W-1:0]            r_wr_addr,
  input  logic [2:0]                    beta,
  output logic [NCUS-1:0][BQ-1:0]       q_new,
  output logic                          t_fwd_hit
);

  logic [NCUS-1:0][BQ-1:0] t_mem [NP];
  logic [NCUS-1:0][BR-1:0] r_mem [NB];
  logic [NCUS-1:0][BQ-1:0] t_wr, t_rd;
  logic [NCUS-1:0][BR-1:0] r_rd, r_wr;

  assign t_fwd_hit = min_valid && (min_col == t_rd_addr);

  always_ff @(posedge clk) begin
    if (min_valid && int'(min_col) < NP) t_mem[min_col] <= t_wr;
    if (sel_valid && int'(r_wr_addr) < NB) r_mem[r_wr_addr] <= r_wr;
    if (t_fwd_hit)                 t_rd <= t_wr;
    else if (int'(t_rd_addr) < NP) t_rd <= t_mem[t_rd_addr];
    else                           t_rd <= '0;
    r_rd <= (int'(r_rd_addr) < NB) ? r_mem[r_rd_addr] : '0;
  end

  for (genvar i = 0; i < NCUS; i++) begin : g_ncu
    ncu #(.BQ(BQ), .BR(BR), .COL_W(COL_W)) u_ncu (
      .clk, .rst_n,
      .min_valid, .min_row_end, .min_col, .r_zero,
      .q_shift(q_shift[i]), .r_old(r_rd[i]), .t_out(t_wr[i]),
      .t_in(t_rd[i]), .sel_col, .beta, .r_new(r_wr[i]), .q_new(q_new[i])
    );
  end

endmodule
