// ldpc_decoder_top: layered offset-min-sum QC-LDPC decoder for the 5G NR
// codes (both base graphs, all 51 lifting sizes, any code rate up to 68
// prototype columns and 316 non-zero blocks).
//
// A codeword is decoded one prototype block (Z lanes, Z up to 384) per
// cycle, following a schedule held in the sequence memory. Data path, in
// pipeline stages:
//   stage 0  the control unit reads a sequence word (or issues a read-out);
//   stage 1  the Q memory is read at the word's column (with forwarding of
//            a write to the same column in this cycle) and the shift memory
//            gives the delta shift (Z - c_n + [Hp]m,n) mod Z;
//   stage 2  the cyclic shifter rotates the column; the NCU pool reads its
//            T and R memories;
//   stage 3  the NCU pool does the MIN operation of one block and the SEL
//            operation of another block (of the previous layer) at once; the
//            SEL result is written back to the Q memory and the column's new
//            rotation into the shift memory.
// The NCU pool's 16 groups of 24 lanes are clock gated according to Z.
// After the last iteration each column is read with target rotation 0, so it
// leaves the shifter in natural order, and goes to the interface.
//
// Ports are the chip pads of ldpc_interface (48-bit input and output buses
// with request/acknowledge) plus idle and decoding status. A codeword takes
// max_iters * L_loop + L_tail + 4 cycles of decoding (L_loop and L_tail the
// numbers of sequence words in the loop and in the tail), plus loading and
// read-out. The block structure and the pipelining between units follow the
// architecture; stage boundaries and word formats are this design's.
module ldpc_decoder_top #(
  parameter int N_GROUPS   = ldpc_pkg::N_GROUPS,
  parameter int GROUP_SIZE = ldpc_pkg::GROUP_SIZE,
  parameter int NP         = ldpc_pkg::NP_MAX,
  parameter int NB         = ldpc_pkg::NB_MAX,
  parameter int SEQ_DEPTH  = ldpc_pkg::SEQ_DEPTH,
  parameter int PAD_W      = ldpc_pkg::PAD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_req,
  input  logic [PAD_W-1:0] in_data,
  output logic             in_ack,
  output logic             out_req,
  output logic [PAD_W-1:0] out_data,
  input  logic             out_ack,
  output logic             idle,
  output logic             decoding
);

  import ldpc_pkg::*;

  localparam int ZM   = N_GROUPS * GROUP_SIZE;
  localparam int MCCS = GROUP_SIZE / NCU_PER_MCC;

  // interface <-> decoder
  logic                cmd_wr, seq_wr, llr_wr, llr_col_done, obuf_ready;
  cmd_word_t           cmd_in, cmd;
  logic [SEQ_AW-1:0]   seq_wr_addr, seq_rd_addr;
  seq_word_t           seq_wr_data, seq_rd_data;
  logic [COL_W-1:0]    llr_col;
  logic [ZM-1:0]       llr_mask;
  logic [ZM-1:0][BQ-1:0] llr_lanes;

  // control
  logic [SHIFT_W-1:0]  z;
  logic                seq_rd_en, shift_clear;
  logic [N_GROUPS-1:0] group_en, gclk;
  logic                s1_min_en, s1_sel_en, s1_r_zero, s1_out_rd;
  logic [COL_W-1:0]    s1_out_col;
  seq_word_t           s1_word;

  // data path
  logic                  q_rd_en, q_wr_en, q_fwd_hit, t_fwd_hit;
  logic [COL_W-1:0]      q_rd_addr, q_wr_addr;
  logic [ZM-1:0]         q_wr_mask, z_mask;
  logic [ZM-1:0][BQ-1:0] q_wr_data, q_rd_data, q_shifted, q_new;
  logic [SHIFT_W-1:0]    delta;

  // pipeline registers
  seq_word_t             s2_word, s3_word;
  logic                  s2_min_en, s2_sel_en, s2_r_zero, s2_out;
  logic                  s3_min_en, s3_sel_en, s3_r_zero, s3_out;
  logic [SHIFT_W-1:0]    s2_delta;
  logic [ZM-1:0][BQ-1:0] s3_qshift;

  ldpc_interface #(.Z_MAX(ZM), .PAD_W(PAD_W)) u_if (
    .clk, .rst_n,
    .in_req, .in_data, .in_ack, .out_req, .out_data, .out_ack,
    .dec_idle(idle), .cmd_wr, .cmd_out(cmd_in),
    .seq_wr, .seq_addr(seq_wr_addr), .seq_data(seq_wr_data),
    .llr_wr, .llr_col, .llr_mask, .llr_lanes, .llr_col_done,
    .col_valid(s3_out), .col_data(s3_qshift), .obuf_ready
  );

  control_unit #(.N_GROUPS(N_GROUPS), .GROUP_SIZE(GROUP_SIZE)) u_ctl (
    .clk, .rst_n,
    .cmd_wr, .cmd_in, .seq_wr, .seq_wr_addr, .seq_wr_data, .llr_col_done,
    .obuf_ready, .out_col_valid(s3_out),
    .cmd, .z, .seq_rd_en, .seq_rd_addr, .seq_rd_data,
    .s1_min_en, .s1_sel_en, .s1_r_zero, .s1_out_rd, .s1_out_col, .s1_word,
    .shift_clear, .group_en, .idle, .decoding
  );

  sequence_memory #(.DEPTH(SEQ_DEPTH)) u_seq (
    .clk, .wr_en(seq_wr), .wr_addr(seq_wr_addr), .wr_data(seq_wr_data),
    .rd_en(seq_rd_en), .rd_addr(seq_rd_addr), .rd_data(seq_rd_data)
  );

  clock_control #(.N_GROUPS(N_GROUPS)) u_cc (
    .clk, .en(group_en), .gclk
  );

  // ---- stage 1: Q memory and shift memory
  assign q_rd_en   = s1_min_en || s1_out_rd;
  assign q_rd_addr = s1_out_rd ? s1_out_col : s1_word.q_addr;

  always_comb begin
    for (int i = 0; i < ZM; i++) z_mask[i] = (i < int'(z));
  end

  // the SEL write-back (stage 3) and the loader never overlap
  assign q_wr_en   = s3_sel_en || llr_wr;
  assign q_wr_addr = s3_sel_en ? s3_word.t_addr : llr_col;
  assign q_wr_mask = s3_sel_en ? z_mask : llr_mask;
  assign q_wr_data = s3_sel_en ? q_new : llr_lanes;

  q_memory #(.Z_MAX(ZM), .NP(NP)) u_qmem (
    .clk, .wr_en(q_wr_en), .wr_addr(q_wr_addr), .wr_mask(q_wr_mask),
    .wr_data(q_wr_data), .rd_en(q_rd_en), .rd_addr(q_rd_addr),
    .rd_data(q_rd_data), .fwd_hit(q_fwd_hit)
  );

  shift_memory #(.NP(NP)) u_shm (
    .clk, .rst_n, .clear(shift_clear), .z,
    .rd_col(q_rd_addr), .rd_h(s1_out_rd ? '0 : s1_word.shift),
    .buf_wr(s1_min_en), .delta,
    .upd_en(s3_sel_en), .upd_col(s3_word.t_addr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_word <= '0; s2_min_en <= 1'b0; s2_sel_en <= 1'b0; s2_r_zero <= 1'b0;
      s2_out  <= 1'b0; s2_delta <= '0;
      s3_word <= '0; s3_min_en <= 1'b0; s3_sel_en <= 1'b0; s3_r_zero <= 1'b0;
      s3_out  <= 1'b0;
    end else begin
      s2_word <= s1_word; s2_min_en <= s1_min_en; s2_sel_en <= s1_sel_en;
      s2_r_zero <= s1_r_zero; s2_out <= s1_out_rd; s2_delta <= delta;
      s3_word <= s2_word; s3_min_en <= s2_min_en; s3_sel_en <= s2_sel_en;
      s3_r_zero <= s2_r_zero; s3_out <= s2_out;
    end
  end

  // ---- stage 2: cyclic shifter
  cyclic_shifter #(.Z_MAX(ZM)) u_shift (
    .vec_in(q_rd_data), .z, .shift(s2_delta), .vec_out(q_shifted)
  );

  always_ff @(posedge clk) s3_qshift <= q_shifted;

  // ---- stage 3: NCU pool
  ncu_pool #(.N_GROUPS(N_GROUPS), .MCCS(MCCS), .NP(NP), .NB(NB)) u_pool (
    .gclk, .rst_n,
    .r_rd_addr(s2_word.r_rd_addr), .t_rd_addr(s2_word.t_addr),
    .min_valid(s3_min_en), .min_row_end(s3_word.row_end),
    .min_col(s3_word.q_addr), .r_zero(s3_r_zero), .q_shift(s3_qshift),
    .sel_valid(s3_sel_en), .sel_col(s3_word.t_addr),
    .r_wr_addr(s3_word.r_wr_addr), .beta(cmd.beta),
    .q_new, .t_fwd_hit
  );

endmodule
