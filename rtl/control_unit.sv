// control_unit: the decoder's controller, made of three cooperating FSMs, a
// command register and the clock lookup table.
//
//  - FSM in: after a command word arrives (cmd_wr) it clears the column
//    rotations and waits until the interface has loaded n_cols columns of
//    channel LLRs into the Q memory (one llr_col_done pulse per column).
//  - FSM control: replays the sequence memory. Words 0..iter_end form the
//    loop of one iteration and are issued max_iters times; the words after
//    iter_end up to seq_end form the tail, issued once, that finishes the
//    SEL phase of the last layer. It then waits FLUSH cycles for the
//    pipeline to drain. Because the loop overlaps the SEL phase of the
//    previous iteration's last layer with the MIN phase of layer 0, the SEL
//    operations of the first iteration are suppressed until the first layer
//    end has passed (sel_armed), and r_zero marks MIN operations of the first
//    iteration.
//  - FSM out: for each of the n_cols columns, when the interface's output
//    buffer is free, issues a read of the column with target rotation 0 and
//    waits until the shifted column has arrived.
// The addresses of the iter_end and seq_end words are recorded as the
// sequence memory is written, so the loop wraps without a bubble.
// Clock lookup table: during decoding, group g is enabled when g < ceil(Z/24).
//
// Timing: seq_rd_en/seq_rd_addr and the out read are issued in stage 0; the
// s1_* outputs are aligned with the sequence word that the sequence memory
// returns one cycle later (stage 1). A codeword takes
// max_iters * (iter_end + 1) + (seq_end - iter_end) + FLUSH cycles from the
// first word issued to the start of the read-out.
// The three FSMs, the command register (with the number of columns) and the
// clock lookup table are the architecture's; the loop/tail reading of the
// row-iter-seq end bits and the state encodings are this design's choices.
module control_unit #(
  parameter int N_GROUPS   = ldpc_pkg::N_GROUPS,
  parameter int GROUP_SIZE = ldpc_pkg::GROUP_SIZE,
  parameter int SEQ_AW     = ldpc_pkg::SEQ_AW,
  parameter int COL_W      = ldpc_pkg::COL_W,
  parameter int SHIFT_W    = ldpc_pkg::SHIFT_W,
  parameter int FLUSH      = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration from the interface
  input  logic                      cmd_wr,
  input  ldpc_pkg::cmd_word_t       cmd_in,
  input  logic                      seq_wr,
  input  logic [SEQ_AW-1:0]         seq_wr_addr,
  input  ldpc_pkg::seq_word_t       seq_wr_data,
  input  logic                      llr_col_done,
  // output handshake with the interface
  input  logic                      obuf_ready,
  input  logic                      out_col_valid,  // stage 3 column arrives
  // command register
  output ldpc_pkg::cmd_word_t       cmd,
  output logic [SHIFT_W-1:0]        z,
  // sequence memory read
  output logic                      seq_rd_en,
  output logic [SEQ_AW-1:0]         seq_rd_addr,
  input  ldpc_pkg::seq_word_t       seq_rd_data,
  // stage-1 controls
  output logic                      s1_min_en,
  output logic                      s1_sel_en,
  output logic                      s1_r_zero,
  output logic                      s1_out_rd,
  output logic [COL_W-1:0]          s1_out_col,
  output ldpc_pkg::seq_word_t       s1_word,
  // to the shift memory and clock control
  output logic                      shift_clear,
  output logic [N_GROUPS-1:0]       group_en,
  // status
  output logic                      idle,
  output logic                      decoding
);

  typedef enum logic [1:0] {IN_IDLE, IN_LOAD}                 in_state_t;
  typedef enum logic [1:0] {C_IDLE, C_LOOP, C_TAIL, C_FLUSH}  ctl_state_t;
  typedef enum logic [1:0] {O_IDLE, O_ISSUE, O_WAIT}          out_state_t;

  in_state_t  in_st;
  ctl_state_t ctl_st;
  out_state_t out_st;

  logic [SEQ_AW-1:0] iter_end_addr, seq_end_addr, addr;
  logic [3:0]        iter;
  logic [COL_W-1:0]  col_cnt, out_col;
  logic [3:0]        flush_cnt;
  logic              start_dec, start_out;
  logic              s1_valid, s1_first, sel_armed;

  assign z           = ldpc_pkg::lift_size(cmd.mode);
  assign shift_clear = cmd_wr && idle;
  assign idle        = (in_st == IN_IDLE) && (ctl_st == C_IDLE) && (out_st == O_IDLE);
  assign decoding    = (ctl_st != C_IDLE);
  assign seq_rd_en   = (ctl_st == C_LOOP) || (ctl_st == C_TAIL);
  assign seq_rd_addr = addr;

  // clock lookup table
  always_comb begin
    for (int g = 0; g < N_GROUPS; g++)
      group_en[g] = decoding &&
                    (g < int'(ldpc_pkg::groups_needed(int'(z), GROUP_SIZE)));
  end

  // record where the loop and the whole sequence end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iter_end_addr <= '0;
      seq_end_addr  <= '0;
    end else if (seq_wr) begin
      if (seq_wr_data.iter_end) iter_end_addr <= seq_wr_addr;
      if (seq_wr_data.seq_end)  seq_end_addr  <= seq_wr_addr;
    end
  end

  // FSM in and command register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_st   <= IN_IDLE;
      cmd     <= '0;
      col_cnt <= '0;
    end else begin
      unique case (in_st)
        IN_IDLE: if (cmd_wr && idle) begin
          cmd     <= cmd_in;
          col_cnt <= '0;
          in_st   <= IN_LOAD;
        end
        IN_LOAD: if (llr_col_done) begin
          if (col_cnt == cmd.n_cols - 1) in_st <= IN_IDLE;
          col_cnt <= col_cnt + 1'b1;
        end
        default: in_st <= IN_IDLE;
      endcase
    end
  end

  assign start_dec = (in_st == IN_LOAD) && llr_col_done && (col_cnt == cmd.n_cols - 1);

  // FSM control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_st    <= C_IDLE;
      addr      <= '0;
      iter      <= '0;
      flush_cnt <= '0;
    end else begin
      unique case (ctl_st)
        C_IDLE: if (start_dec) begin
          addr   <= '0;
          iter   <= '0;
          ctl_st <= C_LOOP;
        end
        C_LOOP: begin
          if (addr == iter_end_addr) begin
            if (iter >= cmd.max_iters - 1 || cmd.max_iters == 0) begin
              if (seq_end_addr == iter_end_addr) begin
                ctl_st    <= C_FLUSH;
                flush_cnt <= '0;
              end else begin
                ctl_st <= C_TAIL;
                addr   <= addr + 1'b1;
              end
            end else begin
              iter <= iter + 1'b1;
              addr <= '0;
            end
          end else begin
            addr <= addr + 1'b1;
          end
        end
        C_TAIL: begin
          if (addr == seq_end_addr) begin
            ctl_st    <= C_FLUSH;
            flush_cnt <= '0;
          end else begin
            addr <= addr + 1'b1;
          end
        end
        C_FLUSH: begin
          flush_cnt <= flush_cnt + 1'b1;
          if (int'(flush_cnt) == FLUSH - 1) ctl_st <= C_IDLE;
        end
        default: ctl_st <= C_IDLE;
      endcase
    end
  end

  assign start_out = (ctl_st == C_FLUSH) && (int'(flush_cnt) == FLUSH - 1);

  // FSM out
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_st  <= O_IDLE;
      out_col <= '0;
    end else begin
      unique case (out_st)
        O_IDLE: if (start_out) begin
          out_col <= '0;
          out_st  <= O_ISSUE;
        end
        O_ISSUE: if (obuf_ready) out_st <= O_WAIT;
        O_WAIT: if (out_col_valid) begin
          if (out_col == cmd.n_cols - 1) out_st <= O_IDLE;
          else                           out_st <= O_ISSUE;
          out_col <= out_col + 1'b1;
        end
        default: out_st <= O_IDLE;
      endcase
    end
  end

  // stage 1 alignment
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_first   <= 1'b0;
      s1_out_rd  <= 1'b0;
      s1_out_col <= '0;
      sel_armed  <= 1'b0;
    end else begin
      s1_valid   <= seq_rd_en;
      s1_first   <= (ctl_st == C_LOOP) && (iter == 0);
      s1_out_rd  <= (out_st == O_ISSUE) && obuf_ready;
      s1_out_col <= out_col;
      if (start_dec)
        sel_armed <= 1'b0;
      else if (s1_valid && !seq_rd_data.min_stall && seq_rd_data.row_end)
        sel_armed <= 1'b1;
    end
  end

  assign s1_word   = seq_rd_data;
  assign s1_min_en = s1_valid && !seq_rd_data.min_stall;
  assign s1_sel_en = s1_valid && !seq_rd_data.sel_stall && sel_armed;
  assign s1_r_zero = s1_first;

endmodule
