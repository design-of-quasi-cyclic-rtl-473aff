// ldpc_interface: link between the chip pads and the decoder.
//
// The pads carry one combined input stream; the interface splits it into
// command, schedule and LLR information and hands each to its destination.
// It has two FSMs with request/acknowledge handshakes on both sides.
//
// FSM in, input stream (a beat moves when in_req and in_ack are both high):
//   1. a command word (ldpc_pkg::cmd_word_t in in_data[37:0]); it is accepted
//      only when the decoder is idle and the output buffer is empty, and is
//      kept in the interface's command buffer and passed to the control unit;
//   2. if the command's `operation` bit is 1, sequence words
//      (ldpc_pkg::seq_word_t in in_data[46:0]) written to sequence memory
//      addresses 0, 1, ... up to and including the word with seq_end set;
//      with `operation` 0 the stored schedule is reused;
//   3. n_cols columns of channel LLRs, PAD_LLRS (6) 7-bit LLRs per beat,
//      LLR k of a beat in in_data[7k+6:7k], lanes 0..Z-1 of column 0 first.
//      The number of beats per column, ceil(Z/6), comes from a lookup on the
//      lifting size. Each beat becomes a masked write of six lanes of the Q
//      memory; llr_col_done pulses with the last beat of a column.
// FSM out: when the decoder delivers a decoded column (col_valid, already
// rotated back to natural order), it is captured and sent on the output pads
// in ceil(Z/6) beats of six LLRs (out_mode 0) or ceil(Z/48) beats of 48 hard
// decisions, bit k = 1 for a negative LLR of lane 48*beat + k (out_mode 1).
// out_req stays high with a beat until out_ack; obuf_ready is high while the
// buffer is empty.
// The split into command and LLR information, the two FSMs, the handshakes,
// the command buffer with the number of columns and the lookup on Z are the
// architecture's; the pad width (48 bits), the beat formats and the
// valid/ready style of the handshakes are this design's choices.
module ldpc_interface #(
  parameter int Z_MAX    = ldpc_pkg::Z_MAX,
  parameter int PAD_W    = ldpc_pkg::PAD_W,
  parameter int PAD_LLRS = ldpc_pkg::PAD_LLRS,
  parameter int BQ       = ldpc_pkg::BQ,
  parameter int SEQ_AW   = ldpc_pkg::SEQ_AW,
  parameter int COL_W    = ldpc_pkg::COL_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // chip side
  input  logic                     in_req,
  input  logic [PAD_W-1:0]         in_data,
  output logic                     in_ack,
  output logic                     out_req,
  output logic [PAD_W-1:0]         out_data,
  input  logic                     out_ack,
  // decoder side
  input  logic                     dec_idle,
  output logic                     cmd_wr,
  output ldpc_pkg::cmd_word_t      cmd_out,
  output logic                     seq_wr,
  output logic [SEQ_AW-1:0]        seq_addr,
  output ldpc_pkg::seq_word_t      seq_data,
  output logic                     llr_wr,
  output logic [COL_W-1:0]         llr_col,
  output logic [Z_MAX-1:0]         llr_mask,
  output logic [Z_MAX-1:0][BQ-1:0] llr_lanes,
  output logic                     llr_col_done,
  input  logic                     col_valid,
  input  logic [Z_MAX-1:0][BQ-1:0] col_data,
  output logic                     obuf_ready
);

  localparam int OBITS = PAD_W;  // hard decisions per output beat

  typedef enum logic [1:0] {I_CMD, I_SEQ, I_LLR} in_state_t;
  typedef enum logic       {O_EMPTY, O_SEND}     out_state_t;

  in_state_t           in_st;
  out_state_t          out_st;
  ldpc_pkg::cmd_word_t cmd_buf;          // command buffer
  logic [8:0]          z;
  logic [8:0]          in_beats, out_beats, in_beat, out_beat;
  logic [SEQ_AW-1:0]   seq_cnt;
  logic [COL_W-1:0]    col_cnt;
  logic                take;
  ldpc_pkg::cmd_word_t in_cmd;
  ldpc_pkg::seq_word_t in_seq;

  logic [Z_MAX-1:0][BQ-1:0] obuf;
  logic [Z_MAX-1:0]         obits;
  logic [Z_MAX*BQ-1:0]      obuf_sh;
  logic [Z_MAX-1:0]         obits_sh;

  // lookup tables: beats per column for the lifting size and the pads
  assign z         = ldpc_pkg::lift_size(cmd_buf.mode);
  assign in_beats  = 9'((int'(z) + PAD_LLRS - 1) / PAD_LLRS);
  assign out_beats = cmd_buf.out_mode ? 9'((int'(z) + OBITS - 1) / OBITS)
                                      : 9'((int'(z) + PAD_LLRS - 1) / PAD_LLRS);

  assign in_cmd = in_data[$bits(ldpc_pkg::cmd_word_t)-1:0];
  assign in_seq = in_data[$bits(ldpc_pkg::seq_word_t)-1:0];

  always_comb begin
    unique case (in_st)
      I_CMD:   in_ack = dec_idle && (out_st == O_EMPTY) && !col_valid;
      default: in_ack = 1'b1;
    endcase
  end
  assign take = in_req && in_ack;

  // FSM in
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_st   <= I_CMD;
      cmd_buf <= '0;
      seq_cnt <= '0;
      col_cnt <= '0;
      in_beat <= '0;
    end else if (take) begin
      unique case (in_st)
        I_CMD: begin
          cmd_buf <= in_cmd;
          seq_cnt <= '0;
          col_cnt <= '0;
          in_beat <= '0;
          in_st   <= in_cmd.operation ? I_SEQ : I_LLR;
        end
        I_SEQ: begin
          seq_cnt <= seq_cnt + 1'b1;
          if (in_seq.seq_end) in_st <= I_LLR;
        end
        I_LLR: begin
          if (in_beat == in_beats - 1) begin
            in_beat <= '0;
            col_cnt <= col_cnt + 1'b1;
            if (col_cnt == cmd_buf.n_cols - 1) in_st <= I_CMD;
          end else begin
            in_beat <= in_beat + 1'b1;
          end
        end
        default: in_st <= I_CMD;
      endcase
    end
  end

  assign cmd_wr       = take && (in_st == I_CMD);
  assign cmd_out      = in_cmd;
  assign seq_wr       = take && (in_st == I_SEQ);
  assign seq_addr     = seq_cnt;
  assign seq_data     = in_seq;
  assign llr_wr       = take && (in_st == I_LLR);
  assign llr_col      = col_cnt;
  assign llr_col_done = llr_wr && (in_beat == in_beats - 1);

  // lane i of the column takes LLR (i mod 6) of the beat number i / 6
  always_comb begin
    for (int i = 0; i < Z_MAX; i++) begin
      llr_lanes[i] = in_data[(i % PAD_LLRS)*BQ +: BQ];
      llr_mask[i]  = (i / PAD_LLRS == int'(in_beat)) && (i < int'(z));
    end
  end

  // FSM out
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_st   <= O_EMPTY;
      out_beat <= '0;
    end else begin
      unique case (out_st)
        O_EMPTY: if (col_valid) begin
          out_beat <= '0;
          out_st   <= O_SEND;
        end
        O_SEND: if (out_ack) begin
          if (out_beat == out_beats - 1) out_st <= O_EMPTY;
          out_beat <= out_beat + 1'b1;
        end
        default: out_st <= O_EMPTY;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (out_st == O_EMPTY && col_valid) begin
      obuf <= col_data;
      for (int i = 0; i < Z_MAX; i++) obits[i] <= col_data[i][BQ-1];
    end
  end

  assign obuf_ready = (out_st == O_EMPTY);
  assign out_req    = (out_st == O_SEND);

  always_comb begin
    obuf_sh  = obuf >> (int'(out_beat) * PAD_LLRS * BQ);
    obits_sh = obits >> (int'(out_beat) * OBITS);
    out_data = '0;
    if (cmd_buf.out_mode)
      out_data = obits_sh[PAD_W-1:0];
    else
      out_data[PAD_LLRS*BQ-1:0] = obuf_sh[PAD_LLRS*BQ-1:0];
  end

  // a decoded column may only arrive while the buffer is empty
  assert property (@(posedge clk) disable iff (!rst_n) col_valid |-> out_st == O_EMPTY)
    else $error("ldpc_interface: column delivered while the output buffer is busy");

endmodule
