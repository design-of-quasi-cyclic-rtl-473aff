// shift_memory: the shift memory and shift buffer that let one cyclic
// shifter work with delta shifts.
//
// The Q memory keeps each column in the rotation it had after its last
// update, c_n. The shift memory holds c_n for every column; the shift buffer
// holds, per column, the prototype shift [Hp]m,n of the block the MIN phase
// has most recently read. When the SEL phase writes the column back to the Q
// memory, the buffered value is copied into the shift memory, so c_n changes
// only once the Q messages are really updated.
//
// For a read of column rd_col with target rotation rd_h the unit returns the
// delta shift (Z - c_n + rd_h) mod Z combinationally. A copy into the shift
// memory in the same cycle as a read of the same column is forwarded. With
// rd_h = 0 the delta undoes the stored rotation (read-out of the decoded
// word). `clear` sets all c_n (and the buffer) to 0 when a new codeword is loaded.
//
// Timing: buf_wr and upd_en act at the rising clock edge; delta is
// combinational from rd_col, rd_h, z and the forwarded update.
module shift_memory #(
  parameter int NP      = ldpc_pkg::NP_MAX,
  parameter int COL_W   = ldpc_pkg::COL_W,
  parameter int SHIFT_W = ldpc_pkg::SHIFT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,     // new codeword: all rotations 0
  input  logic [SHIFT_W-1:0] z,
  // MIN phase read: target rotation of the block
  input  logic [COL_W-1:0]   rd_col,
  input  logic [SHIFT_W-1:0] rd_h,
  input  logic               buf_wr,    // remember rd_h for rd_col
  output logic [SHIFT_W-1:0] delta,
  // SEL phase write-back of a column
  input  logic               upd_en,
  input  logic [COL_W-1:0]   upd_col
);

  logic [SHIFT_W-1:0] cur_shift [NP];   // shift memory: c_n
  logic [SHIFT_W-1:0] shift_buf [NP];   // shift buffer: pending [Hp]m,n
  logic [SHIFT_W-1:0] c_n;
  logic [SHIFT_W:0]   sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NP; n++) begin
        cur_shift[n] <= '0;
        shift_buf[n] <= '0;
      end
    end else if (clear) begin
      for (int n = 0; n < NP; n++) begin
        cur_shift[n] <= '0;
        shift_buf[n] <= '0;
      end
    end else begin
      if (upd_en && int'(upd_col) < NP) cur_shift[upd_col] <= shift_buf[upd_col];
      if (buf_wr && int'(rd_col) < NP) shift_buf[rd_col] <= rd_h;
    end
  end

  always_comb begin
    if (int'(rd_col) >= NP)
      c_n = '0;
    else if (upd_en && upd_col == rd_col)
      c_n = shift_buf[upd_col];
    else
      c_n = cur_shift[rd_col];
    sum = {1'b0, z} - {1'b0, c_n} + {1'b0, rd_h};
    if (sum >= {1'b0, z}) sum = sum - {1'b0, z};
    delta = sum[SHIFT_W-1:0];
  end

endmodule
