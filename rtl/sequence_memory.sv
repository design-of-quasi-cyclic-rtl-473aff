// sequence_memory: holds the decoding schedule, one 47-bit sequence word per
// cycle of one iteration plus the tail that drains the last layer.
//
// Each word names the Q column the MIN phase reads, the T column the SEL
// phase processes, the R-memory read and write addresses, the prototype
// shift, the MIN/SEL stall bits and the row/iteration/sequence end markers
// (ldpc_pkg::seq_word_t). The schedule is computed off-chip, with conflicts
// between layers resolved by reordering and stalls, and written here during
// configuration. 512 words with a 9-bit address, as in the architecture.
//
// Timing: one write port; synchronous read, rd_data valid one cycle after
// rd_en.
module sequence_memory #(
  parameter int DEPTH = ldpc_pkg::SEQ_DEPTH,
  parameter int AW    = ldpc_pkg::SEQ_AW
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  ldpc_pkg::seq_word_t wr_data,
  input  logic                rd_en,
  input  logic [AW-1:0]       rd_addr,
  output ldpc_pkg::seq_word_t rd_data
);

  ldpc_pkg::seq_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= (int'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
  end

endmodule
