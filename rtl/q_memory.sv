// q_memory: the Q memory, one word per prototype column, each word holding
// the Z_MAX Q messages (running LLR totals) of that column.
//
// Size NP x Z_MAX x BQ = 68 x 384 x 7 bits by default. One write port with a
// per-lane write mask (the SEL phase writes the lanes of the active groups,
// the loader writes a few lanes per pad beat) and one synchronous read port.
// A read of the address written in the same cycle returns the new data for
// the written lanes: this is the Q-memory forwarding that feeds the SEL
// result straight back to the cyclic shifter and saves a write/read round
// trip. The forwarding rule is the architecture's; the lane mask is this
// design's choice.
//
// Timing: write at the rising edge; rd_data is valid one cycle after rd_en.
module q_memory #(
  parameter int Z_MAX = ldpc_pkg::Z_MAX,
  parameter int NP    = ldpc_pkg::NP_MAX,
  parameter int W     = ldpc_pkg::BQ,
  parameter int AW    = ldpc_pkg::COL_W
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  logic [Z_MAX-1:0]        wr_mask,
  input  logic [Z_MAX-1:0][W-1:0] wr_data,
  input  logic                    rd_en,
  input  logic [AW-1:0]           rd_addr,
  output logic [Z_MAX-1:0][W-1:0] rd_data,
  output logic                    fwd_hit   // forwarding used this cycle
);

  logic [Z_MAX-1:0][W-1:0] mem [NP];

  assign fwd_hit = rd_en && wr_en && (wr_addr == rd_addr);

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < NP)
      for (int i = 0; i < Z_MAX; i++)
        if (wr_mask[i]) mem[wr_addr][i] <= wr_data[i];
    if (rd_en) begin
      for (int i = 0; i < Z_MAX; i++) begin
        if (fwd_hit && wr_mask[i])
          rd_data[i] <= wr_data[i];
        else if (int'(rd_addr) < NP)
          rd_data[i] <= mem[rd_addr][i];
        else
          rd_data[i] <= '0;
      end
    end
  end

endmodule
