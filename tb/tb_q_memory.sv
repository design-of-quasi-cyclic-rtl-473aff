// tb_q_memory: random masked writes and reads against a model of the
// 68 x 384 x 7-bit Q memory; checks the one-cycle read latency and that a
// read of the column written in the same cycle returns the new data in the
// written lanes (forwarding) and the old data elsewhere.
`timescale 1ns/1ps
module tb_q_memory;
  import ldpc_pkg::*;
  logic clk = 0, wr_en = 0, rd_en = 0, fwd_hit;
  logic [COL_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [Z_MAX-1:0] wr_mask = '0;
  logic [Z_MAX-1:0][BQ-1:0] wr_data = '0, rd_data, exp_q;
  logic [Z_MAX-1:0][BQ-1:0] model [NP_MAX];
  int checks = 0, failures = 0, fwd = 0;

  q_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill every column
    for (int n = 0; n < NP_MAX; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = COL_W'(n); wr_mask = '1;
      for (int i = 0; i < Z_MAX; i++) wr_data[i] = BQ'($urandom);
      model[n] = wr_data;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      wr_en   = $urandom_range(0, 1);
      wr_addr = COL_W'($urandom_range(0, NP_MAX - 1));
      for (int i = 0; i < Z_MAX; i++) begin
        wr_mask[i] = $urandom_range(0, 1);
        wr_data[i] = BQ'($urandom);
      end
      rd_en   = 1;
      rd_addr = ($urandom_range(0, 2) == 0) ? wr_addr : COL_W'($urandom_range(0, NP_MAX - 1));
      exp_q = model[rd_addr];
      if (wr_en && wr_addr == rd_addr) begin
        fwd++;
        for (int i = 0; i < Z_MAX; i++) if (wr_mask[i]) exp_q[i] = wr_data[i];
      end
      if (wr_en) for (int i = 0; i < Z_MAX; i++) if (wr_mask[i]) model[wr_addr][i] = wr_data[i];
      @(posedge clk); #1;
      checks++;
      if (rd_data !== exp_q) begin
        failures++;
        if (failures < 5) $display("read of column %0d wrong", rd_addr);
      end
    end
    checks++; if (fwd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
