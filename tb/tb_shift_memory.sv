// tb_shift_memory: random MIN reads (with shift-buffer writes), SEL updates
// and clears against a model of the per-column rotation c_n and the shift
// buffer; checks delta = (Z - c_n + h) mod Z, including the case where the
// column is updated in the same cycle (forwarded) and read-outs with h = 0.
`timescale 1ns/1ps
module tb_shift_memory;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, buf_wr = 0, upd_en = 0;
  logic [SHIFT_W-1:0] z, rd_h = '0, delta;
  logic [COL_W-1:0] rd_col = '0, upd_col = '0;
  int checks = 0, failures = 0, fwd = 0;
  int cur [NP_MAX], bufm [NP_MAX];

  shift_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    int zz, e, c;
    #2 rst_n = 0;
    #10 rst_n = 1;
    for (int n = 0; n < NP_MAX; n++) begin cur[n] = 0; bufm[n] = 0; end
    zz = 384; z = SHIFT_W'(zz);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 1000 == 999) begin
        zz = int'(lift_size(6'($urandom_range(0, N_LIFT - 1)))); z = SHIFT_W'(zz);
        clear = 1; buf_wr = 0; upd_en = 0;
        @(posedge clk); #1 clear = 0;
        for (int n = 0; n < NP_MAX; n++) begin cur[n] = 0; bufm[n] = 0; end
        continue;
      end
      rd_col  = COL_W'($urandom_range(0, NP_MAX - 1));
      rd_h    = ($urandom_range(0, 3) == 0) ? '0 : SHIFT_W'($urandom_range(0, zz - 1));
      buf_wr  = $urandom_range(0, 1);
      upd_en  = $urandom_range(0, 1);
      upd_col = ($urandom_range(0, 2) == 0) ? rd_col : COL_W'($urandom_range(0, NP_MAX - 1));
      #1;
      c = (upd_en && upd_col == rd_col) ? bufm[upd_col] : cur[rd_col];
      if (upd_en && upd_col == rd_col) fwd++;
      e = (zz - (c % zz) + int'(rd_h)) % zz;
      checks++;
      if (int'(delta) != e) begin
        failures++;
        if (failures < 5) $display("col %0d h %0d: delta %0d expected %0d", rd_col, rd_h, delta, e);
      end
      @(posedge clk);
      if (upd_en) cur[upd_col] = bufm[upd_col];
      if (buf_wr) bufm[rd_col] = int'(rd_h);
    end
    checks++; if (fwd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
