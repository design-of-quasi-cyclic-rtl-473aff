// tb_sequence_memory: writes all 512 sequence words with random contents,
// reads them back in random order and checks data and the one-cycle read
// latency (the output holds while rd_en is low).
`timescale 1ns/1ps
module tb_sequence_memory;
  import ldpc_pkg::*;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [SEQ_AW-1:0] wr_addr = '0, rd_addr = '0;
  seq_word_t wr_data = '0, rd_data, last;
  seq_word_t model [SEQ_DEPTH];
  int checks = 0, failures = 0;

  sequence_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < SEQ_DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = SEQ_AW'(a);
      wr_data = seq_word_t'({$urandom, $urandom});
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      rd_en = ($urandom_range(0, 3) != 0);
      rd_addr = SEQ_AW'($urandom_range(0, SEQ_DEPTH - 1));
      if (rd_en) last = model[rd_addr];
      @(posedge clk); #1;
      checks++;
      if (rd_data !== last) begin
        failures++;
        if (failures < 5) $display("address %0d read wrong", rd_addr);
      end
    end
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
