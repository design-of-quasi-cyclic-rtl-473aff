// tb_control_unit: runs the controller through several codewords with random
// schedules (loop length, tail length, stall and row-end bits), iteration
// counts, lifting sizes and column counts. The testbench holds the schedule
// in its own array with the sequence memory's one-cycle read latency and
// checks: the clearing of the rotations on a command, the start of decoding
// after the last column is loaded, the issued word addresses (loop repeated
// max_iters times, then the tail once), the stage-1 MIN/SEL enables, the
// first-iteration flag and the SEL arming after the first layer end, the
// clock-group enables ceil(Z/24) during decoding and none otherwise, the
// number of cycles from the first word to the first output read, and the
// read-out of every column in order with a randomly busy output buffer.
`timescale 1ns/1ps
module tb_control_unit;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 1;
  logic cmd_wr = 0, seq_wr = 0, llr_col_done = 0, obuf_ready = 1, out_col_valid = 0;
  cmd_word_t cmd_in = '0, cmd;
  logic [SEQ_AW-1:0] seq_wr_addr = '0, seq_rd_addr;
  seq_word_t seq_wr_data = '0, seq_rd_data = '0;
  logic [SHIFT_W-1:0] z;
  logic seq_rd_en, s1_min_en, s1_sel_en, s1_r_zero, s1_out_rd, shift_clear, idle, decoding;
  logic [COL_W-1:0] s1_out_col;
  seq_word_t s1_word;
  logic [N_GROUPS-1:0] group_en;
  int checks = 0, failures = 0;
  seq_word_t mem [SEQ_DEPTH];

  control_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (seq_rd_en) seq_rd_data <= mem[seq_rd_addr];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", msg, $time); end
  endtask

  task automatic frame(int lloop, int ltail, int iters, int mode, int ncols, bit newseq);
    int k, nwords, cyc, first_cyc, outs, expz, ng, prev_z;
    bit armed, prev_en;
    int prev_k;
    if (newseq) begin
      for (int a = 0; a < lloop + ltail; a++) begin
        seq_word_t w;
        w = seq_word_t'({$urandom, $urandom});
        w.iter_end = (a == lloop - 1);
        w.seq_end  = (a == lloop + ltail - 1);
        w.row_end  = ($urandom_range(0, 3) == 0);
        w.min_stall = ($urandom_range(0, 5) == 0);
        w.sel_stall = ($urandom_range(0, 5) == 0);
        mem[a] = w;
        @(negedge clk);
        seq_wr = 1; seq_wr_addr = SEQ_AW'(a); seq_wr_data = w;
      end
      @(negedge clk); seq_wr = 0;
      // make sure the first loop word range has a layer end
      mem[1].row_end = 1; mem[1].min_stall = 0;
      @(negedge clk); seq_wr = 1; seq_wr_addr = 1; seq_wr_data = mem[1];
      @(negedge clk); seq_wr = 0;
    end
    @(negedge clk);
    chk(idle && !decoding, "idle before command");
    cmd_in = '0;
    cmd_in.mode = 6'(mode); cmd_in.n_cols = 7'(ncols); cmd_in.max_iters = 4'(iters);
    cmd_in.operation = newseq;
    cmd_wr = 1;
    #1 chk(shift_clear, "shift_clear with the command");
    @(negedge clk); cmd_wr = 0;
    chk(!shift_clear, "shift_clear one cycle");
    expz = int'(z);
    chk(mode != 50 || expz == 384, "mode 50 is Z=384");
    chk(mode != 0 || expz == 2, "mode 0 is Z=2");
    ng = (expz + GROUP_SIZE - 1) / GROUP_SIZE;
    for (int c = 0; c < ncols; c++) begin
      repeat ($urandom_range(0, 3)) begin @(negedge clk); chk(!decoding && !seq_rd_en, "no decoding while loading"); end
      llr_col_done = 1; @(negedge clk); llr_col_done = 0;
    end
    // decoding
    k = 0; cyc = 0; first_cyc = -1; outs = 0; armed = 0; prev_en = 0; prev_k = 0;
    nwords = iters * lloop + ltail;
    while (outs < ncols && cyc < 20000) begin
      int exp_addr;
      #1;
      if (s1_out_rd && first_cyc < 0) first_cyc = cyc;
      // stage-1 checks for the word issued last cycle
      if (prev_en) begin
        seq_word_t w;
        w = mem[(prev_k < iters * lloop) ? prev_k % lloop : lloop + prev_k - iters * lloop];
        chk(s1_word == w, "stage-1 word");
        chk(s1_min_en == !w.min_stall, "MIN enable");
        chk(s1_sel_en == (!w.sel_stall && armed), "SEL enable");
        chk(s1_r_zero == (prev_k < lloop), "first-iteration flag");
        if (!w.min_stall && w.row_end) armed = 1;
      end else begin
        chk(!s1_min_en && !s1_sel_en, "no stage-1 enables without a word");
      end
      if (decoding) begin
        for (int g = 0; g < N_GROUPS; g++) chk(group_en[g] == (g < ng), "group enable");
      end else chk(group_en == '0, "groups gated when not decoding");
      prev_en = seq_rd_en;
      if (seq_rd_en) begin
        exp_addr = (k < iters * lloop) ? k % lloop : lloop + k - iters * lloop;
        chk(int'(seq_rd_addr) == exp_addr, $sformatf("word %0d address %0d expected %0d", k, seq_rd_addr, exp_addr));
        prev_k = k;
        k++;
      end
      if (s1_out_rd) begin
        chk(int'(s1_out_col) == outs, "output column order");
        outs++;
        fork begin @(negedge clk); @(negedge clk); out_col_valid = 1; @(negedge clk); out_col_valid = 0; end join_none
      end
      @(negedge clk);
      obuf_ready = (first_cyc < 0) || ($urandom_range(0, 2) != 0);
      cyc++;
    end
    obuf_ready = 1;
    chk(k == nwords, $sformatf("words issued %0d expected %0d", k, nwords));
    // first word is issued in cycle 0 of the loop above
    // words, 4 flush cycles, one cycle to enter the issue state
    chk(first_cyc == nwords + 4 + 1,
        $sformatf("first output read at %0d, %0d words", first_cyc, nwords));
    repeat (6) @(negedge clk);
    chk(idle, "idle after read-out");
  endtask

  initial begin
    #2 rst_n = 0;
    #10 rst_n = 1;
    frame(9, 3, 4, 50, 68, 1);
    frame(9, 3, 2, 20, 5, 0);
    for (int f = 0; f < 12; f++)
      frame($urandom_range(2, 40), $urandom_range(1, 6), $urandom_range(1, 15),
            $urandom_range(0, 50), $urandom_range(1, 68), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
