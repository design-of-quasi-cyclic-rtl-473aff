// tb_ldpc_interface: sends frames through the pad interface with random
// request gaps: a command word, optionally a schedule, and the LLR columns
// for a random lifting size and column count. It checks that the command is
// only accepted while the decoder is idle and the output buffer is empty,
// that the command and schedule words reach the control unit and sequence
// memory in order, that the LLR beats build exactly the expected lanes of
// every column (nothing at or above Z), and that the column-done pulse comes
// with the last beat of each column. It then delivers decoded columns and
// reassembles the output beats (random acknowledge gaps) in both output
// formats: six 7-bit LLRs per beat, or 48 hard-decision bits per beat.
`timescale 1ns/1ps
module tb_ldpc_interface;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_req = 0, in_ack, out_req, out_ack = 0, dec_idle = 1;
  logic [PAD_W-1:0] in_data = '0, out_data;
  logic cmd_wr, seq_wr, llr_wr, llr_col_done, col_valid = 0, obuf_ready;
  cmd_word_t cmd_out;
  logic [SEQ_AW-1:0] seq_addr;
  seq_word_t seq_data;
  logic [COL_W-1:0] llr_col;
  logic [Z_MAX-1:0] llr_mask;
  logic [Z_MAX-1:0][BQ-1:0] llr_lanes, col_data = '0;
  int checks = 0, failures = 0;
  logic [BQ-1:0] Qm [NP_MAX][Z_MAX];
  logic [BQ-1:0] Qx [NP_MAX][Z_MAX];

  ldpc_interface dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", msg, $time); end
  endtask

  // one beat: wait for acceptance, sampled before the clock edge
  task automatic send(logic [PAD_W-1:0] d, output bit was_cmd, output bit was_seq,
                      output bit was_llr, output bit done);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    in_req = 1; in_data = d;
    #1;
    while (!in_ack) begin @(negedge clk); #1; end
    was_cmd = cmd_wr; was_seq = seq_wr; was_llr = llr_wr; done = llr_col_done;
    if (llr_wr)
      for (int i = 0; i < Z_MAX; i++) if (llr_mask[i]) Qm[llr_col][i] = llr_lanes[i];
    @(negedge clk);
    in_req = 0;
  endtask

  task automatic frame(int mode, int ncols, bit op, bit omode, int nseq);
    cmd_word_t c;
    int z, beats, obeats, nd;
    bit wc, ws, wl, dn;
    z = int'(lift_size(6'(mode)));
    beats = (z + PAD_LLRS - 1) / PAD_LLRS;
    c = cmd_word_t'($urandom);
    c.mode = 6'(mode); c.n_cols = 7'(ncols); c.operation = op; c.out_mode = omode;
    // a busy decoder holds the command back
    @(negedge clk);
    dec_idle = 0; in_req = 1; in_data = PAD_W'(c);
    repeat (3) begin #1 chk(!in_ack && !cmd_wr, "command held while decoder busy"); @(negedge clk); end
    dec_idle = 1; in_req = 0;
    send(PAD_W'(c), wc, ws, wl, dn);
    chk(wc && !ws && !wl, "command beat");
    chk(dut.cmd_buf == c, "command buffered");
    if (op)
      for (int a = 0; a < nseq; a++) begin
        seq_word_t w;
        w = seq_word_t'({$urandom, $urandom});
        w.seq_end = (a == nseq - 1);
        fork
          begin #3 chk(!seq_wr || (int'(seq_addr) == a && seq_data == w), "sequence word and address"); end
        join_none
        send(PAD_W'(w), wc, ws, wl, dn);
        chk(ws && !wc && !wl, "sequence beat");
      end
    for (int n = 0; n < ncols; n++)
      for (int i = 0; i < Z_MAX; i++) begin Qm[n][i] = '0; Qx[n][i] = '0; end
    nd = 0;
    for (int n = 0; n < ncols; n++)
      for (int b = 0; b < beats; b++) begin
        logic [PAD_W-1:0] d;
        d = {$urandom, $urandom};
        for (int k = 0; k < PAD_LLRS; k++)
          if (b * PAD_LLRS + k < z) Qx[n][b*PAD_LLRS+k] = d[k*BQ +: BQ];
        send(d, wc, ws, wl, dn);
        chk(wl && !wc && !ws, "LLR beat");
        chk(dn == (b == beats - 1), "column done with the last beat");
        if (dn) nd++;
      end
    chk(nd == ncols, "one done pulse per column");
    for (int n = 0; n < ncols; n++) begin
      int bad;
      bad = 0;
      for (int i = 0; i < Z_MAX; i++) if (Qm[n][i] != Qx[n][i]) bad++;
      chk(bad == 0, $sformatf("column %0d: %0d lanes wrong", n, bad));
    end
    // output: deliver columns, read beats back
    obeats = omode ? (z + PAD_W - 1) / PAD_W : beats;
    for (int n = 0; n < ncols && n < 6; n++) begin
      logic [Z_MAX-1:0][BQ-1:0] cd;
      int got;
      for (int i = 0; i < Z_MAX; i++) cd[i] = (i < z) ? BQ'($urandom) : '0;
      @(negedge clk);
      #1 chk(obuf_ready && !out_req, "buffer empty before a column");
      col_valid = 1; col_data = cd;
      @(negedge clk);
      col_valid = 0; col_data = '0;
      #1 chk(!obuf_ready, "buffer busy after a column");
      in_req = 1;
      #1 chk(!in_ack, "no command while the buffer is busy");
      in_req = 0;
      got = 0;
      for (int b = 0; b < obeats; b++) begin
        int bad;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        #1 chk(out_req, "output beat requested");
        bad = 0;
        if (omode) begin
          for (int k = 0; k < PAD_W; k++)
            if (b * PAD_W + k < z && out_data[k] != cd[b*PAD_W+k][BQ-1]) bad++;
        end else begin
          for (int k = 0; k < PAD_LLRS; k++)
            if (b * PAD_LLRS + k < z && out_data[k*BQ +: BQ] != cd[b*PAD_LLRS+k]) bad++;
        end
        chk(bad == 0, $sformatf("output beat %0d of column %0d", b, n));
        out_ack = 1;
        @(negedge clk);
        out_ack = 0;
        got++;
      end
      #1 chk(!out_req && obuf_ready, "buffer empty after the last beat");
    end
  endtask

  initial begin
    #2 rst_n = 0;
    #10 rst_n = 1;
    frame(50, 3, 1, 0, 5);
    frame(50, 2, 0, 1, 0);
    frame(3, 68, 1, 1, 12);
    for (int f = 0; f < 10; f++)
      frame($urandom_range(0, 50), $urandom_range(1, 20), $urandom_range(0, 1),
            $urandom_range(0, 1), $urandom_range(1, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
