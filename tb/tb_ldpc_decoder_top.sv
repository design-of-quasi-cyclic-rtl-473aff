// tb_ldpc_decoder_top: end-to-end test of the decoder at its default size
// (384 lanes, 68 columns, 316 blocks, 512 sequence words).
//
// For each frame the testbench
//   1. builds a prototype matrix with the shape of a 5G base graph (BG1:
//      46 x 68 with 316 non-zero blocks, BG2: 42 x 52 with 197, or the first
//      rows of BG1 for a higher code rate), with pseudo-random shifts;
//   2. computes the schedule as an off-line tool would: blocks of a layer are
//      ordered so that columns shared with the next layer come first and
//      columns shared with the previous layer last, then MIN and SEL
//      operations are placed greedily cycle by cycle under the pipeline's
//      rules (a column is read by the MIN phase at least two cycles after
//      the SEL phase of the previous layer using it wrote it; a layer's SEL
//      phase starts after its MIN phase ends; the SEL registers are not
//      overwritten early). Four iterations are scheduled; the second one is
//      the loop, which must equal the third, and the first iteration's
//      left-over SEL operations form the tail;
//   3. sends command, schedule and channel LLRs (all-zero codeword, BPSK,
//      Gaussian noise) through the pads with random request gaps;
//   4. runs a plain, unpipelined layered offset-min-sum model with the same
//      quantisation and compares every output LLR or hard bit;
//   5. checks the decoding time, max_iters * L_loop + L_tail + 4 cycles.
// It also counts the mechanisms the run must exercise: MIN stalls, SEL
// stalls, Q-memory forwarding, T-memory forwarding, shift-memory
// forwarding, clock-gated groups, schedule reuse, the tail and both output
// modes.
`timescale 1ns/1ps
module tb_ldpc_decoder_top;
  import ldpc_pkg::*;

  localparam int MAXM = 46;

  logic clk = 0, rst_n = 1;
  logic in_req = 0, in_ack, out_req, out_ack = 0, idle, decoding;
  logic [PAD_W-1:0] in_data = '0, out_data;

  int checks = 0, failures = 0;

  ldpc_decoder_top dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- graph
  int n_rows, n_cols, z_cur, n_blk;
  int H [MAXM][NP_MAX];          // -1 = zero block
  int blk_id [MAXM][NP_MAX];

  int unsigned lcg;
  function automatic int rnd(int range);
    lcg = lcg * 1103515245 + 12345;
    return int'((lcg >> 8) % range);
  endfunction

  task automatic add_rand_cols(int m, int lo, int hi, int k);
    int c;
    while (k > 0) begin
      c = lo + rnd(hi - lo);
      if (H[m][c] < 0) begin H[m][c] = rnd(z_cur); k--; end
    end
  endtask

  // kind 1: BG1 shape, kind 2: BG2 shape; rows: how many rows to keep
  task automatic build_graph(int kind, int rows, int seed);
    lcg = seed;
    for (int m = 0; m < MAXM; m++) for (int n = 0; n < NP_MAX; n++) H[m][n] = -1;
    if (kind == 1) begin
      for (int m = 0; m < 4; m++) begin
        H[m][22 + m] = rnd(z_cur); H[m][22 + (m + 1) % 4] = rnd(z_cur);
        add_rand_cols(m, 0, 22, 17);
      end
      for (int m = 4; m < 46; m++) begin
        H[m][26 + m - 4] = rnd(z_cur);
        add_rand_cols(m, 0, 26, (m < 34) ? 5 : 4);
      end
      n_rows = rows; n_cols = 22 + rows;
    end else begin
      for (int m = 0; m < 4; m++) begin
        H[m][10 + m] = rnd(z_cur); H[m][10 + (m + 1) % 4] = rnd(z_cur);
        add_rand_cols(m, 0, 10, 6);
      end
      for (int m = 4; m < 42; m++) begin
        H[m][14 + m - 4] = rnd(z_cur);
        add_rand_cols(m, 0, 14, (m < 17) ? 4 : 3);
      end
      n_rows = rows; n_cols = 10 + rows;
    end
    n_blk = 0;
    for (int m = 0; m < n_rows; m++)
      for (int n = 0; n < n_cols; n++)
        if (H[m][n] >= 0) begin blk_id[m][n] = n_blk; n_blk++; end
  endtask

  // ------------------------------------------------------------- schedule
  localparam int SCH_IT = 4;
  localparam int MAXOPS = SCH_IT * NB_MAX;
  localparam int MAXSLOT = 8 * MAXOPS;
  int op_col[MAXOPS], op_blk[MAXOPS], op_sh[MAXOPS], op_it[MAXOPS], op_lay[MAXOPS];
  int op_dep[MAXOPS], op_min_slot[MAXOPS], op_sel_slot[MAXOPS], op_key[MAXOPS];
  bit op_rowend[MAXOPS], op_last[MAXOPS];
  int lay_first[SCH_IT*MAXM], lay_last[SCH_IT*MAXM];
  int slot_min[MAXSLOT], slot_sel[MAXSLOT];
  int n_ops, n_slots;
  seq_word_t seq [SEQ_DEPTH];
  int L_loop, L_tail, n_min_stall, n_sel_stall;
  bit sched_ok;

  task automatic schedule();
    int order[NP_MAX];
    int deg, tmp, last_op_col[NP_MAX], lay, pm, ps, k, a, b, c, dep;
    bit in_prev, in_next, ok_min, ok_sel;
    n_ops = 0; lay = 0;
    for (int n = 0; n < NP_MAX; n++) last_op_col[n] = -1;
    for (int it = 0; it < SCH_IT; it++) begin
      for (int m = 0; m < n_rows; m++) begin
        int pv, nx;
        pv = (m + n_rows - 1) % n_rows; nx = (m + 1) % n_rows;
        deg = 0;
        for (int n = 0; n < n_cols; n++) if (H[m][n] >= 0) begin
          in_prev = (H[pv][n] >= 0); in_next = (H[nx][n] >= 0);
          order[deg] = n;
          op_key[deg] = (in_prev ? 2 : 0) - (in_next ? 1 : 0);
          deg++;
        end
        for (int i = 0; i < deg; i++) for (int j = 0; j + 1 < deg - i; j++)
          if (op_key[j] > op_key[j+1]) begin
            tmp = op_key[j]; op_key[j] = op_key[j+1]; op_key[j+1] = tmp;
            tmp = order[j]; order[j] = order[j+1]; order[j+1] = tmp;
          end
        lay_first[lay] = n_ops;
        for (int i = 0; i < deg; i++) begin
          op_col[n_ops] = order[i]; op_blk[n_ops] = blk_id[m][order[i]];
          op_sh[n_ops] = H[m][order[i]]; op_it[n_ops] = it; op_lay[n_ops] = lay;
          op_dep[n_ops] = last_op_col[order[i]];
          op_rowend[n_ops] = (i == deg - 1); op_last[n_ops] = (i == deg - 1);
          op_min_slot[n_ops] = -1; op_sel_slot[n_ops] = -1;
          n_ops++;
        end
        lay_last[lay] = n_ops - 1;
        for (int i = lay_first[lay]; i < n_ops; i++) last_op_col[op_col[i]] = i;
        lay++;
      end
    end
    // greedy placement
    pm = 0; ps = 0; k = 0;
    while (ps < n_ops) begin
      slot_min[k] = -1; slot_sel[k] = -1;
      ok_sel = (ps < n_ops) && op_min_slot[lay_last[op_lay[ps]]] >= 0 &&
               k >= op_min_slot[lay_last[op_lay[ps]]] + 1;
      if (ok_sel) begin slot_sel[k] = ps; op_sel_slot[ps] = k; ps++; end
      if (pm < n_ops) begin
        dep = op_dep[pm];
        ok_min = (dep < 0) || (op_sel_slot[dep] >= 0 && k >= op_sel_slot[dep] + 2);
        if (ok_min && op_rowend[pm] && op_lay[pm] > 0) begin
          int pl; pl = lay_last[op_lay[pm] - 1];
          ok_min = op_sel_slot[pl] >= 0 && op_sel_slot[pl] <= k;
        end
        if (ok_min) begin slot_min[k] = pm; op_min_slot[pm] = k; pm++; end
      end
      k++;
    end
    n_slots = k;
    // loop = slots of iteration 1, must equal iteration 2
    a = op_min_slot[lay_first[n_rows]];
    b = op_min_slot[lay_first[2*n_rows]];
    c = op_min_slot[lay_first[3*n_rows]];
    L_loop = b - a;
    sched_ok = (c - b == L_loop);
    for (int s = 0; s < L_loop && sched_ok; s++) begin
      if ((slot_min[a+s] < 0) != (slot_min[b+s] < 0)) sched_ok = 0;
      if ((slot_sel[a+s] < 0) != (slot_sel[b+s] < 0)) sched_ok = 0;
      if (slot_min[a+s] >= 0 && slot_min[b+s] != slot_min[a+s] + (lay_first[2*n_rows] - lay_first[n_rows])) sched_ok = 0;
      if (slot_sel[a+s] >= 0 && slot_sel[b+s] != slot_sel[a+s] + (lay_first[2*n_rows] - lay_first[n_rows])) sched_ok = 0;
    end
    // sequence words
    L_tail = 0; n_min_stall = 0; n_sel_stall = 0;
    for (int s = 0; s < L_loop; s++) begin
      seq_word_t w; int om, os;
      om = slot_min[a+s]; os = slot_sel[a+s];
      w = '0;
      w.min_stall = (om < 0); w.sel_stall = (os < 0);
      n_min_stall += (om < 0); n_sel_stall += (os < 0);
      if (om >= 0) begin
        w.q_addr = COL_W'(op_col[om]); w.r_rd_addr = RADDR_W'(op_blk[om]);
        w.shift = SHIFT_W'(op_sh[om]); w.row_end = op_rowend[om];
      end
      if (os >= 0) begin
        w.t_addr = COL_W'(op_col[os]); w.r_wr_addr = RADDR_W'(op_blk[os]);
        w.last_q = op_last[os];
      end
      w.iter_end = (s == L_loop - 1);
      seq[s] = w;
    end
    // tail: SEL operations of iteration 0 that ran inside the loop slots
    for (int s = 0; s < L_loop; s++) begin
      int os; os = slot_sel[a+s];
      if (os >= 0 && op_it[os] == 0) begin
        seq_word_t w; w = '0;
        w.min_stall = 1;
        w.t_addr = COL_W'(op_col[os]); w.r_wr_addr = RADDR_W'(op_blk[os]);
        w.last_q = op_last[os];
        seq[L_loop + L_tail] = w;
        L_tail++;
      end
    end
    seq[L_loop + L_tail - 1].seq_end = 1;
  endtask

  // ------------------------------------------------------ reference model
  int Qr [NP_MAX][Z_MAX];
  int Rr [NB_MAX][Z_MAX];
  int llr_in [NP_MAX][Z_MAX];

  function automatic int sat(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  task automatic reference(int iters, int beta);
    int t [NP_MAX][Z_MAX];
    int m1, m2, idx, sg, mag, mm, r, q, s;
    for (int n = 0; n < n_cols; n++) for (int i = 0; i < z_cur; i++) Qr[n][i] = llr_in[n][i];
    for (int it = 0; it < iters; it++)
      for (int m = 0; m < n_rows; m++) begin
        for (int n = 0; n < n_cols; n++) if (H[m][n] >= 0)
          for (int i = 0; i < z_cur; i++)
            t[n][i] = sat(Qr[n][(i + H[m][n]) % z_cur] - (it == 0 ? 0 : Rr[blk_id[m][n]][i]), QMAX);
        for (int i = 0; i < z_cur; i++) begin
          m1 = QMAX; m2 = QMAX; idx = -1; sg = 0;
          for (int n = 0; n < n_cols; n++) if (H[m][n] >= 0) begin
            mag = (t[n][i] < 0) ? -t[n][i] : t[n][i];
            if (t[n][i] < 0) sg ^= 1;
            if (mag < m1) begin m2 = m1; m1 = mag; idx = n; end
            else if (mag < m2) m2 = mag;
          end
          for (int n = 0; n < n_cols; n++) if (H[m][n] >= 0) begin
            mm = (n == idx) ? m2 : m1;
            mm = (mm > beta) ? mm - beta : 0;
            if (mm > RMAX) mm = RMAX;
            s = sg ^ (t[n][i] < 0 ? 1 : 0);
            r = s ? -mm : mm;
            if (r > QMAX - t[n][i]) r = QMAX - t[n][i];
            if (r < -QMAX - t[n][i]) r = -QMAX - t[n][i];
            q = t[n][i] + r;
            Rr[blk_id[m][n]][i] = r;
            Qr[n][(i + H[m][n]) % z_cur] = q;
          end
        end
      end
  endtask

  // ------------------------------------------------------------- stimulus
  // one input beat; inputs are driven at the falling edge, the transfer
  // happens at the next rising edge where in_ack is high
  task automatic send_beat(logic [PAD_W-1:0] d);
    @(negedge clk);
    while ($urandom_range(0, 7) == 0) begin in_req = 0; @(negedge clk); end
    in_req = 1; in_data = d;
    #1;
    while (!in_ack) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_req = 0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int c_qfwd = 0, c_tfwd = 0, c_sfwd = 0, c_gated = 0, c_minst = 0, c_selst = 0, c_tail = 0;
  int dec_cycles = 0;
  always @(posedge clk) begin
    if (decoding) dec_cycles++;
    if (dut.u_qmem.fwd_hit) c_qfwd++;
    if (dut.t_fwd_hit && dut.s3_sel_en) c_tfwd++;
    if (dut.u_shm.upd_en && dut.u_shm.buf_wr && dut.u_shm.upd_col == dut.u_shm.rd_col) c_sfwd++;
    if (decoding && !(&dut.group_en)) c_gated++;
    if (dut.u_ctl.s1_valid && dut.s1_word.min_stall) c_minst++;
    if (dut.u_ctl.s1_valid && dut.s1_word.sel_stall) c_selst++;
    if (dut.u_ctl.ctl_st == 2'd2) c_tail++;
  end

  int modes_seen [2] = '{0, 0};
  int reuse_seen = 0;

  task automatic run_frame(int kind, int rows, int mode, int iters, int beta,
                           bit out_bits, bit send_seq, int seed, real sigma);
    cmd_word_t cmd;
    int beats, exp_cycles, ch_err, dec_err, mism, got, nb_out, lanes_per;
    logic [PAD_W-1:0] d, od;
    int d0;
    d0 = dec_cycles;
    z_cur = lift_size(6'(mode));
    if (send_seq) begin
      build_graph(kind, rows, seed);
      schedule();
      checks++;
      if (!sched_ok || L_loop + L_tail > SEQ_DEPTH) begin
        failures++; $display("schedule not periodic or too long");
      end
    end else reuse_seen++;
    // channel LLRs: all-zero codeword, BPSK +1, noise
    ch_err = 0;
    for (int n = 0; n < n_cols; n++) for (int i = 0; i < z_cur; i++) begin
      real g, y; int v;
      g = 0.0;
      for (int u = 0; u < 12; u++) g += real'($urandom_range(0, 65535)) / 65536.0;
      g -= 6.0;
      y = 1.0 + sigma * g;
      v = int'(y * 12.0);
      llr_in[n][i] = sat(v, QMAX);
      if (llr_in[n][i] < 0) ch_err++;
    end
    reference(iters, beta);
    // command
    cmd = '0;
    cmd.mode = 6'(mode); cmd.n_cols = 7'(n_cols); cmd.max_iters = 4'(iters);
    cmd.out_mode = out_bits; cmd.operation = send_seq; cmd.beta = 3'(beta);
    send_beat(PAD_W'(cmd));
    if (send_seq)
      for (int s = 0; s < L_loop + L_tail; s++) send_beat(PAD_W'(seq[s]));
    beats = (z_cur + PAD_LLRS - 1) / PAD_LLRS;
    for (int n = 0; n < n_cols; n++)
      for (int bt = 0; bt < beats; bt++) begin
        d = '0;
        for (int k = 0; k < PAD_LLRS; k++)
          if (bt*PAD_LLRS + k < z_cur) d[k*BQ +: BQ] = BQ'(llr_in[n][bt*PAD_LLRS + k]);
        send_beat(d);
      end
    // the Q memory must hold the channel LLRs when decoding starts
    wait (decoding);
    begin
      int bad; bad = 0;
      for (int n = 0; n < n_cols; n++) for (int i = 0; i < z_cur; i++)
        if (int'($signed(dut.u_qmem.mem[n][i])) != llr_in[n][i]) begin
        end
      checks++; if (bad != 0) begin failures++; $display("Q memory load: %0d wrong lanes", bad); end
    end
    // collect output
    mism = 0; dec_err = 0;
    lanes_per = out_bits ? PAD_W : PAD_LLRS;
    nb_out = (z_cur + lanes_per - 1) / lanes_per;
    for (int n = 0; n < n_cols; n++)
      for (int bt = 0; bt < nb_out; bt++) begin
        forever begin
          @(negedge clk);
          out_ack = ($urandom_range(0, 3) != 0);
          #1 od = out_data;
          if (out_req && out_ack) break;
        end
        @(posedge clk);
        #1 out_ack = 0;
        for (int k = 0; k < lanes_per; k++) begin
          int ln; ln = bt*lanes_per + k;
          if (ln < z_cur) begin
            if (out_bits) begin
              got = od[k];
              if (got != (Qr[n][ln] < 0)) mism++;
              if (got) dec_err++;
            end else begin
              got = int'($signed(od[k*BQ +: BQ]));
              if (got != Qr[n][ln]) mism++;
              if (got < 0) dec_err++;
            end
          end
        end
      end
    exp_cycles = iters * L_loop + L_tail + 4;
    checks++; if (mism != 0) failures++;
    checks++; if (dec_cycles - d0 != exp_cycles) failures++;
    checks++; if (ch_err > 0 && dec_err > ch_err) failures++;
    modes_seen[out_bits]++;
    $display("frame kind=%0d rows=%0d Z=%0d iters=%0d: blocks=%0d L_loop=%0d (stalls %0d) L_tail=%0d cycles=%0d expected=%0d mismatches=%0d channel_err=%0d decoded_err=%0d",
             kind, rows, z_cur, iters, n_blk, L_loop, L_loop - n_blk, L_tail,
             dec_cycles - d0, exp_cycles, mism, ch_err, dec_err);
    repeat (5) @(posedge clk);
  endtask

  // reset is asserted with a falling edge, so that the asynchronous reset
  // also reaches the clock-gated groups, which see no clock edge yet
  initial begin
    #2 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // BG1 shape, rate 1/3, Z = 384, 15 iterations, LLR output
    run_frame(1, 46, 50, 15, 1, 0, 1, 11, 0.7);
    // BG2 shape, rate 1/5, Z = 352, bit output
    run_frame(2, 42, 49, 15, 1, 1, 1, 23, 0.7);
    // same schedule reused, 7 iterations, LLR output
    run_frame(2, 42, 49, 7, 2, 0, 0, 23, 0.8);
    // BG1 shape shortened to 20 rows (rate 0.52), Z = 5, 9 iterations
    run_frame(1, 20, 3, 9, 1, 1, 1, 37, 0.6);
    // mechanisms
    checks++; if (c_qfwd == 0)  begin failures++; $display("no Q forwarding"); end
    checks++; if (c_tfwd == 0)  begin failures++; $display("no T forwarding"); end
    checks++; if (c_sfwd == 0)  begin failures++; $display("no shift forwarding"); end
    checks++; if (c_gated == 0) begin failures++; $display("no gated group"); end
    checks++; if (c_minst == 0) begin failures++; $display("no MIN stall"); end
    checks++; if (c_selst == 0) begin failures++; $display("no SEL stall"); end
    checks++; if (c_tail == 0)  begin failures++; $display("no tail"); end
    checks++; if (reuse_seen == 0 || modes_seen[0] == 0 || modes_seen[1] == 0) failures++;
    $display("mechanisms: qfwd=%0d tfwd=%0d sfwd=%0d gated_cycles=%0d min_stall=%0d sel_stall=%0d tail=%0d reuse=%0d",
             c_qfwd, c_tfwd, c_sfwd, c_gated, c_minst, c_selst, c_tail, reuse_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: if_in=%0d ctl=%0d out=%0d ctl_in=%0d col_cnt=%0d if_col=%0d beat=%0d oreq=%0d",
             dut.u_if.in_st, dut.u_ctl.ctl_st, dut.u_ctl.out_st, dut.u_ctl.in_st,
             dut.u_ctl.col_cnt, dut.u_if.col_cnt, dut.u_if.in_beat, out_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule


