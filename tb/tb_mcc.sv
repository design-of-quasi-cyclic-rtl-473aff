// tb_mcc: drives one macro computation cell (8 lanes) through three
// iterations of six synthetic layers with the decoder's pipeline timing:
// R/T read addresses one cycle before each operation, the MIN operation of
// the next layer overlapping the SEL operations of the current one, and the
// SEL order reversed so that the first SEL column is the column the MIN phase
// wrote in the cycle before (T-memory forwarding). A lane model keeps the T
// and R memories and the minimum registers; every SEL output is compared.
`timescale 1ns/1ps
module tb_mcc;
  import ldpc_pkg::*;
  localparam int LANES = NCU_PER_MCC;
  logic clk = 0, rst_n = 1;
  logic [RADDR_W-1:0] r_rd_addr = '0, r_wr_addr = '0;
  logic [COL_W-1:0] t_rd_addr = '0, min_col = '0, sel_col = '0;
  logic min_valid = 0, min_row_end = 0, r_zero = 0, sel_valid = 0, t_fwd_hit;
  logic [LANES-1:0][BQ-1:0] q_shift = '0, q_new;
  logic [2:0] beta = 3'd1;
  int checks = 0, failures = 0;

  mcc dut (.*);
  always #5 clk = ~clk;

  // ---- schedule: NL layers per iteration, ITERS iterations ----
  localparam int NL = 6, ITERS = 3, SMAX = 400;
  int deg [NL];
  int lcol [NL][8];
  int mv [SMAX], mre [SMAX], mc [SMAX], mb [SMAX], mrz [SMAX], ml [SMAX];
  int sv [SMAX], sc [SMAX], sb [SMAX];
  int nslots;
  // ---- lane model ----
  int Tm [LANES][NP_MAX];
  int Rm [LANES][NB_MAX];
  int am1 [LANES], am2 [LANES], aidx [LANES], asg [LANES];
  int pm1 [LANES], pm2 [LANES], pidx [LANES], psg [LANES];
  int hits = 0;

  task automatic build_schedule();
    int a, used[NP_MAX];
    for (int s = 0; s < SMAX; s++) begin mv[s] = 0; sv[s] = 0; mc[s] = 0; sc[s] = 0; mb[s] = 0; sb[s] = 0; mre[s] = 0; mrz[s] = 0; end
    for (int l = 0; l < NL; l++) begin
      deg[l] = $urandom_range(3, 8);
      foreach (used[c]) used[c] = 0;
      for (int b = 0; b < deg[l]; b++) begin
        int c;
        do c = (l % 2) * 34 + $urandom_range(0, 33); while (used[c]);
        used[c] = 1; lcol[l][b] = c;
      end
    end
    a = 0;
    for (int it = 0; it < ITERS; it++)
      for (int l = 0; l < NL; l++) begin
        int d, dn;
        d = deg[l];
        for (int b = 0; b < d; b++) begin
          mv[a+b] = 1; mc[a+b] = lcol[l][b]; mb[a+b] = l*8 + b; mre[a+b] = (b == d-1);
          mrz[a+b] = (it == 0);
          // SEL in reverse order, starting right after the row end
          sv[a+d+b] = 1; sc[a+d+b] = lcol[l][d-1-b]; sb[a+d+b] = l*8 + d-1-b;
        end
        dn = deg[(l+1) % NL];
        a = a + d + ((d > dn) ? d - dn : 0);
      end
    nslots = a + 20;
  endtask

  function automatic int satq(int v);
    return (v > QMAX) ? QMAX : (v < -QMAX) ? -QMAX : v;
  endfunction

  // one decoding run with lanes < nact active; returns through the counters
  task automatic run(int nact, logic [2:0] bt);
    build_schedule();
    for (int i = 0; i < LANES; i++) begin am1[i] = QMAX; am2[i] = QMAX; aidx[i] = 0; asg[i] = 0; end
    @(negedge clk);
    r_rd_addr = RADDR_W'(mb[0]); t_rd_addr = COL_W'(sc[0]);
    for (int c = 0; c < nslots; c++) begin
      @(negedge clk);
      beta = bt;
      min_valid = mv[c][0]; min_row_end = mre[c][0]; min_col = COL_W'(mc[c]); r_zero = mrz[c][0];
      for (int i = 0; i < LANES; i++) q_shift[i] = BQ'($urandom_range(0, 127));
      sel_valid = sv[c][0]; sel_col = COL_W'(sc[c]); r_wr_addr = RADDR_W'(sb[c]);
      r_rd_addr = RADDR_W'(mb[c+1]); t_rd_addr = COL_W'(sc[c+1]);
      #1;
      if (t_fwd_hit) hits++;
      if (sv[c]) begin
        for (int i = 0; i < nact; i++) begin
          int mag, r, tv;
          tv = Tm[i][sc[c]];
          mag = (sc[c] == pidx[i]) ? pm2[i] : pm1[i];
          mag = mag - int'(bt); if (mag < 0) mag = 0; if (mag > RMAX) mag = RMAX;
          r = (psg[i] ^ (tv < 0)) ? -mag : mag;
          if (tv + r > QMAX) r = QMAX - tv;
          if (tv + r < -QMAX) r = -QMAX - tv;
          Rm[i][sb[c]] = r;
          checks++;
          if (int'($signed(q_new[i])) != tv + r) begin
            failures++;
            if (failures < 6) $display("slot %0d lane %0d: q_new %0d expected %0d", c, i, $signed(q_new[i]), tv + r);
          end
        end
      end
      if (mv[c]) begin
        for (int i = 0; i < nact; i++) begin
          int tv, mag;
          tv = satq(int'($signed(q_shift[i])) - (mrz[c] ? 0 : Rm[i][mb[c]]));
          Tm[i][mc[c]] = tv;
          mag = (tv < 0) ? -tv : tv;
          if (tv < 0) asg[i] ^= 1;
          if (mag < am1[i]) begin am2[i] = am1[i]; am1[i] = mag; aidx[i] = mc[c]; end
          else if (mag < am2[i]) am2[i] = mag;
          if (mre[c]) begin
            pm1[i] = am1[i]; pm2[i] = am2[i]; pidx[i] = aidx[i]; psg[i] = asg[i];
            am1[i] = QMAX; am2[i] = QMAX; aidx[i] = 0; asg[i] = 0;
          end
        end
      end
    end
    @(negedge clk);
    min_valid = 0; sel_valid = 0;
  endtask

  initial begin
    #2 rst_n = 0;
    #10 rst_n = 1;
    run(LANES, 3'd1);
    run(LANES, 3'd0);
    run(LANES, 3'd2);
    checks++;
    if (hits == 0) begin failures++; $display("T forwarding never exercised"); end
    $display("T forwarding hits: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
