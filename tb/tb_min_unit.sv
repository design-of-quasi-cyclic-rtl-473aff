// tb_min_unit: random layers (2 to 19 blocks, random columns, Q and R
// messages, first-iteration flag, idle cycles in between) against a model of
// the MIN phase: t = sat(q - r) per block, and at the layer end the first
// and second minimum of |t|, the column of the first and the sign product.
`timescale 1ns/1ps
module tb_min_unit;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 1, valid = 0, row_end = 0, r_zero = 0, sel_sgn;
  logic [COL_W-1:0] col = '0, sel_idx;
  logic signed [BQ-1:0] q = '0, t;
  logic signed [BR-1:0] r_old = '0;
  logic [BQ-2:0] sel_m1, sel_m2;
  int checks = 0, failures = 0;

  min_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2 rst_n = 0;
    #10 rst_n = 1;
    for (int l = 0; l < 400; l++) begin
      int deg, m1, m2, idx, sg, tv, mag, rz;
      deg = $urandom_range(2, 19);
      m1 = QMAX; m2 = QMAX; idx = 0; sg = 0;
      rz = $urandom_range(0, 1);
      for (int b = 0; b < deg; b++) begin
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) begin valid = 0; @(negedge clk); end
        valid = 1; row_end = (b == deg - 1); r_zero = rz;
        col = COL_W'($urandom_range(0, NP_MAX - 1));
        q = BQ'($urandom_range(0, 127));
        r_old = BR'($urandom_range(0, 31));
        if (l % 7 == 0) q = (b % 2) ? BQ'(-QMAX) : BQ'(QMAX);   // saturation
        tv = int'(q) - (rz ? 0 : int'(r_old));
        tv = (tv > QMAX) ? QMAX : (tv < -QMAX) ? -QMAX : tv;
        #1;
        checks++;
        if (int'(t) != tv) begin failures++; $display("t=%0d expected %0d", t, tv); end
        mag = (tv < 0) ? -tv : tv;
        if (tv < 0) sg ^= 1;
        if (mag < m1) begin m2 = m1; m1 = mag; idx = int'(col); end
        else if (mag < m2) m2 = mag;
      end
      @(negedge clk); valid = 0; row_end = 0;
      checks++;
      if (int'(sel_m1) != m1 || int'(sel_m2) != m2 || int'(sel_sgn) != sg ||
          (m1 < QMAX && int'(sel_idx) != idx)) begin
        failures++;
        $display("layer %0d: m1 %0d/%0d m2 %0d/%0d idx %0d/%0d sgn %0d/%0d", l,
                 sel_m1, m1, sel_m2, m2, sel_idx, idx, sel_sgn, sg);
      end
    end
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
