// tb_sel_unit: random SEL inputs (plus the saturated corners) against a model
// of the SEL phase: magnitude selection by index, offset, 5-bit R range,
// sign, message clipping so that |t + r| <= 63, and q = t + r.
`timescale 1ns/1ps
module tb_sel_unit;
  import ldpc_pkg::*;
  logic signed [BQ-1:0] t, q_new;
  logic [COL_W-1:0] col, idx;
  logic [BQ-2:0] m1, m2;
  logic sgn;
  logic [2:0] beta;
  logic signed [BR-1:0] r_new;
  int checks = 0, failures = 0;

  sel_unit dut (.*);

  initial begin
    for (int k = 0; k < 5000; k++) begin
      int mag, r, s, tv, qv;
      tv = (k % 10 == 0) ? QMAX : (k % 10 == 1) ? -QMAX : $urandom_range(0, 2*QMAX) - QMAX;
      t = BQ'(tv);
      m1 = BM'($urandom_range(0, QMAX));
      m2 = BM'($urandom_range(int'(m1), QMAX));
      idx = COL_W'($urandom_range(0, 7));
      col = COL_W'($urandom_range(0, 7));
      sgn = $urandom_range(0, 1);
      beta = 3'($urandom_range(0, 7));
      #1;
      mag = (col == idx) ? int'(m2) : int'(m1);
      mag = mag - int'(beta);
      if (mag < 0) mag = 0;
      if (mag > RMAX) mag = RMAX;
      s = int'(sgn) ^ (tv < 0 ? 1 : 0);
      r = s ? -mag : mag;
      if (tv + r > QMAX) r = QMAX - tv;
      if (tv + r < -QMAX) r = -QMAX - tv;
      qv = tv + r;
      checks++;
      if (int'(r_new) != r || int'(q_new) != qv) begin
        failures++;
        if (failures < 8) $display("t=%0d m1=%0d m2=%0d col=%0d idx=%0d sgn=%0d beta=%0d: r=%0d/%0d q=%0d/%0d",
                                   tv, m1, m2, col, idx, sgn, beta, r_new, r, q_new, qv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
