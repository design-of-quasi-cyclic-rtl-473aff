// tb_cyclic_shifter: checks the variable-Z rotation against
// out[i] = in[(i + shift) mod Z] (0 above Z) for random vectors, for every
// 5G lifting size and random shifts, including shift 0 and Z - 1.
`timescale 1ns/1ps
module tb_cyclic_shifter;
  import ldpc_pkg::*;
  logic [Z_MAX-1:0][BQ-1:0] vin, vout;
  logic [SHIFT_W-1:0] z, sh;
  int checks = 0, failures = 0;

  cyclic_shifter dut (.vec_in(vin), .z, .shift(sh), .vec_out(vout));

  initial begin
    for (int t = 0; t < 400; t++) begin
      int zz, ss, bad;
      zz = int'(lift_size(6'(t % N_LIFT)));
      ss = (t % 5 == 0) ? 0 : (t % 5 == 1) ? zz - 1 : $urandom_range(0, zz - 1);
      for (int i = 0; i < Z_MAX; i++) vin[i] = BQ'($urandom);
      z = SHIFT_W'(zz); sh = SHIFT_W'(ss);
      #1;
      bad = 0;
      for (int i = 0; i < Z_MAX; i++) begin
        logic [BQ-1:0] e;
        e = (i < zz) ? vin[(i + ss) % zz] : '0;
        if (vout[i] !== e) bad++;
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 5) $display("Z=%0d shift=%0d: %0d lanes wrong", zz, ss, bad);
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
