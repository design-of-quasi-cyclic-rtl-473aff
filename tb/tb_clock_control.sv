// tb_clock_control: drives random group enables that change in the middle
// of the clock-high phase and checks that each gated clock pulses exactly on
// the rising edges where its enable was high during the preceding low phase,
// and that no gated pulse is shorter than the clock's high phase.
`timescale 1ns/1ps
module tb_clock_control;
  import ldpc_pkg::*;
  logic clk = 0;
  logic [N_GROUPS-1:0] en = '0, gclk, en_at_edge;
  int checks = 0, failures = 0;
  int pulses [N_GROUPS], expected [N_GROUPS];
  realtime rise [N_GROUPS];

  clock_control dut (.clk, .en, .gclk);
  always #5 clk = ~clk;

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_mon
    always @(posedge gclk[g]) begin pulses[g]++; rise[g] = $realtime; end
    always @(negedge gclk[g]) if ($realtime > 0) begin  // not the power-up value
      checks++;
      if ($realtime - rise[g] < 4.9) begin failures++; $display("group %0d short pulse", g); end
    end
  end

  initial begin
    for (int g = 0; g < N_GROUPS; g++) begin pulses[g] = 0; expected[g] = 0; end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en = N_GROUPS'($urandom);
      en_at_edge = en;
      @(posedge clk);
      for (int g = 0; g < N_GROUPS; g++) expected[g] += en_at_edge[g];
      #2 en = N_GROUPS'($urandom);   // glitch during the high phase
    end
    @(negedge clk); en = '0;
    repeat (2) @(posedge clk);
    for (int g = 0; g < N_GROUPS; g++) begin
      checks++;
      if (pulses[g] != expected[g]) begin
        failures++;
        $display("group %0d: %0d pulses, expected %0d", g, pulses[g], expected[g]);
      end
    end
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
