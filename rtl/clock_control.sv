// clock_control: clock gating for the NCU groups.
//
// One integrated clock gate per group: the enable is captured by a latch
// that is transparent while the clock is low, and the gated clock is the
// AND of the clock and the latched enable, so a change of enable can never
// cut a clock pulse short. The control unit enables only the groups the
// current lifting size needs (16 groups of 24 lanes by default) and only
// while a codeword is being decoded; the other groups, with their T and R
// memories, receive no clock edges. The architecture gives the function (16
// gated clocks from the main clock and enables); the latch-and-AND gate is
// this design's choice. The 16 latches (en_lat) are intended: they are
// the clock gates' enable latches, so a tool's latch warning on them stands.
//
// Timing: en may change anywhere in the cycle; it takes effect from the
// next rising edge of clk.
module clock_control #(
  parameter int N_GROUPS = ldpc_pkg::N_GROUPS
) (
  input  logic                clk,
  input  logic [N_GROUPS-1:0] en,
  output logic [N_GROUPS-1:0] gclk
);

  logic [N_GROUPS-1:0] en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = {N_GROUPS{clk}} & en_lat;

endmodule
