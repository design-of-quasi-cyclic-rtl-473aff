// cyclic_shifter: circular rotation of the first Z of Z_MAX lanes by a
// run-time amount, Z being the run-time lifting size.
//
// out[i] = in[(i + shift) mod Z] for i < Z, and 0 for the unused lanes
// i >= Z; this is the product P^shift * q of the cyclic-shift matrix with a
// column of Q messages. The same unit serves the delta shift of the MIN phase
// and the shift back to the natural order when the decoded word is read out.
//
// It is built as two logarithmic barrel shifts of the flattened vector: one
// moves every lane down by `shift` (lanes that do not wrap), the other moves
// it up by Z - shift (lanes that wrap); a per-lane select picks one. The unit
// is purely combinational; the decoder registers its output. The
// architecture only states that the shifter handles any of the 51 lifting
// sizes and is split like the NCUs into groups of 24 lanes; the two-shift
// structure is this design's choice.
//
// Interface: vec_in/vec_out are Z_MAX lanes of W-bit values, z is the
// lifting size (1..Z_MAX) and shift must be below z.
module cyclic_shifter #(
  parameter int Z_MAX   = ldpc_pkg::Z_MAX,
  parameter int W       = ldpc_pkg::BQ,
  parameter int SHIFT_W = ldpc_pkg::SHIFT_W
) (
  input  logic [Z_MAX-1:0][W-1:0] vec_in,
  input  logic [SHIFT_W-1:0]      z,
  input  logic [SHIFT_W-1:0]      shift,
  output logic [Z_MAX-1:0][W-1:0] vec_out
);

  logic [Z_MAX*W-1:0] flat, down, up;
  logic [SHIFT_W-1:0] wrap_at;

  always_comb begin
    flat    = vec_in;
    wrap_at = z - shift;                 // first lane that wraps around
    down    = flat >> (int'(shift) * W);
    up      = flat << (int'(wrap_at) * W);
    for (int i = 0; i < Z_MAX; i++) begin
      if (i >= int'(z))
        vec_out[i] = '0;
      else if (i < int'(wrap_at))
        vec_out[i] = down[i*W +: W];
      else
        vec_out[i] = up[i*W +: W];
    end
  end

endmodule
