// cla_block_a: a row of W bit cells ("A" blocks) of the carry-look-ahead adder.
//
// Each cell i forms the generate g = a&b and propagate p = a^b of its bit pair
// and, once the look-ahead tree has returned the carry c into the bit, the sum
// s = a ^ b ^ c.  The cell equations are those of the adder description; the
// row is purely combinational and has no timing of its own.
module cla_block_a #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,   // carry into each bit
  output logic [W-1:0] g,
  output logic [W-1:0] p,
  output logic [W-1:0] s
);
  // Separate continuous assignments keep g/p independent of the returning carry.
  assign g = a & b;
  assign p = a ^ b;
  assign s = a ^ b ^ c;
endmodule
