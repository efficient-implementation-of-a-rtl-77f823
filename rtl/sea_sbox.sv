// sea_sbox: the SEA substitution layer on one half block of NB words of B bits.
//
// SEA uses one 3-bit S-box, S = {0,5,6,7,4,3,1,2}, applied "bitsliced": the
// words are taken in groups of three (x3i, x3i+1, x3i+2), and bit j of the
// three words forms one 3-bit S-box input with x3i as its least significant
// bit. The S-box is computed with three AND/OR-then-XOR steps, each using the
// result of the one before:
//   x3i   ^= x3i+2 & x3i+1
//   x3i+1 ^= x3i+2 & x3i
//   x3i+2 ^= x3i   | x3i+1
// so a whole layer is 3*NB/3 word-wide logic operations and no table.
//
// Interface: x is the half block, word i at bits [i*B +: B]; y is the result.
// Purely combinational. The S-box itself follows the SEA specification; NB
// must be a multiple of 3, as that specification requires.
module sea_sbox #(
  parameter int unsigned B  = 8,
  parameter int unsigned NB = 3
) (
  input  logic [NB*B-1:0] x,
  output logic [NB*B-1:0] y
);

  if (NB % 3 != 0) begin : g_bad_nb
    $error("sea_sbox: NB must be a multiple of 3");
  end

  for (genvar g = 0; g < NB / 3; g++) begin : g_triple
    logic [B-1:0] a0, b0, c0, a1, b1, c1;
    assign a0 = x[(3*g)*B   +: B];
    assign b0 = x[(3*g+1)*B +: B];
    assign c0 = x[(3*g+2)*B +: B];
    assign a1 = a0 ^ (c0 & b0);
    assign b1 = b0 ^ (c0 & a1);
    assign c1 = c0 ^ (a1 | b1);
    assign y[(3*g)*B   +: B] = a1;
    assign y[(3*g+1)*B +: B] = b1;
    assign y[(3*g+2)*B +: B] = c1;
  end

endmodule
