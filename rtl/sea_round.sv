// sea_round: one SEA data round, for encryption or for decryption.
//
// The round is a Feistel round on two halves of NB words of B bits:
//   f    = BitRot(S(R + K))           (+ is word-wise addition mod 2^B)
//   encryption:  L' = R,  R' = WordRot(L) ^ f
//   decryption:  L' = R,  R' = WordRot^-1(L ^ f)
// WordRot moves word i to word i+1 and the top word to word 0. BitRot
// rotates word 3i right by one bit, keeps word 3i+1, and rotates word 3i+2
// left by one bit. S is the bitsliced layer of sea_sbox.
//
// The encryption round FE and its operations follow the SEA specification.
// The decryption form is this design's arrangement: it inverts FE with the
// halves held in swapped registers, so a cipher-text is loaded exactly like
// a plaintext and the same output swap gives back the plaintext. Only the
// position of the word rotation differs between the two modes, so decryption
// costs one multiplexer per bit.
//
// Interface: l_i, r_i, k_i in, l_o, r_o out, word i at bits [i*B +: B];
// decrypt selects the mode. Purely combinational. l_o is r_i by
// construction of a Feistel round, so synthesis reports it as wired to an
// input.
module sea_round #(
  parameter int unsigned B  = 8,
  parameter int unsigned NB = 3
) (
  input  logic [NB*B-1:0] l_i,
  input  logic [NB*B-1:0] r_i,
  input  logic [NB*B-1:0] k_i,
  input  logic            decrypt,
  output logic [NB*B-1:0] l_o,
  output logic [NB*B-1:0] r_o
);

  localparam int unsigned W = NB * B;

  logic [W-1:0] sum, sub, f, mix;

  // word-wise modular addition of the round key
  always_comb begin
    for (int unsigned i = 0; i < NB; i++) begin
      sum[i*B +: B] = r_i[i*B +: B] + k_i[i*B +: B];
    end
  end

  sea_sbox #(.B(B), .NB(NB)) u_sbox (.x(sum), .y(sub));

  // bit rotation
  always_comb begin
    f = sub;
    for (int unsigned g = 0; g < NB / 3; g++) begin
      f[(3*g)*B   +: B] = {sub[(3*g)*B],         sub[(3*g)*B+1 +: B-1]};
      f[(3*g+2)*B +: B] = {sub[(3*g+2)*B +: B-1], sub[(3*g+2)*B+B-1]};
    end
  end

  always_comb begin
    if (decrypt) begin
      mix = l_i ^ f;
      r_o = {mix[B-1:0], mix[W-1:B]};          // WordRot^-1
    end else begin
      mix = {l_i[W-B-1:0], l_i[W-1:W-B]};      // WordRot
      r_o = mix ^ f;
    end
    l_o = r_i;
  end

endmodule
