// sea_key_round: one round of the SEA key schedule, with the KL/KR switch.
//
// The key round FK is a Feistel round on the two key halves:
//   KL' = KR,  KR' = KL ^ WordRot(BitRot(S(KR + C(i))))
// where C(i) is zero in every word except word 0, which holds i (mod 2^B),
// and +, S, BitRot and WordRot are the operations of sea_round. FK follows
// the SEA specification.
//
// The key schedule also exchanges KL and KR at two points of a block. Here
// the exchange is folded into the same logic, selected by op:
//   KEY_HOLD     KL' = KL,        KR' = KR
//   KEY_FK       (KL', KR') = FK(KL, KR, C(c_i))
//   KEY_FK_SWAP  FK, then the halves exchanged
//   KEY_SWAP     KL' = KR,        KR' = KL
// so that no block needs a cycle only for the exchange; this merge is this
// design's choice.
//
// Interface: kl_i, kr_i, c_i, op in; kl_o, kr_o out. Purely combinational.
module sea_key_round
  import sea_pkg::*;
#(
  parameter int unsigned B  = 8,
  parameter int unsigned NB = 3
) (
  input  logic [NB*B-1:0] kl_i,
  input  logic [NB*B-1:0] kr_i,
  input  logic [B-1:0]    c_i,
  input  key_op_t         op,
  output logic [NB*B-1:0] kl_o,
  output logic [NB*B-1:0] kr_o
);

  localparam int unsigned W = NB * B;

  logic [W-1:0] sum, sub, brot, f;
  logic [W-1:0] fk_l, fk_r;

  // add C(i): only word 0 receives the constant
  always_comb begin
    sum = kr_i;
    sum[B-1:0] = kr_i[B-1:0] + c_i;
  end

  sea_sbox #(.B(B), .NB(NB)) u_sbox (.x(sum), .y(sub));

  always_comb begin
    brot = sub;
    for (int unsigned g = 0; g < NB / 3; g++) begin
      brot[(3*g)*B   +: B] = {sub[(3*g)*B],         sub[(3*g)*B+1 +: B-1]};
      brot[(3*g+2)*B +: B] = {sub[(3*g+2)*B +: B-1], sub[(3*g+2)*B+B-1]};
    end
    f    = {brot[W-B-1:0], brot[W-1:W-B]};   // WordRot
    fk_l = kr_i;
    fk_r = kl_i ^ f;
  end

  always_comb begin
    unique case (op)
      KEY_FK:      begin kl_o = fk_l; kr_o = fk_r; end
      KEY_FK_SWAP: begin kl_o = fk_r; kr_o = fk_l; end
      KEY_SWAP:    begin kl_o = kr_i; kr_o = kl_i; end
      default:     begin kl_o = kl_i; kr_o = kr_i; end
    endcase
  end

endmodule
