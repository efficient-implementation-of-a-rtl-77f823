// sea_top: SEA(n,b) block cipher, loop architecture with one round per cycle.
//
// SEA is a Feistel cipher on an N-bit block with an N-bit key, built from
// B-bit words (NB = N/(2B) words per half) and only XOR, AND/OR, rotations
// and word-wise modular addition. This core holds the block in two half
// registers L and R and the key in KL and KR. In every round cycle the data
// round (sea_round) and the key round (sea_key_round) are evaluated in
// parallel from the registers and written back, so a block takes NR rounds
// in NR cycles after one load cycle. The key schedule runs forward for the
// first half of the block, is switched, and then runs back, so the round
// keys form a palindrome: decryption uses the same key and the same key
// schedule, and differs from encryption only inside the data round. At the
// end of a block the key registers hold the original key again.
//
// Interface:
//   start/decrypt/text_i/key_i  sampled together when start is high and
//                               busy is low; text_i = L0 & R0
//   busy                        high during the NR round cycles
//   done                        one-cycle pulse after the last round;
//                               text_o = R_NR & L_NR is valid from then
//                               until the next accepted start
// Any N and B with N/(2B) a multiple of 3 elaborate; the defaults (N=48,
// B=8) are one of the parameter sets the cipher was implemented with, and
// NR defaults to the SEA rule for N and B (see sea_pkg). Reset is
// asynchronous, active low, and clears the registers.
module sea_top
  import sea_pkg::*;
#(
  parameter int unsigned N  = 48,
  parameter int unsigned B  = 8,
  parameter int unsigned NR = default_nr(N, B)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  logic [N-1:0] text_i,
  input  logic [N-1:0] key_i,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] text_o
);

  localparam int unsigned NB = N / (2 * B);
  localparam int unsigned W  = N / 2;

  if (N % (2 * B) != 0 || NB % 3 != 0) begin : g_bad_size
    $error("sea_top: N/(2B) must be an integer multiple of 3");
  end

  logic [W-1:0] l_q, r_q, kl_q, kr_q;
  logic [W-1:0] l_d, r_d, kl_d, kr_d;
  logic [W-1:0] round_key;
  logic         dec_q;

  logic         load, run, use_kl;
  key_op_t      key_op;
  logic [B-1:0] key_const;

  sea_ctrl #(.NR(NR), .B(B)) u_ctrl (
    .clk, .rst_n, .start,
    .load, .run, .key_op, .key_const, .use_kl,
    .busy, .done
  );

  assign round_key = use_kl ? kl_q : kr_q;

  sea_round #(.B(B), .NB(NB)) u_round (
    .l_i(l_q), .r_i(r_q), .k_i(round_key), .decrypt(dec_q),
    .l_o(l_d), .r_o(r_d)
  );

  sea_key_round #(.B(B), .NB(NB)) u_key_round (
    .kl_i(kl_q), .kr_i(kr_q), .c_i(key_const), .op(key_op),
    .kl_o(kl_d), .kr_o(kr_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q   <= '0;
      r_q   <= '0;
      kl_q  <= '0;
      kr_q  <= '0;
      dec_q <= 1'b0;
    end else if (load) begin
      l_q   <= text_i[N-1:W];
      r_q   <= text_i[W-1:0];
      kl_q  <= key_i[N-1:W];
      kr_q  <= key_i[W-1:0];
      dec_q <= decrypt;
    end else if (run) begin
      l_q  <= l_d;
      r_q  <= r_d;
      kl_q <= kl_d;
      kr_q <= kr_d;
    end
  end

  assign text_o = {r_q, l_q};

endmodule
