// tb_sea_key_round: checks the key round's four operations (hold, FK, FK
// followed by the KL/KR switch, switch only) against the reference model's
// FK, with random key halves and random round constants, for B=8/NB=3 and
// B=12/NB=3.
module tb_sea_key_round;
  import sea_ref_pkg::*;
  import sea_pkg::*;

  typedef sea_model #(48, 8, 51)  ma_t;
  typedef sea_model #(72, 12, 1)  mb_t;

  int checks = 0, failures = 0;

  logic [23:0] kla, kra, kloa, kroa;
  logic [7:0]  ca;
  logic [35:0] klb, krb, klob, krob;
  logic [11:0] cb;
  key_op_t     op;

  sea_key_round #(.B(8),  .NB(3)) dut_a (.kl_i(kla), .kr_i(kra), .c_i(ca), .op(op), .kl_o(kloa), .kr_o(kroa));
  sea_key_round #(.B(12), .NB(3)) dut_b (.kl_i(klb), .kr_i(krb), .c_i(cb), .op(op), .kl_o(klob), .kr_o(krob));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] ea, xa;
    logic [71:0] eb, xb;
    for (int t = 0; t < 1000; t++) begin
      kla = 24'($urandom); kra = 24'($urandom); ca = 8'($urandom);
      klb = 36'({$urandom, $urandom}); krb = 36'({$urandom, $urandom}); cb = 12'($urandom);
      op  = key_op_t'(t % 4);
      #1;
      ea = ma_t::fk(kla, kra, ma_t::cvec(int'(ca)));
      eb = mb_t::fk(klb, krb, mb_t::cvec(int'(cb)));
      case (op)
        KEY_FK:      begin xa = ea;                    xb = eb; end
        KEY_FK_SWAP: begin xa = {ea[23:0], ea[47:24]}; xb = {eb[35:0], eb[71:36]}; end
        KEY_SWAP:    begin xa = {kra, kla};            xb = {krb, klb}; end
        default:     begin xa = {kla, kra};            xb = {klb, krb}; end
      endcase
      checks += 2;
      if ({kloa, kroa} !== xa) begin
        failures++;
        $display("FAIL key8 op=%0d got=%h exp=%h", op, {kloa, kroa}, xa);
      end
      if ({klob, krob} !== xb) begin
        failures++;
        $display("FAIL key12 op=%0d got=%h exp=%h", op, {klob, krob}, xb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
