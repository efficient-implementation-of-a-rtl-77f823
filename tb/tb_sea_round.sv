// tb_sea_round: checks the data round in both modes against the reference
// model, for B=8/NB=3 and B=16/NB=6. Encryption is compared with the model's
// FE; decryption is checked by undoing an FE round: with the halves held
// swapped, decrypting (R_i, L_i) must give back (R_{i-1}, L_{i-1}).
module tb_sea_round;
  import sea_ref_pkg::*;

  typedef sea_model #(48, 8, 51)   ma_t;
  typedef sea_model #(192, 16, 1)  mb_t;

  int checks = 0, failures = 0;

  logic [23:0] la, ra, ka, loa, roa;
  logic        da;
  logic [95:0] lb, rb, kb, lob, rob;
  logic        db;

  sea_round #(.B(8),  .NB(3)) dut_a (.l_i(la), .r_i(ra), .k_i(ka), .decrypt(da), .l_o(loa), .r_o(roa));
  sea_round #(.B(16), .NB(6)) dut_b (.l_i(lb), .r_i(rb), .k_i(kb), .decrypt(db), .l_o(lob), .r_o(rob));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0]  ea;
    logic [191:0] eb;
    logic [23:0]  l0a, r0a;
    logic [95:0]  l0b, r0b;
    for (int t = 0; t < 1000; t++) begin
      la = 24'($urandom); ra = 24'($urandom); ka = 24'($urandom); da = 1'b0;
      lb = {$urandom, $urandom, $urandom}; rb = {$urandom, $urandom, $urandom};
      kb = {$urandom, $urandom, $urandom}; db = 1'b0;
      l0a = la; r0a = ra; l0b = lb; r0b = rb;
      #1;
      ea = ma_t::fe(la, ra, ka);
      eb = mb_t::fe(lb, rb, kb);
      checks += 2;
      if ({loa, roa} !== ea) begin
        failures++;
        $display("FAIL FE8 l=%h r=%h k=%h got=%h exp=%h", la, ra, ka, {loa, roa}, ea);
      end
      if ({lob, rob} !== eb) begin
        failures++;
        $display("FAIL FE16 got=%h exp=%h", {lob, rob}, eb);
      end
      la = ea[23:0]; ra = ea[47:24]; da = 1'b1;
      lb = eb[95:0]; rb = eb[191:96]; db = 1'b1;
      #1;
      checks += 2;
      if ({loa, roa} !== {r0a, l0a}) begin
        failures++;
        $display("FAIL FD8 got=%h exp=%h", {loa, roa}, {r0a, l0a});
      end
      if ({lob, rob} !== {r0b, l0b}) begin
        failures++;
        $display("FAIL FD16 got=%h exp=%h", {lob, rob}, {r0b, l0b});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
