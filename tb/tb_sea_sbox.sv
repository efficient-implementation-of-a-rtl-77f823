// tb_sea_sbox: checks the bitsliced S-box layer against a 3-bit lookup table.
// Two instances: NB=3 (one word triple) with every 3-bit value in every bit
// column, and NB=6, B=11 with random words. Combinational; a watchdog ends
// the run if it hangs.
module tb_sea_sbox;
  import sea_ref_pkg::*;

  typedef sea_model #(48, 8, 51)  m8_t;   // NB = 3
  typedef sea_model #(132, 11, 1) m11_t;  // NB = 6

  int checks = 0, failures = 0;

  logic [23:0] x8, y8;
  logic [65:0] x11, y11;

  sea_sbox #(.B(8),  .NB(3)) dut8  (.x(x8),  .y(y8));
  sea_sbox #(.B(11), .NB(6)) dut11 (.x(x11), .y(y11));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the same 3-bit value v in all 8 columns, for each v
    for (int v = 0; v < 8; v++) begin
      x8 = {{8{v[2]}}, {8{v[1]}}, {8{v[0]}}};
      #1;
      checks++;
      if (y8 !== m8_t::sbox(x8)) begin
        failures++;
        $display("FAIL sbox v=%0d x=%h y=%h", v, x8, y8);
      end
    end
    // known values of S = {0,5,6,7,4,3,1,2}: column 0 = 1 gives 5, column 7 = 6 gives 1
    x8 = {8'h80, 8'h80, 8'h01};   // column 0: value 1; column 7: value 6
    #1;
    checks++;
    if (y8 !== {8'h01, 8'h00, 8'h81}) begin
      failures++;
      $display("FAIL sbox known x=%h y=%h", x8, y8);
    end
    for (int t = 0; t < 2000; t++) begin
      x8  = 24'($urandom);
      x11 = {$urandom, $urandom, $urandom};
      #1;
      checks += 2;
      if (y8 !== m8_t::sbox(x8)) begin
        failures++;
        $display("FAIL sbox8 x=%h y=%h", x8, y8);
      end
      if (y11 !== m11_t::sbox(x11)) begin
        failures++;
        $display("FAIL sbox11 x=%h y=%h", x11, y11);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
