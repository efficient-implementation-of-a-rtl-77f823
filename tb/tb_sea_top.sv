// tb_sea_top: end-to-end test of the SEA loop core at its default parameters
// (N=48, B=8, NR=51). Random plaintexts are encrypted and random
// cipher-texts decrypted under random keys, and every result is compared
// with the reference model; encrypted blocks are also decrypted again to get
// the plaintext back. It checks the latency (done NR+1 cycles after start),
// that the key registers hold the original key at the end of a block, that
// a start while busy is ignored, and that a start in the cycle of done is
// taken. Each mechanism of the core is counted and must occur: encryption,
// decryption, the middle key switch, the final key switch, KL-keyed rounds
// and the ignored start.
module tb_sea_top;
  import sea_ref_pkg::*;
  import sea_pkg::*;

  localparam int N  = 48;
  localparam int B  = 8;
  localparam int NR = 51;
  typedef sea_model #(N, B, NR) model_t;

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_mid_switch = 0, n_end_switch = 0, n_kl_rounds = 0, n_ignored = 0;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start = 1'b0, decrypt = 1'b0;
  logic [N-1:0] text_i = '0, key_i = '0, text_o;
  logic         busy, done;

  always #5 clk = ~clk;

  sea_top dut (.clk, .rst_n, .start, .decrypt, .text_i, .key_i, .busy, .done, .text_o);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the key schedule mechanisms as they happen
  always @(posedge clk) begin
    if (dut.u_ctrl.run) begin
      if (dut.u_ctrl.key_op == KEY_FK_SWAP) n_mid_switch++;
      if (dut.u_ctrl.key_op == KEY_SWAP)    n_end_switch++;
      if (dut.u_ctrl.use_kl)                n_kl_rounds++;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // run one block; optionally try a start in the middle of it
  task automatic run_block(input bit dec, input logic [N-1:0] txt, input logic [N-1:0] key,
                           input bit poke, output logic [N-1:0] res);
    int cyc = 0;
    @(negedge clk);
    start = 1'b1; decrypt = dec; text_i = txt; key_i = key;
    check(!busy, "idle before start");
    @(negedge clk);
    start = 1'b0; decrypt = 1'b0; text_i = model_t::rand_blk(); key_i = model_t::rand_blk();
    while (!done && cyc < 4 * NR) begin
      cyc++;
      if (poke && cyc == 10) begin
        start = 1'b1; decrypt = ~dec;
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
    end
    start = 1'b0;
    cyc++;
    check(cyc == NR + 1, $sformatf("latency %0d cycles", cyc));
    check({dut.kl_q, dut.kr_q} == key, "key registers restored");
    res = text_o;
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    logic [N-1:0] p, k, c, q, e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      p = model_t::rand_blk();
      k = model_t::rand_blk();
      run_block(1'b0, p, k, (t % 5) == 2, c);
      e = model_t::encrypt(p, k);
      check(c == e, $sformatf("encrypt p=%h k=%h got=%h exp=%h", p, k, c, e));
      run_block(1'b1, c, k, 1'b0, q);
      check(q == p, $sformatf("decrypt of cipher-text got=%h exp=%h", q, p));
      c = model_t::rand_blk();
      run_block(1'b1, c, k, (t % 7) == 3, q);
      e = model_t::decrypt(c, k);
      check(q == e, $sformatf("decrypt c=%h got=%h exp=%h", c, q, e));
      check(model_t::encrypt(q, k) == c, "model round trip");
    end
    // a start in the very cycle of done is accepted: back-to-back blocks
    p = model_t::rand_blk();
    k = model_t::rand_blk();
    @(negedge clk);
    start = 1'b1; text_i = p; key_i = k; decrypt = 1'b0;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(text_o == model_t::encrypt(p, k), "first of back-to-back");
    start = 1'b1; text_i = text_o; decrypt = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "second block started on done");
    while (!done) @(negedge clk);
    check(text_o == p, "second of back-to-back returns plaintext");
    n_enc++; n_dec++;
    // reset clears the core
    rst_n = 1'b0;
    #1;
    check(!busy && !done && text_o == '0, "reset clears state");
    rst_n = 1'b1;

    $display("mechanisms: encrypt=%0d decrypt=%0d mid_switch=%0d end_switch=%0d kl_rounds=%0d ignored_start=%0d",
             n_enc, n_dec, n_mid_switch, n_end_switch, n_kl_rounds, n_ignored);
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_mid_switch > 0, "middle key switch happened");
    check(n_end_switch > 0, "final key switch happened");
    check(n_kl_rounds > 0, "KL-keyed rounds happened");
    check(n_ignored > 0, "start while busy happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
