// tb_sea_ctrl: checks the round controller at its default NR (51) and at
// NR = 9. For each block it records, per round cycle, the key operation, the
// round constant and the data-key select, and compares them with the SEA
// schedule: constants 1, 2, .., M with the switch after M, then M, .., 1, a
// final switch-only cycle, and KL as data key from round M+2 on. It also
// checks that done comes NR+1 cycles after start and that a start while busy
// is ignored.
module tb_sea_ctrl;
  import sea_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    start_a, load_a, run_a, use_kl_a, busy_a, done_a;
  key_op_t op_a;
  logic [7:0] c_a;
  logic    start_b, load_b, run_b, use_kl_b, busy_b, done_b;
  key_op_t op_b;
  logic [7:0] c_b;

  sea_ctrl dut_a (.clk, .rst_n, .start(start_a), .load(load_a), .run(run_a), .key_op(op_a),
                  .key_const(c_a), .use_kl(use_kl_a), .busy(busy_a), .done(done_a));
  sea_ctrl #(.NR(9), .B(8)) dut_b (.clk, .rst_n, .start(start_b), .load(load_b), .run(run_b),
                  .key_op(op_b), .key_const(c_b), .use_kl(use_kl_b), .busy(busy_b), .done(done_b));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // run one block on controller a (NR=51) or b (NR=9); poke a start mid-block
  task automatic block(input bit which, input int nr, input bit poke);
    int m = nr / 2;
    int cyc = 0;
    int rounds = 0;
    int exp_c;
    key_op_t exp_op;
    @(negedge clk);
    if (which) start_b = 1'b1; else start_a = 1'b1;
    #1;
    check(which ? load_b : load_a, "load with start");
    @(negedge clk);
    if (which) start_b = 1'b0; else start_a = 1'b0;
    forever begin
      logic r, d, ukl;
      key_op_t o;
      logic [7:0] c;
      r = which ? run_b : run_a;
      d = which ? done_b : done_a;
      o = which ? op_b : op_a;
      c = which ? c_b : c_a;
      ukl = which ? use_kl_b : use_kl_a;
      cyc++;
      if (d) break;
      if (r) begin
        rounds++;
        if (rounds < m)            begin exp_op = KEY_FK;      exp_c = rounds; end
        else if (rounds == m)      begin exp_op = KEY_FK_SWAP; exp_c = m; end
        else if (rounds < nr)      begin exp_op = KEY_FK;      exp_c = 2 * m + 1 - rounds; end
        else                       begin exp_op = KEY_SWAP;    exp_c = -1; end
        check(o == exp_op, $sformatf("key op in round %0d", rounds));
        if (exp_c >= 0) check(c == 8'(exp_c), $sformatf("constant in round %0d", rounds));
        check(ukl == (rounds > m + 1), $sformatf("data key select in round %0d", rounds));
        if (poke && rounds == 3) begin
          if (which) start_b = 1'b1; else start_a = 1'b1;
          #1;
          check(!(which ? load_b : load_a), "start ignored while busy");
        end else begin
          start_a = 1'b0; start_b = 1'b0;
        end
      end
      @(negedge clk);
      start_a = 1'b0; start_b = 1'b0;
      if (cyc > 200) break;
    end
    check(rounds == nr, $sformatf("round count %0d", rounds));
    check(cyc == nr + 1, $sformatf("done latency %0d", cyc));
    @(negedge clk);
    check(!(which ? done_b : done_a), "done is one cycle");
    check(!(which ? busy_b : busy_a), "idle after done");
  endtask

  initial begin
    start_a = 1'b0; start_b = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy_a && !busy_b && !done_a && !done_b, "idle after reset");
    block(1'b0, 51, 1'b0);
    block(1'b0, 51, 1'b1);
    block(1'b1, 9, 1'b0);
    block(1'b1, 9, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
