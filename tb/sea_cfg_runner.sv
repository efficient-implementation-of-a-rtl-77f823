// sea_cfg_runner: drives one sea_top instance of size N, B (NR from the SEA
// rule) through BLOCKS encryptions and decryptions with random data and keys,
// compares each with the reference model, and checks the NR+1 cycle latency.
// It reports its counts on its outputs and raises fin when it is through.
module sea_cfg_runner #(
  parameter int N      = 48,
  parameter int B      = 8,
  parameter int BLOCKS = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic fin
);
  import sea_ref_pkg::*;
  import sea_pkg::*;

  localparam int NR = default_nr(N, B);
  typedef sea_model #(N, B, NR) model_t;

  logic         start, decrypt, busy, done;
  logic [N-1:0] text_i, key_i, text_o;

  sea_top #(.N(N), .B(B)) dut (.clk, .rst_n, .start, .decrypt, .text_i, .key_i, .busy, .done, .text_o);

  task automatic one(input bit dec, input logic [N-1:0] t, input logic [N-1:0] k,
                     output logic [N-1:0] res, output int cyc);
    @(negedge clk);
    start = 1'b1; decrypt = dec; text_i = t; key_i = k;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 4 * NR) begin
      @(negedge clk);
      cyc++;
    end
    res = text_o;
  endtask

  initial begin
    logic [N-1:0] p, k, c, q;
    int cyc;
    checks = 0; failures = 0; fin = 1'b0;
    start = 1'b0; decrypt = 1'b0; text_i = '0; key_i = '0;
    @(posedge rst_n);
    for (int i = 0; i < BLOCKS; i++) begin
      p = model_t::rand_blk();
      k = model_t::rand_blk();
      one(1'b0, p, k, c, cyc);
      checks += 3;
      if (c !== model_t::encrypt(p, k)) begin
        failures++;
        $display("FAIL n=%0d b=%0d encrypt p=%h got=%h", N, B, p, c);
      end
      if (cyc != NR + 1) begin
        failures++;
        $display("FAIL n=%0d b=%0d latency %0d", N, B, cyc);
      end
      one(1'b1, c, k, q, cyc);
      if (q !== p) begin
        failures++;
        $display("FAIL n=%0d b=%0d decrypt got=%h exp=%h", N, B, q, p);
      end
    end
    $display("n=%0d b=%0d nb=%0d nr=%0d: %0d blocks checked", N, B, N / (2 * B), NR, BLOCKS);
    fin = 1'b1;
  end
endmodule
