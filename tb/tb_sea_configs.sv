// tb_sea_configs: runs the SEA core at every evaluated parameter set whose
// half block splits into a multiple of three words: (n, b) = (48, 8),
// (72, 12), (96, 16), (108, 18) and (144, 8). Each size encrypts and
// decrypts random blocks against the reference model (see sea_cfg_runner).
module tb_sea_configs;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int K = 5;
  int   c [K];
  int   f [K];
  logic fin [K];

  sea_cfg_runner #(.N(48),  .B(8))  r0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .fin(fin[0]));
  sea_cfg_runner #(.N(72),  .B(12)) r1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .fin(fin[1]));
  sea_cfg_runner #(.N(96),  .B(16)) r2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .fin(fin[2]));
  sea_cfg_runner #(.N(108), .B(18)) r3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .fin(fin[3]));
  sea_cfg_runner #(.N(144), .B(8))  r4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .fin(fin[4]));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    for (int i = 0; i < K; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
