// tb_bp_decoder_sizes: runs the end-to-end decoder test at the other code
// lengths used in the examples: N = 8, N = 64 and N = 256 (radix 2), each
// with its own decoder instance.
module tb_bp_decoder_sizes;
  logic clk = 0;
  always #5 clk = ~clk;
  logic f8, f64, f256;
  int c8, c64, c256, e8, e64, e256;
  int checks = 0, failures = 0;

  bp_top_harness #(.N(8),   .K(4),   .FRAMES(24)) h8   (.clk, .finished(f8),   .checks(c8),   .failures(e8));
  bp_top_harness #(.N(64),  .K(32),  .FRAMES(16)) h64  (.clk, .finished(f64),  .checks(c64),  .failures(e64));
  bp_top_harness #(.N(256), .K(128), .FRAMES(8))  h256 (.clk, .finished(f256), .checks(c256), .failures(e256));

  initial begin
    wait (f8 && f64 && f256);
    checks   = c8 + c64 + c256;
    failures = e8 + e64 + e256;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    checks   = c8 + c64 + c256;
    failures = e8 + e64 + e256 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
