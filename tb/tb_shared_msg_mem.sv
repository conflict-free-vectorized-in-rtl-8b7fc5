// tb_shared_msg_mem: random writes and dual reads against a shadow array;
// checks the one-cycle read latency, both read ports, and that a read of
// the address being written returns the old word.
module tb_shared_msg_mem;
  localparam int Q = 8, DEPTH = 88, AW = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic re, we;
  logic [AW-1:0] ra, rl, wa;
  logic [1:0][Q-1:0] rdr, rdl, wd;
  logic [2*Q-1:0] shadow [DEPTH];

  shared_msg_mem #(.RADIX(2), .Q(Q), .DEPTH(DEPTH), .AW(AW)) dut (
    .clk, .re, .raddr_r(ra), .raddr_l(rl), .rdata_r(rdr), .rdata_l(rdl),
    .we, .waddr(wa), .wdata(wd));

  initial begin
    re = 0; we = 0; ra = 0; rl = 0; wa = 0; wd = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wa = AW'(a); wd = (2*Q)'($urandom); shadow[a] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [2*Q-1:0] er, el;
      @(negedge clk);
      re = 1;
      ra = AW'($urandom_range(0, DEPTH - 1));
      rl = AW'($urandom_range(0, DEPTH - 1));
      we = $urandom_range(0, 1) == 1;
      wa = ($urandom_range(0, 3) == 0) ? ra : AW'($urandom_range(0, DEPTH - 1));
      wd = (2*Q)'($urandom);
      er = shadow[ra];
      el = shadow[rl];
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
      checks += 2;
      if (rdr != er) begin failures++; $display("FAIL port R addr %0d", ra); end
      if (rdl != el) begin failures++; $display("FAIL port L addr %0d", rl); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
