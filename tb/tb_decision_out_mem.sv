// tb_decision_out_mem: writes random L/R vectors and reads the stored bits
// back; a bit must be 1 exactly when L + R < 0 (0 when the sum is zero).
module tb_decision_out_mem;
  localparam int Q = 8, WORDS = 32, VW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [VW-1:0] wa, ra;
  logic [1:0][Q-1:0] lv, rv;
  logic [1:0] bits;
  logic [1:0] expb [WORDS];

  decision_out_mem #(.RADIX(2), .Q(Q), .WORDS(WORDS), .VW(VW)) dut (
    .clk, .we, .waddr(wa), .l_vec(lv), .r_vec(rv), .rd_addr(ra), .rd_bits(bits));

  initial begin
    we = 0; wa = 0; ra = 0; lv = 0; rv = 0;
    for (int round = 0; round < 40; round++) begin
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        we = 1; wa = VW'(a);
        for (int e = 0; e < 2; e++) begin
          int l, r;
          l = $urandom_range(0, 254) - 127;
          r = ($urandom_range(0, 3) == 0) ? -l : $urandom_range(0, 254) - 127;
          if (a == 0 && e == 0) begin l = -127; r = 127; end     // zero sum -> 0
          if (a == 1 && e == 1) begin l = -127; r = -127; end    // -254 -> 1
          lv[e] = Q'(l); rv[e] = Q'(r);
          expb[a][e] = (l + r) < 0;
        end
      end
      @(negedge clk); we = 0;
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk); ra = VW'(a);
        @(posedge clk); #1;
        checks++;
        if (bits != expb[a]) begin failures++; $display("FAIL word %0d got %b exp %b", a, bits, expb[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
