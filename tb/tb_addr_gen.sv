// tb_addr_gen: compares the radix-2 address sequence for N = 16 with the
// printed sequence of the three stages (0..7 / 8,10,9,11,12,14,13,15 /
// 16,20,17,21,18,22,19,23), checks the radix-4 grouping for N = 64 (stage 1
// pairs rows 0,4,8,12), and for N = 1024 checks that every stage's sequence
// is a permutation whose consecutive pairs differ only in bit s.
module tb_addr_gen;
  int checks = 0, failures = 0;

  logic [1:0] s16;  logic [2:0] v16, o16;  logic [4:0] a16;
  addr_gen #(.N(16), .LOG_R(1), .SW(2)) g16 (.stage(s16), .vec(v16), .offset(o16), .addr(a16));

  logic [1:0] s64;  logic [3:0] v64, o64;  logic [5:0] a64;
  addr_gen #(.N(64), .LOG_R(2), .SW(2)) g64 (.stage(s64), .vec(v64), .offset(o64), .addr(a64));

  logic [3:0] sk;   logic [8:0] vk, ok;    logic [12:0] ak;
  addr_gen #(.N(1024), .LOG_R(1), .SW(4)) gk (.stage(sk), .vec(vk), .offset(ok), .addr(ak));

  int table3 [3][8] = '{'{0, 1, 2, 3, 4, 5, 6, 7},
                        '{8, 10, 9, 11, 12, 14, 13, 15},
                        '{16, 20, 17, 21, 18, 22, 19, 23}};

  initial begin
    for (int s = 0; s < 3; s++)
      for (int v = 0; v < 8; v++) begin
        s16 = 2'(s); v16 = 3'(v); #1;
        checks++;
        if (int'(a16) != table3[s][v]) begin
          failures++; $display("FAIL N16 s=%0d v=%0d got %0d exp %0d", s, v, a16, table3[s][v]);
        end
      end
    // radix 4, N = 64, 16 vectors: stage 0 in order, stage 1 groups of rows
    // 0,4,8,12 / 1,5,9,13 / ...
    for (int v = 0; v < 16; v++) begin
      s64 = 0; v64 = 4'(v); #1;
      checks++; if (int'(o64) != v) failures++;
      s64 = 1; #1;
      checks++;
      if (int'(o64) != ((v % 4) * 4 + v / 4)) begin
        failures++; $display("FAIL N64 v=%0d got %0d", v, o64);
      end
      checks++; if (int'(a64) != 16 + int'(o64)) failures++;
    end
    // N = 1024: permutation and pairing property
    for (int s = 0; s < 9; s++) begin
      bit seen [512];
      int prev;
      foreach (seen[i]) seen[i] = 0;
      for (int v = 0; v < 512; v++) begin
        sk = 4'(s); vk = 9'(v); #1;
        checks++;
        if (seen[ok] || int'(ak) != s * 512 + int'(ok)) failures++;
        seen[ok] = 1;
        if (v % 2 == 1) begin
          checks++;
          if ((prev ^ int'(ok)) != (1 << s) || ((prev >> s) & 1) != 0) begin
            failures++; $display("FAIL N1024 s=%0d v=%0d pair %0d %0d", s, v, prev, ok);
          end
        end
        prev = int'(ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
