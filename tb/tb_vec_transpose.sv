// tb_vec_transpose: streams random groups (with random idle gaps) through a
// radix-2 and a radix-4 transpose unit and compares every emitted row and
// tag with the transposed matrix; also checks that the first row of a
// group appears exactly one cycle after its last input vector.
module tb_vec_transpose;
  localparam int Q = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- radix 2 ----------------
  logic            v2, ov2, b2;
  logic [1:0][Q-1:0] iv2, o2;
  logic [7:0]      it2, ot2;
  vec_transpose #(.RADIX(2), .Q(Q), .TAG_W(8)) d2 (
    .clk, .rst_n, .in_valid(v2), .in_vec(iv2), .in_tag(it2),
    .out_valid(ov2), .out_vec(o2), .out_tag(ot2), .busy(b2));

  // ---------------- radix 4 ----------------
  logic            v4, ov4, b4;
  logic [3:0][Q-1:0] iv4, o4;
  logic [7:0]      it4, ot4;
  vec_transpose #(.RADIX(4), .Q(Q), .TAG_W(8)) d4 (
    .clk, .rst_n, .in_valid(v4), .in_vec(iv4), .in_tag(it4),
    .out_valid(ov4), .out_vec(o4), .out_tag(ot4), .busy(b4));

  // expected rows as queues of {tag, row}
  logic [8+2*Q-1:0] exp2[$];
  logic [8+4*Q-1:0] exp4[$];
  int cyc = 0, last_in2 = -10, last_in4 = -10;
  int rows_out2 = 0, rows_out4 = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // output monitors
  always @(posedge clk) if (rst_n) begin
    if (ov2) begin
      logic [8+2*Q-1:0] e;
      checks++;
      if (exp2.size() == 0) begin failures++; $display("FAIL r2 unexpected row"); end
      else begin
        e = exp2.pop_front();
        if (e != {ot2, o2}) begin failures++; $display("FAIL r2 row %h exp %h", {ot2, o2}, e); end
      end
      if (rows_out2 % 2 == 0) begin
        checks++;
        if (cyc != last_in2 + 1) begin failures++; $display("FAIL r2 latency"); end
      end
      rows_out2++;
    end
    if (ov4) begin
      logic [8+4*Q-1:0] e;
      checks++;
      if (exp4.size() == 0) begin failures++; $display("FAIL r4 unexpected row"); end
      else begin
        e = exp4.pop_front();
        if (e != {ot4, o4}) begin failures++; $display("FAIL r4 row %h exp %h", {ot4, o4}, e); end
      end
      if (rows_out4 % 4 == 0) begin
        checks++;
        if (cyc != last_in4 + 1) begin failures++; $display("FAIL r4 latency"); end
      end
      rows_out4++;
    end
  end

  task automatic feed2(int groups);
    logic [1:0][Q-1:0] m [2];
    logic [7:0] tg [2];
    for (int g = 0; g < groups; g++) begin
      for (int k = 0; k < 2; k++) begin
        m[k] = {Q'($urandom), Q'($urandom)};
        tg[k] = 8'($urandom);
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin v2 = 0; @(negedge clk); end
        v2 = 1; iv2 = m[k]; it2 = tg[k];
        if (k == 1) last_in2 = cyc;
      end
      for (int row = 0; row < 2; row++)
        exp2.push_back({tg[row], m[1][row], m[0][row]});
    end
    @(negedge clk); v2 = 0;
  endtask

  task automatic feed4(int groups);
    logic [3:0][Q-1:0] m [4];
    logic [7:0] tg [4];
    for (int g = 0; g < groups; g++) begin
      for (int k = 0; k < 4; k++) begin
        m[k] = {Q'($urandom), Q'($urandom), Q'($urandom), Q'($urandom)};
        tg[k] = 8'($urandom);
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin v4 = 0; @(negedge clk); end
        v4 = 1; iv4 = m[k]; it4 = tg[k];
        if (k == 3) last_in4 = cyc;
      end
      for (int row = 0; row < 4; row++)
        exp4.push_back({tg[row], m[3][row], m[2][row], m[1][row], m[0][row]});
    end
    @(negedge clk); v4 = 0;
  endtask

  initial begin
    v2 = 0; v4 = 0; iv2 = '0; iv4 = '0; it2 = '0; it4 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      feed2(300);
      feed4(200);
    join
    repeat (10) @(negedge clk);
    checks++;
    if (exp2.size() != 0 || exp4.size() != 0 || b2 || b4) begin
      failures++; $display("FAIL rows left over %0d %0d", exp2.size(), exp4.size());
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
