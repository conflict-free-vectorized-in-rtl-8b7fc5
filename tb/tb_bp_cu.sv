// tb_bp_cu: checks the radix-2 CU against the integer reference for
// directed corner cases and random vectors, in all three operations.
module tb_bp_cu;
  import bp_pkg::*;
  import bp_ref_pkg::*;

  localparam int Q = 8;
  logic [1:0][Q-1:0] r_in, l_in, out_vec;
  bp_op_e op;
  int checks = 0, failures = 0;

  bp_cu #(.Q(Q)) dut (.r_in, .l_in, .op, .out_vec);

  task automatic check_one(int ra, int rb, int lc, int ld, bp_op_e o);
    int e0, e1;
    r_in = {Q'(rb), Q'(ra)};
    l_in = {Q'(ld), Q'(lc)};
    op   = o;
    #1;
    if (o == OP_RIGHT) cu_right(ra, rb, lc, ld, Q, e0, e1);
    else               cu_left (ra, rb, lc, ld, Q, e0, e1);
    checks += 2;
    if ($signed(out_vec[0]) != e0 || $signed(out_vec[1]) != e1) begin
      failures++;
      $display("FAIL op=%0d in R(%0d,%0d) L(%0d,%0d): got (%0d,%0d) exp (%0d,%0d)",
               o, ra, rb, lc, ld, $signed(out_vec[0]), $signed(out_vec[1]), e0, e1);
    end
  endtask

  initial begin
    // hand-worked values: f(10,-20) = -(10*29/32) = -9
    r_in = {Q'(0), Q'(10)}; l_in = {Q'(0), Q'(-20)}; op = OP_RIGHT; #1;
    checks++; if ($signed(out_vec[0]) != 0 || $signed(out_vec[1]) != -9) failures++;
    // L_a = f(L_c, L_d + R_b) = f(40, 5+3) = 7 ; L_b = f(R_a,L_c)+L_d = f(-16,40)+5 = -14+5 = -9
    r_in = {Q'(3), Q'(-16)}; l_in = {Q'(5), Q'(40)}; op = OP_LEFT; #1;
    checks++; if ($signed(out_vec[0]) != 7 || $signed(out_vec[1]) != -9) failures++;
    // saturation: 100 + 100 -> 127
    r_in = {Q'(100), Q'(127)}; l_in = {Q'(100), Q'(127)}; op = OP_RIGHT; #1;
    checks++; if ($signed(out_vec[1]) != 127) failures++;
    check_one(127, 0, 0, 0, OP_RIGHT);
    check_one(-128, 50, -128, 3, OP_LEFT);
    check_one(127, 127, -127, -127, OP_FINAL);
    check_one(-40, 25, 60, -7, OP_RIGHT);
    for (int i = 0; i < 4000; i++) begin
      bp_op_e o;
      o = bp_op_e'($urandom_range(0, 2));
      check_one($urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128,
                $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128, o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
