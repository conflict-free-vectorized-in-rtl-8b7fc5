// tb_bp_ctrl: runs the controller for N = 16 and N = 32 (radix 2) against a
// model of a datapath that stays busy for a few cycles after each issue,
// and checks
//   * the clearing writes cover slots 1 .. n-1 exactly once,
//   * the stage order per iteration (n-1 right, n-1 left, one final),
//   * every stage reads each offset of its R and L slot exactly once, from
//     slot s / s+1, and writes back to slot s+1 (right) or s (left),
//   * consecutive vectors pair offsets differing only in the transpose bit,
//   * no issue while the datapath is still busy from the previous stage,
//   * the iteration count and the done pulse.
module tb_bp_ctrl;
  import bp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  `define CTRL_INST(NN, NAME) \
    localparam int NAME``_NST = $clog2(NN); \
    localparam int NAME``_V   = NN / 2; \
    localparam int NAME``_AW  = $clog2(NAME``_NST + 1) + NAME``_NST - 1; \
    logic NAME``_start, NAME``_pbusy, NAME``_busy, NAME``_done, NAME``_iwe, NAME``_ren; \
    logic [NAME``_AW-1:0] NAME``_ia, NAME``_rr, NAME``_rl, NAME``_tag; \
    bp_op_e NAME``_op; \
    logic [7:0] NAME``_ic, NAME``_imax; \
    logic [$clog2(NAME``_NST + 1)-1:0] NAME``_cs; \
    bp_ctrl #(.N(NN), .LOG_R(1), .ITW(8)) NAME ( \
      .clk, .rst_n, .start(NAME``_start), .iter_max(NAME``_imax), .pipe_busy(NAME``_pbusy), \
      .busy(NAME``_busy), .done(NAME``_done), .init_we(NAME``_iwe), .init_addr(NAME``_ia), \
      .rd_en(NAME``_ren), .rd_addr_r(NAME``_rr), .rd_addr_l(NAME``_rl), .rd_tag(NAME``_tag), \
      .rd_op(NAME``_op), .iter_cnt(NAME``_ic), .cur_stage(NAME``_cs));

  `CTRL_INST(16, c16)
  `CTRL_INST(32, c32)

  // datapath model: busy for 3 cycles after the last issue
  int c16_hold = 0, c32_hold = 0;
  always @(posedge clk) begin
    c16_hold <= c16_ren ? 3 : (c16_hold > 0 ? c16_hold - 1 : 0);
    c32_hold <= c32_ren ? 3 : (c32_hold > 0 ? c32_hold - 1 : 0);
  end
  assign c16_pbusy = c16_hold > 0;
  assign c32_pbusy = c32_hold > 0;

  `define CHECKER(NAME) \
  task automatic check_``NAME(int iters); \
    int nst = NAME``_NST, vv = NAME``_V; \
    int init_seen [int]; \
    int stage_list [$]; \
    int cur = -1, cnt = 0, prev_off = 0; \
    bit rseen [int]; bit lseen [int]; \
    int slot_r, slot_l, exp_slot_r, exp_slot_l, off_r, off_l, tslot; \
    bp_op_e cop; int exp_stage; int k; \
    NAME``_imax = 8'(iters); \
    @(negedge clk); NAME``_start = 1; \
    while (1) begin \
      @(negedge clk); NAME``_start = 0; \
      if (NAME``_done) break; \
      if (NAME``_iwe) init_seen[int'(NAME``_ia)]++; \
      if (NAME``_ren) begin \
        int key = int'(NAME``_op) * 100 + int'(NAME``_cs); \
        if (key != cur) begin \
          checks++; if (cur != -1 && cnt != vv) begin failures++; $display("FAIL stage length %0d", cnt); end \
          checks++; if (NAME``_hold != 0) begin failures++; $display("FAIL issue while busy"); end \
          stage_list.push_back(key); cur = key; cnt = 0; rseen.delete(); lseen.delete(); \
        end \
        slot_r = int'(NAME``_rr) / vv; off_r = int'(NAME``_rr) % vv; \
        slot_l = int'(NAME``_rl) / vv; off_l = int'(NAME``_rl) % vv; \
        cop = NAME``_op; \
        exp_slot_r = int'(NAME``_cs); exp_slot_l = exp_slot_r + 1; \
        checks++; \
        if (slot_r != exp_slot_r || slot_l != exp_slot_l || off_r != off_l || rseen.exists(off_r)) begin \
          failures++; $display("FAIL addr op=%0d s=%0d r=%0d l=%0d", cop, NAME``_cs, NAME``_rr, NAME``_rl); \
        end \
        rseen[off_r] = 1; \
        checks++; \
        if (cop == OP_RIGHT && NAME``_tag != NAME``_rl) failures++; \
        else if (cop == OP_LEFT && NAME``_tag != NAME``_rr) failures++; \
        else if (cop == OP_FINAL && (int'(NAME``_tag) != cnt || off_r != cnt)) failures++; \
        if (cop != OP_FINAL && cnt % 2 == 1) begin \
          tslot = (cop == OP_RIGHT) ? int'(NAME``_cs) : int'(NAME``_cs) - 1; \
          checks++; \
          if ((prev_off ^ off_r) != (1 << tslot)) begin failures++; $display("FAIL pair op=%0d s=%0d %0d %0d", cop, NAME``_cs, prev_off, off_r); end \
        end \
        prev_off = off_r; cnt++; \
      end \
    end \
    checks++; if (cnt != vv) failures++; \
    checks++; \
    if (init_seen.size() != (nst - 1) * vv) begin failures++; $display("FAIL init size %0d", init_seen.size()); end \
    foreach (init_seen[a]) begin checks++; if (init_seen[a] != 1 || a < vv || a >= nst * vv) failures++; end \
    checks++; if (stage_list.size() != iters * (2 * nst - 1)) begin failures++; $display("FAIL stages %0d", stage_list.size()); end \
    k = 0; \
    for (int it = 0; it < iters; it++) begin \
      for (int s = 0; s <= nst - 2; s++) begin checks++; if (stage_list[k++] != int'(OP_RIGHT) * 100 + s) failures++; end \
      for (int s = nst - 1; s >= 1; s--) begin checks++; if (stage_list[k++] != int'(OP_LEFT) * 100 + s) failures++; end \
      checks++; if (stage_list[k++] != int'(OP_FINAL) * 100) failures++; \
    end \
    checks++; if (int'(NAME``_ic) != iters) failures++; \
    @(negedge clk); checks++; if (NAME``_busy) failures++; \
  endtask


  `CHECKER(c16)
  `CHECKER(c32)

  initial begin
    c16_start = 0; c32_start = 0; c16_imax = 0; c32_imax = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_c16(1);
    check_c16(3);
    check_c32(2);
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
