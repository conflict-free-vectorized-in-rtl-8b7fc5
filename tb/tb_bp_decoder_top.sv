// tb_bp_decoder_top: end-to-end test of the decoder at N = 16.
//
// Each frame: random information bits on the K unfrozen
// positions, polar encoding x = u * F^(x)n, BPSK LLRs with uniform noise
// (including noiseless frames and frames that saturate), load through the
// host port, decode with a random iteration count, read all decoded bits
// back.  Checks:
//   * every decoded bit equals the integer reference decoder (bp_ref_pkg),
//     which uses natural indexing and no vector layout;
//   * on noiseless frames the decoded bits equal the transmitted u;
//   * the vector memory operations per iteration equal 3 * N/2 * (2n-1)
//     (2 reads and 1 write per CU vector, 2n-1 stages);
//   * the number of busy cycles equals
//       (n-1)*V + iters*((2n-2)*(V+4) + V+2) + 1 ,  V = N/2;
//   * the datapath mechanisms all occurred: memory clearing, transposed
//     right-bound and left-bound stages, the final stage, drain stalls
//     between stages, right-to-left and left-to-final switches, repeated
//     iterations and saturated CU outputs.
module tb_bp_decoder_top;
  import bp_pkg::*;
  import bp_ref_pkg::*;

  localparam int N = 16, Q = 8, K = 8, FRAMES = 60;
  localparam int NST = $clog2(N), V = N / 2, VW = NST - 1;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                load_we, load_channel, start, busy, done;
  logic [VW-1:0]       load_idx, out_idx;
  logic [1:0][Q-1:0]   load_data;
  logic [7:0]          iter_max, iter_cnt;
  logic [$clog2(NST + 1)-1:0] cur_stage;
  logic [1:0]          out_bits;

  bp_decoder_top #(.N(N)) dut (
    .clk, .rst_n, .load_we, .load_channel, .load_idx, .load_data,
    .start, .iter_max, .busy, .done, .iter_cnt, .cur_stage(cur_stage), .out_idx, .out_bits);

  // mechanism counters
  int n_init = 0, n_tr_right = 0, n_tr_left = 0, n_final = 0, n_stall = 0;
  int n_sw_left = 0, n_sw_final = 0, n_iter_repeat = 0, n_sat = 0, n_busy = 0;
  int n_memops = 0;   // vector reads and writes of the decoding stages
  int n_ignored = 0;  // host writes attempted while busy
  bp_op_e prev_op = OP_RIGHT;
  always @(posedge clk) if (rst_n) begin
    if (busy) n_busy++;
    if (dut.init_we) n_init++;
    if (dut.rd_en) n_memops += 2;
    if (dut.tr_valid) n_memops++;
    if (dut.p1_valid && dut.p1_op == OP_FINAL) n_memops++;
    if (dut.u_tr.group_full && dut.p1_op == OP_RIGHT) n_tr_right++;
    if (dut.u_tr.group_full && dut.p1_op == OP_LEFT)  n_tr_left++;
    if (dut.p1_valid && dut.p1_op == OP_FINAL) n_final++;
    if (dut.u_ctrl.state == ST_DRAIN && dut.pipe_busy) n_stall++;
    if (dut.rd_en) begin
      if (prev_op == OP_RIGHT && dut.rd_op == OP_LEFT)  n_sw_left++;
      if (prev_op == OP_LEFT  && dut.rd_op == OP_FINAL) n_sw_final++;
      if (prev_op == OP_FINAL && dut.rd_op == OP_RIGHT) n_iter_repeat++;
      prev_op = dut.rd_op;
    end
    if (dut.p1_valid && (dut.cu_out[0] == Q'(127) || dut.cu_out[0] == Q'(-127) ||
                         dut.cu_out[1] == Q'(127) || dut.cu_out[1] == Q'(-127))) n_sat++;
  end

  task automatic frame(int amp, int noise, int iters);
    bit u[], x[], frz[], uhat[];
    int chan[], prior[];
    int nbusy0, exp_cycles, ops0;
    frozen_set(N, K, frz);
    u = new[N];
    foreach (u[p]) u[p] = frz[p] ? 1'b0 : 1'($urandom_range(0, 1));
    encode(N, u, x);
    chan = new[N]; prior = new[N];
    foreach (chan[p]) begin
      chan[p] = sat((x[p] ? -amp : amp) + $urandom_range(0, 2 * noise) - noise, Q);
      prior[p] = frz[p] ? maxv(Q) : 0;
    end
    decode(N, Q, iters, chan, prior, uhat);
    // load: priors as in-order rows, channel as in-order columns
    for (int a = 0; a < V; a++) begin
      @(negedge clk);
      load_we = 1; load_channel = 0; load_idx = VW'(a);
      load_data = {Q'(prior[2*a+1]), Q'(prior[2*a])};
      @(negedge clk);
      load_channel = 1;
      load_data = {Q'(chan[a + V]), Q'(chan[a])};
    end
    @(negedge clk);
    load_we = 0; iter_max = 8'(iters); start = 1;
    nbusy0 = n_busy;
    ops0 = n_memops;
    @(negedge clk); start = 0;
    // host writes and start pulses while busy must be ignored
    while (!done) begin
      load_we      = ($urandom_range(0, 7) == 0);
      load_channel = 1'($urandom_range(0, 1));
      load_idx     = VW'($urandom);
      load_data    = (2*Q)'($urandom);
      start        = ($urandom_range(0, 15) == 0);
      if (load_we) n_ignored++;
      @(negedge clk);
    end
    load_we = 0; start = 0;
    @(negedge clk);
    exp_cycles = (NST - 1) * V + iters * ((2 * NST - 2) * (V + 4) + V + 2) + 1;
    checks++;
    if (n_busy - nbusy0 != exp_cycles) begin
      failures++; $display("FAIL cycles %0d exp %0d", n_busy - nbusy0, exp_cycles);
    end
    checks++; if (int'(iter_cnt) != iters) failures++;
    // vector memory operations per iteration: 3 * N/r * (2n - 1)
    checks++;
    if (n_memops - ops0 != iters * 3 * V * (2 * NST - 1)) begin
      failures++; $display("FAIL memory operations %0d exp %0d", n_memops - ops0, iters * 3 * V * (2 * NST - 1));
    end
    for (int a = 0; a < V; a++) begin
      out_idx = VW'(a);
      @(negedge clk);
      for (int e = 0; e < 2; e++) begin
        checks++;
        if (out_bits[e] != uhat[2*a+e]) begin
          failures++; $display("FAIL bit %0d got %0d ref %0d", 2*a+e, out_bits[e], uhat[2*a+e]);
        end
        if (noise == 0) begin
          checks++;
          if (out_bits[e] != u[2*a+e]) begin failures++; $display("FAIL noiseless bit %0d", 2*a+e); end
        end
      end
    end
  endtask

  initial begin
    load_we = 0; load_channel = 0; load_idx = 0; load_data = 0; start = 0;
    iter_max = 1; out_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      case (f % 4)
        0: frame(20, 0, 1 + f % 3);
        1: frame(20, 24, 1 + $urandom_range(0, 5));
        2: frame(110, 60, 2 + $urandom_range(0, 3));
        default: frame(12, 16, 4);
      endcase
    end
    $display("mechanisms: init=%0d tr_right=%0d tr_left=%0d final=%0d stall=%0d sw_left=%0d sw_final=%0d iter_repeat=%0d sat=%0d ignored_loads=%0d",
             n_init, n_tr_right, n_tr_left, n_final, n_stall, n_sw_left, n_sw_final, n_iter_repeat, n_sat, n_ignored);
    checks += 10;
    if (n_ignored == 0) failures++;
    if (n_init == 0) failures++;
    if (n_tr_right == 0) failures++;
    if (n_tr_left == 0) failures++;
    if (n_final == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_sw_left == 0) failures++;
    if (n_sw_final == 0) failures++;
    if (n_iter_repeat == 0) failures++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
