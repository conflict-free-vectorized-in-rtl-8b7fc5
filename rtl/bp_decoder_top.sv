// bp_decoder_top: vectorized, in-order, in-place radix-2 belief-propagation
// polar code decoder.
//
// Datapath: a shared message memory of log2(N)+1 slots of N/2 two-LLR
// words, one radix-2 computational unit (CU) that turns one R vector and one
// L vector into one output vector per cycle, a 2x2 transpose unit in front
// of the memory write port, and a hard-decision output memory.  bp_ctrl
// walks the 2n-1 stages of every iteration with the partial-bit-rotation
// address sequence, so all reads and writes are whole aligned vectors and
// results are written back in place.
//
// Code convention: the decoder works on the graph of x = u * F^(x)n with
// u and x both in natural order (F = [1 0; 1 1]).
//
// Usage:
//   1. while !busy, write the frozen-bit priors and channel LLRs with
//      load_we.  load_channel = 0 writes prior word load_idx (elements
//      2*idx and 2*idx+1 in bits [Q-1:0] and [2Q-1:Q]; 0 for an information
//      bit, +(2**(Q-1)-1) for a frozen zero bit).  load_channel = 1 writes
//      channel word load_idx (LLRs of x[idx] and x[idx+N/2]: the channel
//      block is stored as in-order columns).
//   2. pulse start with iter_max set; busy rises, done pulses when the last
//      iteration has finished.
//      iter_cnt and cur_stage report progress.
//   3. read decoded word out_idx on out_bits one cycle later: bits 2*idx
//      and 2*idx+1 of u in bits 0 and 1.
//
// Timing (radix 2, V = N/2): initialisation (n-1)*V cycles, then per
// iteration (2n-2) transposed stages of V+4 cycles and one final stage of
// V+2 cycles, plus one cycle for the done state.  The memory bandwidth is
// two vector reads and one vector write per cycle.
// What follows the algorithm: slot organisation, stage order, address
// sequence, transposes, CU equations and decision rule.  This design's
// choices: Q-bit saturating LLRs, 29/32 for the 0.9 min-sum scale, the
// host load port, the drain between stages and run-time iter_max.
module bp_decoder_top
  import bp_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned Q     = 8,
  parameter int unsigned ITW   = 8,
  // derived, radix 2
  parameter int unsigned RADIX = 2,
  parameter int unsigned LOG_R = 1,
  parameter int unsigned NST   = $clog2(N) / LOG_R,
  parameter int unsigned V     = N >> LOG_R,
  parameter int unsigned VW    = $clog2(N) - LOG_R,
  parameter int unsigned SW    = $clog2(NST + 1),
  parameter int unsigned AW    = SW + VW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host load port
  input  logic                    load_we,
  input  logic                    load_channel,
  input  logic [VW-1:0]           load_idx,
  input  logic [RADIX-1:0][Q-1:0] load_data,
  // control
  input  logic                    start,
  input  logic [ITW-1:0]          iter_max,
  output logic                    busy,
  output logic                    done,
  output logic [ITW-1:0]          iter_cnt,
  output logic [SW-1:0]           cur_stage,
  // decoded bits
  input  logic [VW-1:0]           out_idx,
  output logic [RADIX-1:0]        out_bits
);

  // controller
  logic          pipe_busy, init_we, rd_en;
  logic [AW-1:0] init_addr, rd_addr_r, rd_addr_l, rd_tag;
  bp_op_e        rd_op;

  bp_ctrl #(.N(N), .LOG_R(LOG_R), .ITW(ITW)) u_ctrl (
    .clk, .rst_n, .start, .iter_max, .pipe_busy,
    .busy, .done,
    .init_we, .init_addr,
    .rd_en, .rd_addr_r, .rd_addr_l, .rd_tag, .rd_op,
    .iter_cnt, .cur_stage
  );

  // memory
  logic                    mem_we;
  logic [AW-1:0]           mem_waddr;
  logic [RADIX-1:0][Q-1:0] mem_wdata, rdata_r, rdata_l;

  shared_msg_mem #(.RADIX(RADIX), .Q(Q), .DEPTH((NST + 1) * V), .AW(AW)) u_mem (
    .clk,
    .re     (rd_en),
    .raddr_r(rd_addr_r),
    .raddr_l(rd_addr_l),
    .rdata_r,
    .rdata_l,
    .we     (mem_we),
    .waddr  (mem_waddr),
    .wdata  (mem_wdata)
  );

  // read pipeline register: operation and write tag travel with the data
  logic          p1_valid;
  bp_op_e        p1_op;
  logic [AW-1:0] p1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_valid <= 1'b0;
      p1_op    <= OP_RIGHT;
      p1_tag   <= '0;
    end else begin
      p1_valid <= rd_en;
      p1_op    <= rd_op;
      p1_tag   <= rd_tag;
    end
  end

  // computational unit
  logic [RADIX-1:0][Q-1:0] cu_out;

  bp_cu #(.Q(Q)) u_cu (
    .r_in   (rdata_r),
    .l_in   (rdata_l),
    .op     (p1_op),
    .out_vec(cu_out)
  );

  // transpose unit
  logic                    tr_valid, tr_busy;
  logic [RADIX-1:0][Q-1:0] tr_vec;
  logic [AW-1:0]           tr_tag;

  vec_transpose #(.RADIX(RADIX), .Q(Q), .TAG_W(AW)) u_tr (
    .clk, .rst_n,
    .in_valid (p1_valid && p1_op != OP_FINAL),
    .in_vec   (cu_out),
    .in_tag   (p1_tag),
    .out_valid(tr_valid),
    .out_vec  (tr_vec),
    .out_tag  (tr_tag),
    .busy     (tr_busy)
  );

  assign pipe_busy = p1_valid || tr_busy;

  // memory write port: transposed results, clearing, host load
  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = '0;
    mem_wdata = '0;
    if (tr_valid) begin
      mem_we    = 1'b1;
      mem_waddr = tr_tag;
      mem_wdata = tr_vec;
    end else if (init_we) begin
      mem_we    = 1'b1;
      mem_waddr = init_addr;
    end else if (load_we && !busy) begin
      mem_we    = 1'b1;
      mem_waddr = load_channel ? AW'(NST * V) + AW'(load_idx) : AW'(load_idx);
      mem_wdata = load_data;
    end
  end

  // hard decisions and output memory
  decision_out_mem #(.RADIX(RADIX), .Q(Q), .WORDS(V), .VW(VW)) u_out (
    .clk,
    .we     (p1_valid && p1_op == OP_FINAL),
    .waddr  (p1_tag[VW-1:0]),
    .l_vec  (cu_out),
    .r_vec  (rdata_r),
    .rd_addr(out_idx),
    .rd_bits(out_bits)
  );

  // the write sources never compete
  assert property (@(posedge clk) disable iff (!rst_n) !(tr_valid && init_we));
  assert property (@(posedge clk) disable iff (!rst_n) !(p1_valid && init_we));

endmodule
