// shared_msg_mem: in-place message memory shared by R and L messages.
//
// The memory holds log2(N)+1 slots of N/r vector words each; slot k holds
// the messages of factor-graph column k.  Within one stage only R or only L
// messages are produced, and each produced vector overwrites, at the same
// address, a vector that was read for the same stage and is not needed any
// more, so one memory serves both message directions (half the storage of
// separate R and L memories).  Slot 0 keeps the frozen-bit priors and the
// last slot the channel LLRs; the slots in between alternate between R and
// L contents during an iteration.
//
// Ports: two synchronous read ports (R vector and L vector of one CU, data
// one cycle after the address) and one write port, so one CU operation can
// start every cycle.  A read of an address written in the same cycle returns
// the old word.  The sharing and slot organisation follow the algorithm;
// the port count is this design's choice.
module shared_msg_mem #(
  parameter int unsigned RADIX = 2,
  parameter int unsigned Q     = 8,
  parameter int unsigned DEPTH = 5632,
  parameter int unsigned AW    = 13
) (
  input  logic                    clk,
  input  logic                    re,
  input  logic [AW-1:0]           raddr_r,
  input  logic [AW-1:0]           raddr_l,
  output logic [RADIX-1:0][Q-1:0] rdata_r,
  output logic [RADIX-1:0][Q-1:0] rdata_l,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic [RADIX-1:0][Q-1:0] wdata
);

  logic [RADIX-1:0][Q-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) begin
      rdata_r <= mem[raddr_r];
      rdata_l <= mem[raddr_l];
    end
  end

  assert property (@(posedge clk) we |-> (32'(waddr) < DEPTH));
  assert property (@(posedge clk) re |-> (32'(raddr_r) < DEPTH && 32'(raddr_l) < DEPTH));

endmodule
