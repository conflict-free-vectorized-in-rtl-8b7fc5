// decision_out_mem: hard decisions and in-order output memory.
//
// For every element of a final-stage vector the decoded bit is 0 when
// L + R >= 0 and 1 otherwise, where L is the left-bound message computed at
// the leftmost column and R the frozen-bit prior of the same position.  The
// r decided bits of one vector are written as one word at the vector index,
// so the output memory holds the decoded bits in natural order: word v holds
// bits r*v .. r*v+r-1, element 0 in bit 0.  The sum is formed at full
// precision (Q+1 bits).  Writes take effect at the clock edge; the read port
// is synchronous (data one cycle after rd_addr).  The decision rule follows
// the algorithm; the memory organisation and ports are this design's choice.
module decision_out_mem #(
  parameter int unsigned RADIX = 2,
  parameter int unsigned Q     = 8,
  parameter int unsigned WORDS = 512,
  parameter int unsigned VW    = 9
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [VW-1:0]           waddr,
  input  logic [RADIX-1:0][Q-1:0] l_vec,
  input  logic [RADIX-1:0][Q-1:0] r_vec,
  input  logic [VW-1:0]           rd_addr,
  output logic [RADIX-1:0]        rd_bits
);

  logic [RADIX-1:0] mem [WORDS];
  logic [RADIX-1:0] bits;

  always_comb begin
    for (int unsigned e = 0; e < RADIX; e++) begin
      logic signed [Q:0] s;
      s       = (Q+1)'($signed(l_vec[e])) + (Q+1)'($signed(r_vec[e]));
      bits[e] = s[Q];
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= bits;
    rd_bits <= mem[rd_addr];
  end

endmodule
