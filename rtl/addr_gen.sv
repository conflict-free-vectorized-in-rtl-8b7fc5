// addr_gen: vector address of the conflict-free in-place access sequence.
//
// For stage s and running vector index v (0 .. N/r-1) the address offset is
// v with its lowest s+1 digits rotated right by one digit; the digits above
// s are unchanged.  The returned address is the concatenation {s, offset},
// i.e. s * N/r + offset.  For radix 2 a digit is one bit, which gives the
// sequences 0,1,2,3,...  /  0,2,1,3,...  /  0,4,1,5,... of stages 0, 1, 2:
// two consecutive indices 2t, 2t+1 always land on the two addresses that
// differ only in digit s, which is the group the transpose unit combines.
// The bit rotation and the concatenation follow the algorithm; generalising
// the one-bit rotation to a log2(r)-bit digit for radix r = 2**LOG_R is this
// design's reading of the radix-r memory layout.  Purely combinational; the
// stage field of addr is the stage input itself, by construction.
module addr_gen #(
  parameter int unsigned N     = 1024,
  parameter int unsigned LOG_R = 1,
  parameter int unsigned SW    = 4                       // stage field width
) (
  input  logic [SW-1:0]                          stage,
  input  logic [$clog2(N)-LOG_R-1:0]             vec,
  output logic [$clog2(N)-LOG_R-1:0]             offset,
  output logic [SW+$clog2(N)-LOG_R-1:0]          addr
);

  localparam int unsigned VW = $clog2(N) - LOG_R;        // bits of N/r
  localparam int unsigned ND = VW / LOG_R;               // digits of N/r

  always_comb begin
    for (int unsigned d = 0; d < ND; d++) begin
      if (d > 32'(stage))
        offset[d*LOG_R +: LOG_R] = vec[d*LOG_R +: LOG_R];
      else if (d == 32'(stage))
        offset[d*LOG_R +: LOG_R] = vec[0 +: LOG_R];
      else
        offset[d*LOG_R +: LOG_R] = vec[(d+1)*LOG_R +: LOG_R];
    end
    addr = {stage, offset};
  end

endmodule
