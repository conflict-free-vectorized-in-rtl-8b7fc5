// vec_transpose: streaming r x r transpose of result vectors.
//
// Consecutive polar-decoder stages pair message elements at different
// distances.  If the r result vectors of a group (vectors whose memory
// addresses differ only in the digit of the current stage) are transposed
// before being written back to the addresses they were read from, each
// stored vector again holds exactly the r elements one CU of the next stage
// needs.  This keeps every memory access a full, aligned vector.
//
// Interface: one vector plus its write address (tag) may enter per cycle
// (in_valid).  After the r-th vector of a group has entered, the group is
// copied into an output buffer and row j of the transposed matrix leaves on
// cycles 1..r after that, paired with the tag of input vector j (the data
// is written back in place).  Input and output buffers are separate, so a
// new group can be collected while the previous one is emitted: throughput
// is one vector per cycle, latency r cycles from the last vector of a group
// to its first output row.  busy is high while a partial group is held or
// rows are still being emitted.  The group size r and the transpose follow
// the algorithm; the double buffering is this design's choice.
module vec_transpose #(
  parameter int unsigned RADIX = 2,
  parameter int unsigned Q     = 8,
  parameter int unsigned TAG_W = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [RADIX-1:0][Q-1:0]     in_vec,
  input  logic [TAG_W-1:0]            in_tag,
  output logic                        out_valid,
  output logic [RADIX-1:0][Q-1:0]     out_vec,
  output logic [TAG_W-1:0]            out_tag,
  output logic                        busy
);

  localparam int unsigned CW = (RADIX > 1) ? $clog2(RADIX) : 1;

  logic [RADIX-1:0][RADIX-1:0][Q-1:0] in_buf;   // [vector][element]
  logic [RADIX-1:0][TAG_W-1:0]        in_tags;
  logic [CW-1:0]                      in_cnt;
  logic [RADIX-1:0][RADIX-1:0][Q-1:0] out_buf;  // [row][element], transposed
  logic [RADIX-1:0][TAG_W-1:0]        out_tags;
  logic [CW-1:0]                      out_idx;
  logic                               out_act;

  wire group_full = in_valid && (in_cnt == CW'(RADIX-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt  <= '0;
      out_idx <= '0;
      out_act <= 1'b0;
    end else begin
      if (in_valid) in_cnt <= group_full ? '0 : in_cnt + 1'b1;
      if (group_full) begin
        out_act <= 1'b1;
        out_idx <= '0;
      end else if (out_act) begin
        if (out_idx == CW'(RADIX-1)) out_act <= 1'b0;
        else                         out_idx <= out_idx + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      in_buf[in_cnt]  <= in_vec;
      in_tags[in_cnt] <= in_tag;
    end
    if (group_full) begin
      for (int unsigned row = 0; row < RADIX; row++) begin
        out_tags[row] <= (row == RADIX-1) ? in_tag : in_tags[row];
        for (int unsigned col = 0; col < RADIX; col++)
          out_buf[row][col] <= (col == RADIX-1) ? in_vec[row] : in_buf[col][row];
      end
    end
  end

  assign out_valid = out_act;
  assign out_vec   = out_buf[out_idx];
  assign out_tag   = out_tags[out_idx];
  assign busy      = out_act || (in_cnt != '0);

  // A new group may only be loaded once the previous one has been emitted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   group_full |-> (!out_act || out_idx == CW'(RADIX-1)));

endmodule
