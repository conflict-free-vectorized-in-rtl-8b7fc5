// bp_ctrl: schedule of the in-place vectorized BP decoder.
//
// One decode: clear the intermediate slots 1 .. n-1 of the shared memory,
// then for each iteration
//   * right-bound stages s = 0 .. n-2: read R from slot s and L from slot
//     s+1, write the new R (transposed) back into slot s+1;
//   * left-bound stages s = n-1 .. 1: read R from slot s and L from slot
//     s+1, write the new L (transposed) back into slot s;
//   * the final stage: read R from slot 0 and L from slot 1, compute the
//     leftmost L and store the hard decisions in the output memory,
// i.e. 2n-1 stages of N/r vector operations, with n = log_r N.
//
// Addresses come from addr_gen.  A right-bound stage s walks the sequence
// of stage s; a left-bound stage s walks the sequence of stage s-1, because
// its results must be transposed into the pairing that stage s-1 reads
// (the in-place write of L into slot s is read next by stage s-1).  The
// final stage uses the plain sequence 0, 1, 2, ...
//
// Timing: one vector operation is issued per cycle (rd_en with both read
// addresses and the write address as tag).  After the last vector of a stage
// the controller waits in ST_DRAIN until the datapath reports !pipe_busy,
// so the next stage never reads a word still in flight.  Initialisation
// takes (n-1)*N/r cycles.  done pulses for one cycle after the last
// iteration; a start while busy is ignored.  iter_max = 0 runs one iteration.
// The stage order and the slot usage follow the algorithm; the drain between
// stages and the clearing by the controller are this design's choices.
module bp_ctrl
  import bp_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned LOG_R = 1,
  parameter int unsigned ITW   = 8,
  // derived
  parameter int unsigned NST   = $clog2(N) / LOG_R,       // n stages
  parameter int unsigned V     = N >> LOG_R,              // vectors per slot
  parameter int unsigned VW    = $clog2(N) - LOG_R,
  parameter int unsigned SW    = $clog2(NST + 1),
  parameter int unsigned AW    = SW + VW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [ITW-1:0]  iter_max,
  input  logic            pipe_busy,
  output logic            busy,
  output logic            done,
  output logic            init_we,
  output logic [AW-1:0]   init_addr,
  output logic            rd_en,
  output logic [AW-1:0]   rd_addr_r,
  output logic [AW-1:0]   rd_addr_l,
  output logic [AW-1:0]   rd_tag,
  output bp_op_e          rd_op,
  output logic [ITW-1:0]  iter_cnt,
  output logic [SW-1:0]   cur_stage
);

  bp_state_e      state;
  bp_op_e         op;
  logic [SW-1:0]  stage;
  logic [VW-1:0]  vec;
  logic [AW-1:0]  icnt;

  logic [SW-1:0]  gen_stage;
  logic [VW-1:0]  gen_off;
  logic [AW-1:0]  gen_addr;

  localparam logic [AW-1:0] VA = AW'(V);

  always_comb begin
    unique case (op)
      OP_RIGHT: gen_stage = stage;
      OP_LEFT:  gen_stage = stage - 1'b1;
      default:  gen_stage = '0;
    endcase
  end

  addr_gen #(.N(N), .LOG_R(LOG_R), .SW(SW)) u_addr (
    .stage (gen_stage),
    .vec   (vec),
    .offset(gen_off),
    .addr  (gen_addr)
  );

  always_comb begin
    rd_en     = (state == ST_ISSUE);
    rd_op     = op;
    rd_addr_r = (op == OP_LEFT) ? gen_addr + VA : gen_addr;
    rd_addr_l = rd_addr_r + VA;
    unique case (op)
      OP_RIGHT: rd_tag = rd_addr_l;
      OP_LEFT:  rd_tag = rd_addr_r;
      default:  rd_tag = AW'(gen_off);
    endcase
    init_we   = (state == ST_INIT);
    init_addr = icnt;
    busy      = (state != ST_IDLE);
    done      = (state == ST_DONE);
    cur_stage = stage;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      op       <= OP_RIGHT;
      stage    <= '0;
      vec      <= '0;
      icnt     <= '0;
      iter_cnt <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          state    <= ST_INIT;
          icnt     <= VA;
          iter_cnt <= '0;
        end
        ST_INIT: begin
          icnt <= icnt + 1'b1;
          if (icnt == AW'(NST * V - 1)) begin
            state <= ST_ISSUE;
            op    <= OP_RIGHT;
            stage <= '0;
            vec   <= '0;
          end
        end
        ST_ISSUE: begin
          vec <= vec + 1'b1;
          if (vec == VW'(V - 1)) state <= ST_DRAIN;
        end
        ST_DRAIN: if (!pipe_busy) begin
          state <= ST_ISSUE;
          vec   <= '0;
          unique case (op)
            OP_RIGHT: if (stage == SW'(NST - 2)) begin
                        op    <= OP_LEFT;
                        stage <= SW'(NST - 1);
                      end else begin
                        stage <= stage + 1'b1;
                      end
            OP_LEFT:  if (stage == SW'(1)) begin
                        op    <= OP_FINAL;
                        stage <= '0;
                      end else begin
                        stage <= stage - 1'b1;
                      end
            default: begin
              iter_cnt <= iter_cnt + 1'b1;
              op       <= OP_RIGHT;
              stage    <= '0;
              if (iter_cnt + 1'b1 >= iter_max) state <= ST_DONE;
            end
          endcase
        end
        ST_DONE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The schedule needs at least one right-bound and one left-bound stage.
  initial assert (NST >= 2) else $error("bp_ctrl: N must be at least r*r");

endmodule
