// riq_loop_detector: decode-stage detector of capturable loops.
//
// For each of WIDTH decoded instructions it flags a loop-ending candidate: a
// conditional branch predicted taken, or a direct jump, whose target lies at
// or before the instruction (a backward transfer) and whose loop body, from
// the target to the branch inclusive, holds no more than IQ_SIZE
// instructions. The branch address becomes R_looptail and the target
// R_loophead. The check uses the predicted target, so it is available at
// decode.
//
// Purely combinational; no clock. The loop size is measured in instructions
// of INSTR_BYTES bytes (fixed-length instructions are this design's
// assumption), and a conditional branch must be predicted taken to count as
// a loop end (also this design's choice).
module riq_loop_detector
  import riq_pkg::*;
#(
  parameter int unsigned IQ_SIZE     = 64,
  parameter int unsigned WIDTH       = 4,
  parameter int unsigned INSTR_BYTES = 4
) (
  input  logic [WIDTH-1:0] valid,
  input  addr_t            pc         [WIDTH],
  input  logic [WIDTH-1:0] is_cond_br,
  input  logic [WIDTH-1:0] is_jump,
  input  logic [WIDTH-1:0] pred_taken,
  input  addr_t            target     [WIDTH],
  output logic [WIDTH-1:0] is_loop      // capturable loop end
);

  localparam int unsigned SHIFT = $clog2(INSTR_BYTES);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      addr_t span;                     // instructions from target to branch
      logic  backward, transfer;
      span     = (pc[i] - target[i]) >> SHIFT;
      backward = (target[i] <= pc[i]);
      transfer = is_jump[i] | (is_cond_br[i] & pred_taken[i]);
      // body size = span + 1 <= IQ_SIZE
      is_loop[i] = valid[i] & transfer & backward & (span < addr_t'(IQ_SIZE));
    end
  end

endmodule
