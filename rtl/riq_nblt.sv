// riq_nblt: non-bufferable loop table (NBLT).
//
// A small content-addressable table of the loop-ending addresses of the most
// recent loops that could not be buffered. Each entry holds a valid bit and
// an address; new loops are written in FIFO order, overwriting the oldest
// entry once the table is full. A loop whose ending address hits in the
// table is not buffered again, which stops the issue queue from thrashing
// between Normal and Loop_Buffering.
//
// Interface: LOOKUPS combinational lookup ports (one per decoded
// instruction) and one insert port. An insert takes effect at the next clock
// edge; an address already present is not inserted twice. Reset clears all
// valid bits. Several lookup ports are this design's choice so that a whole
// decode group can be checked in one cycle.
module riq_nblt
  import riq_pkg::*;
#(
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned LOOKUPS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  addr_t              lookup_addr [LOOKUPS],
  output logic [LOOKUPS-1:0] lookup_hit,
  input  logic               insert,
  input  addr_t              insert_addr
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DEPTH-1:0] valid_q;
  addr_t            tag_q [DEPTH];
  logic [PTR_W-1:0] wr_ptr_q;
  logic             ins_present;

  always_comb begin
    for (int l = 0; l < LOOKUPS; l++) begin
      lookup_hit[l] = 1'b0;
      for (int e = 0; e < DEPTH; e++)
        if (valid_q[e] && tag_q[e] == lookup_addr[l]) lookup_hit[l] = 1'b1;
    end
    ins_present = 1'b0;
    for (int e = 0; e < DEPTH; e++)
      if (valid_q[e] && tag_q[e] == insert_addr) ins_present = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      wr_ptr_q <= '0;
      for (int e = 0; e < DEPTH; e++) tag_q[e] <= '0;
    end else if (insert && !ins_present) begin
      valid_q[wr_ptr_q] <= 1'b1;
      tag_q[wr_ptr_q]   <= insert_addr;
      wr_ptr_q          <= (wr_ptr_q == PTR_W'(DEPTH - 1)) ? '0 : wr_ptr_q + 1'b1;
    end
  end

endmodule
