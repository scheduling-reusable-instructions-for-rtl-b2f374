// riq_lrl: logical register list (LRL).
//
// Holds the logical register numbers (destination and two sources, 3 x 5
// bits) of every buffered instruction, so that a reused instruction can be
// renamed again without being fetched or decoded. The list is indexed by
// buffer slot: the position of the instruction in buffering order, 0 for
// the first buffered instruction. Buffered instructions never leave the
// issue queue and never change their relative order, so a slot keeps naming
// the same instruction for as long as the loop stays buffered.
//
// Interface: WR_W write ports (the instructions buffered in one dispatch
// group) and RD_W combinational read ports (the instructions the reuse
// pointer selects in one cycle). Writes land at the clock edge. The array
// needs no reset: a slot is always written before it is read. Indexing by
// slot rather than by queue entry is this design's choice.
module riq_lrl
  import riq_pkg::*;
#(
  parameter int unsigned IQ_SIZE = 64,
  parameter int unsigned WR_W    = 4,
  parameter int unsigned RD_W    = 4,
  localparam int unsigned SLOT_W = $clog2(IQ_SIZE)
) (
  input  logic              clk,
  input  logic [WR_W-1:0]   we,
  input  logic [SLOT_W-1:0] waddr [WR_W],
  input  lrl_entry_t        wdata [WR_W],
  input  logic [SLOT_W-1:0] raddr [RD_W],
  output lrl_entry_t        rdata [RD_W]
);

  lrl_entry_t mem [IQ_SIZE];

  always_ff @(posedge clk) begin
    for (int w = 0; w < WR_W; w++)
      if (we[w]) mem[waddr[w]] <= wdata[w];
  end

  always_comb begin
    for (int r = 0; r < RD_W; r++) rdata[r] = mem[raddr[r]];
  end

endmodule
