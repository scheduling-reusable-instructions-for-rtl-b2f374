// tb_riq_lrl: self-checking test of the logical register list.
//
// Writes random logical register triples through all write ports and reads
// them back through all read ports, comparing with an array model.
module tb_riq_lrl;
  import riq_pkg::*;
  localparam int unsigned IQ = 64, WR = 4, RD = 4, SW = $clog2(IQ);
  logic clk = 0;
  logic [WR-1:0] we = '0;
  logic [SW-1:0] waddr [WR], raddr [RD];
  lrl_entry_t wdata [WR], rdata [RD];
  lrl_entry_t model [IQ];
  logic [IQ-1:0] written = '0;
  int checks = 0, failures = 0;

  riq_lrl #(.IQ_SIZE(IQ), .WR_W(WR), .RD_W(RD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < WR; i++) begin waddr[i] = '0; wdata[i] = '0; end
    for (int i = 0; i < RD; i++) raddr[i] = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      // distinct write addresses in one cycle, as in a dispatch group
      begin
        logic [SW-1:0] b;
        b = SW'($urandom);
        for (int i = 0; i < WR; i++) begin
          we[i]    = $urandom_range(0, 1);
          waddr[i] = b + SW'(i);
          wdata[i] = lrl_entry_t'($urandom);
        end
      end
      @(posedge clk);
      for (int i = 0; i < WR; i++)
        if (we[i]) begin model[waddr[i]] = wdata[i]; written[waddr[i]] = 1'b1; end
      #1 we = '0;
      for (int r = 0; r < RD; r++) raddr[r] = SW'($urandom);
      #1;
      for (int r = 0; r < RD; r++)
        if (written[raddr[r]]) begin
          checks++;
          if (rdata[r] !== model[raddr[r]]) begin
            failures++;
            $display("FAIL read slot %0d got %h exp %h", raddr[r], rdata[r], model[raddr[r]]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
