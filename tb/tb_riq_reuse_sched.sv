// tb_riq_reuse_sched: self-checking test of the reuse pointer.
//
// For several buffered-block sizes, drives random issue state bits and
// renaming capacity and checks, against a model pointer kept here, the
// number m of reused instructions (the leading issued ones, at most
// ISSUE_W, not past the last slot, at most ren_avail), their slots, the
// pointer advance by m and the return to slot 0 after the last slot.
module tb_riq_reuse_sched;
  import riq_pkg::*;
  localparam int unsigned IQ = 64, IW = 4, SW = $clog2(IQ), CW = $clog2(IQ+1), WW = $clog2(IW+1);
  logic clk = 0, rst_n = 0, start = 0, active = 0;
  logic [CW-1:0] nbuf = '0;
  logic [IQ-1:0] buf_issued = '0;
  logic [WW-1:0] ren_avail = '0;
  logic [IW-1:0] reuse_valid;
  logic [SW-1:0] reuse_slot [IW];
  logic [WW-1:0] reuse_cnt;
  logic [SW-1:0] ptr;
  logic wrap;
  int checks = 0, failures = 0, wraps = 0, mptr;

  riq_reuse_sched #(.IQ_SIZE(IQ), .ISSUE_W(IW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (ptr model %0d)", msg, mptr); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      @(negedge clk);
      nbuf = CW'((run == 5) ? IQ : $urandom_range(1, IQ));
      start = 1; active = 0;
      @(posedge clk); #1 start = 0; mptr = 0;
      chk(ptr == 0, "start resets pointer");
      for (int n = 0; n < 300; n++) begin
        int m;
        @(negedge clk);
        active     = ($urandom_range(0, 7) != 0);
        buf_issued = {$urandom, $urandom} | {$urandom, $urandom};
        ren_avail  = WW'($urandom_range(0, IW));
        #1;
        m = 0;
        if (active)
          for (int k = 0; k < IW; k++) begin
            if (mptr + k < int'(nbuf) && buf_issued[mptr + k] && k < int'(ren_avail) && m == k) m++;
          end
        chk(reuse_cnt == WW'(m), $sformatf("m got %0d exp %0d", reuse_cnt, m));
        for (int k = 0; k < IW; k++) begin
          chk(reuse_valid[k] == (k < m), "valid vector");
          if (k < m) chk(reuse_slot[k] == SW'(mptr + k), "slot");
        end
        chk(wrap == (m > 0 && mptr + m == int'(nbuf)), "wrap");
        @(posedge clk);
        if (m > 0 && mptr + m == int'(nbuf)) begin mptr = 0; wraps++; end
        else mptr += m;
        #1 chk(int'(ptr) == mptr, "pointer advance");
      end
    end
    chk(wraps > 3, "pointer wrapped");
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
