// tb_riq_loop_detector: self-checking test of the loop detector.
//
// Drives directed corner cases (loop of exactly IQ_SIZE and IQ_SIZE+1
// instructions, forward branch, branch to itself, not-taken branch, jump)
// and random groups, and compares is_loop with a reference computed here
// with 64-bit integer arithmetic.
module tb_riq_loop_detector;
  import riq_pkg::*;
  localparam int unsigned IQ = 64, W = 4;
  logic [W-1:0] valid, cond, jump, taken, is_loop;
  addr_t pc [W], target [W];
  int checks = 0, failures = 0;

  riq_loop_detector #(.IQ_SIZE(IQ), .WIDTH(W)) dut (
    .valid, .pc, .is_cond_br(cond), .is_jump(jump), .pred_taken(taken),
    .target, .is_loop);

  function automatic logic ref_loop(logic v, logic c, logic j, logic t,
                                    longint p, longint tg);
    longint n;
    if (!v || !(j || (c && t)) || tg > p) return 1'b0;
    n = (p - tg) / 4 + 1;          // instructions in the loop body
    return n <= IQ;
  endfunction

  task automatic check_all(string what);
    #1;
    for (int i = 0; i < W; i++) begin
      logic exp;
      exp = ref_loop(valid[i], cond[i], jump[i], taken[i], longint'(pc[i]), longint'(target[i]));
      checks++;
      if (is_loop[i] !== exp) begin
        failures++;
        $display("FAIL %s slot %0d pc=%h tg=%h got %b exp %b", what, i, pc[i], target[i], is_loop[i], exp);
      end
    end
  endtask

  initial begin
    // directed: slot0 64-instr loop, slot1 65-instr, slot2 forward, slot3 self
    valid = '1; cond = 4'b0111; jump = 4'b1000; taken = 4'b1111;
    pc[0] = 32'h1000 + 63*4; target[0] = 32'h1000;
    pc[1] = 32'h2000 + 64*4; target[1] = 32'h2000;
    pc[2] = 32'h3000;        target[2] = 32'h3100;
    pc[3] = 32'h4000;        target[3] = 32'h4000;
    check_all("directed");
    if (is_loop !== 4'b1001) begin failures++; $display("FAIL directed vector %b", is_loop); end
    checks++;
    taken = 4'b0000;   // conditional not taken: no loop; jump still counts
    check_all("not taken");
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < W; i++) begin
        pc[i]     = {$urandom_range(0, 255), 2'b00} + 32'h10000;
        target[i] = pc[i] - 32'(($urandom_range(0, 80) - 8) * 4);
      end
      valid = W'($urandom); cond = W'($urandom); jump = W'($urandom); taken = W'($urandom);
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
