// tb_riq_nblt: self-checking test of the non-bufferable loop table.
//
// Inserts loop-end addresses and checks lookups against a queue model of
// the table: hits for the DEPTH most recent distinct addresses, FIFO
// eviction of the oldest, no duplicate entries, reset clearing everything.
module tb_riq_nblt;
  import riq_pkg::*;
  localparam int unsigned DEPTH = 8, L = 4;
  logic clk = 0, rst_n = 0;
  addr_t lookup_addr [L];
  logic [L-1:0] lookup_hit;
  logic insert = 0;
  addr_t insert_addr = '0;
  int checks = 0, failures = 0;
  addr_t model [$];

  riq_nblt #(.DEPTH(DEPTH), .LOOKUPS(L)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic in_model(addr_t a);
    foreach (model[i]) if (model[i] == a) return 1'b1;
    return 1'b0;
  endfunction

  task automatic probe();
    for (int l = 0; l < L; l++)
      lookup_addr[l] = ($urandom_range(0, 1) == 0 && model.size() > 0) ?
                       model[$urandom_range(0, model.size() - 1)] :
                       addr_t'($urandom_range(0, 40)) << 2;
    #1;
    for (int l = 0; l < L; l++) begin
      checks++;
      if (lookup_hit[l] !== in_model(lookup_addr[l])) begin
        failures++;
        $display("FAIL lookup %h got %b exp %b", lookup_addr[l], lookup_hit[l], in_model(lookup_addr[l]));
      end
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) lookup_addr[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    probe();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      insert      = ($urandom_range(0, 2) != 0);
      insert_addr = addr_t'($urandom_range(0, 40)) << 2;
      @(posedge clk);
      if (insert && !in_model(insert_addr)) begin
        model.push_back(insert_addr);
        if (model.size() > DEPTH) void'(model.pop_front());
      end
      #1 insert = 0;
      probe();
    end
    // reset clears the table
    rst_n = 0; #2; rst_n = 1; model.delete();
    probe();
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
