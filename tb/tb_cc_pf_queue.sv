// tb_cc_pf_queue: self-checking testbench of the prefetch buffer.
//
// Random pushes and pops are compared, cycle by cycle, with a reference list
// kept in the testbench: the newest entry is shown first, a push into a full
// buffer discards the oldest entry and pulses drop, and a push together with
// a pop never drops.
module tb_cc_pf_queue;
  import cc_pkg::*;

  localparam int unsigned DEPTH = 2;

  logic clk = 0, rst_n = 0;
  logic push_valid = 0, pop_ready = 0;
  addr_t push_addr = '0;
  logic pop_valid, drop;
  addr_t pop_addr;

  int checks = 0, failures = 0;

  cc_pf_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  addr_t ref_q [$];   // index 0 = newest
  int n_drop = 0, n_pop = 0;

  initial begin
    bit exp_drop;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 20000; n++) begin
      push_valid = ($urandom % 3) != 0;
      push_addr  = $urandom;
      pop_ready  = ($urandom % 3) == 0;
      #1;
      // outputs before the edge
      checks++;
      if (pop_valid !== (ref_q.size() != 0) || (pop_valid && pop_addr !== ref_q[0])) begin
        failures++;
        $display("FAIL head: valid=%b addr=%h, expected %0d entries", pop_valid, pop_addr, ref_q.size());
      end
      if (pop_ready && ref_q.size() != 0) begin
        void'(ref_q.pop_front());
        n_pop++;
      end
      exp_drop = push_valid && ref_q.size() == DEPTH;
      checks++;
      if (drop !== exp_drop) begin
        failures++; $display("FAIL drop=%b expected %b", drop, exp_drop);
      end
      if (exp_drop) begin
        void'(ref_q.pop_back());
        n_drop++;
      end
      if (push_valid) ref_q.push_front(push_addr);
      @(posedge clk); #1;
    end
    checks++;
    if (n_drop < 100 || n_pop < 100) begin
      failures++; $display("FAIL coverage: drops %0d pops %0d", n_drop, n_pop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
