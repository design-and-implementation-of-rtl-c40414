// tb_cc_cht: self-checking testbench of the Correlation History Table.
//
// Writes correlations for a set of PCs (including two that share an entry,
// so the second replaces the first), then probes with random PCs and
// addresses and checks, one cycle after each probe, that a prefetch is
// produced exactly for PCs held in the table and that its address is the
// probe address plus the stored (signed) offset. The expected table is kept
// as an associative array in the testbench.
module tb_cc_cht;
  import cc_pkg::*;

  localparam int unsigned ENTRIES = 16;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0;
  pc_t  wr_pc = '0;
  logic signed [OFFSET_W-1:0] wr_offset = '0;
  logic probe_valid = 0;
  pc_t  probe_pc = '0;
  addr_t probe_addr = '0;
  logic pf_valid;
  addr_t pf_addr;

  int checks = 0, failures = 0;

  cc_cht #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected contents: index -> {pc, offset}
  pc_t ref_pc  [int];
  int  ref_off [int];

  function automatic int idx_of(pc_t pc);
    return int'((pc >> 2) % ENTRIES);
  endfunction

  task automatic write(pc_t pc, int off);
    wr_valid = 1; wr_pc = pc; wr_offset = OFFSET_W'(off);
    @(posedge clk);
    #1;
    wr_valid = 0;
    ref_pc[idx_of(pc)]  = pc;
    ref_off[idx_of(pc)] = off;
  endtask

  task automatic probe(pc_t pc, addr_t a);
    bit exp_hit; addr_t exp_a; int i;
    i = idx_of(pc);
    exp_hit = ref_pc.exists(i) && ref_pc[i] == pc;
    exp_a   = exp_hit ? a + addr_t'(ref_off[i]) : '0;
    probe_valid = 1; probe_pc = pc; probe_addr = a;
    @(posedge clk);
    #1;
    probe_valid = 0;
    checks++;
    if (pf_valid !== exp_hit || (exp_hit && pf_addr !== exp_a)) begin
      failures++;
      $display("FAIL probe pc=%h a=%h: pf=%b addr=%h expected pf=%b addr=%h",
               pc, a, pf_valid, pf_addr, exp_hit, exp_a);
    end
  endtask

  initial begin
    pc_t pcs [8];
    int hits = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // empty table: no prefetch
    probe(32'h100, 32'h1000);
    // the motivating example: ldX at 0x100 followed by ldY 0x200 bytes further
    write(32'h100, 32'h200);
    probe(32'h100, 32'h1000);   // -> 0x1200
    probe(32'h104, 32'h1000);   // other PC: nothing
    write(32'h108, -64);
    probe(32'h108, 32'h2000);   // -> 0x1FC0
    write(32'h140, 13848);      // same entry as 0x100: replaces it
    probe(32'h100, 32'h1000);
    probe(32'h140, 32'h1000);
    // random traffic
    pcs = '{32'h100, 32'h108, 32'h110, 32'h140, 32'h180, 32'h2000, 32'h2004, 32'h3FC};
    for (int n = 0; n < 3000; n++) begin
      pc_t rpc; int roff; addr_t ra;
      rpc  = pcs[$urandom % 8];
      roff = int'($urandom % 65536) - 32768;
      ra   = {$urandom} & 32'hFFFF_FFFC;
      if (($urandom % 4) == 0)
        write(rpc, roff);
      else begin
        probe(rpc, ra);
        if (pf_valid) hits++;
      end
    end
    checks++;
    if (hits < 100) begin failures++; $display("FAIL too few hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
