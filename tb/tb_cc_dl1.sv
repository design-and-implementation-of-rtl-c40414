// tb_cc_dl1: self-checking testbench of the level-1 data cache.
//
// The DL1 (default geometry: 128 sets x 2 ways of 32-byte lines) sits in front
// of a behavioural L2 with a 12-cycle latency. Random line reads and line
// write-backs over 1024 lines (four times the capacity, so sets overflow and
// dirty lines are evicted) are checked against a reference line memory, and
// the latency of every request against a reference copy of the tags with LRU
// replacement: 2 cycles for a hit, 2 + 12 for a read miss with a clean victim,
// 2 + 12 + 1 + 12 when a dirty victim is written back first, 2 for a write
// miss into a clean victim and 2 + 12 for one that evicts a dirty victim.
module tb_cc_dl1;
  import cc_pkg::*;

  localparam int unsigned SETS = 128, WAYS = 2, L2_LAT = 12;
  localparam int unsigned LINES = 1024;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  line_req_t req = '0;
  logic rsp_valid;
  line_t rsp_data;
  logic mem_req_valid, mem_req_ready;
  line_req_t mem_req;
  logic mem_rsp_valid;
  line_t mem_rsp_data;
  logic ev_hit, ev_miss, ev_writeback;
  int unsigned n_reads, n_writes;

  int checks = 0, failures = 0;

  cc_dl1 #(.SETS(SETS), .WAYS(WAYS), .HIT_LATENCY(2)) dut (.*);

  cc_line_mem_model #(.LATENCY(L2_LAT), .LINES(4096)) l2 (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data),
    .n_reads, .n_writes);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference
  line_t  ref_line [laddr_t];
  bit     rv [SETS][WAYS];
  bit     rd [SETS][WAYS];
  laddr_t rt [SETS][WAYS];
  int     lru [SETS];     // least recently used way
  int n_hit = 0, n_miss = 0, n_wb = 0;

  function automatic line_t pattern_line(laddr_t la);
    line_t l;
    for (int w = 0; w < WORDS_PER_LINE; w++)
      l[w*WORD_W +: WORD_W] = {la, LINE_OFF_W'(w*4)} ^ 32'h5A5A_0F0F;
    return l;
  endfunction

  function automatic int expect_lat(laddr_t la, bit we);
    int s; int v;
    s = int'(la % SETS);
    for (int w = 0; w < WAYS; w++)
      if (rv[s][w] && rt[s][w] == la) begin
        lru[s] = 1 - w;
        if (we) rd[s][w] = 1;
        n_hit++;
        return 2;
      end
    n_miss++;
    v = lru[s];
    for (int w = WAYS - 1; w >= 0; w--) if (!rv[s][w]) v = w;
    expect_lat = 2;
    if (rv[s][v] && rd[s][v]) begin expect_lat += L2_LAT; n_wb++; end
    if (!we) expect_lat += (expect_lat > 2) ? L2_LAT + 1 : L2_LAT;
    rv[s][v] = 1; rt[s][v] = la; rd[s][v] = we; lru[s] = 1 - v;
  endfunction

  task automatic access(bit we, laddr_t la, line_t wd);
    int lat; int exp_lat; line_t exp_d;
    exp_d = ref_line.exists(la) ? ref_line[la] : pattern_line(la);
    if (we) ref_line[la] = wd;
    exp_lat = expect_lat(la, we);
    while (!req_ready) begin @(posedge clk); #1; end
    req_valid = 1;
    req = '{we: we, laddr: la, wdata: wd};
    @(posedge clk);
    #1;
    req_valid = 0;
    lat = 1;
    while (!rsp_valid && lat < 200) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (lat != exp_lat || (!we && rsp_data !== exp_d)) begin
      failures++;
      $display("FAIL %s line %h: lat=%0d expected %0d data %s", we ? "write" : "read", la,
               lat, exp_lat, (!we && rsp_data !== exp_d) ? "wrong" : "ok");
    end
  endtask

  int ev_n_hit = 0, ev_n_miss = 0, ev_n_wb = 0;
  always @(posedge clk) if (rst_n) begin
    ev_n_hit  += int'(ev_hit);
    ev_n_miss += int'(ev_miss);
    ev_n_wb   += int'(ev_writeback);
  end

  initial begin
    laddr_t la; line_t wd;
    foreach (lru[s]) lru[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // directed: a set filled with three lines evicts the least recently used
    access(0, laddr_t'(32'h10), '0);                 // miss: 14
    access(0, laddr_t'(32'h10), '0);                 // hit: 2
    access(1, laddr_t'(32'h10 + SETS), {8{32'h1234_5678}}); // write miss into free way: 2
    access(0, laddr_t'(32'h10), '0);                 // hit, makes way of +SETS the LRU
    access(0, laddr_t'(32'h10 + 2*SETS), '0);        // evicts dirty +SETS: 27
    access(0, laddr_t'(32'h10 + SETS), '0);          // back from L2 with the written data
    for (int n = 0; n < 20000; n++) begin
      la = laddr_t'($urandom % LINES);
      for (int w = 0; w < WORDS_PER_LINE; w++) wd[w*WORD_W +: WORD_W] = $urandom;
      access(($urandom % 3) == 0, la, wd);
    end
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (n_hit < 1000 || n_miss < 1000 || n_wb < 500) begin
      failures++; $display("FAIL coverage hit %0d miss %0d wb %0d", n_hit, n_miss, n_wb);
    end
    checks++;
    if (ev_n_hit != n_hit || ev_n_miss != n_miss || ev_n_wb != n_wb || n_writes != n_wb) begin
      failures++; $display("FAIL events %0d %0d %0d %0d", ev_n_hit, ev_n_miss, ev_n_wb, n_writes);
    end
    $display("hits %0d misses %0d write-backs %0d", n_hit, n_miss, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
