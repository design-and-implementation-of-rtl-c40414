// tb_cc_cb: self-checking testbench of the Correlating Buffer.
//
// The CB (32 entries, direct mapped) sits in front of a behavioural line
// memory with the 2-cycle DL1 latency. Random loads and stores over 128 lines
// (so lines conflict and dirty lines are evicted) are checked against a flat
// reference memory, and the latency of each request against a reference copy
// of the CB's tags: 1 cycle for a hit, 3 for a miss with a clean victim, 6 for
// a miss that first writes back a dirty victim. Prefetches are injected
// between requests: one whose line is absent must fetch it (the next access
// to it then hits), one whose line is present must not touch the DL1.
module tb_cc_cb;
  import cc_pkg::*;

  localparam int unsigned ENTRIES = 32;
  localparam int unsigned LINES   = 128;   // address range exercised

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready;
  cpu_req_t cpu_req = '0;
  logic cpu_rsp_valid;
  word_t cpu_rsp_rdata;
  logic pf_valid = 0, pf_ready;
  addr_t pf_addr = '0;
  logic dl1_req_valid, dl1_req_ready;
  line_req_t dl1_req;
  logic dl1_rsp_valid;
  line_t dl1_rsp_data;
  logic ev_hit, ev_miss, ev_writeback, ev_pf_fetch, ev_pf_redundant;
  int unsigned n_reads, n_writes;

  int checks = 0, failures = 0;

  cc_cb #(.ENTRIES(ENTRIES)) dut (.*);

  cc_line_mem_model #(.LATENCY(2), .LINES(4096)) dl1 (
    .clk, .rst_n,
    .req_valid(dl1_req_valid), .req_ready(dl1_req_ready), .req(dl1_req),
    .rsp_valid(dl1_rsp_valid), .rsp_data(dl1_rsp_data),
    .n_reads, .n_writes);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference state
  word_t ref_mem [addr_t];
  bit    rv [ENTRIES];
  bit    rd [ENTRIES];
  laddr_t rl [ENTRIES];
  int n_hit = 0, n_clean = 0, n_dirty = 0, n_pf = 0, n_pf_red = 0;

  function automatic word_t mem_word(addr_t a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return a ^ 32'h5A5A_0F0F;
  endfunction

  // expected latency of an access to line la; updates the tag copy
  function automatic int expect_lat(laddr_t la, bit we);
    int i; int lat;
    i = int'(la % ENTRIES);
    if (rv[i] && rl[i] == la) lat = 1;
    else if (rv[i] && rd[i]) lat = 6;
    else lat = 3;
    rv[i] = 1; rl[i] = la;
    if (lat != 1) rd[i] = 0;
    if (we) rd[i] = 1;
    return lat;
  endfunction

  task automatic access(bit we, addr_t a, word_t wd, logic [3:0] strb);
    int lat; int exp_lat; word_t exp_d;
    exp_d = mem_word(a);
    if (we) begin
      for (int b = 0; b < 4; b++) if (strb[b]) exp_d[b*8 +: 8] = wd[b*8 +: 8];
      ref_mem[a] = exp_d;
    end
    exp_lat = expect_lat(a[ADDR_W-1:LINE_OFF_W], we);
    while (!cpu_req_ready) begin @(posedge clk); #1; end
    cpu_req_valid = 1;
    cpu_req = '{pc: 32'h0, we: we, addr: a, wdata: wd, wstrb: strb};
    @(posedge clk);
    #1;
    cpu_req_valid = 0;
    lat = 1;
    while (!cpu_rsp_valid && lat < 100) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (lat != exp_lat || (!we && cpu_rsp_rdata !== exp_d)) begin
      failures++;
      $display("FAIL %s a=%h: data=%h lat=%0d, expected data=%h lat=%0d",
               we ? "store" : "load", a, cpu_rsp_rdata, lat, exp_d, exp_lat);
    end
    case (exp_lat) 1: n_hit++; 3: n_clean++; default: n_dirty++; endcase
    @(posedge clk); #1;
  endtask

  task automatic prefetch(addr_t a);
    int i; bit present; int unsigned reads0;
    laddr_t la;
    la = a[ADDR_W-1:LINE_OFF_W];
    i = int'(la % ENTRIES);
    present = rv[i] && rl[i] == la;
    reads0 = n_reads;
    while (!cpu_req_ready) begin @(posedge clk); #1; end
    pf_valid = 1; pf_addr = a;
    @(posedge clk);
    #1;
    pf_valid = 0;
    checks++;
    // wait until the CB is idle again
    while (!cpu_req_ready) begin @(posedge clk); #1; end
    if (present) begin
      n_pf_red++;
      if (n_reads != reads0) begin
        failures++; $display("FAIL redundant prefetch %h read the DL1", a);
      end
    end else begin
      n_pf++;
      if (n_reads != reads0 + 1) begin
        failures++; $display("FAIL prefetch %h did not read the DL1 once", a);
      end
      if (rv[i] && rd[i]) rd[i] = 0;
      rv[i] = 1; rl[i] = la;
    end
  endtask

  // count the event pulses
  int ev_n_hit = 0, ev_n_miss = 0, ev_n_pf = 0, ev_n_red = 0, ev_n_wb = 0;
  always @(posedge clk) if (rst_n) begin
    ev_n_hit  += int'(ev_hit);
    ev_n_miss += int'(ev_miss);
    ev_n_pf   += int'(ev_pf_fetch);
    ev_n_red  += int'(ev_pf_redundant);
    ev_n_wb   += int'(ev_writeback);
  end

  initial begin
    addr_t a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // directed: miss, hit, store hit, conflict eviction of a dirty line
    access(0, 32'h0000_1000, 0, 0);              // clean miss: 3
    access(0, 32'h0000_1004, 0, 0);              // hit: 1
    access(1, 32'h0000_1008, 32'hCAFE_F00D, 4'hF);
    access(0, 32'h0000_1008, 0, 0);
    access(0, 32'h0000_1000 + ENTRIES*LINE_BYTES, 0, 0); // evicts dirty: 6
    access(0, 32'h0000_1008, 0, 0);              // refetched from DL1 copy
    prefetch(32'h0000_3000);                     // absent: fetched
    access(0, 32'h0000_301C, 0, 0);              // now a hit
    prefetch(32'h0000_3004);                     // present: redundant
    // random
    for (int n = 0; n < 6000; n++) begin
      word_t wd; logic [3:0] strb;
      a    = 32'h0001_0000 + (($urandom % (LINES * LINE_BYTES)) & ~32'h3);
      wd   = $urandom;
      strb = 4'($urandom);
      case ($urandom % 8)
        0, 1, 2: access(1, a, wd, strb);
        3:       prefetch(a);
        default: access(0, a, 0, 0);
      endcase
    end
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (n_hit < 100 || n_clean < 100 || n_dirty < 100 || n_pf < 50 || n_pf_red < 10) begin
      failures++; $display("FAIL coverage: hit %0d clean %0d dirty %0d pf %0d red %0d",
                           n_hit, n_clean, n_dirty, n_pf, n_pf_red);
    end
    checks++;
    if (ev_n_hit != n_hit || ev_n_miss != n_clean + n_dirty || ev_n_pf != n_pf ||
        ev_n_red != n_pf_red || ev_n_wb != n_writes) begin
      failures++; $display("FAIL event counts %0d %0d %0d %0d %0d/%0d", ev_n_hit, ev_n_miss, ev_n_pf, ev_n_red, ev_n_wb, n_writes);
    end
    $display("hits %0d clean misses %0d dirty misses %0d prefetches %0d redundant %0d",
             n_hit, n_clean, n_dirty, n_pf, n_pf_red);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
