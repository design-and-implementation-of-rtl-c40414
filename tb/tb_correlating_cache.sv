// tb_correlating_cache: end-to-end self-checking testbench of the correlating
// cache at its default (main) configuration: 32-entry CB, 8 KB 2-way DL1,
// 16-entry DCE and CHT, behind a behavioural L2 with a 12-cycle latency.
//
// A core model issues in-order loads and stores, each tagged with its PC, and
// checks every load against a flat reference memory. Three phases:
//  A. a packet-processing loop in the style of the motivating example: per
//     packet at an irregular address p, ldX (PC 0x100) reads p, ldY (PC 0x108)
//     reads p+0x200, ldZ (PC 0x110) reads p+0x48 and a store writes p+4, with
//     a few cycles of other work between memory operations. ldX->ldY and
//     ldY->ldZ have constant offsets, so after a short training the CHT
//     prefetches the lines of ldY and ldZ and they hit in the CB;
//  B. the same loop with no gaps between loads, so prefetches pile up behind
//     the core's requests and the prefetch queue overflows;
//  C. random loads and stores over 128 KB, which overflows the DL1 and
//     produces dirty write-backs at both levels.
// Latency checks: a CB hit answers in 1 cycle; a CB miss that hits in the DL1
// without any write-back answers in 3, one that also misses the DL1 in 15. Every event of the design must occur at
// least once, and in phase A at least 80% of the ldY loads of the second half
// must hit in the CB.
module tb_correlating_cache;
  import cc_pkg::*;

  localparam int unsigned RANGE = 128 * 1024;   // bytes of address space used

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready;
  cpu_req_t cpu_req = '0;
  logic cpu_rsp_valid;
  word_t cpu_rsp_rdata;
  logic mem_req_valid, mem_req_ready;
  line_req_t mem_req;
  logic mem_rsp_valid;
  line_t mem_rsp_data;
  cc_events_t events;
  int unsigned n_reads, n_writes;

  int checks = 0, failures = 0;

  correlating_cache dut (.*);

  cc_line_mem_model #(.LATENCY(12), .LINES(RANGE / LINE_BYTES)) l2 (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data),
    .n_reads, .n_writes);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters
  localparam int NEV = $bits(cc_events_t);
  int ev_count [NEV];
  bit saw_wb, saw_dl1_miss;   // during the current request
  bit last_hit;               // CB hit seen at the last request handshake
  always @(posedge clk) if (rst_n) begin
    if (cpu_req_valid && cpu_req_ready) last_hit = events.cb_hit;
    for (int i = 0; i < NEV; i++) ev_count[i] += int'(events[i]);
    if (events.cb_writeback || events.dl1_writeback) saw_wb = 1;
    if (events.dl1_miss) saw_dl1_miss = 1;
  end

  // ---------------- reference memory
  word_t ref_mem [addr_t];
  function automatic word_t mem_word(addr_t a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return a ^ 32'h5A5A_0F0F;
  endfunction

  int lat_hist_hit = 0, lat_hist_fast_miss = 0, lat_hist_slow_miss = 0;

  // one memory operation; returns the latency and whether it hit in the CB
  task automatic op(pc_t pc, bit we, addr_t a, word_t wd, int gap,
                    output int lat, output bit hit);
    word_t exp_d;
    logic [3:0] strb;
    strb = 4'hF;
    repeat (gap) begin @(posedge clk); #1; end
    exp_d = mem_word(a);
    if (we) ref_mem[a] = wd;
    cpu_req_valid = 1;
    cpu_req = '{pc: pc, we: we, addr: a, wdata: wd, wstrb: strb};
    // wait for acceptance (ready sampled just before the edge)
    while (!cpu_req_ready) begin @(posedge clk); #1; end
    saw_wb = 0; saw_dl1_miss = 0;
    @(posedge clk);
    #1;
    hit = last_hit;
    cpu_req_valid = 0;
    lat = 1;
    while (!cpu_rsp_valid && lat < 200) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (!we && cpu_rsp_rdata !== exp_d) begin
      failures++;
      $display("FAIL load pc=%h a=%h: %h expected %h", pc, a, cpu_rsp_rdata, exp_d);
    end
    checks++;
    if (hit && lat != 1) begin
      failures++; $display("FAIL CB hit a=%h took %0d cycles", a, lat);
    end else if (!hit && !saw_wb && !saw_dl1_miss && lat != 3) begin
      failures++; $display("FAIL CB miss / DL1 hit a=%h took %0d cycles", a, lat);
    end else if (!hit && !saw_wb && saw_dl1_miss && lat != 15) begin
      failures++; $display("FAIL CB miss / DL1 miss a=%h took %0d cycles", a, lat);
    end
    if (hit) lat_hist_hit++;
    else if (!saw_wb && !saw_dl1_miss) lat_hist_fast_miss++;
    else if (!saw_wb) lat_hist_slow_miss++;
  endtask

  function automatic addr_t packet_addr();
    // irregular, line-aligned packet addresses in the lower 96 KB
    return addr_t'(($urandom % (96 * 1024 / LINE_BYTES)) * LINE_BYTES);
  endfunction

  string ev_name [NEV];

  initial begin
    int lat; bit hit; addr_t p;
    int y_hits, y_total;
    static int A_ITERS = 400, B_ITERS = 200, C_OPS = 4000;
    // names, indexed by bit position (the last struct member is bit 0)
    ev_name = '{"dl1_writeback", "dl1_miss", "dl1_hit", "cht_hit", "dce_extract",
                "dce_alloc", "pfq_drop", "pf_redundant", "pf_fetch", "cb_writeback",
                "cb_miss", "cb_hit", "cpu_stall"};
    foreach (ev_count[i]) ev_count[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---- phase A: correlated loop with work between memory operations
    y_hits = 0; y_total = 0;
    for (int it = 0; it < A_ITERS; it++) begin
      p = packet_addr();
      op(32'h100, 0, p,          '0, 3, lat, hit);
      op(32'h108, 0, p + 32'h200, '0, 4, lat, hit);
      if (it >= A_ITERS / 2) begin y_total++; y_hits += int'(hit); end
      op(32'h110, 0, p + 32'h48, '0, 4, lat, hit);
      op(32'h10C, 1, p + 32'h4,  $urandom, 2, lat, hit);
    end
    checks++;
    if (y_hits * 10 < y_total * 8) begin
      failures++; $display("FAIL prefetching: only %0d of %0d ldY hit in the CB", y_hits, y_total);
    end
    $display("phase A: %0d of %0d ldY loads hit in the CB", y_hits, y_total);

    // ---- phase B: same loop, back to back
    for (int it = 0; it < B_ITERS; it++) begin
      p = packet_addr();
      op(32'h100, 0, p,          '0, 0, lat, hit);
      op(32'h108, 0, p + 32'h200, '0, 0, lat, hit);
      op(32'h110, 0, p + 32'h48, '0, 0, lat, hit);
    end

    // ---- phase C: random traffic over the whole range
    for (int n = 0; n < C_OPS; n++) begin
      addr_t a; word_t wd; bit we; int gap;
      a   = addr_t'($urandom % RANGE) & ~addr_t'(3);
      wd  = $urandom;
      we  = ($urandom % 3) == 0;
      gap = $urandom % 3;
      op(32'h200 + 4 * ($urandom % 32), we, a, wd, gap, lat, hit);
    end
    // re-read part of phase C's range to check data written back through L2
    for (int n = 0; n < 1000; n++) begin
      addr_t a;
      a = addr_t'($urandom % RANGE) & ~addr_t'(3);
      op(32'h300, 0, a, '0, 0, lat, hit);
    end

    repeat (20) @(posedge clk);
    #1;
    foreach (ev_count[i]) begin
      checks++;
      if (ev_count[i] == 0) begin
        failures++; $display("FAIL event %s never happened", ev_name[i]);
      end
      $display("event %-14s %0d", ev_name[i], ev_count[i]);
    end
    checks++;
    if (lat_hist_hit == 0 || lat_hist_fast_miss == 0 || lat_hist_slow_miss == 0) begin
      failures++; $display("FAIL latency classes not exercised");
    end
    $display("CB hits (1 cycle) %0d, CB misses served by the DL1 in 3 cycles %0d, by the L2 in 15 cycles %0d",
             lat_hist_hit, lat_hist_fast_miss, lat_hist_slow_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
