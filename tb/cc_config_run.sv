// cc_config_run: runs one configuration of the correlating cache on a
// synthetic packet-processing loop and reports what happened. Used by
// tb_cc_configs to compare cache and table sizes side by side.
//
// The loop: for each packet at an irregular line-aligned address p, LOADS
// loads at PCs 0x400, 0x404, ... read p, p+28, p+56, ... (a constant 28-byte
// step between consecutive loads), then a store writes p+4; two cycles of
// other work separate memory operations. Loads are checked against a
// reference memory; the counters are valid when done is high.
module cc_config_run
  import cc_pkg::*;
#(
  parameter int unsigned CB_ENTRIES  = 32,
  parameter int unsigned DL1_SETS    = 128,
  parameter int unsigned DL1_WAYS    = 2,
  parameter int unsigned DCE_ENTRIES = 16,
  parameter int unsigned CHT_ENTRIES = 16,
  parameter int unsigned PACKETS     = 600,
  parameter int unsigned LOADS       = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   n_errors,
  output int   n_loads,
  output int   n_cycles_total,   // summed load latencies
  output int   n_cb_hits,        // loads that hit in the CB
  output int   n_extract,        // DCE extractions
  output int   n_cht_hits
);

  localparam int unsigned RANGE = 64 * 1024;

  logic cpu_req_valid, cpu_req_ready;
  cpu_req_t cpu_req;
  logic cpu_rsp_valid;
  word_t cpu_rsp_rdata;
  logic mem_req_valid, mem_req_ready;
  line_req_t mem_req;
  logic mem_rsp_valid;
  line_t mem_rsp_data;
  cc_events_t events;
  int unsigned n_reads, n_writes;

  correlating_cache #(
    .CB_ENTRIES(CB_ENTRIES), .DL1_SETS(DL1_SETS), .DL1_WAYS(DL1_WAYS),
    .DCE_ENTRIES(DCE_ENTRIES), .CHT_ENTRIES(CHT_ENTRIES)
  ) dut (.*);

  cc_line_mem_model #(.LATENCY(12), .LINES(RANGE / LINE_BYTES)) l2 (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data),
    .n_reads, .n_writes);

  bit last_hit;
  always @(posedge clk) if (rst_n) begin
    if (cpu_req_valid && cpu_req_ready) last_hit = events.cb_hit;
    n_extract  += int'(events.dce_extract);
    n_cht_hits += int'(events.cht_hit);
  end

  word_t ref_mem [addr_t];

  task automatic op(pc_t pc, bit we, addr_t a, word_t wd);
    word_t exp_d; int lat;
    repeat (2) begin @(posedge clk); #1; end
    exp_d = ref_mem.exists(a) ? ref_mem[a] : (a ^ 32'h5A5A_0F0F);
    if (we) ref_mem[a] = wd;
    cpu_req_valid = 1;
    cpu_req = '{pc: pc, we: we, addr: a, wdata: wd, wstrb: 4'hF};
    while (!cpu_req_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    #1;
    cpu_req_valid = 0;
    lat = 1;
    while (!cpu_rsp_valid && lat < 200) begin @(posedge clk); #1; lat++; end
    if (!we) begin
      n_loads++;
      n_cycles_total += lat;
      n_cb_hits += int'(last_hit);
      if (cpu_rsp_rdata !== exp_d || lat >= 200) n_errors++;
    end
  endtask

  initial begin
    addr_t p;
    done = 0; n_errors = 0; n_loads = 0; n_cycles_total = 0; n_cb_hits = 0;
    n_extract = 0; n_cht_hits = 0;
    cpu_req_valid = 0; cpu_req = '0;
    @(posedge rst_n);
    @(posedge clk); #1;
    for (int it = 0; it < PACKETS; it++) begin
      p = addr_t'(($urandom % ((RANGE - 1024) / LINE_BYTES)) * LINE_BYTES);
      for (int k = 0; k < LOADS; k++)
        op(pc_t'(32'h400 + 4 * k), 0, p + addr_t'(28 * k), '0);
      op(32'h480, 1, p + 4, $urandom);
    end
    done = 1;
  end

endmodule
