// tb_cc_dce: self-checking testbench of the Dynamic Correlation Extractor.
//
// Part 1 replays the two load sequences of the motivating loop (two loads,
// ldX at PC 0x100 and ldY at PC 0x108): one with a constant ldX->ldY offset
// of 0x200, which must be extracted from the sixth load on, and one without
// a constant offset, which must never be. Part 2 drives random loads from a
// few PCs and compares every CHT write and allocation against a reference
// model of the extraction procedure kept in the testbench.
module tb_cc_dce;
  import cc_pkg::*;

  localparam int unsigned ENTRIES = 16;

  logic clk = 0, rst_n = 0;
  logic ld_valid = 0;
  pc_t  ld_pc = '0;
  addr_t ld_addr = '0;
  logic cht_wr_valid;
  pc_t  cht_wr_pc;
  logic signed [OFFSET_W-1:0] cht_wr_offset;
  logic ev_alloc, ev_extract;

  int checks = 0, failures = 0;

  cc_dce #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model
  typedef struct {
    bit valid; bit [PC_W-1:0] pc; bit v1; int o1; bit v2; int o2;
  } ref_ent_t;
  ref_ent_t rt [ENTRIES];
  bit    r_lv;
  pc_t   r_lpc;
  addr_t r_lsa;

  // returns 1 and the offset when an extraction is expected; sets alloc
  function automatic bit ref_step(pc_t pc, addr_t a, output int off, output bit alloc);
    int d; int i; bit ext; bit fits;
    ext = 0; alloc = 0;
    d = int'(a - r_lsa);
    off = d;
    fits = (d >= -32768) && (d <= 32767);
    if (r_lv) begin
      i = int'((r_lpc >> 2) % ENTRIES);
      if (rt[i].valid && rt[i].pc[PC_W-1:2+$clog2(ENTRIES)] == r_lpc[PC_W-1:2+$clog2(ENTRIES)]) begin
        if (fits && rt[i].v1 && rt[i].v2 && rt[i].o1 == d && rt[i].o2 == d) ext = 1;
        else begin
          rt[i].v2 = rt[i].v1; rt[i].o2 = rt[i].o1; rt[i].v1 = fits; rt[i].o1 = d;
        end
      end else begin
        rt[i] = '{1, r_lpc, fits, d, 0, 0};
        alloc = 1;
      end
    end
    r_lv = 1; r_lpc = pc; r_lsa = a;
    return ext;
  endfunction

  // one load; check the registered outputs against the expectation
  task automatic do_load(pc_t pc, addr_t a, bit exp_ext, int exp_off, bit exp_alloc, pc_t exp_pc);
    ld_valid = 1; ld_pc = pc; ld_addr = a;
    @(posedge clk);
    #1;
    ld_valid = 0;
    checks++;
    if (cht_wr_valid !== exp_ext || ev_extract !== exp_ext || ev_alloc !== exp_alloc ||
        (exp_ext && (cht_wr_pc !== exp_pc || int'(cht_wr_offset) != exp_off))) begin
      failures++;
      $display("FAIL load pc=%h a=%h: wr=%b pc=%h off=%0d alloc=%b, expected wr=%b pc=%h off=%0d alloc=%b",
               pc, a, cht_wr_valid, cht_wr_pc, cht_wr_offset, ev_alloc, exp_ext, exp_pc, exp_off, exp_alloc);
    end
  endtask

  initial begin
    int off; bit alloc; bit ext; pc_t prev_pc;
    pc_t pcs [6];
    addr_t base;
    int n_ext;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---- Part 1a: constant offset 0x200 (ldX -> ldY), ldY -> next ldX 0xE00
    // load:    1  2      3      4      5      6          7          8
    // expect:  -  alloc  alloc  shift  shift  X,+0x200   Y,+0xE00   X,+0x200
    do_load(32'h100, 32'h1000, 0, 0, 0, '0);
    do_load(32'h108, 32'h1200, 0, 0, 1, '0);
    do_load(32'h100, 32'h2000, 0, 0, 1, '0);
    do_load(32'h108, 32'h2200, 0, 0, 0, '0);
    do_load(32'h100, 32'h3000, 0, 0, 0, '0);
    do_load(32'h108, 32'h3200, 1, 32'h200, 0, 32'h100);
    do_load(32'h100, 32'h4000, 1, 32'hE00, 0, 32'h108);
    do_load(32'h108, 32'h4200, 1, 32'h200, 0, 32'h100);

    // ---- Part 1b: after reset, precedence but no source correlation
    rst_n = 0; @(posedge clk); #1; rst_n = 1; @(posedge clk); #1;
    do_load(32'h100, 32'h1000, 0, 0, 0, '0);
    do_load(32'h108, 32'h1200, 0, 0, 1, '0);
    do_load(32'h100, 32'h1800, 0, 0, 1, '0);
    do_load(32'h108, 32'h2600, 0, 0, 0, '0);
    do_load(32'h100, 32'h1000, 0, 0, 0, '0);
    do_load(32'h108, 32'h1600, 0, 0, 0, '0);
    do_load(32'h100, 32'h1800, 0, 0, 0, '0);
    do_load(32'h108, 32'h2000, 0, 0, 0, '0);

    // ---- Part 2: random loop-like streams against the reference model
    rst_n = 0; @(posedge clk); #1; rst_n = 1; @(posedge clk); #1;
    r_lv = 0; r_lsa = '0; r_lpc = '0;
    foreach (rt[i]) rt[i] = '{0, 0, 0, 0, 0, 0};
    // six PCs, two of which share a DCE index (0x100 and 0x140)
    pcs = '{32'h100, 32'h108, 32'h110, 32'h140, 32'h2000, 32'h2004};
    base = 32'h8000;
    n_ext = 0;
    for (int it = 0; it < 400; it++) begin
      base = base + ((($urandom % 8) == 0) ? ($urandom % 64) * 4 : 32'h40);
      for (int k = 0; k < 6; k++) begin
        addr_t a;
        // mostly constant offsets from the iteration base; sometimes random,
        // sometimes far away (offset that does not fit 16 bits)
        case ($urandom % 10)
          0: a = {$urandom} & 32'hFFFF_FFFC;
          1: a = base + 32'h0004_0000;
          default: a = base + k * 32'h24;
        endcase
        if (($urandom % 12) == 0) k++; // occasionally skip a load
        if (k < 6) begin
          prev_pc = r_lpc;
          ext = ref_step(pcs[k], a, off, alloc);
          do_load(pcs[k], a, ext, off, alloc, prev_pc);
          if (ext) n_ext++;
        end
      end
      // idle cycles between iterations change nothing
      if (($urandom % 4) == 0) begin
        @(posedge clk); #1;
        checks++;
        if (cht_wr_valid || ev_alloc || ev_extract) begin
          failures++; $display("FAIL output without a load");
        end
      end
    end
    checks++;
    if (n_ext < 50) begin
      failures++; $display("FAIL too few extractions exercised: %0d", n_ext);
    end
    $display("random part: %0d extractions", n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
