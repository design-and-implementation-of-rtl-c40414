// correlating_cache: the correlating cache subsystem, a drop-in replacement
// for the local data cache of a processing core.
//
// Loads and stores from the core go to the Correlating Buffer (cc_cb), a
// small direct-mapped cache in front of the level-1 data cache (cc_dl1).
// Every access is also passed, with its PC, to two units off the critical path:
// the Dynamic Correlation Extractor (cc_dce), which learns which load is
// followed by a load at a constant address offset and records it in the
// Correlation History Table (cc_cht), and the CHT itself, which turns a load
// it knows into a prefetch of the address its successor will use. Prefetches
// wait in a small buffer (cc_pf_queue, newest first) until the CB is free to
// check them and, if the line is absent, to fetch it from the DL1. The DL1 reaches the shared
// next level (the L2, outside this block) through the mem_* line port.
// The structure, the three added units and the sizes of the main
// configuration (32-entry CB, 8 KB 2-way DL1, 16-entry direct-mapped DCE and
// CHT) follow the design description; the prefetch buffer, the write policy and the
// port protocols are this implementation's own.
//
// Interface: cpu_req_* is a valid/ready request channel (one word access per
// request, with the PC of the instruction); every request gets exactly one
// cpu_rsp_valid pulse, in order, carrying read data for loads. mem_* is a
// whole-line valid/ready request channel with a valid-only response. events
// carries one-cycle pulses for performance counting.
//
// Timing: a CB hit answers in the cycle after the request; a CB miss that
// hits in the DL1 answers after 3 cycles; a DL1 miss adds the L2 latency.
// An access probes the CHT in the cycle it is accepted; a CHT hit enters the
// prefetch buffer at the next clock edge, so the CB can start the prefetch
// two cycles after the access if the core leaves it a free cycle. A load
// trains the DCE in the cycle after it is accepted, and a correlation it finds
// is in the CHT one cycle later.
module correlating_cache
  import cc_pkg::*;
#(
  parameter int unsigned CB_ENTRIES      = 32,
  parameter int unsigned DL1_SETS        = 128,
  parameter int unsigned DL1_WAYS        = 2,
  parameter int unsigned DL1_HIT_LATENCY = 2,
  parameter int unsigned DCE_ENTRIES     = 16,
  parameter int unsigned CHT_ENTRIES     = 16,
  parameter int unsigned PFQ_DEPTH       = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // core side
  input  logic       cpu_req_valid,
  output logic       cpu_req_ready,
  input  cpu_req_t   cpu_req,
  output logic       cpu_rsp_valid,
  output word_t      cpu_rsp_rdata,
  // next level (L2) side
  output logic       mem_req_valid,
  input  logic       mem_req_ready,
  output line_req_t  mem_req,
  input  logic       mem_rsp_valid,
  input  line_t      mem_rsp_data,
  // performance events
  output cc_events_t events
);

  // ---------------------------------------------------------- access stream
  // Every accepted access probes the CHT in the cycle the CB is accessed (in
  // parallel with it, not in its path). Accepted loads are registered and
  // train the DCE one cycle later.
  logic  cpu_go;
  logic  ld_valid_q;
  pc_t   ld_pc_q;
  addr_t ld_addr_q;

  assign cpu_go = cpu_req_valid && cpu_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_valid_q <= 1'b0;
      ld_pc_q    <= '0;
      ld_addr_q  <= '0;
    end else begin
      ld_valid_q <= cpu_go && !cpu_req.we;
      ld_pc_q    <= cpu_req.pc;
      ld_addr_q  <= cpu_req.addr;
    end
  end

  // ---------------------------------------------------------- DCE and CHT
  logic                       cht_wr_valid;
  pc_t                        cht_wr_pc;
  logic signed [OFFSET_W-1:0] cht_wr_offset;
  logic                       cht_pf_valid;
  addr_t                      cht_pf_addr;

  cc_dce #(.ENTRIES(DCE_ENTRIES)) u_dce (
    .clk, .rst_n,
    .ld_valid      (ld_valid_q),
    .ld_pc         (ld_pc_q),
    .ld_addr       (ld_addr_q),
    .cht_wr_valid,
    .cht_wr_pc,
    .cht_wr_offset,
    .ev_alloc      (events.dce_alloc),
    .ev_extract    (events.dce_extract)
  );

  cc_cht #(.ENTRIES(CHT_ENTRIES)) u_cht (
    .clk, .rst_n,
    .wr_valid    (cht_wr_valid),
    .wr_pc       (cht_wr_pc),
    .wr_offset   (cht_wr_offset),
    .probe_valid (cpu_go),
    .probe_pc    (cpu_req.pc),
    .probe_addr  (cpu_req.addr),
    .pf_valid    (cht_pf_valid),
    .pf_addr     (cht_pf_addr)
  );

  assign events.cht_hit = cht_pf_valid;

  // ---------------------------------------------------------- prefetch queue
  logic  pf_valid, pf_ready;
  addr_t pf_addr;

  cc_pf_queue #(.DEPTH(PFQ_DEPTH)) u_pfq (
    .clk, .rst_n,
    .push_valid (cht_pf_valid),
    .push_addr  (cht_pf_addr),
    .pop_valid  (pf_valid),
    .pop_ready  (pf_ready),
    .pop_addr   (pf_addr),
    .drop       (events.pfq_drop)
  );

  // ---------------------------------------------------------- CB and DL1
  logic      dl1_req_valid, dl1_req_ready;
  line_req_t dl1_req;
  logic      dl1_rsp_valid;
  line_t     dl1_rsp_data;

  cc_cb #(.ENTRIES(CB_ENTRIES)) u_cb (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req,
    .cpu_rsp_valid, .cpu_rsp_rdata,
    .pf_valid, .pf_ready, .pf_addr,
    .dl1_req_valid, .dl1_req_ready, .dl1_req,
    .dl1_rsp_valid, .dl1_rsp_data,
    .ev_hit          (events.cb_hit),
    .ev_miss         (events.cb_miss),
    .ev_writeback    (events.cb_writeback),
    .ev_pf_fetch     (events.pf_fetch),
    .ev_pf_redundant (events.pf_redundant)
  );

  cc_dl1 #(.SETS(DL1_SETS), .WAYS(DL1_WAYS), .HIT_LATENCY(DL1_HIT_LATENCY)) u_dl1 (
    .clk, .rst_n,
    .req_valid     (dl1_req_valid),
    .req_ready     (dl1_req_ready),
    .req           (dl1_req),
    .rsp_valid     (dl1_rsp_valid),
    .rsp_data      (dl1_rsp_data),
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_rsp_valid, .mem_rsp_data,
    .ev_hit        (events.dl1_hit),
    .ev_miss       (events.dl1_miss),
    .ev_writeback  (events.dl1_writeback)
  );

  assign events.cpu_stall = cpu_req_valid && !cpu_req_ready;

  // ---------------------------------------------------------- protocol rules
  // A request the core presents is held, unchanged, until it is accepted.
  a_cpu_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_req_valid && !cpu_req_ready |=> cpu_req_valid && $stable(cpu_req));
  // A line request to the next level is likewise held until accepted.
  a_mem_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req));

endmodule
