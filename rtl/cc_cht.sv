// cc_cht: Correlation History Table.
//
// A small direct-mapped table of load PCs whose next load was found to follow
// at a constant address offset. It is written by the Dynamic Correlation
// Extractor and probed with the PC of every load: on a hit the stored offset
// is added to the load's source address and a prefetch request for that
// address is sent towards the Correlating Buffer; on a miss nothing happens.
// The probe/add/prefetch behaviour and the 16-entry direct-mapped default come
// from the design description.
//
// Choices of this implementation: the index is taken from the PC bits above
// the two always-zero bits of a word-aligned PC and the rest is the tag; a
// write replaces whatever the indexed entry held. The table is reset to empty.
// ENTRIES must be a power of two.
//
// Interface and timing: a write (wr_*) takes effect at the clock edge. A probe
// (probe_*) is answered one cycle later on pf_valid/pf_addr; a probe in the
// same cycle as a write to the same entry sees the old contents. The unit is
// off the load's critical path: nothing waits for it.
module cc_cht
  import cc_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // new correlation from the DCE
  input  logic          wr_valid,
  input  pc_t           wr_pc,
  input  logic signed [OFFSET_W-1:0] wr_offset,
  // probe with every load
  input  logic          probe_valid,
  input  pc_t           probe_pc,
  input  addr_t         probe_addr,
  // prefetch request
  output logic          pf_valid,
  output addr_t         pf_addr
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned TAG_W = PC_W - 2 - IDX_W;

  logic                       valid_q [ENTRIES];
  logic [TAG_W-1:0]           tag_q   [ENTRIES];
  logic signed [OFFSET_W-1:0] off_q   [ENTRIES];

  logic [IDX_W-1:0] wr_idx, pr_idx;
  logic [TAG_W-1:0] pr_tag;
  logic             pr_hit;

  always_comb begin
    wr_idx = IDX_W'(wr_pc[2 +: IDX_W] % ENTRIES);
    pr_idx = IDX_W'(probe_pc[2 +: IDX_W] % ENTRIES);
    pr_tag = probe_pc[PC_W-1 -: TAG_W];
    pr_hit = probe_valid && valid_q[pr_idx] && (tag_q[pr_idx] == pr_tag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid_q[i] <= 1'b0;
        tag_q[i]   <= '0;
        off_q[i]   <= '0;
      end
      pf_valid <= 1'b0;
      pf_addr  <= '0;
    end else begin
      if (wr_valid) begin
        valid_q[wr_idx] <= 1'b1;
        tag_q[wr_idx]   <= wr_pc[PC_W-1 -: TAG_W];
        off_q[wr_idx]   <= wr_offset;
      end
      pf_valid <= pr_hit;
      if (pr_hit)
        pf_addr <= probe_addr + {{(ADDR_W-OFFSET_W){off_q[pr_idx][OFFSET_W-1]}}, off_q[pr_idx]};
    end
  end

endmodule
