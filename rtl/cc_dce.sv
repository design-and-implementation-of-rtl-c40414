// cc_dce: Dynamic Correlation Extractor.
//
// Watches the stream of executed loads and finds a load (at PC "LPC") whose
// successor load keeps the same source-address offset from it on every pass.
// For each load it computes new_offset = current address - LSA (the last
// source address) and looks up the direct-mapped DCE table with LPC (the PC of
// the previous load). On a hit, if new_offset equals both stored offsets
// (last_offset_1 and last_offset_2), the pair (LPC, new_offset) is sent to the
// Correlation History Table; otherwise the offsets shift (last_offset_2 gets
// last_offset_1, last_offset_1 gets new_offset). On a miss an entry is
// allocated with last_offset_1 = new_offset. LPC and LSA are then set to the
// current load. This procedure, the two stored offsets and the LPC/LSA
// registers are those of the design description; the default of 16 entries,
// direct mapped, is its main configuration. ENTRIES must be a power of two.
//
// Choices of this implementation: the table is indexed by PC bits above the
// two always-zero bits of a word-aligned PC and tagged with the rest; each
// stored offset has a valid bit, so three equal offsets in a row are needed
// before a correlation is reported (a freshly allocated entry holds only one);
// offsets are OFFSET_W-bit signed and a difference that does not fit is kept
// as an invalid offset, so it can never match; the first load after reset only
// loads LPC/LSA.
//
// Interface and timing: one load per cycle on ld_valid/ld_pc/ld_addr. The table
// update and the CHT write request (cht_wr_*) are registered, so a correlation
// found for a load reaches the CHT one cycle later. Events are registered too.
module cc_dce
  import cc_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // executed loads
  input  logic          ld_valid,
  input  pc_t           ld_pc,
  input  addr_t         ld_addr,
  // correlation found: write into the CHT
  output logic          cht_wr_valid,
  output pc_t           cht_wr_pc,
  output logic signed [OFFSET_W-1:0] cht_wr_offset,
  // events
  output logic          ev_alloc,
  output logic          ev_extract
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned TAG_W = PC_W - 2 - IDX_W;

  typedef struct packed {
    logic                       valid;
    logic [TAG_W-1:0]           tag;
    logic                       v1;   // last_offset_1 holds a value
    logic signed [OFFSET_W-1:0] off1; // last_offset_1
    logic                       v2;   // last_offset_2 holds a value
    logic signed [OFFSET_W-1:0] off2; // last_offset_2
  } dce_entry_t;

  dce_entry_t table_q [ENTRIES];
  logic       lpc_valid_q;
  pc_t        lpc_q;   // last program counter
  addr_t      lsa_q;   // last source address

  // new offset = current source address - LSA
  addr_t                      diff;
  logic signed [OFFSET_W-1:0] new_off;
  logic                       new_fits;
  logic [IDX_W-1:0]           idx;
  logic [TAG_W-1:0]           tag;
  dce_entry_t                 ent;
  logic                       hit, match;

  always_comb begin
    diff     = ld_addr - lsa_q;
    new_off  = diff[OFFSET_W-1:0];
    // fits when the bits above the offset are a sign extension of it
    new_fits = (diff[ADDR_W-1:OFFSET_W-1] == '0) || (diff[ADDR_W-1:OFFSET_W-1] == '1);
    idx      = IDX_W'(lpc_q[2 +: IDX_W] % ENTRIES);
    tag      = lpc_q[PC_W-1 -: TAG_W];
    ent      = table_q[idx];
    hit      = ent.valid && (ent.tag == tag);
    match    = hit && new_fits && ent.v1 && ent.v2 &&
               (ent.off1 == new_off) && (ent.off2 == new_off);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= '0;
      lpc_valid_q   <= 1'b0;
      lpc_q         <= '0;
      lsa_q         <= '0;
      cht_wr_valid  <= 1'b0;
      cht_wr_pc     <= '0;
      cht_wr_offset <= '0;
      ev_alloc      <= 1'b0;
      ev_extract    <= 1'b0;
    end else begin
      cht_wr_valid <= 1'b0;
      ev_alloc     <= 1'b0;
      ev_extract   <= 1'b0;
      if (ld_valid) begin
        if (lpc_valid_q) begin
          if (hit) begin
            if (match) begin
              // put LPC into the CHT with the new offset
              cht_wr_valid  <= 1'b1;
              cht_wr_pc     <= lpc_q;
              cht_wr_offset <= new_off;
              ev_extract    <= 1'b1;
            end else begin
              table_q[idx].v2   <= ent.v1;
              table_q[idx].off2 <= ent.off1;
              table_q[idx].v1   <= new_fits;
              table_q[idx].off1 <= new_off;
            end
          end else begin
            table_q[idx] <= '{valid: 1'b1, tag: tag, v1: new_fits, off1: new_off,
                              v2: 1'b0, off2: '0};
            ev_alloc     <= 1'b1;
          end
        end
        lpc_valid_q <= 1'b1;
        lpc_q       <= ld_pc;
        lsa_q       <= ld_addr;
      end
    end
  end

endmodule
