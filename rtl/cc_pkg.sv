// cc_pkg: types and constants shared by the correlating cache blocks.
//
// The correlating cache puts a small Correlating Buffer (CB) in front of the
// level-1 data cache (DL1). A Dynamic Correlation Extractor (DCE) watches the
// stream of loads and finds pairs of consecutive loads whose source addresses
// keep a constant offset; it records them in the Correlation History Table
// (CHT), which then turns every matching load into a prefetch of the address
// the following load is expected to use.
//
// The 32-byte line follows from the cache sizes quoted for the design
// (8 KB in 256 entries, 2 KB in 64 entries). Address, PC and data widths are
// this implementation's choice (a 32-bit ARM-class core). Lines move between
// the CB, the DL1 and the next level as whole 256-bit lines over a
// valid/ready request channel and a valid-only response channel.
package cc_pkg;

  localparam int unsigned ADDR_W     = 32;            // byte address width
  localparam int unsigned PC_W       = 32;            // program counter width
  localparam int unsigned WORD_W     = 32;            // CPU data word
  localparam int unsigned LINE_BYTES = 32;            // cache line size
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / (WORD_W / 8);
  localparam int unsigned LINE_OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned LADDR_W    = ADDR_W - LINE_OFF_W;   // line address width
  localparam int unsigned OFFSET_W   = 16;            // signed DCE/CHT offset width

  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [PC_W-1:0]     pc_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [LINE_W-1:0]   line_t;
  typedef logic [LADDR_W-1:0]  laddr_t;

  // CPU request: one word access, tagged with the PC of the instruction.
  typedef struct packed {
    pc_t                 pc;
    logic                we;     // 1: store, 0: load
    addr_t               addr;   // byte address, word aligned
    word_t               wdata;
    logic [WORD_W/8-1:0] wstrb;  // byte enables for stores
  } cpu_req_t;

  // Whole-line request between cache levels.
  typedef struct packed {
    logic   we;      // 1: write the line back, 0: read the line
    laddr_t laddr;   // line address
    line_t  wdata;   // line data for writes
  } line_req_t;

  // Per-cycle event pulses, for performance counting.
  typedef struct packed {
    logic cpu_stall;     // CPU request waiting (valid and not ready)
    logic cb_hit;        // CPU request hit in the CB
    logic cb_miss;       // CPU request missed in the CB
    logic cb_writeback;  // dirty CB line written back to the DL1
    logic pf_fetch;      // prefetch brought a line from the DL1 into the CB
    logic pf_redundant;  // prefetch found its line already in the CB
    logic pfq_drop;      // prefetch dropped because the queue was full
    logic dce_alloc;     // DCE allocated an entry for a new load PC
    logic dce_extract;   // DCE found a correlation and wrote the CHT
    logic cht_hit;       // CHT probe hit: prefetch generated
    logic dl1_hit;       // DL1 lookup hit
    logic dl1_miss;      // DL1 lookup missed
    logic dl1_writeback; // dirty DL1 line written to the next level
  } cc_events_t;

  // Word `i` of a line.
  function automatic word_t line_word(line_t l, logic [$clog2(WORDS_PER_LINE)-1:0] i);
    return l[i*WORD_W +: WORD_W];
  endfunction

endpackage
