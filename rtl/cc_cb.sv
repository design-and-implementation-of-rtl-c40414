// cc_cb: Correlating Buffer.
//
// The CB is the primary (level-0) data cache of the correlating cache: a small
// direct-mapped cache that takes the CPU's loads and stores and the prefetch
// requests of the Correlation History Table. A CPU request that hits is
// answered from the CB; one that misses fetches the line from the DL1,
// installs ("promotes") it in the CB and is then answered. A prefetch whose
// line is already present costs only the tag check and is dropped; otherwise
// its line is fetched from the DL1 and installed without answering anyone.
// That behaviour, the single-cycle hit and the 32-entry direct-mapped default
// (the "large CB"; the small CB has 8 entries) follow the design description.
//
// Choices of this implementation: write-back with write-allocate (a dirty
// victim is written to the DL1 before the new line is read); CPU requests have
// priority over prefetches and a prefetch is started only in a cycle with no
// CPU request; the CB handles one miss or prefetch at a time and holds off the
// CPU (cpu_req_ready low) until it is done; stores are also answered, with a
// response that carries no data. ENTRIES must be a power of two.
//
// Timing: a hit is answered in the cycle after the request (latency 1, from a
// register). On a miss with a clean victim the DL1 read is issued in the next
// cycle and the DL1 line is forwarded to the CPU in the cycle it arrives, so
// with the 2-cycle DL1 a missing load completes 3 cycles after its request,
// the DL1 access time the description gives when a CB is present.
module cc_cb
  import cc_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // CPU side
  input  logic       cpu_req_valid,
  output logic       cpu_req_ready,
  input  cpu_req_t   cpu_req,
  output logic       cpu_rsp_valid,
  output word_t      cpu_rsp_rdata,
  // prefetches from the CHT (through the prefetch queue)
  input  logic       pf_valid,
  output logic       pf_ready,
  input  addr_t      pf_addr,
  // DL1 side
  output logic       dl1_req_valid,
  input  logic       dl1_req_ready,
  output line_req_t  dl1_req,
  input  logic       dl1_rsp_valid,
  input  line_t      dl1_rsp_data,
  // events
  output logic       ev_hit,
  output logic       ev_miss,
  output logic       ev_writeback,
  output logic       ev_pf_fetch,
  output logic       ev_pf_redundant
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned TAG_W = LADDR_W - IDX_W;
  localparam int unsigned WSEL_W = $clog2(WORDS_PER_LINE);

  typedef enum logic [2:0] {S_IDLE, S_WB_REQ, S_WB_WAIT, S_FILL_REQ, S_FILL_WAIT} state_t;

  // storage
  logic             valid_q [ENTRIES];
  logic             dirty_q [ENTRIES];
  logic [TAG_W-1:0] tag_q   [ENTRIES];
  line_t            data_q  [ENTRIES];

  state_t   state_q;
  logic     demand_q;     // the outstanding miss is a CPU request (not a prefetch)
  cpu_req_t mreq_q;       // the CPU request being served
  laddr_t   mladdr_q;     // line being fetched
  logic     rsp_valid_q;  // hit response
  word_t    rsp_rdata_q;

  // ---------------------------------------------------------------- lookup
  laddr_t           c_laddr, p_laddr, m_laddr;
  logic [IDX_W-1:0] c_idx, p_idx, m_idx;
  logic             c_hit, p_hit;
  logic [WSEL_W-1:0] c_wsel, m_wsel;

  function automatic logic [IDX_W-1:0] idx_of(laddr_t la);
    return IDX_W'(la % ENTRIES);
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(laddr_t la);
    return la[LADDR_W-1 -: TAG_W];
  endfunction

  // merge the store of `r` into line `l`
  function automatic line_t merge_store(line_t l, cpu_req_t r);
    line_t o;
    logic [WSEL_W-1:0] w;
    o = l;
    w = r.addr[LINE_OFF_W-1:2];
    for (int b = 0; b < WORD_W/8; b++)
      if (r.wstrb[b]) o[w*WORD_W + b*8 +: 8] = r.wdata[b*8 +: 8];
    return o;
  endfunction

  always_comb begin
    c_laddr = cpu_req.addr[ADDR_W-1:LINE_OFF_W];
    p_laddr = pf_addr[ADDR_W-1:LINE_OFF_W];
    m_laddr = mladdr_q;
    c_idx   = idx_of(c_laddr);
    p_idx   = idx_of(p_laddr);
    m_idx   = idx_of(m_laddr);
    c_wsel  = cpu_req.addr[LINE_OFF_W-1:2];
    m_wsel  = mreq_q.addr[LINE_OFF_W-1:2];
    c_hit   = valid_q[c_idx] && (tag_q[c_idx] == tag_of(c_laddr));
    p_hit   = valid_q[p_idx] && (tag_q[p_idx] == tag_of(p_laddr));
  end

  logic cpu_go, pf_go;
  assign cpu_req_ready = (state_q == S_IDLE);
  assign pf_ready      = (state_q == S_IDLE) && !cpu_req_valid;
  assign cpu_go        = cpu_req_valid && cpu_req_ready;
  assign pf_go         = pf_valid && pf_ready;

  // ---------------------------------------------------------------- DL1 port
  always_comb begin
    dl1_req_valid = (state_q == S_WB_REQ) || (state_q == S_FILL_REQ);
    dl1_req.we    = (state_q == S_WB_REQ);
    dl1_req.laddr = (state_q == S_WB_REQ) ? {tag_q[m_idx], m_idx} : m_laddr;
    dl1_req.wdata = data_q[m_idx];
  end

  logic fill_done;
  assign fill_done = (state_q == S_FILL_WAIT) && dl1_rsp_valid;

  // CPU response: registered for hits, forwarded from the DL1 for misses
  always_comb begin
    cpu_rsp_valid = rsp_valid_q;
    cpu_rsp_rdata = rsp_rdata_q;
    if (fill_done && demand_q) begin
      cpu_rsp_valid = 1'b1;
      cpu_rsp_rdata = mreq_q.we ? '0 : line_word(dl1_rsp_data, m_wsel);
    end
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      demand_q    <= 1'b0;
      mreq_q      <= '0;
      mladdr_q    <= '0;
      rsp_valid_q <= 1'b0;
      rsp_rdata_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        valid_q[i] <= 1'b0;
        dirty_q[i] <= 1'b0;
        tag_q[i]   <= '0;
      end
    end else begin
      rsp_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (cpu_go) begin
            if (c_hit) begin
              rsp_valid_q <= 1'b1;
              rsp_rdata_q <= cpu_req.we ? '0 : line_word(data_q[c_idx], c_wsel);
              if (cpu_req.we) dirty_q[c_idx] <= 1'b1;
            end else begin
              demand_q <= 1'b1;
              mreq_q   <= cpu_req;
              mladdr_q <= c_laddr;
              state_q  <= (valid_q[c_idx] && dirty_q[c_idx]) ? S_WB_REQ : S_FILL_REQ;
            end
          end else if (pf_go && !p_hit) begin
            demand_q <= 1'b0;
            mladdr_q <= p_laddr;
            state_q  <= (valid_q[p_idx] && dirty_q[p_idx]) ? S_WB_REQ : S_FILL_REQ;
          end
        end
        S_WB_REQ:  if (dl1_req_ready) state_q <= S_WB_WAIT;
        S_WB_WAIT: if (dl1_rsp_valid) begin
          dirty_q[m_idx] <= 1'b0;
          state_q        <= S_FILL_REQ;
        end
        S_FILL_REQ: if (dl1_req_ready) state_q <= S_FILL_WAIT;
        S_FILL_WAIT: if (dl1_rsp_valid) begin
          valid_q[m_idx] <= 1'b1;
          tag_q[m_idx]   <= tag_of(m_laddr);
          dirty_q[m_idx] <= demand_q && mreq_q.we;
          state_q        <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // data array: written by store hits and by line fills (merged with the
  // store that missed, if any)
  always_ff @(posedge clk) begin
    if (state_q == S_IDLE && cpu_go && c_hit && cpu_req.we)
      data_q[c_idx] <= merge_store(data_q[c_idx], cpu_req);
    else if (fill_done)
      data_q[m_idx] <= (demand_q && mreq_q.we) ? merge_store(dl1_rsp_data, mreq_q) : dl1_rsp_data;
  end

  // ---------------------------------------------------------------- events
  assign ev_hit          = cpu_go && c_hit;
  assign ev_miss         = cpu_go && !c_hit;
  assign ev_writeback    = (state_q == S_WB_REQ) && dl1_req_ready;
  assign ev_pf_fetch     = pf_go && !p_hit;
  assign ev_pf_redundant = pf_go && p_hit;

endmodule
