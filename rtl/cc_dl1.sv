// cc_dl1: level-1 data cache behind the Correlating Buffer.
//
// A set-associative, write-back, write-allocate cache of whole 32-byte lines.
// It serves line reads and line write-backs from the CB and reaches the next
// level (the shared L2) through a line port of the same shape. The default
// geometry is the "large DL1" of the design description: 8 KB, 256 entries,
// 2-way (128 sets); the "small DL1" is SETS=64, WAYS=1. Its hit latency of 2
// cycles is the L1 latency the description gives for a 1 GHz clock.
//
// Choices of this implementation: LRU replacement (one bit per set at 2 ways,
// a round-robin pointer beyond that) preferring an invalid way; a line write
// that misses installs the line without reading it first, since the whole
// line is written; a dirty victim is written to the next level before the
// missing line is read; one request is handled at a time. WAYS and SETS must
// be powers of two.
//
// Interface and timing: a request is accepted (req_ready) only when the cache
// is idle. A hit is answered on rsp_valid HIT_LATENCY cycles after the request
// cycle (lookup in the cycle after acceptance, response after HIT_LATENCY-2
// more wait cycles). Writes are answered too, with a response carrying no
// data. On a miss the next level's response is forwarded in the cycle it
// arrives: with a 2-cycle hit and a 12-cycle L2, a read miss takes 14 cycles,
// or 27 when a dirty victim is written back first (the write-back's 12
// cycles and one to issue the read); a write miss takes 2, or 14 when it
// evicts a dirty victim.
module cc_dl1
  import cc_pkg::*;
#(
  parameter int unsigned SETS        = 128,
  parameter int unsigned WAYS        = 2,
  parameter int unsigned HIT_LATENCY = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // CB side
  input  logic      req_valid,
  output logic      req_ready,
  input  line_req_t req,
  output logic      rsp_valid,
  output line_t     rsp_data,
  // next level (L2) side
  output logic      mem_req_valid,
  input  logic      mem_req_ready,
  output line_req_t mem_req,
  input  logic      mem_rsp_valid,
  input  line_t     mem_rsp_data,
  // events
  output logic      ev_hit,
  output logic      ev_miss,
  output logic      ev_writeback
);

  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = LADDR_W - ((SETS > 1) ? $clog2(SETS) : 0);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned CNT_W = (HIT_LATENCY > 2) ? $clog2(HIT_LATENCY) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_HOLD, S_WB_REQ, S_WB_WAIT, S_RD_REQ, S_RD_WAIT, S_RESP
  } state_t;

  logic             valid_q [SETS][WAYS];
  logic             dirty_q [SETS][WAYS];
  logic [TAG_W-1:0] tag_q   [SETS][WAYS];
  line_t            data_q  [SETS][WAYS];
  logic [WAY_W-1:0] repl_q  [SETS];   // way to replace next

  state_t           state_q;
  line_req_t        req_q;
  logic [WAY_W-1:0] way_q;            // hit way or victim way
  line_t            rdata_q;
  logic [CNT_W-1:0] cnt_q;

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  logic             hit;
  logic [WAY_W-1:0] hit_way, victim_way;
  logic             have_invalid;

  function automatic logic [WAY_W-1:0] next_repl(logic [WAY_W-1:0] used);
    // the way after the one just used: for 2 ways this is the LRU way
    return (used == WAY_W'(WAYS - 1)) ? '0 : used + 1'b1;
  endfunction

  always_comb begin
    idx          = (SETS > 1) ? IDX_W'(req_q.laddr % SETS) : '0;
    tag          = req_q.laddr[LADDR_W-1 -: TAG_W];
    hit          = 1'b0;
    hit_way      = '0;
    have_invalid = 1'b0;
    victim_way   = repl_q[idx];
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[idx][w] && tag_q[idx][w] == tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (!valid_q[idx][w]) begin
        have_invalid = 1'b1;
        victim_way   = WAY_W'(w);
      end
    end
  end

  assign req_ready = (state_q == S_IDLE);
  // hits answer from a register; misses forward the next level's response
  assign rsp_valid = (state_q == S_RESP) ||
                     (state_q == S_RD_WAIT && mem_rsp_valid) ||
                     (state_q == S_WB_WAIT && mem_rsp_valid && req_q.we);
  assign rsp_data  = (state_q == S_RD_WAIT) ? mem_rsp_data : rdata_q;

  always_comb begin
    mem_req_valid = (state_q == S_WB_REQ) || (state_q == S_RD_REQ);
    mem_req.we    = (state_q == S_WB_REQ);
    mem_req.laddr = (state_q == S_WB_REQ)
                    ? laddr_t'({tag_q[idx][way_q], idx} & {LADDR_W{1'b1}})
                    : req_q.laddr;
    mem_req.wdata = data_q[idx][way_q];
  end

  logic lookup;
  assign lookup = (state_q == S_LOOKUP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      req_q   <= '0;
      way_q   <= '0;
      rdata_q <= '0;
      cnt_q   <= '0;
      for (int s = 0; s < SETS; s++) begin
        repl_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          dirty_q[s][w] <= 1'b0;
          tag_q[s][w]   <= '0;
        end
      end
    end else begin
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          req_q   <= req;
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            way_q        <= hit_way;
            repl_q[idx]  <= next_repl(hit_way);
            if (req_q.we) dirty_q[idx][hit_way] <= 1'b1;
            else          rdata_q <= data_q[idx][hit_way];
            if (HIT_LATENCY > 2) begin
              cnt_q   <= CNT_W'(HIT_LATENCY - 3);
              state_q <= S_HOLD;
            end else begin
              state_q <= S_RESP;
            end
          end else begin
            way_q <= victim_way;
            if (!have_invalid && dirty_q[idx][victim_way]) begin
              state_q <= S_WB_REQ;
            end else if (req_q.we) begin
              // whole-line write: install without reading the next level
              valid_q[idx][victim_way] <= 1'b1;
              dirty_q[idx][victim_way] <= 1'b1;
              tag_q[idx][victim_way]   <= tag;
              repl_q[idx]              <= next_repl(victim_way);
              state_q                  <= S_RESP;
            end else begin
              state_q <= S_RD_REQ;
            end
          end
        end
        S_HOLD: begin
          if (cnt_q == '0) state_q <= S_RESP;
          else             cnt_q   <= cnt_q - 1'b1;
        end
        S_WB_REQ: if (mem_req_ready) state_q <= S_WB_WAIT;
        S_WB_WAIT: if (mem_rsp_valid) begin
          dirty_q[idx][way_q] <= 1'b0;
          valid_q[idx][way_q] <= 1'b0;
          if (req_q.we) begin
            valid_q[idx][way_q] <= 1'b1;
            dirty_q[idx][way_q] <= 1'b1;
            tag_q[idx][way_q]   <= tag;
            repl_q[idx]         <= next_repl(way_q);
            state_q             <= S_IDLE;
          end else begin
            state_q <= S_RD_REQ;
          end
        end
        S_RD_REQ: if (mem_req_ready) state_q <= S_RD_WAIT;
        S_RD_WAIT: if (mem_rsp_valid) begin
          valid_q[idx][way_q] <= 1'b1;
          dirty_q[idx][way_q] <= 1'b0;
          tag_q[idx][way_q]   <= tag;
          repl_q[idx]         <= next_repl(way_q);
          state_q             <= S_IDLE;
        end
        S_RESP: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // data array
  always_ff @(posedge clk) begin
    if (lookup && req_q.we && hit)
      data_q[idx][hit_way] <= req_q.wdata;
    else if (lookup && req_q.we && !hit && !(!have_invalid && dirty_q[idx][victim_way]))
      data_q[idx][victim_way] <= req_q.wdata;
    else if (state_q == S_WB_WAIT && mem_rsp_valid && req_q.we)
      data_q[idx][way_q] <= req_q.wdata;
    else if (state_q == S_RD_WAIT && mem_rsp_valid)
      data_q[idx][way_q] <= mem_rsp_data;
  end

  assign ev_hit       = lookup && hit;
  assign ev_miss      = lookup && !hit;
  assign ev_writeback = (state_q == S_WB_REQ) && mem_req_ready;

endmodule
