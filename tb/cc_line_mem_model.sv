// cc_line_mem_model: behavioural model of a line-wide memory level, used by the
// testbenches as the shared L2 behind the DL1 (LATENCY = 12) or as a stand-in
// DL1 behind the Correlating Buffer (LATENCY = 2). Not synthesizable intent.
//
// It accepts a request whenever it is idle, and answers it LATENCY cycles
// after the request cycle with one rsp_valid pulse (read data for reads, an
// acknowledge for writes). Its contents start as a fixed pattern, word at byte
// address a = a ^ 32'h5A5A_0F0F, so a testbench can predict any read; writes
// replace the stored line. The array wraps at LINES lines.
module cc_line_mem_model
  import cc_pkg::*;
#(
  parameter int unsigned LATENCY = 12,
  parameter int unsigned LINES   = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  line_req_t req,
  output logic      rsp_valid,
  output line_t     rsp_data,
  output int unsigned n_reads,
  output int unsigned n_writes
);

  line_t       mem [LINES];
  logic        busy;
  int unsigned cnt;
  line_req_t   req_q;

  function automatic line_t pattern_line(laddr_t la);
    line_t l;
    for (int w = 0; w < WORDS_PER_LINE; w++)
      l[w*WORD_W +: WORD_W] = {la, LINE_OFF_W'(w*4)} ^ 32'h5A5A_0F0F;
    return l;
  endfunction

  initial begin
    for (int i = 0; i < LINES; i++) mem[i] = pattern_line(laddr_t'(i));
  end

  assign req_ready = !busy;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= 0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      req_q     <= '0;
      n_reads   <= 0;
      n_writes  <= 0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          busy  <= 1'b1;
          cnt   <= LATENCY - 1;
          req_q <= req;
          if (req.we) n_writes <= n_writes + 1;
          else        n_reads  <= n_reads + 1;
        end
      end else if (cnt > 1) begin
        cnt <= cnt - 1;
      end else begin
        busy      <= 1'b0;
        rsp_valid <= 1'b1;
        if (req_q.we) mem[req_q.laddr % LINES] <= req_q.wdata;
        else          rsp_data <= mem[req_q.laddr % LINES];
      end
    end
  end

endmodule
