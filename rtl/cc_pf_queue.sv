// cc_pf_queue: small buffer of prefetch addresses between the Correlation
// History Table and the Correlating Buffer.
//
// The CHT may produce a prefetch on every access while the CB can only start
// one in a cycle with no CPU request, so prefetch addresses wait here. The
// newest prefetch is the one most likely to be still useful (it predicts the
// very next load), so the buffer hands out the newest entry first, and a push
// into a full buffer discards the oldest entry (drop pulses). The buffer and
// its ordering are this implementation's choice; the design description only
// says that the CHT sends prefetch signals to the CB.
//
// Interface and timing: push_valid/push_addr write at the clock edge; the
// newest entry is shown on pop_valid/pop_addr and leaves when pop_ready is
// high. A pop and a push in the same cycle remove the shown entry and insert
// the new one, so nothing is dropped.
module cc_pf_queue
  import cc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push_valid,
  input  addr_t push_addr,
  output logic  pop_valid,
  input  logic  pop_ready,
  output addr_t pop_addr,
  output logic  drop
);

  // entry 0 is the newest
  logic  v_q [DEPTH];
  addr_t a_q [DEPTH];

  logic  v_pop [DEPTH];
  addr_t a_pop [DEPTH];
  logic  v_d   [DEPTH];
  addr_t a_d   [DEPTH];

  assign pop_valid = v_q[0];
  assign pop_addr  = a_q[0];

  always_comb begin
    // remove the newest entry if it is taken
    for (int i = 0; i < DEPTH; i++) begin
      v_pop[i] = v_q[i];
      a_pop[i] = a_q[i];
    end
    if (pop_valid && pop_ready) begin
      for (int i = 0; i < DEPTH - 1; i++) begin
        v_pop[i] = v_q[i+1];
        a_pop[i] = a_q[i+1];
      end
      v_pop[DEPTH-1] = 1'b0;
    end
    // insert the new entry in front; the oldest falls out
    drop = push_valid && v_pop[DEPTH-1];
    for (int i = 0; i < DEPTH; i++) begin
      v_d[i] = v_pop[i];
      a_d[i] = a_pop[i];
    end
    if (push_valid) begin
      for (int i = DEPTH - 1; i > 0; i--) begin
        v_d[i] = v_pop[i-1];
        a_d[i] = a_pop[i-1];
      end
      v_d[0] = 1'b1;
      a_d[0] = push_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        v_q[i] <= 1'b0;
        a_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        v_q[i] <= v_d[i];
        a_q[i] <= a_d[i];
      end
    end
  end

endmodule
