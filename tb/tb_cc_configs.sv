// tb_cc_configs: the same packet loop on the evaluated configurations of the
// correlating cache, side by side.
//
// Cache configurations (CB x DL1, with 16-entry DCE and CHT): large CB
// (32 entries) or small CB (8 entries), each with the large DL1 (8 KB, 2-way)
// or the small DL1 (2 KB, 64 entries, direct mapped). Table-size sweep (large
// CB and DL1): DCE and CHT of 4 and 128 entries. Every load's data is checked;
// with 16-entry tables most loads after the first of each packet must hit in
// the CB thanks to the prefetches, and 4-entry tables must extract fewer
// correlations than 16-entry ones on a loop with six load PCs. Prints the CB
// hit ratio and the average load latency of each configuration.
module tb_cc_configs;

  localparam int NCFG = 6;
  localparam int LOADS = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [NCFG];
  int n_errors [NCFG], n_loads [NCFG], n_cyc [NCFG], n_hit [NCFG], n_ext [NCFG], n_cht [NCFG];
  string name [NCFG] = '{"LCB x LDL1", "SCB x LDL1", "LCB x SDL1", "SCB x SDL1",
                         "DCE/CHT 4", "DCE/CHT 128"};

  cc_config_run #(.CB_ENTRIES(32), .DL1_SETS(128), .DL1_WAYS(2), .LOADS(LOADS)) r0 (
    .clk, .rst_n, .done(done[0]), .n_errors(n_errors[0]), .n_loads(n_loads[0]),
    .n_cycles_total(n_cyc[0]), .n_cb_hits(n_hit[0]), .n_extract(n_ext[0]), .n_cht_hits(n_cht[0]));
  cc_config_run #(.CB_ENTRIES(8), .DL1_SETS(128), .DL1_WAYS(2), .LOADS(LOADS)) r1 (
    .clk, .rst_n, .done(done[1]), .n_errors(n_errors[1]), .n_loads(n_loads[1]),
    .n_cycles_total(n_cyc[1]), .n_cb_hits(n_hit[1]), .n_extract(n_ext[1]), .n_cht_hits(n_cht[1]));
  cc_config_run #(.CB_ENTRIES(32), .DL1_SETS(64), .DL1_WAYS(1), .LOADS(LOADS)) r2 (
    .clk, .rst_n, .done(done[2]), .n_errors(n_errors[2]), .n_loads(n_loads[2]),
    .n_cycles_total(n_cyc[2]), .n_cb_hits(n_hit[2]), .n_extract(n_ext[2]), .n_cht_hits(n_cht[2]));
  cc_config_run #(.CB_ENTRIES(8), .DL1_SETS(64), .DL1_WAYS(1), .LOADS(LOADS)) r3 (
    .clk, .rst_n, .done(done[3]), .n_errors(n_errors[3]), .n_loads(n_loads[3]),
    .n_cycles_total(n_cyc[3]), .n_cb_hits(n_hit[3]), .n_extract(n_ext[3]), .n_cht_hits(n_cht[3]));
  cc_config_run #(.DCE_ENTRIES(4), .CHT_ENTRIES(4), .LOADS(LOADS)) r4 (
    .clk, .rst_n, .done(done[4]), .n_errors(n_errors[4]), .n_loads(n_loads[4]),
    .n_cycles_total(n_cyc[4]), .n_cb_hits(n_hit[4]), .n_extract(n_ext[4]), .n_cht_hits(n_cht[4]));
  cc_config_run #(.DCE_ENTRIES(128), .CHT_ENTRIES(128), .LOADS(LOADS)) r5 (
    .clk, .rst_n, .done(done[5]), .n_errors(n_errors[5]), .n_loads(n_loads[5]),
    .n_cycles_total(n_cyc[5]), .n_cb_hits(n_hit[5]), .n_extract(n_ext[5]), .n_cht_hits(n_cht[5]));

  int checks = 0, failures = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      foreach (done[i]) all_done &= done[i];
    end while (!all_done);
    #1;
    foreach (done[i]) begin
      $display("%-12s loads %0d  CB hit %0d%%  avg load latency %0d.%02d cycles  extractions %0d  CHT hits %0d",
               name[i], n_loads[i], 100 * n_hit[i] / n_loads[i],
               n_cyc[i] / n_loads[i], (100 * n_cyc[i] / n_loads[i]) % 100, n_ext[i], n_cht[i]);
      checks++;
      if (n_errors[i] != 0) begin
        failures++; $display("FAIL %s: %0d wrong loads", name[i], n_errors[i]);
      end
    end
    // with 16-entry tables, loads 2..6 of each packet are prefetched
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_hit[i] * LOADS < n_loads[i] * (LOADS - 1) * 8 / 10) begin
        failures++; $display("FAIL %s: too few CB hits", name[i]);
      end
    end
    checks++;
    if (n_ext[4] >= n_ext[0]) begin
      failures++; $display("FAIL 4-entry tables extracted as much as 16-entry ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
