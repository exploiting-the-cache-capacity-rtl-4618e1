// tb_migration_controller: drives the migration controller with L1-miss streams and plays the
// four cores' side of the migration protocol.
//  - Sampling: every request reports sampled = (line mod 31 < 8).
//  - L2 filtering: a long stream of requests that all hit in L2 never moves the subset away
//    from core 0 and never starts a migration.
//  - Circular working-set of 16384 lines (four 512-KB L2s' worth is 32768 lines): after
//    warm-up the four subsets must each receive a fair share of the sampled references and
//    subset changes must be rare (the published LRU-stack experiment saw at most 1.34%).
//  - Protocol: every irq goes to the active core, the transition PC is forwarded to the new
//    core, a redirect is forwarded with start_flush, and the active core changes only when the
//    transition instruction retires. Each mechanism is counted and must occur.
module tb_migration_controller;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic mig_mode, req_valid, req_ready, req_l2_miss, decided, sampled;
  logic [57:0] req_line;
  logic [1:0] active_core, target_core, irq_core, start_core;
  logic irq_valid, tpc_valid, start_valid, start_flush, t_retired, migrating;
  logic [63:0] tpc, start_pc;

  migration_controller dut (.clk, .rst, .mig_mode, .req_valid, .req_ready, .req_line, .req_l2_miss,
    .active_core, .target_core, .decided, .sampled, .irq_valid, .irq_core, .tpc_valid, .tpc,
    .start_valid, .start_core, .start_pc, .start_flush, .t_retired, .migrating);

  // ---- core-side model of the protocol ----
  int n_irq = 0, n_start = 0, n_redirect = 0, n_retire = 0;
  logic [1:0] exp_dest;
  logic [63:0] pc_ctr = 64'h1000;

  initial begin
    tpc_valid = 0; tpc = '0; t_retired = 0;
    forever begin
      @(posedge clk);
      if (irq_valid) begin
        n_irq++;
        checks++;
        if (irq_core != active_core) begin failures++; $display("FAIL irq to core %0d, active %0d", irq_core, active_core); end
        repeat (2) @(posedge clk);
        #1 tpc_valid = 1; tpc = pc_ctr; pc_ctr += 64'h40;
        @(posedge clk); #1 tpc_valid = 0;
        @(posedge clk);
        while (!start_valid) @(posedge clk);
        n_start++;
        exp_dest = start_core;
        checks++;
        if (start_pc != pc_ctr - 64'h40 || start_flush || start_core == active_core) begin
          failures++; $display("FAIL start pc=%h core=%0d", start_pc, start_core);
        end
        if (n_start % 3 == 0) begin
          // a mispredicted branch in the old core becomes the new transition point
          repeat (2) @(posedge clk);
          #1 tpc_valid = 1; tpc = 64'hbeef_0000 + pc_ctr;
          @(posedge clk); #1 tpc_valid = 0;
          @(posedge clk);
          while (!start_valid) @(posedge clk);
          n_redirect++;
          checks++;
          if (!start_flush || start_pc != 64'hbeef_0000 + pc_ctr || start_core != exp_dest) begin
            failures++; $display("FAIL redirect");
          end
        end
        repeat (4) @(posedge clk);
        checks++;
        if (active_core == exp_dest) begin failures++; $display("FAIL switched before T retired"); end
        #1 t_retired = 1;
        @(posedge clk); #1 t_retired = 0;
        @(posedge clk);
        n_retire++;
        checks++;
        if (active_core != exp_dest || migrating) begin failures++; $display("FAIL not switched to %0d", exp_dest); end
      end
    end
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt_subset [4];
  int n_trans, n_samp, last_sub, n_unsamp, n_l2hit_migr;

  task automatic send(input logic [57:0] l, input bit l2m);
    req_valid = 1; req_line = l; req_l2_miss = l2m;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 0;
    while (!decided) begin @(posedge clk); #1; end
    checks++;
    if (sampled != ((64'(l) % 64'd31) < 8)) begin failures++; $display("FAIL sampled flag line %0h", l); end
  endtask

  initial begin
    automatic int N = 16384, passes = 70;
    int lat_s, lat_u, t0;
    rst = 1; mig_mode = 0; req_valid = 0; req_line = '0; req_l2_miss = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (2100) @(posedge clk);  // affinity-cache clear sweep

    // latency of an unsampled and a sampled request (window empty: no write-back)
    @(posedge clk); #1;
    t0 = $time; send(58'd8, 1); lat_u = ($time - t0) / 10;       // 8 mod 31 = 8: unsampled
    t0 = $time; send(58'd1, 1); lat_s = ($time - t0) / 10;       // sampled, X
    $display("cycles per request: unsampled %0d, sampled %0d", lat_u, lat_s);
    checks++; if (lat_u != 3 || lat_s != 8) begin failures++; $display("FAIL request latency"); end

    // L2 filtering: all requests hit in L2 -> filters never move, no migration
    mig_mode = 1;
    for (int i = 0; i < 20000; i++) begin
      send(58'(i % 3000), 0);
      if (target_core != 0 || migrating) n_l2hit_migr++;
    end
    checks++; if (n_l2hit_migr != 0 || n_irq != 0) begin failures++; $display("FAIL L2 filtering"); end

    // Circular working-set, every request an L2 miss
    #1 rst = 1; @(posedge clk); #1 rst = 0; wait (req_ready);
    @(posedge clk); #1;
    n_trans = 0; n_samp = 0; last_sub = 0;
    for (int p = 0; p < passes; p++) begin
      for (int i = 0; i < N; i++) begin
        send(58'(i), 1);
        if (sampled) begin
          if (p >= passes - 4) begin
            n_samp++;
            cnt_subset[target_core]++;
            if (int'(target_core) != last_sub) n_trans++;
          end
          last_sub = int'(target_core);
        end
      end
    end
    $display("Circular(%0d): subsets %0d %0d %0d %0d of %0d sampled, transitions %0d (%0.4f)",
             N, cnt_subset[0], cnt_subset[1], cnt_subset[2], cnt_subset[3], n_samp, n_trans,
             real'(n_trans) / real'(n_samp));
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (cnt_subset[c] < n_samp / 8 || cnt_subset[c] > n_samp * 3 / 8) begin
        failures++; $display("FAIL subset %0d share", c);
      end
    end
    checks++;
    if (n_trans * 50 > n_samp) begin failures++; $display("FAIL too many transitions"); end
    repeat (50) @(posedge clk);
    $display("migrations: irq %0d start %0d redirect %0d retire %0d", n_irq, n_start, n_redirect, n_retire);
    checks++;
    if (n_irq == 0 || n_redirect == 0 || n_retire == 0) begin failures++; $display("FAIL mechanisms not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
