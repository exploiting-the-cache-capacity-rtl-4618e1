// emig_top_driver: stimulus and checking for emig_top, shared by the reduced-size and the
// full-size end-to-end testbenches. It plays the four cores and the L3:
//  - the active core walks a circular working-set of NLINES lines (reads and writes of 64-bit
//    words through its L2); every write also retires as a store on the update bus, together with
//    a register write, a branch and now and then a TLB update;
//  - the I-fetch units answer the migration interrupt with a transition PC, sometimes redirect
//    once, and the old core retires the transition instruction on the update bus;
//  - L3 answers fills after a few cycles and absorbs write-backs.
// Checks: every read returns the latest value written to that word anywhere; every core's
// register copy equals the model; the active core changes only as the protocol says. Counts
// each mechanism and fails if one of them never happened. At the end, a burst of stores
// overflows the update queues and a non-active core drives the bus once.
module emig_top_driver #(
  parameter int NLINES = 400,
  parameter int PASSES = 40,
  parameter int MIN_MIGRATIONS = 2
) (
  input  logic                                 clk,
  output logic                                 rst,
  output logic                                 mig_mode,
  output logic [3:0]                           ret_valid,
  output emig_pkg::ub_packet_t [3:0]           ret_pkt,
  output logic [3:0][1:0][5:0]                 rf_addr,
  input  logic [3:0][1:0][63:0]                rf_data,
  input  logic [3:0]                           issue_locked,
  input  logic [3:0]                           bp_valid,
  input  logic [3:0]                           tlb_valid,
  output logic [3:0]                           acc_valid,
  input  logic [3:0]                           acc_ready,
  output logic [3:0]                           acc_write,
  output logic [3:0][57:0]                     acc_line,
  output logic [3:0][2:0]                      acc_word,
  output logic [3:0][63:0]                     acc_wdata,
  input  logic [3:0]                           acc_done,
  input  logic [3:0]                           acc_hit,
  input  logic [3:0][63:0]                     acc_rdata,
  input  logic [1:0]                           active_core,
  input  logic                                 irq_valid,
  input  logic [1:0]                           irq_core,
  output logic                                 tpc_valid,
  output logic [63:0]                          tpc,
  input  logic                                 start_valid,
  input  logic [1:0]                           start_core,
  input  logic [63:0]                          start_pc,
  input  logic                                 start_flush,
  input  logic                                 migrating,
  input  logic                                 l3_req_valid,
  input  logic [57:0]                          l3_req_line,
  output logic                                 l3_rsp_valid,
  output logic [511:0]                         l3_rsp_data,
  input  logic                                 l3_wb_valid,
  input  logic [57:0]                          l3_wb_line,
  input  logic [511:0]                         l3_wb_data,
  input  logic                                 ev_decided,
  input  logic                                 ev_fwd,
  input  logic                                 ev_l3,
  input  logic                                 ev_ctrl_drop,
  input  logic [3:0]                           ev_upd_drop,
  input  logic                                 ev_bus_conflict
);
  import emig_pkg::*;
  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_hit = 0, n_fwd = 0, n_l3 = 0, n_wb = 0, n_irq = 0, n_start = 0,
      n_redirect = 0, n_switch = 0, n_lock = 0, n_decided = 0, n_ctrl_drop = 0, n_upd_drop = 0,
      n_conflict = 0, n_bp = 0, n_tlb = 0;

  logic [511:0] l3   [NLINES];
  logic [511:0] truth[NLINES];
  logic [63:0]  regs [8];

  // event counters
  always @(posedge clk) begin
    if (!rst) begin
      if (ev_fwd) n_fwd++;
      if (ev_l3) n_l3++;
      if (l3_wb_valid) begin n_wb++; l3[int'(l3_wb_line)] = l3_wb_data; end
      if (ev_decided) n_decided++;
      if (ev_ctrl_drop) n_ctrl_drop++;
      if (|ev_upd_drop) n_upd_drop++;
      if (ev_bus_conflict) n_conflict++;
      if (|issue_locked) n_lock++;
      n_bp += $countones(bp_valid);
      n_tlb += $countones(tlb_valid);
    end
  end

  // L3
  initial begin
    l3_rsp_valid = 0; l3_rsp_data = '0;
    wait (rst === 1'b1);
    wait (rst === 1'b0);
    forever begin
      @(posedge clk); #1;
      if (l3_req_valid && !l3_rsp_valid) begin
        repeat (4) @(posedge clk);
        #1 l3_rsp_valid = 1; l3_rsp_data = l3[int'(l3_req_line)];
        @(posedge clk); #1 l3_rsp_valid = 0;
      end
    end
  end

  // Retirement of the active core: one packet, then idle.
  task automatic retire(input ub_packet_t p);
    ret_pkt[active_core] = p;
    ret_valid = 4'b1 << active_core;
    @(posedge clk); #1;
    ret_valid = '0;
  endtask

  // Migration protocol, handled between accesses.
  logic [1:0] dest;
  task automatic handle_migration();
    ub_packet_t p;
    logic [1:0] old;
    n_irq++;
    old = active_core;
    checks++;
    if (irq_core != active_core) begin failures++; $display("FAIL irq core"); end
    repeat (2) @(posedge clk);
    #1 tpc_valid = 1; tpc = 64'h4000 + 64'(n_irq);
    @(posedge clk); #1 tpc_valid = 0;
    while (!start_valid) begin @(posedge clk); #1; end
    n_start++;
    dest = start_core;
    checks++;
    if (start_pc != 64'h4000 + 64'(n_irq) || start_core == old) begin failures++; $display("FAIL start"); end
    @(posedge clk); #1;
    checks++;
    if (!issue_locked[dest]) begin failures++; $display("FAIL destination issue stage not locked"); end
    if (n_irq % 3 == 0) begin
      #1 tpc_valid = 1; tpc = 64'h8000 + 64'(n_irq);
      @(posedge clk); #1 tpc_valid = 0;
      while (!start_valid) begin @(posedge clk); #1; end
      n_redirect++;
      checks++;
      if (!start_flush || start_pc != 64'h8000 + 64'(n_irq)) begin failures++; $display("FAIL redirect"); end
    end
    // the old core retires T (with a register write) on the update bus
    p = '0;
    p.slot[0].kind = UB_REG; p.slot[0].reg_id = 6'd7; p.slot[0].value = 64'(n_irq) + 64'h7000;
    p.slot[0].transition = 1'b1;
    regs[7] = p.slot[0].value;
    retire(p);
    repeat (6) @(posedge clk); #1;
    checks++;
    if (active_core != dest || issue_locked[dest]) begin
      failures++; $display("FAIL switch to core %0d (active %0d, locked %b)", dest, active_core, issue_locked);
    end
    n_switch++;
  endtask

  task automatic access(input bit wr, input int ln, input int wd, input logic [63:0] v);
    int c;
    c = int'(active_core);
    acc_valid[c] = 1; acc_write[c] = wr; acc_line[c] = 58'(ln); acc_word[c] = 3'(wd); acc_wdata[c] = v;
    while (!acc_ready[c]) begin @(posedge clk); #1; end
    @(posedge clk); #1 acc_valid[c] = 0;
    while (!acc_done[c]) begin @(posedge clk); #1; end
    if (acc_hit[c]) n_hit++;
    if (wr) begin
      ub_packet_t p;
      int r;
      n_write++;
      truth[ln][wd*64 +: 64] = v;
      r = int'($urandom % 7);
      p = '0;
      p.slot[0].kind = UB_STORE; p.slot[0].value = v;
      p.store_addr = {6'(0), 58'(ln)} << 6 | 64'(wd * 8);
      p.slot[1].kind = UB_REG; p.slot[1].reg_id = 6'(r); p.slot[1].value = v ^ 64'h55;
      regs[r] = v ^ 64'h55;
      p.slot[2].kind = UB_BRANCH; p.slot[2].value = 64'h100 + 64'(ln); p.br_addr = 16'(ln); p.br_taken = 1'b1;
      if (ln % 50 == 0) begin p.slot[3].kind = UB_TLB; p.slot[3].value = 64'(ln); end
      retire(p);
    end else begin
      n_read++;
      checks++;
      if (acc_rdata[c] != truth[ln][wd*64 +: 64]) begin
        failures++;
        if (failures < 10) $display("FAIL core %0d read line %0d word %0d: %h expected %h", c, ln, wd,
                                    acc_rdata[c], truth[ln][wd*64 +: 64]);
      end
    end
    if (irq_valid || (migrating && n_start == n_irq)) ;  // handled by the caller
  endtask

  task automatic check_regs();
    for (int c = 0; c < 4; c++) for (int r = 0; r < 8; r += 2) begin
      rf_addr[c][0] = 6'(r); rf_addr[c][1] = 6'(r + 1);
      #1;
      checks++;
      if (rf_data[c][0] != regs[r] || rf_data[c][1] != regs[r+1]) begin
        failures++;
        if (failures < 10) $display("FAIL core %0d register %0d copy", c, r);
      end
    end
  endtask

  logic irq_seen;
  always @(posedge clk) if (!rst && irq_valid) irq_seen <= 1'b1;

  initial begin
    rst = 1; mig_mode = 1; ret_valid = '0; ret_pkt = '0; rf_addr = '0; acc_valid = '0; acc_write = '0;
    acc_line = '0; acc_word = '0; acc_wdata = '0; tpc_valid = 0; tpc = '0; irq_seen = 0;
    for (int i = 0; i < NLINES; i++) begin l3[i] = {16{$urandom}}; truth[i] = l3[i]; end
    for (int r = 0; r < 8; r++) regs[r] = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (&acc_ready);
    @(posedge clk); #1;
    for (int p = 0; p < PASSES; p++) begin
      for (int i = 0; i < NLINES; i++) begin
        automatic bit wr = ($urandom % 4) == 0;
        access(wr, i, int'($urandom % 8), {$urandom, $urandom});
        if (irq_seen) begin
          // wait for the controller's interrupt pulse to have been taken into account
          irq_seen = 0;
          handle_migration();
        end
      end
      repeat (8) @(posedge clk); #1;
      check_regs();
    end
    $display("reads %0d writes %0d L2 hits %0d | fills: from another L2 %0d, from L3 %0d | write-backs %0d",
             n_read, n_write, n_hit, n_fwd, n_l3, n_wb);
    $display("controller decisions %0d, dropped %0d | migrations %0d (redirected %0d), cycles with a locked issue stage %0d",
             n_decided, n_ctrl_drop, n_switch, n_redirect, n_lock);
    $display("predictor updates %0d, TLB updates %0d", n_bp, n_tlb);

    // burst of stores: overflows the inactive cores' update queues
    begin
      ub_packet_t p;
      p = '0;
      p.slot[0].kind = UB_STORE; p.slot[0].value = 64'h1; p.store_addr = 64'h40;
      ret_pkt[active_core] = p;
      ret_valid = 4'b1 << active_core;
      repeat (80) @(posedge clk);
      #1 ret_valid = '0;
      // a non-active core drives the bus
      ret_valid = 4'b1 << (active_core + 2'd1);
      @(posedge clk); #1 ret_valid = '0;
      repeat (10) @(posedge clk); #1;
    end
    $display("update-queue overflow cycles %0d, bus conflicts %0d", n_upd_drop, n_conflict);

    checks++; if (n_switch < MIN_MIGRATIONS) begin failures++; $display("FAIL migrations: %0d", n_switch); end
    checks++; if (n_redirect == 0 && MIN_MIGRATIONS >= 3) begin failures++; $display("FAIL no redirect"); end
    checks++; if (n_fwd == 0) begin failures++; $display("FAIL no L2-to-L2 forward"); end
    checks++; if (n_l3 == 0) begin failures++; $display("FAIL no L3 fill"); end
    checks++; if (n_wb == 0) begin failures++; $display("FAIL no write-back"); end
    checks++; if (n_lock == 0) begin failures++; $display("FAIL no issue lock"); end
    checks++; if (n_decided == 0) begin failures++; $display("FAIL no controller decision"); end
    checks++; if (n_ctrl_drop == 0) begin failures++; $display("FAIL controller queue never full"); end
    checks++; if (n_upd_drop == 0) begin failures++; $display("FAIL update queue never full"); end
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL bus conflict not flagged"); end
    checks++; if (n_bp == 0 || n_tlb == 0) begin failures++; $display("FAIL predictor/TLB updates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
