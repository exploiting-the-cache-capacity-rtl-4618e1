// emig_top: execution-migration support for a four-core chip.
//
// A sequential program runs on one core at a time, the active core. The four private L2
// caches together hold more of its working-set than one of them could: the migration
// controller learns, from the stream of L1 misses, a split of the working-set into four
// subsets of about equal size with few transitions between them, and moves execution to the
// core whose L2 holds the subset the program is currently using.
//
// Instantiated here:
//   - migration_controller: affinity algorithm, 4-way split, and the migration protocol;
//   - update_bus + four update_receivers: the active core's retired instructions are broadcast
//     so that every core's architectural registers, caches (stores), branch predictor and TLB
//     stay up to date, and the destination core's issue stage is released by T;
//   - four l2_caches with the migration-mode coherence rules, and l2_l3_bus, which serves L2
//     misses from a modified copy in another L2 or from L3.
// The cores themselves, their L1 caches, branch predictors, TLBs and the L3 are outside: their
// connections are the ports of this module.
//
// Glue that is this design's own choice:
//   - the controller sees each access of the active core's L2 when it completes (line address
//     and whether it missed in L2); these go through a CTRL_Q-entry queue and are dropped, and
//     counted, when the queue is full, since the controller only needs a sample of the stream;
//   - store updates from the update bus wait in a UPD_Q-entry queue per core in front of the
//     L2; overflows are counted;
//   - the transition instruction's retirement is taken from the update bus (t_seen).
//
// Timing: all blocks share clk and the synchronous active-high rst. After reset the affinity
// cache and the L2s clear themselves (2048 cycles at the default sizes) before taking requests.
module emig_top #(
  parameter int unsigned NCORES     = emig_pkg::NCORES,
  parameter int unsigned L2_KB      = 512,
  parameter int unsigned AC_ENTRIES = 8192,
  parameter int unsigned RWIN_X     = 128,
  parameter int unsigned RWIN_Y     = 64,
  parameter int unsigned CTRL_Q     = 8,
  parameter int unsigned UPD_Q      = 16
) (
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic                                  mig_mode,
  // retirement units of the cores
  input  logic [NCORES-1:0]                     ret_valid,
  input  emig_pkg::ub_packet_t [NCORES-1:0]     ret_pkt,
  // architectural register reads, per core
  input  logic [NCORES-1:0][1:0][emig_pkg::REG_ID_W-1:0] rf_addr,
  output logic [NCORES-1:0][1:0][emig_pkg::XLEN-1:0]     rf_data,
  output logic [NCORES-1:0]                     issue_locked,
  // branch predictor / TLB updates for inactive cores
  output logic [NCORES-1:0]                     bp_valid,
  output logic [NCORES-1:0][emig_pkg::BR_ADDR_W-1:0] bp_addr,
  output logic [NCORES-1:0]                     bp_taken,
  output logic [NCORES-1:0][emig_pkg::XLEN-1:0] bp_target,
  output logic [NCORES-1:0]                     tlb_valid,
  output logic [NCORES-1:0][emig_pkg::XLEN-1:0] tlb_value,
  // L1-miss accesses of the cores to their L2
  input  logic [NCORES-1:0]                     acc_valid,
  output logic [NCORES-1:0]                     acc_ready,
  input  logic [NCORES-1:0]                     acc_write,
  input  logic [NCORES-1:0][emig_pkg::LINE_W-1:0] acc_line,
  input  logic [NCORES-1:0][2:0]                acc_word,
  input  logic [NCORES-1:0][emig_pkg::XLEN-1:0] acc_wdata,
  output logic [NCORES-1:0]                     acc_done,
  output logic [NCORES-1:0]                     acc_hit,
  output logic [NCORES-1:0][emig_pkg::XLEN-1:0] acc_rdata,
  // migration protocol with the I-fetch units
  output logic [1:0]                            active_core,
  output logic                                  irq_valid,
  output logic [1:0]                            irq_core,
  input  logic                                  tpc_valid,
  input  logic [emig_pkg::XLEN-1:0]             tpc,
  output logic                                  start_valid,
  output logic [1:0]                            start_core,
  output logic [emig_pkg::XLEN-1:0]             start_pc,
  output logic                                  start_flush,
  output logic                                  migrating,
  // L3
  output logic                                  l3_req_valid,
  output logic [emig_pkg::LINE_W-1:0]           l3_req_line,
  input  logic                                  l3_rsp_valid,
  input  logic [8*emig_pkg::XLEN-1:0]           l3_rsp_data,
  output logic                                  l3_wb_valid,
  output logic [emig_pkg::LINE_W-1:0]           l3_wb_line,
  output logic [8*emig_pkg::XLEN-1:0]           l3_wb_data,
  // events
  output logic                                  ev_decided,
  output logic                                  ev_fwd,        // L2-to-L2 miss
  output logic                                  ev_l3,         // L3 access
  output logic                                  ev_ctrl_drop,  // controller queue full
  output logic [NCORES-1:0]                     ev_upd_drop,   // update queue full
  output logic                                  ev_bus_conflict
);
  import emig_pkg::*;
  localparam int unsigned LW = LINE_W;
  localparam int unsigned DW = 8 * XLEN;

  // ---------------- migration controller ----------------
  logic          c_req_valid, c_req_ready, c_req_l2_miss, c_sampled, t_retired;
  logic [LW-1:0] c_req_line;
  logic [1:0]    target_core;
  logic          q_empty, q_full;
  logic [LW:0]   q_dout;
  logic [NCORES-1:0][LW-1:0] acc_line_q;   // line of the access being completed, per core

  // Completed accesses of the active core's L2, queued for the controller.
  sync_fifo #(.WIDTH(LW + 1), .DEPTH(CTRL_Q)) u_ctrl_q (
    .clk, .rst,
    .push     (acc_done[active_core]),
    .din      ({!acc_hit[active_core], acc_line_q[active_core]}),
    .pop      (c_req_valid && c_req_ready),
    .dout     (q_dout),
    .empty    (q_empty),
    .full     (q_full),
    .overflow (ev_ctrl_drop)
  );
  assign c_req_valid   = !q_empty;
  assign c_req_line    = q_dout[LW-1:0];
  assign c_req_l2_miss = q_dout[LW];

  migration_controller #(.RWIN_X(RWIN_X), .RWIN_Y(RWIN_Y), .AC_ENTRIES(AC_ENTRIES)) u_ctrl (
    .clk, .rst, .mig_mode,
    .req_valid (c_req_valid), .req_ready (c_req_ready), .req_line (c_req_line),
    .req_l2_miss (c_req_l2_miss),
    .active_core, .target_core, .decided (ev_decided), .sampled (c_sampled),
    .irq_valid, .irq_core, .tpc_valid, .tpc,
    .start_valid, .start_core, .start_pc, .start_flush,
    .t_retired, .migrating
  );

  // ---------------- update bus ----------------
  logic       bus_valid;
  ub_packet_t bus_pkt;

  update_bus #(.NCORES(NCORES)) u_bus (
    .clk, .rst, .active_core, .core_valid (ret_valid), .core_pkt (ret_pkt),
    .bus_valid, .bus_pkt, .conflict (ev_bus_conflict)
  );

  // ---------------- per core ----------------
  logic [NCORES-1:0]          t_seen, st_valid;
  logic [NCORES-1:0][ADDR_W-1:0] st_addr;
  logic [NCORES-1:0][XLEN-1:0]   st_data;

  logic [NCORES-1:0]          fill_req_valid, fill_rsp_valid, snp_valid, snp_ready, snp_done, snp_hit, wb_valid;
  logic [NCORES-1:0][LW-1:0]  fill_req_line, wb_line;
  logic [NCORES-1:0][DW-1:0]  snp_data, wb_data;
  logic [DW-1:0]              fill_rsp_data;
  logic [LW-1:0]              snp_line;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic [XLEN-1:0] rd_data [2];
    logic [REG_ID_W-1:0] rd_addr [2];
    logic            uq_empty, uq_full, upd_ready;
    logic [ADDR_W+XLEN-1:0] uq_dout;

    assign rd_addr[0]    = rf_addr[c][0];
    assign rd_addr[1]    = rf_addr[c][1];
    assign rf_data[c][0] = rd_data[0];
    assign rf_data[c][1] = rd_data[1];

    update_receiver u_rcv (
      .clk, .rst,
      .is_active    (active_core == 2'(c)),
      .bus_valid, .bus_pkt,
      .lock_set     (start_valid && start_core == 2'(c)),
      .issue_locked (issue_locked[c]),
      .t_seen       (t_seen[c]),
      .rd_addr, .rd_data,
      .st_valid     (st_valid[c]), .st_addr (st_addr[c]), .st_data (st_data[c]),
      .bp_valid     (bp_valid[c]), .bp_addr (bp_addr[c]), .bp_taken (bp_taken[c]), .bp_target (bp_target[c]),
      .tlb_valid    (tlb_valid[c]), .tlb_value (tlb_value[c])
    );

    sync_fifo #(.WIDTH(ADDR_W + XLEN), .DEPTH(UPD_Q)) u_upd_q (
      .clk, .rst,
      .push (st_valid[c]), .din ({st_addr[c], st_data[c]}),
      .pop  (!uq_empty && upd_ready),
      .dout (uq_dout), .empty (uq_empty), .full (uq_full), .overflow (ev_upd_drop[c])
    );

    // Remember the line of the access in flight so that its completion can be reported.
    always_ff @(posedge clk) if (acc_valid[c] && acc_ready[c]) acc_line_q[c] <= acc_line[c];

    l2_cache #(.SIZE_KB(L2_KB)) u_l2 (
      .clk, .rst,
      .acc_valid (acc_valid[c]), .acc_ready (acc_ready[c]), .acc_write (acc_write[c]),
      .acc_line  (acc_line[c]),  .acc_word (acc_word[c]),   .acc_wdata (acc_wdata[c]),
      .acc_done  (acc_done[c]),  .acc_hit  (acc_hit[c]),    .acc_rdata (acc_rdata[c]),
      .upd_valid (!uq_empty),    .upd_ready (upd_ready),
      .upd_line  (uq_dout[ADDR_W+XLEN-1 -: LW]), .upd_word (uq_dout[XLEN+5:XLEN+3]),
      .upd_wdata (uq_dout[XLEN-1:0]),
      .snp_valid (snp_valid[c]), .snp_ready (snp_ready[c]), .snp_line (snp_line),
      .snp_done  (snp_done[c]),  .snp_hit   (snp_hit[c]),   .snp_data (snp_data[c]),
      .fill_req_valid (fill_req_valid[c]), .fill_req_line (fill_req_line[c]),
      .fill_rsp_valid (fill_rsp_valid[c]), .fill_rsp_data (fill_rsp_data),
      .wb_valid  (wb_valid[c]),  .wb_line (wb_line[c]), .wb_data (wb_data[c])
    );
  end

  assign t_retired = |t_seen;

  l2_l3_bus #(.NCORES(NCORES)) u_l2l3 (
    .clk, .rst,
    .fill_req_valid, .fill_req_line, .fill_rsp_valid, .fill_rsp_data,
    .snp_valid, .snp_ready, .snp_line, .snp_done, .snp_hit, .snp_data,
    .wb_valid, .wb_line, .wb_data,
    .l3_req_valid, .l3_req_line, .l3_rsp_valid, .l3_rsp_data,
    .l3_wb_valid, .l3_wb_line, .l3_wb_data,
    .fwd_pulse (ev_fwd), .l3_pulse (ev_l3)
  );
endmodule
