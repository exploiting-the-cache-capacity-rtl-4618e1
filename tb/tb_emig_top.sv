// tb_emig_top: end-to-end test of emig_top at reduced sizes (8-KB L2s of 128 lines, R-windows
// of 16 and 8, a 256-entry affinity cache) on a 400-line circular working-set, which does not
// fit in one L2 but fits in the four. Stimulus and checks are in emig_top_driver.
module tb_emig_top;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, mig_mode, irq_valid, tpc_valid, start_valid, start_flush, migrating;
  logic l3_req_valid, l3_rsp_valid, l3_wb_valid, ev_decided, ev_fwd, ev_l3, ev_ctrl_drop, ev_bus_conflict;
  logic [3:0] ret_valid, issue_locked, bp_valid, bp_taken, tlb_valid, acc_valid, acc_ready, acc_write,
              acc_done, acc_hit, ev_upd_drop;
  emig_pkg::ub_packet_t [3:0] ret_pkt;
  logic [3:0][1:0][5:0] rf_addr;
  logic [3:0][1:0][63:0] rf_data;
  logic [3:0][15:0] bp_addr;
  logic [3:0][63:0] bp_target, tlb_value, acc_wdata, acc_rdata;
  logic [3:0][57:0] acc_line;
  logic [3:0][2:0] acc_word;
  logic [1:0] active_core, irq_core, start_core;
  logic [63:0] tpc, start_pc;
  logic [57:0] l3_req_line, l3_wb_line;
  logic [511:0] l3_rsp_data, l3_wb_data;

  emig_top #(.L2_KB(8), .AC_ENTRIES(256), .RWIN_X(16), .RWIN_Y(8)) dut (.*);

  emig_top_driver #(.NLINES(400), .PASSES(60), .MIN_MIGRATIONS(3)) drv (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule
