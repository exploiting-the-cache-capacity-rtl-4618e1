// tb_update_receiver: random update-bus packets into one receiver. Checks the architectural
// register copy against a model (slot order, later slot wins), that store / branch / TLB
// requests come out one cycle later only while the core is inactive, and that the issue lock
// set for a migration is released by the packet carrying the transition instruction.
module tb_update_receiver;
  import emig_pkg::*;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_st = 0, n_bp = 0, n_tlb = 0, n_unlock = 0;

  logic is_active, bus_valid, lock_set, issue_locked, t_seen;
  ub_packet_t bus_pkt;
  logic [5:0] rd_addr [2];
  logic [63:0] rd_data [2];
  logic st_valid, bp_valid, bp_taken, tlb_valid;
  logic [63:0] st_addr, st_data, bp_target, tlb_value;
  logic [15:0] bp_addr;

  update_receiver dut (.clk, .rst, .is_active, .bus_valid, .bus_pkt, .lock_set, .issue_locked, .t_seen,
    .rd_addr, .rd_data, .st_valid, .st_addr, .st_data, .bp_valid, .bp_addr, .bp_taken, .bp_target,
    .tlb_valid, .tlb_value);

  logic [63:0] model [64];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_st, exp_bp, exp_tlb, exp_t, exp_lock;
    logic [63:0] e_st, e_bp, e_tlb;
    rst = 1; is_active = 0; bus_valid = 0; lock_set = 0; bus_pkt = '0; rd_addr[0] = 0; rd_addr[1] = 0;
    for (int r = 0; r < 64; r++) model[r] = '0;
    exp_lock = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 5000; t++) begin
      is_active = (t / 500) % 2 == 1;
      bus_valid = ($urandom % 4) != 0;
      lock_set  = ($urandom % 40) == 0;
      exp_st = 0; exp_bp = 0; exp_tlb = 0; exp_t = 0;
      bus_pkt.store_addr = {$urandom, $urandom};
      bus_pkt.br_addr = 16'($urandom);
      bus_pkt.br_taken = 1'($urandom);
      for (int i = 0; i < 4; i++) begin
        bus_pkt.slot[i].kind = ub_kind_e'($urandom % 5);
        bus_pkt.slot[i].reg_id = 6'($urandom % 8);   // few registers: frequent same-register writes
        bus_pkt.slot[i].value = {$urandom, $urandom};
        bus_pkt.slot[i].transition = ($urandom % 30) == 0;
      end
      // expected side effects
      for (int i = 0; i < 4; i++) begin
        if (bus_valid && bus_pkt.slot[i].kind == UB_REG) model[bus_pkt.slot[i].reg_id] = bus_pkt.slot[i].value;
        if (bus_pkt.slot[i].kind == UB_STORE  && !exp_st)  begin exp_st = 1;  e_st = bus_pkt.slot[i].value; end
        if (bus_pkt.slot[i].kind == UB_BRANCH && !exp_bp)  begin exp_bp = 1;  e_bp = bus_pkt.slot[i].value; end
        if (bus_pkt.slot[i].kind == UB_TLB    && !exp_tlb) begin exp_tlb = 1; e_tlb = bus_pkt.slot[i].value; end
        if (bus_pkt.slot[i].transition) exp_t = 1;
      end
      exp_st &= bus_valid && !is_active; exp_bp &= bus_valid && !is_active; exp_tlb &= bus_valid && !is_active;
      exp_t &= bus_valid;
      if (lock_set) exp_lock = 1; else if (exp_t) begin if (exp_lock) n_unlock++; exp_lock = 0; end
      @(posedge clk); #1;
      checks++;
      if (st_valid != exp_st || (exp_st && (st_data != e_st || st_addr != bus_pkt.store_addr)) ||
          bp_valid != exp_bp || (exp_bp && (bp_target != e_bp || bp_addr != bus_pkt.br_addr || bp_taken != bus_pkt.br_taken)) ||
          tlb_valid != exp_tlb || (exp_tlb && tlb_value != e_tlb) || t_seen != exp_t || issue_locked != exp_lock) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d st %0d/%0d bp %0d/%0d tlb %0d/%0d t %0d/%0d lock %0d/%0d", t,
          st_valid, exp_st, bp_valid, exp_bp, tlb_valid, exp_tlb, t_seen, exp_t, issue_locked, exp_lock);
      end
      n_st += int'(st_valid); n_bp += int'(bp_valid); n_tlb += int'(tlb_valid);
      for (int r = 0; r < 8; r++) begin
        rd_addr[0] = 6'(r); rd_addr[1] = 6'(7 - r);
        #0.1;
        checks++;
        if (rd_data[0] != model[r] || rd_data[1] != model[7-r]) begin
          failures++;
          if (failures < 10) $display("FAIL reg %0d = %h expected %h", r, rd_data[0], model[r]);
        end
      end
    end
    checks++;
    if (n_st == 0 || n_bp == 0 || n_tlb == 0 || n_unlock == 0) begin failures++; $display("FAIL not exercised"); end
    $display("stores %0d branches %0d tlb %0d unlocks %0d", n_st, n_bp, n_tlb, n_unlock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
