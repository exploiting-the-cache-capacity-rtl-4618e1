// update_receiver: the update-bus side of one core's retirement unit.
//
// Every core keeps its own copy of the architectural register file, written at retirement from
// the update bus: up to four register writes per packet, applied in slot order (a later slot
// wins when two write the same register). This is how an inactive core's registers are always
// up to date, so that execution can move to it without copying state.
// On an inactive core the other kinds of retired instruction are turned into update requests
// for local structures: a store becomes a write to the local L1 and L2 (which apply it only if
// they hold the line), a branch trains the local branch predictor, and a TLB-modifying
// instruction is replayed on the local TLB. The active core updates its own structures as it
// retires, so these requests are suppressed there.
// Issue lock: when this core is chosen as the destination of a migration (lock_set) its issue
// stage is blocked until the transition instruction T, marked on the bus, has retired; the
// packet that carries T releases the lock (t_seen pulses).
//
// Published: what is broadcast and what an inactive core does with it, the issue-stage lock
// released by T. This design's own: one store, one branch and one TLB update per packet (the
// first slot of each kind is used), the register-file size (64 registers of 64 bits, from the
// 6-bit register numbers), write-first ordering, and two combinational read ports.
//
// Timing: register writes and the lock take effect at the clock edge after bus_valid; update
// requests are registered and appear one cycle after the packet.
module update_receiver #(
  parameter int unsigned NREGS = 64
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          is_active,
  input  logic                          bus_valid,
  input  emig_pkg::ub_packet_t          bus_pkt,
  input  logic                          lock_set,
  output logic                          issue_locked,
  output logic                          t_seen,
  // architectural register reads
  input  logic [emig_pkg::REG_ID_W-1:0] rd_addr [2],
  output logic [emig_pkg::XLEN-1:0]     rd_data [2],
  // store update to the local caches
  output logic                          st_valid,
  output logic [emig_pkg::ADDR_W-1:0]   st_addr,
  output logic [emig_pkg::XLEN-1:0]     st_data,
  // branch predictor training
  output logic                          bp_valid,
  output logic [emig_pkg::BR_ADDR_W-1:0] bp_addr,
  output logic                          bp_taken,
  output logic [emig_pkg::XLEN-1:0]     bp_target,
  // TLB replay
  output logic                          tlb_valid,
  output logic [emig_pkg::XLEN-1:0]     tlb_value
);
  import emig_pkg::*;

  logic [XLEN-1:0] regs [NREGS];

  logic            any_st, any_br, any_tlb, any_t;
  logic [XLEN-1:0] st_val, br_val, tlb_val;

  always_comb begin
    any_st = 1'b0; any_br = 1'b0; any_tlb = 1'b0; any_t = 1'b0;
    st_val = '0;   br_val = '0;   tlb_val = '0;
    for (int i = RETIRE_W - 1; i >= 0; i--) begin
      if (bus_pkt.slot[i].kind == UB_STORE)  begin any_st  = 1'b1; st_val  = bus_pkt.slot[i].value; end
      if (bus_pkt.slot[i].kind == UB_BRANCH) begin any_br  = 1'b1; br_val  = bus_pkt.slot[i].value; end
      if (bus_pkt.slot[i].kind == UB_TLB)    begin any_tlb = 1'b1; tlb_val = bus_pkt.slot[i].value; end
      if (bus_pkt.slot[i].transition)        any_t = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else if (bus_valid) begin
      for (int i = 0; i < RETIRE_W; i++)
        if (bus_pkt.slot[i].kind == UB_REG)
          regs[bus_pkt.slot[i].reg_id[$clog2(NREGS)-1:0]] <= bus_pkt.slot[i].value;
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++) rd_data[p] = regs[rd_addr[p][$clog2(NREGS)-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      issue_locked <= 1'b0;
      t_seen       <= 1'b0;
      st_valid     <= 1'b0;
      bp_valid     <= 1'b0;
      tlb_valid    <= 1'b0;
    end else begin
      t_seen    <= bus_valid && any_t;
      st_valid  <= bus_valid && any_st && !is_active;
      bp_valid  <= bus_valid && any_br && !is_active;
      tlb_valid <= bus_valid && any_tlb && !is_active;
      if (lock_set)                issue_locked <= 1'b1;
      else if (bus_valid && any_t) issue_locked <= 1'b0;
    end
    st_addr   <= bus_pkt.store_addr;
    st_data   <= st_val;
    bp_addr   <= bus_pkt.br_addr;
    bp_taken  <= bus_pkt.br_taken;
    bp_target <= br_val;
    tlb_value <= tlb_val;
  end
endmodule
