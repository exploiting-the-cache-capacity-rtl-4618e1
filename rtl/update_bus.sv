// update_bus: carries the retired instructions of the active core to every core.
//
// Each cycle the retirement unit of the active core may put one packet on the bus: up to four
// retired instructions (register writes, a store, a branch, a TLB update, with the transition
// flag on the transition instruction). Only the active core may drive the bus; the bus takes
// the packet of core active_core and ignores the others, raising conflict for one cycle if a
// non-active core also tried to drive it. The packet reaches all cores after STAGES register
// stages, which model the broadcast delay of a pipelined implementation (a ring, for instance).
//
// Published: one dedicated broadcast bus, written only by the active core, read by all cores,
// about 45 bytes per cycle for a core retiring four instructions. This design's own: the
// number of stages (the published design only says the bus may be pipelined) and the conflict
// flag.
//
// Timing: bus_valid/bus_pkt appear STAGES cycles after core_valid/core_pkt.
module update_bus #(
  parameter int unsigned NCORES = emig_pkg::NCORES,
  parameter int unsigned STAGES = 2
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [$clog2(NCORES)-1:0]          active_core,
  input  logic [NCORES-1:0]                  core_valid,
  input  emig_pkg::ub_packet_t [NCORES-1:0]  core_pkt,
  output logic                               bus_valid,
  output emig_pkg::ub_packet_t               bus_pkt,
  output logic                               conflict
);
  logic                 stg_valid [STAGES+1];
  emig_pkg::ub_packet_t stg_pkt   [STAGES+1];
  logic [NCORES-1:0]    others;

  always_comb begin
    others               = core_valid;
    others[active_core]  = 1'b0;
    stg_valid[0]         = core_valid[active_core];
    stg_pkt[0]           = core_pkt[active_core];
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) stg_valid[s+1] <= 1'b0;
      else     stg_valid[s+1] <= stg_valid[s];
      stg_pkt[s+1] <= stg_pkt[s];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) conflict <= 1'b0;
    else     conflict <= |others;
  end

  assign bus_valid = stg_valid[STAGES];
  assign bus_pkt   = stg_pkt[STAGES];
endmodule
