// migration_controller: decides when and where a sequential program migrates, and carries the
// migration out.
//
// Decision. Every L1-miss request of the active core (line address, and whether it also missed
// in the local L2) goes through the affinity algorithm. The line is hashed, H(e) = e mod 31;
// only lines with H(e) < SAMPLE_LIMIT are sampled (25% of the working-set with the default 8).
// A sampled line with odd H(e) is handled by mechanism X; one with even H(e) by Y[+1] or Y[-1],
// chosen by the sign of X's transition filter. Each mechanism (split2) owns an R-window, A_R,
// Delta and a transition filter; all three share the affinity cache, which holds the offset O_e
// of each sampled line. The subset of the current reference, and therefore the core that should
// run the program, is (sign F_X, sign F_Y[sign F_X]), encoded as core = {F_X < 0, F_Y < 0}.
// With L2 filtering (L2_FILTER = 1) the affinity state is updated on every request but the
// transition filters only on L2 misses, so a migration can only follow an L2 miss.
//
// Migration. When, in migration mode, the chosen core differs from the active core X1, the
// controller pulses irq to X1's I-fetch unit. X1 stops fetching, sets a transition instruction T
// and answers with the transition PC (tpc_valid). The controller forwards that PC to the new
// core X2 (start_valid), which starts fetching with its issue stage locked until T retires. If
// X1 reports a new transition PC while draining (a mispredicted branch became the transition
// point), the controller forwards it again with start_flush set, so that X2 flushes and
// refetches. When T retires (t_retired, seen on the update bus) X2 becomes the active core.
//
// Timing: a request is taken when req_valid && req_ready. A sampled line then goes through the
// hash, the write-back of the line leaving the chosen R-window (2 cycles, only if the window is
// full), the affinity-cache lookup (2 cycles), the mechanism step and the decision; the decided
// pulse comes 8 cycles after acceptance (10 with a write-back), 3 for an unsampled line.
// req_ready stays low meanwhile. After reset the affinity cache clears itself for
// AC_ENTRIES/4 cycles; requests taken then wait for it.
//
// Published: sampling by e mod 31 < 8, the recursive 4-way split and its selection rule, window
// sizes 128/64, 18-bit filters, L2 filtering, O_e = Delta on an affinity-cache miss, the
// interrupt / transition-PC / redirect / retirement protocol. This design's own choices: the
// core numbering of the four subsets, the sequencing above, that unsampled requests change no
// state, and that decisions made while a migration is in progress are not acted upon.
module migration_controller #(
  parameter int unsigned RWIN_X       = 128,
  parameter int unsigned RWIN_Y       = 64,
  parameter int unsigned AC_ENTRIES   = 8192,
  parameter int unsigned SAMPLE_LIMIT = 8,
  parameter bit          L2_FILTER    = 1'b1,
  parameter int unsigned FILT_W       = emig_pkg::FILT_W,
  parameter int unsigned LINE_W       = emig_pkg::LINE_W,
  parameter int unsigned XLEN         = emig_pkg::XLEN
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              mig_mode,      // migration mode: one task on the machine
  // L1-miss requests of the active core
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [LINE_W-1:0] req_line,
  input  logic              req_l2_miss,
  // decision
  output logic [1:0]        active_core,
  output logic [1:0]        target_core,   // subset of the latest sampled reference
  output logic              decided,       // one-cycle pulse when a request has been processed
  output logic              sampled,       // with decided: the request was sampled
  // migration protocol
  output logic              irq_valid,     // interrupt request to the I-fetch of irq_core
  output logic [1:0]        irq_core,
  input  logic              tpc_valid,     // transition PC from the old core's I-fetch
  input  logic [XLEN-1:0]   tpc,
  output logic              start_valid,   // start fetching at start_pc on start_core
  output logic [1:0]        start_core,
  output logic [XLEN-1:0]   start_pc,
  output logic              start_flush,   // redirect: flush the new core's pipeline first
  input  logic              t_retired,     // transition instruction retired
  output logic              migrating
);
  import emig_pkg::*;

  // ---------------- mechanisms ----------------
  logic                     m_step     [3];
  logic signed [AFF_W-1:0]  m_a_in     [3];
  logic [AFF_W-1:0]         m_delta    [3];
  logic                     m_ex_valid [3];
  logic [LINE_W-1:0]        m_ex_line  [3];
  logic [AFF_W-1:0]         m_ex_o     [3];
  logic signed [FILT_W-1:0] m_f        [3];
  logic                     m_neg      [3];

  logic [LINE_W-1:0] p_line;
  logic              p_l2_miss;
  logic [AFF_W-1:0]  p_o;
  mech_e             p_mech;

  for (genvar g = 0; g < 3; g++) begin : g_mech
    localparam int unsigned RW = (g == 0) ? RWIN_X : RWIN_Y;
    localparam int unsigned ARW = AFF_W + $clog2(RW) + 2;
    logic signed [ARW-1:0] ar;
    logic                  s_neg;
    split2 #(.RWIN(RW), .LINE_W(LINE_W), .AFF_W(AFF_W), .FILT_W(FILT_W)) u_split (
      .clk, .rst,
      .step       (m_step[g]),
      .upd_filter (!L2_FILTER || p_l2_miss),
      .in_line    (p_line),
      .in_o       (p_o),
      .a_in       (m_a_in[g]),
      .delta_o    (m_delta[g]),
      .ex_valid   (m_ex_valid[g]),
      .ex_line    (m_ex_line[g]),
      .ex_o       (m_ex_o[g]),
      .f          (m_f[g]),
      .neg        (m_neg[g]),
      .ar         (ar),
      .s_neg      (s_neg)
    );
  end

  // ---------------- sampling hash ----------------
  logic [4:0] p_h;
  sample_hash #(.LINE_W(LINE_W)) u_hash (.line(p_line), .h(p_h));

  // ---------------- affinity cache ----------------
  logic             ac_req_valid, ac_req_ready, ac_req_write, ac_resp_valid, ac_resp_hit;
  logic [LINE_W-1:0] ac_req_line;
  logic [AFF_W-1:0] ac_req_wdata, ac_resp_o;

  affinity_cache #(.ENTRIES(AC_ENTRIES), .AFF_W(AFF_W), .LINE_W(LINE_W)) u_acache (
    .clk, .rst,
    .req_valid (ac_req_valid), .req_ready (ac_req_ready), .req_write (ac_req_write),
    .req_line  (ac_req_line),  .req_wdata (ac_req_wdata),
    .resp_valid(ac_resp_valid), .resp_hit (ac_resp_hit), .resp_o (ac_resp_o)
  );

  // ---------------- request sequencing ----------------
  typedef enum logic [2:0] {
    P_IDLE, P_HASH, P_WB_REQ, P_WB_WAIT, P_LK_REQ, P_LK_WAIT, P_STEP, P_DECIDE
  } pstate_e;
  pstate_e pstate;
  logic    p_sampled;

  assign req_ready = (pstate == P_IDLE);

  always_comb begin
    ac_req_valid = 1'b0;
    ac_req_write = 1'b0;
    ac_req_line  = p_line;
    ac_req_wdata = m_delta[p_mech];
    if (pstate == P_WB_REQ) begin
      // Only a full window pushes a line out; otherwise the state moves on untouched.
      ac_req_valid = m_ex_valid[p_mech];
      ac_req_write = 1'b1;
      ac_req_line  = m_ex_line[p_mech];
      ac_req_wdata = m_ex_o[p_mech];
    end else if (pstate == P_LK_REQ) begin
      ac_req_valid = 1'b1;
    end
    for (int g = 0; g < 3; g++) m_step[g] = (pstate == P_STEP) && (p_mech == mech_e'(g));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pstate    <= P_IDLE;
      p_mech    <= MECH_X;
      p_sampled <= 1'b0;
    end else begin
      unique case (pstate)
        P_IDLE: if (req_valid) begin
          p_line    <= req_line;
          p_l2_miss <= req_l2_miss;
          pstate    <= P_HASH;
        end
        P_HASH: begin
          p_sampled <= (p_h < 5'(SAMPLE_LIMIT));
          if (p_h[0])          p_mech <= MECH_X;
          else if (m_neg[0])   p_mech <= MECH_YN;
          else                 p_mech <= MECH_YP;
          pstate <= (p_h < 5'(SAMPLE_LIMIT)) ? P_WB_REQ : P_DECIDE;
        end
        P_WB_REQ: begin
          if (!m_ex_valid[p_mech])  pstate <= P_LK_REQ;
          else if (ac_req_ready)    pstate <= P_WB_WAIT;
        end
        P_WB_WAIT: if (ac_resp_valid) pstate <= P_LK_REQ;
        P_LK_REQ:  if (ac_req_ready)  pstate <= P_LK_WAIT;
        P_LK_WAIT: if (ac_resp_valid) begin
          p_o    <= ac_resp_o;
          pstate <= P_STEP;
        end
        P_STEP:   pstate <= P_DECIDE;
        P_DECIDE: pstate <= P_IDLE;
        default:  pstate <= P_IDLE;
      endcase
    end
  end

  // ---------------- decision ----------------
  logic [1:0] subset;
  assign subset = {m_neg[0], m_neg[0] ? m_neg[MECH_YN] : m_neg[MECH_YP]};

  always_ff @(posedge clk) begin
    if (rst) begin
      decided     <= 1'b0;
      sampled     <= 1'b0;
      target_core <= '0;
    end else begin
      decided <= (pstate == P_DECIDE);
      sampled <= (pstate == P_DECIDE) && p_sampled;
      if (pstate == P_DECIDE) target_core <= subset;
    end
  end

  // ---------------- migration protocol ----------------
  typedef enum logic [1:0] { M_IDLE, M_WAIT_TPC, M_DRAIN } mstate_e;
  mstate_e    mstate;
  logic [1:0] dest;

  assign migrating = (mstate != M_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      mstate      <= M_IDLE;
      active_core <= '0;
      dest        <= '0;
      irq_valid   <= 1'b0;
      irq_core    <= '0;
      start_valid <= 1'b0;
      start_core  <= '0;
      start_pc    <= '0;
      start_flush <= 1'b0;
    end else begin
      irq_valid   <= 1'b0;
      start_valid <= 1'b0;
      start_flush <= 1'b0;
      unique case (mstate)
        M_IDLE: if (mig_mode && pstate == P_DECIDE && subset != active_core) begin
          irq_valid <= 1'b1;
          irq_core  <= active_core;
          dest      <= subset;
          mstate    <= M_WAIT_TPC;
        end
        M_WAIT_TPC: if (tpc_valid) begin
          start_valid <= 1'b1;
          start_core  <= dest;
          start_pc    <= tpc;
          mstate      <= M_DRAIN;
        end
        M_DRAIN: begin
          if (t_retired) begin
            active_core <= dest;
            mstate      <= M_IDLE;
          end else if (tpc_valid) begin
            start_valid <= 1'b1;
            start_flush <= 1'b1;
            start_core  <= dest;
            start_pc    <= tpc;
          end
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

  // Protocol rules.
  assert property (@(posedge clk) disable iff (rst) irq_valid |-> irq_core != dest);
  assert property (@(posedge clk) disable iff (rst) start_valid |-> start_core != active_core);
  assert property (@(posedge clk) disable iff (rst) ac_resp_valid |-> (pstate == P_WB_WAIT || pstate == P_LK_WAIT));
endmodule
