// split2: one 2-way working-set splitting mechanism (the affinity algorithm).
//
// Every element e of the working-set has a signed affinity A_e. R is the window of the RWIN
// most recent references and A_R the sum of their affinities. On each reference, with
// s = sign(A_R) (sign(0) = +1), every element inside R gains s and every element outside R
// loses s. Elements with A_e >= 0 form one subset, the others the second subset; a transition
// filter F (F += A_e of each reference, saturating) gives the subset actually used.
//
// Updating every element on every reference is impossible, so affinities outside the window are
// stored as offsets in the affinity cache (outside this module): A_e = O_e - Delta, and the
// global register Delta gains s on every reference, so an element that stays outside R keeps a
// constant O_e while its affinity drifts by -s per reference. A new element is given O_e = Delta, i.e. A_e = 0. Inside the window each
// slot keeps W = A_entry - Delta_entry, so its current affinity is W + Delta; when the slot
// leaves, the affinity is saturated to AFF_W bits and written back as O_e = A_e + Delta.
// A_R is kept in a register: it gains the entering affinity, loses the leaving one, then gains
// s times the number of window slots.
//
// What follows the published design: the update rule (Eq. 1), the offset encoding with Delta
// and O_e = Delta on allocation, the window sizes, the 16-bit affinity, the saturating filter.
// This design's own choices: the window is a FIFO of the last RWIN references (a line
// referenced twice inside the window occupies two slots), the reference being processed is
// already counted in R when s is taken, saturation is applied when an affinity leaves the
// window, and Delta and A_R are modulo-2^AR_W registers.
//
// Interface and timing: present in_line/in_o (the stored offset of the referenced line, or
// delta_o if it has none) and pulse step. a_in is combinational (A_e of in_line for the
// current state). ex_valid/ex_line/ex_o describe the slot that the next step pushes out, so
// that its offset can be written back before step. All state changes at the clock edge
// where step is high; upd_filter selects whether F is updated by that step.
module split2 #(
  parameter int unsigned RWIN   = 128,
  parameter int unsigned LINE_W = emig_pkg::LINE_W,
  parameter int unsigned AFF_W  = emig_pkg::AFF_W,
  parameter int unsigned FILT_W = emig_pkg::FILT_W,
  localparam int unsigned AR_W  = AFF_W + $clog2(RWIN) + 2  // width of A_R and Delta
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     step,
  input  logic                     upd_filter,
  input  logic [LINE_W-1:0]        in_line,
  input  logic [AFF_W-1:0]         in_o,
  output logic signed [AFF_W-1:0]  a_in,      // A_e of in_line
  output logic [AFF_W-1:0]         delta_o,   // O_e value that means A_e = 0
  output logic                     ex_valid,  // window full: next step evicts a slot
  output logic [LINE_W-1:0]        ex_line,
  output logic [AFF_W-1:0]         ex_o,      // offset to write back for ex_line
  output logic signed [FILT_W-1:0] f,
  output logic                     neg,       // sign(F) = -1
  output logic signed [AR_W-1:0]   ar,        // A_R after the last step
  output logic                     s_neg      // sign(A_R) used by the last step was -1
);
  localparam int unsigned PTR_W = $clog2(RWIN) > 0 ? $clog2(RWIN) : 1;
  localparam int unsigned CNT_W = $clog2(RWIN + 1);
  localparam logic signed [AR_W-1:0] AMAX = AR_W'((1 << (AFF_W - 1)) - 1);
  localparam logic signed [AR_W-1:0] AMIN = -AMAX - AR_W'(1);

  typedef struct packed {
    logic [LINE_W-1:0]      line;
    logic signed [AR_W-1:0] w;     // A_entry - Delta_entry
  } slot_t;

  slot_t                  win [RWIN];
  logic [PTR_W-1:0]       wr_ptr;  // next slot to write; the oldest slot once full
  logic [CNT_W-1:0]       cnt;
  logic signed [AR_W-1:0] delta;

  logic signed [AR_W-1:0] a_in_x, w_in, a_out, a_out_sat, ar_tmp, ar_next;
  logic [CNT_W-1:0]       cnt_next;
  logic                   full;

  assign full     = (cnt == CNT_W'(RWIN));
  assign delta_o  = delta[AFF_W-1:0];
  assign a_in     = $signed(in_o - delta[AFF_W-1:0]);
  assign ex_valid = full;
  assign ex_line  = win[wr_ptr].line;

  always_comb begin
    a_in_x    = AR_W'(a_in);
    w_in      = a_in_x - delta;
    a_out     = win[wr_ptr].w + delta;
    a_out_sat = (a_out > AMAX) ? AMAX : ((a_out < AMIN) ? AMIN : a_out);
    ex_o      = a_out_sat[AFF_W-1:0] + delta[AFF_W-1:0];
    ar_tmp    = ar + a_in_x - (full ? a_out : '0);
    cnt_next  = full ? cnt : cnt + CNT_W'(1);
    ar_next   = ar_tmp[AR_W-1] ? ar_tmp - AR_W'(cnt_next) : ar_tmp + AR_W'(cnt_next);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      cnt    <= '0;
      delta  <= '0;
      ar     <= '0;
      s_neg  <= 1'b0;
    end else if (step) begin
      win[wr_ptr] <= '{line: in_line, w: w_in};
      wr_ptr      <= (wr_ptr == PTR_W'(RWIN - 1)) ? '0 : wr_ptr + PTR_W'(1);
      cnt         <= cnt_next;
      ar          <= ar_next;
      delta       <= ar_tmp[AR_W-1] ? delta - AR_W'(1) : delta + AR_W'(1);
      s_neg       <= ar_tmp[AR_W-1];
    end
  end

  transition_filter #(.FILT_W(FILT_W), .AFF_W(AFF_W)) u_filter (
    .clk, .rst,
    .upd (step && upd_filter),
    .aff (a_in),
    .f, .neg
  );
endmodule
