// transition_filter: the up-down saturating counter F of one splitting mechanism.
//
// On every update the counter adds the signed affinity A_e of the current reference,
// F(t+1) = F(t) + A_e(t), and saturates at the most positive and most negative FILT_W-bit
// values. The subset a reference belongs to is the sign of F (sign(0) = +1), which filters out
// the frequent sign changes of individual affinities on working-sets that cannot be split.
// Widths follow the published design (16-bit affinity, 18-bit filter in the evaluated
// configuration). Reset value 0 is this design's choice.
//
// Timing: upd/aff sampled at the rising clock edge; f and neg reflect the new value one cycle
// later. Synchronous active-high reset.
module transition_filter #(
  parameter int unsigned FILT_W = emig_pkg::FILT_W,
  parameter int unsigned AFF_W  = emig_pkg::AFF_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     upd,   // add aff this cycle
  input  logic signed [AFF_W-1:0]  aff,   // A_e(t)
  output logic signed [FILT_W-1:0] f,
  output logic                     neg    // sign(F) = -1
);
  localparam int unsigned SUM_W = (FILT_W > AFF_W ? FILT_W : AFF_W) + 1;
  localparam logic signed [SUM_W-1:0] FMAX = SUM_W'({1'b0, {(FILT_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] FMIN = -FMAX - SUM_W'(1);

  logic signed [SUM_W-1:0] sum;

  always_comb begin
    sum = SUM_W'(f) + SUM_W'(aff);
  end

  always_ff @(posedge clk) begin
    if (rst)               f <= '0;
    else if (upd) begin
      if (sum > FMAX)      f <= FMAX[FILT_W-1:0];
      else if (sum < FMIN) f <= FMIN[FILT_W-1:0];
      else                 f <= sum[FILT_W-1:0];
    end
  end

  assign neg = f[FILT_W-1];
endmodule
