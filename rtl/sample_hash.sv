// sample_hash: working-set sampling hash H(e) = e mod 31 of a cache-line address.
//
// Because 2^5 = 1 (mod 31), e mod 31 equals the sum of the 5-bit blocks e_i of e, taken mod 31.
// The module adds all blocks, then folds the sum's bits above bit 4 back onto its low five bits
// until it fits in five bits, and finally maps 31 to 0. The published design forms the block sum
// with a carry-save adder and looks the residue up in a ROM; the folding steps used here replace
// the ROM and give the same residue. Purely combinational: h is valid in the same cycle as line.
module sample_hash #(
  parameter int unsigned LINE_W = emig_pkg::LINE_W
) (
  input  logic [LINE_W-1:0] line,
  output logic [4:0]        h
);
  localparam int unsigned NBLK  = (LINE_W + 4) / 5;
  localparam int unsigned SUM_W = 5 + $clog2(NBLK + 1);

  logic [NBLK*5-1:0] padded;
  logic [SUM_W-1:0]  sum;
  logic [SUM_W-1:0]  fold;

  assign padded = {{(NBLK*5-LINE_W){1'b0}}, line};

  always_comb begin
    sum = '0;
    for (int i = 0; i < NBLK; i++) sum += SUM_W'(padded[i*5 +: 5]);
    // Each fold keeps the value's residue mod 31 and shrinks it; SUM_W folds are always enough.
    fold = sum;
    for (int k = 0; k < SUM_W; k++) fold = SUM_W'(fold[4:0]) + (fold >> 5);
    h = (fold[4:0] == 5'd31) ? 5'd0 : fold[4:0];
  end
endmodule
