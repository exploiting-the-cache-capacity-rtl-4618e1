// sync_fifo: small synchronous FIFO used to decouple event streams inside the migration logic.
//
// DEPTH entries of WIDTH bits. push is ignored when full (and reported by the overflow pulse,
// so that the owner can count lost entries); pop removes the head, which is always visible on
// dout while not empty. Output timing: an entry pushed at one edge can be popped from the next
// cycle on. Synchronous active-high reset empties it.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow
);
  localparam int unsigned PW = DEPTH > 1 ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd, wr;
  logic [PW:0]      cnt;

  assign empty = (cnt == '0);
  assign full  = (cnt == (PW+1)'(DEPTH));
  assign dout  = mem[rd];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd <= '0; wr <= '0; cnt <= '0; overflow <= 1'b0;
    end else begin
      overflow <= push && full && !pop;
      if (push && (!full || pop)) begin
        mem[wr] <= din;
        wr      <= (wr == PW'(DEPTH - 1)) ? '0 : wr + PW'(1);
      end
      if (pop && !empty) rd <= (rd == PW'(DEPTH - 1)) ? '0 : rd + PW'(1);
      cnt <= cnt + (PW+1)'(push && (!full || pop)) - (PW+1)'(pop && !empty);
    end
  end
endmodule
