// l2_l3_bus: the shared L2-L3 side that serves L2 misses.
//
// When an L2 misses it asks this block for the line. The block first asks every other L2
// (snoop): an L2 that holds the line with its modified bit set forwards it and writes it back
// to L3 at the same time. If no L2 forwards the line, it is read from L3. The answer goes back
// to the requesting L2. Write-backs of all L2s go to the single L3 write port. Misses are served
// one at a time, lowest core number first.
//
// Published: forwarding of modified lines between L2s with a simultaneous write-back to L3, and
// L3 reads otherwise; an L2-to-L2 miss costs about as much as an L3 hit. This design's own: the
// sequencing (snoop all, then L3), the fixed-priority arbitration and the L3 handshake
// (l3_req_valid held until l3_rsp_valid).
//
// Timing: a miss takes one cycle to be taken, the snoop time of the slowest L2, and, without a
// forwarded copy, the L3 latency; fill_rsp_valid is a one-cycle pulse to the requester, after
// which the block waits one cycle (B_DONE) for the requester to drop fill_req_valid.
module l2_l3_bus #(
  parameter int unsigned NCORES = emig_pkg::NCORES,
  parameter int unsigned LINE_W = emig_pkg::LINE_W,
  parameter int unsigned DATA_W = 8 * emig_pkg::XLEN
) (
  input  logic                            clk,
  input  logic                            rst,
  // from / to the L2s
  input  logic [NCORES-1:0]               fill_req_valid,
  input  logic [NCORES-1:0][LINE_W-1:0]   fill_req_line,
  output logic [NCORES-1:0]               fill_rsp_valid,
  output logic [DATA_W-1:0]               fill_rsp_data,
  output logic [NCORES-1:0]               snp_valid,
  input  logic [NCORES-1:0]               snp_ready,
  output logic [LINE_W-1:0]               snp_line,
  input  logic [NCORES-1:0]               snp_done,
  input  logic [NCORES-1:0]               snp_hit,
  input  logic [NCORES-1:0][DATA_W-1:0]   snp_data,
  input  logic [NCORES-1:0]               wb_valid,
  input  logic [NCORES-1:0][LINE_W-1:0]   wb_line,
  input  logic [NCORES-1:0][DATA_W-1:0]   wb_data,
  // L3
  output logic                            l3_req_valid,
  output logic [LINE_W-1:0]               l3_req_line,
  input  logic                            l3_rsp_valid,
  input  logic [DATA_W-1:0]               l3_rsp_data,
  output logic                            l3_wb_valid,
  output logic [LINE_W-1:0]               l3_wb_line,
  output logic [DATA_W-1:0]               l3_wb_data,
  // statistics
  output logic                            fwd_pulse,   // a miss was served by another L2
  output logic                            l3_pulse     // a miss was served by L3
);
  typedef enum logic [2:0] { B_IDLE, B_SNOOP, B_DECIDE, B_L3, B_DONE } bstate_e;
  localparam int unsigned CW = $clog2(NCORES);
  bstate_e           state;
  logic [CW-1:0]     req, sel;
  logic [NCORES-1:0] pending, asked, got;
  logic [DATA_W-1:0] got_data;

  always_comb begin
    sel = '0;
    for (int c = NCORES - 1; c >= 0; c--) if (fill_req_valid[c]) sel = CW'(c);
  end

  assign snp_valid = pending & ~asked;

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= B_IDLE;
      pending        <= '0;
      asked          <= '0;
      got            <= '0;
      fill_rsp_valid <= '0;
      l3_req_valid   <= 1'b0;
      fwd_pulse      <= 1'b0;
      l3_pulse       <= 1'b0;
      req            <= '0;
    end else begin
      fill_rsp_valid <= '0;
      fwd_pulse      <= 1'b0;
      l3_pulse       <= 1'b0;
      unique case (state)
        B_IDLE: if (|fill_req_valid) begin
          req      <= sel;
          snp_line <= fill_req_line[sel];
          pending  <= ~(NCORES'(1) << sel);   // every other L2
          asked    <= '0;
          got      <= '0;
          state    <= B_SNOOP;
        end
        B_SNOOP: begin
          for (int c = 0; c < NCORES; c++) begin
            if (snp_valid[c] && snp_ready[c]) asked[c] <= 1'b1;
            if (pending[c] && asked[c] && snp_done[c]) begin
              pending[c] <= 1'b0;
              if (snp_hit[c]) begin
                got[c]   <= 1'b1;
                got_data <= snp_data[c];
              end
            end
          end
          if (pending == '0) state <= B_DECIDE;
        end
        B_DECIDE: begin
          if (|got) begin
            fill_rsp_valid[req] <= 1'b1;
            fill_rsp_data       <= got_data;
            fwd_pulse           <= 1'b1;
            state               <= B_DONE;
          end else begin
            l3_req_valid <= 1'b1;
            l3_req_line  <= snp_line;
            state        <= B_L3;
          end
        end
        B_L3: if (l3_rsp_valid) begin
          l3_req_valid        <= 1'b0;
          fill_rsp_valid[req] <= 1'b1;
          fill_rsp_data       <= l3_rsp_data;
          l3_pulse            <= 1'b1;
          state               <= B_DONE;
        end
        // the requester drops its request on seeing the answer; do not take it again
        B_DONE: state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  // Write-backs: at most one L2 writes back in a cycle in migration mode.
  always_comb begin
    l3_wb_valid = |wb_valid;
    l3_wb_line  = '0;
    l3_wb_data  = '0;
    for (int c = NCORES - 1; c >= 0; c--)
      if (wb_valid[c]) begin l3_wb_line = wb_line[c]; l3_wb_data = wb_data[c]; end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(wb_valid));
endmodule
