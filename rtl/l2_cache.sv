// l2_cache: one core's private L2 with the coherence rules of migration mode.
//
// Write-back, write-allocate, 64-byte lines, WAYS-way skewed-associative (way w is indexed by
// lo ^ rotl(hi, 3w) of the line address, as in the affinity cache). Each line has a valid and a
// modified (M) bit. In migration mode the copies of a line in several L2s are kept coherent by
// the update bus rather than by invalidation:
//   - a write by the local (active) core sets M;
//   - a store broadcast on the update bus (upd_*) is written into the line if it is present,
//     and clears M: the line stays valid, and only the active core's copy can be modified;
//   - a line is written back to L3 on eviction only if M is set;
//   - a request from another core (snp_*) is answered with the line only if it is present with
//     M set; the line is then written back to L3 at the same time and M is cleared. A copy
//     without M serves only the local core.
// A core access that misses asks the shared L2-L3 side for the line (fill_req_*), which returns
// it either from another L2 (a forwarded modified copy) or from L3; the choice is made outside.
//
// Published: capacity 512 KB, 4-way skewed associativity, 64-byte lines, write-back /
// write-allocate, and all the migration-mode rules above. This design's own choices: 64-bit
// word accesses, the skewing functions, the victim choice (an invalid way, else a way taken
// from a 2-bit round-robin counter), one operation at a time with snoops first, then update-bus
// stores, then core accesses, and the clear sweep after reset.
//
// Timing: each port is a valid/ready handshake. After acceptance the tags and data of the
// candidate ways are read at that edge, compared in the next cycle, and the answer is given one
// cycle later (2 cycles for a hit, a snoop or an update). A miss waits for fill_rsp_valid and
// completes the cycle after it. After reset the cache clears one set per cycle.
module l2_cache #(
  parameter int unsigned SIZE_KB = 512,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned LINE_W  = emig_pkg::LINE_W,
  parameter int unsigned XLEN    = emig_pkg::XLEN
) (
  input  logic              clk,
  input  logic              rst,
  // local core access (word granularity)
  input  logic              acc_valid,
  output logic              acc_ready,
  input  logic              acc_write,
  input  logic [LINE_W-1:0] acc_line,
  input  logic [2:0]        acc_word,
  input  logic [XLEN-1:0]   acc_wdata,
  output logic              acc_done,
  output logic              acc_hit,
  output logic [XLEN-1:0]   acc_rdata,
  // store broadcast on the update bus
  input  logic              upd_valid,
  output logic              upd_ready,
  input  logic [LINE_W-1:0] upd_line,
  input  logic [2:0]        upd_word,
  input  logic [XLEN-1:0]   upd_wdata,
  // request from another core's miss
  input  logic              snp_valid,
  output logic              snp_ready,
  input  logic [LINE_W-1:0] snp_line,
  output logic              snp_done,
  output logic              snp_hit,      // line forwarded (it was modified here)
  output logic [8*XLEN-1:0] snp_data,
  // miss handling on the shared L2-L3 side
  output logic              fill_req_valid,
  output logic [LINE_W-1:0] fill_req_line,
  input  logic              fill_rsp_valid,
  input  logic [8*XLEN-1:0] fill_rsp_data,
  // write-back to L3
  output logic              wb_valid,
  output logic [LINE_W-1:0] wb_line,
  output logic [8*XLEN-1:0] wb_data
);
  localparam int unsigned LINES = SIZE_KB * 1024 / 64;
  localparam int unsigned SETS  = LINES / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = LINE_W - IDX_W;
  localparam int unsigned WAY_W = WAYS > 1 ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic             valid;
    logic             modified;
    logic [TAG_W-1:0] tag;
  } tag_t;

  typedef enum logic [1:0] { OP_ACC, OP_UPD, OP_SNP } op_e;
  typedef enum logic [2:0] { S_IDLE, S_READ, S_CMP, S_FILL, S_FILL_WR } state_e;

  function automatic logic [IDX_W-1:0] way_index(input logic [LINE_W-1:0] line, input int unsigned w);
    logic [2*IDX_W-1:0] d;
    d = {line[2*IDX_W-1:IDX_W], line[2*IDX_W-1:IDX_W]} << ((3 * w) % IDX_W);
    return line[IDX_W-1:0] ^ d[2*IDX_W-1 -: IDX_W];
  endfunction

  // Tag = every line-address bit above the low index field, so (way, index, tag) is exact.
  function automatic logic [TAG_W-1:0] line_tag(input logic [LINE_W-1:0] line);
    return line[LINE_W-1:IDX_W];
  endfunction

  function automatic logic [LINE_W-1:0] tag_line(input logic [TAG_W-1:0] tag, input logic [IDX_W-1:0] idx,
                                                 input int unsigned w);
    logic [LINE_W-1:0] l;
    logic [2*IDX_W-1:0] d;
    l = {tag, {IDX_W{1'b0}}};
    d = {l[2*IDX_W-1:IDX_W], l[2*IDX_W-1:IDX_W]} << ((3 * w) % IDX_W);
    l[IDX_W-1:0] = idx ^ d[2*IDX_W-1 -: IDX_W];
    return l;
  endfunction

  state_e            state;
  op_e               op;
  logic              r_write;
  logic [LINE_W-1:0] r_line;
  logic [2:0]        r_word;
  logic [XLEN-1:0]   r_wdata;
  logic [IDX_W-1:0]  r_idx [WAYS];
  tag_t              r_tag [WAYS];
  logic [8*XLEN-1:0] r_data [WAYS];
  logic [1:0]        rr;
  logic [WAY_W-1:0]  r_victim;   // victim chosen at the miss, used when the fill arrives
  logic              clearing;
  logic [IDX_W-1:0]  clr_idx;

  // ---- arbitration: snoop, then update, then core ----
  logic take;
  assign snp_ready = (state == S_IDLE) && !clearing;
  assign upd_ready = snp_ready && !snp_valid;
  assign acc_ready = upd_ready && !upd_valid;
  assign take      = (snp_valid && snp_ready) || (upd_valid && upd_ready) || (acc_valid && acc_ready);

  // ---- compare ----
  logic             hit;
  logic [WAY_W-1:0] hit_way, victim;
  logic             have_inv;

  always_comb begin
    hit = 1'b0; hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (r_tag[w].valid && r_tag[w].tag == line_tag(r_line)) begin hit = 1'b1; hit_way = WAY_W'(w); end
    have_inv = 1'b0; victim = WAY_W'(rr);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!r_tag[w].valid) begin have_inv = 1'b1; victim = WAY_W'(w); end
  end

  // ---- per-way arrays ----
  logic              t_we [WAYS];
  tag_t              t_wd [WAYS];
  logic              d_we [WAYS];
  logic [8*XLEN-1:0] d_wd [WAYS];
  logic [8*XLEN-1:0] sel_data, merged;

  always_comb begin
    sel_data = (state == S_FILL_WR) ? r_data[r_victim] : r_data[hit_way];
    merged   = sel_data;
    merged[r_word*XLEN +: XLEN] = r_wdata;
    for (int w = 0; w < WAYS; w++) begin
      t_we[w] = 1'b0; t_wd[w] = r_tag[w];
      d_we[w] = 1'b0; d_wd[w] = merged;
    end
    if (state == S_CMP && hit) begin
      unique case (op)
        OP_ACC: if (r_write) begin
          t_we[hit_way] = 1'b1; t_wd[hit_way].modified = 1'b1; d_we[hit_way] = 1'b1;
        end
        OP_UPD: begin
          t_we[hit_way] = 1'b1; t_wd[hit_way].modified = 1'b0; d_we[hit_way] = 1'b1;
        end
        OP_SNP: if (r_tag[hit_way].modified) begin
          t_we[hit_way] = 1'b1; t_wd[hit_way].modified = 1'b0;
        end
        default: ;
      endcase
    end
    if (state == S_FILL_WR) begin
      t_we[r_victim] = 1'b1;
      t_wd[r_victim] = '{valid: 1'b1, modified: r_write, tag: line_tag(r_line)};
      d_we[r_victim] = 1'b1;
      d_wd[r_victim] = r_write ? merged : r_data[r_victim];
    end
  end

  for (genvar gw = 0; gw < WAYS; gw++) begin : g_way
    tag_t              tags [SETS];
    logic [8*XLEN-1:0] data [SETS];
    logic [LINE_W-1:0] in_line;
    assign in_line = snp_valid ? snp_line : (upd_valid ? upd_line : acc_line);
    always_ff @(posedge clk) begin
      if (clearing)     tags[clr_idx]    <= '0;
      else if (t_we[gw]) tags[r_idx[gw]] <= t_wd[gw];
      if (d_we[gw])     data[r_idx[gw]]  <= d_wd[gw];
      if (take) begin
        r_idx[gw] <= way_index(in_line, gw);
      end
      if (state == S_READ) begin
        r_tag[gw]  <= tags[r_idx[gw]];
        r_data[gw] <= data[r_idx[gw]];
      end
      if (state == S_FILL && fill_rsp_valid) r_data[gw] <= fill_rsp_data;
    end
  end

  // ---- control ----
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      clearing <= 1'b1;
      clr_idx  <= '0;
      rr       <= '0;
      acc_done <= 1'b0; snp_done <= 1'b0; wb_valid <= 1'b0; fill_req_valid <= 1'b0;
    end else begin
      acc_done <= 1'b0; snp_done <= 1'b0; wb_valid <= 1'b0;
      if (clearing) begin
        clr_idx <= clr_idx + IDX_W'(1);
        if (clr_idx == IDX_W'(SETS - 1)) clearing <= 1'b0;
      end
      unique case (state)
        S_IDLE: if (take) begin
          if (snp_valid)      begin op <= OP_SNP; r_line <= snp_line; r_write <= 1'b0; end
          else if (upd_valid) begin op <= OP_UPD; r_line <= upd_line; r_word <= upd_word; r_wdata <= upd_wdata; r_write <= 1'b1; end
          else                begin op <= OP_ACC; r_line <= acc_line; r_word <= acc_word; r_wdata <= acc_wdata; r_write <= acc_write; end
          state <= S_READ;
        end
        S_READ: state <= S_CMP;
        S_CMP: begin
          unique case (op)
            OP_SNP: begin
              snp_done <= 1'b1;
              snp_hit  <= hit && r_tag[hit_way].modified;
              snp_data <= r_data[hit_way];
              if (hit && r_tag[hit_way].modified) begin
                wb_valid <= 1'b1; wb_line <= r_line; wb_data <= r_data[hit_way];
              end
              state <= S_IDLE;
            end
            OP_UPD: state <= S_IDLE;
            default: begin
              if (hit) begin
                acc_done  <= 1'b1;
                acc_hit   <= 1'b1;
                acc_rdata <= r_data[hit_way][r_word*XLEN +: XLEN];
                state     <= S_IDLE;
              end else begin
                if (r_tag[victim].valid && r_tag[victim].modified) begin
                  wb_valid <= 1'b1;
                  wb_line  <= tag_line(r_tag[victim].tag, r_idx[victim], 32'(victim));
                  wb_data  <= r_data[victim];
                end
                if (!have_inv) rr <= rr + 2'd1;
                r_victim       <= victim;
                fill_req_valid <= 1'b1;
                fill_req_line  <= r_line;
                state          <= S_FILL;
              end
            end
          endcase
        end
        S_FILL: if (fill_rsp_valid) begin
          fill_req_valid <= 1'b0;
          state          <= S_FILL_WR;
        end
        S_FILL_WR: begin
          acc_done  <= 1'b1;
          acc_hit   <= 1'b0;
          acc_rdata <= r_data[r_victim][r_word*XLEN +: XLEN];
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
