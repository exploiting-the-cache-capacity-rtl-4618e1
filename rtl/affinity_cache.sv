// affinity_cache: skewed-associative cache of affinity offsets O_e, indexed by line address.
//
// Each entry holds a valid bit, a partial tag, the AFF_W-bit offset O_e and an AGE_W-bit age.
// The WAYS ways are indexed by different functions of the line address (skewed associativity):
// way w uses idx_w = lo ^ rotl(hi, 3w), where lo and hi are the two IDX_W-bit fields just above
// the line offset, and the tag is the TAG_W bits starting at hi. Because hi is inside the tag,
// (way, index, tag) identifies the low IDX_W+TAG_W address bits exactly; higher bits alias.
//
// Two operations:
//   OP_LOOKUP  return O_e on a hit (hit = 1). On a miss, allocate the line with
//              O_e = req_wdata (the caller passes Delta, so that A_e = 0) and return that value.
//   OP_WRITE   overwrite O_e of a line that hits; a missing line is not allocated.
// Replacement: an invalid candidate first, otherwise the candidate with the largest age (lowest
// way on a tie). A lookup sets the age of the accessed entry to 0 and ages the other candidates
// by one, saturating.
//
// Published: 8k entries, 4-way skewed associativity, 20-bit tags, 16-bit offsets, a few
// (2) age bits, O_e = Delta on a miss. This design's own: the skewing functions, the exact aging
// rule, the write-without-allocate for window write-backs, and the clear sweep after reset.
//
// Timing: after reset the cache clears one set per cycle (ENTRIES/WAYS cycles) with req_ready
// low. A request is taken when req_valid && req_ready; the four ways are read at that edge and
// the answer (resp_valid for one cycle, resp_hit, resp_o) appears after the next edge, where the
// array write also happens. One request per two cycles.
module affinity_cache #(
  parameter int unsigned ENTRIES = 8192,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned TAG_W   = 20,
  parameter int unsigned AGE_W   = 2,
  parameter int unsigned AFF_W   = emig_pkg::AFF_W,
  parameter int unsigned LINE_W  = emig_pkg::LINE_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,   // 1 = OP_WRITE, 0 = OP_LOOKUP
  input  logic [LINE_W-1:0] req_line,
  input  logic [AFF_W-1:0]  req_wdata,
  output logic              resp_valid,
  output logic              resp_hit,
  output logic [AFF_W-1:0]  resp_o
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = WAYS > 1 ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic               valid;
    logic [TAG_W-1:0]   tag;
    logic [AFF_W-1:0]   o;
    logic [AGE_W-1:0]   age;
  } entry_t;


  // ---- index and tag functions ----
  function automatic logic [IDX_W-1:0] rotl(input logic [IDX_W-1:0] v, input int unsigned n);
    logic [2*IDX_W-1:0] d;
    d = {v, v} << (n % IDX_W);
    return d[2*IDX_W-1 -: IDX_W];
  endfunction

  function automatic logic [IDX_W-1:0] way_index(input logic [LINE_W-1:0] line, input int unsigned w);
    return line[IDX_W-1:0] ^ rotl(line[2*IDX_W-1:IDX_W], 3 * w);
  endfunction

  function automatic logic [TAG_W-1:0] line_tag(input logic [LINE_W-1:0] line);
    return line[IDX_W +: TAG_W];
  endfunction

  // ---- clear sweep ----
  logic             clearing;
  logic [IDX_W-1:0] clr_idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      clr_idx <= clr_idx + IDX_W'(1);
      if (clr_idx == IDX_W'(SETS - 1)) clearing <= 1'b0;
    end
  end

  // ---- stage 1: registered request and way contents ----
  logic              s1_valid, s1_write;
  logic [LINE_W-1:0] s1_line;
  logic [AFF_W-1:0]  s1_wdata;
  logic [IDX_W-1:0]  s1_idx [WAYS];
  entry_t            s1_ent [WAYS];

  assign req_ready = !clearing && !s1_valid;

  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= req_valid && req_ready;
    if (req_valid && req_ready) begin
      s1_write <= req_write;
      s1_line  <= req_line;
      s1_wdata <= req_wdata;
      for (int w = 0; w < WAYS; w++) s1_idx[w] <= way_index(req_line, w);
    end
  end

  // ---- stage 2: compare, choose victim, update ----
  logic             hit;
  logic [WAY_W-1:0] hit_way, victim;
  logic             found_inv;
  logic [AGE_W-1:0] best_age;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (s1_ent[w].valid && s1_ent[w].tag == line_tag(s1_line)) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    found_inv = 1'b0;
    victim    = '0;
    best_age  = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!found_inv && !s1_ent[w].valid) begin
        found_inv = 1'b1;
        victim    = WAY_W'(w);
      end else if (!found_inv && (w == 0 || s1_ent[w].age > best_age)) begin
        victim   = WAY_W'(w);
        best_age = s1_ent[w].age;
      end
    end
  end

  // One single-port-write, single-port-read memory per way. The next-state of the accessed
  // entry is formed in stage 2; the read for a new request happens at the acceptance edge.
  entry_t           wr_ent [WAYS];
  logic             wr_en  [WAYS];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      wr_en[w]  = 1'b0;
      wr_ent[w] = s1_ent[w];
      if (s1_write) begin
        if (hit && hit_way == WAY_W'(w)) begin
          wr_en[w]    = 1'b1;
          wr_ent[w].o = s1_wdata;
        end
      end else if ((hit && hit_way == WAY_W'(w)) || (!hit && victim == WAY_W'(w))) begin
        wr_en[w]  = 1'b1;
        wr_ent[w] = '{valid: 1'b1, tag: line_tag(s1_line), o: hit ? s1_ent[w].o : s1_wdata, age: '0};
      end else if (s1_ent[w].valid && s1_ent[w].age != '1) begin
        wr_en[w]      = 1'b1;
        wr_ent[w].age = s1_ent[w].age + AGE_W'(1);
      end
    end
  end

  for (genvar gw = 0; gw < WAYS; gw++) begin : g_way
    entry_t way_mem [SETS];
    always_ff @(posedge clk) begin
      if (clearing)                 way_mem[clr_idx]    <= '0;
      else if (s1_valid && wr_en[gw]) way_mem[s1_idx[gw]] <= wr_ent[gw];
      if (req_valid && req_ready)   s1_ent[gw]          <= way_mem[way_index(req_line, gw)];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) resp_valid <= 1'b0;
    else     resp_valid <= s1_valid;
    if (s1_valid) begin
      resp_hit <= hit;
      resp_o   <= (hit && !s1_write) ? s1_ent[hit_way].o : s1_wdata;
    end
  end
endmodule
