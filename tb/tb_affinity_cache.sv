// tb_affinity_cache: random lookups and write-backs on a small affinity cache (64 entries,
// 4 ways, 16 sets) compared against a behavioural model of the same skewed organisation and
// replacement rule; also checks the clear sweep, the two-cycle response latency, that a
// write-back to a missing line does not allocate, and the default 8k-entry instance.
module tb_affinity_cache;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int ENT = 64, WY = 4, SETS = ENT / WY, IW = 4, TW = 20;
  logic req_valid, req_ready, req_write, resp_valid, resp_hit;
  logic [57:0] req_line;
  logic [15:0] req_wdata, resp_o;

  affinity_cache #(.ENTRIES(ENT), .WAYS(WY)) dut (.clk, .rst, .req_valid, .req_ready, .req_write,
    .req_line, .req_wdata, .resp_valid, .resp_hit, .resp_o);

  // default-size instance, driven with a few requests
  logic rv8, rr8, rsv8, rh8;
  logic [15:0] ro8;
  logic rw8;
  logic [57:0] rl8;
  logic [15:0] rd8;
  affinity_cache big (.clk, .rst, .req_valid(rv8), .req_ready(rr8), .req_write(rw8), .req_line(rl8),
    .req_wdata(rd8), .resp_valid(rsv8), .resp_hit(rh8), .resp_o(ro8));

  // behavioural model
  bit          mv  [WY][SETS];
  logic [19:0] mt  [WY][SETS];
  logic [15:0] mo  [WY][SETS];
  int          ma  [WY][SETS];

  function automatic int idx(input logic [57:0] l, input int w);
    logic [3:0] hi = l[7:4];
    int r = (3 * w) % IW;
    logic [3:0] rot = 4'((({hi, hi} << r) >> IW));
    return int'(l[3:0] ^ rot);
  endfunction

  task automatic model(input bit wr, input logic [57:0] l, input logic [15:0] d,
                       output bit hit, output logic [15:0] o);
    int hw = -1, vic = -1, best = -1;
    logic [19:0] tg = l[23:4];
    for (int w = 0; w < WY; w++) if (hw < 0 && mv[w][idx(l,w)] && mt[w][idx(l,w)] == tg) hw = w;
    hit = hw >= 0;
    if (wr) begin
      if (hit) mo[hw][idx(l,hw)] = d;
      o = d;
      return;
    end
    if (hit) begin
      o = mo[hw][idx(l,hw)];
      vic = hw;
    end else begin
      o = d;
      for (int w = 0; w < WY; w++) if (vic < 0 && !mv[w][idx(l,w)]) vic = w;
      if (vic < 0) for (int w = 0; w < WY; w++) if (ma[w][idx(l,w)] > best) begin best = ma[w][idx(l,w)]; vic = w; end
    end
    for (int w = 0; w < WY; w++) begin
      automatic int i = idx(l, w);
      if (w == vic) begin mv[w][i] = 1; mt[w][i] = tg; ma[w][i] = 0; if (!hit) mo[w][i] = d; end
      else if (mv[w][i] && ma[w][i] < 3) ma[w][i]++;
    end
  endtask

  task automatic access(input bit wr, input logic [57:0] l, input logic [15:0] d,
                        output bit hit, output logic [15:0] o, output int lat);
    req_valid = 1; req_write = wr; req_line = l; req_wdata = d;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 0;
    lat = 0;
    while (!resp_valid) begin @(posedge clk); #1 lat++; end
    hit = resp_hit; o = resp_o;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h, mh;
    logic [15:0] o, mo_;
    int lat, nhit = 0, nmiss = 0, nwr = 0;
    logic [57:0] l;
    rst = 1; req_valid = 0; req_write = 0; req_line = '0; req_wdata = '0;
    rv8 = 0; rw8 = 0; rl8 = '0; rd8 = '0;
    for (int w = 0; w < WY; w++) for (int i = 0; i < SETS; i++) begin mv[w][i] = 0; ma[w][i] = 0; end
    @(posedge clk); @(posedge clk); #1 rst = 0;

    // directed: miss allocates, hit returns, write updates, write miss does not allocate
    access(0, 58'h123, 16'h0aaa, h, o, lat); model(0, 58'h123, 16'h0aaa, mh, mo_);
    checks++; if (h || o != 16'h0aaa || lat != 1) begin failures++; $display("FAIL first lookup h=%0d o=%h lat=%0d", h, o, lat); end
    access(0, 58'h123, 16'h5555, h, o, lat); model(0, 58'h123, 16'h5555, mh, mo_);
    checks++; if (!h || o != 16'h0aaa) begin failures++; $display("FAIL second lookup"); end
    access(1, 58'h123, 16'h7777, h, o, lat); model(1, 58'h123, 16'h7777, mh, mo_);
    access(0, 58'h123, 16'h0000, h, o, lat); model(0, 58'h123, 16'h0000, mh, mo_);
    checks++; if (!h || o != 16'h7777) begin failures++; $display("FAIL write-back"); end
    access(1, 58'h999, 16'h1111, h, o, lat); model(1, 58'h999, 16'h1111, mh, mo_);
    checks++; if (h) begin failures++; $display("FAIL write hit on absent line"); end
    access(0, 58'h999, 16'h2222, h, o, lat); model(0, 58'h999, 16'h2222, mh, mo_);
    checks++; if (h || o != 16'h2222) begin failures++; $display("FAIL write allocated"); end

    // random traffic over 200 lines (more than the 64 entries)
    for (int t = 0; t < 20000; t++) begin
      automatic bit wr = ($urandom % 3) == 0;
      automatic logic [15:0] d = 16'($urandom);
      l = 58'($urandom % 200) | (58'($urandom % 2) << 40);  // bit 40 aliases (outside the tag)
      l[40] = 0;
      access(wr, l, d, h, o, lat);
      model(wr, l, d, mh, mo_);
      checks++;
      if (h != mh || (!wr && o != mo_) || lat != 1) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d wr=%0d line=%0h hit=%0d/%0d o=%h/%h lat=%0d", t, wr, l, h, mh, o, mo_, lat);
      end
      if (wr) nwr++; else if (h) nhit++; else nmiss++;
    end
    $display("hits %0d misses %0d writes %0d", nhit, nmiss, nwr);
    checks++; if (nhit < 1000 || nmiss < 1000) begin failures++; $display("FAIL traffic mix"); end

    // default-size instance: wait for the clear sweep, then allocate and hit
    wait (rr8);
    @(posedge clk); #1 rv8 = 1; rw8 = 0; rl8 = 58'h3_1234_5678; rd8 = 16'h0042;
    @(posedge clk); #1 rv8 = 0;
    @(posedge clk); #1;
    checks++; if (!rsv8 || rh8 || ro8 != 16'h0042) begin failures++; $display("FAIL big alloc"); end
    @(posedge clk); #1 rv8 = 1; rd8 = 16'h0099;
    @(posedge clk); #1 rv8 = 0;
    @(posedge clk); #1;
    checks++; if (!rsv8 || !rh8 || ro8 != 16'h0042) begin failures++; $display("FAIL big hit"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
