// tb_l2_l3_bus: self-checking test of l2_l3_bus with four behavioural L2s and a behavioural L3.
// Each line of a 64-line space is modified in at most one behavioural L2, as in migration
// mode, which has a single writer. The L2s answer snoops
// after a random delay (0-3 cycles before ready, 1-4 cycles to answer). Requests come from random
// cores and are held until answered, as an L2 does. Checks: every request is answered exactly
// once, to the requester only; the data is the modified copy of another L2 when one has it
// (no core snoops itself) and L3's line otherwise; the forward and L3 pulses match; L3 is read
// once per miss without a modified copy; write-backs pass through to the L3 port.
module tb_l2_l3_bus;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;

  logic [3:0]          fill_req_valid, fill_rsp_valid, snp_valid, snp_ready, snp_done, snp_hit, wb_valid;
  logic [3:0][57:0]    fill_req_line, wb_line;
  logic [511:0]        fill_rsp_data, l3_rsp_data, l3_wb_data;
  logic [57:0]         snp_line, l3_req_line, l3_wb_line;
  logic [3:0][511:0]   snp_data, wb_data;
  logic                l3_req_valid, l3_rsp_valid, l3_wb_valid, fwd_pulse, l3_pulse;

  l2_l3_bus dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_l3 = 0, n_l3_reads = 0, n_snoop_self = 0, n_wb = 0;
  bit mod_at [4][64];

  function automatic logic [511:0] l3_of(int ln);
    return {16{32'(ln) * 32'h9e3779b1}};
  endfunction
  function automatic logic [511:0] l2_of(int c, int ln);
    return {16{32'(ln) * 32'h9e3779b1 ^ 32'(c + 1)}};
  endfunction

  // behavioural L2 snoop side
  for (genvar c = 0; c < 4; c++) begin : g_l2
    initial begin
      snp_ready[c] = 0; snp_done[c] = 0; snp_hit[c] = 0; snp_data[c] = '0;
      wait (rst === 1'b1);
      wait (rst === 1'b0);
      forever begin
        @(posedge clk); #1;
        snp_done[c] = 0;
        if (snp_valid[c]) begin
          automatic int ln = int'(snp_line);
          repeat ($urandom % 4) @(posedge clk);
          #1 snp_ready[c] = 1;
          @(posedge clk); #1 snp_ready[c] = 0;
          if (fill_req_valid[c] && int'(fill_req_line[c]) == ln) n_snoop_self++;
          repeat ($urandom % 4) @(posedge clk);
          #1 snp_done[c] = 1; snp_hit[c] = mod_at[c][ln]; snp_data[c] = l2_of(c, ln);
        end
      end
    end
  end

  // behavioural L3
  initial begin
    l3_rsp_valid = 0; l3_rsp_data = '0;
    wait (rst === 1'b1);
    wait (rst === 1'b0);
    forever begin
      @(posedge clk); #1;
      if (l3_req_valid) begin
        n_l3_reads++;
        repeat (2 + $urandom % 5) @(posedge clk);
        #1 l3_rsp_valid = 1; l3_rsp_data = l3_of(int'(l3_req_line));
        @(posedge clk); #1 l3_rsp_valid = 0;
      end
    end
  end

  always @(posedge clk) if (!rst) begin
    if (fwd_pulse) n_fwd++;
    if (l3_pulse) n_l3++;
  end

  task automatic request(input int c, input int ln);
    int owner = -1;
    int other_rsp = 0;
    logic [511:0] got;
    for (int o = 0; o < 4; o++) if (o != c && mod_at[o][ln]) owner = o;
    fill_req_valid[c] = 1; fill_req_line[c] = 58'(ln);
    do begin
      @(posedge clk); #1;
      if ((fill_rsp_valid & ~(4'b1 << c)) != '0) other_rsp++;
    end while (!fill_rsp_valid[c]);
    got = fill_rsp_data;
    @(posedge clk); #1;      // a registered L2 request drops one edge after the answer
    fill_req_valid[c] = 0;
    checks++;
    if (got != (owner >= 0 ? l2_of(owner, ln) : l3_of(ln)) || other_rsp != 0) begin
      failures++;
      if (failures < 10) $display("FAIL core %0d line %0d owner %0d", c, ln, owner);
    end
    if (owner >= 0) mod_at[owner][ln] = 0;   // the forwarding L2 wrote the line back
  endtask

  initial begin
    automatic int exp_fwd = 0, exp_l3 = 0;
    rst = 1; fill_req_valid = '0; fill_req_line = '0; wb_valid = '0; wb_line = '0; wb_data = '0;
    for (int l = 0; l < 64; l++) if ($urandom % 2 == 1) mod_at[$urandom % 4][l] = 1;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int c = int'($urandom % 4);
      automatic int ln = int'($urandom % 64);
      automatic bit has = 0;
      for (int o = 0; o < 4; o++) if (o != c && mod_at[o][ln]) has = 1;
      if (has) exp_fwd++; else exp_l3++;
      request(c, ln);
      @(posedge clk); #1;
      checks++;
      if (fill_rsp_valid != '0 || l3_req_valid) begin failures++; $display("FAIL bus not idle after answer"); end
      if (i % 5 == 0) begin
        automatic int l = int'($urandom % 64);
        for (int o = 0; o < 4; o++) mod_at[o][l] = 0;
        mod_at[$urandom % 4][l] = 1;
      end
    end
    repeat (5) @(posedge clk); #1;
    checks++; if (n_fwd != exp_fwd || n_l3 != exp_l3) begin
      failures++; $display("FAIL pulses fwd %0d/%0d l3 %0d/%0d", n_fwd, exp_fwd, n_l3, exp_l3);
    end
    checks++; if (n_l3_reads != exp_l3) begin failures++; $display("FAIL L3 reads %0d expected %0d", n_l3_reads, exp_l3); end
    checks++; if (n_snoop_self != 0) begin failures++; $display("FAIL requester snooped"); end
    // write-back pass-through, one L2 at a time
    for (int i = 0; i < 200; i++) begin
      automatic int c = int'($urandom % 4);
      wb_valid = 4'b1 << c; wb_line[c] = 58'($urandom); wb_data[c] = {16{$urandom}};
      #1;
      checks++;
      if (!l3_wb_valid || l3_wb_line != wb_line[c] || l3_wb_data != wb_data[c]) begin
        failures++; $display("FAIL write-back from %0d", c);
      end
      @(posedge clk); #1 wb_valid = '0;
      n_wb++;
    end
    $display("forwards %0d, L3 fills %0d, write-backs %0d", n_fwd, n_l3, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
