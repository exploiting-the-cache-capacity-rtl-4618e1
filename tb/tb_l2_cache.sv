// tb_l2_cache: random core reads and writes, update-bus stores and snoops on a small L2
// (4 KB = 64 lines, 4 ways) over 200 lines, against a model of the memory system. The
// testbench plays L3: it answers fills from its own array and absorbs write-backs. Checks:
// reads return the latest value; a snoop forwards the line exactly when the model says the
// line is modified here, and then writes it back and clears the modified bit; a write-back
// happens only for modified lines and carries the latest data; an update-bus store clears
// the modified bit and does not allocate. Also runs a few accesses on the default 512-KB size.
module tb_l2_cache;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_rd_hit = 0, n_rd_miss = 0, n_wr = 0, n_upd = 0, n_snp_hit = 0, n_snp_miss = 0, n_evict_wb = 0;

  localparam int NL = 200;
  logic acc_valid, acc_ready, acc_write, acc_done, acc_hit;
  logic [57:0] acc_line, upd_line, snp_line, fill_req_line, wb_line;
  logic [2:0] acc_word, upd_word;
  logic [63:0] acc_wdata, acc_rdata, upd_wdata;
  logic upd_valid, upd_ready, snp_valid, snp_ready, snp_done, snp_hit, fill_req_valid, fill_rsp_valid, wb_valid;
  logic [511:0] snp_data, fill_rsp_data, wb_data;

  l2_cache #(.SIZE_KB(4)) dut (.clk, .rst, .acc_valid, .acc_ready, .acc_write, .acc_line, .acc_word, .acc_wdata,
    .acc_done, .acc_hit, .acc_rdata, .upd_valid, .upd_ready, .upd_line, .upd_word, .upd_wdata,
    .snp_valid, .snp_ready, .snp_line, .snp_done, .snp_hit, .snp_data,
    .fill_req_valid, .fill_req_line, .fill_rsp_valid, .fill_rsp_data, .wb_valid, .wb_line, .wb_data);

  // default-size instance: one write miss, then a read hit
  logic b_av, b_ar, b_ad, b_ah, b_frv, b_wbv, b_uv, b_ur, b_sv, b_sr, b_sd, b_sh;
  logic [63:0] b_rd;
  logic [57:0] b_frl, b_wbl;
  logic [511:0] b_sdata, b_wbd;
  logic b_aw;
  logic b_fv;
  l2_cache big (.clk, .rst, .acc_valid(b_av), .acc_ready(b_ar), .acc_write(b_aw), .acc_line(58'h12345),
    .acc_word(3'd5), .acc_wdata(64'hfeed), .acc_done(b_ad), .acc_hit(b_ah), .acc_rdata(b_rd),
    .upd_valid(b_uv), .upd_ready(b_ur), .upd_line('0), .upd_word('0), .upd_wdata('0),
    .snp_valid(b_sv), .snp_ready(b_sr), .snp_line('0), .snp_done(b_sd), .snp_hit(b_sh), .snp_data(b_sdata),
    .fill_req_valid(b_frv), .fill_req_line(b_frl), .fill_rsp_valid(b_fv), .fill_rsp_data('0),
    .wb_valid(b_wbv), .wb_line(b_wbl), .wb_data(b_wbd));

  logic [511:0] l3   [NL];   // what L3 holds
  logic [511:0] truth[NL];   // latest value of each line
  bit           mod_here [NL];

  // L3 side: answer fills after a few cycles, absorb write-backs
  initial begin
    fill_rsp_valid = 0; fill_rsp_data = '0;
    forever begin
      @(posedge clk); #1;
      fill_rsp_valid = 0;
      if (wb_valid) begin
        checks++;
        if (!mod_here[int'(wb_line)] || wb_data != truth[int'(wb_line)]) begin
          failures++; $display("FAIL write-back of line %0d (modified %0d)", wb_line, mod_here[int'(wb_line)]);
        end
        l3[int'(wb_line)] = wb_data;
        mod_here[int'(wb_line)] = 0;
      end
      if (fill_req_valid && !fill_rsp_valid) begin
        repeat (3) @(posedge clk);
        #1 fill_rsp_valid = 1; fill_rsp_data = l3[int'(fill_req_line)];
        @(posedge clk); #1 fill_rsp_valid = 0;
        if (wb_valid) begin l3[int'(wb_line)] = wb_data; mod_here[int'(wb_line)] = 0; end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ln, wd, k;
    logic [63:0] v;
    rst = 1; acc_valid = 0; upd_valid = 0; snp_valid = 0; acc_write = 0; acc_line = '0; acc_word = '0;
    acc_wdata = '0; upd_line = '0; upd_word = '0; upd_wdata = '0; snp_line = '0;
    b_av = 0; b_aw = 0; b_uv = 0; b_sv = 0; b_fv = 0;
    for (int i = 0; i < NL; i++) begin
      l3[i] = {16{$urandom}}; truth[i] = l3[i]; mod_here[i] = 0;
    end
    @(posedge clk); @(posedge clk); #1 rst = 0;
    wait (acc_ready); @(posedge clk); #1;
    for (int t = 0; t < 6000; t++) begin
      k  = int'($urandom % 10);
      ln = int'($urandom % NL);
      wd = int'($urandom % 8);
      v  = {$urandom, $urandom};
      if (k < 6) begin
        // core access
        acc_valid = 1; acc_write = (k >= 4); acc_line = 58'(ln); acc_word = 3'(wd); acc_wdata = v;
        do @(posedge clk); while (!acc_ready);
        #1 acc_valid = 0;
        while (!acc_done) begin @(posedge clk); #1; end
        if (acc_write) begin
          truth[ln][wd*64 +: 64] = v; mod_here[ln] = 1; n_wr++;
        end else begin
          checks++;
          if (acc_rdata != truth[ln][wd*64 +: 64]) begin
            failures++; if (failures < 10) $display("FAIL read line %0d word %0d", ln, wd);
          end
          if (acc_hit) n_rd_hit++; else n_rd_miss++;
        end
      end else if (k < 8) begin
        // store of the active (other) core broadcast on the update bus
        upd_valid = 1; upd_line = 58'(ln); upd_word = 3'(wd); upd_wdata = v;
        do @(posedge clk); while (!upd_ready);
        #1 upd_valid = 0;
        repeat (3) @(posedge clk); #1;
        truth[ln][wd*64 +: 64] = v;
        if (mod_here[ln]) begin
          // the local copy was the modified one; model the other core's copy written back
          mod_here[ln] = 0;
        end
        l3[ln] = truth[ln];
        n_upd++;
      end else begin
        automatic bit exp_hit = mod_here[ln];
        snp_valid = 1; snp_line = 58'(ln);
        do @(posedge clk); while (!snp_ready);
        #1 snp_valid = 0;
        while (!snp_done) begin @(posedge clk); #1; end
        checks++;
        if (snp_hit != exp_hit || (snp_hit && snp_data != truth[ln])) begin
          failures++; if (failures < 10) $display("FAIL snoop line %0d hit %0d expected %0d", ln, snp_hit, exp_hit);
        end
        if (snp_hit) n_snp_hit++; else n_snp_miss++;
        @(posedge clk); #1;
      end
    end
    $display("reads hit %0d miss %0d, writes %0d, updates %0d, snoops hit %0d miss %0d",
             n_rd_hit, n_rd_miss, n_wr, n_upd, n_snp_hit, n_snp_miss);
    checks++;
    if (n_rd_hit == 0 || n_rd_miss == 0 || n_snp_hit == 0 || n_snp_miss == 0) begin failures++; $display("FAIL mix"); end

    // default size
    wait (b_ar);
    @(posedge clk); #1 b_av = 1; b_aw = 1;
    @(posedge clk); #1 b_av = 0;
    while (!b_frv) begin @(posedge clk); #1; end
    b_fv = 1; @(posedge clk); #1 b_fv = 0;
    while (!b_ad) begin @(posedge clk); #1; end
    @(posedge clk); #1 b_av = 1; b_aw = 0;
    @(posedge clk); #1 b_av = 0;
    while (!b_ad) begin @(posedge clk); #1; end
    checks++;
    if (!b_ah || b_rd != 64'hfeed) begin failures++; $display("FAIL default-size L2"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
