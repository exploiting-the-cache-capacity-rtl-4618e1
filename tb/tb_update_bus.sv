// tb_update_bus: random packets from all four cores with a changing active core; the bus must
// deliver exactly the active core's packets, two cycles later, and flag cycles in which another
// core also drove it.
module tb_update_bus;
  import emig_pkg::*;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_conf = 0, n_valid = 0;

  logic [1:0] active_core;
  logic [3:0] core_valid;
  ub_packet_t [3:0] core_pkt;
  logic bus_valid, conflict;
  ub_packet_t bus_pkt;

  update_bus dut (.clk, .rst, .active_core, .core_valid, .core_pkt, .bus_valid, .bus_pkt, .conflict);

  logic       hv [$];
  ub_packet_t hp [$];
  logic       hc [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; active_core = 0; core_valid = 0; core_pkt = '0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 5000; t++) begin
      if (t % 100 == 0) active_core = 2'($urandom);
      for (int c = 0; c < 4; c++) begin
        core_pkt[c] = ub_packet_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                                    $urandom, $urandom, $urandom, $urandom, $urandom});
        core_valid[c] = (c == int'(active_core)) ? ($urandom % 2 == 0) : ($urandom % 50 == 0);
      end
      hv.push_back(core_valid[active_core]);
      hp.push_back(core_pkt[active_core]);
      hc.push_back((core_valid & ~(4'b1 << active_core)) != 0);
      @(posedge clk); #1;
      if (hv.size() == 2) begin
        automatic logic v = hv.pop_front();
        automatic ub_packet_t p = hp.pop_front();
        void'(hc.pop_front());
        checks++;
        if (bus_valid != v || (v && bus_pkt != p)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d valid=%0d exp=%0d pkt=%h exp=%h", t, bus_valid, v, bus_pkt, p);
        end
        if (bus_valid) n_valid++;
      end
      // conflict is one cycle after the drive
      checks++;
      if (conflict != hc[hc.size()-1]) begin failures++; $display("FAIL conflict t=%0d", t); end
      if (conflict) n_conf++;
    end
    checks++;
    if (n_conf == 0 || n_valid == 0) begin failures++; $display("FAIL not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
