// tb_transition_filter: drives random affinities into the saturating filter and compares its
// value and sign with a reference model kept as a plain integer. Uses a narrow filter (10 bits)
// so that both saturation limits are reached often, and also checks the default 18-bit size.
module tb_transition_filter;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;

  logic upd;
  logic signed [15:0] aff;
  logic signed [9:0]  f;
  logic neg;
  logic signed [17:0] f18;
  logic neg18;

  transition_filter #(.FILT_W(10), .AFF_W(16)) dut (.clk, .rst, .upd, .aff, .f, .neg);
  transition_filter dut18 (.clk, .rst, .upd, .aff, .f(f18), .neg(neg18));

  int model, model18;

  function automatic int sat(input int v, input int w);
    int hi = (1 << (w-1)) - 1;
    int lo = -(1 << (w-1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; upd = 0; aff = 0; model = 0; model18 = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 20000; i++) begin
      upd = ($urandom % 4) != 0;
      // Bias the stream in long runs so both limits are hit.
      aff = 16'(int'($urandom % 1200) - ((i / 500) % 2 == 0 ? 300 : 900));
      if (i % 97 == 0) aff = 16'sh8000;
      if (i % 89 == 0) aff = 16'sh7fff;
      @(posedge clk);
      if (upd) begin
        model   = sat(model + int'(aff), 10);
        model18 = sat(model18 + int'(aff), 18);
      end
      #1;
      if (model == 511) sat_hi++;
      if (model == -512) sat_lo++;
      checks++;
      if (int'(f) != model || neg != (model < 0) || int'(f18) != model18 || neg18 != (model18 < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d f=%0d exp=%0d f18=%0d exp18=%0d", i, f, model, f18, model18);
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised hi=%0d lo=%0d", sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
