// tb_split2: checks the 2-way splitting mechanism.
//  1. Exact check: a small window (8) on a 40-element working-set, compared reference by
//     reference with a direct model of the affinity algorithm that updates every element's
//     affinity explicitly (A_e, A_R and the transition filter F).
//  2. Circular(N=4000), window 100, 100k references: the affinities must split the working-set
//     into two nearly equal contiguous halves, with at most a few sign changes per pass.
//  3. HalfRandom(300), N=4000, window 100, 100k references: the first and second halves of the
//     working-set must end up with opposite signs.
// The testbench plays the affinity cache: it stores each line's offset when the line leaves the
// window and returns it (or delta_o for a new line) when the line is referenced again.
module tb_split2;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- small exact instance ----------------
  localparam int W1 = 8, N1 = 40;
  logic step1, updf1;
  logic [57:0] line1;
  logic [15:0] o1, delta1, exo1;
  logic signed [15:0] ain1;
  logic exv1, neg1, sneg1;
  logic [57:0] exl1;
  logic signed [17:0] f1;
  logic signed [20:0] ar1;

  split2 #(.RWIN(W1)) dut1 (.clk, .rst, .step(step1), .upd_filter(updf1), .in_line(line1), .in_o(o1),
    .a_in(ain1), .delta_o(delta1), .ex_valid(exv1), .ex_line(exl1), .ex_o(exo1), .f(f1), .neg(neg1),
    .ar(ar1), .s_neg(sneg1));

  // ---------------- large instance (window 100) ----------------
  localparam int W2 = 100, N2 = 4000;
  logic step2;
  logic [57:0] line2;
  logic [15:0] o2, delta2, exo2;
  logic signed [15:0] ain2;
  logic exv2, neg2, sneg2;
  logic [57:0] exl2;
  logic signed [17:0] f2;
  logic signed [24:0] ar2;

  split2 #(.RWIN(W2)) dut2 (.clk, .rst, .step(step2), .upd_filter(1'b1), .in_line(line2), .in_o(o2),
    .a_in(ain2), .delta_o(delta2), .ex_valid(exv2), .ex_line(exl2), .ex_o(exo2), .f(f2), .neg(neg2),
    .ar(ar2), .s_neg(sneg2));

  int mA [N1];
  bit mseen [N1];
  int hist [$];
  int mF;
  logic [15:0] store1 [N1];
  bit sv1 [N1];
  logic [15:0] store2 [N2];
  bit sv2 [N2];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat18(input int v);
    return v > 131071 ? 131071 : (v < -131072 ? -131072 : v);
  endfunction

  // One reference to the large instance; returns A_e of the line.
  task automatic ref2(input int e, output int a);
    if (exv2) begin
      store2[int'(exl2)] = exo2;
      sv2[int'(exl2)] = 1;
    end
    line2 = 58'(e);
    o2 = sv2[e] ? store2[e] : delta2;
    #1;
    a = int'(ain2);
    step2 = 1;
    @(posedge clk);
    #1 step2 = 0;
  endtask

  task automatic run_large(input bit half_random, output int pos_lo, output int pos_hi,
                           output int boundaries, output int trans_last);
    int a, prev_sign, e, d;
    rst = 1; step2 = 0;
    for (int i = 0; i < N2; i++) sv2[i] = 0;
    @(posedge clk); #1 rst = 0;
    trans_last = 0; prev_sign = 0;
    for (int t = 0; t < 100000; t++) begin
      if (half_random) e = ((t / 300) % 2) * (N2/2) + int'($urandom % (N2/2));
      else             e = t % N2;
      ref2(e, a);
      if (t >= 100000 - 2*N2) begin
        if ((a < 0 ? -1 : 1) != prev_sign && t > 100000 - 2*N2) trans_last++;
      end
      prev_sign = a < 0 ? -1 : 1;
    end
    pos_lo = 0; pos_hi = 0; boundaries = 0;
    for (int i = 0; i < N2; i++) begin
      d = int'($signed(store2[i] - delta2));
      if (sv2[i] && d >= 0) begin
        if (i < N2/2) pos_lo++; else pos_hi++;
      end
      if (i > 0 && sv2[i] && sv2[i-1] &&
          ((int'($signed(store2[i-1] - delta2)) >= 0) != (d >= 0))) boundaries++;
    end
  endtask

  initial begin
    int e, a_model, ar_model, s, pos_lo, pos_hi, bnd, tr;
    bit ok;
    rst = 1; step1 = 0; step2 = 0; updf1 = 0; line1 = '0; o1 = '0; line2 = '0; o2 = '0;
    for (int i = 0; i < N1; i++) begin mA[i] = 0; mseen[i] = 0; sv1[i] = 0; end
    mF = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;

    // ---- part 1: exact model ----
    for (int t = 0; t < 3000; t++) begin
      do begin
        e = int'($urandom % N1);
        ok = 1;
        foreach (hist[k]) if (k >= hist.size() - (W1-1) && hist[k] == e) ok = 0;
      end while (!ok);
      if (exv1) begin
        store1[int'(exl1)] = exo1;
        sv1[int'(exl1)] = 1;
        checks++;
        if (int'(exl1) != hist[hist.size()-W1]) begin
          failures++; $display("FAIL t=%0d evicted line %0d expected %0d", t, exl1, hist[hist.size()-W1]);
        end
      end
      line1 = 58'(e);
      o1 = sv1[e] ? store1[e] : delta1;
      updf1 = ($urandom % 3) != 0;
      #1;
      if (!mseen[e]) begin mseen[e] = 1; mA[e] = 0; end
      a_model = mA[e];
      checks++;
      if (int'(ain1) != a_model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d e=%0d a_in=%0d expected %0d", t, e, ain1, a_model);
      end
      hist.push_back(e);
      ar_model = 0;
      for (int k = (hist.size() > W1 ? hist.size() - W1 : 0); k < hist.size(); k++) ar_model += mA[hist[k]];
      s = ar_model >= 0 ? 1 : -1;
      for (int i = 0; i < N1; i++) if (mseen[i]) begin
        automatic bit inr = 0;
        for (int k = (hist.size() > W1 ? hist.size() - W1 : 0); k < hist.size(); k++) if (hist[k] == i) inr = 1;
        mA[i] += inr ? s : -s;
      end
      if (updf1) mF = sat18(mF + a_model);
      step1 = 1;
      @(posedge clk);
      #1 step1 = 0;
      ar_model = 0;
      for (int k = (hist.size() > W1 ? hist.size() - W1 : 0); k < hist.size(); k++) ar_model += mA[hist[k]];
      checks++;
      if (int'(ar1) != ar_model || int'(f1) != mF || neg1 != (mF < 0) || sneg1 != (s < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d ar=%0d exp=%0d f=%0d exp=%0d", t, ar1, ar_model, f1, mF);
      end
      if (hist.size() > 64) void'(hist.pop_front());
    end

    // ---- part 2: Circular ----
    run_large(0, pos_lo, pos_hi, bnd, tr);
    $display("Circular: positive %0d+%0d of %0d, sign boundaries %0d, transitions in last %0d refs %0d",
             pos_lo, pos_hi, N2, bnd, 2*N2, tr);
    checks++;
    if (pos_lo + pos_hi < N2*45/100 || pos_lo + pos_hi > N2*55/100) begin failures++; $display("FAIL circular balance"); end
    checks++;
    if (bnd > 3 || tr > 6) begin failures++; $display("FAIL circular splitting"); end

    // ---- part 3: HalfRandom(300) ----
    run_large(1, pos_lo, pos_hi, bnd, tr);
    $display("HalfRandom(300): positive in lower half %0d, in upper half %0d", pos_lo, pos_hi);
    checks++;
    if (!((pos_lo > 1900 && pos_hi < 100) || (pos_hi > 1900 && pos_lo < 100))) begin
      failures++; $display("FAIL halfrandom split");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
