// tb_sample_hash: checks the mod-31 sampling hash against the % operator on edge values
// (zero, all ones, multiples of 31) and on random 58-bit line addresses.
module tb_sample_hash;
  localparam int unsigned LW = 58;
  logic [LW-1:0] line;
  logic [4:0]    h;
  int checks = 0, failures = 0;

  sample_hash #(.LINE_W(LW)) dut (.line(line), .h(h));

  task automatic check(input logic [LW-1:0] v);
    logic [63:0] expv;
    line = v;
    #1;
    expv = 64'(v) % 64'd31;
    checks++;
    if (64'(h) != expv) begin
      failures++;
      $display("FAIL line=%h h=%0d expected=%0d", v, h, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    check(LW'(31));
    check(LW'(62));
    check(LW'(30));
    check(LW'(64'd31 * 64'd123456789));
    for (int i = 0; i < 4000; i++) check(LW'({$urandom, $urandom}));
    for (int i = 0; i < 64; i++) check(LW'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
