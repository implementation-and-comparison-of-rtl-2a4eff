// tb_csla_top: end-to-end test of the three carry-select adders side by side,
// with every parameter at its default (16-bit operands).
//
// Each clock cycle applies one operand pair and carry-in at the rising edge;
// in the low phase all three sums are compared with integer addition (and so
// with each other). Corner cases are followed by random operands. The test
// counts, from the operands, each mechanism the adders rely on:
//   - every carry-select group of each adder picking its carry-in-0 result
//     and its carry-in-1 result (the BEC path, or the latched path of the
//     clock-driven adder),
//   - a carry rippling from the bottom group into the top group,
//   - a carry out of the adder, and both values of the carry-in.
// A mechanism that never happened counts as a failure, as does a cycle count
// that differs from the number of additions (one addition per clock cycle).
module tb_csla_top;
  import csla_pkg::*;
  localparam int HALF = 5;
  localparam int N_RANDOM = 20000;
  logic        clk = 1'b0;
  logic [15:0] a = '0, b = '0, s_sq, s_li, s_dl;
  logic        cin = 1'b0, co_sq, co_li, co_dl;
  int checks = 0, failures = 0, cycles = 0, adds = 0;
  int sel_sq[5][2];
  int sel_li[4][2];
  int n_full_ripple = 0, n_cout = 0, n_cin[2];

  csla_top dut (
    .clk        (clk),
    .a          (a),
    .b          (b),
    .cin        (cin),
    .sum_sqrt   (s_sq),
    .cout_sqrt  (co_sq),
    .sum_linear (s_li),
    .cout_linear(co_li),
    .sum_dlatch (s_dl),
    .cout_dlatch(co_dl)
  );

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic carry_into(int pos);
    logic [16:0] t;
    t = 17'({1'b0, a} & ((17'd1 << pos) - 1)) + 17'({1'b0, b} & ((17'd1 << pos) - 1)) + 17'(cin);
    return t[pos];
  endfunction

  task automatic check_now();
    logic [16:0] ref_sum;
    ref_sum = 17'(a) + 17'(b) + 17'(cin);
    checks++;
    if ({co_sq, s_sq} != ref_sum) begin
      failures++;
      $display("FAIL sqrt t=%0t %h+%h+%0d -> %h", $time, a, b, cin, {co_sq, s_sq});
    end
    checks++;
    if ({co_li, s_li} != ref_sum) begin
      failures++;
      $display("FAIL linear t=%0t %h+%h+%0d -> %h", $time, a, b, cin, {co_li, s_li});
    end
    checks++;
    if ({co_dl, s_dl} != ref_sum) begin
      failures++;
      $display("FAIL dlatch t=%0t %h+%h+%0d -> %h", $time, a, b, cin, {co_dl, s_dl});
    end
  endtask

  task automatic one_add(input logic [15:0] x, y, input logic k);
    logic [16:0] ref_sum;
    clk = 1'b1;
    a = x; b = y; cin = k;
    cycles++;
    #HALF;
    clk = 1'b0;
    #1;
    check_now();
    #(HALF - 2);
    check_now();
    #1;
    adds++;
    for (int g = 1; g < 5; g++) sel_sq[g][carry_into(group_lsb(GROUP_SQRT, g))]++;
    for (int g = 1; g < 4; g++) sel_li[g][carry_into(group_lsb(GROUP_LINEAR, g))]++;
    ref_sum = 17'(a) + 17'(b) + 17'(cin);
    if (ref_sum[16]) n_cout++;
    n_cin[cin]++;
    // carry generated in bits 1..0 that propagates through bits 15..2
    if (carry_into(2) && ((a[15:2] ^ b[15:2]) == '1)) n_full_ripple++;
  endtask

  task automatic require(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    clk = 1'b0;
    #HALF;
    one_add(16'h0000, 16'h0000, 1'b0);
    one_add(16'hffff, 16'h0000, 1'b1);
    one_add(16'hfffe, 16'h0002, 1'b0);
    one_add(16'hffff, 16'hffff, 1'b1);
    one_add(16'h5555, 16'haaaa, 1'b1);
    for (int v = 0; v < N_RANDOM; v++)
      one_add(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d additions took %0d cycles", adds, cycles);
    end
    for (int g = 1; g < 5; g++) begin
      require(sel_sq[g][0], $sformatf("sqrt/dlatch group %0d carry-in-0 path", g));
      require(sel_sq[g][1], $sformatf("sqrt/dlatch group %0d carry-in-1 path", g));
    end
    for (int g = 1; g < 4; g++) begin
      require(sel_li[g][0], $sformatf("linear group %0d carry-in-0 path", g));
      require(sel_li[g][1], $sformatf("linear group %0d carry-in-1 path", g));
    end
    require(n_full_ripple, "carry from the bottom group through all groups");
    require(n_cout, "carry out");
    require(n_cin[0], "carry-in 0");
    require(n_cin[1], "carry-in 1");
    $display("additions=%0d cycles=%0d full-ripple=%0d carry-out=%0d cin0=%0d cin1=%0d",
             adds, cycles, n_full_ripple, n_cout, n_cin[0], n_cin[1]);
    $display("sqrt/dlatch group selects (ci0/ci1): %0d/%0d %0d/%0d %0d/%0d %0d/%0d",
             sel_sq[1][0], sel_sq[1][1], sel_sq[2][0], sel_sq[2][1],
             sel_sq[3][0], sel_sq[3][1], sel_sq[4][0], sel_sq[4][1]);
    $display("linear group selects (ci0/ci1): %0d/%0d %0d/%0d %0d/%0d",
             sel_li[1][0], sel_li[1][1], sel_li[2][0], sel_li[2][1],
             sel_li[3][0], sel_li[3][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
