// tb_csla_dlatch: checks the 16-bit latch-based carry-select adder.
//
// One addition per clock cycle: operands are applied with the rising edge
// and the sum is checked in the low phase (just after the falling edge and
// just before the next rising edge) against integer addition. The carry into
// each of the four clocked groups is worked out from the operands to count
// how often each group used its live carry-in-0 result and its latched
// carry-in-1 result; a path never used counts as a failure. The number of
// clock cycles must equal the number of additions.
module tb_csla_dlatch;
  import csla_pkg::*;
  localparam int HALF = 5;
  logic        clk = 1'b0;
  logic [15:0] a = '0, b = '0, s;
  logic        cin = 1'b0, co;
  int checks = 0, failures = 0, cycles = 0, adds = 0;
  int sel[5][2];

  csla_dlatch dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(s), .cout(co));

  initial begin
    #10000000;
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
    checks++;
    if ({co, s} != 17'(a) + 17'(b) + 17'(cin)) begin
      failures++;
      $display("FAIL t=%0t %h+%h+%0d -> %h", $time, a, b, cin, {co, s});
    end
  endtask

  task automatic one_add(input logic [15:0] x, y, input logic k);
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
    for (int g = 1; g < 5; g++) sel[g][carry_into(group_lsb(GROUP_SQRT, g))]++;
  endtask

  initial begin
    clk = 1'b0;
    #HALF;
    one_add(16'hffff, 16'h0000, 1'b1);
    one_add(16'hffff, 16'hffff, 1'b1);
    one_add(16'h0000, 16'h0000, 1'b0);
    one_add(16'h3ffc, 16'h0004, 1'b0);
    for (int v = 0; v < 5000; v++)
      one_add(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d additions took %0d cycles", adds, cycles);
    end
    for (int g = 1; g < 5; g++)
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (sel[g][p] == 0) begin
          failures++;
          $display("FAIL group %0d never used its carry-in-%0d path", g, p);
        end
      end
    $display("group selects (ci0/latched ci1): %0d/%0d %0d/%0d %0d/%0d %0d/%0d",
             sel[1][0], sel[1][1], sel[2][0], sel[2][1],
             sel[3][0], sel[3][1], sel[4][0], sel[4][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
