// tb_csla_modified: checks the 16-bit modified (BEC) carry-select adder with
// its default square-root grouping and with linear grouping.
//
// Operands are corner cases (all ones, carries that ripple through every
// group) and random values; the result is compared with integer addition.
// The carry into each group, computed from the operands, is used to count
// how often every group picked its carry-in-0 and its carry-in-1 result;
// a group that never used one of its paths counts as a failure.
module tb_csla_modified;
  import csla_pkg::*;
  logic [15:0] a, b, s_sq, s_li;
  logic        cin, co_sq, co_li;
  int checks = 0, failures = 0;
  int sel_sq[5][2];
  int sel_li[4][2];

  csla_modified dut_sq (.a(a), .b(b), .cin(cin), .sum(s_sq), .cout(co_sq));
  csla_modified #(.GROUPING(GROUP_LINEAR)) dut_li (.a(a), .b(b), .cin(cin), .sum(s_li), .cout(co_li));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry into bit position pos for the current operands.
  function automatic logic carry_into(int pos);
    logic [16:0] t;
    t = 17'({1'b0, a} & ((17'd1 << pos) - 1)) + 17'({1'b0, b} & ((17'd1 << pos) - 1)) + 17'(cin);
    return t[pos];
  endfunction

  task automatic apply(input logic [15:0] x, y, input logic k);
    logic [16:0] ref_sum;
    a = x; b = y; cin = k;
    #1;
    ref_sum = 17'(a) + 17'(b) + 17'(cin);
    checks++;
    if ({co_sq, s_sq} != ref_sum) begin
      failures++;
      $display("FAIL sqrt %h+%h+%0d -> %h", a, b, cin, {co_sq, s_sq});
    end
    checks++;
    if ({co_li, s_li} != ref_sum) begin
      failures++;
      $display("FAIL linear %h+%h+%0d -> %h", a, b, cin, {co_li, s_li});
    end
    for (int g = 1; g < 5; g++) sel_sq[g][carry_into(group_lsb(GROUP_SQRT, g))]++;
    for (int g = 1; g < 4; g++) sel_li[g][carry_into(group_lsb(GROUP_LINEAR, g))]++;
  endtask

  initial begin
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hffff, 16'h0000, 1'b1);
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'h7fff, 16'h0001, 1'b0);
    apply(16'h0fff, 16'h0000, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int v = 0; v < 20000; v++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    for (int g = 1; g < 5; g++)
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (sel_sq[g][p] == 0) begin
          failures++;
          $display("FAIL sqrt group %0d never used its carry-in-%0d path", g, p);
        end
      end
    for (int g = 1; g < 4; g++)
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (sel_li[g][p] == 0) begin
          failures++;
          $display("FAIL linear group %0d never used its carry-in-%0d path", g, p);
        end
      end
    $display("sqrt group selects (ci0/ci1): %0d/%0d %0d/%0d %0d/%0d %0d/%0d",
             sel_sq[1][0], sel_sq[1][1], sel_sq[2][0], sel_sq[2][1],
             sel_sq[3][0], sel_sq[3][1], sel_sq[4][0], sel_sq[4][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
