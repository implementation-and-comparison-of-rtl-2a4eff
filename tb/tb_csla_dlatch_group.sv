// tb_csla_dlatch_group: checks the latch-based carry-select group at its
// default width (2 bits, the "group 2" of the 16-bit adder) exhaustively and
// at 5 bits on random operands.
//
// Each addition takes one clock cycle: operands and the incoming carry are
// applied with the rising edge, the high phase computes and latches the
// carry-in-1 result, and the result is checked during the low phase, just
// after the falling edge and again just before the next rising edge. The
// check of one addition per cycle is the cycle counter matching the number
// of additions.
module tb_csla_dlatch_group;
  localparam int HALF = 5;
  logic       clk;
  logic [1:0] a2, b2, s2;
  logic       c2, co2;
  logic [4:0] a5, b5, s5;
  logic       c5, co5;
  int checks = 0, failures = 0, cycles = 0, adds = 0;
  int n_sel0 = 0, n_sel1 = 0;

  csla_dlatch_group dut2 (.clk(clk), .a(a2), .b(b2), .c_in(c2), .s(s2), .c_out(co2));
  csla_dlatch_group #(.M(5)) dut5 (.clk(clk), .a(a5), .b(b5), .c_in(c5), .s(s5), .c_out(co5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    checks++;
    if ({co2, s2} != 3'(int'(a2) + int'(b2) + int'(c2))) begin
      failures++;
      $display("FAIL M=2 t=%0t %0d+%0d+%0d -> %0d", $time, a2, b2, c2, {co2, s2});
    end
    checks++;
    if ({co5, s5} != 6'(int'(a5) + int'(b5) + int'(c5))) begin
      failures++;
      $display("FAIL M=5 t=%0t %0d+%0d+%0d -> %0d", $time, a5, b5, c5, {co5, s5});
    end
  endtask

  // One clock cycle: rising edge with new operands, high phase, low phase.
  task automatic one_add(input logic [1:0] x2, y2, input logic k2,
                         input logic [4:0] x5, y5, input logic k5);
    clk = 1'b1;
    a2 = x2; b2 = y2; c2 = k2;
    a5 = x5; b5 = y5; c5 = k5;
    cycles++;
    #HALF;
    clk = 1'b0;
    #1;
    check_now();
    #(HALF - 2);
    check_now();
    #1;
    adds++;
    if (k2) n_sel1++; else n_sel0++;
  endtask

  initial begin
    clk = 1'b0;
    #HALF;
    for (int v = 0; v < 32; v++)
      one_add(v[1:0], v[3:2], v[4], 5'($urandom), 5'($urandom), v[4]);
    for (int v = 0; v < 500; v++)
      one_add(2'($urandom), 2'($urandom), 1'($urandom),
              5'($urandom), 5'($urandom), 1'($urandom));
    // all ones plus carry: longest ripple through the latched path
    one_add(2'b11, 2'b00, 1'b1, 5'h1f, 5'h00, 1'b1);
    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d additions took %0d cycles", adds, cycles);
    end
    $display("carry-in 0 path %0d times, latched carry-in 1 path %0d times", n_sel0, n_sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
