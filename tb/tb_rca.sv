// tb_rca: exhaustive check of the ripple-carry adder at its default width of
// 4 bits (all operand pairs, both carry-ins) and of a 7-bit instance.
// Results are compared with integer addition.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [6:0] a7, b7, s7;
  logic       ci7, co7;
  int checks = 0, failures = 0;

  rca dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  rca #(.W(7)) dut7 (.a(a7), .b(b7), .ci(ci7), .s(s7), .co(co7));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d -> %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int v = 0; v < 2000; v++) begin
      a7 = 7'($urandom); b7 = 7'($urandom); ci7 = 1'($urandom);
      if (v == 0) begin a7 = '1; b7 = '0; ci7 = 1'b1; end
      #1;
      checks++;
      if ({co7, s7} != 8'(int'(a7) + int'(b7) + int'(ci7))) begin
        failures++;
        $display("FAIL W=7 %0d+%0d+%0d -> %0d", a7, b7, ci7, {co7, s7});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
