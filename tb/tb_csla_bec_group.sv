// tb_csla_bec_group: exhaustive check of a 4-bit (default) and a 5-bit BEC
// carry-select group: every operand pair with both carry-ins, compared with
// integer addition. Counts how often each carry-in path was selected.
module tb_csla_bec_group;
  logic [3:0] a4, b4, s4;
  logic       c4, co4;
  logic [4:0] a5, b5, s5;
  logic       c5, co5;
  int checks = 0, failures = 0;
  int n_sel0 = 0, n_sel1 = 0;

  csla_bec_group dut4 (.a(a4), .b(b4), .c_in(c4), .s(s4), .c_out(co4));
  csla_bec_group #(.M(5)) dut5 (.a(a5), .b(b5), .c_in(c5), .s(s5), .c_out(co5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {c4, a4, b4} = 9'(v);
      #1;
      checks++;
      if (c4) n_sel1++; else n_sel0++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(c4))) begin
        failures++;
        $display("FAIL M=4 %0d+%0d+%0d -> %0d", a4, b4, c4, {co4, s4});
      end
    end
    for (int v = 0; v < 2048; v++) begin
      {c5, a5, b5} = 11'(v);
      #1;
      checks++;
      if ({co5, s5} != 6'(int'(a5) + int'(b5) + int'(c5))) begin
        failures++;
        $display("FAIL M=5 %0d+%0d+%0d -> %0d", a5, b5, c5, {co5, s5});
      end
    end
    $display("carry-in 0 path %0d times, carry-in 1 path %0d times", n_sel0, n_sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
