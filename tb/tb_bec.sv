// tb_bec: exhaustive check of the binary to excess-1 converter at its default
// width (5 bits) and at 4 bits: every input must come out incremented by one,
// modulo 2**W.
module tb_bec;
  logic [4:0] b5, x5;
  logic [3:0] b4, x4;
  int checks = 0, failures = 0;

  bec dut5 (.b(b5), .x(x5));
  bec #(.W(4)) dut4 (.b(b4), .x(x4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v); b4 = 4'(v);
      #1;
      checks++;
      if (x5 != 5'((v + 1) % 32)) begin
        failures++;
        $display("FAIL W=5 %0d -> %0d", b5, x5);
      end
      if (v < 16) begin
        checks++;
        if (x4 != 4'((v + 1) % 16)) begin
          failures++;
          $display("FAIL W=4 %0d -> %0d", b4, x4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
