// tb_mux2: checks that the 2:1 multiplexer passes d0 for sel = 0 and d1 for
// sel = 1, on random data with different words on the two inputs.
module tb_mux2;
  logic [4:0] d0, d1, y;
  logic       sel;
  int checks = 0, failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 200; v++) begin
      d0 = 5'($urandom); d1 = ~d0; sel = v[0];
      #1;
      checks++;
      if (y != (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
