// tb_d_latch: checks the D latch is transparent while en is high (q follows
// every change of d, qn is its complement) and holds the last value while en
// is low, whatever d does then.
module tb_d_latch;
  logic d, en, q, qn;
  logic expect_q;
  int checks = 0, failures = 0;

  d_latch dut (.d(d), .en(en), .q(q), .qn(qn));

  task automatic check(input logic exp);
    checks++;
    if (q !== exp || qn !== ~exp) begin
      failures++;
      $display("FAIL t=%0t en=%0b d=%0b q=%0b qn=%0b expected q=%0b", $time, en, d, q, qn, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; d = 1'b0;
    for (int v = 0; v < 200; v++) begin
      // transparent phase: q follows d
      en = 1'b1;
      repeat (3) begin
        d = 1'($urandom);
        #1;
        check(d);
      end
      expect_q = d;
      // opaque phase: q holds
      en = 1'b0;
      #1;
      check(expect_q);
      repeat (3) begin
        d = 1'($urandom);
        #1;
        check(expect_q);
      end
      d = ~expect_q;
      #1;
      check(expect_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
