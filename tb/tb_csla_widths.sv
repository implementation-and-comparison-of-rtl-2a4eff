// tb_csla_widths: the adder widths of the area comparison - 16, 32, 64 and
// 128 bits - and the 8-bit variant, for the modified (BEC) carry-select adder in square-root and in
// linear grouping, and the latch-based adder at the same widths. Widths above
// 16 are cascades of 16-bit sections.
//
// One operand set per clock cycle: random 128-bit words (truncated for the
// narrower adders) plus corner cases whose carry runs through every section.
// Every sum is compared with integer addition in the low clock phase. The
// testbench counts additions in which the carry crosses from one 16-bit
// section into the next all the way to the top section, and fails if that
// never happened.
module tb_csla_widths;
  import csla_pkg::*;
  localparam int HALF = 5;
  logic         clk = 1'b0;
  logic [127:0] a = '0, b = '0;
  logic         cin = 1'b0;
  int checks = 0, failures = 0, n_cross = 0;

  logic [15:0]  sq16, li16, dl16;
  logic [31:0]  sq32, li32, dl32;
  logic [63:0]  sq64, li64, dl64;
  logic [127:0] sq128, li128, dl128;
  logic [11:0]  co;
  logic [7:0]   sq8, li8, dl8;
  logic [2:0]   co8;

  csla_modified #(.WIDTH(8)) u_sq8 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .sum(sq8), .cout(co8[0]));
  csla_modified #(.WIDTH(8), .GROUPING(GROUP_LINEAR)) u_li8 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .sum(li8), .cout(co8[1]));
  csla_dlatch #(.WIDTH(8)) u_dl8 (.clk(clk), .a(a[7:0]), .b(b[7:0]), .cin(cin), .sum(dl8), .cout(co8[2]));
  csla_modified #(.WIDTH(16)) u_sq16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .sum(sq16), .cout(co[0]));
  csla_modified #(.WIDTH(32)) u_sq32 (.a(a[31:0]), .b(b[31:0]), .cin(cin), .sum(sq32), .cout(co[1]));
  csla_modified #(.WIDTH(64)) u_sq64 (.a(a[63:0]), .b(b[63:0]), .cin(cin), .sum(sq64), .cout(co[2]));
  csla_modified #(.WIDTH(128)) u_sq128 (.a(a), .b(b), .cin(cin), .sum(sq128), .cout(co[3]));
  csla_modified #(.WIDTH(16), .GROUPING(GROUP_LINEAR)) u_li16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .sum(li16), .cout(co[4]));
  csla_modified #(.WIDTH(32), .GROUPING(GROUP_LINEAR)) u_li32 (.a(a[31:0]), .b(b[31:0]), .cin(cin), .sum(li32), .cout(co[5]));
  csla_modified #(.WIDTH(64), .GROUPING(GROUP_LINEAR)) u_li64 (.a(a[63:0]), .b(b[63:0]), .cin(cin), .sum(li64), .cout(co[6]));
  csla_modified #(.WIDTH(128), .GROUPING(GROUP_LINEAR)) u_li128 (.a(a), .b(b), .cin(cin), .sum(li128), .cout(co[7]));
  csla_dlatch #(.WIDTH(16)) u_dl16 (.clk(clk), .a(a[15:0]), .b(b[15:0]), .cin(cin), .sum(dl16), .cout(co[8]));
  csla_dlatch #(.WIDTH(32)) u_dl32 (.clk(clk), .a(a[31:0]), .b(b[31:0]), .cin(cin), .sum(dl32), .cout(co[9]));
  csla_dlatch #(.WIDTH(64)) u_dl64 (.clk(clk), .a(a[63:0]), .b(b[63:0]), .cin(cin), .sum(dl64), .cout(co[10]));
  csla_dlatch #(.WIDTH(128)) u_dl128 (.clk(clk), .a(a), .b(b), .cin(cin), .sum(dl128), .cout(co[11]));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [128:0] ref_add(int w);
    logic [128:0] mask;
    mask = (129'd1 << w) - 1;
    return ((129'(a) & mask) + (129'(b) & mask) + 129'(cin)) & ((129'd1 << (w + 1)) - 1);
  endfunction

  task automatic cmp(input string name, input int w, input logic [128:0] got);
    checks++;
    if (got != ref_add(w)) begin
      failures++;
      $display("FAIL %s: %h + %h + %0d -> %h", name, a, b, cin, got);
    end
  endtask

  task automatic check_all();
    cmp("sqrt8", 8, 129'({co8[0], sq8}));
    cmp("linear8", 8, 129'({co8[1], li8}));
    cmp("dlatch8", 8, 129'({co8[2], dl8}));
    cmp("sqrt16", 16, 129'({co[0], sq16}));
    cmp("sqrt32", 32, 129'({co[1], sq32}));
    cmp("sqrt64", 64, 129'({co[2], sq64}));
    cmp("sqrt128", 128, {co[3], sq128});
    cmp("linear16", 16, 129'({co[4], li16}));
    cmp("linear32", 32, 129'({co[5], li32}));
    cmp("linear64", 64, 129'({co[6], li64}));
    cmp("linear128", 128, {co[7], li128});
    cmp("dlatch16", 16, 129'({co[8], dl16}));
    cmp("dlatch32", 32, 129'({co[9], dl32}));
    cmp("dlatch64", 64, 129'({co[10], dl64}));
    cmp("dlatch128", 128, {co[11], dl128});
  endtask

  task automatic one_add(input logic [127:0] x, y, input logic k);
    logic [128:0] lo_sum;
    clk = 1'b1;
    a = x; b = y; cin = k;
    #HALF;
    clk = 1'b0;
    #1;
    check_all();
    #(HALF - 2);
    check_all();
    #1;
    // carry out of the lowest section propagating through all seven above
    lo_sum = 129'(a[15:0]) + 129'(b[15:0]) + 129'(cin);
    if (lo_sum[16] && ((a[127:16] ^ b[127:16]) == '1)) n_cross++;
  endtask

  initial begin
    clk = 1'b0;
    #HALF;
    one_add('1, '0, 1'b1);
    one_add('1, '1, 1'b1);
    one_add({112'h0, 16'hffff}, {{112{1'b1}}, 16'h0001}, 1'b0);
    one_add('0, '0, 1'b0);
    for (int v = 0; v < 3000; v++)
      one_add({$urandom, $urandom, $urandom, $urandom},
              {$urandom, $urandom, $urandom, $urandom}, 1'($urandom));
    checks++;
    if (n_cross == 0) begin
      failures++;
      $display("FAIL no carry crossed all 16-bit sections");
    end
    $display("carry through all sections: %0d times", n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
