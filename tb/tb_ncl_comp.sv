// Testbench for ncl_comp: a 3-input (single gate), a 9-input (two-level)
// and a 20-input (three-level) completion tree. Random input patterns are
// held long enough for the tree to settle; the output must rise for all ones,
// fall for all zeros and otherwise keep its previous value.
`timescale 1ns/1ps
module tb_ncl_comp;
  logic eclk = 1'b0;
  logic rst;
  logic [2:0]  a3;
  logic [8:0]  a9;
  logic [19:0] a20;
  logic z3, z9, z20, e3, e9, e20;
  int checks = 0, failures = 0;

  always #5 eclk = ~eclk;

  ncl_comp #(.W(3))  u3  (.eclk, .rst, .a (a3),  .z (z3));
  ncl_comp #(.W(9))  u9  (.eclk, .rst, .a (a9),  .z (z9));
  ncl_comp #(.W(20)) u20 (.eclk, .rst, .a (a20), .z (z20));

  task automatic chk(input logic got, input logic exp, input string n);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", n, got, exp); end
  endtask

  initial begin
    rst = 1'b1; a3 = '1; a9 = '1; a20 = '1;
    repeat (2) @(posedge eclk);
    #1 rst = 1'b0;
    e3 = 1; e9 = 1; e20 = 1;
    for (int t = 0; t < 1500; t++) begin
      case ($urandom_range(0, 2))
        0: begin a3 = '0; a9 = '0; a20 = '0; end
        1: begin a3 = '1; a9 = '1; a20 = '1; end
        default: begin a3 = 3'($urandom); a9 = 9'($urandom); a20 = 20'($urandom); end
      endcase
      if (a3 == '1) e3 = 1; else if (a3 == '0) e3 = 0;
      if (a9 == '1) e9 = 1; else if (a9 == '0) e9 = 0;
      if (a20 == '1) e20 = 1; else if (a20 == '0) e20 = 0;
      repeat (4) @(posedge eclk);
      #1;
      chk(z3, e3, "W=3");
      chk(z9, e9, "W=9");
      chk(z20, e20, "W=20");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge eclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
