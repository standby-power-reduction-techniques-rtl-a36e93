// Testbench for ncl_thmn: drives random inputs into TH23, TH34w2, inverted
// TH12 and TH44 gates and compares each output, one eclk period later, with
// a reference threshold-with-hysteresis model computed here.
`timescale 1ns/1ps
module tb_ncl_thmn;
  logic eclk = 1'b0;
  logic rst;
  logic [2:0] a23;
  logic [3:0] a34, a44;
  logic [1:0] a12;
  logic z23, z34, z12, z44;
  logic e23, e34, e12, e44;   // reference state (non-inverted)
  int checks = 0, failures = 0;

  always #5 eclk = ~eclk;

  ncl_thmn #(.M(2), .N(3))                          u23 (.eclk, .rst, .a (a23), .z (z23));
  ncl_thmn #(.M(3), .N(4), .W0(2))                  u34 (.eclk, .rst, .a (a34), .z (z34));
  ncl_thmn #(.M(1), .N(2), .INV(1'b1), .RST_VAL(1'b1)) u12 (.eclk, .rst, .a (a12), .z (z12));
  ncl_thmn #(.M(4), .N(4))                          u44 (.eclk, .rst, .a (a44), .z (z44));

  function automatic logic nxt(input logic q, input int cnt, input int m, input logic none);
    if (cnt >= m) return 1'b1;
    if (none) return 1'b0;
    return q;
  endfunction

  task automatic chk(input logic got, input logic exp, input string n);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", n, got, exp); end
  endtask

  initial begin
    rst = 1'b1; a23 = '0; a34 = '0; a12 = '0; a44 = '0;
    repeat (2) @(posedge eclk);
    #1 rst = 1'b0;
    e23 = 0; e34 = 0; e12 = 0; e44 = 0;
    chk(z12, 1'b1, "TH12b reset");
    for (int t = 0; t < 2000; t++) begin
      // bias towards all-0 / all-1 so that both transitions happen often
      case ($urandom_range(0, 3))
        0: begin a23 = '0; a34 = '0; a12 = '0; a44 = '0; end
        1: begin a23 = '1; a34 = '1; a12 = '1; a44 = '1; end
        default: begin a23 = 3'($urandom); a34 = 4'($urandom); a12 = 2'($urandom); a44 = 4'($urandom); end
      endcase
      e23 = nxt(e23, $countones(a23), 2, a23 == 0);
      e34 = nxt(e34, $countones(a34) + int'(a34[0]), 3, a34 == 0);
      e12 = nxt(e12, $countones(a12), 1, a12 == 0);
      e44 = nxt(e44, $countones(a44), 4, a44 == 0);
      @(posedge eclk); #1;
      chk(z23, e23, "TH23");
      chk(z34, e34, "TH34w2");
      chk(z12, ~e12, "TH12b");
      chk(z44, e44, "TH44");
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
