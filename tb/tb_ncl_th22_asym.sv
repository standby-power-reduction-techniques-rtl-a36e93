// Testbench for ncl_th22_asym (gate U1): walks the gate through every input
// combination from both output states and checks set (A=B=1), reset (A=0,
// whatever B) and hold (A=1, B=0), one eclk period after each input change.
`timescale 1ns/1ps
module tb_ncl_th22_asym;
  logic eclk = 1'b0;
  logic rst, a, b, z, exp_z;
  int checks = 0, failures = 0;

  always #5 eclk = ~eclk;

  ncl_th22_asym dut (.eclk, .rst, .a, .b, .z);

  initial begin
    rst = 1'b1; a = 0; b = 0;
    repeat (2) @(posedge eclk);
    #1 rst = 1'b0;
    checks++; if (z !== 1'b0) failures++;
    exp_z = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      a = 1'($urandom); b = 1'($urandom);
      if (a && b) exp_z = 1'b1;
      else if (!a) exp_z = 1'b0;
      @(posedge eclk); #1;
      checks++;
      if (z !== exp_z) begin
        failures++;
        $display("FAIL a=%b b=%b z=%b exp=%b", a, b, z, exp_z);
      end
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
