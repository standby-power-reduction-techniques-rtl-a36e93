// Testbench for ncl_csa (8 bits): alternates random DATA words and NULL on
// the three inputs. For DATA it checks s + c = x + y + z (mod 256), that both
// outputs are fully DATA exactly two gate delays (eclk periods) after the
// inputs, and for NULL that both outputs return to NULL in two periods.
`timescale 1ns/1ps
module tb_ncl_csa;
  import ncl_pkg::*;
  localparam int W = 8;
  logic eclk = 1'b0;
  logic rst;
  dr_t [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  always #5 eclk = ~eclk;

  ncl_csa #(.W(W)) dut (.eclk, .rst, .x, .y, .z, .s, .c);

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] b);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_enc(b[i]);
    return r;
  endfunction
  function automatic logic alld(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!dr_is_data(v[i])) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic [W-1:0] val(input dr_t [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = v[i].r1;
    return r;
  endfunction

  task automatic chk(input logic ok, input string n);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", n); end
  endtask

  initial begin
    logic [W-1:0] xv, yv, zv;
    rst = 1'b1; x = '0; y = '0; z = '0;
    repeat (2) @(posedge eclk);
    #1 rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      xv = W'($urandom); yv = W'($urandom); zv = W'($urandom);
      x = enc(xv); y = enc(yv); z = enc(zv);
      @(posedge eclk); #1;
      chk(!(alld(s) && alld(c)), "outputs complete after one gate delay");
      @(posedge eclk); #1;
      chk(alld(s) && alld(c), "outputs not complete after two gate delays");
      chk(val(s) + val(c) == xv + yv + zv, $sformatf("sum %h+%h != %h+%h+%h", val(s), val(c), xv, yv, zv));
      x = '0; y = '0; z = '0;
      repeat (2) @(posedge eclk); #1;
      chk(s == '0 && c == '0, "outputs not NULL after two gate delays");
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
