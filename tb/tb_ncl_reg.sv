// Testbench for ncl_reg: two 4-bit registers, one resetting to NULL and one
// to DATA0. Random dual-rail inputs that follow the NCL protocol and random
// requests are applied; a reference model of each bit (take DATA when Ki=1,
// take NULL when Ki=0, hold otherwise) predicts q, and Ko must be 1 exactly
// when a bit is NULL. Gate delay: q one eclk period after the inputs, Ko one
// more.
`timescale 1ns/1ps
module tb_ncl_reg;
  import ncl_pkg::*;
  localparam int W = 4;
  logic eclk = 1'b0;
  logic rst, ki;
  dr_t [W-1:0] d, qa, qb, ea, eb;
  logic [W-1:0] koa, kob;
  int checks = 0, failures = 0;

  always #5 eclk = ~eclk;

  ncl_reg #(.W(W))                  u_a (.eclk, .rst, .d, .ki, .q (qa), .ko (koa));
  ncl_reg #(.W(W), .RST_DATA0(1'b1)) u_b (.eclk, .rst, .d, .ki, .q (qb), .ko (kob));

  function automatic dr_t step(input dr_t q, input dr_t din, input logic k);
    dr_t r;
    r.r1 = (din.r1 & k) ? 1'b1 : (!din.r1 && !k) ? 1'b0 : q.r1;
    r.r0 = (din.r0 & k) ? 1'b1 : (!din.r0 && !k) ? 1'b0 : q.r0;
    return r;
  endfunction

  task automatic chk(input logic ok, input string n);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", n); end
  endtask

  initial begin
    rst = 1'b1; ki = 1'b0; d = '0;
    repeat (2) @(posedge eclk);
    #1 rst = 1'b0;
    ea = '0;
    for (int i = 0; i < W; i++) eb[i] = DR_DATA0;
    chk(qa == ea && qb == eb, "reset values");
    ki = 1'b1;                     // NULL input with Ki = 1: both registers hold
    @(posedge eclk); #1;
    chk(koa == '1 && kob == '0, "reset Ko");
    for (int t = 0; t < 3000; t++) begin
      // inputs obey the NCL protocol: each bit moves DATA -> NULL -> DATA,
      // and a new DATA never meets a register bit holding the other value
      for (int i = 0; i < W; i++) begin
        dr_t nv;
        nv = 1'($urandom) ? DR_DATA1 : DR_DATA0;
        if (dr_is_data(d[i])) begin
          if ($urandom_range(0, 1) == 0) d[i] = DR_NULL;
        end else if ($urandom_range(0, 1) == 0 &&
                     (dr_is_null(ea[i]) || ea[i] == nv) && (dr_is_null(eb[i]) || eb[i] == nv)) begin
          d[i] = nv;
        end
      end
      ki = 1'($urandom);
      for (int i = 0; i < W; i++) begin
        ea[i] = step(ea[i], d[i], ki);
        eb[i] = step(eb[i], d[i], ki);
      end
      @(posedge eclk); #1;
      chk(qa == ea, $sformatf("reg A q=%h exp=%h", qa, ea));
      chk(qb == eb, $sformatf("reg B q=%h exp=%h", qb, eb));
      // Ko of the value just checked appears one period later; hold inputs
      ki = ki;
      @(posedge eclk); #1;
      for (int i = 0; i < W; i++) begin
        ea[i] = step(ea[i], d[i], ki);
        eb[i] = step(eb[i], d[i], ki);
      end
      for (int i = 0; i < W; i++) begin
        chk(koa[i] == dr_is_null(qa[i]), "Ko A");
        chk(kob[i] == dr_is_null(qb[i]), "Ko B");
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
