// Testbench for ncl_mac_loop with 8-bit words. The testbench plays REG3 (it
// presents each product as a random carry-save pair PP1 + PP2 and drives
// REG3's completed Ko one period after each change) and the ripple-carry
// adder (four-phase consumer of A1, A2). Every loop output must satisfy
// A1 + A2 = running sum of the products (mod 256). After idle periods it
// checks the standby state the U0/U1 gating is there for: REG0 and REG1
// NULL, COMP0 = 1, REG0 Ki = 0, and the accumulator held as DATA in REG2.
// It counts the cycles in which U1 keeps REG0 from requesting DATA although
// COMP0 requests it, and requires that this happened.
`timescale 1ns/1ps
module tb_ncl_mac_loop;
  import ncl_pkg::*;
  localparam int W = 8;
  localparam int NOPS = 150;

  logic eclk = 1'b0;
  logic rst;
  dr_t [W-1:0] pp1, pp2, a1, a2;
  logic pp_ko, reg3_ki, out_ki, reg0_ki, comp0;
  int checks = 0, failures = 0, issued = 0, received = 0, n_block = 0, n_standby = 0;
  logic [W-1:0] acc = '0;
  logic [W-1:0] exp_q [$];

  always #5 eclk = ~eclk;

  ncl_mac_loop #(.W(W)) dut (.eclk, .rst, .pp1, .pp2, .pp_ko, .reg3_ki, .a1, .a2, .out_ki, .reg0_ki, .comp0);

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] b);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_enc(b[i]);
    return r;
  endfunction
  function automatic logic alld(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!dr_is_data(v[i])) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic alln(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!dr_is_null(v[i])) return 1'b0;
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

  always @(posedge eclk) if (!rst && comp0 && !reg0_ki && pp_ko) n_block++;

  task automatic check_standby();
    chk(alln(dut.r0a1) && alln(dut.r0a2), "standby: REG0 not NULL");
    chk(alln(dut.r1s) && alln(dut.r1c) && alln(dut.r1p), "standby: REG1 not NULL");
    chk(comp0 == 1'b1, "standby: COMP0 not 1");
    chk(reg0_ki == 1'b0, "standby: REG0 Ki not 0");
    chk(alld(dut.r2a1) && alld(dut.r2a2), "standby: REG2 not DATA");
    chk(W'(val(dut.r2a1) + val(dut.r2a2)) == acc, "standby: REG2 does not hold the accumulator");
    n_standby++;
  endtask

  initial begin : producer
    logic [W-1:0] p, s;
    rst = 1'b1; pp1 = '0; pp2 = '0; pp_ko = 1'b1;
    repeat (3) @(posedge eclk);
    #1 rst = 1'b0;
    repeat (100) @(posedge eclk);
    check_standby();
    for (int op = 0; op < NOPS; op++) begin
      p = W'($urandom);
      s = W'($urandom);
      wait (reg3_ki == 1'b1);
      repeat ($urandom_range(0, 3)) @(posedge eclk);
      #1 pp1 = enc(s); pp2 = enc(p - s);
      acc = acc + p;
      exp_q.push_back(acc);
      issued++;
      @(posedge eclk); #1 pp_ko = 1'b0;
      wait (reg3_ki == 1'b0);
      repeat ($urandom_range(0, 3)) @(posedge eclk);
      #1 pp1 = '0; pp2 = '0;
      @(posedge eclk); #1 pp_ko = 1'b1;
      if (op % 10 == 9) begin
        wait (received == issued);
        repeat (100) @(posedge eclk);
        check_standby();
      end
    end
    wait (received == issued);
    chk(n_block > 0, "U1 never held REG0 back");
    chk(n_standby > 0, "standby never reached");
    $display("U1 blocking cycles %0d, standby checks %0d", n_block, n_standby);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : consumer
    out_ki = 1'b1;
    forever begin
      @(posedge eclk); #1;
      if (!rst && out_ki && alld(a1) && alld(a2)) begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        chk(W'(val(a1) + val(a2)) == e, $sformatf("A1+A2 = %h, expected %h", W'(val(a1) + val(a2)), e));
        received++;
        repeat ($urandom_range(0, 5)) @(posedge eclk);
        #1 out_ki = 1'b0;
      end else if (!rst && !out_ki && alln(a1) && alln(a2)) begin
        repeat ($urandom_range(0, 5)) @(posedge eclk);
        #1 out_ki = 1'b1;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge eclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
