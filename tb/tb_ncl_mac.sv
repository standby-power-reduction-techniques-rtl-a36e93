// End-to-end testbench for ncl_mac at its default size (16-bit operands,
// 32-bit accumulator).
//
// A four-phase producer drives random X, Y pairs (DATA, then NULL, each after
// a random wait) and a four-phase consumer takes every result A, checking it
// against a reference accumulator acc += X*Y (mod 2^32) computed here. Bursts
// of back-to-back operations alternate with idle periods long enough for the
// pipeline to flush to standby. In each standby the testbench checks the
// states the indeterminate-state reduction is meant to produce: REG0, REG1,
// COMB1/COMB2 outputs NULL, COMP0 = 1, REG0's request (U1) = 0, and the
// accumulator held as DATA in REG2 (A1 + A2 equal to the reference).
// Mechanisms counted (each must occur): operations, standby entries, cycles
// in which U1 holds REG0 back while COMP0 requests DATA, and operations that
// overlap in the pipeline.
`timescale 1ns/1ps
module tb_ncl_mac;
  import ncl_pkg::*;

  localparam int N = 16;
  localparam int W = 32;
  localparam int NOPS = 60;

  logic eclk = 1'b0;
  logic rst;
  dr_t [N-1:0] x, y;
  dr_t [W-1:0] a;
  logic ko, ki, reg0_ki, comp0;

  int checks = 0, failures = 0;
  int n_ops = 0, n_standby = 0, n_u1_block = 0, n_overlap = 0;
  int issued = 0, received = 0;
  logic [W-1:0] exp_q [$];
  logic [W-1:0] acc = '0;
  longint cyc = 0;

  always #5 eclk = ~eclk;
  always @(posedge eclk) cyc++;

  ncl_mac dut (.eclk (eclk), .rst (rst), .x (x), .y (y), .ko (ko), .a (a), .ki (ki),
               .reg0_ki (reg0_ki), .comp0 (comp0));

  function automatic logic all_data(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!dr_is_data(v[i])) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic all_null(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!dr_is_null(v[i])) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic [W-1:0] val(input dr_t [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = v[i].r1;
    return r;
  endfunction
  function automatic dr_t [N-1:0] enc(input logic [N-1:0] b);
    dr_t [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = dr_enc(b[i]);
    return r;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // U1 holding REG0 back: COMP0 requests DATA but the product is NULL
  always @(posedge eclk) if (!rst && comp0 && !reg0_ki && dut.pp_ko) n_u1_block++;
  // overlap: a new operand pair enters while an earlier result is still pending
  always @(posedge eclk) if (!rst && (issued - received) >= 2) n_overlap++;

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge eclk);
  endtask

  task automatic check_standby();
    logic [W-1:0] held;
    // REG0 and REG1 NULL, COMB outputs NULL, COMP0 = 1, REG0 Ki = 0
    check(all_null(dut.u_loop.r0a1) && all_null(dut.u_loop.r0a2), "standby: REG0 not NULL");
    check(all_null(dut.u_loop.r1s) && all_null(dut.u_loop.r1c) && all_null(dut.u_loop.r1p),
          "standby: REG1 not NULL");
    check(all_null(dut.u_loop.s1) && all_null(dut.u_loop.c1) &&
          all_null(dut.u_loop.s2) && all_null(dut.u_loop.c2), "standby: COMB1/COMB2 not NULL");
    check(comp0 == 1'b1, "standby: COMP0 not 1");
    check(reg0_ki == 1'b0, "standby: REG0 Ki (U1) not 0");
    check(dut.pp_ko == 1'b1, "standby: REG3 Ko not 1");
    check(all_null(a), "standby: output not NULL");
    // the accumulator is parked in REG2
    check(all_data(dut.u_loop.r2a1) && all_data(dut.u_loop.r2a2), "standby: REG2 not DATA");
    held = val(dut.u_loop.r2a1) + val(dut.u_loop.r2a2);
    check(held == acc, $sformatf("standby: REG2 holds %h, expected %h", held, acc));
    n_standby++;
  endtask

  // producer
  initial begin : producer
    logic [N-1:0] xv, yv;
    x = '0; y = '0;
    rst = 1'b1;
    wait_cycles(4);
    rst = 1'b0;
    wait_cycles(400);
    check_standby();               // the reset state is a standby state (accumulator 0)
    for (int op = 0; op < NOPS; op++) begin
      case (op % 4)
        0: begin xv = 16'hFFFF; yv = 16'hFFFF; end
        default: begin xv = N'($urandom); yv = N'($urandom); end
      endcase
      wait (ko == 1'b1);
      wait_cycles($urandom_range(0, 3));
      x = enc(xv); y = enc(yv);
      acc = acc + W'(xv) * W'(yv);
      exp_q.push_back(acc);
      issued++;
      wait (ko == 1'b0);
      wait_cycles($urandom_range(0, 3));
      x = '0; y = '0;
      if (op % 15 == 14) begin     // idle long enough to reach standby
        wait (received == issued);
        wait_cycles(400);
        check_standby();
      end
    end
    wait (received == issued);
    wait_cycles(400);
    check_standby();
    check(n_ops == NOPS, "not every operation completed");
    check(n_standby > 0, "standby never reached");
    check(n_u1_block > 0, "U1 never held REG0 back");
    check(n_overlap > 0, "operations never overlapped in the pipeline");
    $display("ops=%0d standby=%0d u1_block_cycles=%0d overlap_cycles=%0d cycles=%0d",
             n_ops, n_standby, n_u1_block, n_overlap, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  initial begin : consumer
    ki = 1'b1;
    forever begin
      @(posedge eclk);
      if (!rst && ki && all_data(a)) begin
        logic [W-1:0] e;
        e = exp_q.size() > 0 ? exp_q.pop_front() : '0;
        check(val(a) == e, $sformatf("result %h, expected %h", val(a), e));
        n_ops++;
        received++;
        wait_cycles($urandom_range(0, 4));
        ki = 1'b0;
      end else if (!rst && !ki && all_null(a)) begin
        wait_cycles($urandom_range(0, 4));
        ki = 1'b1;
      end
    end
  end

  initial begin : watchdog
    wait_cycles(200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
