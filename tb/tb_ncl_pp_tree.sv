// Testbench for ncl_pp_tree with 8-bit operands (four reduction levels,
// five registers). A four-phase producer sends random and extreme operand
// pairs with random waits; a four-phase consumer acting as REG4 takes each
// carry-save product and checks PP1 + PP2 = X*Y (mod 2^16) in order. It also
// checks that REG3's completed Ko is 0 while the product is DATA and 1 while
// it is NULL, and that several operands are in flight at once (pipelining).
`timescale 1ns/1ps
module tb_ncl_pp_tree;
  import ncl_pkg::*;
  localparam int N = 8;
  localparam int W = 2 * N;
  localparam int NOPS = 200;

  logic eclk = 1'b0;
  logic rst;
  dr_t [N-1:0] x, y;
  dr_t [W-1:0] pp1, pp2;
  logic in_ko, pp_ki, pp_ko;
  int checks = 0, failures = 0, issued = 0, received = 0, max_inflight = 0;
  logic [W-1:0] exp_q [$];

  always #5 eclk = ~eclk;

  ncl_pp_tree #(.N(N)) dut (.eclk, .rst, .x, .y, .in_ko, .pp1, .pp2, .pp_ki, .pp_ko);

  function automatic dr_t [N-1:0] enc(input logic [N-1:0] b);
    dr_t [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = dr_enc(b[i]);
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

  always @(posedge eclk) if (issued - received > max_inflight) max_inflight = issued - received;

  initial begin : producer
    logic [N-1:0] xv, yv;
    rst = 1'b1; x = '0; y = '0;
    repeat (3) @(posedge eclk);
    #1 rst = 1'b0;
    for (int op = 0; op < NOPS; op++) begin
      case (op % 5)
        0: begin xv = '1; yv = '1; end
        1: begin xv = '0; yv = N'($urandom); end
        default: begin xv = N'($urandom); yv = N'($urandom); end
      endcase
      wait (in_ko == 1'b1);
      repeat ($urandom_range(0, 2)) @(posedge eclk);
      #1 x = enc(xv); y = enc(yv);
      exp_q.push_back(W'(xv) * W'(yv));
      issued++;
      wait (in_ko == 1'b0);
      repeat ($urandom_range(0, 2)) @(posedge eclk);
      #1 x = '0; y = '0;
    end
    wait (received == NOPS);
    chk(max_inflight >= 2, "no two operations were in flight together");
    $display("max operations in flight: %0d", max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : consumer
    pp_ki = 1'b1;
    forever begin
      @(posedge eclk); #1;
      if (!rst && pp_ki && alld(pp1) && alld(pp2)) begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        chk(W'(val(pp1) + val(pp2)) == e, $sformatf("PP1+PP2 = %h, expected %h", W'(val(pp1) + val(pp2)), e));
        repeat (6) @(posedge eclk); #1;
        chk(pp_ko == 1'b0, "REG3 Ko not 0 with DATA held");
        received++;
        repeat ($urandom_range(0, 6)) @(posedge eclk);
        #1 pp_ki = 1'b0;
      end else if (!rst && !pp_ki && alln(pp1) && alln(pp2)) begin
        repeat (6) @(posedge eclk); #1;
        chk(pp_ko == 1'b1, "REG3 Ko not 1 with NULL held");
        repeat ($urandom_range(0, 6)) @(posedge eclk);
        #1 pp_ki = 1'b1;
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
