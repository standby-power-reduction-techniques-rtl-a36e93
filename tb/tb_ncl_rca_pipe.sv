// Testbench for ncl_rca_pipe with W = 12 (five pipeline stages, a 10-bit
// ripple-carry adder between bit 0 and bit 11). The producer sends carry-save
// pairs (A1, A2 with A2 bit 0 = 0), including all-ones cases that ripple a
// carry through every stage; the consumer checks A = A1 + A2 (mod 2^W) in
// order, with random waits on both sides (sometimes long on the consumer
// side, so that the pipeline fills), and that operations overlap.
`timescale 1ns/1ps
module tb_ncl_rca_pipe;
  import ncl_pkg::*;
  localparam int W = 12;
  localparam int NOPS = 300;

  logic eclk = 1'b0;
  logic rst;
  dr_t [W-1:0] a1, a2, a;
  logic in_ko, out_ki;
  int checks = 0, failures = 0, issued = 0, received = 0, max_inflight = 0, n_full_ripple = 0;
  logic [W-1:0] exp_q [$];

  always #5 eclk = ~eclk;

  ncl_rca_pipe #(.W(W)) dut (.eclk, .rst, .a1, .a2, .in_ko, .a, .out_ki);

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

  always @(posedge eclk) if (issued - received > max_inflight) max_inflight = issued - received;

  initial begin : producer
    logic [W-1:0] u, v;
    rst = 1'b1; a1 = '0; a2 = '0;
    repeat (3) @(posedge eclk);
    #1 rst = 1'b0;
    for (int op = 0; op < NOPS; op++) begin
      if (op % 7 == 0) begin u = '1; v = W'(2); n_full_ripple++; end   // carry through all bits
      else begin u = W'($urandom); v = W'($urandom) & ~W'(1); end
      wait (in_ko == 1'b1);
      repeat ($urandom_range(0, 2)) @(posedge eclk);
      #1 a1 = enc(u); a2 = enc(v);
      exp_q.push_back(u + v);
      issued++;
      wait (in_ko == 1'b0);
      repeat ($urandom_range(0, 2)) @(posedge eclk);
      #1 a1 = '0; a2 = '0;
    end
    wait (received == NOPS);
    chk(max_inflight >= 2, "no overlap of operations");
    chk(n_full_ripple > 0, "no carry rippled through all stages");
    $display("max in flight %0d, full ripples %0d", max_inflight, n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : consumer
    out_ki = 1'b1;
    forever begin
      @(posedge eclk); #1;
      if (!rst && out_ki && alld(a)) begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        chk(val(a) == e, $sformatf("A = %h, expected %h", val(a), e));
        received++;
        repeat (($urandom_range(0, 9) == 0) ? 40 : $urandom_range(0, 5)) @(posedge eclk);
        #1 out_ki = 1'b0;
      end else if (!rst && !out_ki && alln(a)) begin
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
