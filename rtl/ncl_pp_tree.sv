// ncl_pp_tree: partial-product generation and Wallace-tree summation,
// full-word pipelined NCL (7 register stages for 16-bit operands).
//
// The unsigned N-bit operands X and Y enter a dual-rail input register. Row i
// of the partial-product array is X AND y[i] shifted left by i, 2N bits wide;
// its zero positions are DATA0 values that follow the wavefronts of y[i].
// The rows are then reduced with word-level 3:2 carry-save levels
// (16-11-8-6-4-3-2 rows for N = 16). The first level shares a pipeline
// section with the partial-product gates; every level ends in a full-word
// NCL register whose request comes from the completion logic of the next
// register. The last register (REG3) holds the product in carry-save form,
// PP1 + PP2 = X*Y. Register count 1 + levels = 7 matches the document's
// 7-stage pipeline; the split into sections, the word-level reduction and
// the 2N-bit rows are this design's choices (the document gives the
// block's function, not its insides).
//
// Interface (NCL four-phase, full word): x, y dual-rail operands; in_ko is the
// request to the producer (1: ready for DATA, 0: ready for NULL); pp1, pp2 the
// registered carry-save product; pp_ki the request from the consumer of REG3;
// pp_ko the completed acknowledge of REG3 (1 while PP1/PP2 are NULL, 0 while
// DATA), which the accumulator loop also uses to gate its REG0.
module ncl_pp_tree #(
  parameter int unsigned N = 16
) (
  input  logic                     eclk,
  input  logic                     rst,
  input  ncl_pkg::dr_t [N-1:0]     x,
  input  ncl_pkg::dr_t [N-1:0]     y,
  output logic                     in_ko,
  output ncl_pkg::dr_t [2*N-1:0]   pp1,
  output ncl_pkg::dr_t [2*N-1:0]   pp2,
  input  logic                     pp_ki,
  output logic                     pp_ko
);
  import ncl_pkg::*;

  localparam int unsigned W = 2 * N;
  localparam int unsigned L = wallace_levels(N);

  // Completion outputs of the level registers, index 1..L; done[L] is pp_ko.
  logic [L:1] done;

  // ---- input register --------------------------------------------------
  dr_t  [N-1:0] xq, yq;
  logic [2*N-1:0] in_ack;
  ncl_reg #(.W(2 * N)) u_rin (
    .eclk (eclk), .rst (rst), .d ({y, x}), .ki (done[1]), .q ({yq, xq}), .ko (in_ack));
  ncl_comp #(.W(2 * N)) u_cin (.eclk (eclk), .rst (rst), .a (in_ack), .z (in_ko));

  // ---- partial-product array -------------------------------------------
  dr_t [N-1:0][W-1:0] pp_rows;
  for (genvar i = 0; i < N; i++) begin : g_row
    dr_t zero_i;
    ncl_zero u_zero (.eclk (eclk), .rst (rst), .ref_bit (yq[i]), .z (zero_i));
    for (genvar j = 0; j < W; j++) begin : g_col
      if (j >= i && j < i + N) begin : g_and
        ncl_and u_and (.eclk (eclk), .rst (rst), .a (xq[j-i]), .b (yq[i]), .z (pp_rows[i][j]));
      end else begin : g_z
        assign pp_rows[i][j] = zero_i;
      end
    end
  end

  // ---- reduction levels, one register each -----------------------------
  for (genvar k = 1; k <= L; k++) begin : g_lv
    localparam int unsigned NI = wallace_rows(N, k - 1);
    localparam int unsigned NO = wallace_rows(N, k);
    dr_t  [NI-1:0][W-1:0] rin;
    dr_t  [NO-1:0][W-1:0] rout, q;
    logic [NO*W-1:0]      ack;
    logic                 ki;

    if (k == 1) begin : g_first
      assign rin = pp_rows;
    end else begin : g_next
      assign rin = g_lv[k-1].q;
    end

    ncl_csa_level #(.NI(NI), .W(W)) u_lvl (.eclk (eclk), .rst (rst), .rows_in (rin), .rows_out (rout));

    if (k == L) begin : g_last
      assign ki = pp_ki;
    end else begin : g_mid
      assign ki = done[k+1];
    end

    ncl_reg #(.W(NO * W)) u_reg (.eclk (eclk), .rst (rst), .d (rout), .ki (ki), .q (q), .ko (ack));
    ncl_comp #(.W(NO * W)) u_comp (.eclk (eclk), .rst (rst), .a (ack), .z (done[k]));
  end

  assign pp1   = g_lv[L].q[0];
  assign pp2   = g_lv[L].q[1];
  assign pp_ko = done[L];
endmodule
