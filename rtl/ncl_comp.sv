// ncl_comp: full-word completion logic.
//
// Combines the per-bit acknowledges of a register into the single request
// for the preceding register: the output rises once every input is 1 (all
// bits NULL: request for DATA) and falls once every input is 0 (all bits
// DATA: request for NULL), and holds in between. It is a tree of C-elements
// (THnn gates with n <= 4): each level groups its inputs in fours, one
// gate per group, until one output is left. The gate-tree form is this design's choice; the
// design description only names the block.
//
// Interface: a[W-1:0] acknowledges in, z request out. Timing: ceil(log4 W)
// eclk periods. RST_VAL is the output value under rst (1 = request for DATA).
module ncl_comp #(
  parameter int unsigned W       = 8,
  parameter bit          RST_VAL = 1'b1
) (
  input  logic         eclk,
  input  logic         rst,
  input  logic [W-1:0] a,
  output logic         z
);
  // width of tree level l: level 0 is the input, each level groups in fours
  function automatic int unsigned lvl_w(input int unsigned l);
    int unsigned w = W;
    for (int unsigned i = 0; i < l; i++) w = (w + 3) / 4;
    return w;
  endfunction
  function automatic int unsigned n_lvls();
    int unsigned w = W;
    int unsigned n = 0;
    do begin
      w = (w + 3) / 4;
      n++;
    end while (w > 1);
    return n;
  endfunction

  localparam int unsigned L = n_lvls();

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned WI = lvl_w(l - 1);
    localparam int unsigned WO = lvl_w(l);
    logic [WI-1:0] in;
    logic [WO-1:0] out;
    if (l == 1) begin : g_src_in
      assign in = a;
    end else begin : g_src_lvl
      assign in = g_lvl[l-1].out;
    end
    for (genvar g = 0; g < WO; g++) begin : g_grp
      localparam int unsigned LO = 4 * g;
      localparam int unsigned SZ = (WI - LO >= 4) ? 4 : WI - LO;
      ncl_thmn #(.M(SZ), .N(SZ), .RST_VAL(RST_VAL)) u_th (
        .eclk (eclk), .rst (rst), .a (in[LO +: SZ]), .z (out[g]));
    end
  end

  assign z = g_lvl[L].out[0];
endmodule
