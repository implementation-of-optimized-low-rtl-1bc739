// rpm_mult -- unsigned W x W modified Russian Peasant Multiplier.
//
// The classic Russian Peasant method halves the multiplier (right shifter)
// and doubles the multiplicand (left shifter), adding the doubled
// multiplicand whenever the halved multiplier is odd. In this modified form
// the right shifter is gone: stage i simply uses bit a[i] of the multiplier
// as the select of a 2:1 multiplexer that passes either the multiplicand
// shifted left i times (the chain of one-bit left shifters L1..L(W-1)) or
// zero. The W selected terms are summed by an adder built from reduced-CG
// carry-select adders (csla_adder), arranged here as a pairwise tree:
// node W+j adds nodes 2j and 2j+1, and node 2W-2 is the product.
//
// Interface: a (multiplier, drives the selects), b (multiplicand, shifted),
// p = a*b (2W bits). Combinational, no clock. The default W = 8 is the
// 8 x 8 unit drawn in the architecture figure; the filter uses W = 16.
// Shifter/mux/adder structure follows the document; the tree shape of the
// adder is this design's choice.
module rpm_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned PW = 2 * W;

  logic [PW-1:0] shifted [W];      // b shifted left by i (left-shifter chain)
  logic [PW-1:0] node    [2*W-1];  // leaves 0..W-1 are the mux outputs

  assign shifted[0] = PW'(b);
  for (genvar i = 1; i < W; i++) begin : g_lshift
    assign shifted[i] = {shifted[i-1][PW-2:0], 1'b0};
  end

  // 2:1 multiplexers, selected by the multiplier bit of their stage.
  for (genvar i = 0; i < W; i++) begin : g_mux
    assign node[i] = a[i] ? shifted[i] : '0;
  end

  for (genvar j = 0; j < W - 1; j++) begin : g_add
    logic unused_cout;
    csla_adder #(.W(PW)) u_add (
      .a   (node[2*j]),
      .b   (node[2*j+1]),
      .cin (1'b0),
      .s   (node[W+j]),
      .cout(unused_cout)
    );
  end

  assign p = node[2*W-2];
endmodule
