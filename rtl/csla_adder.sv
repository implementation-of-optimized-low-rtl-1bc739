// csla_adder -- W-bit adder made of 4-bit reduced-CG carry-select slices.
//
// The operands are zero-padded to a multiple of four bits and split into
// csla_rcg4 slices; the carry out of each slice is the carry in of the next.
// Interface: a, b, cin in; s (W bits), cout out. Combinational.
// The slice is the reduced-CG carry-select adder; chaining the slices to any
// width is this design's choice.
module csla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NB = (W + 3) / 4;   // number of 4-bit slices
  localparam int unsigned WP = 4 * NB;        // padded width

  logic [WP-1:0] ap, bp, sp;
  logic [NB:0]   c;

  assign ap   = WP'(a);
  assign bp   = WP'(b);
  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_slice
    csla_rcg4 u_slice (
      .a   (ap[4*k +: 4]),
      .b   (bp[4*k +: 4]),
      .cin (c[k]),
      .s   (sp[4*k +: 4]),
      .cout(c[k+1])
    );
  end

  assign s = sp[W-1:0];
  // With padding, the true carry out of bit W-1 lands in the padded sum.
  if (WP == W) begin : g_nopad
    assign cout = c[NB];
  end else begin : g_pad
    assign cout = sp[W];
  end
endmodule
