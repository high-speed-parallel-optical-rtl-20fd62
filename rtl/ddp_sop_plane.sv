// ddp_sop_plane -- one output plane of the adder as a sum of product terms.
//
// Every logic equation of the adder has the form
//   Y = sum over t of (OR of X planes in AMASK[t]) * (OR of Y planes in BMASK[t])
// Each term is built as in the optical scheme: two beam combiners
// (ddp_plane_or) gather the selected planes of each operand, the two results
// are cascaded (ddp_plane_and), and a last beam combiner merges the NT terms.
// KA and KB are the plane counts of the two operands, W the pixels per plane.
// Purely combinational.
module ddp_sop_plane #(
  parameter int unsigned KA = 7,
  parameter int unsigned KB = 7,
  parameter int unsigned W  = 8,
  parameter int unsigned NT = 1,
  parameter logic [NT-1:0][KA-1:0] AMASK = '1,
  parameter logic [NT-1:0][KB-1:0] BMASK = '1
) (
  input  logic [KA-1:0][W-1:0] a,
  input  logic [KB-1:0][W-1:0] b,
  output logic [W-1:0]         y
);
  logic [NT-1:0][W-1:0] term;

  for (genvar t = 0; t < NT; t++) begin : g_term
    logic [W-1:0] a_sum, b_sum;
    ddp_plane_or  #(.K(KA), .W(W), .MASK(AMASK[t])) u_bc_a (.planes(a), .y(a_sum));
    ddp_plane_or  #(.K(KB), .W(W), .MASK(BMASK[t])) u_bc_b (.planes(b), .y(b_sum));
    ddp_plane_and #(.W(W))                          u_cas  (.a(a_sum), .b(b_sum), .y(term[t]));
  end

  ddp_plane_or #(.K(NT), .W(W), .MASK({NT{1'b1}})) u_bc_out (.planes(term), .y(y));
endmodule
