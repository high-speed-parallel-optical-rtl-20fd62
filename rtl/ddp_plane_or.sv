// ddp_plane_or -- beam combiner: pixel-wise OR of a chosen set of planes.
//
// In the optical adder a beam combiner merges the light that passed through
// several planes, so an output pixel is bright when the same pixel is bright
// in any of the combined planes. Here the K input planes of W pixels each
// come in as one packed array and the parameter MASK picks which of them
// take part (bit k set = plane k is combined). An empty MASK gives a dark
// plane. Purely combinational, no clock.
module ddp_plane_or #(
  parameter int unsigned K    = 2,
  parameter int unsigned W    = 8,
  parameter logic [K-1:0] MASK = '1
) (
  input  logic [K-1:0][W-1:0] planes,
  output logic [W-1:0]        y
);
  always_comb begin
    y = '0;
    for (int k = 0; k < K; k++)
      if (MASK[k]) y |= planes[k];
  end
endmodule
