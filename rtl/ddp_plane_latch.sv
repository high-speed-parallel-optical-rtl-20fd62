// ddp_plane_latch -- holds a set of planes from one step of the adder to the
// next.
//
// It stands for the image-holding parts of the optical scheme: the spatial
// light modulators that show the input planes, and the detector arrays that
// catch the planes a step produces and drive the next step's modulators. W
// bits (all planes of one stage, packed) are captured on the rising clock
// edge when load is high and held otherwise. Reset (active-low, synchronous)
// darkens every pixel.
module ddp_plane_latch #(
  parameter int unsigned W = 560
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
