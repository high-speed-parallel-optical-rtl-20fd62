// ddp_plane_and -- cascade of two planes: pixel-wise AND.
//
// Two equally sized planes placed one behind the other pass light at a pixel
// only where both are transparent, so the output pixel is bright when the
// pixel is bright in both inputs. W is the number of pixels. Purely
// combinational, no clock.
module ddp_plane_and #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a & b;
endmodule
