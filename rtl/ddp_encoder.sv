// ddp_encoder -- decomposes an array of QSD digits into its seven DDP planes.
//
// Input: PIX digits, each a 3-bit two's-complement value in -3..3. Output:
// seven planes of PIX pixels; plane k has a bright pixel where the digit
// equals k-3, so every pixel is bright in exactly one plane. The code -4
// (3'b100) is not a QSD digit and lights no plane. Pixel order is the
// caller's; the adder uses pixel (r*N + c)*ND + d for digit d of the number
// in row r, column c. Purely combinational.
module ddp_encoder
  import qsd_ddp_pkg::*;
#(
  parameter int unsigned PIX = 8
) (
  input  qsd_digit_t [PIX-1:0]           digits,
  output logic       [NDP-1:0][PIX-1:0]  planes
);
  always_comb begin
    planes = '0;
    for (int p = 0; p < PIX; p++)
      for (int k = 0; k < NDP; k++)
        if (digits[p] != qsd_digit_t'(-4) && int'(digits[p]) == k - 3)
          planes[k][p] = 1'b1;
  end
endmodule
