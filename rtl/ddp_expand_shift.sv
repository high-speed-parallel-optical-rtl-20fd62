// ddp_expand_shift -- widens the first-step planes from n to n+1 digits and
// aligns each carry with the sum digit it is added to.
//
// The planes hold NUM = M*N numbers of ND digits each; digit d of number q
// sits at pixel q*ND + d (d = 0 is the least significant digit). Outputs
// have ND+1 digits per number, pixel q*(ND+1) + d:
//   * sum planes: digits 0..ND-1 copied, digit ND padded with a zero digit;
//   * carry planes (C'): every carry moves one digit up (c_(d-1) goes to
//     digit d) and digit 0 is padded with a zero digit.
// A zero digit is a bright pixel in the value-0 plane and dark in the others,
// so the second step sees s = 0 at the top and c' = 0 at the bottom. The
// shift stays inside each number: no carry crosses from one number to the
// next. In the optical scheme this is where the detected first-step planes
// drive the second-step modulators as widened and shifted copies; in logic
// it costs no gates, only a fixed re-ordering of wires and constant pad
// bits. Combinational.
module ddp_expand_shift
  import qsd_ddp_pkg::*;
#(
  parameter int unsigned NUM = 20,
  parameter int unsigned ND  = 4
) (
  input  logic [NSP-1:0][NUM*ND-1:0]     s_in,
  input  logic [NCP-1:0][NUM*ND-1:0]     c_in,
  output logic [NSP-1:0][NUM*(ND+1)-1:0] s_ext,
  output logic [NCP-1:0][NUM*(ND+1)-1:0] c_shift
);
  always_comb begin
    for (int q = 0; q < NUM; q++) begin
      for (int k = 0; k < NSP; k++) begin
        for (int d = 0; d < ND; d++)
          s_ext[k][q*(ND+1) + d] = s_in[k][q*ND + d];
        s_ext[k][q*(ND+1) + ND] = (k == SIDX0);
      end
      for (int k = 0; k < NCP; k++) begin
        c_shift[k][q*(ND+1)] = (k == CIDX0);
        for (int d = 1; d <= ND; d++)
          c_shift[k][q*(ND+1) + d] = c_in[k][q*ND + d - 1];
      end
    end
  end
endmodule
