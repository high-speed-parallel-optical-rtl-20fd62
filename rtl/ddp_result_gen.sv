// ddp_result_gen -- second step, final-result planes.
//
// Adds each intermediate sum digit s_i to the carry c_(i-1) of the next
// lower digit, z_i = s_i + c_(i-1), which always lands in -3..3, so no new
// carry arises. The inputs are the expanded sum planes and the shifted carry
// planes C' from ddp_expand_shift, already aligned pixel for pixel; each of
// the seven result planes is a sum of products of one sum plane and one
// carry plane (terms in qsd_ddp_pkg), covering the fifteen (s, c') pairs.
//
// Ports: s is 5 x PIX (plane k = k-2), cs is 3 x PIX (plane k = k-1), z is
// 7 x PIX (plane k = digit k-3). Purely combinational.
module ddp_result_gen
  import qsd_ddp_pkg::*;
#(
  parameter int unsigned PIX = 100
) (
  input  logic [NSP-1:0][PIX-1:0] s,
  input  logic [NCP-1:0][PIX-1:0] cs,
  output logic [NDP-1:0][PIX-1:0] z
);
  ddp_sop_plane #(.KA(NSP), .KB(NCP), .W(PIX), .NT(1), .AMASK(Z3_A),  .BMASK(Z3_B))
    u_z3  (.a(s), .b(cs), .y(z[6]));
  ddp_sop_plane #(.KA(NSP), .KB(NCP), .W(PIX), .NT(2), .AMASK(Z2_A),  .BMASK(Z2_B))
    u_z2  (.a(s), .b(cs), .y(z[5]));
  ddp_sop_plane #(.KA(NSP), .KB(NCP), .W(PIX), .NT(3), .AMASK(Z1_A),  .BMASK(Z1_B))
    u_z1  (.a(s), .b(cs), .y(z[4]));
  ddp_sop_plane #(.KA(NSP), .KB(NCP), .W(PIX), .NT(3), .AMASK(Z0_A),  .BMASK(Z0_B))
    u_z0  (.a(s), .b(cs), .y(z[3]));
  ddp_sop_plane #(.KA(NSP), .KB(NCP), .W(PIX), .NT(3), .AMASK(ZN1_A), .BMASK(ZN1_B))
    u_zn1 (.a(s), .b(cs), .y(z[2]));
  ddp_sop_plane #(.KA(NSP), .KB(NCP), .W(PIX), .NT(2), .AMASK(ZN2_A), .BMASK(ZN2_B))
    u_zn2 (.a(s), .b(cs), .y(z[1]));
  ddp_sop_plane #(.KA(NSP), .KB(NCP), .W(PIX), .NT(1), .AMASK(ZN3_A), .BMASK(ZN3_B))
    u_zn3 (.a(s), .b(cs), .y(z[0]));
endmodule
