// ddp_carry_gen -- first step, intermediate-carry planes.
//
// Companion of ddp_sum_gen: for every digit pair (x, y) it makes the three
// planes of the carry c in x + y = 4c + s. c = 1 when x + y >= 3, c = -1
// when x + y <= -3 and c = 0 otherwise. Each plane is a sum-of-products
// equation over the operand planes (terms in qsd_ddp_pkg); the zero-carry
// plane is built from its own seven terms, not as the complement of the
// other two, so that an invalid (dark) input pixel gives a dark carry.
//
// Ports: a, b are 7 x PIX operand planes (plane k = digit k-3); c is 3 x PIX
// (plane k = carry k-1). Purely combinational.
module ddp_carry_gen
  import qsd_ddp_pkg::*;
#(
  parameter int unsigned PIX = 80
) (
  input  logic [NDP-1:0][PIX-1:0] a,
  input  logic [NDP-1:0][PIX-1:0] b,
  output logic [NCP-1:0][PIX-1:0] c
);
  ddp_sop_plane #(.KA(NDP), .KB(NDP), .W(PIX), .NT(4), .AMASK(C1_A),  .BMASK(C1_B))
    u_c1  (.a(a), .b(b), .y(c[2]));
  ddp_sop_plane #(.KA(NDP), .KB(NDP), .W(PIX), .NT(7), .AMASK(C0_A),  .BMASK(C0_B))
    u_c0  (.a(a), .b(b), .y(c[1]));
  ddp_sop_plane #(.KA(NDP), .KB(NDP), .W(PIX), .NT(4), .AMASK(CN1_A), .BMASK(CN1_B))
    u_cn1 (.a(a), .b(b), .y(c[0]));
endmodule
