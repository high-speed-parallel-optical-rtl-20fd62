// ddp_sum_gen -- first step, intermediate-sum planes.
//
// For every digit pair (x, y) of the addend and augend arrays the first step
// writes x + y = 4c + s with s in -2..2 and c in -1..1. This block makes the
// five planes of s directly from the seven DDP planes of each operand, all
// pixels at once: each sum plane is one sum-of-products equation over the
// operand planes (terms listed in qsd_ddp_pkg, one ddp_sop_plane per plane).
// A sum of 6 or 2 gives s = 2, 5/1/-3 give 1, 4/0/-4 give 0, 3/-1/-5 give -1
// and -2/-6 give -2.
//
// Ports: a, b are 7 x PIX operand planes (plane k = digit k-3); s is 5 x PIX
// (plane k = sum k-2). Purely combinational.
module ddp_sum_gen
  import qsd_ddp_pkg::*;
#(
  parameter int unsigned PIX = 80
) (
  input  logic [NDP-1:0][PIX-1:0] a,
  input  logic [NDP-1:0][PIX-1:0] b,
  output logic [NSP-1:0][PIX-1:0] s
);
  ddp_sop_plane #(.KA(NDP), .KB(NDP), .W(PIX), .NT(5), .AMASK(S2_A),  .BMASK(S2_B))
    u_s2  (.a(a), .b(b), .y(s[4]));
  ddp_sop_plane #(.KA(NDP), .KB(NDP), .W(PIX), .NT(4), .AMASK(S1_A),  .BMASK(S1_B))
    u_s1  (.a(a), .b(b), .y(s[3]));
  ddp_sop_plane #(.KA(NDP), .KB(NDP), .W(PIX), .NT(4), .AMASK(S0_A),  .BMASK(S0_B))
    u_s0  (.a(a), .b(b), .y(s[2]));
  ddp_sop_plane #(.KA(NDP), .KB(NDP), .W(PIX), .NT(4), .AMASK(SN1_A), .BMASK(SN1_B))
    u_sn1 (.a(a), .b(b), .y(s[1]));
  ddp_sop_plane #(.KA(NDP), .KB(NDP), .W(PIX), .NT(5), .AMASK(SN2_A), .BMASK(SN2_B))
    u_sn2 (.a(a), .b(b), .y(s[0]));
endmodule
