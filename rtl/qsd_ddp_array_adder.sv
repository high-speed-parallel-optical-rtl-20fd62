// qsd_ddp_array_adder -- two-step carry-free adder for two-dimensional arrays
// of quaternary signed-digit (QSD) numbers coded as digit-decomposition
// planes (DDP).
//
// Operands are two M x N arrays of ND-digit QSD numbers (digits -3..3).
// Number (r, c) has its digit d at pixel p = (r*N + c)*ND + d, d = 0 being
// the least significant digit. The operand digits are split into seven
// one-hot planes (ddp_encoder) and held in the input latch. Step 1 forms,
// for every digit pair in parallel, the intermediate sum planes (ddp_sum_gen)
// and carry planes (ddp_carry_gen) with x + y = 4c + s; they are held in the
// intermediate latch. Step 2 widens the numbers to ND+1 digits, moves every
// carry one digit up (ddp_expand_shift) and forms z = s + c' plane by plane
// (ddp_result_gen) into the output latch. The time per addition does not
// depend on M, N or ND.
//
// Interface: in_valid/in_ready take a_digits/b_digits; out_valid pulses for
// one cycle when z_planes (7 planes of M*N*(ND+1) pixels, plane k = digit
// k-3, pixel (r*N + c)*(ND+1) + d) holds a new result. Timing: z_planes
// and out_valid change on the second clock edge after the accept edge, and
// a new operation is accepted every two cycles (qsd_adder_ctrl), whatever
// the array size.
//
// Defaults M = 10, N = 2, ND = 4 are the size of the worked example of the
// design. The latches, the handshake and the digit-code interface are this
// implementation's own choices.
module qsd_ddp_array_adder
  import qsd_ddp_pkg::*;
#(
  parameter int unsigned M  = 10,
  parameter int unsigned N  = 2,
  parameter int unsigned ND = 4,
  localparam int unsigned NUM  = M * N,
  localparam int unsigned PIN  = NUM * ND,
  localparam int unsigned POUT = NUM * (ND + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  qsd_digit_t [PIN-1:0]     a_digits,
  input  qsd_digit_t [PIN-1:0]     b_digits,
  output logic                     out_valid,
  output logic                     busy,
  output logic [NDP-1:0][POUT-1:0] z_planes
);
  logic load_in, load_mid, load_out;

  logic [NDP-1:0][PIN-1:0]  a_enc, b_enc, a_slm, b_slm;
  logic [NSP-1:0][PIN-1:0]  s_gen, s_lda;
  logic [NCP-1:0][PIN-1:0]  c_gen, c_lda;
  logic [NSP-1:0][POUT-1:0] s_ext;
  logic [NCP-1:0][POUT-1:0] c_shift;
  logic [NDP-1:0][POUT-1:0] z_gen;

  qsd_adder_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready,
    .load_in, .load_mid, .load_out, .out_valid, .busy
  );

  // Input coding and input image hold.
  ddp_encoder #(.PIX(PIN)) u_enc_a (.digits(a_digits), .planes(a_enc));
  ddp_encoder #(.PIX(PIN)) u_enc_b (.digits(b_digits), .planes(b_enc));
  ddp_plane_latch #(.W(2*NDP*PIN)) u_in_latch (
    .clk, .rst_n, .load(load_in), .d({a_enc, b_enc}), .q({a_slm, b_slm})
  );

  // Step 1: intermediate sum and carry.
  ddp_sum_gen   #(.PIX(PIN)) u_sum   (.a(a_slm), .b(b_slm), .s(s_gen));
  ddp_carry_gen #(.PIX(PIN)) u_carry (.a(a_slm), .b(b_slm), .c(c_gen));
  ddp_plane_latch #(.W((NSP+NCP)*PIN)) u_mid_latch (
    .clk, .rst_n, .load(load_mid), .d({s_gen, c_gen}), .q({s_lda, c_lda})
  );

  // Step 2: expand / shift, then final result.
  ddp_expand_shift #(.NUM(NUM), .ND(ND)) u_xs (
    .s_in(s_lda), .c_in(c_lda), .s_ext(s_ext), .c_shift(c_shift)
  );
  ddp_result_gen #(.PIX(POUT)) u_res (.s(s_ext), .cs(c_shift), .z(z_gen));
  ddp_plane_latch #(.W(NDP*POUT)) u_out_latch (
    .clk, .rst_n, .load(load_out), .d(z_gen), .q(z_planes)
  );
endmodule
