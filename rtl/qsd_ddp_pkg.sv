// qsd_ddp_pkg -- shared constants for the DDP-coded quaternary signed-digit
// (QSD) array adder.
//
// A QSD digit takes one of the seven values -3..3 and is carried as a 3-bit
// two's-complement number (qsd_digit_t). In the digit-decomposition-plane
// (DDP) code an array of digits becomes seven one-bit planes, one per digit
// value; a pixel is bright (1) in exactly the plane of its digit. Plane k of
// a digit array holds value k-3, plane k of an intermediate sum holds k-2
// and plane k of an intermediate carry holds k-1.
//
// The constants below are plane masks. Every output plane of the adder is a
// sum of products "(OR of some planes of X) AND (OR of some planes of Y)";
// a product term is written as two masks that select the planes fed to the
// two beam combiners, and the *_A / *_B arrays list the terms of one output
// plane in matching order. The terms are those of the adder's logic
// equations (step 1: sum planes S2..S-2, carry planes C1, C0, C-1; step 2:
// result planes Z3..Z-3); the carry-zero plane C0 keeps the seven-term form
// of its equation rather than the complement of C1 and C-1.
package qsd_ddp_pkg;

  typedef logic signed [2:0] qsd_digit_t;

  localparam int unsigned NDP = 7;  // planes of a digit array   (-3..3)
  localparam int unsigned NSP = 5;  // planes of a sum array     (-2..2)
  localparam int unsigned NCP = 3;  // planes of a carry array   (-1..1)

  // Digit-plane masks, bit k = plane of value k-3.
  localparam logic [NDP-1:0] DP3 = 7'b100_0000;
  localparam logic [NDP-1:0] DP2 = 7'b010_0000;
  localparam logic [NDP-1:0] DP1 = 7'b001_0000;
  localparam logic [NDP-1:0] D0  = 7'b000_1000;
  localparam logic [NDP-1:0] DN1 = 7'b000_0100;
  localparam logic [NDP-1:0] DN2 = 7'b000_0010;
  localparam logic [NDP-1:0] DN3 = 7'b000_0001;

  // Sum-plane masks, bit k = value k-2.
  localparam logic [NSP-1:0] SP2 = 5'b10000;
  localparam logic [NSP-1:0] SP1 = 5'b01000;
  localparam logic [NSP-1:0] S0  = 5'b00100;
  localparam logic [NSP-1:0] SN1 = 5'b00010;
  localparam logic [NSP-1:0] SN2 = 5'b00001;

  // Carry-plane masks, bit k = value k-1.
  localparam logic [NCP-1:0] CP1 = 3'b100;
  localparam logic [NCP-1:0] C0  = 3'b010;
  localparam logic [NCP-1:0] CN1 = 3'b001;

  // Plane indices of the zero digit in each code (used for padding).
  localparam int unsigned SIDX0 = 2;
  localparam int unsigned CIDX0 = 1;

  // ---------------- step 1: intermediate sum (x + y = 4c + s) ----------------
  // S2 = A3(B3+B-1) + A2 B0 + A0 B2 + A-1 B3 + A1 B1
  localparam logic [4:0][NDP-1:0] S2_A = {DP3,       DP2, D0,  DN1, DP1};
  localparam logic [4:0][NDP-1:0] S2_B = {DP3 | DN1, D0,  DP2, DP3, DP1};
  // S1 = (A2+A-2)(B3+B-1) + (A3+A-1)(B2+B-2) + A0(B1+B-3) + (A1+A-3)B0
  localparam logic [3:0][NDP-1:0] S1_A = {DP2 | DN2, DP3 | DN1, D0,        DP1 | DN3};
  localparam logic [3:0][NDP-1:0] S1_B = {DP3 | DN1, DP2 | DN2, DP1 | DN3, D0};
  // S0 = (A3+A-1)(B1+B-3) + (A1+A-3)(B3+B-1) + (A2+A-2)(B2+B-2) + A0 B0
  localparam logic [3:0][NDP-1:0] S0_A = {DP3 | DN1, DP1 | DN3, DP2 | DN2, D0};
  localparam logic [3:0][NDP-1:0] S0_B = {DP1 | DN3, DP3 | DN1, DP2 | DN2, D0};
  // S-1 = (A2+A-2)(B1+B-3) + (A1+A-3)(B2+B-2) + A0(B3+B-1) + (A3+A-1)B0
  localparam logic [3:0][NDP-1:0] SN1_A = {DP2 | DN2, DP1 | DN3, D0,        DP3 | DN1};
  localparam logic [3:0][NDP-1:0] SN1_B = {DP1 | DN3, DP2 | DN2, DP3 | DN1, D0};
  // S-2 = A-3(B1+B-3) + A-2 B0 + A0 B-2 + A1 B-3 + A-1 B-1
  localparam logic [4:0][NDP-1:0] SN2_A = {DN3,       DN2, D0,  DP1, DN1};
  localparam logic [4:0][NDP-1:0] SN2_B = {DP1 | DN3, D0,  DN2, DN3, DN1};

  // ---------------- step 1: intermediate carry ----------------
  // C1 = (A3+A2)(B3+B2+B1) + A1(B3+B2) + A3 B0 + A0 B3
  localparam logic [3:0][NDP-1:0] C1_A = {DP3 | DP2,       DP1,       DP3, D0};
  localparam logic [3:0][NDP-1:0] C1_B = {DP3 | DP2 | DP1, DP3 | DP2, D0,  DP3};
  // C0 = (A3+A2+A1)(B-1+B-2+B-3) + (A-1+A-2+A-3)(B3+B2+B1)
  //    + (A2+A1+A-1+A-2)B0 + A0(B2+B1+B-1+B-2) + A1 B1 + A0 B0 + A-1 B-1
  localparam logic [6:0][NDP-1:0] C0_A = {DP3 | DP2 | DP1, DN1 | DN2 | DN3,
                                          DP2 | DP1 | DN1 | DN2, D0,
                                          DP1, D0, DN1};
  localparam logic [6:0][NDP-1:0] C0_B = {DN1 | DN2 | DN3, DP3 | DP2 | DP1,
                                          D0, DP2 | DP1 | DN1 | DN2,
                                          DP1, D0, DN1};
  // C-1 = (A-3+A-2)(B-3+B-2+B-1) + A-1(B-3+B-2) + A-3 B0 + A0 B-3
  localparam logic [3:0][NDP-1:0] CN1_A = {DN3 | DN2,       DN1,       DN3, D0};
  localparam logic [3:0][NDP-1:0] CN1_B = {DN3 | DN2 | DN1, DN3 | DN2, D0,  DN3};

  // ---------------- step 2: final result z = s + c' ----------------
  // Z3  = S2 C'1
  // Z2  = S2 C'0  + S1 C'1
  // Z1  = S2 C'-1 + S1 C'0  + S0 C'1
  // Z0  = S1 C'-1 + S0 C'0  + S-1 C'1
  // Z-1 = S0 C'-1 + S-1 C'0 + S-2 C'1
  // Z-2 = S-2 C'0 + S-1 C'-1
  // Z-3 = S-2 C'-1
  localparam logic [0:0][NSP-1:0] Z3_A  = {SP2};
  localparam logic [0:0][NCP-1:0] Z3_B  = {CP1};
  localparam logic [1:0][NSP-1:0] Z2_A  = {SP2, SP1};
  localparam logic [1:0][NCP-1:0] Z2_B  = {C0,  CP1};
  localparam logic [2:0][NSP-1:0] Z1_A  = {SP2, SP1, S0};
  localparam logic [2:0][NCP-1:0] Z1_B  = {CN1, C0,  CP1};
  localparam logic [2:0][NSP-1:0] Z0_A  = {SP1, S0,  SN1};
  localparam logic [2:0][NCP-1:0] Z0_B  = {CN1, C0,  CP1};
  localparam logic [2:0][NSP-1:0] ZN1_A = {S0,  SN1, SN2};
  localparam logic [2:0][NCP-1:0] ZN1_B = {CN1, C0,  CP1};
  localparam logic [1:0][NSP-1:0] ZN2_A = {SN2, SN1};
  localparam logic [1:0][NCP-1:0] ZN2_B = {C0,  CN1};
  localparam logic [0:0][NSP-1:0] ZN3_A = {SN2};
  localparam logic [0:0][NCP-1:0] ZN3_B = {CN1};

endpackage
