// s2_pkg -- tables of the fragment of the Mealy FSM S2 used to show the
// shared multiple encoding of identifiers (structures PAY_S and PAY_SC).
//
// Only the transitions leaving states a5, a6 and a7 of S2 are described. S2
// has R=4 state variables (a5=0101, a6=0110, a7=0111, a8=1000, a9=1001,
// a10=1010), N=5 microoperations and inputs up to x8 (L=8). Each transition is
// an identifier I = <next state, microinstruction>, coded on R3=3 bits psi1
// psi2 psi3 within its current state. The codes were placed in Karnaugh maps
// so that psi1 psi2 alone name the microinstruction (Psi_Z) and psi2 psi3
// alone name the next state (Psi_tau) within each current state.
//
// Microinstructions: Y1={y2,y3}, Y2={y4}, Y3={y3,y4}, Y4={y4,y5}, Y5={y5},
// Y6={y3,y4,y5}. The transition of a7 to a8 under Y6 carries code 100 (the
// code that its decoder tables and Karnaugh map give). As everywhere, the
// leftmost bit of a vector is the variable with index 1.
package s2_pkg;

  localparam int unsigned L  = 8;
  localparam int unsigned N  = 5;
  localparam int unsigned R  = 4;
  localparam int unsigned H  = 14;
  localparam int unsigned R3 = 3;

  typedef logic [R-1:0] state_t;
  typedef logic [L-1:0] in_t;
  typedef logic [N-1:0] mo_t;
  typedef logic [R3-1:0] id_t;

  localparam state_t A5 = 4'b0101, A6 = 4'b0110, A7 = 4'b0111,
                     A8 = 4'b1000, A9 = 4'b1001, A10 = 4'b1010;

  // Structural table of the fragment. Cubes over x1..x8:
  //  1 --1-----   2 --01----   3 --00----   4 ---111--   5 ---110--
  //  6 ---101--   7 ---100--   8 ---0-1--   9 ---0-0--  10 ----1-11
  // 11 ----0-11  12 ----1-01  13 ----0-01  14 -------0
  localparam state_t S2_Q    [H] = '{A5, A5, A5, A6, A6, A6, A6, A6, A6, A7, A7, A7, A7, A7};
  localparam in_t    S2_MASK [H] = '{8'b00100000, 8'b00110000, 8'b00110000, 8'b00011100, 8'b00011100,
                                     8'b00011100, 8'b00011100, 8'b00010100, 8'b00010100, 8'b00001011,
                                     8'b00001011, 8'b00001011, 8'b00001011, 8'b00000001};
  localparam in_t    S2_VAL  [H] = '{8'b00100000, 8'b00010000, 8'b00000000, 8'b00011100, 8'b00011000,
                                     8'b00010100, 8'b00010000, 8'b00000100, 8'b00000000, 8'b00001011,
                                     8'b00000011, 8'b00001001, 8'b00000001, 8'b00000000};
  localparam state_t S2_NEXT [H] = '{A6, A7, A7, A7, A7, A8, A9, A9, A10, A8, A8, A9, A9, A10};
  localparam mo_t    S2_Y    [H] = '{5'b01100, 5'b00010, 5'b00110, 5'b00010, 5'b00110, 5'b00010, 5'b00011,
                                     5'b00001, 5'b00001, 5'b00010, 5'b00111, 5'b00010, 5'b00111, 5'b00111};
  // Identifier codes psi1 psi2 psi3 of each line.
  localparam id_t    S2_ID   [H] = '{3'b000, 3'b011, 3'b111, 3'b000, 3'b100, 3'b001, 3'b110,
                                     3'b010, 3'b011, 3'b000, 3'b100, 3'b011, 3'b111, 3'b110};

  // Microoperation decoder Y of PAY_S: address {Q, psi1 psi2}.
  typedef mo_t y_rom_t [2**(R+2)];
  localparam y_rom_t PAYS_Y_ROM = '{
    6'b0101_00: 5'b01100,  // *0 -> Y1
    6'b0101_10: 5'b01100,
    6'b0101_01: 5'b00010,  // Y2
    6'b0101_11: 5'b00110,  // Y3
    6'b0110_00: 5'b00010,  // Y2
    6'b0110_10: 5'b00110,  // Y3
    6'b0110_11: 5'b00011,  // Y4
    6'b0110_01: 5'b00001,  // Y5
    6'b0111_00: 5'b00010,  // 0* -> Y2
    6'b0111_01: 5'b00010,
    6'b0111_10: 5'b00111,  // 1* -> Y6
    6'b0111_11: 5'b00111,
    default:    5'b00000
  };

  // Internal state code converter CC of PAY_S: address {Q, psi2 psi3}.
  typedef state_t cc_rom_t [2**(R+2)];
  localparam cc_rom_t PAYS_CC_ROM = '{
    6'b0101_00: A6,   // 0* -> a6
    6'b0101_01: A6,
    6'b0101_10: A7,   // 1* -> a7
    6'b0101_11: A7,
    6'b0110_00: A7,
    6'b0110_01: A8,
    6'b0110_10: A9,
    6'b0110_11: A10,
    6'b0111_00: A8,   // 0* -> a8
    6'b0111_01: A8,
    6'b0111_11: A9,
    6'b0111_10: A10,
    default:    4'b0000
  };

  // Common decoder YCC of PAY_SC: address {Q, psi1 psi2 psi3}, word {y, D}.
  typedef logic [N+R-1:0] ycc_rom_t [2**(R+R3)];
  localparam ycc_rom_t PAYSC_YCC_ROM = '{
    7'b0101_000: {5'b01100, A6},
    7'b0101_011: {5'b00010, A7},
    7'b0101_111: {5'b00110, A7},
    7'b0110_000: {5'b00010, A7},
    7'b0110_001: {5'b00010, A8},
    7'b0110_010: {5'b00001, A9},
    7'b0110_011: {5'b00001, A10},
    7'b0110_100: {5'b00110, A7},
    7'b0110_110: {5'b00011, A9},
    7'b0111_000: {5'b00010, A8},
    7'b0111_011: {5'b00010, A9},
    7'b0111_100: {5'b00111, A8},
    7'b0111_110: {5'b00111, A10},
    7'b0111_111: {5'b00111, A9},
    default:     '0
  };

endpackage
