// s1_pkg -- tables of the example Mealy FSM S1 and of its seven multi-level
// implementations.
//
// S1 has L=3 inputs x1..x3, N=5 microoperations y1..y5 and M=5 states a1..a5,
// binary state codes on R=3 bits (a1=000, a2=001, a3=010, a4=011, a5=100) and
// H=13 transitions. The S1_* arrays are its direct structural table (one entry
// per transition, in table order); the remaining arrays are the codes that
// each synthesis method puts on the same lines, and the decoder tables that
// the memory blocks hold. In every vector the leftmost (highest) bit carries
// the variable with index 1.
//
// Microinstructions (sets of microoperations) of S1, maximal encoding on
// N1=3 bits: Y1={y1}=000, Y2={y1,y2}=001, Y3={y2}=010, Y4={y2,y3}=011,
// Y5={y3,y4}=100, Y6={}=101, Y7={y1,y5}=110.
//
// The transition table, the encodings and the decoder tables follow the
// published method. Two of its tables disagree on the internal-state codes of a4 and
// of the lines of a4 under Y3; the codes used here are those that reproduce
// the behaviour of S1 (see the structure modules). The identifier codes of
// the shared encodings (PAY_S, PAY_SC) are not given for S1 and are chosen
// here: identifiers are numbered in table order within each current state.
package s1_pkg;

  localparam int unsigned L  = 3;  // inputs
  localparam int unsigned N  = 5;  // microoperations
  localparam int unsigned R  = 3;  // state variables
  localparam int unsigned H  = 13; // transitions
  localparam int unsigned N1 = 3;  // maximal encoding of microinstructions
  localparam int unsigned N2 = 2;  // multiple encoding of microinstructions
  localparam int unsigned R1 = 2;  // multiple encoding of states by current state
  localparam int unsigned R2 = 1;  // multiple encoding of states by microinstruction
  localparam int unsigned R3 = 2;  // shared encoding of identifiers

  typedef logic [R-1:0] state_t;
  typedef logic [L-1:0] in_t;
  typedef logic [N-1:0] mo_t;

  localparam state_t A1 = 3'b000, A2 = 3'b001, A3 = 3'b010, A4 = 3'b011, A5 = 3'b100;

  // Direct structural table. Input cubes are given as care mask and value
  // (x1 x2 x3); the comment shows the cube in KISS2 notation.
  //                                     h:   1       2       3       4       5       6       7       8       9       10      11      12      13
  //                                  cube:   11-     01-     -0-     -1-     -0-     -1-     -00     -01     --1     --0     1--     0-1     0-0
  localparam state_t S1_Q    [H] = '{A1,     A1,     A1,     A2,     A2,     A3,     A3,     A3,     A4,     A4,     A5,     A5,     A5};
  localparam in_t    S1_MASK [H] = '{3'b110, 3'b110, 3'b010, 3'b010, 3'b010, 3'b010, 3'b011, 3'b011, 3'b001, 3'b001, 3'b100, 3'b101, 3'b101};
  localparam in_t    S1_VAL  [H] = '{3'b110, 3'b010, 3'b000, 3'b010, 3'b000, 3'b010, 3'b000, 3'b001, 3'b001, 3'b000, 3'b100, 3'b001, 3'b000};
  localparam state_t S1_NEXT [H] = '{A2,     A3,     A4,     A3,     A4,     A3,     A4,     A5,     A5,     A3,     A1,     A5,     A4};
  localparam mo_t    S1_Y    [H] = '{5'b10000, 5'b11000, 5'b01000, 5'b11000, 5'b01000, 5'b01000, 5'b01000,
                                     5'b01100, 5'b00110, 5'b00000, 5'b10001, 5'b00110, 5'b01100};

  // Codes placed on each line by the synthesis methods.
  // z: maximal encoding of microinstructions (PY, PAY, PYY).
  localparam logic [N1-1:0] S1_Z     [H] = '{3'b000, 3'b001, 3'b010, 3'b001, 3'b010, 3'b010, 3'b010,
                                             3'b011, 3'b100, 3'b101, 3'b110, 3'b100, 3'b011};
  // psi: multiple encoding of microinstructions within each current state (PY0, PAY0).
  localparam logic [N2-1:0] S1_PSI   [H] = '{2'b00, 2'b01, 2'b10, 2'b00, 2'b01, 2'b00, 2'b00,
                                             2'b01, 2'b00, 2'b01, 2'b10, 2'b01, 2'b00};
  // tau: multiple encoding of next states within each current state (PA, PAY, PAY0).
  localparam logic [R1-1:0] S1_TAU_A [H] = '{2'b00, 2'b01, 2'b10, 2'b00, 2'b01, 2'b00, 2'b01,
                                             2'b10, 2'b00, 2'b01, 2'b00, 2'b10, 2'b01};
  // tau: multiple encoding of next states within each microinstruction (PYY).
  localparam logic [R2-1:0] S1_TAU_Y [H] = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1,
                                             1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0};
  // psi: shared identifier codes (PAY_S, PAY_SC), numbered per current state.
  localparam logic [R3-1:0] S1_ID    [H] = '{2'b00, 2'b01, 2'b10, 2'b00, 2'b01, 2'b00, 2'b01,
                                             2'b10, 2'b00, 2'b01, 2'b00, 2'b01, 2'b10};

  // Outputs of circuit P for each structure, one word per line.
  typedef logic [N+R-1:0]   p_p_t;     // {y, D} of a single-level machine
  typedef logic [N2+R-1:0]  py0_p_t;   // {psi, D}
  typedef logic [N+R1-1:0]  pa_p_t;    // {y, tau}
  typedef logic [N1+R1-1:0] pay_p_t;   // {z, tau}
  typedef logic [N1+R2-1:0] pyy_p_t;   // {z, tau}
  typedef logic [N2+R1-1:0] pay0_p_t;  // {psi, tau}

  typedef p_p_t    p_p_table_t    [H];
  typedef py0_p_t  py0_p_table_t  [H];
  typedef pa_p_t   pa_p_table_t   [H];
  typedef pay_p_t  pay_p_table_t  [H];
  typedef pyy_p_t  pyy_p_table_t  [H];
  typedef pay0_p_t pay0_p_table_t [H];

  function automatic p_p_table_t p_p_table();
    for (int h = 0; h < H; h++) p_p_table[h] = {S1_Y[h], S1_NEXT[h]};
  endfunction
  function automatic py0_p_table_t py0_p_table();
    for (int h = 0; h < H; h++) py0_p_table[h] = {S1_PSI[h], S1_NEXT[h]};
  endfunction
  function automatic pa_p_table_t pa_p_table();
    for (int h = 0; h < H; h++) pa_p_table[h] = {S1_Y[h], S1_TAU_A[h]};
  endfunction
  function automatic pay_p_table_t pay_p_table();
    for (int h = 0; h < H; h++) pay_p_table[h] = {S1_Z[h], S1_TAU_A[h]};
  endfunction
  function automatic pyy_p_table_t pyy_p_table();
    for (int h = 0; h < H; h++) pyy_p_table[h] = {S1_Z[h], S1_TAU_Y[h]};
  endfunction
  function automatic pay0_p_table_t pay0_p_table();
    for (int h = 0; h < H; h++) pay0_p_table[h] = {S1_PSI[h], S1_TAU_A[h]};
  endfunction

  localparam p_p_table_t    P_P    = p_p_table();
  localparam py0_p_table_t  PY0_P  = py0_p_table();
  localparam pa_p_table_t   PA_P   = pa_p_table();
  localparam pay_p_table_t  PAY_P  = pay_p_table();
  localparam pyy_p_table_t  PYY_P  = pyy_p_table();
  localparam pay0_p_table_t PAY0_P = pay0_p_table();

  // Decoder Y of the maximal encoding: address z, word y1..y5.
  typedef mo_t y_z_rom_t [2**N1];
  localparam y_z_rom_t PY_Y_ROM = '{
    3'b000: 5'b10000,  // Y1
    3'b001: 5'b11000,  // Y2
    3'b010: 5'b01000,  // Y3
    3'b011: 5'b01100,  // Y4
    3'b100: 5'b00110,  // Y5
    3'b101: 5'b00000,  // Y6
    3'b110: 5'b10001,  // Y7
    default: 5'b00000
  };

  // Decoder Y of the multiple encoding of microinstructions: address {Q, psi}.
  typedef mo_t y_qpsi_rom_t [2**(R+N2)];
  localparam y_qpsi_rom_t PY0_Y_ROM = '{
    5'b000_00: 5'b10000,
    5'b000_01: 5'b11000,
    5'b000_10: 5'b01000,
    5'b001_00: 5'b11000,
    5'b001_01: 5'b01000,
    5'b010_00: 5'b01000,
    5'b010_01: 5'b01100,
    5'b011_00: 5'b00110,
    5'b011_01: 5'b00000,
    5'b100_00: 5'b01100,
    5'b100_01: 5'b00110,
    5'b100_10: 5'b10001,
    default:   5'b00000
  };

  // Internal state code converter CC of the encoding by current state:
  // address {Q, tau}, word D1..D3 (the next-state code).
  typedef state_t cc_qtau_rom_t [2**(R+R1)];
  localparam cc_qtau_rom_t PA_CC_ROM = '{
    5'b000_00: A2,
    5'b000_01: A3,
    5'b000_10: A4,
    5'b001_00: A3,
    5'b001_01: A4,
    5'b010_00: A3,
    5'b010_01: A4,
    5'b010_10: A5,
    5'b011_00: A5,
    5'b011_01: A3,
    5'b100_00: A1,
    5'b100_01: A4,
    5'b100_10: A5,
    default:   A1
  };

  // Internal state code converter CC of the encoding by microinstruction:
  // address {z, tau}, word D1..D3.
  typedef state_t cc_ztau_rom_t [2**(N1+R2)];
  localparam cc_ztau_rom_t PYY_CC_ROM = '{
    4'b000_0: A2,
    4'b001_0: A3,
    4'b010_0: A3,
    4'b010_1: A4,
    4'b011_0: A4,
    4'b011_1: A5,
    4'b100_0: A5,
    4'b101_0: A3,
    4'b110_0: A1,
    default:  A1
  };

  // Shared encoding: decoder Y, converter CC and common decoder YCC, all
  // addressed by {Q, psi}. Formed from the transformed structural table: the
  // word at {K(a_m), K_m(I)} is the microinstruction and/or next state of the
  // line that carries identifier I.
  typedef mo_t                y_id_rom_t   [2**(R+R3)];
  typedef state_t             cc_id_rom_t  [2**(R+R3)];
  typedef logic [N+R-1:0]     ycc_id_rom_t [2**(R+R3)];

  function automatic y_id_rom_t pays_y_rom();
    pays_y_rom = '{default: '0};
    for (int h = 0; h < H; h++) pays_y_rom[{S1_Q[h], S1_ID[h]}] = S1_Y[h];
  endfunction
  function automatic cc_id_rom_t pays_cc_rom();
    pays_cc_rom = '{default: '0};
    for (int h = 0; h < H; h++) pays_cc_rom[{S1_Q[h], S1_ID[h]}] = S1_NEXT[h];
  endfunction
  function automatic ycc_id_rom_t paysc_ycc_rom();
    paysc_ycc_rom = '{default: '0};
    for (int h = 0; h < H; h++) paysc_ycc_rom[{S1_Q[h], S1_ID[h]}] = {S1_Y[h], S1_NEXT[h]};
  endfunction

  localparam y_id_rom_t   PAYS_Y_ROM    = pays_y_rom();
  localparam cc_id_rom_t  PAYS_CC_ROM   = pays_cc_rom();
  localparam ycc_id_rom_t PAYSC_YCC_ROM = paysc_ycc_rom();

endpackage
