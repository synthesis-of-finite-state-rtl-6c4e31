// s1_ref_pkg -- behavioural reference of the example Mealy FSM S1, written
// directly from its state transition and output table (symbolic states, no
// codes, no encodings), used by the testbenches to check every structure.
//
// s1_step(state, x) returns the next state, the microoperations y1..y5 of
// the transition and the number h (1..13) of the table line that fired.
package s1_ref_pkg;

  typedef enum logic [2:0] {
    S_A1 = 3'b000, S_A2 = 3'b001, S_A3 = 3'b010, S_A4 = 3'b011, S_A5 = 3'b100
  } s1_state_e;   // values are the binary state codes K(a1)..K(a5)

  typedef struct packed {
    s1_state_e  next;
    logic [4:0] y;      // y1 is bit 4
    logic [3:0] line;
  } s1_step_t;

  function automatic s1_step_t s1_step(s1_state_e s, logic [2:0] x);
    logic x1, x2, x3;
    {x1, x2, x3} = x;
    unique case (s)
      S_A1: if (x1 && x2)  return '{S_A2, 5'b10000, 4'd1};
            else if (x2)   return '{S_A3, 5'b11000, 4'd2};
            else           return '{S_A4, 5'b01000, 4'd3};
      S_A2: if (x2)        return '{S_A3, 5'b11000, 4'd4};
            else           return '{S_A4, 5'b01000, 4'd5};
      S_A3: if (x2)        return '{S_A3, 5'b01000, 4'd6};
            else if (!x3)  return '{S_A4, 5'b01000, 4'd7};
            else           return '{S_A5, 5'b01100, 4'd8};
      S_A4: if (x3)        return '{S_A5, 5'b00110, 4'd9};
            else           return '{S_A3, 5'b00000, 4'd10};
      S_A5: if (x1)        return '{S_A1, 5'b10001, 4'd11};
            else if (x3)   return '{S_A5, 5'b00110, 4'd12};
            else           return '{S_A4, 5'b01100, 4'd13};
      default:             return '{S_A1, 5'b00000, 4'd0};
    endcase
  endfunction

endpackage
