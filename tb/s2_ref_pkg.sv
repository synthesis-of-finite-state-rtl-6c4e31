// s2_ref_pkg -- behavioural reference of the transitions of FSM S2 that leave
// states a5, a6 and a7, written directly from its structural table (input
// conditions, next-state codes and microoperations; no identifier codes).
//
// s2_step(q, x) returns {y1..y5, D1..D4} and the line number 1..14 that
// fired; x[7] is x1.
package s2_ref_pkg;

  typedef struct packed {
    logic [4:0] y;
    logic [3:0] d;
    logic [3:0] line;
  } s2_step_t;

  function automatic s2_step_t s2_step(logic [3:0] q, logic [7:0] x);
    logic x3, x4, x5, x6, x7, x8;
    x3 = x[5]; x4 = x[4]; x5 = x[3]; x6 = x[2]; x7 = x[1]; x8 = x[0];
    case (q)
      4'b0101: begin // a5
        if (x3)            return '{5'b01100, 4'b0110, 4'd1};
        else if (x4)       return '{5'b00010, 4'b0111, 4'd2};
        else               return '{5'b00110, 4'b0111, 4'd3};
      end
      4'b0110: begin // a6
        if (x4) begin
          if (x5 && x6)    return '{5'b00010, 4'b0111, 4'd4};
          else if (x5)     return '{5'b00110, 4'b0111, 4'd5};
          else if (x6)     return '{5'b00010, 4'b1000, 4'd6};
          else             return '{5'b00011, 4'b1001, 4'd7};
        end
        else if (x6)       return '{5'b00001, 4'b1001, 4'd8};
        else               return '{5'b00001, 4'b1010, 4'd9};
      end
      4'b0111: begin // a7
        if (!x8)           return '{5'b00111, 4'b1010, 4'd14};
        else if (x5 && x7) return '{5'b00010, 4'b1000, 4'd10};
        else if (x7)       return '{5'b00111, 4'b1000, 4'd11};
        else if (x5)       return '{5'b00010, 4'b1001, 4'd12};
        else               return '{5'b00111, 4'b1001, 4'd13};
      end
      default:             return '{5'b00000, 4'b0000, 4'd0};
    endcase
  endfunction

endpackage
