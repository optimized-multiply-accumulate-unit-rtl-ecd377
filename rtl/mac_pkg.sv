// mac_pkg: types and constants shared by the multiply-accumulate unit.
//
// MAC_N is the operand width of the unit (32 bits, the size the unit was
// simulated and synthesised at); the accumulator is 2*MAC_N bits wide.
// booth_sel_e names the magnitude a radix-4 Booth digit selects from the
// multiplicand, and booth_digit_t pairs it with the sign of the digit.
// booth_recode() maps one overlapping three-bit group of the multiplier,
// {b[2i+1], b[2i], b[2i-1]}, to its digit in {-2, -1, 0, +1, +2}.
package mac_pkg;

  parameter int unsigned MAC_N = 32;

  typedef enum logic [1:0] {
    SEL_ZERO = 2'd0,  // digit 0
    SEL_ONE  = 2'd1,  // digit +-1: the multiplicand itself
    SEL_TWO  = 2'd2   // digit +-2: the multiplicand shifted left by one
  } booth_sel_e;

  typedef struct packed {
    booth_sel_e sel;  // magnitude of the digit
    logic       neg;  // digit is negative
  } booth_digit_t;

  function automatic booth_digit_t booth_recode(input logic [2:0] grp);
    booth_digit_t d;
    unique case (grp)
      3'b000, 3'b111: begin d.sel = SEL_ZERO; d.neg = 1'b0; end
      3'b001, 3'b010: begin d.sel = SEL_ONE;  d.neg = 1'b0; end
      3'b011:         begin d.sel = SEL_TWO;  d.neg = 1'b0; end
      3'b100:         begin d.sel = SEL_TWO;  d.neg = 1'b1; end
      3'b101, 3'b110: begin d.sel = SEL_ONE;  d.neg = 1'b1; end
      default:        begin d.sel = SEL_ZERO; d.neg = 1'b0; end
    endcase
    return d;
  endfunction

endpackage
