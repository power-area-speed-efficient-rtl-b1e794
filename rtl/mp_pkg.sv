// Shared types and constants of the multiprecision multiplier system.
//
// precision_e is the 2-bit operating mode ("algorithm") of the multiplier:
// 2'b11 selects a single 32x32 product, 2'b01 three independent 16x16
// products and 2'b00 nine independent 8x8 products. Only the 2'b11 code is
// fixed by the reference simulation of the design; the other codes, and the
// decoding of the unused 2'b10 code as 32x32, are this design's choice.
// booth_sel_t is the recoded radix-4 Booth digit (see booth_encoder).
package mp_pkg;

  typedef enum logic [1:0] {
    PREC_8X8   = 2'b00,
    PREC_16X16 = 2'b01,
    PREC_RSVD  = 2'b10,
    PREC_32X32 = 2'b11
  } precision_e;

  // Booth digit in sign/magnitude form: value = (neg ? -1 : 1) * (one ? 1 : two ? 2 : 0)
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_sel_t;

  // Number of independent lanes in each mode.
  function automatic int unsigned lanes_of(precision_e p);
    case (p)
      PREC_8X8:   return 9;
      PREC_16X16: return 3;
      default:    return 1;
    endcase
  endfunction

endpackage
