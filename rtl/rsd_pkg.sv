// rsd_pkg: types shared by the RSD (redundant signed digit) DAC driver.
//
// A selection signal S_j takes one of three values, -1, 0 or +1.  It is
// carried as a 2-bit two's-complement number so that it can be added or
// subtracted directly: 2'b11 = -1, 2'b00 = 0, 2'b01 = +1.  The code 2'b10 is
// never produced; every consumer treats it as 0.  The three-valued digit
// follows the decision rule of an RSD stage; the bit encoding is this
// design's own choice.
package rsd_pkg;

  typedef enum logic [1:0] {
    S_ZERO = 2'b00,
    S_POS  = 2'b01,
    S_NEG  = 2'b11
  } rsd_digit_e;

  // Signed integer value of a digit (-1, 0, +1); illegal code reads as 0.
  function automatic int digit_value(rsd_digit_e s);
    case (s)
      S_POS:   return 1;
      S_NEG:   return -1;
      default: return 0;
    endcase
  endfunction

endpackage
