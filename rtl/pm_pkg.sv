// pm_pkg: types and sizing helpers shared by the probabilistic multiplier.
//
// The perfect (MSB) multiplier recodes its multiplier operand into radix-4
// (modified) Booth digits. Each digit is carried between the encoder and the
// decoder as a booth_digit_t: 'one' selects 1x the multiplicand, 'two' selects
// 2x, and 'neg' negates the selection. A zero digit has all three bits low,
// so the encoding never produces a "negative zero".
//
// booth_groups(w) is the number of digits needed for an UNSIGNED w-bit
// multiplier: one more digit than w/2 so that the top digit always sees the
// zero-extended sign position (the operands of this design are unsigned).
package pm_pkg;

  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_digit_t;

  function automatic int booth_groups(input int w);
    return w / 2 + 1;
  endfunction

endpackage
