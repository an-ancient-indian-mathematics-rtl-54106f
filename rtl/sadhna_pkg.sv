// sadhna_pkg: constants shared by the SADHNA Urdhva-Tiryagbhyam multiplier.
//
// The operands of every component are signed integers of SADHNA_W bits, the
// width of a 32-bit integer (range -2147483647 .. 2147483647 plus the most
// negative two's complement value). SADHNA_DIGITS is the number of digits in
// each operand of the top (a 4 x 4 digit multiplier) and SADHNA_RADIX the base
// of those digits (x = 10, decimal). These values follow the design as
// published; the use of two's complement with wrap-around on overflow is this
// implementation's choice.
package sadhna_pkg;
  parameter int unsigned SADHNA_W      = 32;
  parameter int unsigned SADHNA_DIGITS = 4;
  parameter int          SADHNA_RADIX  = 10;
endpackage
