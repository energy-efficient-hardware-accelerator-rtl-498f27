// tmx_pkg: shared types of the time-multiplexing (TMx) accelerator.
// An 8-bit operand enters the narrow multiplier either whole (when it is
// not an outlier and so fits the narrow signed width) or as two halves in
// two cycles: the low half unsigned, the high half signed.
// The split into 4-bit parts follows the published multiplier; the encoding
// of the parts as an enum is this design's choice.
package tmx_pkg;
  typedef enum logic [1:0] {
    PART_NARROW = 2'd0,  // whole value, sign-extended from NB bits
    PART_LO     = 2'd1,  // low NB bits, zero-extended
    PART_HI     = 2'd2   // value >>> NB, sign-extended
  } part_e;
endpackage
