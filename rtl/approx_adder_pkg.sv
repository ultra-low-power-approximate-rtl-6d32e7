// Shared types and sizes for the approximate-adder family.
//
// The family is built from four one-bit full-adder cells: the accurate mirror
// adder (CMA) and three approximate mirror adders (AMA1, AMA2, AMA3) that drop
// transistors from it and accept a wrong sum or carry for a few input
// combinations. A multi-bit adder places approximate cells on its low bits and
// accurate cells on its high bits. The 16-bit width and the 12/4 split between
// approximate and accurate bits are the published configuration; the enum
// encoding is this implementation's own.
package approx_adder_pkg;

  // Which full-adder cell a bit position uses.
  typedef enum logic [1:0] {
    FA_CMA  = 2'd0,  // accurate 24-transistor mirror adder
    FA_AMA1 = 2'd1,  // approximate mirror adder 1
    FA_AMA2 = 2'd2,  // approximate mirror adder 2: sum is the inverted carry
    FA_AMA3 = 2'd3   // approximate mirror adder 3: carry is A, sum is B
  } fa_kind_e;

  // Published configuration: 16-bit adders, approximate cells on bits 11..0,
  // accurate cells on bits 15..12.
  localparam int unsigned ADDER_WIDTH       = 16;
  localparam int unsigned ADDER_APPROX_BITS = 12;

endpackage
