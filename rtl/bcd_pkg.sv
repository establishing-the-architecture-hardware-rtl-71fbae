// bcd_pkg: types and constants shared by the flagged BCD adder.
//
// A BCD digit is four bits holding 0..9. The first-stage ("fast") binary
// adder of each digit slice can be built three ways; adder_kind_t selects
// which. Carry-skip is the default because it is the smallest of the two
// first-stage adders the design was evaluated with (9 against 13 logic
// elements); carry-select is the other evaluated option, and the plain
// ripple-carry adder is kept as the simplest reference structure.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;

  typedef enum logic [1:0] {
    ADDER_RCA  = 2'd0,
    ADDER_CSK  = 2'd1,
    ADDER_CSLA = 2'd2
  } adder_kind_t;

endpackage
