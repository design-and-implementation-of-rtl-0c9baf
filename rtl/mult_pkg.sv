// mult_pkg: types shared by the adders and multipliers.
//
// adder_kind_e selects which 32-bit adder a multiplier is built from:
// the carry look-ahead adder (CLAA), the carry select adder (CSLA) or the
// error tolerant adder (ETA). The CLAA and CSLA give exact products; the ETA
// trades accuracy in its low bits for a shorter carry path.
package mult_pkg;

  typedef enum logic [1:0] {
    ADD_CLAA = 2'd0,
    ADD_CSLA = 2'd1,
    ADD_ETA  = 2'd2
  } adder_kind_e;

  // Operand width of the multipliers.
  localparam int unsigned MULT_W = 32;

endpackage
