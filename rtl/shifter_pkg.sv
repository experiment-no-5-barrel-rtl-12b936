// shifter_pkg: types and constants shared by the barrel shifter and its
// testbenches.
//
// The direction input of the shifter is a single bit. dir_e names its two
// values: 1 selects the left (zero-fill) path and 0 the right (sign-fill)
// path, which is how the final direction multiplexer of the shifter is wired.
package shifter_pkg;

  // Direction of the shift, as driven on the shifter's d input.
  typedef enum logic {
    DIR_RIGHT = 1'b0,  // arithmetic right shift, sign bit replicated
    DIR_LEFT  = 1'b1   // left shift, zeros into the vacated LSBs
  } dir_e;

endpackage : shifter_pkg
