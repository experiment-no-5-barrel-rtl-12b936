// barrel_shifter: 8-bit combinational arithmetic barrel shifter.
//
// Shifts a data word left or right by any amount from 0 to 2**SHW-1 in a
// single pass. A left shift feeds zeros into the vacated LSBs (multiply by
// 2**amount, bits leaving the top are lost); a right shift copies the sign
// bit into the vacated MSBs (divide a two's-complement value by 2**amount,
// rounding towards minus infinity).
//
// How it works: the input goes to two logarithmic shifters side by side,
// shift_left_chain and shift_right_chain, each SHW mux2 stages that shift
// by 1, 2, 4, ... Both compute their result all the time; a last mux2
// picks one by the direction bit d. The structure, the fill rules, the
// 8-bit / 3-bit sizes and the port names follow the lab design this RTL
// reproduces. Making the widths parameters is this design's own addition.
//
// Interface (all combinational, no clock):
//   i   [WIDTH-1:0]  data in
//   sh  [SHW-1:0]    shift amount, ACTIVE LOW per bit: bit k = 0 enables
//                    the 2**k stage, so the amount is ~sh ("111" = no
//                    shift, "110" = 1, "000" = 7). This comes from the
//                    stage multiplexer passing its shifted input when its
//                    select is 0, and is kept as the original wires it.
//   d                direction, shifter_pkg::dir_e: 1 = left, 0 = right
//   os  [WIDTH-1:0]  result
// Timing: SHW + 1 multiplexer delays from any input to os.
module barrel_shifter
  import shifter_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned SHW   = 3
) (
  input  logic [WIDTH-1:0] i,
  input  logic [SHW-1:0]   sh,
  input  logic             d,
  output logic [WIDTH-1:0] os
);

  logic [WIDTH-1:0] left_q;
  logic [WIDTH-1:0] right_q;

  shift_left_chain #(.WIDTH(WIDTH), .SHW(SHW)) u_left (
    .i (i),
    .sh(sh),
    .o (left_q)
  );

  shift_right_chain #(.WIDTH(WIDTH), .SHW(SHW)) u_right (
    .i (i),
    .sh(sh),
    .o (right_q)
  );

  // Direction select: a = right path when d = DIR_RIGHT (0),
  // b = left path when d = DIR_LEFT (1).
  mux2 #(.WIDTH(WIDTH)) u_dir (
    .a(right_q),
    .b(left_q),
    .s(d == DIR_LEFT),
    .o(os)
  );

endmodule : barrel_shifter
