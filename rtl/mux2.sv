// mux2: vector 2:1 multiplexer, the only building block of the barrel shifter.
//
// o follows a while s is 0 and b while s is 1. Every stage of the shifter is
// one of these: a carries the shifted word, b the unshifted one, so a stage
// shifts when its select bit is LOW. That polarity is the one of the
// multiplexer the shifter is built from and is kept here unchanged.
//
// Interface: a, b, o are WIDTH bits (8 by default, the shifter's data width);
// s is one bit. Purely combinational, no clock, no state.
module mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s,
  output logic [WIDTH-1:0] o
);

  always_comb begin
    if (s) o = b;
    else   o = a;
  end

endmodule : mux2
