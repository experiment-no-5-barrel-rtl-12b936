// shift_left_chain: logarithmic left shifter with zero fill.
//
// SHW multiplexer stages in series; stage k either passes its input or
// shifts it left by 2**k, dropping the bits that leave the MSB end and
// filling the vacated LSBs with zeros. With the default 8-bit word and three
// stages (1, 2, 4) any amount from 0 to 7 is reached in one pass.
//
// Interface: i is the data word, o the result. sh holds one enable per stage
// and is ACTIVE LOW: stage k shifts when sh[k] = 0, so the shift amount is
// ~sh. This follows the select polarity of the stage multiplexer (mux2).
// Purely combinational: the delay is SHW multiplexers.
module shift_left_chain #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned SHW   = 3
) (
  input  logic [WIDTH-1:0] i,
  input  logic [SHW-1:0]   sh,
  output logic [WIDTH-1:0] o
);

  // stage_q[k] is the input of stage k; stage_q[SHW] is the result.
  logic [WIDTH-1:0] stage_q [SHW+1];

  assign stage_q[0] = i;

  for (genvar k = 0; k < SHW; k++) begin : g_stage
    logic [WIDTH-1:0] shifted;
    assign shifted = stage_q[k] << (2 ** k);

    mux2 #(.WIDTH(WIDTH)) u_mux (
      .a(shifted),
      .b(stage_q[k]),
      .s(sh[k]),
      .o(stage_q[k+1])
    );
  end

  assign o = stage_q[SHW];

endmodule : shift_left_chain
