// tb_shift_right_chain: self-checking testbench for shift_right_chain.
//
// Drives every (data, shift amount) pair of the default 8-bit / 3-stage
// shifter and, on a 16-bit / 4-stage instance, 4000 random pairs. The shift
// amount is applied active low (sh = ~amount). The expected word is built
// bit by bit: result bit j is input bit j+amount, or the input's sign bit
// where that index runs past the MSB. Each 8-bit result is also checked as
// a number: it must equal floor(x / 2**amount) for x read as signed.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_shift_right_chain;

  logic [7:0]  i8,  o8;
  logic [2:0]  sh8;
  logic [15:0] i16, o16;
  logic [3:0]  sh16;
  int          checks   = 0;
  int          failures = 0;

  shift_right_chain u_dut (.i(i8), .sh(sh8), .o(o8));
  shift_right_chain #(.WIDTH(16), .SHW(4)) u_dut16 (.i(i16), .sh(sh16), .o(o16));

  function automatic logic [15:0] ref_right(input logic [15:0] x, input int amt, input int w);
    logic [15:0] r = '0;
    for (int j = 0; j < w; j++)
      r[j] = (j + amt < w) ? x[j+amt] : x[w-1];
    return r;
  endfunction

  // floor(v / 2**amt) for a signed v, by integer arithmetic alone.
  function automatic int floor_div_pow2(input int v, input int amt);
    int p = 1 << amt;
    int q = v / p;            // truncates towards zero
    if (v < 0 && q * p != v) q--;
    return q;
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int amt = 0; amt < 8; amt++) begin
        logic [7:0] exp_o;
        int         sx;
        i8  = 8'(x);
        sh8 = ~3'(amt);
        exp_o = 8'(ref_right(16'(x), amt, 8));
        sx = (x >= 128) ? x - 256 : x;
        #1;
        checks += 2;
        if (o8 !== exp_o) begin
          failures++;
          if (failures < 20)
            $display("FAIL w8: i=%h amount=%0d o=%h expected %h", i8, amt, o8, exp_o);
        end
        if (int'($signed(o8)) != floor_div_pow2(sx, amt)) begin
          failures++;
          if (failures < 20)
            $display("FAIL div: %0d >>> %0d gave %0d", sx, amt, $signed(o8));
        end
      end
    end

    repeat (4000) begin
      logic [15:0] exp_o;
      int          amt;
      i16  = 16'($urandom);
      amt  = int'($urandom_range(15, 0));
      sh16 = ~4'(amt);
      exp_o = ref_right(i16, amt, 16);
      #1;
      checks++;
      if (o16 !== exp_o) begin
        failures++;
        if (failures < 20)
          $display("FAIL w16: i=%h amount=%0d o=%h expected %h", i16, amt, o16, exp_o);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_shift_right_chain
