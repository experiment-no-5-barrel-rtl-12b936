// tb_shift_left_chain: self-checking testbench for shift_left_chain.
//
// Drives every (data, shift amount) pair of the default 8-bit / 3-stage
// shifter and, on a 16-bit / 4-stage instance, 4000 random pairs. The shift
// amount is applied active low (sh = ~amount). The expected word is built
// bit by bit: result bit j is input bit j-amount, or 0 where that index
// falls below bit 0. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_shift_left_chain;

  logic [7:0]  i8,  o8;
  logic [2:0]  sh8;
  logic [15:0] i16, o16;
  logic [3:0]  sh16;
  int          checks   = 0;
  int          failures = 0;

  shift_left_chain u_dut (.i(i8), .sh(sh8), .o(o8));
  shift_left_chain #(.WIDTH(16), .SHW(4)) u_dut16 (.i(i16), .sh(sh16), .o(o16));

  function automatic logic [15:0] ref_left(input logic [15:0] x, input int amt, input int w);
    logic [15:0] r = '0;
    for (int j = 0; j < w; j++)
      r[j] = (j - amt >= 0) ? x[j-amt] : 1'b0;
    return r;
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
        i8  = 8'(x);
        sh8 = ~3'(amt);
        exp_o = 8'(ref_left(16'(x), amt, 8));
        #1;
        checks++;
        if (o8 !== exp_o) begin
          failures++;
          if (failures < 20)
            $display("FAIL w8: i=%h amount=%0d o=%h expected %h", i8, amt, o8, exp_o);
        end
      end
    end

    repeat (4000) begin
      logic [15:0] exp_o;
      int          amt;
      i16  = 16'($urandom);
      amt  = int'($urandom_range(15, 0));
      sh16 = ~4'(amt);
      exp_o = ref_left(i16, amt, 16);
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

endmodule : tb_shift_left_chain
