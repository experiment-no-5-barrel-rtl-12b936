// tb_mux2: self-checking testbench for mux2.
//
// Runs the select-toggling sequence of a basic multiplexer test (a rises,
// s rises, b rises, a falls, a and b swap, s falls) on whole 8-bit words,
// then 2000 random (a, b, s) triples, and compares o with the expected
// input each time. A second instance at WIDTH = 1 checks the scalar case
// exhaustively. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_mux2;

  logic [7:0] a, b, o;
  logic       s;
  logic       a1, b1, s1, o1;
  int         checks   = 0;
  int         failures = 0;

  mux2 u_dut (.a(a), .b(b), .s(s), .o(o));
  mux2 #(.WIDTH(1)) u_dut1 (.a(a1), .b(b1), .s(s1), .o(o1));

  task automatic check(input logic [7:0] exp_o, input string what);
    #1;
    checks++;
    if (o !== exp_o) begin
      failures++;
      $display("FAIL %s: a=%h b=%h s=%b o=%h expected %h", what, a, b, s, o, exp_o);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed sequence, with distinct words so that a and b never agree.
    a = 8'h00; b = 8'h00; s = 1'b0; check(8'h00, "idle");
    a = 8'hA5;                      check(8'hA5, "a rises, s=0");
    s = 1'b1;                       check(8'h00, "s rises");
    b = 8'h3C;                      check(8'h3C, "b rises, s=1");
    a = 8'h00;                      check(8'h3C, "a falls, s=1");
    a = 8'hFF; b = 8'h00;           check(8'h00, "swap, s=1");
    s = 1'b0;                       check(8'hFF, "s falls");

    // Random words.
    repeat (2000) begin
      a = 8'($urandom);
      b = 8'($urandom);
      s = 1'($urandom);
      check(s ? b : a, "random");
    end

    // Scalar instance, all eight input combinations.
    for (int v = 0; v < 8; v++) begin
      {s1, b1, a1} = 3'(v);
      #1;
      checks++;
      if (o1 !== (s1 ? b1 : a1)) begin
        failures++;
        $display("FAIL scalar: a=%b b=%b s=%b o=%b", a1, b1, s1, o1);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_mux2
