// tb_barrel_shifter: end-to-end testbench of barrel_shifter at its default
// size (8-bit data, 3-bit active-low shift amount), no parameters overridden.
//
// Part 1 replays the reference stimulus sequence for this shifter: all ones
// shifted left by 0, 1, 2, 2, 2 and 4, then 0x7F shifted right by 0, 1, 2
// and 4, each applied for 10 ns, with the results worked out by hand.
// Part 2 walks every data word, shift amount and direction (4096 cases)
// against a bit-by-bit model: left puts zeros below, right puts copies of
// the sign bit above. It counts the mechanisms the shifter has: left and
// right shifts, right shifts of negative and of positive words (sign fill
// of ones and of zeros), left shifts that drop set bits off the top, zero
// shifts, and each of the 1/2/4 stages being used; one that never happened
// counts as a failure. Ends with a TB_RESULT line; a watchdog stops a hung
// run.
module tb_barrel_shifter;
  import shifter_pkg::*;

  logic [7:0] i, os;
  logic [2:0] sh;
  logic       d;
  int         checks   = 0;
  int         failures = 0;

  // Mechanism counters.
  int n_left, n_right, n_zero_shift, n_sign_fill_one, n_sign_fill_zero, n_overflow;
  int n_stage [3];

  barrel_shifter u_dut (.i(i), .sh(sh), .d(d), .os(os));

  function automatic logic [7:0] ref_shift(input logic [7:0] x, input int amt, input dir_e dir);
    logic [7:0] r;
    for (int j = 0; j < 8; j++) begin
      if (dir == DIR_LEFT) r[j] = (j - amt >= 0) ? x[j-amt] : 1'b0;
      else                 r[j] = (j + amt < 8)  ? x[j+amt] : x[7];
    end
    return r;
  endfunction

  task automatic check(input logic [7:0] exp_o, input string what);
    checks++;
    if (os !== exp_o) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: i=%h sh=%b d=%b os=%h expected %h", what, i, sh, d, os, exp_o);
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
    n_left = 0; n_right = 0; n_zero_shift = 0;
    n_sign_fill_one = 0; n_sign_fill_zero = 0; n_overflow = 0;
    foreach (n_stage[k]) n_stage[k] = 0;
    i = '0; sh = '0; d = 1'b0;

    // Part 1: reference sequence, 10 ns per vector.
    #10ns;
    d = 1'b1; sh = 3'b111; i = 8'b1111_1111; #10ns; check(8'hFF, "seq L0");
    sh = 3'b110;                              #10ns; check(8'hFE, "seq L1");
    sh = 3'b101;                              #10ns; check(8'hFC, "seq L2");
    sh = 3'b101;                              #10ns; check(8'hFC, "seq L2 again");
    sh = 3'b101;                              #10ns; check(8'hFC, "seq L2 again");
    sh = 3'b011;                              #10ns; check(8'hF0, "seq L4");
    sh = 3'b111; i = 8'b0111_1111; d = 1'b0;  #10ns; check(8'h7F, "seq R0");
    sh = 3'b110;                              #10ns; check(8'h3F, "seq R1");
    sh = 3'b101;                              #10ns; check(8'h1F, "seq R2");
    sh = 3'b011;                              #10ns; check(8'h07, "seq R4");

    // Part 2: exhaustive.
    for (int dv = 0; dv < 2; dv++) begin
      for (int x = 0; x < 256; x++) begin
        for (int amt = 0; amt < 8; amt++) begin
          automatic dir_e dir = dir_e'(dv);
          i  = 8'(x);
          sh = ~3'(amt);
          d  = dir;
          #1ns;
          check(ref_shift(8'(x), amt, dir), "exhaustive");

          if (amt == 0) n_zero_shift++;
          for (int k = 0; k < 3; k++) if (amt[k]) n_stage[k]++;
          if (amt != 0) begin
            if (dir == DIR_LEFT) begin
              n_left++;
              if ((8'(x) >> (8 - amt)) != 0) n_overflow++;
            end else begin
              n_right++;
              if (x[7]) n_sign_fill_one++;
              else      n_sign_fill_zero++;
            end
          end
        end
      end
    end

    $display("mechanisms: left=%0d right=%0d zero_shift=%0d sign_fill_one=%0d sign_fill_zero=%0d left_overflow=%0d stage1=%0d stage2=%0d stage4=%0d",
             n_left, n_right, n_zero_shift, n_sign_fill_one, n_sign_fill_zero, n_overflow,
             n_stage[0], n_stage[1], n_stage[2]);
    if (n_left == 0)           begin failures++; $display("FAIL no left shift seen"); end
    if (n_right == 0)          begin failures++; $display("FAIL no right shift seen"); end
    if (n_zero_shift == 0)     begin failures++; $display("FAIL no zero shift seen"); end
    if (n_sign_fill_one == 0)  begin failures++; $display("FAIL no negative right shift seen"); end
    if (n_sign_fill_zero == 0) begin failures++; $display("FAIL no positive right shift seen"); end
    if (n_overflow == 0)       begin failures++; $display("FAIL no left overflow seen"); end
    foreach (n_stage[k])
      if (n_stage[k] == 0)     begin failures++; $display("FAIL stage %0d never used", k); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_barrel_shifter
