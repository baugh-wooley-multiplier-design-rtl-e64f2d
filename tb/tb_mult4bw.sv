// tb_mult4bw: exhaustive self-checking test of the 4 x 4 Baugh-Wooley
// multiplier.
//
// All 256 operand pairs are applied.  The expected product is formed from
// the integer values of the operands, -8*b3 + b[2:0], multiplied as
// integers, and compared with the integer value of the 8-bit result,
// -128*p7 + p[6:0].  A watchdog ends the run with a failure if it does not
// finish.
module tb_mult4bw;

  logic [3:0] x, y;
  logic [7:0] p;
  int   checks   = 0;
  int   failures = 0;

  mult4bw dut (.x(x), .y(y), .p(p));

  function automatic int value4(logic [3:0] v);
    return -8 * int'(v[3]) + int'(v[2:0]);
  endfunction

  function automatic int value8(logic [7:0] v);
    return -128 * int'(v[7]) + int'(v[6:0]);
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        x = 4'(i);
        y = 4'(j);
        #10;
        checks++;
        if (value8(p) != value4(x) * value4(y)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", value4(x), value4(y), value8(p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
