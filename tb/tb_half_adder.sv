// tb_half_adder: exhaustive self-checking test of the half adder cell.
// All four input pairs are applied; {cout, s} must equal the arithmetic sum
// a + b.  A watchdog ends the run with a failure if it does not finish.
module tb_half_adder;

  logic a, b, s, cout;
  int   checks   = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({cout, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> cout=%0b s=%0b", a, b, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
