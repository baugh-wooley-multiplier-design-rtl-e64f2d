// tb_bw_mult: self-checking test of the parameterised Baugh-Wooley
// multiplier at several widths.
//
// The default width (4) and widths 2, 3 and 8 are tested exhaustively; 16
// and 32 (the wider sizes the construction is meant to extend to) get
// corner operands and random pairs.  Each width runs in its own checker,
// all in parallel; the run ends when every checker is done, or with a
// failure when the watchdog expires.
module tb_bw_mult;

  localparam int NW = 6;
  localparam int unsigned WIDTHS [NW] = '{4, 2, 3, 8, 16, 32};

  logic [NW-1:0] done;
  int            chk  [NW];
  int            fail [NW];
  int            quad [NW][4];

  for (genvar g = 0; g < NW; g++) begin : g_w
    bw_mult_checker #(
      .WIDTH(WIDTHS[g]),
      .EXH_MAX(8),
      .NRAND(5000)
    ) u_chk (
      .done    (done[g]),
      .checks  (chk[g]),
      .failures(fail[g]),
      .quad    (quad[g])
    );
  end

  int checks   = 0;
  int failures = 0;

  initial begin
    #1;
    wait (&done);
    for (int g = 0; g < NW; g++) begin
      $display("WIDTH=%0d checks=%0d failures=%0d", WIDTHS[g], chk[g], fail[g]);
      checks   += chk[g];
      failures += fail[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
