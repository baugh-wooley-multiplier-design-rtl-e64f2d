// tb_bw_mult_top: end-to-end self-checking test of bw_mult_top at its
// default parameters.
//
// The 4-bit multiplier is driven through all 256 operand pairs while the
// wide multiplier (WIDE_WIDTH bits, default 32) is driven at the same time
// with its corner operands and then random pairs; both products are
// checked against the simulator's signed multiplication every step.
//
// The cases that the Baugh-Wooley correction terms have to handle are
// counted for both multipliers and each must occur at least once:
// the four sign combinations of the operands (each selects a different
// pair of correction bits), a zero operand, and the most negative operand
// squared, the one product that reaches +2^(2N-2) and needs the full
// width including the constant one in the top bit.  A last phase feeds the
// wide multiplier 16-bit operands sign-extended to its width, the way a
// 16 x 16 multiplication is run on it, and checks the 32-bit product.
module tb_bw_mult_top;

  localparam int unsigned WW = 32;   // default WIDE_WIDTH of the top
  localparam int          NRAND = 20000;

  logic [3:0]      x4, y4;
  logic [7:0]      p4;
  logic [WW-1:0]   xw, yw;
  logic [2*WW-1:0] pw;

  bw_mult_top dut (
    .x4(x4), .y4(y4), .p4(p4),
    .xw(xw), .yw(yw), .pw(pw)
  );

  int checks   = 0;
  int failures = 0;

  // event counters: [0] = 4-bit multiplier, [1] = wide multiplier
  int n_quad   [2][4];
  int n_zero   [2];
  int n_maxneg [2];
  int n_sext16  = 0;

  function automatic logic [WW-1:0] rand_wide();
    logic [WW-1:0] r;
    for (int k = 0; k < int'(WW); k += 32)
      r = (r << 32) | WW'($urandom);
    return r;
  endfunction

  task automatic step(input logic [3:0] a4, input logic [3:0] b4,
                      input logic [WW-1:0] aw, input logic [WW-1:0] bw);
    logic signed [7:0]      e4;
    logic signed [2*WW-1:0] ew;
    x4 = a4; y4 = b4; xw = aw; yw = bw;
    #1;
    e4 = 8'($signed(a4)) * 8'($signed(b4));
    ew = (2*WW)'($signed(aw)) * (2*WW)'($signed(bw));
    checks += 2;
    if (p4 !== e4) begin
      failures++;
      $display("FAIL 4-bit %0d * %0d -> %0d", $signed(a4), $signed(b4), $signed(p4));
    end
    if (pw !== ew) begin
      failures++;
      if (failures <= 10)
        $display("FAIL wide %0d * %0d -> %0d", $signed(aw), $signed(bw), $signed(pw));
    end
    n_quad[0][{a4[3], b4[3]}]++;
    n_quad[1][{aw[WW-1], bw[WW-1]}]++;
    if (a4 == '0 || b4 == '0) n_zero[0]++;
    if (aw == '0 || bw == '0) n_zero[1]++;
    if (a4 == 4'b1000 && b4 == 4'b1000) n_maxneg[0]++;
    if (aw == {1'b1, {(WW-1){1'b0}}} && bw == {1'b1, {(WW-1){1'b0}}}) n_maxneg[1]++;
  endtask

  initial begin
    logic [WW-1:0] corner [5];
    int            n;
    for (int m = 0; m < 2; m++) begin
      for (int q = 0; q < 4; q++) n_quad[m][q] = 0;
      n_zero[m]   = 0;
      n_maxneg[m] = 0;
    end
    corner[0] = '0;
    corner[1] = WW'(1);
    corner[2] = '1;
    corner[3] = {1'b1, {(WW-1){1'b0}}};
    corner[4] = {1'b0, {(WW-1){1'b1}}};

    n = 0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        if (n < 25) step(4'(i), 4'(j), corner[n / 5], corner[n % 5]);
        else        step(4'(i), 4'(j), rand_wide(), rand_wide());
        n++;
      end
    end
    for (int k = 0; k < NRAND; k++)
      step(4'($urandom), 4'($urandom), rand_wide(), rand_wide());

    // 16 x 16 products on the wide multiplier via sign extension
    for (int k = 0; k < 2000; k++) begin
      logic [15:0] a16, b16;
      logic signed [31:0] e32;
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (k == 0) begin a16 = 16'h8000; b16 = 16'h8000; end
      step(4'($urandom), 4'($urandom), WW'($signed(a16)), WW'($signed(b16)));
      e32 = 32'($signed(a16)) * 32'($signed(b16));
      checks++;
      if (pw[31:0] !== e32) begin
        failures++;
        $display("FAIL 16x16 %0d * %0d -> %0d", $signed(a16), $signed(b16), $signed(pw[31:0]));
      end
      n_sext16++;
    end
    $display("16x16 via sign extension: %0d", n_sext16);
    if (n_sext16 == 0) begin failures++; $display("FAIL 16x16 phase never ran"); end

    for (int m = 0; m < 2; m++) begin
      $display("%s: quadrants ++=%0d +-=%0d -+=%0d --=%0d zero=%0d maxneg^2=%0d",
               m == 0 ? "4-bit" : "wide ", n_quad[m][0], n_quad[m][1],
               n_quad[m][2], n_quad[m][3], n_zero[m], n_maxneg[m]);
      for (int q = 0; q < 4; q++)
        if (n_quad[m][q] == 0) begin
          failures++;
          $display("FAIL sign combination %0d never exercised", q);
        end
      if (n_zero[m] == 0)   begin failures++; $display("FAIL zero operand never exercised"); end
      if (n_maxneg[m] == 0) begin failures++; $display("FAIL most-negative square never exercised"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
