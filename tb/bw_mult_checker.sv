// bw_mult_checker: drives one bw_mult instance of a given WIDTH and checks
// its product against the signed product computed by the simulator.
//
// Widths up to EXH_MAX bits are tested exhaustively; wider ones get the
// corner operands (0, 1, -1, most negative, most positive, and all their
// pairs) followed by NRAND random pairs.  A new pair is applied every time
// unit.  When finished it raises done and holds its counts on checks and
// failures.  It also counts how often the operand signs fell into each of
// the four quadrants (quad[{x negative, y negative}]).
module bw_mult_checker #(
  parameter int unsigned WIDTH   = 4,
  parameter int unsigned EXH_MAX = 8,
  parameter int unsigned NRAND   = 2000
) (
  output logic       done,
  output int         checks,
  output int         failures,
  output int         quad [4]
);

  localparam int unsigned W = 2 * WIDTH;

  logic [WIDTH-1:0] x, y;
  logic [W-1:0]     p;

  bw_mult #(.WIDTH(WIDTH)) dut (.x(x), .y(y), .p(p));

  task automatic apply(input logic [WIDTH-1:0] a, input logic [WIDTH-1:0] b);
    logic signed [W-1:0] expected;
    x = a;
    y = b;
    #1;
    expected = W'($signed(a)) * W'($signed(b));
    checks++;
    quad[{a[WIDTH-1], b[WIDTH-1]}]++;
    if (p !== expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL WIDTH=%0d %0d * %0d -> %0d (expected %0d)", WIDTH,
                 $signed(a), $signed(b), $signed(p), expected);
    end
  endtask

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] r;
    for (int k = 0; k < WIDTH; k += 32)
      r = (r << 32) | WIDTH'($urandom);
    return r;
  endfunction

  initial begin
    logic [WIDTH-1:0] corner [5];
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    for (int q = 0; q < 4; q++) quad[q] = 0;
    corner[0] = '0;
    corner[1] = WIDTH'(1);
    corner[2] = '1;
    corner[3] = {1'b1, {(WIDTH-1){1'b0}}};
    corner[4] = {1'b0, {(WIDTH-1){1'b1}}};
    if (WIDTH <= EXH_MAX) begin
      for (longint i = 0; i < (longint'(1) << WIDTH); i++)
        for (longint j = 0; j < (longint'(1) << WIDTH); j++)
          apply(WIDTH'(i), WIDTH'(j));
    end else begin
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++)
          apply(corner[i], corner[j]);
      for (int n = 0; n < int'(NRAND); n++)
        apply(rand_word(), rand_word());
    end
    done = 1'b1;
  end

endmodule
