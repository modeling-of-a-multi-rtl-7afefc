// tb_fpu: self-checking test of the single-precision floating point unit.
//
// Reference: the testbench computes each result in double precision with the
// simulator's real arithmetic and rounds it to single precision with its own
// round-to-nearest-even routine. For add, subtract, multiply, divide and
// square root a double result rounded again to single precision equals the
// correctly rounded single result (53 >= 2 * 24 + 2 significand bits), so
// this is an exact model for normal numbers. Random operands have moderate
// exponents so that results stay normal; results below the normal range
// are expected as zero, the unit's flush-to-zero rule.
// flt is checked against the rounded integer value, fint against truncation
// toward zero, fcmp against real comparisons for all seven conditions.
// Directed cases cover the special values: NaN and denormal operands give
// the quiet NaN FFC00000, inf - inf, 0 * inf, 0 / 0, inf / inf and the root
// of a negative number too; x / 0 is a signed infinity; overflow gives
// infinity; fint saturates; fcmp treats +0 and -0 as equal and reports
// unordered for NaN.
module tb_fpu;

  logic [31:0] instr, a, b, result;

  fpu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] QNAN = 32'hFFC0_0000;
  localparam logic [31:0] PINF = 32'h7F80_0000;
  localparam logic [31:0] NINF = 32'hFF80_0000;

  function automatic logic [31:0] op_word(input int fop, input int cond = 0);
    return {6'h16, 5'd1, 5'd2, 5'd3, 1'b0, 3'(fop), 3'(cond), 4'd0};
  endfunction

  // single -> double (normal numbers and zero only)
  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:0] == '0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // double -> single, round to nearest even, flush below the normal range
  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] k;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    k = {1'b0, m[52:29]};
    if (m[28] && ((|m[27:0]) || k[0])) k = k + 1'b1;
    if (k[24]) begin
      k = k >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), k[22:0]};
  endfunction

  function automatic logic [31:0] rand_float(input int emin, input int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  task automatic apply(input logic [31:0] ins, input logic [31:0] x, input logic [31:0] y);
    instr = ins;
    a = x;
    b = y;
    #1;
  endtask

  task automatic expect_eq(input string name, input logic [31:0] ins, input logic [31:0] x,
                           input logic [31:0] y, input logic [31:0] exp);
    apply(ins, x, y);
    check(result == exp, $sformatf("%s a=%h b=%h: %h expected %h", name, x, y, result, exp));
  endtask

  initial begin
    logic [31:0] x, y, e;
    real         rx, ry;
    int          iv;

    for (int n = 0; n < 4000; n++) begin
      x  = rand_float(90, 160);
      y  = (n % 5 == 0) ? {~x[31], x[30:0] ^ 31'($urandom_range(0, 3))} : rand_float(90, 160);
      rx = to_real(x);
      ry = to_real(y);
      expect_eq("fadd",  op_word(0), x, y, to_single(rx + ry));
      expect_eq("frsub", op_word(1), x, y, to_single(ry - rx));
      expect_eq("fmul",  op_word(2), x, y, to_single(rx * ry));
      expect_eq("fdiv",  op_word(3), x, y, to_single(ry / rx));
      x[31] = 1'b0;
      expect_eq("fsqrt", op_word(7), x, 32'd0, to_single($sqrt(to_real(x))));
      // fcmp conditions: un lt eq le gt ne ge, b against a
      for (int c = 0; c < 7; c++) begin
        bit r;
        x  = (n % 4 == 0) ? y : rand_float(120, 130);
        rx = to_real(x);
        case (c)
          0: r = 1'b0;
          1: r = ry < rx;
          2: r = ry == rx;
          3: r = ry <= rx;
          4: r = ry > rx;
          5: r = ry != rx;
          default: r = ry >= rx;
        endcase
        expect_eq($sformatf("fcmp cond %0d", c), op_word(4, c), x, y, {31'd0, r});
      end
      // flt: integers of all sizes
      iv = (n % 2 == 0) ? int'($urandom) : int'($urandom_range(0, 2000)) - 1000;
      expect_eq("flt", op_word(5), 32'(iv), 32'd0, to_single(real'(iv)));
      // fint: values within the integer range, truncated toward zero
      x = rand_float(100, 157);
      expect_eq("fint", op_word(6), x, 32'd0, 32'($rtoi(to_real(x))));
    end

    // Special values
    expect_eq("nan add",      op_word(0), 32'h7FC0_0000, 32'h3F80_0000, QNAN);
    expect_eq("nan mul",      op_word(2), 32'h3F80_0000, 32'h7F80_0001, QNAN);
    expect_eq("denormal add", op_word(0), 32'h0000_0001, 32'h3F80_0000, QNAN);
    expect_eq("denormal div", op_word(3), 32'h3F80_0000, 32'h8000_1000, QNAN);
    expect_eq("inf - inf",    op_word(0), PINF, NINF, QNAN);
    expect_eq("inf + inf",    op_word(0), PINF, PINF, PINF);
    expect_eq("0 * inf",      op_word(2), 32'h0000_0000, NINF, QNAN);
    expect_eq("0 / 0",        op_word(3), 32'h0000_0000, 32'h8000_0000, QNAN);
    expect_eq("inf / inf",    op_word(3), PINF, NINF, QNAN);
    expect_eq("x / 0",        op_word(3), 32'h8000_0000, 32'h4000_0000, NINF);
    expect_eq("x / inf",      op_word(3), PINF, 32'h4000_0000, 32'h0000_0000);
    expect_eq("sqrt -1",      op_word(7), 32'hBF80_0000, 32'd0, QNAN);
    expect_eq("sqrt -0",      op_word(7), 32'h8000_0000, 32'd0, 32'h8000_0000);
    expect_eq("sqrt inf",     op_word(7), PINF, 32'd0, PINF);
    expect_eq("sqrt 2",       op_word(7), 32'h4000_0000, 32'd0, 32'h3FB5_04F3);
    expect_eq("overflow",     op_word(2), 32'h7F00_0000, 32'h4100_0000, PINF);
    expect_eq("underflow",    op_word(2), 32'h0080_0000, 32'h3E00_0000, 32'h0000_0000);
    expect_eq("x - x",        op_word(1), 32'h4049_0FDB, 32'h4049_0FDB, 32'h0000_0000);
    expect_eq("1 + 2^-24",    op_word(0), 32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);
    expect_eq("1 + 3*2^-25",  op_word(0), 32'h3F80_0000, 32'h33C0_0000, 32'h3F80_0001);
    expect_eq("12 / 3",       op_word(3), 32'h4040_0000, 32'h4140_0000, 32'h4080_0000);
    expect_eq("fint big",     op_word(6), 32'h4F80_0000, 32'd0, 32'h7FFF_FFFF);
    expect_eq("fint -big",    op_word(6), 32'hDF00_0000, 32'd0, 32'h8000_0000);
    expect_eq("fint -2^31",   op_word(6), 32'hCF00_0000, 32'd0, 32'h8000_0000);
    expect_eq("fint 0.75",    op_word(6), 32'h3F40_0000, 32'd0, 32'h0000_0000);
    expect_eq("fint -2.5",    op_word(6), 32'hC020_0000, 32'd0, 32'hFFFF_FFFE);
    expect_eq("flt min",      op_word(5), 32'h8000_0000, 32'd0, 32'hCF00_0000);
    expect_eq("flt 0",        op_word(5), 32'h0000_0000, 32'd0, 32'h0000_0000);
    expect_eq("flt 2^24+1",   op_word(5), 32'h0100_0001, 32'd0, 32'h4B80_0000);
    expect_eq("fcmp +0 -0",   op_word(4, 2), 32'h0000_0000, 32'h8000_0000, 32'd1);
    expect_eq("fcmp un",      op_word(4, 0), 32'h7FC0_0000, 32'h3F80_0000, 32'd1);
    expect_eq("fcmp lt nan",  op_word(4, 1), 32'h7FC0_0000, 32'h3F80_0000, 32'd0);
    expect_eq("fcmp ne nan",  op_word(4, 5), 32'h7FC0_0000, 32'h3F80_0000, 32'd1);
    expect_eq("fcmp -inf lt", op_word(4, 1), 32'h3F80_0000, NINF, 32'd1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
