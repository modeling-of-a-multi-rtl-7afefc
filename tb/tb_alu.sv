// tb_alu: self-checking test of the integer execution unit and of the
// instruction helpers in the shared package.
//
// Each instruction is applied with random operands (and a share of corner
// values: 0, 1, -1, the most negative number) and with both carry values.
// The expected result and carry are computed in the testbench from the
// instruction set's definitions with 64-bit integer arithmetic, not by the
// expressions the unit uses: rsub is b - a, the carry out of a
// subtraction is "no borrow", cmp/cmpu replace the top bit by the signed or
// unsigned comparison a > b, mulh/mulhsu/mulhu return the upper product
// word, idiv/idivu return b / a (0 for a divisor of zero), the pattern
// compares return the first equal byte counted from the most significant
// end, or equality/inequality. The package helpers that classify loads,
// stores, multiplies and barrel shifts and give the multi-cycle latencies
// are checked against a table of opcodes.
module tb_alu;
  import mb_pkg::*;

  logic [31:0] instr, a, b, result;
  logic        carry_in, carry_out, carry_we;

  alu dut (.*);

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

  function automatic logic [31:0] enc(input logic [5:0] op, input logic [10:0] fn);
    return {op, 5'd3, 5'd1, 5'd2, fn};
  endfunction

  // Reference model: result, carry out, carry written
  task automatic model(input logic [31:0] ins, input logic [31:0] x, input logic [31:0] y,
                       input logic c, output logic [31:0] r, output logic co, output logic cw);
    logic [5:0]  op;
    logic [10:0] fn;
    longint      sx, sy, ux, uy, t;
    op = ins[31:26];
    fn = ins[10:0];
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    ux = longint'({32'd0, x});
    uy = longint'({32'd0, y});
    r  = 0;
    co = c;
    cw = 1'b0;
    if (op[5:4] == 2'b00) begin
      // add: y + x + cin ; rsub: y - x + (cin - 1) expressed as y + ~x + cin
      longint cin;
      if (op[1]) cin = c;                 // with carry
      else       cin = op[0] ? 1 : 0;     // add: 0, rsub: 1
      if (!op[0]) t = ux + uy + cin;
      else        t = uy + (ux ^ 64'hFFFF_FFFF) + cin;
      r  = t[31:0];
      co = t[32];
      cw = !op[2];
      if (op == 6'h05 && fn[0]) r[31] = fn[1] ? (ux > uy) : (sx > sy);
    end else begin
      case (op)
        6'h10: begin
          case (fn[1:0])
            2'd0: t = ux * uy;
            2'd1: t = (sx * sy) >>> 32;
            2'd2: begin
              // signed x times unsigned y: fits in 64 signed bits
              logic [63:0] p;
              p = 64'(sx * uy);
              t = longint'(p) >>> 32;
            end
            default: t = longint'((64'(ux) * 64'(uy)) >> 32);
          endcase
          r = t[31:0];
        end
        6'h18: begin t = ux * uy; r = t[31:0]; end
        6'h11, 6'h19: begin
          int n;
          n = int'(y[4:0]);
          if (fn[10])     r = x << n;
          else if (fn[9]) begin t = sx >>> n; r = t[31:0]; end
          else            r = x >> n;
        end
        6'h12: begin
          if (x == 0) r = 0;
          else if (fn[1]) r = 32'(uy / ux);
          else begin t = sy / sx; r = t[31:0]; end
        end
        6'h20, 6'h28: begin
          if (op == 6'h20 && fn[10]) begin
            r = 0;
            for (int k = 3; k >= 0; k--)
              if (x[8*k +: 8] == y[8*k +: 8] && r == 0) r = 32'(4 - k);
          end else r = x | y;
        end
        6'h21, 6'h29: r = x & y;
        6'h22, 6'h2A: r = (op == 6'h22 && fn[10]) ? {31'd0, x == y} : x ^ y;
        6'h23, 6'h2B: r = (op == 6'h23 && fn[10]) ? {31'd0, x != y} : x & ~y;
        6'h24: begin
          case (fn[6:0])
            7'h01: begin r = 32'(sx >>> 1); co = x[0]; cw = 1'b1; end
            7'h21: begin r = (x >> 1) | (32'(c) << 31); co = x[0]; cw = 1'b1; end
            7'h41: begin r = x >> 1; co = x[0]; cw = 1'b1; end
            7'h60: r = 32'(longint'($signed(x[7:0])));
            7'h61: r = 32'(longint'($signed(x[15:0])));
            default: r = 0;
          endcase
        end
        default: r = 0;
      endcase
    end
  endtask

  function automatic logic [31:0] operand();
    case ($urandom_range(0, 9))
      0: return 32'd0;
      1: return 32'd1;
      2: return 32'hFFFF_FFFF;
      3: return 32'h8000_0000;
      4: return $urandom_range(0, 40);
      default: return $urandom;
    endcase
  endfunction

  task automatic try(input string name, input logic [31:0] ins, input int n = 300);
    logic [31:0] r;
    logic        co, cw;
    for (int i = 0; i < n; i++) begin
      instr    = ins;
      a        = operand();
      b        = operand();
      carry_in = 1'($urandom);
      #1;
      model(ins, a, b, carry_in, r, co, cw);
      check(result == r, $sformatf("%s a=%h b=%h c=%b: %h expected %h", name, a, b, carry_in, result, r));
      check(carry_we == cw, $sformatf("%s: carry write %b expected %b", name, carry_we, cw));
      if (cw) check(carry_out == co, $sformatf("%s a=%h b=%h c=%b: carry %b expected %b",
                                               name, a, b, carry_in, carry_out, co));
    end
  endtask

  initial begin
    for (int op = 0; op < 16; op++) try($sformatf("addfamily %02h", op), enc(6'(op), 11'd0));
    try("cmp",     enc(6'h05, 11'h001));
    try("cmpu",    enc(6'h05, 11'h003));
    try("mul",     enc(6'h10, 11'h000));
    try("mulh",    enc(6'h10, 11'h001));
    try("mulhsu",  enc(6'h10, 11'h002));
    try("mulhu",   enc(6'h10, 11'h003));
    try("muli",    enc(6'h18, 11'h123));
    try("bsrl",    enc(6'h11, 11'h000));
    try("bsra",    enc(6'h11, 11'h200));
    try("bsll",    enc(6'h11, 11'h400));
    try("bsrai",   enc(6'h19, 11'h200));
    try("idiv",    enc(6'h12, 11'h000));
    try("idivu",   enc(6'h12, 11'h002));
    try("or",      enc(6'h20, 11'h000));
    try("pcmpbf",  enc(6'h20, 11'h400));
    try("and",     enc(6'h21, 11'h000));
    try("xor",     enc(6'h22, 11'h000));
    try("pcmpeq",  enc(6'h22, 11'h400));
    try("andn",    enc(6'h23, 11'h000));
    try("pcmpne",  enc(6'h23, 11'h400));
    try("ori",     enc(6'h28, 11'h7FF));
    try("andi",    enc(6'h29, 11'h7FF));
    try("xori",    enc(6'h2A, 11'h7FF));
    try("andni",   enc(6'h2B, 11'h7FF));
    try("sra",     enc(6'h24, 11'h001));
    try("src",     enc(6'h24, 11'h021));
    try("srl",     enc(6'h24, 11'h041));
    try("sext8",   enc(6'h24, 11'h060));
    try("sext16",  enc(6'h24, 11'h061));

    // Fixed values
    instr = enc(6'h20, 11'h400); a = 32'h1122_3344; b = 32'h5522_3344; carry_in = 1'b0;
    #1 check(result == 32'd2, "pcmpbf finds byte 2");
    instr = enc(6'h12, 11'h000); a = 32'd7; b = 32'hFFFF_FF9C;   // -100 / 7
    #1 check(result == 32'hFFFF_FFF2, "idiv rounds toward zero");
    instr = enc(6'h01, 11'h000); a = 32'd5; b = 32'd3;           // rsub 3 - 5
    #1 check(result == 32'hFFFF_FFFE && carry_out == 1'b0, "rsub borrow clears carry");

    // Package helpers
    for (int op = 0; op < 64; op++) begin
      logic [31:0] i;
      bit ld, st, ml, bs;
      int lat;
      i  = {6'(op), 26'h0};
      ld = 6'(op) inside {6'h30, 6'h31, 6'h32, 6'h33, 6'h38, 6'h39, 6'h3A, 6'h3B};
      st = 6'(op) inside {6'h34, 6'h35, 6'h36, 6'h37, 6'h3C, 6'h3D, 6'h3E, 6'h3F};
      ml = 6'(op) inside {6'h10, 6'h18};
      bs = 6'(op) inside {6'h11, 6'h19};
      check(is_load(i) == ld, $sformatf("is_load opcode %02h", op));
      check(is_store(i) == st, $sformatf("is_store opcode %02h", op));
      check(is_mul(i) == ml, $sformatf("is_mul opcode %02h", op));
      check(is_bs(i) == bs, $sformatf("is_bs opcode %02h", op));
      check(f_opcode({6'(op), 26'h2AA_AAAA}) == 6'(op), "f_opcode");
      lat = (op == 6'h12) ? 32 : 0;
      if (op != 6'h16) check(int'(mc_latency(i)) == lat, $sformatf("latency opcode %02h", op));
    end
    begin
      int tbl [8] = '{4, 4, 4, 28, 0, 4, 5, 27};
      for (int f = 0; f < 8; f++)
        check(int'(mc_latency({6'h16, 16'h0, 3'(f), 7'h0})) == tbl[f], $sformatf("fpu latency %0d", f));
    end
    check(f_rd(32'h0064_2800) == 5'd3 && f_ra(32'h0064_2800) == 5'd4 && f_rb(32'h0064_2800) == 5'd5,
          "register fields");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
