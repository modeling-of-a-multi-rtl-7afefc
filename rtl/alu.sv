// alu: integer execution unit of the core, purely combinational.
//
// It computes the result of every integer instruction from the instruction
// word, operand a (register ra), operand b (register rb, or the sign-extended
// immediate for type B instructions) and the carry flag:
//   add/rsub family (opcodes 0x00-0x0F): bit 0 of the opcode reverses the
//     subtraction (b - a), bit 1 adds the carry flag instead of a constant
//     carry-in, bit 2 keeps the carry flag unchanged; cmp and cmpu (rsubk with
//     function 1 or 3) replace the sign bit of b - a by the signed or unsigned
//     "a greater than b" outcome;
//   mul, mulh, mulhsu, mulhu, muli (low or high word of the 64-bit product);
//   barrel shifts bsrl, bsra, bsll and immediate forms (shift a by b[4:0]);
//   idiv, idivu (b / a, 0 on division by zero);
//   or, and, xor, andn with immediates, and the pattern compares pcmpbf,
//     pcmpeq, pcmpne;
//   sra, src, srl (shift a right by one through the carry) and sext8, sext16.
// carry_we tells that the instruction updates the carry flag with carry_out.
// Unknown opcodes give 0.
//
// The instruction set comes from the MicroBlaze architecture that the
// document models; the document names the instructions and prints their
// encodings in its test programs but leaves their arithmetic to the
// architecture. The division is written with the plain operator; its
// 32-cycle latency is enforced by the stall controller, not here.
module alu
  import mb_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        carry_in,
  output logic [31:0] result,
  output logic        carry_out,
  output logic        carry_we
);

  logic [5:0]  op;
  logic [10:0] func;
  assign op   = instr[31:26];
  assign func = instr[10:0];

  logic [32:0] sum;
  logic [63:0] prod_ss, prod_uu, prod_su;
  logic [31:0] shl, shr_l, shr_a;

  always_comb begin
    logic cin;
    cin = op[1] ? carry_in : op[0];
    sum = {1'b0, (op[0] ? ~a : a)} + {1'b0, b} + 33'(cin);
  end

  assign prod_ss = 64'($signed(a) * $signed(b));
  assign prod_uu = a * b;
  assign prod_su = 64'($signed({a[31], a}) * $signed({1'b0, b}));
  assign shl   = a << b[4:0];
  assign shr_l = a >> b[4:0];
  assign shr_a = 32'($signed(a) >>> b[4:0]);

  function automatic logic [31:0] pcmpbf(input logic [31:0] x, input logic [31:0] y);
    for (int i = 0; i < 4; i++)
      if (x[31-8*i -: 8] == y[31-8*i -: 8]) return 32'(i + 1);
    return '0;
  endfunction

  always_comb begin
    result    = '0;
    carry_out = carry_in;
    carry_we  = 1'b0;
    unique casez (op)
      6'b00????: begin                               // add/rsub family, cmp
        result    = sum[31:0];
        carry_out = sum[32];
        carry_we  = !op[2];
        if (op == 6'h05 && func[0]) begin
          result[31] = func[1] ? (a > b) : ($signed(a) > $signed(b));
        end
      end
      OP_MUL, OP_MULI: begin
        if (op == OP_MULI) result = prod_uu[31:0];
        else unique case (func[1:0])
          2'd0: result = prod_uu[31:0];
          2'd1: result = prod_ss[63:32];
          2'd2: result = prod_su[63:32];
          default: result = prod_uu[63:32];
        endcase
      end
      OP_BS, OP_BSI: result = func[10] ? shl : (func[9] ? shr_a : shr_l);
      OP_IDIV: begin
        if (a == '0) result = '0;
        else if (func[1]) result = b / a;
        else if (b == 32'h8000_0000 && a == 32'hFFFF_FFFF) result = 32'h8000_0000;
        else result = 32'($signed(b) / $signed(a));
      end
      OP_OR, OP_ORI: result = (op == OP_OR && func[10]) ? pcmpbf(a, b) : (a | b);
      OP_AND, OP_ANDI: result = a & b;
      OP_XOR, OP_XORI: result = (op == OP_XOR && func[10]) ? 32'(a == b) : (a ^ b);
      OP_ANDN, OP_ANDNI: result = (op == OP_ANDN && func[10]) ? 32'(a != b) : (a & ~b);
      OP_SHIFT: begin
        unique case (func[6:0])
          7'h01: begin result = {a[31], a[31:1]};   carry_out = a[0]; carry_we = 1'b1; end
          7'h21: begin result = {carry_in, a[31:1]}; carry_out = a[0]; carry_we = 1'b1; end
          7'h41: begin result = {1'b0, a[31:1]};    carry_out = a[0]; carry_we = 1'b1; end
          7'h60: result = {{24{a[7]}}, a[7:0]};
          7'h61: result = {{16{a[15]}}, a[15:0]};
          default: result = '0;
        endcase
      end
      default: result = '0;
    endcase
  end

endmodule
