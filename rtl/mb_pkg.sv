// mb_pkg: constants and small helpers shared by the MicroBlaze core and its
// local memories.
//
// Instruction words are 32 bits in the two MicroBlaze formats: type A
// (opcode, rd, ra, rb, 11 function bits) and type B (opcode, rd, ra, 16-bit
// immediate). MicroBlaze numbers bit 0 as the MSB; here the usual [31:0]
// numbering is used, so the opcode is [31:26], rd [25:21], ra [20:16],
// rb [15:11] and the immediate [15:0]. Bit 29 (opcode bit 0x08) selects the
// immediate form.
//
// The byte-enable codes 1000, 1100 and 1111 (byte, half word, word) and the
// multi-cycle latencies of the floating point unit and integer divider follow
// the document. Opcode values are the standard MicroBlaze encodings, checked
// against the encoded test programs the document prints.
package mb_pkg;

  // Primary opcodes (instruction bits [31:26])
  localparam logic [5:0] OP_ADD    = 6'h00;  // 0x00..0x07: add/rsub, C, K variants
  localparam logic [5:0] OP_ADDI   = 6'h08;  // 0x08..0x0F immediate forms
  localparam logic [5:0] OP_MUL    = 6'h10;
  localparam logic [5:0] OP_BS     = 6'h11;
  localparam logic [5:0] OP_IDIV   = 6'h12;
  localparam logic [5:0] OP_FPU    = 6'h16;
  localparam logic [5:0] OP_MULI   = 6'h18;
  localparam logic [5:0] OP_BSI    = 6'h19;
  localparam logic [5:0] OP_OR     = 6'h20;
  localparam logic [5:0] OP_AND    = 6'h21;
  localparam logic [5:0] OP_XOR    = 6'h22;
  localparam logic [5:0] OP_ANDN   = 6'h23;
  localparam logic [5:0] OP_SHIFT  = 6'h24;  // sra, src, srl, sext8, sext16
  localparam logic [5:0] OP_BR     = 6'h26;
  localparam logic [5:0] OP_BCC    = 6'h27;
  localparam logic [5:0] OP_ORI    = 6'h28;
  localparam logic [5:0] OP_ANDI   = 6'h29;
  localparam logic [5:0] OP_XORI   = 6'h2A;
  localparam logic [5:0] OP_ANDNI  = 6'h2B;
  localparam logic [5:0] OP_IMM    = 6'h2C;
  localparam logic [5:0] OP_RT     = 6'h2D;  // rtsd and relatives
  localparam logic [5:0] OP_BRI    = 6'h2E;
  localparam logic [5:0] OP_BCCI   = 6'h2F;
  localparam logic [5:0] OP_LBU    = 6'h30;
  localparam logic [5:0] OP_LHU    = 6'h31;
  localparam logic [5:0] OP_LW     = 6'h32;
  localparam logic [5:0] OP_SB     = 6'h34;
  localparam logic [5:0] OP_SH     = 6'h35;
  localparam logic [5:0] OP_SW     = 6'h36;
  localparam logic [5:0] OP_LBUI   = 6'h38;
  localparam logic [5:0] OP_LHUI   = 6'h39;
  localparam logic [5:0] OP_LWI    = 6'h3A;
  localparam logic [5:0] OP_SBI    = 6'h3C;
  localparam logic [5:0] OP_SHI    = 6'h3D;
  localparam logic [5:0] OP_SWI    = 6'h3E;

  // Byte enables, MSB lane first (big-endian): byte, half word, word
  localparam logic [3:0] BE_BYTE = 4'b1000;
  localparam logic [3:0] BE_HALF = 4'b1100;
  localparam logic [3:0] BE_WORD = 4'b1111;

  // Stall cycles after the execute cycle of a multi-cycle instruction
  localparam int unsigned LAT_FADD  = 4;   // fadd, frsub, fmul, flt
  localparam int unsigned LAT_FINT  = 5;
  localparam int unsigned LAT_FSQRT = 27;
  localparam int unsigned LAT_FDIV  = 28;
  localparam int unsigned LAT_IDIV  = 32;

  // FPU operation, instruction bits [9:7]
  typedef enum logic [2:0] {
    FOP_ADD  = 3'd0, FOP_RSUB = 3'd1, FOP_MUL = 3'd2, FOP_DIV = 3'd3,
    FOP_CMP  = 3'd4, FOP_FLT  = 3'd5, FOP_INT = 3'd6, FOP_SQRT = 3'd7
  } fpu_op_e;

  // Data access size
  typedef enum logic [1:0] {SZ_BYTE = 2'd0, SZ_HALF = 2'd1, SZ_WORD = 2'd2} acc_size_e;

  // One prefetch buffer entry: instruction and the address it came from
  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] instr;
  } fetch_entry_t;

  function automatic logic [5:0] f_opcode(input logic [31:0] i); return i[31:26]; endfunction
  function automatic logic [4:0] f_rd    (input logic [31:0] i); return i[25:21]; endfunction
  function automatic logic [4:0] f_ra    (input logic [31:0] i); return i[20:16]; endfunction
  function automatic logic [4:0] f_rb    (input logic [31:0] i); return i[15:11]; endfunction

  // Loads: opcodes 11x0xx (mask 0xD0000000 == 0xC0000000)
  function automatic logic is_load(input logic [31:0] i);
    return (i[31:30] == 2'b11) && !i[28];
  endfunction
  // Stores: opcodes 11x1xx (mask 0xD0000000 == 0xD0000000)
  function automatic logic is_store(input logic [31:0] i);
    return (i[31:30] == 2'b11) && i[28];
  endfunction
  // Multiplies (0x10, 0x18) and barrel shifts (0x11, 0x19): their results are
  // not forwarded to the next instruction, which stalls as after a load.
  function automatic logic is_mul(input logic [31:0] i);
    return (i[31:26] == OP_MUL) || (i[31:26] == OP_MULI);
  endfunction
  function automatic logic is_bs(input logic [31:0] i);
    return (i[31:26] == OP_BS) || (i[31:26] == OP_BSI);
  endfunction

  // Stall cycles a multi-cycle instruction adds after its execute cycle, 0
  // for single-cycle instructions (fcmp included).
  function automatic logic [5:0] mc_latency(input logic [31:0] i);
    logic [5:0] lat;
    lat = '0;
    if (i[31:26] == OP_IDIV) lat = 6'(LAT_IDIV);
    else if (i[31:26] == OP_FPU) begin
      unique case (i[9:7])
        3'd0, 3'd1, 3'd2, 3'd5: lat = 6'(LAT_FADD);
        3'd3:                   lat = 6'(LAT_FDIV);
        3'd4:                   lat = '0;
        3'd6:                   lat = 6'(LAT_FINT);
        default:                lat = 6'(LAT_FSQRT);
      endcase
    end
    return lat;
  endfunction

endpackage
