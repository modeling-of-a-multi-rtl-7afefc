// local_memory: dual-port block RAM seen by the processor through two local
// memory bus ports, PORTA for instruction fetches and PORTB for data.
//
// Each port samples its strobes on the rising clock edge. When the address
// strobe is high and the address lies within LOW_ADDR..HIGH_ADDR, a write
// (write strobe high) merges the write data into the addressed word under the
// byte enables, and in every case the port drives the word's content on dout
// with dready high for exactly the next cycle. The RAM is write-first: the
// reply to a write is the word as just written. A request outside the range
// gets no reply. Addresses are byte addresses; the word index is
// (addr - LOW_ADDR) >> 2, so the two low address bits only choose byte lanes.
// Byte enables are MSB-first: 1000 is the byte at offset 0 (bits 31:24),
// 1100 the half word at offset 0; other patterns select any set of lanes.
//
// The read strobes are part of the bus but not needed to decide the access:
// a strobed access that is not a write is a read.
//
// Timing: request on the bus in cycle t, reply (dout, dready) in cycle t+1.
// Both ports may access the same word in one cycle; a read then sees the old
// content; if both write, the word takes both ports' lanes, PORTB's where
// they overlap, while each reply shows only its own port's lanes merged.
//
// From the document: two ports with the same behaviour, the strobes, byte
// enables, write-first replies, the one-cycle dready pulse, the low/high
// address window and the program file given at build time (here a $readmemh
// file of 32-bit words with @word-address records). Own choices: the word
// size of the default memory (MEM_WORDS), the range check inside the memory
// (it stands in for the interface controller, which the document folds into
// the memory) and zero initialisation when no file is given.
module local_memory #(
  parameter logic [31:0] LOW_ADDR  = 32'h0000_0000,
  parameter logic [31:0] HIGH_ADDR = 32'h0000_1FFF,
  parameter int unsigned MEM_WORDS = 2048,
  parameter string       MEM_PATH  = ""
) (
  input  logic        clk,
  input  logic        rst,
  // PORTA (instruction side)
  input  logic [31:0] porta_abus,
  input  logic [31:0] porta_wdbus,
  input  logic        porta_read_strobe,
  input  logic        porta_write_strobe,
  input  logic        porta_addr_strobe,
  input  logic [3:0]  porta_be,
  output logic [31:0] porta_dout,
  output logic        porta_dready,
  // PORTB (data side)
  input  logic [31:0] portb_abus,
  input  logic [31:0] portb_wdbus,
  input  logic        portb_read_strobe,
  input  logic        portb_write_strobe,
  input  logic        portb_addr_strobe,
  input  logic [3:0]  portb_be,
  output logic [31:0] portb_dout,
  output logic        portb_dready
);

  localparam int unsigned AW = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1;

  logic [31:0] mem [MEM_WORDS];

  initial begin
    for (int unsigned i = 0; i < MEM_WORDS; i++) mem[i] = '0;
    if (MEM_PATH != "") $readmemh(MEM_PATH, mem);
  end

  function automatic logic [AW-1:0] word_index(input logic [31:0] addr);
    logic [31:0] off;
    off = addr - LOW_ADDR;
    return off[AW+1:2];
  endfunction

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] wd,
                                        input logic [3:0] be);
    logic [31:0] r;
    r = old;
    for (int b = 0; b < 4; b++)
      if (be[3-b]) r[31-8*b -: 8] = wd[31-8*b -: 8];
    return r;
  endfunction

  logic a_hit, b_hit;
  logic [AW-1:0] a_idx, b_idx;
  // In range when addr - LOW_ADDR, taken modulo 2^32, is at most the window size
  localparam logic [31:0] SPAN = HIGH_ADDR - LOW_ADDR;
  assign a_hit = porta_addr_strobe && (porta_abus - LOW_ADDR <= SPAN);
  assign b_hit = portb_addr_strobe && (portb_abus - LOW_ADDR <= SPAN);
  assign a_idx = word_index(porta_abus);
  assign b_idx = word_index(portb_abus);

  // Write-first replies: the reply is the merged word on a write.
  logic [31:0] a_new, b_new;
  assign a_new = merge(mem[a_idx], porta_wdbus, porta_be);
  assign b_new = merge(mem[b_idx], portb_wdbus, portb_be);

  always_ff @(posedge clk) begin
    if (a_hit && porta_write_strobe) mem[a_idx] <= a_new;
    if (b_hit && portb_write_strobe)
      mem[b_idx] <= (a_hit && porta_write_strobe && a_idx == b_idx)
                    ? merge(a_new, portb_wdbus, portb_be) : b_new;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      porta_dready <= 1'b0;
      portb_dready <= 1'b0;
      porta_dout   <= '0;
      portb_dout   <= '0;
    end else begin
      porta_dready <= a_hit;
      portb_dready <= b_hit;
      if (a_hit) porta_dout <= porta_write_strobe ? a_new : mem[a_idx];
      if (b_hit) portb_dout <= portb_write_strobe ? b_new : mem[b_idx];
    end
  end

  // A request is either a read or a write, never both.
  a_one_kind: assert property (@(posedge clk) disable iff (rst)
    porta_addr_strobe |-> !(porta_read_strobe && porta_write_strobe));
  b_one_kind: assert property (@(posedge clk) disable iff (rst)
    portb_addr_strobe |-> !(portb_read_strobe && portb_write_strobe));

endmodule
