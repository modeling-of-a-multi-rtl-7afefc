// mb_system: the local MicroBlaze system, one processor and its local
// memories.
//
// The processor (mb_core) connects straight to NUM_SLAVES dual-port local
// memories (local_memory), without a separate bus or bus-to-RAM controller:
// the processor decodes addresses and drives one address strobe per memory,
// and each memory checks its own address window. Port A of every memory
// serves instruction fetches, port B data accesses. The address, write data,
// read/write strobes and byte enables of each side are shared by all
// memories; the replies (data and ready) come back separately per memory.
// Port A is never written: its write strobe, byte enables and write data are
// tied inactive.
//
// Memory k covers LOW_ADDRS[k]..HIGH_ADDRS[k] and is MEM_WORDS words deep.
// MEM_PATH0 and MEM_PATH1 name $readmemh files with the initial content of
// memories 0 and 1 (the program goes in memory 0), or are empty; further
// memories start cleared. The defaults give two 8 KB memories, the program
// memory at 0x0000 and a second one at 0x2000, after the two-memory example
// of the document; the sizes are this design's choice.
//
// Timing: see mb_core; every memory replies one cycle after its strobe.
// The top brings out the data-side bus so that a testbench can watch
// stores, and the instruction address and fetch strobe.
module mb_system
  import mb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 2,
  parameter logic [NUM_SLAVES-1:0][31:0] LOW_ADDRS  = {32'h0000_2000, 32'h0000_0000},
  parameter logic [NUM_SLAVES-1:0][31:0] HIGH_ADDRS = {32'h0000_3FFF, 32'h0000_1FFF},
  parameter int unsigned MEM_WORDS  = 2048,
  parameter string       MEM_PATH0  = "",
  parameter string       MEM_PATH1  = "",
  parameter int unsigned PREFETCH_DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        rst,
  output logic [31:0]                 instr_addr,
  output logic                        ifetch,
  output logic [31:0]                 data_addr,
  output logic [31:0]                 data_write,
  output logic [NUM_SLAVES-1:0]       d_as,
  output logic                        write_strobe,
  output logic                        read_strobe,
  output logic [3:0]                  byte_enable,
  output logic [NUM_SLAVES-1:0]       dready
);

  logic [NUM_SLAVES-1:0]       i_as, iready;
  logic [NUM_SLAVES-1:0][31:0] instr, data_read;

  mb_core #(
    .NUM_SLAVES(NUM_SLAVES), .LOW_ADDRS(LOW_ADDRS), .HIGH_ADDRS(HIGH_ADDRS),
    .PREFETCH_DEPTH(PREFETCH_DEPTH)
  ) u_core (
    .clk, .rst,
    .instr_addr, .ifetch, .i_as, .instr, .iready,
    .data_addr, .data_write, .d_as, .read_strobe, .write_strobe, .byte_enable,
    .data_read, .dready
  );

  for (genvar k = 0; k < NUM_SLAVES; k++) begin : g_mem
    local_memory #(
      .LOW_ADDR(LOW_ADDRS[k]), .HIGH_ADDR(HIGH_ADDRS[k]), .MEM_WORDS(MEM_WORDS),
      .MEM_PATH(k == 0 ? MEM_PATH0 : (k == 1 ? MEM_PATH1 : ""))
    ) u_mem (
      .clk, .rst,
      .porta_abus(instr_addr), .porta_wdbus(32'd0),
      .porta_read_strobe(ifetch), .porta_write_strobe(1'b0),
      .porta_addr_strobe(i_as[k]), .porta_be(4'b0000),
      .porta_dout(instr[k]), .porta_dready(iready[k]),
      .portb_abus(data_addr), .portb_wdbus(data_write),
      .portb_read_strobe(read_strobe), .portb_write_strobe(write_strobe),
      .portb_addr_strobe(d_as[k]), .portb_be(byte_enable),
      .portb_dout(data_read[k]), .portb_dready(dready[k])
    );
  end

endmodule
