// prefetch_buffer: the instruction prefetch FIFO of the core.
//
// A synchronous first-in first-out buffer of DEPTH entries, each an
// instruction word together with the address it was fetched from. Fetch
// replies are pushed at the tail; the decode stage sees the head entry
// (head, valid) in the same cycle and removes it with pop. The address
// travels with the instruction so that decode can recognise and discard
// instructions fetched down a path a taken branch has left.
//
// Interface: push/push_data write the tail at the clock edge when the buffer
// is not full; pop removes the head when it is not empty; push and pop may
// happen in the same cycle, also when the buffer is full. A push into a full
// buffer without a pop is ignored. flush empties the buffer and takes
// priority.
// count tells the fetch logic how much room is left.
//
// From the document: the 16-byte, 4-instruction depth and the place of the
// buffer between the fetch reply and decode. Own choices: a circular buffer
// with read and write pointers, and the address stored with each word.
module prefetch_buffer
  import mb_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         flush,
  input  logic         push,
  input  fetch_entry_t push_data,
  input  logic         pop,
  output fetch_entry_t head,
  output logic         valid,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  fetch_entry_t buf_q [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] cnt;

  logic do_push, do_pop;
  assign valid   = (cnt != '0);
  assign full    = (cnt == CW'(DEPTH));
  assign do_push = push && (!full || pop);
  assign do_pop  = pop && valid;
  assign head    = buf_q[rd_ptr];
  assign count   = cnt;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) begin
        buf_q[wr_ptr] <= push_data;
        wr_ptr        <= next_ptr(wr_ptr);
      end
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      cnt <= cnt + CW'(do_push) - CW'(do_pop);
    end
  end

endmodule
