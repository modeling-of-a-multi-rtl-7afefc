// addr_decoder: chooses which local memory (slave) an access goes to.
//
// The address is compared with the inclusive low and high address of every
// slave; sel is the index of the matching slave and hit tells that one
// matched. When windows overlap, the highest index wins, as a loop over the
// slaves that keeps the last match would decide. Purely combinational: the
// core registers sel together with the request so that it knows, one cycle
// later, whose reply to take.
//
// From the document: the per-slave low/high address lists and the compare
// loop. Own choice: the hit flag, so that an address no slave owns raises no
// strobe at all.
module addr_decoder #(
  parameter int unsigned NUM_SLAVES = 2,
  parameter logic [NUM_SLAVES-1:0][31:0] LOW_ADDRS  = {32'h0000_2000, 32'h0000_0000},
  parameter logic [NUM_SLAVES-1:0][31:0] HIGH_ADDRS = {32'h0000_3FFF, 32'h0000_1FFF}
) (
  input  logic [31:0] addr,
  output logic [(NUM_SLAVES > 1 ? $clog2(NUM_SLAVES) : 1)-1:0] sel,
  output logic        hit
);

  localparam int unsigned SW = NUM_SLAVES > 1 ? $clog2(NUM_SLAVES) : 1;

  always_comb begin
    sel = '0;
    hit = 1'b0;
    for (int i = 0; i < NUM_SLAVES; i++) begin
      if (32'(addr - LOW_ADDRS[i]) <= 32'(HIGH_ADDRS[i] - LOW_ADDRS[i])) begin
        sel = SW'(i);
        hit = 1'b1;
      end
    end
  end

endmodule
