// tb_addr_decoder: self-checking test of the slave address decoder.
//
// Four slaves with windows of different sizes, a gap between two of them
// and one window overlapping another (the higher index must win). Every
// window edge (low - 1, low, high, high + 1) and thousands of random
// addresses are applied; the expected slave is found by a plain search in
// the testbench.
module tb_addr_decoder;

  localparam int unsigned N = 4;
  localparam logic [N-1:0][31:0] LO = {32'h0000_5000, 32'h0000_4000, 32'h0000_2000, 32'h0000_0000};
  localparam logic [N-1:0][31:0] HI = {32'h0000_5FFF, 32'h0000_4FFF, 32'h0000_3FFF, 32'h0000_1FFF};
  // slave 3 is placed inside slave 2's window below to test the priority
  localparam logic [N-1:0][31:0] LO2 = {32'h0000_4800, 32'h0000_4000, 32'h0000_2000, 32'h0000_0000};
  localparam logic [N-1:0][31:0] HI2 = {32'h0000_4BFF, 32'h0000_4FFF, 32'h0000_3FFF, 32'h0000_1FFF};

  logic [31:0] addr;
  logic [1:0]  sel, sel2;
  logic        hit, hit2;

  addr_decoder #(.NUM_SLAVES(N), .LOW_ADDRS(LO),  .HIGH_ADDRS(HI))  dut  (.addr, .sel, .hit);
  addr_decoder #(.NUM_SLAVES(N), .LOW_ADDRS(LO2), .HIGH_ADDRS(HI2)) dut2 (.addr, .sel(sel2), .hit(hit2));

  // Default configuration: two 8 KB memories
  logic       sel_d;
  logic       hit_d;
  addr_decoder dut_d (.addr, .sel(sel_d), .hit(hit_d));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sel(input logic [N-1:0][31:0] lo, input logic [N-1:0][31:0] hi,
                            input logic [31:0] a, output int s, output bit h);
    s = 0;
    h = 1'b0;
    for (int i = 0; i < N; i++)
      if (a >= lo[i] && a <= hi[i]) begin
        s = i;
        h = 1'b1;
      end
  endtask

  task automatic apply(input logic [31:0] a);
    int s;
    bit h;
    addr = a;
    #1;
    expect_sel(LO, HI, a, s, h);
    check(hit == h && (!h || int'(sel) == s), $sformatf("addr %h: sel %0d hit %b exp %0d %b", a, sel, hit, s, h));
    expect_sel(LO2, HI2, a, s, h);
    check(hit2 == h && (!h || int'(sel2) == s), $sformatf("overlap addr %h: sel %0d hit %b exp %0d %b", a, sel2, hit2, s, h));
    h = a <= 32'h3FFF;
    check(hit_d == h && (!h || sel_d == (a >= 32'h2000)), $sformatf("default addr %h", a));
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      apply(LO[i] - 1); apply(LO[i]); apply(HI[i]); apply(HI[i] + 1);
      apply(LO2[i] - 1); apply(LO2[i]); apply(HI2[i]); apply(HI2[i] + 1);
    end
    apply(32'h0); apply(32'hFFFF_FFFF); apply(32'h8000_0000);
    for (int n = 0; n < 5000; n++) apply((n % 2 == 0) ? $urandom_range(0, 32'h6FFF) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
