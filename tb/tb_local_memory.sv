// tb_local_memory: self-checking test of the dual-port local memory.
//
// A small memory (64 words at 0x100..0x1FF) is driven on both ports with
// random reads and writes: addresses inside and outside the window, all
// byte-enable patterns, idle cycles. A reference array in the testbench,
// updated with the same big-endian byte-lane rule, predicts every reply.
// Checked each cycle: dready high on a port exactly one cycle after an
// in-range address strobe on that port and low otherwise; the reply data is
// the word as it is after the access (write-first). When both ports write
// the same word in one cycle, PORTB's lanes are applied last.
//
// A second instance at the default size loads a program file and the test
// compares its first words with the same file read into the testbench.
module tb_local_memory;

  localparam logic [31:0] LO = 32'h0000_0100;
  localparam logic [31:0] HI = 32'h0000_01FF;
  localparam int unsigned W  = 64;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] a_abus, a_wd, b_abus, b_wd, a_dout, b_dout;
  logic        a_rs, a_ws, a_as, b_rs, b_ws, b_as, a_dr, b_dr;
  logic [3:0]  a_be, b_be;

  local_memory #(.LOW_ADDR(LO), .HIGH_ADDR(HI), .MEM_WORDS(W)) dut (
    .clk, .rst,
    .porta_abus(a_abus), .porta_wdbus(a_wd), .porta_read_strobe(a_rs),
    .porta_write_strobe(a_ws), .porta_addr_strobe(a_as), .porta_be(a_be),
    .porta_dout(a_dout), .porta_dready(a_dr),
    .portb_abus(b_abus), .portb_wdbus(b_wd), .portb_read_strobe(b_rs),
    .portb_write_strobe(b_ws), .portb_addr_strobe(b_as), .portb_be(b_be),
    .portb_dout(b_dout), .portb_dready(b_dr)
  );

  // Default-size instance holding a program
  logic [31:0] p_dout, q_dout;
  logic        p_dr, q_dr;
  logic [31:0] p_abus;
  logic        p_as;
  local_memory #(.MEM_PATH("tb/prog_formal.hex")) dut_prog (
    .clk, .rst,
    .porta_abus(p_abus), .porta_wdbus('0), .porta_read_strobe(p_as),
    .porta_write_strobe(1'b0), .porta_addr_strobe(p_as), .porta_be(4'hF),
    .porta_dout(p_dout), .porta_dready(p_dr),
    .portb_abus('0), .portb_wdbus('0), .portb_read_strobe(1'b0),
    .portb_write_strobe(1'b0), .portb_addr_strobe(1'b0), .portb_be(4'h0),
    .portb_dout(q_dout), .portb_dready(q_dr)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [W];

  function automatic logic [31:0] lanes(input logic [31:0] old, input logic [31:0] wd,
                                        input logic [3:0] be);
    logic [31:0] r;
    r = old;
    if (be[3]) r[31:24] = wd[31:24];
    if (be[2]) r[23:16] = wd[23:16];
    if (be[1]) r[15:8]  = wd[15:8];
    if (be[0]) r[7:0]   = wd[7:0];
    return r;
  endfunction

  function automatic logic [31:0] rand_addr();
    logic [31:0] r;
    r = $urandom_range(0, 9);
    if (r == 0) return $urandom_range(0, 32'hFF);          // below the window
    if (r == 1) return $urandom_range(32'h200, 32'h2FF);   // above it
    if (r == 2) return LO + $urandom_range(0, 3);          // first word
    return LO + $urandom_range(0, 255);
  endfunction

  initial begin
    logic [31:0] exp_a, exp_b, t;
    logic        hit_a, hit_b;
    int          ia, ib;
    logic [31:0] prog [0:2047];

    {a_abus, a_wd, b_abus, b_wd} = '0;
    {a_rs, a_ws, a_as, b_rs, b_ws, b_as} = '0;
    a_be = '0;
    b_be = '0;
    p_abus = '0;
    p_as = 1'b0;
    for (int i = 0; i < W; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // Fill the window with known words through PORTB
    for (int i = 0; i < W; i++) begin
      b_abus = LO + 32'(i * 4);
      b_wd   = $urandom;
      b_be   = 4'hF;
      b_ws   = 1'b1;
      b_as   = 1'b1;
      ref_mem[i] = b_wd;
      @(negedge clk);
      check(b_dr && b_dout == ref_mem[i], $sformatf("fill reply %0d", i));
    end
    b_ws = 1'b0;
    b_as = 1'b0;

    for (int n = 0; n < 3000; n++) begin
      // drive a random request on each port
      a_as   = $urandom_range(0, 3) != 0;
      a_ws   = a_as && $urandom_range(0, 2) == 0;
      a_rs   = a_as && !a_ws;
      a_abus = rand_addr();
      a_wd   = $urandom;
      a_be   = 4'($urandom);
      b_as   = $urandom_range(0, 3) != 0;
      b_ws   = b_as && $urandom_range(0, 1) == 0;
      b_rs   = b_as && !b_ws;
      b_abus = (n % 7 == 0) ? a_abus : rand_addr();
      b_wd   = $urandom;
      b_be   = (n % 3 == 0) ? 4'b1000 : (n % 3 == 1) ? 4'b1100 : 4'($urandom);
      hit_a  = a_as && a_abus >= LO && a_abus <= HI;
      hit_b  = b_as && b_abus >= LO && b_abus <= HI;
      ia     = int'((a_abus - LO) >> 2);
      ib     = int'((b_abus - LO) >> 2);
      // expected replies and new contents
      exp_a = '0;
      exp_b = '0;
      if (hit_a) exp_a = a_ws ? lanes(ref_mem[ia], a_wd, a_be) : ref_mem[ia];
      if (hit_b) exp_b = b_ws ? lanes(ref_mem[ib], b_wd, b_be) : ref_mem[ib];
      if (hit_a && a_ws) ref_mem[ia] = lanes(ref_mem[ia], a_wd, a_be);
      if (hit_b && b_ws) begin
        t = lanes(ref_mem[ib], b_wd, b_be);
        ref_mem[ib] = t;
      end
      @(negedge clk);
      check(a_dr == hit_a, $sformatf("porta dready at %h (as=%b)", a_abus, a_as));
      check(b_dr == hit_b, $sformatf("portb dready at %h (as=%b)", b_abus, b_as));
      if (hit_a) check(a_dout == exp_a, $sformatf("porta data %h exp %h at %h", a_dout, exp_a, a_abus));
      if (hit_b) check(b_dout == exp_b, $sformatf("portb data %h exp %h at %h", b_dout, exp_b, b_abus));
    end
    {a_as, a_ws, a_rs, b_as, b_ws, b_rs} = '0;
    @(negedge clk);
    check(!a_dr && !b_dr, "dready drops when idle");

    // Final contents, read back through PORTA
    for (int i = 0; i < W; i++) begin
      a_abus = LO + 32'(i * 4);
      a_as = 1'b1;
      a_rs = 1'b1;
      @(negedge clk);
      check(a_dr && a_dout == ref_mem[i], $sformatf("readback %0d", i));
    end
    a_as = 1'b0;

    // Program loaded at start-up
    for (int i = 0; i < 2048; i++) prog[i] = '0;
    $readmemh("tb/prog_formal.hex", prog);
    for (int i = 0; i < 140; i++) begin
      p_abus = 32'(i * 4);
      p_as = 1'b1;
      @(negedge clk);
      check(p_dr && p_dout == prog[i], $sformatf("program word %0d", i));
    end
    p_as = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
