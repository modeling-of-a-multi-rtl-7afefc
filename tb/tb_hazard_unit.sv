// tb_hazard_unit: self-checking test of the stall controller.
//
// The testbench plays the part of the pipeline: it offers an instruction
// stream to decode and lets an instruction execute in the first cycle the
// unit does not stall. For each instruction it measures how many cycles it
// waited, and it records the cycles in which fetch was held.
//
// Directed cases, with waits worked out by hand from the rules:
//   load then a user of ra, of rb (register form), or a store of the loaded
//   register: 1 cycle; an immediate form whose immediate bits look like the
//   register: 0; an unrelated instruction: 0; a user two slots later, with
//   an unrelated instruction executed in between: 1 (also for a store); a
//   user two slots later when the one in between had to wait: 0;
//   multiply and barrel shift then a user: 1;
//   load, dependent load, dependent add: 1 then 2, with fetch held for four
//   cycles in a row;
//   multi-cycle instructions: fadd, frsub, fmul, flt 4, fint 5, fsqrt 27,
//   fdiv 28, idiv 32, fcmp 0 cycles for the next instruction.
// Random streams of loads, multiplies, ALU operations, stores, divides and
// floating point operations are
// then checked against the rule: an instruction waits 1 cycle when the
// instruction executed in the previous cycle is load-like and writes one of
// its source registers, 2 when that instruction itself had waited for such
// a dependency, 1 when the instruction two back is load-like, writes one of
// its source registers and the one in between did not wait, and the full
// latency after a multi-cycle instruction.
// Fetch hold is counted in the directed cases: one cycle after a single
// stall, four in a row around a double stall.
module tb_hazard_unit;
  import mb_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        id_valid, ex_commit;
  logic [31:0] id_instr, ex_instr;
  logic        stall, fetch_hold, dep, dep_far, double_stall, mc_busy;

  hazard_unit dut (.*);

  assign ex_commit = id_valid && !stall;
  assign ex_instr  = id_instr;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Instruction builders
  function automatic logic [31:0] tA(input logic [5:0] op, input int rd, input int ra, input int rb,
                                     input logic [10:0] fn = '0);
    return {op, 5'(rd), 5'(ra), 5'(rb), fn};
  endfunction
  function automatic logic [31:0] tB(input logic [5:0] op, input int rd, input int ra,
                                     input logic [15:0] imm);
    return {op, 5'(rd), 5'(ra), imm};
  endfunction
  function automatic logic [31:0] fpu_i(input int rd, input int ra, input int rb, input int fop);
    return {6'h16, 5'(rd), 5'(ra), 5'(rb), 1'b0, 3'(fop), 7'd0};
  endfunction

  localparam logic [31:0] NOP = 32'h8000_0000;  // or r0, r0, r0

  // Run a stream; waits[i] = cycles instruction i spent stalled in decode,
  // hold_cycles = cycles with fetch held, max_hold_run = longest run.
  int waits [64];
  int hold_cycles, max_hold_run;

  task automatic run(input logic [31:0] prog []);
    int k, w, run_len;
    k = 0;
    w = 0;
    hold_cycles = 0;
    max_hold_run = 0;
    run_len = 0;
    while (k < prog.size()) begin
      id_valid = 1'b1;
      id_instr = prog[k];
      #1;
      if (fetch_hold) begin
        hold_cycles++;
        run_len++;
        if (run_len > max_hold_run) max_hold_run = run_len;
      end else run_len = 0;
      if (ex_commit) begin
        waits[k] = w;
        k++;
        w = 0;
      end else w++;
      @(negedge clk);
    end
    // drain: a few idle cycles clear the history
    id_valid = 1'b0;
    repeat (40) @(negedge clk);
  endtask

  task automatic expect_waits(input string name, input logic [31:0] prog [], input int exp []);
    run(prog);
    for (int i = 0; i < exp.size(); i++)
      check(waits[i] == exp[i], $sformatf("%s: instruction %0d waited %0d, expected %0d",
                                          name, i, waits[i], exp[i]));
  endtask

  // Reference rule for random streams
  function automatic bit load_like(input logic [31:0] i);
    return (i[31:30] == 2'b11 && !i[28]) || i[31:26] == 6'h10 || i[31:26] == 6'h18 ||
           i[31:26] == 6'h11 || i[31:26] == 6'h19;
  endfunction
  function automatic bit uses(input logic [31:0] i, input logic [4:0] r);
    if (i[20:16] == r) return 1'b1;
    if (!i[29] && i[15:11] == r) return 1'b1;
    if (i[31:30] == 2'b11 && i[28] && i[25:21] == r) return 1'b1;
    return 1'b0;
  endfunction
  function automatic int latency(input logic [31:0] i);
    if (i[31:26] == 6'h12) return 32;
    if (i[31:26] != 6'h16) return 0;
    case (i[9:7])
      3'd3: return 28;
      3'd4: return 0;
      3'd6: return 5;
      3'd7: return 27;
      default: return 4;
    endcase
  endfunction

  function automatic logic [31:0] rand_instr();
    int r, a, b, d;
    a = $urandom_range(0, 5);
    b = $urandom_range(0, 5);
    d = $urandom_range(0, 5);
    r = $urandom_range(0, 19);
    if (r < 5)  return tA(6'h32, d, a, b);                // lw
    if (r < 7)  return tB(6'h3A, d, a, 16'($urandom));    // lwi
    if (r < 8)  return tA(6'h10, d, a, b);                // mul
    if (r < 9)  return tB(6'h19, d, a, 16'($urandom));    // bsi
    if (r < 11) return tA(6'h36, d, a, b);                // sw
    if (r < 12) return tB(6'h3E, d, a, 16'($urandom));    // swi
    if (r < 13) return fpu_i(d, a, b, $urandom_range(0, 7));
    if (r < 14) return tA(6'h12, d, a, b);                // idiv
    if (r < 17) return tA(6'h00, d, a, b);                // add
    return tB(6'h08, d, a, 16'($urandom));                // addi
  endfunction

  initial begin
    logic [31:0] seq [];
    int          ew [];
    id_valid = 1'b0;
    id_instr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    expect_waits("load ra", '{tA(6'h32, 3, 1, 2), tA(6'h00, 4, 3, 0), NOP}, '{0, 1, 0});
    expect_waits("load rb", '{tB(6'h3A, 3, 1, 16'h10), tA(6'h00, 4, 0, 3), NOP}, '{0, 1, 0});
    expect_waits("load imm", '{tB(6'h3A, 3, 1, 16'h10), tB(6'h08, 4, 0, 16'h1800), NOP}, '{0, 0, 0});
    expect_waits("load store", '{tB(6'h3A, 3, 1, 16'h10), tB(6'h3E, 3, 1, 16'h14), NOP}, '{0, 1, 0});
    expect_waits("load other", '{tB(6'h3A, 3, 1, 16'h10), tA(6'h00, 4, 5, 6), tA(6'h00, 7, 3, 3)}, '{0, 0, 1});
    expect_waits("far store", '{tB(6'h3A, 3, 1, 16'h10), NOP, tB(6'h3E, 3, 1, 16'h14), NOP}, '{0, 0, 1, 0});
    expect_waits("far rb", '{tA(6'h10, 3, 1, 2), NOP, tA(6'h00, 4, 0, 3), NOP}, '{0, 0, 1, 0});
    expect_waits("far imm", '{tB(6'h3A, 3, 1, 16'h10), NOP, tB(6'h08, 4, 0, 16'h1800), NOP}, '{0, 0, 0, 0});
    expect_waits("far after wait", '{tB(6'h3A, 3, 1, 16'h10), tA(6'h00, 4, 3, 0), tA(6'h00, 5, 3, 0)}, '{0, 1, 0});
    expect_waits("far three back", '{tB(6'h3A, 3, 1, 16'h10), NOP, NOP, tA(6'h00, 5, 3, 0)}, '{0, 0, 0, 0});
    expect_waits("load r-type rd", '{tB(6'h3A, 3, 1, 16'h10), tA(6'h00, 3, 5, 6), NOP}, '{0, 0, 0});
    expect_waits("mul", '{tA(6'h10, 3, 1, 2), tA(6'h00, 4, 3, 0), NOP}, '{0, 1, 0});
    expect_waits("muli", '{tB(6'h18, 3, 1, 16'h7), tA(6'h00, 4, 0, 3), NOP}, '{0, 1, 0});
    expect_waits("bsll", '{tA(6'h11, 3, 1, 2, 11'h400), tA(6'h00, 4, 3, 0), NOP}, '{0, 1, 0});
    expect_waits("add no stall", '{tA(6'h00, 3, 1, 2), tA(6'h00, 4, 3, 3), NOP}, '{0, 0, 0});

    expect_waits("double", '{tB(6'h3A, 3, 0, 16'h10), tB(6'h3A, 4, 3, 16'h0),
                             tA(6'h00, 5, 4, 0), NOP, NOP}, '{0, 1, 2, 0, 0});
    check(hold_cycles == 4 && max_hold_run == 4,
          $sformatf("double stall: fetch held %0d cycles (run %0d), expected 4 in a row",
                    hold_cycles, max_hold_run));
    expect_waits("single hold", '{tB(6'h3A, 3, 0, 16'h10), tA(6'h00, 4, 3, 0), NOP}, '{0, 1, 0});
    check(hold_cycles == 1, $sformatf("single stall: fetch held %0d cycles", hold_cycles));

    expect_waits("fadd",  '{fpu_i(3, 1, 2, 0), NOP, NOP}, '{0, 4, 0});
    expect_waits("frsub", '{fpu_i(3, 1, 2, 1), NOP, NOP}, '{0, 4, 0});
    expect_waits("fmul",  '{fpu_i(3, 1, 2, 2), NOP, NOP}, '{0, 4, 0});
    expect_waits("fdiv",  '{fpu_i(3, 1, 2, 3), NOP, NOP}, '{0, 28, 0});
    expect_waits("fcmp",  '{fpu_i(3, 1, 2, 4), NOP, NOP}, '{0, 0, 0});
    expect_waits("flt",   '{fpu_i(3, 1, 0, 5), NOP, NOP}, '{0, 4, 0});
    expect_waits("fint",  '{fpu_i(3, 1, 0, 6), NOP, NOP}, '{0, 5, 0});
    expect_waits("fsqrt", '{fpu_i(3, 1, 0, 7), NOP, NOP}, '{0, 27, 0});
    expect_waits("idiv",  '{tA(6'h12, 3, 1, 2), NOP, NOP}, '{0, 32, 0});
    expect_waits("fdiv chain", '{fpu_i(3, 1, 2, 3), fpu_i(4, 3, 2, 0), NOP}, '{0, 28, 4});

    // Random streams against the reference rule
    for (int n = 0; n < 300; n++) begin
      int len;
      len = $urandom_range(4, 40);
      seq = new[len];
      ew = new[len];
      for (int i = 0; i < len; i++) seq[i] = rand_instr();
      run(seq);
      ew[0] = 0;
      for (int i = 1; i < len; i++) begin
        if (latency(seq[i-1]) != 0) ew[i] = latency(seq[i-1]);
        else if (load_like(seq[i-1]) && uses(seq[i], seq[i-1][25:21]))
          ew[i] = (i >= 2 && ew[i-1] != 0 && latency(seq[i-2]) == 0) ? 2 : 1;
        else if (i >= 2 && ew[i-1] == 0 && load_like(seq[i-2]) && uses(seq[i], seq[i-2][25:21]))
          ew[i] = 1;
        else ew[i] = 0;
      end
      for (int i = 0; i < len; i++)
        check(waits[i] == ew[i], $sformatf("random %0d: instr %0d (%h) waited %0d, expected %0d",
                                           n, i, seq[i], waits[i], ew[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
