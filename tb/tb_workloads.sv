// tb_workloads: the three endless-loop programs used to compare simulation
// speeds, run on the full-size system for a fixed number of cycles.
//
//   inf_loop    a branch to itself and nothing else;
//   inf_mem     a loop of loads and stores on the second memory (each pass
//               reads a counter, increments it, stores it, reads it back and
//               copies it to the next word) plus a pass counter;
//   inf_simple  a loop of the same length with register-only arithmetic
//               (add, subtract, shift, xor) and the same pass counter.
// The programs are assembled here word by word and written into memory 0
// while the system is held in reset.
//
// Checks, at every execution of the loop's closing branch (pass k):
//   inf_mem     the pass counter is k, the counter word in memory is k,
//               every store writes the expected value, in order;
//   inf_simple  the pass counter and all computed registers equal values
//               worked out from k, and no data access happens at all;
//   inf_loop    no data access happens.
// For every program the loop must settle to a constant number of cycles per
// pass; the pass count and cycles per pass are printed.
module tb_workloads;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] instr_addr, data_addr, data_write;
  logic        ifetch, write_strobe, read_strobe;
  logic [1:0]  d_as, dready;
  logic [3:0]  byte_enable;

  mb_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encoders
  function automatic logic [31:0] tA(input logic [5:0] op, input int rd, input int ra, input int rb,
                                     input logic [10:0] fn = '0);
    return {op, 5'(rd), 5'(ra), 5'(rb), fn};
  endfunction
  function automatic logic [31:0] tB(input logic [5:0] op, input int rd, input int ra,
                                     input logic [15:0] imm);
    return {op, 5'(rd), 5'(ra), imm};
  endfunction
  localparam logic [5:0] ADDIK = 6'h0C, LWI = 6'h3A, SWI = 6'h3E, BRI = 6'h2E;

  localparam logic [31:0] LOOP_BR = 32'h24;   // closing branch of the two loops

  logic [31:0] prog [16];
  int          mode;                // 0 inf_loop, 1 inf_mem, 2 inf_simple
  bit          running = 1'b0;
  int          passes, last_pass_cycle, period, period_changes, n_data, n_stores;
  int unsigned cycle = 0;
  logic [31:0] last_count;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (running) begin
      if (d_as != '0) n_data++;
      // inf_mem stores: counter at 0x2000, copy at 0x2004
      if (mode == 1 && write_strobe && d_as != '0) begin
        n_stores++;
        if (data_addr == 32'h2000) begin
          check(data_write == last_count + 1, $sformatf("counter store %h after %h", data_write, last_count));
          last_count = data_write;
        end else
          check(data_addr == 32'h2004 && data_write == last_count,
                $sformatf("copy store %h to %h", data_write, data_addr));
      end
      if (dut.u_core.ex_go && dut.u_core.pc == (mode == 0 ? 32'h0 : LOOP_BR)) begin
        logic [31:0] k, r3;
        passes++;
        k = 32'(passes);
        if (passes > 3 && cycle - last_pass_cycle != period) period_changes++;
        if (passes > 1) period = cycle - last_pass_cycle;
        last_pass_cycle = cycle;
        if (mode == 1) begin
          check(dut.u_core.rf[5] == k, $sformatf("inf_mem pass counter %0d at pass %0d", dut.u_core.rf[5], k));
          check(dut.g_mem[1].u_mem.mem[0] == k, $sformatf("inf_mem memory counter at pass %0d", k));
        end
        if (mode == 2) begin
          r3 = 3 * k;
          check(dut.u_core.rf[5] == k, $sformatf("inf_simple pass counter at pass %0d", k));
          check(dut.u_core.rf[3] == r3, "inf_simple r3");
          check(dut.u_core.rf[4] == -r3, "inf_simple r4");
          check(dut.u_core.rf[6] == r3 >> 1, "inf_simple r6");
          check(dut.u_core.rf[7] == (-r3 ^ (r3 >> 1)), "inf_simple r7");
          check(dut.u_core.rf[8] == (-r3 ^ (r3 >> 1)) + r3, "inf_simple r8");
        end
      end
    end
  end

  task automatic run(input string name, input int m, input int cycles);
    mode = m;
    rst = 1'b1;
    running = 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 2048; i++) begin
      dut.g_mem[0].u_mem.mem[i] = (i < 16) ? prog[i] : 32'h0;
      dut.g_mem[1].u_mem.mem[i] = '0;
    end
    passes = 0;
    period = 0;
    period_changes = 0;
    n_data = 0;
    n_stores = 0;
    last_count = '0;
    @(negedge clk);
    rst = 1'b0;
    running = 1'b1;
    repeat (cycles) @(posedge clk);
    running = 1'b0;
    $display("%s: %0d passes in %0d cycles, %0d cycles per pass, %0d data accesses",
             name, passes, cycles, period, n_data);
    check(passes > 50, {name, ": loop ran"});
    check(period_changes == 0, $sformatf("%s: pass length changed %0d times", name, period_changes));
  endtask

  initial begin
    // inf_loop: bri 0 at address 0
    for (int i = 0; i < 16; i++) prog[i] = '0;
    prog[0] = tB(BRI, 0, 0, 16'h0000);
    run("inf_loop", 0, 2000);
    check(n_data == 0, "inf_loop: no data access");

    // inf_mem
    prog[0]  = tB(ADDIK, 1, 0, 16'h2000);   // r1 = base of memory 1
    prog[1]  = tB(ADDIK, 5, 0, 16'h0000);   // r5 = 0 (pass counter)
    prog[2]  = tB(ADDIK, 3, 0, 16'h0000);
    prog[3]  = tB(LWI,   3, 1, 16'h0000);   // 0x0C: r3 = mem[r1]
    prog[4]  = tB(ADDIK, 3, 3, 16'h0001);   //       r3 += 1 (waits for the load)
    prog[5]  = tB(SWI,   3, 1, 16'h0000);   //       mem[r1] = r3
    prog[6]  = tB(LWI,   4, 1, 16'h0000);   //       r4 = mem[r1]
    prog[7]  = tB(SWI,   4, 1, 16'h0004);   //       mem[r1+4] = r4 (waits)
    prog[8]  = tB(ADDIK, 5, 5, 16'h0001);   //       r5 += 1
    prog[9]  = tB(BRI,   0, 0, 16'hFFE8);   // 0x24: back to 0x0C
    run("inf_mem", 1, 3000);
    check(n_stores >= 2 * passes && n_stores <= 2 * passes + 2, $sformatf("inf_mem: %0d stores", n_stores));

    // inf_simple: same length, no memory access
    prog[0]  = tB(ADDIK, 3, 0, 16'h0000);
    prog[1]  = tB(ADDIK, 5, 0, 16'h0000);
    prog[2]  = tB(ADDIK, 4, 0, 16'h0000);
    prog[3]  = tB(ADDIK, 3, 3, 16'h0003);            // 0x0C: r3 += 3
    prog[4]  = tA(6'h05, 4, 3, 0);                   //       r4 = r0 - r3
    prog[5]  = tA(6'h24, 6, 3, 0, 11'h041);          //       r6 = r3 >> 1
    prog[6]  = tA(6'h22, 7, 4, 6);                   //       r7 = r4 ^ r6
    prog[7]  = tA(6'h04, 8, 7, 3);                   //       r8 = r7 + r3
    prog[8]  = tB(ADDIK, 5, 5, 16'h0001);            //       r5 += 1
    prog[9]  = tB(BRI,   0, 0, 16'hFFE8);            // 0x24: back to 0x0C
    run("inf_simple", 2, 3000);
    check(n_data == 0, "inf_simple: no data access");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
