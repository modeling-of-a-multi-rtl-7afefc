// tb_mb_system: end-to-end test of the local MicroBlaze system at its default
// size (two 8 KB memories, four-word prefetch buffer).
//
// Three programs run one after the other, each loaded into memory 0 through
// hierarchical references while the system is held in reset:
//   prog_formal  the branching and stalling test (delay slots, a branch to
//                the third instruction after it, load-use stalls, chained
//                loads);
//   prog_full    the instruction test: every arithmetic, logic, multiply,
//                barrel shift, divide and floating point instruction with
//                the results stored to one address;
//   prog_extra   byte and half-word accesses, the second memory, the imm
//                prefix, conditional and register branches, multiply and
//                barrel shift stalls and floating point values.
// A small start-up stub at address 0 sets the stack pointer, calls main at
// 0x1A8 and parks in a branch-to-self at 0xC when main returns.
//
// Checks: every store on the data bus (address, write data, byte enables) in
// order against exp_<name>.hex, then all 32 registers. The expected values
// come from an independent instruction-level model of the same programs.
// Timing checks: a one-cycle load-use stall (also for a user two
// instructions after the load), a two-cycle double stall with
// at least four fetch-free cycles, the multi-cycle stall lengths 4, 5, 27,
// 28 and 32, and data replies one cycle after the strobe. Every mechanism
// the design has must occur at least once.
module tb_mb_system;
  import mb_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] instr_addr, data_addr, data_write;
  logic        ifetch, write_strobe, read_strobe;
  logic [1:0]  d_as, dready;
  logic [3:0]  byte_enable;

  mb_system dut (
    .clk, .rst, .instr_addr, .ifetch, .data_addr, .data_write, .d_as,
    .write_strobe, .read_strobe, .byte_enable, .dready
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ expected stores
  logic [31:0] expv [0:255];
  int          n_exp, st_idx;
  bit          running = 1'b0;

  always @(posedge clk) begin
    if (running && write_strobe && d_as != '0) begin
      if (st_idx < n_exp) begin
        check(data_addr == expv[1 + 3*st_idx] && data_write == expv[2 + 3*st_idx] &&
              byte_enable == expv[3 + 3*st_idx][3:0],
              $sformatf("store %0d: got %h %h %b exp %h %h %h", st_idx, data_addr,
                        data_write, byte_enable, expv[1 + 3*st_idx], expv[2 + 3*st_idx],
                        expv[3 + 3*st_idx]));
      end else check(1'b0, $sformatf("unexpected store %0d to %h", st_idx, data_addr));
      st_idx++;
    end
  end

  // ------------------------------------------------- mechanism counters
  int n_dep, n_far, n_double, n_hold, n_flush, n_delay, n_anyway, n_stale, n_full;
  int n_slave1, n_narrow, n_imm, n_mc;
  int dep_run, dbl_run, nofetch_run, mc_run, max_nofetch_dbl;
  bit seen_dbl_in_run;
  bit [63:0] mc_lengths;  // bit k set: a multi-cycle stall of k cycles seen
  logic [1:0] d_as_q;
  logic       ld_q;

  always @(posedge clk) begin
    if (running) begin
      if (dut.u_core.dep)           n_dep++;
      if (dut.u_core.dep_far)       n_far++;
      if (dut.u_core.double_stall)  n_double++;
      if (dut.u_core.fetch_hold)    n_hold++;
      if (dut.u_core.taken_nodelay) n_flush++;
      if (dut.u_core.taken_delay)   n_delay++;
      if (dut.u_core.branch_anyway) n_anyway++;
      if (dut.u_core.stale)         n_stale++;
      if (dut.u_core.fifo_full)     n_full++;
      if (d_as[1])                  n_slave1++;
      if (d_as != '0 && byte_enable != 4'hF) n_narrow++;
      if (dut.u_core.ex_go && dut.u_core.imm_v_q) n_imm++;
      // stall lengths: load-use and double stalls (EX held by the hazard)
      if (dut.u_core.u_hz.stall && !dut.u_core.mc_busy) dep_run++;
      else if (dep_run != 0) begin
        check(dep_run == 1 || dep_run == 2, $sformatf("dependency stall of %0d cycles", dep_run));
        if (dep_run == 2) dbl_run++;
        dep_run = 0;
      end
      // multi-cycle stall lengths
      if (dut.u_core.mc_busy) mc_run++;
      else if (mc_run != 0) begin
        n_mc++;
        if (mc_run < 64) mc_lengths[mc_run] = 1'b1;
        mc_run = 0;
      end
      // fetch-free cycles around a double stall
      if (!ifetch) begin
        nofetch_run++;
        if (dut.u_core.double_stall) seen_dbl_in_run = 1'b1;
      end else begin
        if (seen_dbl_in_run && nofetch_run > max_nofetch_dbl) max_nofetch_dbl = nofetch_run;
        nofetch_run = 0;
        seen_dbl_in_run = 1'b0;
      end
      // a data reply follows its strobe by exactly one cycle
      if (ld_q) check(dready == d_as_q, "data reply one cycle after strobe");
    end
    d_as_q <= d_as;
    ld_q   <= running && d_as != '0;
  end

  // ---------------------------------------------------------- programs
  logic [31:0] prog [0:2047];

  task automatic run_prog(input string name);
    int unsigned t0;
    int          parked;
    for (int i = 0; i < 2048; i++) prog[i] = '0;
    for (int i = 0; i < 256; i++) expv[i] = '0;
    $readmemh({"tb/prog_", name, ".hex"}, prog);
    $readmemh({"tb/exp_", name, ".hex"}, expv);
    rst = 1'b1;
    running = 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 2048; i++) begin
      dut.g_mem[0].u_mem.mem[i] = prog[i];
      dut.g_mem[1].u_mem.mem[i] = '0;
    end
    n_exp  = int'(expv[0]);
    st_idx = 0;
    @(negedge clk);
    rst = 1'b0;
    running = 1'b1;
    t0 = cycle;
    parked = 0;
    while (parked < 40 && cycle - t0 < 50000) begin
      @(posedge clk);
      if (dut.u_core.expect_pc_q == 32'hC) parked++;
      else parked = 0;
    end
    running = 1'b0;
    check(parked >= 40, {name, ": program reached its end"});
    check(st_idx == n_exp, $sformatf("%s: %0d stores, expected %0d", name, st_idx, n_exp));
    for (int r = 0; r < 32; r++)
      check(dut.u_core.rf[r] == expv[1 + 3*n_exp + r],
            $sformatf("%s: r%0d = %h, expected %h", name, r, dut.u_core.rf[r],
                      expv[1 + 3*n_exp + r]));
    $display("%s: %0d cycles, %0d stores", name, cycle - t0, st_idx);
  endtask

  initial begin
    run_prog("formal");
    // The formal test leaves its results in memory 0
    check(dut.g_mem[0].u_mem.mem[32'h6B4 >> 2] == 32'hABB, "formal: word 0x6B4");
    check(dut.g_mem[0].u_mem.mem[32'h6B8 >> 2] == 32'hABD, "formal: word 0x6B8");
    check(dut.g_mem[0].u_mem.mem[32'hAB8 >> 2] == 32'hABC, "formal: word 0xAB8");
    run_prog("full");
    run_prog("extra");
    check(dut.g_mem[1].u_mem.mem[0] == 32'h12345678, "extra: word in memory 1");
    check(dut.g_mem[1].u_mem.mem[1] == 32'h00780000, "extra: byte lane 1 in memory 1");
    check(dut.g_mem[1].u_mem.mem[2] == 32'h00005678, "extra: half word in memory 1");

    $display("events: dep=%0d far=%0d double=%0d fetch_hold=%0d flush=%0d delay=%0d anyway=%0d stale=%0d full=%0d slave1=%0d narrow=%0d imm=%0d mc=%0d",
             n_dep, n_far, n_double, n_hold, n_flush, n_delay, n_anyway, n_stale, n_full,
             n_slave1, n_narrow, n_imm, n_mc);
    check(n_dep > 0,    "load-use stall happened");
    check(n_far > 0,    "load-use stall two instructions after the load happened");
    check(n_double > 0, "double stall happened");
    check(dbl_run > 0,  "double stall lasted two cycles");
    check(max_nofetch_dbl >= 4, $sformatf("no fetch for %0d cycles around a double stall", max_nofetch_dbl));
    check(n_hold > 0,   "delayed fetch hold happened");
    check(n_flush > 0,  "taken branch without delay slot flushed");
    check(n_delay > 0,  "taken branch with delay slot");
    check(n_anyway > 0, "branch to the third instruction after it");
    check(n_stale > 0,  "wrong-path word dropped");
    check(n_full > 0,   "prefetch buffer filled");
    check(n_slave1 > 0, "second memory addressed");
    check(n_narrow > 0, "byte or half-word access");
    check(n_imm > 0,    "imm prefix used");
    check(n_mc > 0,     "multi-cycle stall happened");
    check(mc_lengths[4] && mc_lengths[5] && mc_lengths[27] && mc_lengths[28] && mc_lengths[32],
          $sformatf("multi-cycle stall lengths seen: %b", mc_lengths));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
