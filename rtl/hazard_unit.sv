// hazard_unit: the stall controller of the core.
//
// Load-use stall. The result of a load reaches the register file only when
// the memory replies, two cycles after the load executes, so the instruction
// right after a load must wait one cycle if it reads the loaded register.
// Multiplies and barrel shifts are treated like loads: their result is not
// forwarded to the next instruction either. The instruction waiting in decode
// depends on the previous load-like instruction's destination rd when its ra
// equals rd, when it is a register-register (type A) instruction and its rb
// equals rd, or when it is a store whose data register equals rd. Such a
// dependency stalls decode and execute for one cycle (stall).
//
// Far load-use stall. The same one-cycle stall also hits an instruction that
// reads the destination of the load-like instruction executed two cycles
// earlier, when one other instruction executed in between (load, unrelated
// instruction, dependent instruction). The processor being matched behaves
// this way although its load result would already be on the bus; the stall
// is kept so that the timing agrees. It counts as a dependency for the fetch
// hold and the double stall below.
//
// Fetch hold. Instruction fetch stops one cycle later than decode and
// execute: fetch_hold is the stall delayed by one cycle.
//
// Double stall. When a new dependency arises while the stall of two cycles
// earlier is still in the history (a load, a dependent load, then an
// instruction depending on the second load), the stall is stretched by one
// extra cycle and fetch is held in the cycle in between as well, so that no
// instruction is fetched for four cycles in a row.
//
// Multi-cycle stall. Floating point instructions and integer divide stall
// decode and execute for a fixed number of cycles after their execute cycle:
// 4 (fadd, frsub, fmul, flt), 5 (fint), 27 (fsqrt), 28 (fdiv), 32 (idiv);
// fcmp takes none. A down-counter loaded at the execute cycle counts them.
// Fetch goes on meanwhile until the prefetch buffer is full.
//
// Interface: id_valid/id_instr describe the instruction that would execute
// this cycle; ex_commit/ex_instr the instruction that does execute this
// cycle. stall, fetch_hold and the event flags dep, dep_far (the far case
// alone) and double_stall are
// combinational from those inputs and the registered history.
//
// From the document: the dependency rules, the far stall (described only
// as an observed one-cycle delay; which instructions it covers is this
// design's reading), the treatment of multiplies and
// barrel shifts as loads, the delayed fetch hold, the double-stall extension
// and the latencies. Own choice: expressing them as a small state machine
// beside a conventional pipeline.
module hazard_unit
  import mb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        id_valid,
  input  logic [31:0] id_instr,
  input  logic        ex_commit,
  input  logic [31:0] ex_instr,
  output logic        stall,
  output logic        fetch_hold,
  output logic        dep,
  output logic        dep_far,
  output logic        double_stall,
  output logic        mc_busy
);

  logic       load_v_q, load2_v_q;
  logic [4:0] load_rd_q, load2_rd_q;
  logic       was_stalled_q, was_stalled2_q, extend_q;
  logic [5:0] mc_cnt_q;

  // id_instr reads register r
  function automatic logic reads(input logic [31:0] i, input logic [4:0] r);
    return (f_ra(i) == r) || ((f_rb(i) == r) && !i[29]) || ((f_rd(i) == r) && is_store(i));
  endfunction

  logic dep_near;
  assign dep_near     = load_v_q && id_valid && reads(id_instr, load_rd_q);
  assign dep_far      = load2_v_q && id_valid && reads(id_instr, load2_rd_q);
  assign dep          = dep_near || dep_far;
  assign double_stall = dep && was_stalled2_q;
  assign mc_busy      = mc_cnt_q != '0;
  assign stall        = dep || extend_q || mc_busy;
  assign fetch_hold   = was_stalled_q || double_stall;

  always_ff @(posedge clk) begin
    if (rst) begin
      load_v_q       <= 1'b0;
      load_rd_q      <= '0;
      load2_v_q      <= 1'b0;
      load2_rd_q     <= '0;
      was_stalled_q  <= 1'b0;
      was_stalled2_q <= 1'b0;
      extend_q       <= 1'b0;
      mc_cnt_q       <= '0;
    end else begin
      load_v_q       <= ex_commit && (is_load(ex_instr) || is_mul(ex_instr) || is_bs(ex_instr));
      load_rd_q      <= f_rd(ex_instr);
      load2_v_q      <= load_v_q && ex_commit;
      load2_rd_q     <= load_rd_q;
      was_stalled_q  <= dep || extend_q;
      was_stalled2_q <= was_stalled_q;
      extend_q       <= double_stall;
      if (ex_commit)     mc_cnt_q <= mc_latency(ex_instr);
      else if (mc_busy)  mc_cnt_q <= mc_cnt_q - 1'b1;
    end
  end

  no_commit_in_stall: assert property (@(posedge clk) disable iff (rst) stall |-> !ex_commit);

endmodule
