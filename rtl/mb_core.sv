// mb_core: a MicroBlaze-compatible processor with a five-stage pipeline and
// two local memory bus masters, one for instructions and one for data.
//
// Pipeline and timing (cycle t is the request cycle of a fetch):
//   IF   t    fetch request on the instruction side: instr_addr, ifetch and
//             the address strobe of the slave that owns the address.
//        t+1  the slave replies (iready); the word and its address enter
//             the prefetch buffer at the end of the cycle.
//   ID   t+2  the head of the prefetch buffer is the instruction in decode.
//   EX   t+2  if no stall holds it, the head instruction executes: operands
//             are read (with a bypass from the load reply of this cycle),
//             the result of an ALU, FPU or link instruction is written to
//             the register file at the end of the cycle, and a load or
//             store registers its data-side request.
//   MEM  t+3  the data request is on the bus (one-cycle address strobe).
//   WB   t+4  the slave replies (dready); the load result is written.
// Decode and execute thus share one cycle, and memory access starts at the
// clock edge that ends execute, as in the reference processor.
//
// Prefetch buffer. Fetching runs ahead of execution until the buffer (four
// words) would be full, counting the fetch in flight. Every word carries its
// address. The core keeps the address of the next instruction it must run
// (expect_pc). A head word with another address was fetched down a path a
// taken branch has left and is dropped without executing: this flushes both
// instructions already fetched behind a branch, including the case of a
// branch to the third instruction after it, which was fetched in sequence.
//
// Branches resolve in execute. A taken branch without delay slot flushes
// the prefetch buffer and restarts fetching at the target. A taken branch
// with delay slot lets the next instruction run first; fetching moves to
// the target as soon as the delay slot word has been requested.
//
// Stalls come from hazard_unit: one cycle after a load, multiply or barrel
// shift when the next instruction depends on it (or the one after next, with
// one instruction executed in between), a double stall for chained
// loads, and fixed multi-cycle stalls after floating point and divide
// instructions. Fetching stops one cycle after decode and execute stop.
//
// Address decoding: NUM_SLAVES local memories are attached, each with its
// own address strobes and reply inputs; the address, write data, strobes and
// byte enables are shared. addr_decoder selects the strobe from the slaves'
// address windows, and the slave index is kept with the request to choose
// whose reply to take one cycle later.
//
// Loads and stores use big-endian byte lanes: a byte at offset 0 has byte
// enable 1000 and sits in bits 31:24. Store data is replicated across the
// lanes. A later instruction that writes the destination register of a load
// still in flight cancels that load's write back.
//
// From the document: the stage timing, the prefetch buffer, address
// decoding with per-slave strobes and replies, branch handling with delay
// slots and the branch-to-third-instruction case, the stall rules and the
// byte enables. Own choices: expect_pc as the single mechanism for dropping
// wrong-path words (the document compares consecutive fetch addresses and
// adds a flag for the third-instruction case), the cancelled write back,
// replicated store data, and the instruction subset: the integer and
// floating point instructions of the document's test programs and imm;
// special registers, interrupts, exceptions, caches and the stream links
// are not modelled.
module mb_core
  import mb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES     = 2,
  parameter logic [NUM_SLAVES-1:0][31:0] LOW_ADDRS  = {32'h0000_2000, 32'h0000_0000},
  parameter logic [NUM_SLAVES-1:0][31:0] HIGH_ADDRS = {32'h0000_3FFF, 32'h0000_1FFF},
  parameter int unsigned PREFETCH_DEPTH = 4,
  parameter logic [31:0] RESET_PC       = 32'h0000_0000
) (
  input  logic                         clk,
  input  logic                         rst,
  // Instruction side
  output logic [31:0]                  instr_addr,
  output logic                         ifetch,
  output logic [NUM_SLAVES-1:0]        i_as,
  input  logic [NUM_SLAVES-1:0][31:0]  instr,
  input  logic [NUM_SLAVES-1:0]        iready,
  // Data side
  output logic [31:0]                  data_addr,
  output logic [31:0]                  data_write,
  output logic [NUM_SLAVES-1:0]        d_as,
  output logic                         read_strobe,
  output logic                         write_strobe,
  output logic [3:0]                   byte_enable,
  input  logic [NUM_SLAVES-1:0][31:0]  data_read,
  input  logic [NUM_SLAVES-1:0]        dready
);

  localparam int unsigned SW = NUM_SLAVES > 1 ? $clog2(NUM_SLAVES) : 1;
  localparam int unsigned CW = $clog2(PREFETCH_DEPTH + 1);

  // ---------------------------------------------------------------- state
  logic [31:0] rf [32];
  logic        msr_c_q;

  logic [31:0] fetch_pc_q;
  logic        pend_v_q;        // delay slot word not yet requested
  logic [31:0] pend_tgt_q;
  logic        if_v_q;          // a fetch was requested last cycle
  logic [31:0] if_pc_q;
  logic [SW-1:0] if_sel_q;

  logic [31:0] expect_pc_q;
  logic        dslot_v_q;       // next instruction is a delay slot
  logic [31:0] dslot_tgt_q;
  logic        imm_v_q;
  logic [15:0] imm_hi_q;

  // data request (MEM) and write back (WB) stages
  logic          req_ld_q, wb_ld_q;
  logic [4:0]    req_rd_q, wb_rd_q;
  acc_size_e     req_sz_q, wb_sz_q;
  logic [1:0]    req_off_q, wb_off_q;
  logic [SW-1:0] req_sel_q, wb_sel_q;

  // ---------------------------------------------------------------- fetch
  fetch_entry_t  fifo_head;
  logic          fifo_valid, fifo_full, fifo_push, fifo_pop, fifo_flush;
  logic [CW-1:0] fifo_count;
  logic          fetch_hold, fetch_go, if_hit;
  logic [SW-1:0] if_sel;

  addr_decoder #(.NUM_SLAVES(NUM_SLAVES), .LOW_ADDRS(LOW_ADDRS), .HIGH_ADDRS(HIGH_ADDRS))
    u_idec (.addr(fetch_pc_q), .sel(if_sel), .hit(if_hit));

  assign fetch_go   = !rst && !fetch_hold &&
                      (32'(fifo_count) + 32'(if_v_q) < PREFETCH_DEPTH);
  assign instr_addr = fetch_pc_q;
  assign ifetch     = fetch_go;
  always_comb begin
    i_as = '0;
    if (fetch_go && if_hit) i_as[if_sel] = 1'b1;
  end

  assign fifo_push = if_v_q && iready[if_sel_q];

  prefetch_buffer #(.DEPTH(PREFETCH_DEPTH)) u_pfb (
    .clk, .rst, .flush(fifo_flush),
    .push(fifo_push), .push_data('{pc: if_pc_q, instr: instr[if_sel_q]}),
    .pop(fifo_pop), .head(fifo_head), .valid(fifo_valid), .full(fifo_full),
    .count(fifo_count)
  );

  // ---------------------------------------------------------- decode / EX
  logic [31:0] ir, pc;
  logic        head_ok, stale, stall, ex_go;
  logic        dep, dep_far, double_stall, mc_busy;
  assign ir      = fifo_head.instr;
  assign pc      = fifo_head.pc;
  assign head_ok = fifo_valid && (pc == expect_pc_q);
  assign stale   = fifo_valid && !head_ok;
  assign ex_go   = head_ok && !stall;
  assign fifo_pop = stale || ex_go;

  hazard_unit u_hz (
    .clk, .rst,
    .id_valid(head_ok), .id_instr(ir),
    .ex_commit(ex_go), .ex_instr(ir),
    .stall, .fetch_hold, .dep, .dep_far, .double_stall, .mc_busy
  );

  // Load reply of this cycle, aligned to its byte lanes
  logic        wb_live;
  logic [31:0] ld_word, ld_data;
  assign ld_word = data_read[wb_sel_q];
  assign wb_live = wb_ld_q && dready[wb_sel_q];
  always_comb begin
    unique case (wb_sz_q)
      SZ_BYTE: ld_data = {24'd0, ld_word[31 - 8*wb_off_q -: 8]};
      SZ_HALF: ld_data = {16'd0, wb_off_q[1] ? ld_word[15:0] : ld_word[31:16]};
      default: ld_data = ld_word;
    endcase
  end

  function automatic logic [31:0] rd_reg(input logic [4:0] r, input logic live,
                                         input logic [4:0] wr, input logic [31:0] wd,
                                         input logic [31:0] v);
    if (r == 5'd0) return '0;
    if (live && wr == r) return wd;
    return v;
  endfunction

  logic [31:0] va, vb, vd, imm32, opb;
  assign va    = rd_reg(f_ra(ir), wb_live, wb_rd_q, ld_data, rf[f_ra(ir)]);
  assign vb    = rd_reg(f_rb(ir), wb_live, wb_rd_q, ld_data, rf[f_rb(ir)]);
  assign vd    = rd_reg(f_rd(ir), wb_live, wb_rd_q, ld_data, rf[f_rd(ir)]);
  assign imm32 = imm_v_q ? {imm_hi_q, ir[15:0]} : {{16{ir[15]}}, ir[15:0]};
  assign opb   = ir[29] ? imm32 : vb;

  logic [31:0] alu_res, fpu_res;
  logic        alu_c, alu_cwe;
  alu u_alu (.instr(ir), .a(va), .b(opb), .carry_in(msr_c_q),
             .result(alu_res), .carry_out(alu_c), .carry_we(alu_cwe));
  fpu u_fpu (.instr(ir), .a(va), .b(vb), .result(fpu_res));

  // Instruction classes
  logic [5:0] op;
  logic       c_ld, c_st, c_fpu, c_alu, c_br, c_bcc, c_rt, c_imm;
  assign op    = f_opcode(ir);
  assign c_ld  = is_load(ir);
  assign c_st  = is_store(ir);
  assign c_fpu = op == OP_FPU;
  assign c_br  = op == OP_BR  || op == OP_BRI;
  assign c_bcc = op == OP_BCC || op == OP_BCCI;
  assign c_rt  = op == OP_RT;
  assign c_imm = op == OP_IMM;
  assign c_alu = op[5:4] == 2'b00 || op == OP_OR || op == OP_AND || op == OP_XOR ||
                 op == OP_ANDN || op == OP_ORI || op == OP_ANDI || op == OP_XORI ||
                 op == OP_ANDNI || op == OP_SHIFT;

  // Branch decision
  logic        br_taken, br_delay, br_link;
  logic [31:0] br_target;
  always_comb begin
    br_taken  = 1'b0;
    br_delay  = 1'b0;
    br_link   = 1'b0;
    br_target = pc + opb;
    if (c_br) begin
      br_taken  = 1'b1;
      br_delay  = ir[20];
      br_link   = ir[18];
      br_target = ir[19] ? opb : pc + opb;
    end else if (c_bcc) begin
      br_delay = ir[25];
      unique case (ir[23:21])
        3'd0: br_taken = va == '0;
        3'd1: br_taken = va != '0;
        3'd2: br_taken = va[31];
        3'd3: br_taken = va[31] || va == '0;
        3'd4: br_taken = !va[31] && va != '0;
        3'd5: br_taken = !va[31];
        default: br_taken = 1'b0;
      endcase
    end else if (c_rt) begin
      br_taken  = 1'b1;
      br_delay  = 1'b1;
      br_target = va + imm32;
    end
  end

  logic        branch_anyway, taken_nodelay, taken_delay;
  assign taken_nodelay = ex_go && br_taken && !br_delay;
  assign taken_delay   = ex_go && br_taken && br_delay;
  assign branch_anyway = ex_go && br_taken && (br_target == pc + 32'd12);
  assign fifo_flush    = taken_nodelay;

  // Register write from execute
  logic        ex_we;
  logic [31:0] ex_wd;
  always_comb begin
    ex_we = 1'b0;
    ex_wd = alu_res;
    if (c_alu || op == OP_MUL || op == OP_MULI || op == OP_BS || op == OP_BSI ||
        op == OP_IDIV) begin
      ex_we = 1'b1;
    end else if (c_fpu) begin
      ex_we = 1'b1;
      ex_wd = fpu_res;
    end else if (c_br && br_link) begin
      ex_we = 1'b1;
      ex_wd = pc;
    end
    ex_we = ex_we && ex_go && (f_rd(ir) != 5'd0);
  end

  // Data request
  logic [31:0]   ea;
  logic          d_hit;
  logic [SW-1:0] d_sel;
  acc_size_e     sz;
  assign ea = va + opb;
  assign sz = acc_size_e'(op[1:0] == 2'd0 ? SZ_BYTE : (op[1:0] == 2'd1 ? SZ_HALF : SZ_WORD));
  addr_decoder #(.NUM_SLAVES(NUM_SLAVES), .LOW_ADDRS(LOW_ADDRS), .HIGH_ADDRS(HIGH_ADDRS))
    u_ddec (.addr(ea), .sel(d_sel), .hit(d_hit));

  // -------------------------------------------------------------- updates
  always_ff @(posedge clk) begin
    if (rst) begin
      fetch_pc_q  <= RESET_PC;
      pend_v_q    <= 1'b0;
      pend_tgt_q  <= '0;
      if_v_q      <= 1'b0;
      if_pc_q     <= '0;
      if_sel_q    <= '0;
      expect_pc_q <= RESET_PC;
      dslot_v_q   <= 1'b0;
      dslot_tgt_q <= '0;
      imm_v_q     <= 1'b0;
      imm_hi_q    <= '0;
      msr_c_q     <= 1'b0;
    end else begin
      // fetch address
      if_v_q   <= fetch_go && if_hit && !taken_nodelay;
      if_pc_q  <= fetch_pc_q;
      if_sel_q <= if_sel;
      if (fetch_go) begin
        fetch_pc_q <= pend_v_q ? pend_tgt_q : fetch_pc_q + 32'd4;
        pend_v_q   <= 1'b0;
      end
      if (taken_nodelay) begin
        fetch_pc_q <= br_target;
        pend_v_q   <= 1'b0;
      end else if (taken_delay) begin
        if (fetch_pc_q != pc + 32'd4 || fetch_go) fetch_pc_q <= br_target;
        else begin
          pend_v_q   <= 1'b1;
          pend_tgt_q <= br_target;
        end
      end
      // execute bookkeeping
      if (ex_go) begin
        imm_v_q  <= c_imm;
        imm_hi_q <= ir[15:0];
        if (c_alu && alu_cwe) msr_c_q <= alu_c;
        if (taken_nodelay) begin
          expect_pc_q <= br_target;
        end else if (taken_delay) begin
          expect_pc_q <= pc + 32'd4;
          dslot_v_q   <= 1'b1;
          dslot_tgt_q <= br_target;
        end else if (dslot_v_q) begin
          expect_pc_q <= dslot_tgt_q;
          dslot_v_q   <= 1'b0;
        end else begin
          expect_pc_q <= pc + 32'd4;
        end
      end
    end
  end

  // Register file: execute results and load replies; execute wins on a clash
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) rf[i] <= '0;
    end else begin
      if (wb_live && wb_rd_q != 5'd0) rf[wb_rd_q] <= ld_data;
      if (ex_we) rf[f_rd(ir)] <= ex_wd;
    end
  end

  // Data side bus registers and the MEM/WB bookkeeping
  always_ff @(posedge clk) begin
    if (rst) begin
      d_as         <= '0;
      read_strobe  <= 1'b0;
      write_strobe <= 1'b0;
      byte_enable  <= '0;
      data_addr    <= '0;
      data_write   <= '0;
      req_ld_q     <= 1'b0;
      wb_ld_q      <= 1'b0;
      req_rd_q     <= '0;
      wb_rd_q      <= '0;
      req_sz_q     <= SZ_WORD;
      wb_sz_q      <= SZ_WORD;
      req_off_q    <= '0;
      wb_off_q     <= '0;
      req_sel_q    <= '0;
      wb_sel_q     <= '0;
    end else begin
      d_as         <= '0;
      read_strobe  <= 1'b0;
      write_strobe <= 1'b0;
      req_ld_q     <= 1'b0;
      if (ex_go && (c_ld || c_st)) begin
        if (d_hit) d_as[d_sel] <= 1'b1;
        read_strobe  <= c_ld;
        write_strobe <= c_st;
        data_addr    <= ea;
        unique case (sz)
          SZ_BYTE: begin
            byte_enable <= BE_BYTE >> ea[1:0];
            data_write  <= {4{vd[7:0]}};
          end
          SZ_HALF: begin
            byte_enable <= ea[1] ? (BE_HALF >> 2) : BE_HALF;
            data_write  <= {2{vd[15:0]}};
          end
          default: begin
            byte_enable <= BE_WORD;
            data_write  <= vd;
          end
        endcase
        req_ld_q  <= c_ld && d_hit;
        req_rd_q  <= f_rd(ir);
        req_sz_q  <= sz;
        req_off_q <= ea[1:0];
        req_sel_q <= d_sel;
      end
      // A younger instruction writing the same register cancels the load
      wb_ld_q  <= req_ld_q && !(ex_we && f_rd(ir) == req_rd_q);
      wb_rd_q  <= req_rd_q;
      wb_sz_q  <= req_sz_q;
      wb_off_q <= req_off_q;
      wb_sel_q <= req_sel_q;
    end
  end

  // The addressed slave replies one cycle after a strobe
  reply_follows_load: assert property (@(posedge clk) disable iff (rst)
    wb_ld_q |-> dready[wb_sel_q]);
  no_push_when_full: assert property (@(posedge clk) disable iff (rst)
    fifo_push |-> !fifo_full || fifo_pop || fifo_flush);

endmodule
