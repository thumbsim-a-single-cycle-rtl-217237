// thumb_core: single-cycle Thumb processor datapath and control.
//
// Every clock cycle with run high executes one whole instruction, with no
// pipelining. The cycle passes through seven stages, all combinational
// between the register file and flag register outputs and their inputs:
//   1. fetch the word at PC and take its upper half if PC bit 1 is set;
//      nextpc = PC + 2;
//   2. decode through the ROMs (thumb_decoder);
//   3. derive register numbers, the final ALU operation, the condition
//      field instr[11:8] and the link enable (instr[7] for bx/blx);
//   4. read three registers ra, rb, rc (PC reads as PC + 4);
//   5. select the shifter input (rb or an immediate) and the shift distance,
//      and shift; the shifter carry defaults to the current C flag;
//   6. ALU: in1 = ra, in2 = shifter output;
//   7. memory: the ALU output is the address; a store writes rc; the result
//      is the loaded word for a load, the ALU output otherwise;
//   8. write-back: the register write may be made conditional on the flags
//      (conditional branches), LR/PC follow their special rules, and the
//      flags are replaced when the instruction asks for it.
// Every stage is performed for every instruction, whether it is needed or not.
//
// Stop conditions: 'halted' is high while the PC holds MAGIC (the value LR
// holds after reset, so a return from the top-level routine stops the
// machine). 'fault' is a sticky error that stops execution before any state
// changes: fault_code 1 = PC at or beyond MEMSIZE, 2 = load/store address at
// or beyond MEMSIZE, 3 = an instruction this machine does not implement.
// The seven-stage organisation, the decoding tables and the write rules follow
// the original register-level description of the machine; the fault output
// (which replaces an abort of the whole simulation), the ">=" range test and
// the treatment of unimplemented opcodes are this design's own choices.
//
// Interface: the memory is external (instruction port imem_*, data port
// dmem_*, both read combinationally, written at the clock edge). The
// init_* port presets a register while run is low. Synchronous active-low
// reset.
module thumb_core
  import thumb_pkg::*;
#(
  parameter int unsigned MEMSIZE = 16384
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  output word_t      imem_addr,
  input  word_t      imem_rdata,
  output word_t      dmem_addr,
  input  word_t      dmem_rdata,
  output logic       dmem_we,
  output word_t      dmem_wdata,
  input  logic       init_we,
  input  logic [3:0] init_idx,
  input  word_t      init_data,
  output logic       halted,
  output logic       fault,
  output logic [1:0] fault_code,
  output word_t      pc,
  output flags_t     flags,
  output word_t      regs [16]
);
  // ---- state: flags and sticky fault ----
  flags_t     flags_q;
  logic       fault_q;
  logic [1:0] fault_code_q;

  // ---- 1. fetch ----
  half_t instr;
  word_t nextpc;
  assign imem_addr = pc;
  assign instr     = pc[1] ? imem_rdata[31:16] : imem_rdata[15:0];
  assign nextpc    = pc + 32'd2;

  // ---- 2. decode ----
  ctrl_t ctrl;
  thumb_decoder u_dec (.instr(instr), .ctrl(ctrl));

  // ---- 3. derived control signals ----
  logic [3:0] reg_a, reg_b, reg_c;
  alu_op_e    alu_op;
  cond_e      cond;
  logic       link;
  thumb_regsel u_sel_a (.sel(ctrl.reg_sel_a), .instr(instr), .regno(reg_a));
  thumb_regsel u_sel_b (.sel(ctrl.reg_sel_b), .instr(instr), .regno(reg_b));
  thumb_regsel u_sel_c (.sel(ctrl.reg_sel_c), .instr(instr), .regno(reg_c));
  thumb_alusel u_alusel (.op_in(ctrl.alu_sel), .instr(instr), .op_out(alu_op));
  assign cond = cond_e'(instr[11:8]);
  thumb_perhaps u_link (.p(ctrl.w_link), .c(instr[7]), .y(link));

  // ---- 4. register read (and 8. write-back) ----
  word_t ra, rb, rc, result;
  logic  regwrite, step;
  thumb_regfile #(.SP_INIT(32'(MEMSIZE))) u_rf (
    .clk(clk), .rst_n(rst_n),
    .sel_a(reg_a), .sel_b(reg_b), .sel_c(reg_c),
    .ra(ra), .rb(rb), .rc(rc), .pc(pc),
    .step(step), .result(result), .nextpc(nextpc),
    .regwrite(regwrite), .regc(reg_c), .link(link),
    .init_we(init_we), .init_idx(init_idx), .init_data(init_data),
    .regs(regs)
  );

  // ---- 5. shifter ----
  word_t      shiftin, aluin2;
  logic [7:0] shiftamt;
  logic       shc;
  thumb_rand2sel u_rand2 (.sel(ctrl.rand2), .rb(rb), .instr(instr), .shiftin(shiftin));
  thumb_shiftsel u_shsel (.sel(ctrl.shift_amt), .ra(ra), .instr(instr), .amount(shiftamt));
  thumb_shifter  u_shift (.op(ctrl.shift_op), .x(shiftin), .n(shiftamt),
                          .cin(flags_q.c), .r(aluin2), .cout(shc));

  // ---- 6. ALU ----
  word_t  aluout;
  flags_t newflags;
  thumb_alu u_alu (.op(alu_op), .in1(ra), .in2(aluin2), .cin(flags_q.c),
                   .shc(shc), .result(aluout), .flags(newflags));

  // ---- 7. memory ----
  logic bad_pc, bad_data, bad_instr, fault_now;
  assign dmem_addr  = aluout;
  assign dmem_wdata = rc;
  assign dmem_we    = step & ctrl.mem_wr;
  assign result     = ctrl.mem_rd ? dmem_rdata : aluout;

  // ---- 8. write-back ----
  logic enable;
  thumb_cond    u_cond (.cond(cond), .flags(flags_q), .enable(enable));
  thumb_perhaps u_wreg (.p(ctrl.w_reg), .c(enable), .y(regwrite));

  assign halted    = (pc == MAGIC);
  assign bad_pc    = (pc >= MEMSIZE);
  assign bad_data  = (ctrl.mem_rd | ctrl.mem_wr) & (aluout >= MEMSIZE);
  assign bad_instr = ~ctrl.valid;
  assign fault_now = bad_pc | bad_data | bad_instr;
  assign step      = run & ~halted & ~fault_q & ~fault_now & ~init_we;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flags_q      <= '0;
      fault_q      <= 1'b0;
      fault_code_q <= 2'd0;
    end else begin
      if (step && ctrl.w_flags) flags_q <= newflags;
      if (run && !halted && !fault_q && !init_we && fault_now) begin
        fault_q      <= 1'b1;
        fault_code_q <= bad_pc ? 2'd1 : bad_data ? 2'd2 : 2'd3;
      end
    end
  end

  assign fault      = fault_q;
  assign fault_code = fault_code_q;
  assign flags      = flags_q;
endmodule
