// thumb_regfile: the sixteen 32-bit registers r0..r15 (SP = r13, LR = r14,
// PC = r15) with three combinational read ports and one clocked update.
//
// Reads: ra/rb/rc return the selected register, except that the PC reads as
// its own value plus 4. The raw PC is also output (pc) for instruction fetch.
// Update, on a rising clock edge with step high:
//   - r0..r13 take 'result' when regwrite is set and regc names them;
//   - LR takes 'result' when regwrite names LR, otherwise 'nextpc' when link
//     is set (branch and link), otherwise keeps its value;
//   - PC takes 'result' with bit 0 cleared when regwrite names PC, otherwise
//     'nextpc'.
// A separate initialisation write (init_we, init_idx, init_data), used while
// the machine is not stepping, lets the host preset registers; it takes
// priority over a step. Synchronous active-low reset sets r0..r12 to 0, SP to
// SP_INIT (the top of memory), LR to MAGIC and PC to 0.
module thumb_regfile
  import thumb_pkg::*;
#(
  parameter word_t SP_INIT = 32'd16384
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] sel_a,
  input  logic [3:0] sel_b,
  input  logic [3:0] sel_c,
  output word_t      ra,
  output word_t      rb,
  output word_t      rc,
  output word_t      pc,
  input  logic       step,
  input  word_t      result,
  input  word_t      nextpc,
  input  logic       regwrite,
  input  logic [3:0] regc,
  input  logic       link,
  input  logic       init_we,
  input  logic [3:0] init_idx,
  input  word_t      init_data,
  output word_t      regs [16]
);
  word_t rf [16];

  function automatic word_t readreg(logic [3:0] i);
    return (i == 4'(REG_PC)) ? rf[i] + 32'd4 : rf[i];
  endfunction

  always_comb begin
    ra   = readreg(sel_a);
    rb   = readreg(sel_b);
    rc   = readreg(sel_c);
    pc   = rf[REG_PC];
    regs = rf;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) rf[i] <= '0;
      rf[REG_SP] <= SP_INIT;
      rf[REG_LR] <= MAGIC;
      rf[REG_PC] <= '0;
    end else if (init_we) begin
      rf[init_idx] <= init_data;
    end else if (step) begin
      if (regwrite && regc < 4'd14) rf[regc] <= result;
      if (regwrite && regc == 4'(REG_LR)) rf[REG_LR] <= result;
      else if (link)                      rf[REG_LR] <= nextpc;
      if (regwrite && regc == 4'(REG_PC)) rf[REG_PC] <= result & ~32'd1;
      else                                rf[REG_PC] <= nextpc;
    end
  end
endmodule
