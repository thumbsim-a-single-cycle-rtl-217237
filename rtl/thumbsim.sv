// thumbsim: top level of the single-cycle Thumb machine: the processor core
// joined to a two-port memory of MEMSIZE bytes.
//
// Use: hold rst_n low for a cycle (SP = MEMSIZE, LR = MAGIC, PC = 0, other
// registers and flags 0). With run low, write the program image a word at a
// time through load_we / load_addr (word index) / load_data, little-endian,
// starting at address 0, and preset any of r0..r12 through init_we /
// init_idx / init_data. Then raise run: one instruction completes per clock
// cycle until the PC reaches MAGIC (halted, the return from the program's top
// routine) or an error stops it (fault, fault_code as in thumb_core). The
// result is conventionally left in r0 (regs[0]). The load port shares the
// memory's data write port and must only be used while run is low.
module thumbsim
  import thumb_pkg::*;
#(
  parameter int unsigned MEMSIZE = 16384
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       run,
  input  logic                       load_we,
  input  logic [$clog2(MEMSIZE)-3:0] load_addr,
  input  word_t                      load_data,
  input  logic                       init_we,
  input  logic [3:0]                 init_idx,
  input  word_t                      init_data,
  output logic                       halted,
  output logic                       fault,
  output logic [1:0]                 fault_code,
  output word_t                      pc,
  output flags_t                     flags,
  output word_t                      regs [16]
);
  word_t imem_addr, imem_rdata, dmem_addr, dmem_rdata, dmem_wdata;
  logic  dmem_we;

  thumb_core #(.MEMSIZE(MEMSIZE)) u_core (
    .clk(clk), .rst_n(rst_n), .run(run),
    .imem_addr(imem_addr), .imem_rdata(imem_rdata),
    .dmem_addr(dmem_addr), .dmem_rdata(dmem_rdata),
    .dmem_we(dmem_we), .dmem_wdata(dmem_wdata),
    .init_we(init_we), .init_idx(init_idx), .init_data(init_data),
    .halted(halted), .fault(fault), .fault_code(fault_code),
    .pc(pc), .flags(flags), .regs(regs)
  );

  // The host load port takes over the data write port while run is low.
  word_t mem_daddr, mem_wdata;
  logic  mem_we;
  always_comb begin
    if (load_we && !run) begin
      mem_daddr = {{(32 - $clog2(MEMSIZE)){1'b0}}, load_addr, 2'b00};
      mem_wdata = load_data;
      mem_we    = 1'b1;
    end else begin
      mem_daddr = dmem_addr;
      mem_wdata = dmem_wdata;
      mem_we    = dmem_we;
    end
  end

  // The host must not load the image while the machine is running.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(load_we && run))
      else $error("load_we asserted while run is high");
  end

  thumb_mem #(.MEMSIZE(MEMSIZE)) u_mem (
    .clk(clk),
    .iaddr(imem_addr), .idata(imem_rdata),
    .daddr(mem_daddr), .drdata(dmem_rdata),
    .dwe(mem_we), .dwdata(mem_wdata)
  );
endmodule
