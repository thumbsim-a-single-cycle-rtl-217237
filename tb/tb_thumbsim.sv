// tb_thumbsim: end-to-end test of the whole machine at its default size
// (16 kB memory), driven the way a host would drive it: reset, load a
// program image word by word, preset argument registers, run to completion.
//
// Phase 1 runs a hand-assembled program written as a subroutine (entered at
// 0 with LR = MAGIC). It copies LR into r7 (the machine cannot push it), sums
// an n-element array with a counted loop (ldr with register offset, cmp,
// conditional branch back), calls a factorial routine placed 12 kB away with
// the two-halfword bl (a long branch), returns with bx lr, exercises the shift
// carry, adc, a taken conditional branch, a PC-relative literal load, stack
// adjustment with word stores and loads through SP, and finally returns
// through bx r7, which puts MAGIC in the PC and halts the machine. Results are
// checked in registers and memory, and the run must take exactly one clock per
// instruction executed (69).
// Phases 2-4 check the three stop-on-error cases: an unimplemented
// instruction (pop), a load beyond the end of memory and a jump beyond it.
// Each mechanism (taken/untaken branch, load, store, link write, explicit PC
// write, flag update, zero-distance shift keeping C, halt, each fault) is
// counted and must occur at least once.
module tb_thumbsim;
  import thumb_pkg::*;

  localparam int unsigned MEMSIZE = 16384;

  logic clk = 0, rst_n, run, load_we, init_we;
  logic [11:0] load_addr;
  word_t load_data, init_data, pc;
  logic [3:0] init_idx;
  logic halted, fault;
  logic [1:0] fault_code;
  flags_t flags;
  word_t regs [16];

  thumbsim dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_taken = 0, n_nottaken = 0, n_load = 0, n_store = 0, n_link = 0;
  int n_pcwrite = 0, n_flags = 0, n_keepc = 0, n_halt = 0;
  int n_fault_pc = 0, n_fault_data = 0, n_fault_instr = 0;

  logic [15:0] img [MEMSIZE / 2];   // program image as halfwords

  // mechanism monitor (observes the core's internal control signals)
  always @(posedge clk) if (rst_n && dut.u_core.step) begin
    if (dut.u_core.ctrl.w_reg == P_MAYBE) begin
      if (dut.u_core.enable) n_taken++; else n_nottaken++;
    end
    if (dut.u_core.ctrl.mem_rd) n_load++;
    if (dut.u_core.ctrl.mem_wr) n_store++;
    if (dut.u_core.link) n_link++;
    if (dut.u_core.regwrite && dut.u_core.reg_c == 4'd15) n_pcwrite++;
    if (dut.u_core.ctrl.w_flags) n_flags++;
    if (dut.u_core.ctrl.w_flags && dut.u_core.shiftamt == 0 &&
        dut.u_core.alu_op == ALU_MOV && dut.u_core.newflags.c == flags.c) n_keepc++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(int addr, logic [15:0] h);
    img[addr / 2] = h;
  endtask

  task automatic put_word(int addr, word_t w);
    img[addr / 2] = w[15:0]; img[addr / 2 + 1] = w[31:16];
  endtask

  task automatic clear_image();
    for (int i = 0; i < MEMSIZE / 2; i++) img[i] = 16'hE7FE;   // b . everywhere
  endtask

  // reset, load the image, preset registers
  task automatic boot(int nregs, word_t r [4]);
    run = 0; rst_n = 0; load_we = 0; init_we = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < MEMSIZE / 4; i++) begin
      load_we = 1; load_addr = 12'(i); load_data = {img[2 * i + 1], img[2 * i]};
      @(negedge clk);
    end
    load_we = 0;
    for (int i = 0; i < nregs; i++) begin
      init_we = 1; init_idx = 4'(i); init_data = r[i];
      @(negedge clk);
    end
    init_we = 0;
  endtask

  // run until halt or fault; returns the number of cycles with run high
  task automatic go(output int cycles);
    cycles = 0;
    run = 1;
    while (!halted && !fault && cycles < 10000) begin
      @(negedge clk); cycles++;
    end
    run = 0;
  endtask

  function automatic word_t memword(int addr);
    return dut.u_mem.mem[addr / 4];
  endfunction

  initial begin
    #2_000_000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    word_t args [4];
    word_t arr [5] = '{10, 20, 30, 40, 50};
    // ---------------- phase 1: the program ----------------
    clear_image();
    put(16'h000, 16'h4677);  // mov  r7, lr
    put(16'h002, 16'h2200);  // movs r2, #0
    put(16'h004, 16'h2300);  // movs r3, #0
    put(16'h006, 16'h58CC);  // loop: ldr r4, [r1, r3]
    put(16'h008, 16'h1912);  // adds r2, r2, r4
    put(16'h00A, 16'h3304);  // adds r3, #4
    put(16'h00C, 16'h0085);  // lsls r5, r0, #2
    put(16'h00E, 16'h42AB);  // cmp  r3, r5
    put(16'h010, 16'hDBF9);  // blt  loop
    put(16'h012, 16'h640A);  // str  r2, [r1, #64]
    put(16'h014, 16'hF002);  // bl   fact (first half)
    put(16'h016, 16'hFFF4);  // bl   fact (second half)
    put(16'h018, 16'h644E);  // str  r6, [r1, #68]
    put(16'h01A, 16'h2481);  // movs r4, #0x81
    put(16'h01C, 16'h0865);  // lsrs r5, r4, #1      (C = 1)
    put(16'h01E, 16'h2300);  // movs r3, #0          (C kept)
    put(16'h020, 16'hD201);  // bcs  +2 (taken)
    put(16'h022, 16'h2500);  // movs r5, #0          (skipped)
    put(16'h024, 16'h2500);  // movs r5, #0          (skipped)
    put(16'h026, 16'h4165);  // adcs r5, r4          (0x40 + 0x81 + 1)
    put(16'h028, 16'h648D);  // str  r5, [r1, #72]
    put(16'h02A, 16'h4C05);  // ldr  r4, [pc, #20]   (literal at 0x40)
    put(16'h02C, 16'hB082);  // sub  sp, #8
    put(16'h02E, 16'h9401);  // str  r4, [sp, #4]
    put(16'h030, 16'h9D01);  // ldr  r5, [sp, #4]
    put(16'h032, 16'hB002);  // add  sp, #8
    put(16'h034, 16'h4055);  // eors r5, r2
    put(16'h036, 16'h1990);  // adds r0, r2, r6
    put(16'h038, 16'h4738);  // bx   r7              (returns to MAGIC)
    put_word(16'h040, 32'hDEADBEEF);
    // factorial at 0x3000: r6 = r0!
    put(16'h3000, 16'h2601); // movs r6, #1
    put(16'h3002, 16'h1C04); // adds r4, r0, #0
    put(16'h3004, 16'h4366); // floop: muls r6, r4
    put(16'h3006, 16'h3C01); // subs r4, #1
    put(16'h3008, 16'hD1FC); // bne  floop
    put(16'h300A, 16'h4770); // bx   lr
    foreach (arr[i]) put_word(16'h1000 + 4 * i, arr[i]);
    args[0] = 5; args[1] = 32'h1000; args[2] = 0; args[3] = 0;
    boot(2, args);
    check("reset SP", regs[13] == MEMSIZE);
    check("reset LR", regs[14] == MAGIC);
    check("reset PC", pc == 0);
    go(cyc);
    if (halted) n_halt++;
    $display("phase 1: %0d cycles, r0=%0d", cyc, regs[0]);
    check("halted", halted && !fault);
    check("one cycle per instruction", cyc == 69);
    check("r0 = sum + 5!", regs[0] == 150 + 120);
    check("r2 = sum", regs[2] == 150);
    check("r6 = 5!", regs[6] == 120);
    check("r5 = literal ^ sum", regs[5] == (32'hDEADBEEF ^ 32'd150));
    check("r7 = MAGIC", regs[7] == MAGIC);
    check("sp restored", regs[13] == MEMSIZE);
    check("lr = return address of bl", regs[14] == 32'h18);
    check("mem sum", memword(32'h1040) == 150);
    check("mem fact", memword(32'h1044) == 120);
    check("mem adc", memword(32'h1048) == 32'hC2);
    check("mem stack", memword(MEMSIZE - 4) == 32'hDEADBEEF);
    check("flags after adds r0", flags == 4'b0000);

    // ---------------- phase 2: unimplemented instruction ----------------
    clear_image();
    put(0, 16'h2001);        // movs r0, #1
    put(2, 16'hBD00);        // pop {pc}  (not implemented)
    put(4, 16'h2002);        // movs r0, #2
    boot(0, args);
    go(cyc);
    check("fault: unimplemented", fault && fault_code == 2'd3 && pc == 2 && regs[0] == 1);
    if (fault && fault_code == 2'd3) n_fault_instr++;

    // ---------------- phase 3: load beyond memory ----------------
    clear_image();
    put(0, 16'h2101);        // movs r1, #1
    put(2, 16'h0389);        // lsls r1, r1, #14   (r1 = 16384)
    put(4, 16'h6808);        // ldr  r0, [r1, #0]
    boot(0, args);
    go(cyc);
    check("fault: data address", fault && fault_code == 2'd2 && pc == 4 && regs[1] == MEMSIZE);
    if (fault && fault_code == 2'd2) n_fault_data++;

    // ---------------- phase 4: jump beyond memory ----------------
    clear_image();
    put(0, 16'h2101);        // movs r1, #1
    put(2, 16'h0409);        // lsls r1, r1, #16   (r1 = 65536)
    put(4, 16'h4708);        // bx   r1
    boot(0, args);
    go(cyc);
    check("fault: pc range", fault && fault_code == 2'd1 && pc == 32'h10000 && cyc == 4);
    if (fault && fault_code == 2'd1) n_fault_pc++;

    $display("taken=%0d not_taken=%0d load=%0d store=%0d link=%0d pcwrite=%0d flags=%0d keepc=%0d halt=%0d faults=%0d/%0d/%0d",
             n_taken, n_nottaken, n_load, n_store, n_link, n_pcwrite, n_flags, n_keepc, n_halt,
             n_fault_pc, n_fault_data, n_fault_instr);
    check("mechanism: branch taken", n_taken > 0);
    check("mechanism: branch not taken", n_nottaken > 0);
    check("mechanism: load", n_load > 0);
    check("mechanism: store", n_store > 0);
    check("mechanism: link write", n_link > 0);
    check("mechanism: explicit PC write", n_pcwrite > 0);
    check("mechanism: flag write", n_flags > 0);
    check("mechanism: zero shift keeps C", n_keepc > 0);
    check("mechanism: halt", n_halt > 0);
    check("mechanism: pc fault", n_fault_pc > 0);
    check("mechanism: data fault", n_fault_data > 0);
    check("mechanism: unimplemented fault", n_fault_instr > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
