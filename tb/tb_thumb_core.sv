// tb_thumb_core: random-program test of the single-cycle core against an
// independent instruction-level reference model.
//
// The reference model below decodes each instruction with a direct switch
// on its format (no decoding tables, no shared datapath code) and updates a
// private copy of the registers, flags and memory. Each episode resets the
// core, fills the whole memory with random instructions (mostly implemented
// ones, plus a few "bx lr" returns and an occasional unimplemented opcode),
// presets r0..r12 with random values (often valid word addresses), then runs
// until the core halts, faults or 200 cycles pass. After every clock the
// core's 16 registers, flags, halt and fault outputs must equal the model's.
// Each instruction must complete in exactly one cycle: the model advances one
// instruction per clock.
module tb_thumb_core;
  import thumb_pkg::*;

  localparam int unsigned MEMSIZE = 16384;
  localparam int unsigned WORDS   = MEMSIZE / 4;
  localparam int EPISODES = 300;

  logic clk = 1'b0;
  logic rst_n, run, init_we;
  logic [3:0] init_idx;
  word_t init_data;
  word_t imem_addr, imem_rdata, dmem_addr, dmem_rdata, dmem_wdata;
  logic dmem_we, halted, fault;
  logic [1:0] fault_code;
  word_t pc;
  flags_t flags;
  word_t regs [16];

  word_t tbmem [WORDS];

  thumb_core #(.MEMSIZE(MEMSIZE)) dut (
    .clk, .rst_n, .run, .imem_addr, .imem_rdata, .dmem_addr, .dmem_rdata,
    .dmem_we, .dmem_wdata, .init_we, .init_idx, .init_data,
    .halted, .fault, .fault_code, .pc, .flags, .regs
  );

  assign imem_rdata = tbmem[imem_addr[13:2]];
  assign dmem_rdata = tbmem[dmem_addr[13:2]];
  always_ff @(posedge clk) if (dmem_we) tbmem[dmem_addr[13:2]] <= dmem_wdata;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  logic [31:0] R [16];
  logic N, Z, C, V;
  logic [31:0] M [WORDS];
  logic r_fault;
  logic [1:0] r_code;

  // mechanism counters
  int n_taken, n_nottaken, n_load, n_store, n_bl, n_blx, n_halt;
  int n_fault_pc, n_fault_data, n_fault_instr, n_shift_c0, n_instr;

  function automatic logic [31:0] rd(int i);
    return (i == 15) ? R[15] + 32'd4 : R[i];
  endfunction

  function automatic logic cond_ok(logic [3:0] c);
    case (c)
      4'd0: return Z;        4'd1: return !Z;
      4'd2: return C;        4'd3: return !C;
      4'd4: return N;        4'd5: return !N;
      4'd6: return V;        4'd7: return !V;
      4'd8: return C && !Z;  4'd9: return !C || Z;
      4'd10: return N == V;  4'd11: return N != V;
      4'd12: return !Z && (N == V);
      4'd13: return Z || (N != V);
      4'd14: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // add with carry: sets the reference flags
  function automatic logic [31:0] addc(logic [31:0] a, logic [31:0] b, logic ci);
    logic [32:0] s;
    logic signed [33:0] ss;
    s  = {1'b0, a} + {1'b0, b} + {32'd0, ci};
    ss = $signed({{2{a[31]}}, a}) + $signed({{2{b[31]}}, b}) + $signed({33'd0, ci});
    C = s[32];
    V = (ss > 34'sh7FFFFFFF) || (ss < -34'sh80000000);
    N = s[31];
    Z = (s[31:0] == 0);
    return s[31:0];
  endfunction

  function automatic void logic_flags(logic [31:0] r);
    N = r[31]; Z = (r == 0); C = 1'b0; V = 1'b0;
  endfunction

  // bit-serial shift reference: kind 0 lsl, 1 lsr, 2 asr, 3 ror
  function automatic logic [31:0] shref(int kind, logic [31:0] x, int n, output logic c);
    logic [31:0] v;
    v = x; c = C;
    for (int i = 0; i < n; i++) begin
      case (kind)
        0: begin c = v[31]; v = {v[30:0], 1'b0}; end
        1: begin c = v[0];  v = {1'b0, v[31:1]}; end
        2: begin c = v[0];  v = {v[31], v[31:1]}; end
        default: begin c = v[0]; v = {v[0], v[31:1]}; end
      endcase
    end
    return v;
  endfunction

  function automatic void move_flags(logic [31:0] r, logic c);
    N = r[31]; Z = (r == 0); C = c; V = 1'b0;
  endfunction

  // One instruction. Returns 1 if the model took a step.
  task automatic ref_step();
    logic [31:0] pcv, npc, addr, res, w;
    logic [15:0] ins;
    logic c;
    int rd_, rn, rm;
    if (r_fault || R[15] == MAGIC) return;
    pcv = R[15];
    if (pcv >= MEMSIZE) begin r_fault = 1; r_code = 1; n_fault_pc++; return; end
    w   = M[pcv[13:2]];
    ins = pcv[1] ? w[31:16] : w[15:0];
    npc = pcv + 2;
    rd_ = ins[2:0]; rn = ins[5:3]; rm = ins[8:6];
    n_instr++;
    casez (ins[15:11])
      5'b000??: begin
        if (ins[12:11] == 2'b11) begin           // add/sub 3-operand
          w = ins[10] ? {29'd0, ins[8:6]} : R[rm];
          if (ins[9]) res = addc(R[rn], ~w, 1'b1); else res = addc(R[rn], w, 1'b0);
          R[rd_] = res;
        end else begin                           // shift by immediate
          int n;
          n = ins[10:6];
          if (ins[12:11] != 0 && n == 0) n = 32;
          if (n == 0) c = C;
          res = shref(ins[12:11], R[rn], n, c);
          if (n == 0) n_shift_c0++;
          move_flags(res, c);
          R[rd_] = res;
        end
        R[15] = npc;
      end
      5'b001??: begin
        int d;
        d = ins[10:8];
        case (ins[12:11])
          2'd0: begin R[d] = {24'd0, ins[7:0]}; move_flags(R[d], C); end
          2'd1: res = addc(R[d], ~{24'd0, ins[7:0]}, 1'b1);
          2'd2: R[d] = addc(R[d], {24'd0, ins[7:0]}, 1'b0);
          default: R[d] = addc(R[d], ~{24'd0, ins[7:0]}, 1'b1);
        endcase
        R[15] = npc;
      end
      5'b01000: begin
        if (!ins[10]) begin                      // two-register ALU ops
          logic [31:0] a, b;
          a = R[rd_]; b = R[rn];
          case (ins[9:6])
            4'd0: begin R[rd_] = a & b; logic_flags(R[rd_]); end
            4'd1: begin R[rd_] = a ^ b; logic_flags(R[rd_]); end
            4'd2, 4'd3, 4'd4, 4'd7: begin
              int n;
              n = b[7:0];
              if (ins[9:6] == 4'd7 && n > 32) n = ((n - 1) % 32) + 1;
              if (n > 33 && ins[9:6] != 4'd7) n = 33;
              res = shref(ins[9:6] == 4'd2 ? 0 : ins[9:6] == 4'd3 ? 1 :
                          ins[9:6] == 4'd4 ? 2 : 3, a, n, c);
              if (n == 0) n_shift_c0++;
              move_flags(res, c);
              R[rd_] = res;
            end
            4'd5: R[rd_] = addc(a, b, C);
            4'd6: R[rd_] = addc(a, ~b, C);
            4'd8: logic_flags(a & b);
            4'd9: R[rd_] = addc(32'd0, ~b, 1'b1);
            4'd10: res = addc(a, ~b, 1'b1);
            4'd11: res = addc(a, b, 1'b0);
            4'd12: begin R[rd_] = a | b; logic_flags(R[rd_]); end
            4'd13: begin R[rd_] = a * b; logic_flags(R[rd_]); end
            4'd14: begin R[rd_] = a & ~b; logic_flags(R[rd_]); end
            default: begin R[rd_] = ~b; move_flags(R[rd_], C); end
          endcase
          R[15] = npc;
        end else begin                           // high-register ops, bx
          int d, m;
          d = {ins[7], ins[2:0]}; m = ins[6:3];
          case (ins[9:8])
            2'd0: begin
              res = rd(d) + rd(m);
              if (d == 15) R[15] = res & ~32'd1;
              else begin R[d] = res; R[15] = npc; end
            end
            2'd1: begin res = addc(rd(d), ~rd(m), 1'b1); R[15] = npc; end
            2'd2: begin
              res = rd(m);
              if (d == 15) R[15] = res & ~32'd1;
              else begin R[d] = res; R[15] = npc; end
            end
            default: begin
              res = rd(m);
              if (ins[7]) begin R[14] = npc; n_blx++; end
              R[15] = res & ~32'd1;
            end
          endcase
        end
      end
      5'b01001, 5'b01011, 5'b01101, 5'b10011,
      5'b01010, 5'b01100, 5'b10010: begin        // word loads and stores
        logic ld;
        int d;
        d = rd_;
        ld = 1'b1;
        case (ins[15:11])
          5'b01001: begin addr = ((pcv + 4) + {22'd0, ins[7:0], 2'b00}) & ~32'd3; d = ins[10:8]; end
          5'b01010: begin addr = R[rn] + R[rm]; ld = 0; end
          5'b01011: addr = R[rn] + R[rm];
          5'b01100: begin addr = R[rn] + {25'd0, ins[10:6], 2'b00}; ld = 0; end
          5'b01101: addr = R[rn] + {25'd0, ins[10:6], 2'b00};
          5'b10010: begin addr = R[13] + {22'd0, ins[7:0], 2'b00}; d = ins[10:8]; ld = 0; end
          default:  begin addr = R[13] + {22'd0, ins[7:0], 2'b00}; d = ins[10:8]; end
        endcase
        if (addr >= MEMSIZE) begin r_fault = 1; r_code = 2; n_fault_data++; n_instr--; return; end
        if (ld) begin R[d] = M[addr[13:2]]; n_load++; end
        else    begin M[addr[13:2]] = R[d]; n_store++; end
        R[15] = npc;
      end
      5'b10100: begin R[ins[10:8]] = ((pcv + 4) + {22'd0, ins[7:0], 2'b00}) & ~32'd3; R[15] = npc; end
      5'b10101: begin R[ins[10:8]] = R[13] + {22'd0, ins[7:0], 2'b00}; R[15] = npc; end
      5'b10110: begin
        if (ins[7]) R[13] = R[13] - {23'd0, ins[6:0], 2'b00};
        else        R[13] = R[13] + {23'd0, ins[6:0], 2'b00};
        R[15] = npc;
      end
      5'b1101?: begin
        if (cond_ok(ins[11:8])) begin
          R[15] = ((pcv + 4) + {{23{ins[7]}}, ins[7:0], 1'b0}) & ~32'd1; n_taken++;
        end else begin
          R[15] = npc; n_nottaken++;
        end
      end
      5'b11100: R[15] = ((pcv + 4) + {{20{ins[10]}}, ins[10:0], 1'b0}) & ~32'd1;
      5'b11110: begin R[14] = (pcv + 4) + {{9{ins[10]}}, ins[10:0], 12'd0}; R[15] = npc; end
      5'b11111: begin
        R[15] = (R[14] + {20'd0, ins[10:0], 1'b0}) & ~32'd1;
        R[14] = npc; n_bl++;
      end
      default: begin r_fault = 1; r_code = 3; n_fault_instr++; n_instr--; return; end
    endcase
  endtask

  // ---------------- stimulus ----------------
  function automatic logic [15:0] rand_instr();
    logic [15:0] i;
    int k;
    k = $urandom_range(0, 999);
    if (k < 3) return 16'hE800 | 16'($urandom_range(0, 2047));   // opcode 29: unimplemented
    if (k < 40) return 16'h4770;                                 // bx lr
    forever begin
      i = 16'($urandom);
      case (i[15:11])
        5'd14, 5'd15, 5'd16, 5'd17, 5'd23, 5'd24, 5'd25, 5'd29: ;
        default: return i;
      endcase
    end
  endfunction

  task automatic compare(string tag);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < 16; i++) if (regs[i] !== R[i]) ok = 1'b0;
    if (flags !== {N, Z, C, V}) ok = 1'b0;
    if (fault !== r_fault) ok = 1'b0;
    if (r_fault && fault_code !== r_code) ok = 1'b0;
    if (halted !== (R[15] == MAGIC)) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) begin
        $display("MISMATCH %s pc=%h dut_pc=%h flags=%b/%b fault=%b/%b", tag, R[15], regs[15],
                 flags, {N, Z, C, V}, fault, r_fault);
        for (int i = 0; i < 16; i++)
          if (regs[i] !== R[i]) $display("  r%0d dut=%h ref=%h", i, regs[i], R[i]);
      end
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_taken = 0; n_nottaken = 0; n_load = 0; n_store = 0; n_bl = 0; n_blx = 0;
    n_halt = 0; n_fault_pc = 0; n_fault_data = 0; n_fault_instr = 0;
    n_shift_c0 = 0; n_instr = 0;
    run = 0; init_we = 0; init_idx = 0; init_data = 0;
    for (int ep = 0; ep < EPISODES; ep++) begin
      // fill memory
      for (int i = 0; i < WORDS; i++) begin
        tbmem[i] = {rand_instr(), rand_instr()};
        M[i] = tbmem[i];
      end
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      for (int i = 0; i < 16; i++) R[i] = 0;
      R[13] = MEMSIZE; R[14] = MAGIC; R[15] = 0;
      N = 0; Z = 0; C = 0; V = 0; r_fault = 0; r_code = 0;
      compare("reset");
      // preset registers
      for (int i = 0; i < 13; i++) begin
        init_we = 1; init_idx = 4'(i);
        init_data = ($urandom_range(0, 3) != 0) ? 32'($urandom_range(0, WORDS / 2 - 1) * 4)
                                               : 32'($urandom);
        if (i == 7 && ep % 3 == 0) init_data = 32'd1;   // exercises small shift distances
        R[i] = init_data;
        @(negedge clk);
      end
      init_we = 0;
      if (ep % 2 == 0) begin
        // SP inside memory half of the time
        init_we = 1; init_idx = 13; init_data = 32'(MEMSIZE / 2); R[13] = init_data;
        @(negedge clk);
        init_we = 0;
      end
      compare("init");
      run = 1;
      for (int cyc = 0; cyc < 200; cyc++) begin
        ref_step();
        @(negedge clk);
        compare("step");
        if (r_fault || R[15] == MAGIC) break;
      end
      if (R[15] == MAGIC) n_halt++;
      run = 0;
    end
    $display("instr=%0d taken=%0d not_taken=%0d load=%0d store=%0d bl=%0d blx=%0d halt=%0d shift0=%0d fault_pc=%0d fault_data=%0d fault_instr=%0d",
             n_instr, n_taken, n_nottaken, n_load, n_store, n_bl, n_blx, n_halt, n_shift_c0,
             n_fault_pc, n_fault_data, n_fault_instr);
    // every mechanism must have been exercised
    checks++; if (n_taken == 0)       failures++;
    checks++; if (n_nottaken == 0)    failures++;
    checks++; if (n_load == 0)        failures++;
    checks++; if (n_store == 0)       failures++;
    checks++; if (n_bl == 0)          failures++;
    checks++; if (n_blx == 0)         failures++;
    checks++; if (n_halt == 0)        failures++;
    checks++; if (n_fault_pc == 0)    failures++;
    checks++; if (n_fault_data == 0)  failures++;
    checks++; if (n_fault_instr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
