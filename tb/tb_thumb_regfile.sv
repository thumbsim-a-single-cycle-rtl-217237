// tb_thumb_regfile: drives random reads, writes, link updates and register
// presets into the register file and compares all three read ports and every
// register with a model array after each clock. Checks the reset values,
// PC-reads-as-PC+4, bit 0 clearing on explicit PC writes, the precedence of
// an explicit LR write over the link write, and that r0..r13 keep their value
// when not written.
module tb_thumb_regfile;
  import thumb_pkg::*;
  logic clk = 0, rst_n, step, regwrite, link, init_we;
  logic [3:0] sel_a, sel_b, sel_c, regc, init_idx;
  word_t ra, rb, rc, pc, result, nextpc, init_data;
  word_t regs [16];
  word_t model [16];
  int checks = 0, failures = 0;

  thumb_regfile #(.SP_INIT(32'd16384)) dut (.*);

  always #5 clk = ~clk;

  function automatic word_t mread(logic [3:0] i);
    return (i == 15) ? model[i] + 4 : model[i];
  endfunction

  task automatic compare();
    checks++;
    if (ra !== mread(sel_a) || rb !== mread(sel_b) || rc !== mread(sel_c) || pc !== model[15]) begin
      failures++; $display("FAIL read a=%0d b=%0d c=%0d", sel_a, sel_b, sel_c);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (regs[i] !== model[i]) begin failures++; $display("FAIL r%0d %h vs %h", i, regs[i], model[i]); end
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; step = 0; regwrite = 0; link = 0; init_we = 0;
    sel_a = 0; sel_b = 0; sel_c = 0; regc = 0; init_idx = 0;
    result = 0; nextpc = 0; init_data = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) model[i] = 0;
    model[13] = 16384; model[14] = 32'h0FFFFFFE; model[15] = 0;
    compare();
    repeat (2000) begin
      sel_a = 4'($urandom); sel_b = 4'($urandom); sel_c = 4'($urandom);
      init_we = ($urandom_range(0, 9) == 0);
      init_idx = 4'($urandom); init_data = $urandom;
      step = $urandom_range(0, 3) != 0;
      regwrite = 1'($urandom); regc = 4'($urandom); link = ($urandom_range(0, 3) == 0);
      result = $urandom; nextpc = $urandom;
      #1 compare();
      // model update
      if (init_we) model[init_idx] = init_data;
      else if (step) begin
        if (regwrite && regc < 14) model[regc] = result;
        if (regwrite && regc == 14) model[14] = result;
        else if (link) model[14] = nextpc;
        model[15] = (regwrite && regc == 15) ? {result[31:1], 1'b0} : nextpc;
      end
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
