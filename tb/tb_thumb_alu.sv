// tb_thumb_alu: checks every ALU operation, result and NZCV flags, on random
// and corner-case operands against arithmetic done in wider integers.
module tb_thumb_alu;
  import thumb_pkg::*;
  alu_op_e op;
  word_t in1, in2, result;
  logic cin, shc;
  flags_t flags;
  int checks = 0, failures = 0;

  thumb_alu dut (.op, .in1, .in2, .cin, .shc, .result, .flags);

  function automatic logic ovf(logic [31:0] a, logic [31:0] b, logic c);
    logic signed [33:0] ss;
    ss = $signed({{2{a[31]}}, a}) + $signed({{2{b[31]}}, b}) + $signed({33'd0, c});
    return (ss > 34'sh7FFFFFFF) || (ss < -34'sh80000000);
  endfunction

  task automatic check();
    logic [32:0] s;
    logic [31:0] er;
    logic ec, ev;
    logic [63:0] p;
    #1;
    ec = 0; ev = 0;
    case (op)
      ALU_ADD: begin s = {1'b0, in1} + {1'b0, in2}; er = s[31:0]; ec = s[32]; ev = ovf(in1, in2, 0); end
      ALU_SUB: begin s = {1'b0, in1} + {1'b0, ~in2} + 33'd1; er = s[31:0]; ec = s[32]; ev = ovf(in1, ~in2, 1); end
      ALU_ADC: begin s = {1'b0, in1} + {1'b0, in2} + {32'd0, cin}; er = s[31:0]; ec = s[32]; ev = ovf(in1, in2, cin); end
      ALU_SBC: begin s = {1'b0, in1} + {1'b0, ~in2} + {32'd0, cin}; er = s[31:0]; ec = s[32]; ev = ovf(in1, ~in2, cin); end
      ALU_NEG: begin s = {1'b0, ~in2} + 33'd1; er = s[31:0]; ec = s[32]; ev = ovf(0, ~in2, 1); end
      ALU_AND: er = in1 & in2;
      ALU_EOR: er = in1 ^ in2;
      ALU_ORR: er = in1 | in2;
      ALU_BIC: er = in1 & ~in2;
      ALU_MUL: begin p = {32'd0, in1} * {32'd0, in2}; er = p[31:0]; end
      ALU_MOV: begin er = in2; ec = shc; end
      ALU_MVN: begin er = ~in2; ec = shc; end
      default: begin er = (in1 + in2); er[1:0] = 2'b00; end  // ALU_ADR
    endcase
    checks++;
    if (result !== er || (op != ALU_ADR &&
        flags !== {er[31], er == 0, ec, ev})) begin
      failures++;
      $display("FAIL op=%s in1=%h in2=%h r=%h exp=%h flags=%b", op.name(), in1, in2, result, er, flags);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    alu_op_e ops [13] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_EOR, ALU_ADC, ALU_SBC, ALU_NEG,
                          ALU_ORR, ALU_MUL, ALU_MOV, ALU_MVN, ALU_BIC, ALU_ADR};
    foreach (ops[k]) begin
      op = ops[k];
      // corner cases: zero result, signed overflow both ways
      in1 = 32'h7FFFFFFF; in2 = 32'h1; cin = 1; shc = 1; check();
      in1 = 32'h80000000; in2 = 32'h1; cin = 0; shc = 0; check();
      in1 = 32'h5; in2 = 32'h5; cin = 1; shc = 0; check();
      in1 = 32'h0; in2 = 32'h0; cin = 0; shc = 1; check();
      repeat (500) begin
        in1 = $urandom; in2 = $urandom; cin = 1'($urandom); shc = 1'($urandom); check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
