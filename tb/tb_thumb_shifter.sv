// tb_thumb_shifter: checks all four shift kinds for every distance 0..255
// on random data, against a reference that shifts one bit at a time.
module tb_thumb_shifter;
  import thumb_pkg::*;
  shift_op_e op;
  word_t x, r;
  logic [7:0] n;
  logic cin, cout;
  int checks = 0, failures = 0;

  thumb_shifter dut (.op, .x, .n, .cin, .r, .cout);

  task automatic check();
    logic [31:0] v;
    logic c;
    #1;
    v = x; c = cin;
    for (int i = 0; i < int'(n); i++) begin
      case (op)
        SH_LSL: begin c = v[31]; v = {v[30:0], 1'b0}; end
        SH_LSR: begin c = v[0];  v = {1'b0, v[31:1]}; end
        SH_ASR: begin c = v[0];  v = {v[31], v[31:1]}; end
        default: begin c = v[0]; v = {v[0], v[31:1]}; end
      endcase
    end
    checks++;
    if (r !== v || cout !== c) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s x=%h n=%0d r=%h/%h c=%b/%b", op.name(), x, n, r, v, cout, c);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    shift_op_e ops [4] = '{SH_LSL, SH_LSR, SH_ASR, SH_ROR};
    foreach (ops[k]) begin
      op = ops[k];
      for (int d = 0; d < 256; d++) repeat (4) begin
        x = $urandom; n = 8'(d); cin = 1'($urandom); check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
