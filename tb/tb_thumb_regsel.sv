// tb_thumb_regsel: checks every register selector on random instructions.
module tb_thumb_regsel;
  import thumb_pkg::*;
  reg_sel_e sel;
  half_t instr;
  logic [3:0] regno;
  int checks = 0, failures = 0;

  thumb_regsel dut (.sel, .instr, .regno);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    reg_sel_e sels [9] = '{RS_X, RS_Y, RS_Z, RS_W, RS_XX, RS_YY, RS_SP, RS_LR, RS_PC};
    int exp;
    repeat (200) foreach (sels[k]) begin
      sel = sels[k]; instr = 16'($urandom);
      #1;
      case (k)
        0: exp = instr % 8;
        1: exp = (instr / 8) % 8;
        2: exp = (instr / 64) % 8;
        3: exp = (instr / 256) % 8;
        4: exp = (instr % 8) + ((instr / 128) % 2) * 8;
        5: exp = (instr / 8) % 16;
        6: exp = 13;
        7: exp = 14;
        default: exp = 15;
      endcase
      checks++;
      if (int'(regno) != exp) begin
        failures++; $display("FAIL sel=%s instr=%h got %0d exp %0d", sel.name(), instr, regno, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
