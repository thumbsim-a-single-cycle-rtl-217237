// tb_thumb_shiftsel: checks each shift-distance source, including the
// "0 means 32" reading of right-shift immediates.
module tb_thumb_shiftsel;
  import thumb_pkg::*;
  shift_sel_e sel;
  word_t ra;
  half_t instr;
  logic [7:0] amount;
  int checks = 0, failures = 0;

  thumb_shiftsel dut (.sel, .ra, .instr, .amount);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    shift_sel_e sels [7] = '{SA_0, SA_1, SA_2, SA_12, SA_IMM, SA_IMR, SA_REG};
    int exp;
    repeat (300) foreach (sels[k]) begin
      sel = sels[k]; ra = $urandom; instr = 16'($urandom);
      if ($urandom_range(0, 7) == 0) instr[10:6] = 5'd0;
      #1;
      case (k)
        0: exp = 0;  1: exp = 1;  2: exp = 2;  3: exp = 12;
        4: exp = (instr >> 6) % 32;
        5: exp = ((instr >> 6) % 32 == 0) ? 32 : (instr >> 6) % 32;
        default: exp = ra % 256;
      endcase
      checks++;
      if (int'(amount) != exp) begin
        failures++; $display("FAIL sel=%s instr=%h ra=%h got %0d exp %0d", sel.name(), instr, ra, amount, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
