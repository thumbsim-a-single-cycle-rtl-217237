// tb_thumb_cond: exhaustive check of all 16 condition codes against all 16
// flag combinations, with the expected value written from the comparison
// each code stands for (signed/unsigned orderings after a compare).
module tb_thumb_cond;
  import thumb_pkg::*;
  cond_e cond;
  flags_t flags;
  logic enable;
  int checks = 0, failures = 0;

  thumb_cond dut (.cond, .flags, .enable);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic exp, n, z, c, v;
    for (int k = 0; k < 16; k++) for (int f = 0; f < 16; f++) begin
      cond = cond_e'(k); flags = 4'(f);
      n = f[3]; z = f[2]; c = f[1]; v = f[0];
      #1;
      case (k)
        0: exp = z;   1: exp = !z;  2: exp = c;  3: exp = !c;
        4: exp = n;   5: exp = !n;  6: exp = v;  7: exp = !v;
        8: exp = c & !z;             9: exp = !(c & !z);
        10: exp = !(n ^ v);          11: exp = n ^ v;
        12: exp = !z & !(n ^ v);     13: exp = !(!z & !(n ^ v));
        14: exp = 1;                 default: exp = 0;
      endcase
      checks++;
      if (enable !== exp) begin failures++; $display("FAIL cond=%0d flags=%b en=%b", k, flags, enable); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
