// tb_thumb_perhaps: exhaustive check of the yes/no/maybe multiplexer.
module tb_thumb_perhaps;
  import thumb_pkg::*;
  perhaps_e p;
  logic c, y;
  int checks = 0, failures = 0;

  thumb_perhaps dut (.p, .c, .y);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic exp;
    for (int k = 0; k < 3; k++) for (int b = 0; b < 2; b++) begin
      p = perhaps_e'(k); c = b[0];
      #1;
      exp = (k == 0) ? 1'b1 : (k == 1) ? 1'b0 : b[0];
      checks++;
      if (y !== exp) begin failures++; $display("FAIL p=%0d c=%b y=%b", k, c, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
