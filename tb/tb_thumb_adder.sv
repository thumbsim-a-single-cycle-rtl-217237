// tb_thumb_adder: checks the adder's sum, carry and overflow on corner cases
// and random operands against a 33-bit sum (carry) and a signed 34-bit sum
// (overflow).
module tb_thumb_adder;
  import thumb_pkg::*;
  word_t a, b, r;
  logic cin, cout, vout;
  int checks = 0, failures = 0;

  thumb_adder dut (.a, .b, .cin, .r, .cout, .vout);

  task automatic check();
    logic [32:0] s;
    logic signed [33:0] ss;
    logic ev;
    #1;
    s  = {1'b0, a} + {1'b0, b} + {32'd0, cin};
    ss = $signed({{2{a[31]}}, a}) + $signed({{2{b[31]}}, b}) + $signed({33'd0, cin});
    ev = (ss > 34'sh7FFFFFFF) || (ss < -34'sh80000000);
    checks++;
    if (r !== s[31:0] || cout !== s[32] || vout !== ev) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b r=%h c=%b v=%b", a, b, cin, r, cout, vout);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t edge_v [6] = '{32'h0, 32'h1, 32'h7FFFFFFF, 32'h80000000, 32'hFFFFFFFF, 32'h80000001};
    foreach (edge_v[i]) foreach (edge_v[j]) for (int c = 0; c < 2; c++) begin
      a = edge_v[i]; b = edge_v[j]; cin = c[0]; check();
    end
    repeat (3000) begin a = $urandom; b = $urandom; cin = 1'($urandom); check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
