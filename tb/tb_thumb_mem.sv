// tb_thumb_mem: random writes through the data port and reads through both
// ports, compared with a model array. Checks that bits 1:0 of the address are
// ignored, that a write shows on the following cycle and that reads are
// combinational (same cycle as the address).
module tb_thumb_mem;
  import thumb_pkg::*;
  localparam int unsigned MEMSIZE = 16384;
  logic clk = 0, dwe;
  word_t iaddr, idata, daddr, drdata, dwdata;
  word_t model [MEMSIZE / 4];
  int checks = 0, failures = 0;

  thumb_mem #(.MEMSIZE(MEMSIZE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dwe = 1;
    // initialise every word
    for (int i = 0; i < MEMSIZE / 4; i++) begin
      daddr = 32'(i * 4); dwdata = $urandom; model[i] = dwdata;
      @(negedge clk);
    end
    repeat (5000) begin
      iaddr = $urandom_range(0, MEMSIZE - 1);
      daddr = $urandom_range(0, MEMSIZE - 1);
      dwe = 1'($urandom); dwdata = $urandom;
      #1;
      checks++;
      if (idata !== model[iaddr / 4] || drdata !== model[daddr / 4]) begin
        failures++; $display("FAIL ia=%h da=%h", iaddr, daddr);
      end
      if (dwe) model[daddr / 4] = dwdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
