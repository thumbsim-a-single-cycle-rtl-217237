// thumb_perhaps: three-way multiplexer for the yes / no / maybe control
// signals of the decoding tables (register write and link write).
// 'maybe' takes the value of the condition input c. Purely combinational.
module thumb_perhaps
  import thumb_pkg::*;
(
  input  perhaps_e p,
  input  logic     c,
  output logic     y
);
  always_comb begin
    unique case (p)
      P_YES:   y = 1'b1;
      P_NO:    y = 1'b0;
      P_MAYBE: y = c;
      default: y = 1'b0;
    endcase
  end
endmodule
