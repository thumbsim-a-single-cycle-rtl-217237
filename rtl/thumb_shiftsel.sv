// thumb_shiftsel: selects the shift distance for the barrel shifter.
//
//   SA_0/1/2/12  implicit constants 0, 1, 2, 12
//   SA_IMM       instr[10:6]
//   SA_IMR       instr[10:6] read as 1..32, with 0 standing for 32
//                (right shifts by a constant)
//   SA_REG       low byte of ra, the first register read
// The result is 8 bits wide (0..255). Purely combinational.
module thumb_shiftsel
  import thumb_pkg::*;
(
  input  shift_sel_e  sel,
  input  word_t       ra,
  input  half_t       instr,
  output logic [7:0]  amount
);
  always_comb begin
    unique case (sel)
      SA_0:    amount = 8'd0;
      SA_1:    amount = 8'd1;
      SA_2:    amount = 8'd2;
      SA_12:   amount = 8'd12;
      SA_IMM:  amount = {3'd0, instr[10:6]};
      SA_IMR:  amount = (instr[10:6] == 5'd0) ? 8'd32 : {3'd0, instr[10:6]};
      SA_REG:  amount = ra[7:0];
      default: amount = 8'd0;
    endcase
  end
endmodule
