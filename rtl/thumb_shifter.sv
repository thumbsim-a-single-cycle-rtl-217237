// thumb_shifter: 32-bit barrel shifter with carry out.
//
// Shifts x by n (0..255) places: logical left, logical right, arithmetic
// right or rotate right. cout is the last bit shifted out. A shift by zero
// returns x unchanged and passes cin (the current C flag) to cout, so a
// zero-distance shift leaves the C flag as it was.
// Distances of 32 or more: Lsl/Lsr give 0 (carry = bit 0 / bit 31 at exactly
// 32, else 0); Asr fills with the sign bit (carry = sign bit); Ror uses the
// distance modulo 32, with the carry taken from bit (n-1) mod 32.
// Purely combinational.
module thumb_shifter
  import thumb_pkg::*;
(
  input  shift_op_e  op,
  input  word_t      x,
  input  logic [7:0] n,
  input  logic       cin,
  output word_t      r,
  output logic       cout
);
  logic [32:0] lsl_ext, lsr_ext, asr_ext;
  logic [4:0]  rot;
  logic [5:0]  asr_n;

  always_comb begin
    // Carry-extended shifts: the extra bit catches the last bit shifted out.
    lsl_ext = {1'b0, x} << n;
    lsr_ext = {x, 1'b0} >> n;
    asr_n   = (n > 8'd33) ? 6'd33 : n[5:0];
    asr_ext = 33'($signed({x, 1'b0}) >>> asr_n);
    rot     = n[4:0];

    if (n == 8'd0) begin
      r    = x;
      cout = cin;
    end else begin
      unique case (op)
        SH_LSL: begin r = lsl_ext[31:0];  cout = lsl_ext[32]; end
        SH_LSR: begin r = lsr_ext[32:1];  cout = lsr_ext[0];  end
        SH_ASR: begin r = asr_ext[32:1];  cout = asr_ext[0];  end
        SH_ROR: begin
          r    = (x >> rot) | (x << (6'd32 - {1'b0, rot}));
          cout = x[rot - 5'd1];
        end
        default: begin r = x; cout = cin; end
      endcase
    end
  end
endmodule
