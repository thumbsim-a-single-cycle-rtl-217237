// thumb_cond: evaluates a four-bit condition code against the NZCV flags.
//
// All sixteen codes give an answer: 14 (always) is true and 15 (never) is
// false, so the field may be evaluated for every instruction, branch or not,
// as the single-cycle datapath does. Purely combinational.
module thumb_cond
  import thumb_pkg::*;
(
  input  cond_e  cond,
  input  flags_t flags,
  output logic   enable
);
  always_comb begin
    unique case (cond)
      COND_EQ: enable = flags.z;
      COND_NE: enable = ~flags.z;
      COND_CS: enable = flags.c;
      COND_CC: enable = ~flags.c;
      COND_MI: enable = flags.n;
      COND_PL: enable = ~flags.n;
      COND_VS: enable = flags.v;
      COND_VC: enable = ~flags.v;
      COND_HI: enable = flags.c & ~flags.z;
      COND_LS: enable = ~flags.c | flags.z;
      COND_GE: enable = (flags.n == flags.v);
      COND_LT: enable = (flags.n != flags.v);
      COND_GT: enable = ~flags.z & (flags.n == flags.v);
      COND_LE: enable = flags.z | (flags.n != flags.v);
      COND_AL: enable = 1'b1;
      COND_NV: enable = 1'b0;
      default: enable = 1'b0;
    endcase
  end
endmodule
