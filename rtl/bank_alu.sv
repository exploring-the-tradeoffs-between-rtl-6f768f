// bank_alu: the integer ALU attached to one vector register-file bank.
//
// In the banked lane every bank has its own integer ALU wired straight to the
// bank's read and write ports, so integer uT instructions never cross the
// lane crossbar. The unit is purely combinational: result = a fn b, and
// cmp = (a cmp_fn b) for branch resolution. Which operations it offers
// (the MIPS-like integer set below) is this design's choice.
module bank_alu
  import maven_pkg::*;
(
  input  alu_fn_e fn,
  input  cmp_fn_e cmp_fn,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output logic    cmp
);
  always_comb begin
    unique case (fn)
      ALU_ADD:   result = a + b;
      ALU_SUB:   result = a - b;
      ALU_AND:   result = a & b;
      ALU_OR:    result = a | b;
      ALU_XOR:   result = a ^ b;
      ALU_SLT:   result = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:  result = {31'd0, a < b};
      ALU_SLL:   result = a << b[4:0];
      ALU_SRL:   result = a >> b[4:0];
      ALU_SRA:   result = word_t'($signed(a) >>> b[4:0]);
      ALU_PASSB: result = b;
      default:   result = a + b;
    endcase
  end

  always_comb begin
    unique case (cmp_fn)
      CMP_EQ: cmp = (a == b);
      CMP_NE: cmp = (a != b);
      CMP_LT: cmp = ($signed(a) < $signed(b));
      CMP_GE: cmp = ($signed(a) >= $signed(b));
      default: cmp = 1'b0;
    endcase
  end
endmodule
