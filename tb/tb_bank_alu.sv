// tb_bank_alu: checks every ALU function and branch comparison of bank_alu on
// directed corner values and random operands against a reference model.
module tb_bank_alu;
  import maven_pkg::*;
  alu_fn_e fn;
  cmp_fn_e cfn;
  word_t   a, b, res;
  logic    cmp;
  int checks = 0, failures = 0;

  bank_alu dut (.fn(fn), .cmp_fn(cfn), .a(a), .b(b), .result(res), .cmp(cmp));

  function automatic word_t ref_alu(alu_fn_e f, word_t x, word_t y);
    case (f)
      ALU_ADD:   return x + y;
      ALU_SUB:   return x - y;
      ALU_AND:   return x & y;
      ALU_OR:    return x | y;
      ALU_XOR:   return x ^ y;
      ALU_SLT:   return (int'(x) < int'(y)) ? 1 : 0;
      ALU_SLTU:  return (x < y) ? 1 : 0;
      ALU_SLL:   return x << (y % 32);
      ALU_SRL:   return x >> (y % 32);
      ALU_SRA:   return word_t'(int'(x) >>> (y % 32));
      default:   return y;
    endcase
  endfunction

  function automatic logic ref_cmp(cmp_fn_e f, word_t x, word_t y);
    case (f)
      CMP_EQ: return x == y;
      CMP_NE: return x != y;
      CMP_LT: return int'(x) < int'(y);
      default: return int'(x) >= int'(y);
    endcase
  endfunction

  task automatic check(word_t x, word_t y);
    a = x; b = y;
    for (int f = 0; f <= int'(ALU_PASSB); f++) begin
      fn = alu_fn_e'(f);
      cfn = cmp_fn_e'(f % 4);
      #1;
      checks++;
      if (res !== ref_alu(fn, x, y) || cmp !== ref_cmp(cfn, x, y)) begin
        failures++;
        $display("FAIL fn=%0d a=%h b=%h res=%h cmp=%b", f, x, y, res, cmp);
      end
    end
  endtask

  initial begin
    check(32'd5, 32'd7);
    check(32'hFFFF_FFFF, 32'd1);
    check(32'h8000_0000, 32'd31);
    check(32'd7, 32'd7);
    check(32'h8000_0000, 32'h7FFF_FFFF);
    repeat (300) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
