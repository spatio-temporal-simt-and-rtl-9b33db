// tb_lane_alu: compares every integer and branch operation with a reference
// computed in the testbench on random and corner-case operands.
module tb_lane_alu;
  import tsimt_pkg::*;
  op_e op; logic use_imm; word_t a, b, tid, wid, result; logic taken;
  lane_alu dut (.*);
  int checks = 0, failures = 0;

  function automatic word_t ref_res(op_e o, word_t x, word_t y, word_t t, word_t w);
    case (o)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_MUL: return x * y;
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_XOR: return x ^ y;
      OP_SHL: return x << (y % 32);
      OP_SHR: return x >> (y % 32);
      OP_MIN: return (int'(x) < int'(y)) ? x : y;
      OP_MAX: return (int'(x) > int'(y)) ? x : y;
      OP_SLT: return (int'(x) < int'(y)) ? 1 : 0;
      OP_SEQ: return (x == y) ? 1 : 0;
      OP_MOV: return y;
      OP_TID: return t;
      OP_WID: return w;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = op_e'(1 + (i % 15));
      a = $urandom; b = $urandom; tid = $urandom; wid = $urandom;
      if (i % 5 == 0) b = a;
      if (i % 11 == 0) a = 0;
      use_imm = (i % 9 == 0);
      #1;
      checks++;
      if (result !== ref_res(op, a, b, tid, wid)) begin
        failures++; $display("FAIL: op %s a=%h b=%h res=%h", op.name(), a, b, result);
      end
      checks++;
      if (taken !== (use_imm || a != 0)) begin failures++; $display("FAIL: taken"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
