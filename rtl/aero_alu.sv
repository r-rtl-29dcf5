// Single-cycle ALU of the execute stage.
//
// Implements the operational instructions of the published opcode table:
// add, sub, mul (low 32 bits of the product), xor, and, or, logical shift
// right and left (shift amount op_b[4:0]), and the compare-and-jump group
// jle/jge/jl/jg/je/jne/juc, which produce the jump enable j_en instead of a
// result. The comparisons are signed, matching the C "int" operands the
// programs are compiled from (the signedness is this design's choice). The
// subroutine call and return operations, whose encodings are not published,
// raise call_en / ret_en. wr_en says whether the result is written back to
// operand register a. Purely combinational; the execute stage registers the
// outputs (alu_reg and the control flags).
module aero_alu
  import aero_pkg::*;
(
  input  logic [6:0] opcode,
  input  word_t      op_a,
  input  word_t      op_b,
  output word_t      result,
  output logic       wr_en,
  output logic       j_en,
  output logic       call_en,
  output logic       ret_en
);

  logic signed [XLEN-1:0] sa, sb;
  assign sa = op_a;
  assign sb = op_b;

  always_comb begin
    result  = '0;
    wr_en   = 1'b0;
    j_en    = 1'b0;
    call_en = 1'b0;
    ret_en  = 1'b0;
    case (opcode)
      OP_ADD: begin result = op_a + op_b;            wr_en = 1'b1; end
      OP_SUB: begin result = op_a - op_b;            wr_en = 1'b1; end
      OP_MUL: begin result = op_a * op_b;            wr_en = 1'b1; end
      OP_XOR: begin result = op_a ^ op_b;            wr_en = 1'b1; end
      OP_AND: begin result = op_a & op_b;            wr_en = 1'b1; end
      OP_OR:  begin result = op_a | op_b;            wr_en = 1'b1; end
      OP_SHR: begin result = op_a >> op_b[4:0];      wr_en = 1'b1; end
      OP_SHL: begin result = op_a << op_b[4:0];      wr_en = 1'b1; end
      OP_JLE: j_en = (sa <= sb);
      OP_JGE: j_en = (sa >= sb);
      OP_JL:  j_en = (sa <  sb);
      OP_JG:  j_en = (sa >  sb);
      OP_JE:  j_en = (op_a == op_b);
      OP_JNE: j_en = (op_a != op_b);
      OP_JUC: j_en = 1'b1;
      OP_CALL: call_en = 1'b1;
      OP_RET:  ret_en  = 1'b1;
      default: ;
    endcase
  end

endmodule
