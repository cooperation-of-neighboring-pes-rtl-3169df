// alu: integer ALU of one PE, purely combinational (single-cycle latency).
//
// Each integer PE has one ALU and one multiplier; the operation set below is
// this design's own selection of Alpha-style integer operations. Shifts use
// the low six bits of b. Compares return 1 or 0. OP_MUL is not handled here
// (it goes to mul_pipe); the ALU returns 0 for it.
module alu
  import cpe_pkg::*;
(
  input  op_t   op,
  input  word_t a,
  input  word_t b,
  output word_t y
);
  always_comb begin
    unique case (op)
      OP_ADD:    y = a + b;
      OP_SUB:    y = a - b;
      OP_AND:    y = a & b;
      OP_OR:     y = a | b;
      OP_XOR:    y = a ^ b;
      OP_SLL:    y = a << b[5:0];
      OP_SRL:    y = a >> b[5:0];
      OP_SRA:    y = word_t'($signed(a) >>> b[5:0]);
      OP_CMPLT:  y = word_t'($signed(a) < $signed(b));
      OP_CMPULT: y = word_t'(a < b);
      default:   y = '0;
    endcase
  end
endmodule
