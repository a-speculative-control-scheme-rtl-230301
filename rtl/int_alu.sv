// int_alu: single-cycle integer functional unit (one of FU0..FU3).
//
// Combinational: result = a op b for add, subtract, and, or, xor. The
// register-file design treats the functional units as given; this simple
// operation set is this design's own choice, enough to give every
// instruction a result that depends on both source operands. OP_LATE never
// reaches an ALU and yields zero.
module int_alu
  import brf_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W
) (
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y
);
  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      default: y = '0;
    endcase
  end
endmodule
