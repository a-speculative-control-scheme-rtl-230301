// tb_int_alu: random operands and operations against a reference computed
// in the testbench; combinational, so the result is checked after 1 ns.
`timescale 1ns/1ps
module tb_int_alu;
  import brf_pkg::*;
  localparam int unsigned DW = DEF_DATA_W;
  op_e op;
  logic [DW-1:0] a, b, y, ref_y;
  int checks = 0, failures = 0;

  int_alu dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = op_e'($urandom_range(0, 4));
      a  = DW'($urandom());
      b  = (i % 7 == 0) ? a : DW'($urandom());
      #1;
      case (op)
        OP_ADD: ref_y = a + b;
        OP_SUB: ref_y = a + ~b + 1'b1;
        OP_AND: ref_y = ~(~a | ~b);
        OP_OR:  ref_y = ~(~a & ~b);
        default: ref_y = (a | b) & ~(a & b);
      endcase
      checks++;
      if (y !== ref_y) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h expected %h", op, a, b, y, ref_y);
      end
    end
    op = OP_LATE; a = '1; b = '1; #1;
    checks++;
    if (y !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
