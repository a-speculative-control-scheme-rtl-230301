// tb_bypass_mux: random tags over the default number of bypass sources
// (execute stage then writeback stage). The expected value is worked out
// from the priority order: zero operand, then the lowest-numbered matching
// valid source, then the register-file value.
`timescale 1ns/1ps
module tb_bypass_mux;
  import brf_pkg::*;
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned TW = idx_w(DEF_NUM_PREGS);
  localparam int unsigned NS = 2 * DEF_ISSUE_W + 2 * DEF_N_LATE;
  logic is_zero, hit;
  logic [TW-1:0] tag;
  logic [DW-1:0] rf_data, y, exp_y;
  logic [NS-1:0] src_valid, hit_src;
  logic [NS-1:0][TW-1:0] src_tag;
  logic [NS-1:0][DW-1:0] src_data;
  int checks = 0, failures = 0;
  int first;

  bypass_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      is_zero = ($urandom_range(0, 9) == 0);
      tag     = TW'($urandom_range(0, 7));   // small tag range: frequent matches
      rf_data = DW'($urandom());
      for (int s = 0; s < NS; s++) begin
        src_valid[s] = $urandom_range(0, 1);
        src_tag[s]   = TW'($urandom_range(0, 7));
        src_data[s]  = DW'($urandom());
      end
      #1;
      first = -1;
      for (int s = NS - 1; s >= 0; s--) if (src_valid[s] && src_tag[s] == tag) first = s;
      exp_y = is_zero ? '0 : (first >= 0 ? src_data[first] : rf_data);
      checks++;
      if (y !== exp_y || hit !== (!is_zero && first >= 0) ||
          (!is_zero && first >= 0 && hit_src !== (NS'(1) << first))) begin
        failures++;
        $display("FAIL i=%0d y=%h expected %h first=%0d", i, y, exp_y, first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
