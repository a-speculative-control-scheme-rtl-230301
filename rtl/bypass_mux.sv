// bypass_mux: operand select of the Read/Bypass stage for one source operand.
//
// The operand value comes, in this priority, from: the separate zero input
// (the operand is the zero register), the first matching bypass source, or
// the global read bus of the register file. Sources are given in priority
// order: the caller lists the results leaving the execute stage first (the
// latency-critical path for a value produced in the immediately preceding
// cycle), then the results in the writeback stage (completed, not yet in
// the register file). A source matches when it is valid and its destination
// register equals the operand's register. Combinational.
//
// The zero input and the two bypass levels follow the register file and
// bypass organisation; the match-by-register-tag selection is this design's
// own choice. hit_src reports which source was used (for checking that an
// operand that skipped the read ports really was bypassed).
module bypass_mux
  import brf_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned TAG_W  = idx_w(DEF_NUM_PREGS),
  parameter int unsigned N_SRC  = 2 * DEF_ISSUE_W + 2 * DEF_N_LATE
) (
  input  logic                          is_zero,
  input  logic [TAG_W-1:0]              tag,
  input  logic [DATA_W-1:0]             rf_data,
  input  logic [N_SRC-1:0]              src_valid,
  input  logic [N_SRC-1:0][TAG_W-1:0]   src_tag,
  input  logic [N_SRC-1:0][DATA_W-1:0]  src_data,
  output logic [DATA_W-1:0]             y,
  output logic                          hit,
  output logic [N_SRC-1:0]              hit_src
);
  always_comb begin
    y       = rf_data;
    hit     = 1'b0;
    hit_src = '0;
    if (is_zero) begin
      y = '0;
    end else begin
      for (int s = 0; s < N_SRC; s++) begin
        if (!hit && src_valid[s] && src_tag[s] == tag) begin
          hit        = 1'b1;
          hit_src[s] = 1'b1;
          y          = src_data[s];
        end
      end
    end
  end
endmodule
