// rf_bank: one bank of the banked register file.
//
// A bank holds ROWS registers of DATA_W bits. Its local read ports are split
// into N_LEFT ports that only feed the global left-operand buses and N_RIGHT
// ports that only feed the global right-operand buses; N_WR local write ports
// take values from the global write buses. The split of read ports into a
// left and a right group follows the register-file organisation; the storage
// is written here as an array (the real part is a 6T SRAM array with
// single-ended read ports).
//
// Timing: reads are combinational from the address (value as of the start of
// the cycle); writes happen at the rising clock edge, so a value written in
// cycle t is readable in cycle t+1. A port whose enable is low returns zero
// (its local bitline is not connected). Two write ports never target the same
// row in one cycle (the arbiter grants one write per physical register); if
// they did, the higher-numbered port would win. Reset clears every register,
// which is this design's own choice.
module rf_bank
  import brf_pkg::*;
#(
  parameter int unsigned ROWS    = DEF_NUM_PREGS / DEF_NUM_BANKS,
  parameter int unsigned DATA_W  = DEF_DATA_W,
  parameter int unsigned N_LEFT  = DEF_RD_PER_SIDE,
  parameter int unsigned N_RIGHT = DEF_RD_PER_SIDE,
  parameter int unsigned N_WR    = DEF_WR_PER_BANK,
  localparam int unsigned ROW_W  = idx_w(ROWS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_LEFT-1:0]              l_en,
  input  logic [N_LEFT-1:0][ROW_W-1:0]   l_row,
  output logic [N_LEFT-1:0][DATA_W-1:0]  l_data,
  input  logic [N_RIGHT-1:0]             r_en,
  input  logic [N_RIGHT-1:0][ROW_W-1:0]  r_row,
  output logic [N_RIGHT-1:0][DATA_W-1:0] r_data,
  input  logic [N_WR-1:0]                w_en,
  input  logic [N_WR-1:0][ROW_W-1:0]     w_row,
  input  logic [N_WR-1:0][DATA_W-1:0]    w_data
);
  logic [DATA_W-1:0] mem [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) mem[r] <= '0;
    end else begin
      for (int p = 0; p < N_WR; p++)
        if (w_en[p]) mem[w_row[p]] <= w_data[p];
    end
  end

  always_comb begin
    for (int p = 0; p < N_LEFT; p++)  l_data[p] = l_en[p] ? mem[l_row[p]] : '0;
    for (int p = 0; p < N_RIGHT; p++) r_data[p] = r_en[p] ? mem[r_row[p]] : '0;
  end
endmodule
