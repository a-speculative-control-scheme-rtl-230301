// banked_regfile: multibanked register file with its local/global interconnect.
//
// NUM_PREGS physical registers are interleaved over NUM_BANKS banks: register
// p lives in bank p mod NUM_BANKS, row p / NUM_BANKS (low-order interleaving
// is this design's choice; the banks are described only as interleaved).
// There are N_GR global left buses and N_GR global right buses (two per
// functional unit, one per source operand) and N_GW global write buses.
//
// Read interconnect: each bank's left local ports connect only to the global
// left buses and its right local ports only to the global right buses, so a
// global bus is a mux over (bank, local port) on its own side. Several global
// buses may select the same local port; that is how one local read drives
// several global ports for read sharing. Write interconnect: each local write
// port of each bank selects one global write bus.
//
// All selects, enables and row addresses come from the arbitration stage
// (already registered by the caller). Reads are combinational within the
// cycle; writes take effect at the clock edge (see rf_bank).
module banked_regfile
  import brf_pkg::*;
#(
  parameter int unsigned NUM_PREGS   = DEF_NUM_PREGS,
  parameter int unsigned NUM_BANKS   = DEF_NUM_BANKS,
  parameter int unsigned DATA_W      = DEF_DATA_W,
  parameter int unsigned RD_PER_SIDE = DEF_RD_PER_SIDE,
  parameter int unsigned WR_PER_BANK = DEF_WR_PER_BANK,
  parameter int unsigned N_GR        = DEF_ISSUE_W,
  parameter int unsigned N_GW        = DEF_ISSUE_W + DEF_N_LATE,
  localparam int unsigned ROWS   = NUM_PREGS / NUM_BANKS,
  localparam int unsigned ROW_W  = idx_w(ROWS),
  localparam int unsigned BANK_W = idx_w(NUM_BANKS),
  localparam int unsigned RP_W   = idx_w(RD_PER_SIDE),
  localparam int unsigned GW_W   = idx_w(N_GW)
) (
  input  logic clk,
  input  logic rst_n,
  // bank-local read ports (left / right side), from the arbiters
  input  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0]            bl_en,
  input  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0][ROW_W-1:0] bl_row,
  input  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0]            br_en,
  input  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0][ROW_W-1:0] br_row,
  // global read bus selects
  input  logic [N_GR-1:0][BANK_W-1:0] gl_bank,
  input  logic [N_GR-1:0][RP_W-1:0]   gl_port,
  input  logic [N_GR-1:0][BANK_W-1:0] gr_bank,
  input  logic [N_GR-1:0][RP_W-1:0]   gr_port,
  output logic [N_GR-1:0][DATA_W-1:0] gl_data,
  output logic [N_GR-1:0][DATA_W-1:0] gr_data,
  // bank-local write ports and the global write buses
  input  logic [NUM_BANKS-1:0][WR_PER_BANK-1:0]            bw_en,
  input  logic [NUM_BANKS-1:0][WR_PER_BANK-1:0][ROW_W-1:0] bw_row,
  input  logic [NUM_BANKS-1:0][WR_PER_BANK-1:0][GW_W-1:0]  bw_src,
  input  logic [N_GW-1:0][DATA_W-1:0]                      gw_data
);
  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0][DATA_W-1:0] bl_data, br_data;
  logic [NUM_BANKS-1:0][WR_PER_BANK-1:0][DATA_W-1:0] bw_data;

  // write interconnect: global write bus -> local write port
  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++)
      for (int p = 0; p < WR_PER_BANK; p++)
        bw_data[b][p] = gw_data[bw_src[b][p]];
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    rf_bank #(
      .ROWS(ROWS), .DATA_W(DATA_W),
      .N_LEFT(RD_PER_SIDE), .N_RIGHT(RD_PER_SIDE), .N_WR(WR_PER_BANK)
    ) u_bank (
      .clk, .rst_n,
      .l_en(bl_en[b]), .l_row(bl_row[b]), .l_data(bl_data[b]),
      .r_en(br_en[b]), .r_row(br_row[b]), .r_data(br_data[b]),
      .w_en(bw_en[b]), .w_row(bw_row[b]), .w_data(bw_data[b])
    );
  end

  // read interconnect: local read port -> global bus on the same side
  always_comb begin
    for (int g = 0; g < N_GR; g++) begin
      gl_data[g] = bl_data[gl_bank[g]][gl_port[g]];
      gr_data[g] = br_data[gr_bank[g]][gr_port[g]];
    end
  end
endmodule
