// tb_banked_regfile: the default banked register file (64 registers, eight
// banks, one left and one right read port and two write ports per bank,
// four global read buses per side, five global write buses) against a flat
// 64-entry model. Each cycle the testbench picks registers to write and to
// read, works out bank = reg mod 8 and row = reg / 8 itself, programs the
// local ports and the crossbar selects, and compares the four left and four
// right global buses with the model. Reads of one register by several
// global buses through one local port (read sharing) are included.
`timescale 1ns/1ps
module tb_banked_regfile;
  import brf_pkg::*;
  localparam int unsigned NP = DEF_NUM_PREGS, NB = DEF_NUM_BANKS, DW = DEF_DATA_W;
  localparam int unsigned RP = DEF_RD_PER_SIDE, WP = DEF_WR_PER_BANK;
  localparam int unsigned NG = DEF_ISSUE_W, NW = DEF_ISSUE_W + DEF_N_LATE;
  localparam int unsigned RW = idx_w(NP / NB), BW = idx_w(NB);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NB-1:0][RP-1:0] bl_en, br_en;
  logic [NB-1:0][RP-1:0][RW-1:0] bl_row, br_row;
  logic [NG-1:0][BW-1:0] gl_bank, gr_bank;
  logic [NG-1:0][idx_w(RP)-1:0] gl_port, gr_port;
  logic [NG-1:0][DW-1:0] gl_data, gr_data;
  logic [NB-1:0][WP-1:0] bw_en;
  logic [NB-1:0][WP-1:0][RW-1:0] bw_row;
  logic [NB-1:0][WP-1:0][idx_w(NW)-1:0] bw_src;
  logic [NW-1:0][DW-1:0] gw_data;
  logic [DW-1:0] model [NP];
  int wreg [NW];
  int checks = 0, failures = 0;

  banked_regfile dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bl_en = '0; br_en = '0; bl_row = '0; br_row = '0; gl_bank = '0; gr_bank = '0;
    gl_port = '0; gr_port = '0; bw_en = '0; bw_row = '0; bw_src = '0; gw_data = '0;
    for (int p = 0; p < NP; p++) model[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int used [NB];
      @(negedge clk);
      // writes: up to NW global write buses, at most WP per bank, distinct registers
      bw_en = '0;
      for (int b = 0; b < NB; b++) used[b] = 0;
      for (int g = 0; g < NW; g++) begin
        int r, b; bit dup;
        r = int'($urandom_range(0, NP - 1)); b = r % NB; dup = 0;
        for (int h = 0; h < g; h++) if (wreg[h] == r) dup = 1;
        wreg[g] = -1;
        gw_data[g] = DW'($urandom());
        if (!dup && used[b] < WP && $urandom_range(0, 3) != 0) begin
          bw_en[b][used[b]]  = 1'b1;
          bw_row[b][used[b]] = RW'(r / NB);
          bw_src[b][used[b]] = idx_w(NW)'(g);
          used[b]++;
          wreg[g] = r;
        end
      end
      // reads: one register per bank per side at most; buses pick at random
      bl_en = '0; br_en = '0;
      for (int g = 0; g < NG; g++) begin
        int r, b;
        r = int'($urandom_range(0, NP - 1)); b = r % NB;
        if (bl_en[b][0] && $urandom_range(0, 1) == 0) r = int'(bl_row[b][0]) * NB + b;  // share
        if (!bl_en[b][0] || int'(bl_row[b][0]) * NB + b == r) begin
          bl_en[b][0] = 1'b1; bl_row[b][0] = RW'(r / NB);
          gl_bank[g] = BW'(b); gl_port[g] = '0;
        end else begin
          gl_bank[g] = BW'(b); gl_port[g] = '0; r = int'(bl_row[b][0]) * NB + b;
        end
        #0;
        r = int'($urandom_range(0, NP - 1)); b = r % NB;
        if (!br_en[b][0]) begin br_en[b][0] = 1'b1; br_row[b][0] = RW'(r / NB); end
        gr_bank[g] = BW'(b); gr_port[g] = '0;
      end
      #1;
      for (int g = 0; g < NG; g++) begin
        int rl, rr;
        rl = int'(bl_row[gl_bank[g]][0]) * NB + int'(gl_bank[g]);
        rr = int'(br_row[gr_bank[g]][0]) * NB + int'(gr_bank[g]);
        checks += 2;
        if (gl_data[g] !== model[rl]) begin failures++; $display("FAIL left bus %0d reg %0d", g, rl); end
        if (gr_data[g] !== model[rr]) begin failures++; $display("FAIL right bus %0d reg %0d", g, rr); end
      end
      @(posedge clk);
      for (int g = 0; g < NW; g++) if (wreg[g] >= 0) model[wreg[g]] = gw_data[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
