// tb_rf_bank: random reads and writes of one bank (default 8 rows, one left
// and one right read port, two write ports) against an array model. Checks
// that a write becomes visible in the next cycle, not the same one, that a
// disabled read port returns zero and that reset clears the bank.
`timescale 1ns/1ps
module tb_rf_bank;
  import brf_pkg::*;
  localparam int unsigned ROWS = DEF_NUM_PREGS / DEF_NUM_BANKS;
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned NWR = DEF_WR_PER_BANK;
  localparam int unsigned RW = idx_w(ROWS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [0:0] l_en, r_en;
  logic [0:0][RW-1:0] l_row, r_row;
  logic [0:0][DW-1:0] l_data, r_data;
  logic [NWR-1:0] w_en;
  logic [NWR-1:0][RW-1:0] w_row;
  logic [NWR-1:0][DW-1:0] w_data;
  logic [DW-1:0] model [ROWS];
  int checks = 0, failures = 0;

  rf_bank dut (.*);

  task automatic chk(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_en = '0; l_en = '0; r_en = '0; l_row = '0; r_row = '0; w_row = '0; w_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) model[r] = '0;
    for (int r = 0; r < ROWS; r++) begin
      l_en = 1; l_row[0] = RW'(r); #1; chk(l_data[0], '0, "reset value");
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      // writes to distinct rows
      w_en = '0;
      for (int p = 0; p < NWR; p++) begin
        w_en[p]   = $urandom_range(0, 1);
        w_row[p]  = RW'($urandom_range(0, ROWS - 1));
        w_data[p] = DW'($urandom());
        if (p > 0 && w_row[p] == w_row[0]) w_en[p] = 1'b0;
      end
      l_en[0] = $urandom_range(0, 3) != 0; l_row[0] = RW'($urandom_range(0, ROWS - 1));
      r_en[0] = $urandom_range(0, 3) != 0; r_row[0] = RW'($urandom_range(0, ROWS - 1));
      #1;
      // reads see the old contents in the writing cycle
      chk(l_data[0], l_en[0] ? model[l_row[0]] : '0, "left read");
      chk(r_data[0], r_en[0] ? model[r_row[0]] : '0, "right read");
      @(posedge clk);
      for (int p = 0; p < NWR; p++) if (w_en[p]) model[w_row[p]] = w_data[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
