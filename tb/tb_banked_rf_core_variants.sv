// tb_banked_rf_core_variants: the four-issue, 64-register configurations
// compared in the sensitivity study, all running the same random program
// (core_harness, same seed):
//   8B2R2WYY (default)  8B2R2WNY (no bypass skip)  8B2R2WYN (no read sharing)
//   8B2R2WNN (neither)  4B2R2WYY (four banks)  8B2R1WYY  8B2R4WYY
// Each harness checks every result of its own run. This testbench then
// prints cycles, IPC and repair counts per configuration and checks the
// qualitative ordering that follows from the mechanisms: dropping bypass
// skip or read sharing, halving the banks or the write ports each gives
// more repairs than the default, and 8B2R2WNN gives the most of the
// optimisation variants; no bypass skip is ever used with BYPASS_SKIP=0,
// no read is ever shared with READ_SHARING=0; one write port gives more
// write conflicts and four write ports no more than two. 8B2R2WYY+WB2 is
// the default with two writeback stages: results reach the banks one cycle
// later and are bypassed from both stages meanwhile; its harness checks
// every result, which fails if a value still in the second stage is missed. IPC values are only
// printed: they depend on this synthetic program, not on real benchmarks.
`timescale 1ns/1ps
module tb_banked_rf_core_variants;
  localparam int unsigned NV = 8;
  localparam string NAMES [NV] = '{"8B2R2WYY", "8B2R2WNY", "8B2R2WYN", "8B2R2WNN",
                                   "4B2R2WYY", "8B2R1WYY", "8B2R4WYY", "8B2R2WYY+WB2"};
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NV-1:0] done;
  int v_checks [NV], v_failures [NV], v_cycles [NV], v_completed [NV], v_repairs [NV];
  int v_rdc [NV], v_wrc [NV], v_byp [NV], v_share [NV];
  real v_model [NV];
  int checks = 0, failures = 0;

  core_harness #(.NB(8), .WRB(2), .BYP(1'b1), .SHR(1'b1)) u_yy (.clk, .done(done[0]),
    .checks(v_checks[0]), .failures(v_failures[0]), .cycles(v_cycles[0]), .completed(v_completed[0]),
    .repairs(v_repairs[0]), .rd_conflicts(v_rdc[0]), .wr_conflicts(v_wrc[0]), .byp_skips(v_byp[0]), .rd_shares(v_share[0]),
    .rd_conf_model(v_model[0]));
  core_harness #(.NB(8), .WRB(2), .BYP(1'b0), .SHR(1'b1)) u_ny (.clk, .done(done[1]),
    .checks(v_checks[1]), .failures(v_failures[1]), .cycles(v_cycles[1]), .completed(v_completed[1]),
    .repairs(v_repairs[1]), .rd_conflicts(v_rdc[1]), .wr_conflicts(v_wrc[1]), .byp_skips(v_byp[1]), .rd_shares(v_share[1]),
    .rd_conf_model(v_model[1]));
  core_harness #(.NB(8), .WRB(2), .BYP(1'b1), .SHR(1'b0)) u_yn (.clk, .done(done[2]),
    .checks(v_checks[2]), .failures(v_failures[2]), .cycles(v_cycles[2]), .completed(v_completed[2]),
    .repairs(v_repairs[2]), .rd_conflicts(v_rdc[2]), .wr_conflicts(v_wrc[2]), .byp_skips(v_byp[2]), .rd_shares(v_share[2]),
    .rd_conf_model(v_model[2]));
  core_harness #(.NB(8), .WRB(2), .BYP(1'b0), .SHR(1'b0)) u_nn (.clk, .done(done[3]),
    .checks(v_checks[3]), .failures(v_failures[3]), .cycles(v_cycles[3]), .completed(v_completed[3]),
    .repairs(v_repairs[3]), .rd_conflicts(v_rdc[3]), .wr_conflicts(v_wrc[3]), .byp_skips(v_byp[3]), .rd_shares(v_share[3]),
    .rd_conf_model(v_model[3]));
  core_harness #(.NB(4), .WRB(2), .BYP(1'b1), .SHR(1'b1)) u_4b (.clk, .done(done[4]),
    .checks(v_checks[4]), .failures(v_failures[4]), .cycles(v_cycles[4]), .completed(v_completed[4]),
    .repairs(v_repairs[4]), .rd_conflicts(v_rdc[4]), .wr_conflicts(v_wrc[4]), .byp_skips(v_byp[4]), .rd_shares(v_share[4]),
    .rd_conf_model(v_model[4]));
  core_harness #(.NB(8), .WRB(1), .BYP(1'b1), .SHR(1'b1)) u_1w (.clk, .done(done[5]),
    .checks(v_checks[5]), .failures(v_failures[5]), .cycles(v_cycles[5]), .completed(v_completed[5]),
    .repairs(v_repairs[5]), .rd_conflicts(v_rdc[5]), .wr_conflicts(v_wrc[5]), .byp_skips(v_byp[5]), .rd_shares(v_share[5]),
    .rd_conf_model(v_model[5]));
  core_harness #(.NB(8), .WRB(4), .BYP(1'b1), .SHR(1'b1)) u_4w (.clk, .done(done[6]),
    .checks(v_checks[6]), .failures(v_failures[6]), .cycles(v_cycles[6]), .completed(v_completed[6]),
    .repairs(v_repairs[6]), .rd_conflicts(v_rdc[6]), .wr_conflicts(v_wrc[6]), .byp_skips(v_byp[6]), .rd_shares(v_share[6]),
    .rd_conf_model(v_model[6]));
  core_harness #(.NB(8), .WRB(2), .BYP(1'b1), .SHR(1'b1), .WB(2)) u_wb2 (.clk, .done(done[7]),
    .checks(v_checks[7]), .failures(v_failures[7]), .cycles(v_cycles[7]), .completed(v_completed[7]),
    .repairs(v_repairs[7]), .rd_conflicts(v_rdc[7]), .wr_conflicts(v_wrc[7]), .byp_skips(v_byp[7]), .rd_shares(v_share[7]),
    .rd_conf_model(v_model[7]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    @(posedge clk);
    $display("config     cycles  completed  IPC    repairs  rd_conf  random  wr_conf  byp_skip  rd_share");
    for (int v = 0; v < NV; v++) begin
      checks   += v_checks[v];
      failures += v_failures[v];
      $display("%s  %6d  %9d  %5.3f  %7d  %7d  %6.1f  %7d  %8d  %8d", NAMES[v], v_cycles[v], v_completed[v],
               real'(v_completed[v]) / real'(v_cycles[v]), v_repairs[v], v_rdc[v], v_model[v], v_wrc[v],
               v_byp[v], v_share[v]);
    end
    check(v_completed[0] > 2000 && v_completed[1] == v_completed[0], "same program in every configuration");
    check(v_byp[1] == 0 && v_byp[3] == 0, "no bypass skip without BYPASS_SKIP");
    check(v_share[2] == 0 && v_share[3] == 0, "no read sharing without READ_SHARING");
    check(v_byp[0] > 0 && v_share[0] > 0, "default uses both optimisations");
    check(v_repairs[1] > v_repairs[0], "no bypass skip: more repairs");
    check(v_repairs[2] > v_repairs[0], "no read sharing: more repairs");
    check(v_repairs[3] > v_repairs[1] && v_repairs[3] > v_repairs[2], "neither optimisation: most repairs");
    check(v_repairs[4] > v_repairs[0], "four banks: more repairs than eight");
    check(v_wrc[5] > v_wrc[0], "one write port: more write conflicts");
    check(v_wrc[6] <= v_wrc[0], "four write ports: no more write conflicts");
    check(v_cycles[3] > v_cycles[0], "neither optimisation: more cycles");
    check(v_completed[7] == v_completed[0] && v_byp[7] > 0 && v_repairs[7] > 0,
          "second writeback stage: same program completes, with bypass skips and repairs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
