// tb_smt_variants: the eight-issue, 512-register configurations of the
// multithreaded study, running the same random program (core_harness, same
// seed): 16B2R2WYY (one local read port per side of each bank), 16B4R2WYY
// (two per side), and 16B4R2W with bypass skip, read sharing or both turned
// off. The architectural model has 64 registers, standing for four threads
// of 16 registers each.
// Each harness checks every result of its own run. This testbench prints
// cycles, IPC and conflict counts and checks that:
//  * the extra pair of local read ports removes read conflicts and repairs
//    and does not cost cycles;
//  * compared with the read conflicts that uniformly random accesses would
//    give for the same number of requests per cycle (the harness's
//    rd_conf_model), accesses without read sharing conflict more, because
//    operands of one group are correlated, and with read sharing less;
//  * each optimisation removes read conflicts.
// IPC values are only printed: they depend on this synthetic program, not
// on real benchmarks.
`timescale 1ns/1ps
module tb_smt_variants;
  localparam int unsigned NV = 5;
  localparam string NAMES [NV] = '{"16B2R2WYY", "16B4R2WYY", "16B4R2WNY", "16B4R2WYN", "16B4R2WNN"};
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NV-1:0] done;
  int v_checks [NV], v_failures [NV], v_cycles [NV], v_completed [NV], v_repairs [NV];
  int v_rdc [NV], v_wrc [NV], v_byp [NV], v_share [NV];
  real v_model [NV];
  int checks = 0, failures = 0;

  core_harness #(.IW(8), .NP(512), .NB(16), .RDS(1), .IQ(64), .NA(64), .BYP(1'b1), .SHR(1'b1)) u_2r (.clk, .done(done[0]),
    .checks(v_checks[0]), .failures(v_failures[0]), .cycles(v_cycles[0]), .completed(v_completed[0]),
    .repairs(v_repairs[0]), .rd_conflicts(v_rdc[0]), .wr_conflicts(v_wrc[0]), .byp_skips(v_byp[0]),
    .rd_shares(v_share[0]), .rd_conf_model(v_model[0]));
  core_harness #(.IW(8), .NP(512), .NB(16), .RDS(2), .IQ(64), .NA(64), .BYP(1'b1), .SHR(1'b1)) u_4r (.clk, .done(done[1]),
    .checks(v_checks[1]), .failures(v_failures[1]), .cycles(v_cycles[1]), .completed(v_completed[1]),
    .repairs(v_repairs[1]), .rd_conflicts(v_rdc[1]), .wr_conflicts(v_wrc[1]), .byp_skips(v_byp[1]),
    .rd_shares(v_share[1]), .rd_conf_model(v_model[1]));
  core_harness #(.IW(8), .NP(512), .NB(16), .RDS(2), .IQ(64), .NA(64), .BYP(1'b0), .SHR(1'b1)) u_4r_ny (.clk, .done(done[2]),
    .checks(v_checks[2]), .failures(v_failures[2]), .cycles(v_cycles[2]), .completed(v_completed[2]),
    .repairs(v_repairs[2]), .rd_conflicts(v_rdc[2]), .wr_conflicts(v_wrc[2]), .byp_skips(v_byp[2]),
    .rd_shares(v_share[2]), .rd_conf_model(v_model[2]));
  core_harness #(.IW(8), .NP(512), .NB(16), .RDS(2), .IQ(64), .NA(64), .BYP(1'b1), .SHR(1'b0)) u_4r_yn (.clk, .done(done[3]),
    .checks(v_checks[3]), .failures(v_failures[3]), .cycles(v_cycles[3]), .completed(v_completed[3]),
    .repairs(v_repairs[3]), .rd_conflicts(v_rdc[3]), .wr_conflicts(v_wrc[3]), .byp_skips(v_byp[3]),
    .rd_shares(v_share[3]), .rd_conf_model(v_model[3]));
  core_harness #(.IW(8), .NP(512), .NB(16), .RDS(2), .IQ(64), .NA(64), .BYP(1'b0), .SHR(1'b0)) u_4r_nn (.clk, .done(done[4]),
    .checks(v_checks[4]), .failures(v_failures[4]), .cycles(v_cycles[4]), .completed(v_completed[4]),
    .repairs(v_repairs[4]), .rd_conflicts(v_rdc[4]), .wr_conflicts(v_wrc[4]), .byp_skips(v_byp[4]),
    .rd_shares(v_share[4]), .rd_conf_model(v_model[4]));

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
    $display("config      cycles  completed  IPC    repairs  rd_conf  random  wr_conf  byp_skip  rd_share");
    for (int v = 0; v < NV; v++) begin
      checks   += v_checks[v];
      failures += v_failures[v];
      $display("%s  %6d  %9d  %5.3f  %7d  %7d  %6.1f  %7d  %8d  %8d", NAMES[v], v_cycles[v], v_completed[v],
               real'(v_completed[v]) / real'(v_cycles[v]), v_repairs[v], v_rdc[v], v_model[v], v_wrc[v],
               v_byp[v], v_share[v]);
    end
    for (int v = 1; v < NV; v++)
      check(v_completed[0] > 2000 && v_completed[v] == v_completed[0], "same program in every configuration");
    check(v_rdc[1] < v_rdc[0], "four local read ports: fewer read conflicts");
    check(v_repairs[1] < v_repairs[0], "four local read ports: fewer repairs");
    check(v_cycles[1] <= v_cycles[0], "four local read ports: no more cycles");
    check(real'(v_rdc[4]) > v_model[4], "no optimisation: more read conflicts than random accesses");
    check(real'(v_rdc[3]) > v_model[3], "bypass skip only: more read conflicts than random accesses");
    check(real'(v_rdc[2]) < v_model[2], "read sharing only: fewer read conflicts than random accesses");
    check(real'(v_rdc[1]) < v_model[1], "both optimisations: fewer read conflicts than random accesses");
    check(v_rdc[2] < v_rdc[4] && v_rdc[3] < v_rdc[4] && v_rdc[1] < v_rdc[2] && v_rdc[1] < v_rdc[3],
          "each optimisation removes read conflicts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
