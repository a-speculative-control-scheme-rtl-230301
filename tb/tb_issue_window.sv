// tb_issue_window: directed cycle-by-cycle tests of the default issue window
// (32 entries, 4-wide dispatch and select). The testbench plays the
// Arbitrate stage (free_mask, repair inputs). Inputs are driven at the
// falling edge and the combinational select outputs checked 1 ns later.
//  1. wakeup/select: a dependent instruction is selected the cycle after its
//     producer, with its bypass bit set; an issued entry is not selected again.
//  2. repair: producer A killed in Arbitrate while its dependent B was
//     selected in parallel; in the repair cycle A is selected again (two
//     cycles after its first selection) and B is not (its ready bit was
//     cleared); B follows one cycle later with its bypass bit set; the
//     passed instruction C is never selected again.
//  3. late wakeup: an operand produced by OP_LATE wakes on the late broadcast,
//     without bypass bit.
//  4. capacity and select width: the window accepts 8 groups of 4, then
//     refuses dispatch; once woken, the 32 entries issue 4 per cycle.
`timescale 1ns/1ps
module tb_issue_window;
  import brf_pkg::*;
  localparam int unsigned D = DEF_IQ_DEPTH, W = DEF_ISSUE_W, NP = DEF_NUM_PREGS;
  localparam int unsigned TW = idx_w(NP), EW = idx_w(D), IDW = DEF_ID_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0] disp_valid, disp_dst_valid, iss_valid, iss_dst_valid;
  op_e [W-1:0] disp_op, iss_op;
  logic [W-1:0][1:0][TW-1:0] disp_src, iss_src;
  logic [W-1:0][1:0] disp_src_zero, iss_src_zero, iss_src_byp;
  logic [W-1:0][TW-1:0] disp_dst, iss_dst, repair_tag;
  logic [W-1:0][IDW-1:0] disp_id, iss_id;
  logic disp_ready, repair;
  logic [0:0] late_bc_valid;
  logic [0:0][TW-1:0] late_bc_tag;
  logic [D-1:0] free_mask, repair_entries;
  logic [W-1:0] repair_tag_valid;
  logic [W-1:0][EW-1:0] iss_entry;

  issue_window dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t %s", $time, what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    disp_valid = '0; disp_dst_valid = '0; disp_src = '0; disp_src_zero = '0;
    disp_dst = '0; disp_id = '0;
    for (int k = 0; k < W; k++) disp_op[k] = OP_ADD;
    late_bc_valid = '0; late_bc_tag = '0; free_mask = '0;
    repair = 0; repair_entries = '0; repair_tag_valid = '0; repair_tag = '0;
  endtask

  // slot k: op, src0 (-1 = zero), src1 (-1 = zero), dst (-1 = none), id
  task automatic put(int k, op_e op, int s0, int s1, int dst, int id);
    disp_valid[k] = 1; disp_op[k] = op; disp_id[k] = IDW'(id);
    disp_src_zero[k][0] = (s0 < 0); disp_src[k][0] = (s0 < 0) ? '0 : TW'(s0);
    disp_src_zero[k][1] = (s1 < 0); disp_src[k][1] = (s1 < 0) ? '0 : TW'(s1);
    disp_dst_valid[k] = (dst >= 0); disp_dst[k] = (dst < 0) ? '0 : TW'(dst);
  endtask

  task automatic next();
    @(negedge clk);
    idle_inputs();
  endtask

  function automatic int n_sel();
    return $countones(iss_valid);
  endfunction

  function automatic int slot_of(int id);
    for (int k = 0; k < W; k++) if (iss_valid[k] && iss_id[k] == IDW'(id)) return k;
    return -1;
  endfunction

  int ea, eb, ec, s;
  int seen [int];
  initial begin
    idle_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- 1. wakeup and back-to-back select
    next(); put(0, OP_ADD, -1, -1, 10, 1); put(1, OP_ADD, 10, -1, 11, 2);
    chk(disp_ready, "ready after reset");
    #1 chk(n_sel() == 0, "nothing to select before dispatch");
    next(); #1;
    chk(n_sel() == 1 && slot_of(1) == 0, "producer selected first");
    ea = int'(iss_entry[0]);
    next(); #1;
    s = slot_of(2);
    chk(n_sel() == 1 && s == 0, "dependent selected the next cycle");
    chk(s == 0 && iss_src_byp[0][0] && !iss_src_byp[0][1], "bypass bit set on the woken operand only");
    eb = int'(iss_entry[0]);
    free_mask[ea] = 1;          // producer passes Arbitrate
    next(); free_mask[eb] = 1; #1;
    chk(n_sel() == 0, "issued entries are not selected again");
    next(); next();

    // ---------------- 2. repair after a conflict
    next(); put(0, OP_ADD, -1, -1, 20, 3); put(1, OP_SUB, 20, -1, 21, 4); put(2, OP_OR, -1, -1, 22, 5);
    next(); #1;
    chk(n_sel() == 2 && slot_of(3) >= 0 && slot_of(5) >= 0, "A and C selected");
    ea = int'(iss_entry[slot_of(3)]); ec = int'(iss_entry[slot_of(5)]);
    next(); #1;
    chk(n_sel() == 1 && slot_of(4) == 0 && iss_src_byp[0][0], "B selected back to back (group 2)");
    eb = int'(iss_entry[0]);
    // Arbitrate this cycle: A killed (conflict), C passes
    free_mask[ec] = 1;
    next();
    repair = 1; repair_entries[ea] = 1; repair_tag_valid[0] = 1; repair_tag[0] = TW'(20);
    #1;
    chk(n_sel() == 1 && slot_of(3) == 0, "repair cycle: A reissued two cycles after first issue");
    chk(slot_of(4) < 0, "repair cycle: B not selected (ready cleared)");
    chk(!iss_src_byp[0][0] && !iss_src_byp[0][1], "repair cycle: no bypass bits");
    next(); free_mask[ea] = 1; #1;   // A passes this time
    chk(n_sel() == 1 && slot_of(4) == 0 && iss_src_byp[0][0], "B reissued after A with bypass bit");
    next(); free_mask[eb] = 1; #1;
    chk(n_sel() == 0, "C and A not selected again");
    next(); next();

    // ---------------- 3. late wakeup
    next(); put(0, OP_LATE, -1, -1, 30, 6); put(1, OP_AND, 30, 30, 31, 7);
    for (int i = 0; i < 3; i++) begin next(); #1 chk(n_sel() == 0, "waiting for late value"); end
    next(); late_bc_valid[0] = 1; late_bc_tag[0] = TW'(30); #1;
    chk(n_sel() == 1 && slot_of(7) == 0, "woken by late broadcast");
    chk(!iss_src_byp[0][0] && !iss_src_byp[0][1], "late wakeup sets no bypass bit");
    ea = int'(iss_entry[0]);
    next(); free_mask[ea] = 1;
    next(); next();

    // ---------------- 4. capacity and select width
    next(); put(0, OP_LATE, -1, -1, 40, 8);
    for (int g = 0; g < D / W; g++) begin
      next();
      chk(disp_ready, "room for a group");
      for (int k = 0; k < W; k++) put(k, OP_XOR, 40, -1, 41 + k, 16 + g * W + k);
    end
    next(); #1;
    chk(!disp_ready, "full window refuses dispatch");
    chk(n_sel() == 0, "nothing ready yet");
    late_bc_valid[0] = 1; late_bc_tag[0] = TW'(40);
    for (int c = 0; c < D / W; c++) begin
      #1;
      chk(n_sel() == W, $sformatf("cycle %0d selects %0d", c, n_sel()));
      for (int k = 0; k < W; k++) begin
        chk(!seen.exists(int'(iss_id[k])), "each instruction selected once");
        seen[int'(iss_id[k])] = 1;
      end
      next();
      for (int k = 0; k < W; k++) free_mask[iss_entry[k]] = 1'b1;
    end
    #1 chk(n_sel() == 0 && seen.num() == D, "all 32 issued");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
