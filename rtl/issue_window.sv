// issue_window: instruction window with wakeup/select, conservative bypass
// bits and the repair operation used after a bank conflict.
//
// Each entry holds one renamed instruction: two source registers with a
// ready bit each, a destination register and an issued bit. Every cycle
// (one cycle = the Issue stage):
//   * wakeup: the destination registers of the instructions selected in the
//     previous cycle are broadcast (so a dependent single-cycle instruction
//     can issue back to back), together with the registers granted a late
//     writeback in the previous cycle. A source whose register matches
//     becomes ready.
//   * select: up to ISSUE_W ready, not yet issued entries are picked, lowest
//     index first, and sent to the Arbitrate stage in issue slots 0..n-1.
//   * bypass bit: for each source the OR of this cycle's comparator matches
//     is latched into the issued instruction. It is set only when the operand
//     was woken in the very cycle the instruction is selected, i.e. the value
//     will come from the execute-stage bypass, so the operand need not
//     compete for a register-file read port. Late-writeback broadcasts do not
//     set it (that path is not bypassed from the execute stage).
//   * repair: when the Arbitrate stage found a conflict in the previous
//     cycle, the wakeup broadcast is replaced: the destination registers of
//     the killed instructions are broadcast and clear the ready bits that
//     match, and the issued bits of the killed instructions and of the whole
//     group selected in the previous cycle (which is being killed in
//     Arbitrate now) are reset. Select works on the repaired state in the
//     same cycle, so a killed instruction issues again two cycles after its
//     first issue.
// An entry is freed when its instruction passes arbitration (free_mask).
//
// A per-register scoreboard supplies the ready bits of newly dispatched
// instructions (set by wakeup broadcasts, cleared by repair broadcasts and
// when a register is allocated as a destination), with forwarding of the
// same cycle's broadcasts and of destinations earlier in the same dispatch
// group. Dispatch accepts a whole group of DISP_W slots when at least DISP_W
// entries are free. OP_LATE slots take no entry: they only mark their
// destination not ready until its late writeback is broadcast. The
// scoreboard, the all-or-nothing dispatch, index-order select and the
// window depth are this design's own choices; wakeup, select, the bypass
// bit and the repair follow the speculative control scheme.
module issue_window
  import brf_pkg::*;
#(
  parameter int unsigned DEPTH       = DEF_IQ_DEPTH,
  parameter int unsigned DISP_W      = DEF_ISSUE_W,
  parameter int unsigned ISSUE_W     = DEF_ISSUE_W,
  parameter int unsigned NUM_PREGS   = DEF_NUM_PREGS,
  parameter int unsigned N_LATE      = DEF_N_LATE,
  parameter int unsigned ID_W        = DEF_ID_W,
  parameter bit          BYPASS_SKIP = 1'b1,
  localparam int unsigned TAG_W = idx_w(NUM_PREGS),
  localparam int unsigned E_W   = idx_w(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  // dispatch from rename
  input  logic [DISP_W-1:0]                 disp_valid,
  input  op_e  [DISP_W-1:0]                 disp_op,
  input  logic [DISP_W-1:0][1:0][TAG_W-1:0] disp_src,
  input  logic [DISP_W-1:0][1:0]            disp_src_zero,
  input  logic [DISP_W-1:0]                 disp_dst_valid,
  input  logic [DISP_W-1:0][TAG_W-1:0]      disp_dst,
  input  logic [DISP_W-1:0][ID_W-1:0]       disp_id,
  output logic                              disp_ready,
  // wakeup from late writebacks (no bypass)
  input  logic [N_LATE-1:0]                 late_bc_valid,
  input  logic [N_LATE-1:0][TAG_W-1:0]      late_bc_tag,
  // from the Arbitrate stage
  input  logic [DEPTH-1:0]                  free_mask,
  input  logic                              repair,
  input  logic [DEPTH-1:0]                  repair_entries,
  input  logic [ISSUE_W-1:0]                repair_tag_valid,
  input  logic [ISSUE_W-1:0][TAG_W-1:0]     repair_tag,
  // issued group
  output logic [ISSUE_W-1:0]                iss_valid,
  output logic [ISSUE_W-1:0][E_W-1:0]       iss_entry,
  output op_e  [ISSUE_W-1:0]                iss_op,
  output logic [ISSUE_W-1:0][1:0][TAG_W-1:0] iss_src,
  output logic [ISSUE_W-1:0][1:0]           iss_src_zero,
  output logic [ISSUE_W-1:0][1:0]           iss_src_byp,
  output logic [ISSUE_W-1:0]                iss_dst_valid,
  output logic [ISSUE_W-1:0][TAG_W-1:0]     iss_dst,
  output logic [ISSUE_W-1:0][ID_W-1:0]      iss_id
);
  // entry state
  logic [DEPTH-1:0]                 e_valid, e_issued, e_dst_valid;
  op_e                              e_op      [DEPTH];
  logic [DEPTH-1:0][1:0][TAG_W-1:0] e_src;
  logic [DEPTH-1:0][1:0]            e_src_zero, e_rdy;
  logic [DEPTH-1:0][TAG_W-1:0]      e_dst;
  logic [DEPTH-1:0][ID_W-1:0]       e_id;
  // wakeup broadcast of last cycle's selection
  logic [ISSUE_W-1:0]               bc_valid;
  logic [ISSUE_W-1:0][TAG_W-1:0]    bc_tag;
  logic [DEPTH-1:0]                 last_sel;
  logic [NUM_PREGS-1:0]             sb;

  // per-register wakeup results of this cycle
  logic [NUM_PREGS-1:0] fu_hit, late_hit, clr_hit;
  always_comb begin
    fu_hit = '0; late_hit = '0; clr_hit = '0;
    for (int k = 0; k < ISSUE_W; k++) begin
      if (!repair && bc_valid[k])               fu_hit[bc_tag[k]]      = 1'b1;
      if (repair && repair_tag_valid[k])        clr_hit[repair_tag[k]] = 1'b1;
    end
    for (int k = 0; k < N_LATE; k++)
      if (late_bc_valid[k]) late_hit[late_bc_tag[k]] = 1'b1;
  end

  // wakeup and repair of the entries
  logic [DEPTH-1:0][1:0] rdy_now, byp_now;
  logic [DEPTH-1:0]      issued_now, cand;
  always_comb begin
    for (int e = 0; e < DEPTH; e++) begin
      for (int s = 0; s < 2; s++) begin
        rdy_now[e][s] = e_src_zero[e][s] |
                        ((e_rdy[e][s] | fu_hit[e_src[e][s]] | late_hit[e_src[e][s]])
                         & ~clr_hit[e_src[e][s]]);
        byp_now[e][s] = BYPASS_SKIP & ~e_src_zero[e][s] & fu_hit[e_src[e][s]];
      end
      issued_now[e] = e_issued[e] & ~(repair & (repair_entries[e] | last_sel[e]));
      cand[e]       = e_valid[e] & ~issued_now[e] & rdy_now[e][0] & rdy_now[e][1];
    end
  end

  // select: first ISSUE_W candidates by index
  logic [DEPTH-1:0] sel_mask;
  always_comb begin
    int unsigned n;
    n         = 0;
    sel_mask  = '0;
    iss_valid = '0;
    iss_entry = '0;
    for (int k = 0; k < ISSUE_W; k++) begin
      iss_op[k] = OP_ADD;
    end
    iss_src = '0; iss_src_zero = '0; iss_src_byp = '0;
    iss_dst_valid = '0; iss_dst = '0; iss_id = '0;
    for (int e = 0; e < DEPTH; e++) begin
      if (cand[e] && n < ISSUE_W) begin
        sel_mask[e]      = 1'b1;
        iss_valid[n]     = 1'b1;
        iss_entry[n]     = E_W'(e);
        iss_op[n]        = e_op[e];
        iss_src[n]       = e_src[e];
        iss_src_zero[n]  = e_src_zero[e];
        iss_src_byp[n]   = byp_now[e];
        iss_dst_valid[n] = e_dst_valid[e];
        iss_dst[n]       = e_dst[e];
        iss_id[n]        = e_id[e];
        n++;
      end
    end
  end

  // dispatch: allocate free entries in slot order
  logic [DISP_W-1:0][E_W-1:0] alloc_entry;
  logic [DISP_W-1:0]          alloc_ok;
  logic [DISP_W-1:0][1:0]     disp_rdy;
  logic                       accept;
  always_comb begin
    int unsigned nfree;
    logic [DEPTH-1:0] taken;
    nfree       = 0;
    alloc_entry = '0;
    alloc_ok    = '0;
    for (int e = 0; e < DEPTH; e++) if (!e_valid[e]) nfree++;
    disp_ready = (nfree >= DISP_W);
    accept     = disp_ready;
    taken = '0;
    for (int i = 0; i < DISP_W; i++) begin
      if (disp_valid[i] && disp_op[i] != OP_LATE) begin
        for (int e = 0; e < DEPTH; e++) begin
          if (!alloc_ok[i] && !e_valid[e] && !taken[e]) begin
            alloc_entry[i] = E_W'(e);
            alloc_ok[i]    = 1'b1;
            taken[e]       = 1'b1;
          end
        end
      end
    end
    for (int i = 0; i < DISP_W; i++) begin
      for (int s = 0; s < 2; s++) begin
        disp_rdy[i][s] = disp_src_zero[i][s] |
                         ((sb[disp_src[i][s]] | fu_hit[disp_src[i][s]] | late_hit[disp_src[i][s]])
                          & ~clr_hit[disp_src[i][s]]);
        for (int k = 0; k < i; k++)
          if (disp_valid[k] && disp_dst_valid[k] && disp_dst[k] == disp_src[i][s])
            disp_rdy[i][s] = disp_src_zero[i][s];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid  <= '0;
      e_issued <= '0;
      bc_valid <= '0;
      bc_tag   <= '0;
      last_sel <= '0;
      sb       <= '1;
      e_rdy    <= '0;
    end else begin
      e_valid  <= e_valid & ~free_mask;
      e_issued <= issued_now | sel_mask;
      e_rdy    <= rdy_now;
      last_sel <= sel_mask;
      for (int k = 0; k < ISSUE_W; k++) begin
        bc_valid[k] <= iss_valid[k] & iss_dst_valid[k];
        bc_tag[k]   <= iss_dst[k];
      end
      sb <= (sb | fu_hit | late_hit) & ~clr_hit;
      if (accept) begin
        for (int i = 0; i < DISP_W; i++) begin
          if (disp_valid[i] && disp_dst_valid[i]) sb[disp_dst[i]] <= 1'b0;
          if (alloc_ok[i]) begin
            e_valid[alloc_entry[i]]  <= 1'b1;
            e_issued[alloc_entry[i]] <= 1'b0;
            e_rdy[alloc_entry[i]]    <= disp_rdy[i];
          end
        end
      end
    end
  end

  // entry payload: written on allocation only, read only while the entry is valid
  always_ff @(posedge clk) begin
    if (accept) begin
      for (int i = 0; i < DISP_W; i++) begin
        if (alloc_ok[i]) begin
          e_src[alloc_entry[i]]       <= disp_src[i];
          e_src_zero[alloc_entry[i]]  <= disp_src_zero[i];
          e_dst_valid[alloc_entry[i]] <= disp_dst_valid[i];
          e_dst[alloc_entry[i]]       <= disp_dst[i];
          e_id[alloc_entry[i]]        <= disp_id[i];
          e_op[alloc_entry[i]]        <= disp_op[i];
        end
      end
    end
  end

  a_repair_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    repair |-> (repair_entries & ~e_issued) == '0)
    else $error("issue_window: repair of an entry that was not issued");
endmodule
