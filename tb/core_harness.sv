// core_harness: testbench harness that runs one banked_rf_core
// configuration on a random program and reports what happened.
//
// The harness plays the rename stage (FIFO free list over the physical
// registers, architectural model of NA registers with r0 = zero) and a
// long-latency unit on the late-writeback port. It checks every result
// against the architectural model, reads every architectural register back
// at the end, and then raises `done` with its counts. It also sums, over
// the cycles, the chance of a read conflict had the same number of read
// requests fallen uniformly at random on the banks (rd_conf_model), so that
// the observed conflicts can be compared with that model. The program comes from
// a private xorshift generator seeded with SEED and advanced once per
// generated instruction, so harnesses with different parameters run the
// same instruction sequence and their cycle counts can be compared.
`timescale 1ns/1ps
module core_harness
  import brf_pkg::*;
#(
  parameter int unsigned IW = 4,
  parameter int unsigned NP = 64,
  parameter int unsigned NB = 8,
  parameter int unsigned RDS = 1,
  parameter int unsigned WRB = 2,
  parameter int unsigned IQ = 32,
  parameter bit          BYP = 1'b1,
  parameter bit          SHR = 1'b1,
  parameter int unsigned WB = 1,
  parameter int unsigned NA = 16,
  parameter int unsigned N_RANDOM = 3000,
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   completed,
  output int   repairs,
  output int   rd_conflicts,
  output int   wr_conflicts,
  output int   byp_skips,
  output int   rd_shares,
  output real  rd_conf_model
);
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned NL = DEF_N_LATE;
  localparam int unsigned IDW = DEF_ID_W;
  localparam int unsigned TW = idx_w(NP);

  logic rst_n = 1'b0;

  logic [IW-1:0]               disp_valid;
  op_e  [IW-1:0]               disp_op;
  logic [IW-1:0][1:0][TW-1:0]  disp_src;
  logic [IW-1:0][1:0]          disp_src_zero;
  logic [IW-1:0]               disp_dst_valid;
  logic [IW-1:0][TW-1:0]       disp_dst;
  logic [IW-1:0][IDW-1:0]      disp_id;
  logic                        disp_ready;
  logic [NL-1:0]               late_valid, late_gnt;
  logic [NL-1:0][TW-1:0]       late_tag;
  logic [NL-1:0][DW-1:0]       late_data;
  logic [IW-1:0]               cmp_valid, cmp_dst_valid;
  logic [IW-1:0][IDW-1:0]      cmp_id;
  logic [IW-1:0][TW-1:0]       cmp_dst;
  logic [IW-1:0][DW-1:0]       cmp_data;
  logic                        ev_rd_conflict, ev_wr_conflict, ev_repair;
  logic [IW-1:0]               ev_kill;
  logic [IW-1:0][1:0]          ev_byp_skip, ev_rd_share;

  banked_rf_core #(
    .ISSUE_W(IW), .NUM_PREGS(NP), .NUM_BANKS(NB), .RD_PER_SIDE(RDS), .WR_PER_BANK(WRB),
    .IQ_DEPTH(IQ), .BYPASS_SKIP(BYP), .READ_SHARING(SHR), .WB_STAGES(WB)
  ) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // event counters
  int n_rdc = 0, n_wrc = 0, n_rep = 0, n_kill = 0, n_byp = 0, n_share = 0;
  int n_late = 0, n_late_refused = 0;
  always @(posedge clk) if (rst_n) begin
    n_rdc  += int'(ev_rd_conflict);
    n_wrc  += int'(ev_wr_conflict);
    n_rep  += int'(ev_repair);
    n_kill += $countones(ev_kill);
    n_byp  += $countones(ev_byp_skip);
    n_share += $countones(ev_rd_share);
    for (int l = 0; l < NL; l++) begin
      n_late         += int'(late_valid[l] & late_gnt[l]);
      n_late_refused += int'(late_valid[l] & ~late_gnt[l]);
    end
  end

  // Read conflicts expected if the same number of read requests per side
  // fell uniformly at random on the banks: the port conflict probability
  // for A accesses to NB banks of RDS ports, A! [x^A] (sum_{k<=RDS} x^k/k!)^NB
  // / NB^A being the chance of no conflict. Summed over the cycles with
  // 1 - (1 - p_left)(1 - p_right), it is the number of conflict cycles that
  // uniformly random accesses would give.
  function automatic real pcp(int a);
    real poly [IW + 1], acc [IW + 1], nxt [IW + 1];
    real fact, total;
    for (int i = 0; i <= IW; i++) begin poly[i] = 0.0; acc[i] = 0.0; end
    fact = 1.0;
    for (int k = 0; k <= RDS && k <= IW; k++) begin
      if (k > 0) fact = fact * k;
      poly[k] = 1.0 / fact;
    end
    acc[0] = 1.0;
    for (int j = 0; j < NB; j++) begin
      for (int i = 0; i <= IW; i++) begin
        nxt[i] = 0.0;
        for (int k = 0; k <= i; k++) nxt[i] += acc[i - k] * poly[k];
      end
      acc = nxt;
    end
    fact  = 1.0;
    total = 1.0;
    for (int k = 1; k <= a; k++) begin fact = fact * k; total = total * NB; end
    return 1.0 - fact * acc[a] / total;
  endfunction

  real pcp_tab [IW + 1];
  real model_sum = 0.0;
  initial for (int a = 0; a <= IW; a++) pcp_tab[a] = pcp(a);
  always @(posedge clk) if (rst_n)
    model_sum += 1.0 - (1.0 - pcp_tab[$countones(dut.lreq)]) * (1.0 - pcp_tab[$countones(dut.rreq)]);

  // ---------------------------------------------------------- model state
  logic [DW-1:0] exp_data [256];
  bit            in_flight [256];
  int            comp_cyc [256];
  int            rd_preg [256][2];
  int            wr_preg [256];
  int            readers [NP];
  bit            superseded [NP];
  bit            written [NP];
  int            written_at [NP];
  bit            on_free [NP];
  int            free_q [$];
  int            amap [NA];
  logic [DW-1:0] aval [NA];
  int            next_id = 0;
  int            n_done = 0;

  typedef struct { int tag; logic [DW-1:0] data; int due; } late_item_t;
  late_item_t late_q [$];
  bit late_presented = 0;

  // private generator, advanced only per generated instruction, so that every
  // configuration runs the same program whatever its timing
  logic [31:0] rng = SEED;
  function automatic int unsigned rnd(int unsigned lo, int unsigned hi);
    rng = rng ^ (rng << 13);
    rng = rng ^ (rng >> 17);
    rng = rng ^ (rng << 5);
    return lo + (rng % (hi - lo + 1));
  endfunction

  function automatic logic [DW-1:0] alu_ref(op_e op, logic [DW-1:0] a, logic [DW-1:0] b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      default: return '0;
    endcase
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // completions, seen at the falling edge
  task automatic monitor();
    for (int k = 0; k < IW; k++) begin
      if (cmp_valid[k]) begin
        int id;
        id = int'(cmp_id[k]);
        check(in_flight[id], $sformatf("completion of id %0d not in flight", id));
        check(cmp_data[k] == exp_data[id],
              $sformatf("id %0d result %h expected %h", id, cmp_data[k], exp_data[id]));
        in_flight[id] = 0;
        comp_cyc[id]  = cyc;
        n_done++;
        for (int s = 0; s < 2; s++) if (rd_preg[id][s] >= 0) readers[rd_preg[id][s]]--;
        if (wr_preg[id] >= 0) begin
          written[wr_preg[id]]    = 1;
          written_at[wr_preg[id]] = cyc;
        end
      end
    end
  endtask

  task automatic release_pregs();
    for (int p = 1; p < NP; p++)
      if (superseded[p] && readers[p] == 0 && written[p] && cyc > written_at[p] + WB && !on_free[p]) begin
        free_q.push_back(p);
        on_free[p]    = 1;
        superseded[p] = 0;
      end
  endtask

  // late unit: present the oldest due item; pop it once granted
  task automatic drive_late();
    if (late_presented && late_gnt[0]) begin
      late_item_t it;
      it = late_q.pop_front();
      written[it.tag]    = 1;
      written_at[it.tag] = cyc + 4;
    end
    late_valid = '0;
    late_presented = 0;
    if (late_q.size() > 0 && late_q[0].due <= cyc) begin
      late_valid[0]  = 1'b1;
      late_tag[0]    = TW'(late_q[0].tag);
      late_data[0]   = late_q[0].data;
      late_presented = 1;
    end
  endtask

  task automatic clear_disp();
    disp_valid = '0; disp_dst_valid = '0; disp_src_zero = '0;
    disp_src = '0; disp_dst = '0; disp_id = '0;
    for (int k = 0; k < IW; k++) disp_op[k] = OP_ADD;
  endtask

  // put one renamed instruction into dispatch slot k (architectural view)
  task automatic add_instr(int k, op_e op, int sa, int sb, bit has_dst, int da, int late_delay);
    int id, p;
    int srcs[2];
    id = next_id;
    next_id = (next_id + 1) % 256;
    srcs[0] = sa; srcs[1] = sb;
    disp_valid[k] = 1'b1;
    disp_op[k]    = op;
    disp_id[k]    = IDW'(id);
    for (int s = 0; s < 2; s++) begin
      rd_preg[id][s] = -1;
      disp_src_zero[k][s] = (op == OP_LATE) || (srcs[s] == 0);
      disp_src[k][s] = (srcs[s] == 0) ? '0 : TW'(amap[srcs[s]]);
      if (op != OP_LATE && srcs[s] != 0) begin
        rd_preg[id][s] = amap[srcs[s]];
        readers[amap[srcs[s]]]++;
      end
    end
    if (op == OP_LATE) exp_data[id] = DW'(rnd(0, 32'h7fffffff));
    else exp_data[id] = alu_ref(op, sa == 0 ? '0 : aval[sa], sb == 0 ? '0 : aval[sb]);
    wr_preg[id] = -1;
    disp_dst_valid[k] = has_dst;
    if (has_dst) begin
      p = free_q.pop_front();
      on_free[p]            = 0;
      written[p]            = 0;
      superseded[amap[da]]  = 1;
      amap[da]              = p;
      aval[da]              = exp_data[id];
      disp_dst[k]           = TW'(p);
      wr_preg[id]           = p;
    end
    if (op == OP_LATE) begin
      late_item_t it;
      it.tag = p; it.data = exp_data[id]; it.due = cyc + late_delay;
      late_q.push_back(it);
      wr_preg[id] = -1;      // completes through the late port, not cmp_*
    end else begin
      in_flight[id] = 1;
    end
  endtask

  task automatic reset_model();
    free_q.delete();
    late_q.delete();
    late_presented = 0;
    for (int p = 0; p < NP; p++) begin
      readers[p] = 0; superseded[p] = 0; written[p] = 1; written_at[p] = 0; on_free[p] = 0;
    end
    for (int a = 0; a < NA; a++) begin amap[a] = a; aval[a] = '0; end
    for (int p = NA; p < NP; p++) begin free_q.push_back(p); on_free[p] = 1; end
    for (int i = 0; i < 256; i++) in_flight[i] = 0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    clear_disp();
    late_valid = '0; late_tag = '0; late_data = '0;
    reset_model();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  // one dispatch at the next falling edge; returns its cycle
  task automatic step();
    @(negedge clk);
    monitor();
    release_pregs();
    drive_late();
    clear_disp();
  endtask

  task automatic wait_idle(int max_cycles);
    int n;
    n = 0;
    while (n < max_cycles) begin
      bit busy;
      step();
      busy = late_q.size() > 0;
      for (int i = 0; i < 256; i++) busy |= in_flight[i];
      if (!busy) break;
      n++;
    end
  endtask

  // force physical destination registers for the directed tests
  task automatic force_dst(int k, int p);
    disp_dst[k] = TW'(p);
    wr_preg[int'(disp_id[k])] = -1;
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    do_reset();
    // seed the architectural registers through the late-writeback port
    for (int a = 1; a < NA; a += IW) begin
      step();
      for (int k = 0; k < IW && a + k < NA; k++)
        add_instr(k, OP_LATE, 0, 0, 1'b1, a + k, 1 + int'(rnd(0, 6)));
    end
    for (int n = 0; n < N_RANDOM; ) begin
      step();
      if (disp_ready) begin
        for (int k = 0; k < IW && n < N_RANDOM; k++) begin
          int sa, sb, da, r;
          if (free_q.size() == 0 || in_flight[next_id]) break;
          r  = int'(rnd(0, 99));
          sa = (rnd(0, 2) == 0) ? int'(rnd(0, 3)) : int'(rnd(0, NA - 1));
          sb = (rnd(0, 2) == 0) ? int'(rnd(0, 3)) : int'(rnd(0, NA - 1));
          da = int'(rnd(1, NA - 1));
          if (r < 10)      add_instr(k, OP_LATE, 0, 0, 1'b1, da, int'(rnd(2, 15)));
          else if (r < 18) add_instr(k, op_e'(rnd(0, 4)), sa, sb, 1'b0, da, 0);
          else             add_instr(k, op_e'(rnd(0, 4)), sa, sb, 1'b1, da, 0);
          n++;
        end
      end
    end
    wait_idle(2000);
    for (int a = 1; a < NA; a += IW) begin
      do step(); while (!disp_ready || free_q.size() < IW);
      for (int k = 0; k < IW && a + k < NA; k++)
        add_instr(k, OP_OR, a + k, 0, 1'b0, 1, 0);
    end
    wait_idle(500);
    for (int i = 0; i < 256; i++) check(!in_flight[i], $sformatf("id %0d never completed", i));
    cycles = cyc; completed = n_done; repairs = n_rep; rd_conflicts = n_rdc;
    wr_conflicts = n_wrc; byp_skips = n_byp; rd_shares = n_share; rd_conf_model = model_sum;
    done = 1'b1;
  end
endmodule
