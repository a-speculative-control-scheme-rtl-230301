// tb_banked_rf_core_smt: the end-to-end test of tb_banked_rf_core run on
// the eight-issue SMT configuration: 512 physical registers in 16 banks,
// each bank with four local read ports (two left, two right) and two write
// ports, bypass skip and read sharing on ("16B4R2WYY"), a 64-entry window.
// The architectural model has 64 registers, standing for four threads of 16
// registers each (the core sees only physical registers). Same directed
// cycle-count checks and random program as the four-issue test; every
// mechanism must occur at least once.
`timescale 1ns/1ps
module tb_banked_rf_core_smt;
  import brf_pkg::*;

  localparam int unsigned IW = 8;
  localparam int unsigned NP = 512;
  localparam int unsigned NB = 16;
  localparam int unsigned DW = DEF_DATA_W;
  localparam int unsigned NL = DEF_N_LATE;
  localparam int unsigned IDW = DEF_ID_W;
  localparam int unsigned TW = idx_w(NP);
  localparam int unsigned NA = 64;
  localparam int unsigned N_RANDOM = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

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
    .ISSUE_W(IW), .NUM_PREGS(NP), .NUM_BANKS(NB), .RD_PER_SIDE(2), .WR_PER_BANK(2), .IQ_DEPTH(64)
  ) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      if (superseded[p] && readers[p] == 0 && written[p] && cyc > written_at[p] + 1 && !on_free[p]) begin
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
    if (op == OP_LATE) exp_data[id] = DW'($urandom());
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

  int d0, ids[4];
  initial begin
    do_reset();

    // ---- directed 1: latency of one independent instruction
    step();
    check(disp_ready, "window ready after reset");
    ids[0] = next_id;
    add_instr(0, OP_ADD, 1, 2, 1'b1, 3, 0);
    d0 = cyc;
    wait_idle(50);
    check(comp_cyc[ids[0]] - d0 == 5,
          $sformatf("independent latency %0d, expected 5", comp_cyc[ids[0]] - d0));

    // ---- directed 2: dependent chain issues back to back
    step();
    for (int k = 0; k < 4; k++) ids[k] = next_id + k;
    add_instr(0, OP_ADD, 1, 2, 1'b1, 4, 0);
    add_instr(1, OP_ADD, 4, 5, 1'b1, 6, 0);
    add_instr(2, OP_XOR, 6, 4, 1'b1, 7, 0);
    add_instr(3, OP_SUB, 7, 7, 1'b1, 8, 0);
    d0 = cyc;
    wait_idle(50);
    for (int k = 0; k < 4; k++)
      check(comp_cyc[ids[k]] - d0 == 5 + k,
            $sformatf("chain instr %0d latency %0d, expected %0d", k, comp_cyc[ids[k]] - d0, 5 + k));

    // ---- directed 3: write bank conflict, kill and reissue
    do_reset();
    step();
    for (int k = 0; k < 4; k++) ids[k] = next_id + k;
    // destinations all in one bank: rewrite the renamed ones to 16 + NB*k
    add_instr(0, OP_OR, 1, 0, 1'b1, 9, 0);
    add_instr(1, OP_OR, 2, 0, 1'b1, 10, 0);
    add_instr(2, OP_OR, 3, 0, 1'b1, 11, 0);
    add_instr(3, OP_OR, 4, 0, 1'b1, 12, 0);
    for (int k = 0; k < 4; k++) disp_dst[k] = TW'(16 + NB * k);
    d0 = cyc;
    wait_idle(50);
    check(comp_cyc[ids[0]] - d0 == 5 && comp_cyc[ids[1]] - d0 == 5,
          "write conflict: winners complete after 5 cycles");
    check(comp_cyc[ids[2]] - d0 == 7 && comp_cyc[ids[3]] - d0 == 7,
          $sformatf("write conflict: reissued complete after %0d/%0d, expected 7",
                    comp_cyc[ids[2]] - d0, comp_cyc[ids[3]] - d0));

    // ---- directed 4: read sharing of one register on the left side
    do_reset();
    step();
    for (int k = 0; k < 4; k++) ids[k] = next_id + k;
    add_instr(0, OP_ADD, 5, 1, 1'b1, 9, 0);
    add_instr(1, OP_ADD, 5, 2, 1'b1, 10, 0);
    add_instr(2, OP_ADD, 5, 3, 1'b1, 11, 0);
    add_instr(3, OP_ADD, 5, 4, 1'b1, 12, 0);
    d0 = cyc;
    wait_idle(50);
    for (int k = 0; k < 4; k++)
      check(comp_cyc[ids[k]] - d0 == 5, "shared reads complete without conflict");

    // ---- random program
    do_reset();
    // seed the architectural registers through the late-writeback port
    for (int a = 1; a < NA; a += IW) begin
      step();
      for (int k = 0; k < IW && a + k < NA; k++)
        add_instr(k, OP_LATE, 0, 0, 1'b1, a + k, 1 + int'($urandom_range(0, 6)));
    end
    for (int n = 0; n < N_RANDOM; ) begin
      step();
      if (disp_ready) begin
        for (int k = 0; k < IW && n < N_RANDOM; k++) begin
          int sa, sb, da, r;
          if (free_q.size() == 0 || in_flight[next_id]) break;
          r  = int'($urandom_range(0, 99));
          sa = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, NA - 1));
          sb = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, NA - 1));
          da = int'($urandom_range(1, NA - 1));
          if (r < 10)      add_instr(k, OP_LATE, 0, 0, 1'b1, da, int'($urandom_range(2, 15)));
          else if (r < 18) add_instr(k, op_e'($urandom_range(0, 4)), sa, sb, 1'b0, da, 0);
          else             add_instr(k, op_e'($urandom_range(0, 4)), sa, sb, 1'b1, da, 0);
          n++;
        end
      end
    end
    wait_idle(2000);
    // read out every architectural register
    for (int a = 1; a < NA; a += IW) begin
      do step(); while (!disp_ready || free_q.size() < IW);
      for (int k = 0; k < IW && a + k < NA; k++)
        add_instr(k, OP_OR, a + k, 0, 1'b0, 1, 0);
    end
    wait_idle(500);
    for (int i = 0; i < 256; i++) check(!in_flight[i], $sformatf("id %0d never completed", i));

    $display("events: rd_conflict=%0d wr_conflict=%0d repair=%0d kills=%0d bypass_skip=%0d read_share=%0d late=%0d late_refused=%0d completed=%0d cycles=%0d",
             n_rdc, n_wrc, n_rep, n_kill, n_byp, n_share, n_late, n_late_refused, n_done, cyc);
    check(n_rdc > 0, "read bank conflict happened");
    check(n_wrc > 0, "write bank conflict happened");
    check(n_rep > 0, "repair happened");
    check(n_byp > 0, "bypass skip happened");
    check(n_share > 0, "read sharing happened");
    check(n_late > 0, "late writeback happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
