// banked_rf_core: issue, arbitration, banked register file, bypass and
// execution of a superscalar core with a speculatively controlled banked
// register file.
//
// Pipeline (one stage per cycle, after rename):
//   Issue      issue_window: wakeup + select of up to ISSUE_W instructions.
//              Selection does not look at register banks at all.
//   Arbitrate  three bank_port_arbiter instances grant the bank-local left
//              read, right read and write ports to the issued group. Late
//              (long-latency) writeback requests compete for the write ports
//              with priority over the group. An operand does not request a
//              read port if it is the zero register or if its bypass bit is
//              set (BYPASS_SKIP); reads of the same register on the same side
//              share one port (READ_SHARING). An instruction refused any port
//              is killed; the others free their window entry and proceed. If
//              any instruction was killed, the next cycle repairs the window
//              (see issue_window) and the group arriving in Arbitrate then
//              (issued in parallel with the conflict detection) is killed as
//              a whole. Nothing stalls: the issue width is simply lost.
//   Read/Bypass the winning addresses, registered, drive the bank decoders;
//              the read crossbar routes local ports to each unit's left and
//              right global bus; bypass_mux picks zero, the execute-stage
//              result (value of the immediately preceding cycle), a
//              writeback-stage result or the register-file value.
//   Execute    one int_alu per issue slot.
//   Writeback  WB_STAGES stages (1 by default). Results are reported on the
//              cmp_* outputs in the first and written to the bank write
//              ports granted in Arbitrate in the last; every writeback stage
//              feeds the bypass mux, so a value is never missed while its
//              write is still on the way. Only the execute-stage bypass lets
//              an operand skip the read ports: operands found in a later
//              stage still compete for a port (the bypass bit stays
//              conservative). Late results granted in Arbitrate travel down
//              the same stages and are written in the same cycle as the
//              group they were granted with; their register is broadcast to
//              the window one cycle after the grant.
// Timing: an instruction dispatched in cycle d is selected in d+1 at the
// earliest and reported on cmp_* in d+5; a dependent single-cycle
// instruction can be selected in the cycle after its producer; an
// instruction killed by a conflict is selected again two cycles after its
// first selection. late_gnt is combinational on late_valid/late_tag: a
// refused late request must be held.
//
// Follows the published scheme: the split left/right local read ports, the extra
// Arbitrate stage with kill-and-reissue repair, late writebacks with
// priority, the conservative bypass bit, read sharing and the zero input.
// This design's own choices: fixed slot-order port priority, the number of
// late-writeback ports, the default of one writeback stage (the pipeline
// of the scheme shows one; its bypass-skip example shows two, available as
// WB_STAGES = 2), the window depth and the ev_* event outputs.
module banked_rf_core
  import brf_pkg::*;
#(
  parameter int unsigned ISSUE_W      = DEF_ISSUE_W,
  parameter int unsigned NUM_PREGS    = DEF_NUM_PREGS,
  parameter int unsigned NUM_BANKS    = DEF_NUM_BANKS,
  parameter int unsigned RD_PER_SIDE  = DEF_RD_PER_SIDE,
  parameter int unsigned WR_PER_BANK  = DEF_WR_PER_BANK,
  parameter int unsigned DATA_W       = DEF_DATA_W,
  parameter int unsigned IQ_DEPTH     = DEF_IQ_DEPTH,
  parameter int unsigned N_LATE       = DEF_N_LATE,
  parameter int unsigned ID_W         = DEF_ID_W,
  parameter bit          BYPASS_SKIP  = 1'b1,
  parameter bit          READ_SHARING = 1'b1,
  parameter int unsigned WB_STAGES    = 1,
  localparam int unsigned TAG_W = idx_w(NUM_PREGS)
) (
  input  logic clk,
  input  logic rst_n,
  // dispatch from rename (renamed physical registers)
  input  logic [ISSUE_W-1:0]                 disp_valid,
  input  op_e  [ISSUE_W-1:0]                 disp_op,
  input  logic [ISSUE_W-1:0][1:0][TAG_W-1:0] disp_src,
  input  logic [ISSUE_W-1:0][1:0]            disp_src_zero,
  input  logic [ISSUE_W-1:0]                 disp_dst_valid,
  input  logic [ISSUE_W-1:0][TAG_W-1:0]      disp_dst,
  input  logic [ISSUE_W-1:0][ID_W-1:0]       disp_id,
  output logic                               disp_ready,
  // late writeback requests from long-latency units
  input  logic [N_LATE-1:0]                  late_valid,
  input  logic [N_LATE-1:0][TAG_W-1:0]       late_tag,
  input  logic [N_LATE-1:0][DATA_W-1:0]      late_data,
  output logic [N_LATE-1:0]                  late_gnt,
  // completed instructions (Writeback stage)
  output logic [ISSUE_W-1:0]                 cmp_valid,
  output logic [ISSUE_W-1:0][ID_W-1:0]       cmp_id,
  output logic [ISSUE_W-1:0]                 cmp_dst_valid,
  output logic [ISSUE_W-1:0][TAG_W-1:0]      cmp_dst,
  output logic [ISSUE_W-1:0][DATA_W-1:0]     cmp_data,
  // events of the Arbitrate stage
  output logic                               ev_rd_conflict,
  output logic                               ev_wr_conflict,
  output logic                               ev_repair,
  output logic [ISSUE_W-1:0]                 ev_kill,
  output logic [ISSUE_W-1:0][1:0]            ev_byp_skip,
  output logic [ISSUE_W-1:0][1:0]            ev_rd_share
);
  localparam int unsigned E_W    = idx_w(IQ_DEPTH);
  localparam int unsigned ROWS   = NUM_PREGS / NUM_BANKS;
  localparam int unsigned ROW_W  = idx_w(ROWS);
  localparam int unsigned BANK_W = idx_w(NUM_BANKS);
  localparam int unsigned RP_W   = idx_w(RD_PER_SIDE);
  localparam int unsigned N_GW   = N_LATE + ISSUE_W;
  localparam int unsigned GW_W   = idx_w(N_GW);
  localparam int unsigned N_SRC  = (WB_STAGES + 1) * (ISSUE_W + N_LATE);

  typedef struct packed {
    logic                  valid;
    logic [E_W-1:0]        entry;
    op_e                   op;
    logic [1:0][TAG_W-1:0] src;
    logic [1:0]            src_zero;
    logic [1:0]            src_byp;
    logic                  dst_valid;
    logic [TAG_W-1:0]      dst;
    logic [ID_W-1:0]       id;
  } uop_t;

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] data;
  } late_t;

  typedef struct packed {
    logic [NUM_BANKS-1:0][WR_PER_BANK-1:0]            en;
    logic [NUM_BANKS-1:0][WR_PER_BANK-1:0][ROW_W-1:0] row;
    logic [NUM_BANKS-1:0][WR_PER_BANK-1:0][GW_W-1:0]  src;
  } wcfg_t;

  // ------------------------------------------------------------------ Issue
  logic [ISSUE_W-1:0]                  iss_valid, iss_dst_valid;
  logic [ISSUE_W-1:0][E_W-1:0]         iss_entry;
  op_e  [ISSUE_W-1:0]                  iss_op;
  logic [ISSUE_W-1:0][1:0][TAG_W-1:0]  iss_src;
  logic [ISSUE_W-1:0][1:0]             iss_src_zero, iss_src_byp;
  logic [ISSUE_W-1:0][TAG_W-1:0]       iss_dst;
  logic [ISSUE_W-1:0][ID_W-1:0]        iss_id;

  logic [IQ_DEPTH-1:0]                 free_mask;
  logic                                repair_q;
  logic [IQ_DEPTH-1:0]                 repair_entries_q;
  logic [ISSUE_W-1:0]                  repair_tag_valid_q;
  logic [ISSUE_W-1:0][TAG_W-1:0]       repair_tag_q;
  late_t [N_LATE-1:0]                  r_late, e_late;
  late_t [WB_STAGES-1:0][N_LATE-1:0]   w_late;
  logic [N_LATE-1:0]                   late_bc_valid;
  logic [N_LATE-1:0][TAG_W-1:0]        late_bc_tag;

  always_comb begin
    for (int l = 0; l < N_LATE; l++) begin
      late_bc_valid[l] = r_late[l].valid;
      late_bc_tag[l]   = r_late[l].tag;
    end
  end

  issue_window #(
    .DEPTH(IQ_DEPTH), .DISP_W(ISSUE_W), .ISSUE_W(ISSUE_W), .NUM_PREGS(NUM_PREGS),
    .N_LATE(N_LATE), .ID_W(ID_W), .BYPASS_SKIP(BYPASS_SKIP)
  ) u_iq (
    .clk, .rst_n,
    .disp_valid, .disp_op, .disp_src, .disp_src_zero, .disp_dst_valid, .disp_dst,
    .disp_id, .disp_ready,
    .late_bc_valid, .late_bc_tag,
    .free_mask,
    .repair(repair_q), .repair_entries(repair_entries_q),
    .repair_tag_valid(repair_tag_valid_q), .repair_tag(repair_tag_q),
    .iss_valid, .iss_entry, .iss_op, .iss_src, .iss_src_zero, .iss_src_byp,
    .iss_dst_valid, .iss_dst, .iss_id
  );

  // -------------------------------------------------------------- Arbitrate
  uop_t [ISSUE_W-1:0] a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
    end else begin
      for (int k = 0; k < ISSUE_W; k++) begin
        a_q[k].valid     <= iss_valid[k];
        a_q[k].entry     <= iss_entry[k];
        a_q[k].op        <= iss_op[k];
        a_q[k].src       <= iss_src[k];
        a_q[k].src_zero  <= iss_src_zero[k];
        a_q[k].src_byp   <= iss_src_byp[k];
        a_q[k].dst_valid <= iss_dst_valid[k];
        a_q[k].dst       <= iss_dst[k];
        a_q[k].id        <= iss_id[k];
      end
    end
  end

  // the group in Arbitrate during a repair cycle was issued in parallel with
  // the conflict detection and is killed as a whole
  logic [ISSUE_W-1:0] a_live, lreq, rreq, kill, pass;
  logic [ISSUE_W-1:0][TAG_W-1:0] ltag, rtag;
  logic [N_GW-1:0]               wreq;
  logic [N_GW-1:0][TAG_W-1:0]    wtag;

  always_comb begin
    for (int k = 0; k < ISSUE_W; k++) begin
      a_live[k] = a_q[k].valid & ~repair_q;
      lreq[k]   = a_live[k] & ~a_q[k].src_zero[0] & ~(BYPASS_SKIP & a_q[k].src_byp[0]);
      rreq[k]   = a_live[k] & ~a_q[k].src_zero[1] & ~(BYPASS_SKIP & a_q[k].src_byp[1]);
      ltag[k]   = a_q[k].src[0];
      rtag[k]   = a_q[k].src[1];
      wreq[N_LATE+k] = a_live[k] & a_q[k].dst_valid;
      wtag[N_LATE+k] = a_q[k].dst;
    end
    for (int l = 0; l < N_LATE; l++) begin
      wreq[l] = late_valid[l];
      wtag[l] = late_tag[l];
    end
  end

  logic [ISSUE_W-1:0]                              lgnt, rgnt, lshared, rshared;
  logic [ISSUE_W-1:0][BANK_W-1:0]                  lbank, rbank;
  logic [ISSUE_W-1:0][RP_W-1:0]                    lport, rport;
  logic                                            lconf, rconf;
  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0]           bl_en_d, br_en_d;
  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0][ROW_W-1:0] bl_row_d, br_row_d;
  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0][idx_w(ISSUE_W)-1:0] bl_src_unused, br_src_unused;
  logic [N_GW-1:0]                                 wgnt, wshared_unused;
  logic [N_GW-1:0][BANK_W-1:0]                     wbank_unused;
  logic [N_GW-1:0][idx_w(WR_PER_BANK)-1:0]         wport_unused;
  logic [NUM_BANKS-1:0][WR_PER_BANK-1:0]           bw_en_arb;
  logic [NUM_BANKS-1:0][WR_PER_BANK-1:0][ROW_W-1:0] bw_row_arb;
  logic [NUM_BANKS-1:0][WR_PER_BANK-1:0][GW_W-1:0] bw_src_arb;

  bank_port_arbiter #(
    .N_REQ(ISSUE_W), .NUM_PREGS(NUM_PREGS), .NUM_BANKS(NUM_BANKS),
    .PORTS(RD_PER_SIDE), .SHARING(READ_SHARING)
  ) u_arb_left (
    .req(lreq), .tag(ltag), .gnt(lgnt), .bank(lbank), .port(lport), .shared(lshared),
    .conflict(lconf), .bank_en(bl_en_d), .bank_row(bl_row_d), .bank_src(bl_src_unused)
  );

  bank_port_arbiter #(
    .N_REQ(ISSUE_W), .NUM_PREGS(NUM_PREGS), .NUM_BANKS(NUM_BANKS),
    .PORTS(RD_PER_SIDE), .SHARING(READ_SHARING)
  ) u_arb_right (
    .req(rreq), .tag(rtag), .gnt(rgnt), .bank(rbank), .port(rport), .shared(rshared),
    .conflict(rconf), .bank_en(br_en_d), .bank_row(br_row_d), .bank_src(br_src_unused)
  );

  bank_port_arbiter #(
    .N_REQ(N_GW), .NUM_PREGS(NUM_PREGS), .NUM_BANKS(NUM_BANKS),
    .PORTS(WR_PER_BANK), .SHARING(1'b0)
  ) u_arb_write (
    .req(wreq), .tag(wtag), .gnt(wgnt), .bank(wbank_unused), .port(wport_unused),
    .shared(wshared_unused), .conflict(),
    .bank_en(bw_en_arb), .bank_row(bw_row_arb), .bank_src(bw_src_arb)
  );

  logic [ISSUE_W-1:0] wkill;
  wcfg_t              wcfg_d;
  always_comb begin
    for (int k = 0; k < ISSUE_W; k++) begin
      wkill[k] = wreq[N_LATE+k] & ~wgnt[N_LATE+k];
      kill[k]  = a_live[k] & ((lreq[k] & ~lgnt[k]) | (rreq[k] & ~rgnt[k]) | wkill[k]);
      pass[k]  = a_live[k] & ~kill[k];
    end
    free_mask = '0;
    for (int k = 0; k < ISSUE_W; k++)
      if (pass[k]) free_mask[a_q[k].entry] = 1'b1;
    // a write port granted to an instruction that is killed stays unused
    wcfg_d.row = bw_row_arb;
    wcfg_d.src = bw_src_arb;
    for (int b = 0; b < NUM_BANKS; b++)
      for (int p = 0; p < WR_PER_BANK; p++)
        wcfg_d.en[b][p] = bw_en_arb[b][p] &
                          ((int'(bw_src_arb[b][p]) < N_LATE) ||
                           pass[int'(bw_src_arb[b][p]) - N_LATE]);
    late_gnt = wgnt[N_LATE-1:0];
  end

  assign ev_rd_conflict = lconf | rconf;
  assign ev_wr_conflict = |(a_live & wkill);
  assign ev_repair      = repair_q;
  assign ev_kill        = kill;
  always_comb begin
    for (int k = 0; k < ISSUE_W; k++) begin
      for (int s = 0; s < 2; s++)
        ev_byp_skip[k][s] = a_live[k] & BYPASS_SKIP & a_q[k].src_byp[s] & ~a_q[k].src_zero[s];
      ev_rd_share[k][0] = lreq[k] & lshared[k];
      ev_rd_share[k][1] = rreq[k] & rshared[k];
    end
  end

  // repair state for the next cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      repair_q           <= 1'b0;
      repair_entries_q   <= '0;
      repair_tag_valid_q <= '0;
      repair_tag_q       <= '0;
    end else begin
      repair_q         <= |kill;
      repair_entries_q <= '0;
      for (int k = 0; k < ISSUE_W; k++) begin
        if (kill[k]) repair_entries_q[a_q[k].entry] <= 1'b1;
        repair_tag_valid_q[k] <= kill[k] & a_q[k].dst_valid;
        repair_tag_q[k]       <= a_q[k].dst;
      end
    end
  end

  // ------------------------------------------------------------ Read/Bypass
  uop_t  [ISSUE_W-1:0]                              r_q;
  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0]            r_bl_en, r_br_en;
  logic [NUM_BANKS-1:0][RD_PER_SIDE-1:0][ROW_W-1:0] r_bl_row, r_br_row;
  logic [ISSUE_W-1:0][BANK_W-1:0]                   r_gl_bank, r_gr_bank;
  logic [ISSUE_W-1:0][RP_W-1:0]                     r_gl_port, r_gr_port;
  wcfg_t                                            r_wcfg, e_wcfg;
  wcfg_t [WB_STAGES-1:0]                            w_wcfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q <= '0; r_late <= '0; r_wcfg <= '0;
      r_bl_en <= '0; r_br_en <= '0; r_bl_row <= '0; r_br_row <= '0;
      r_gl_bank <= '0; r_gr_bank <= '0; r_gl_port <= '0; r_gr_port <= '0;
    end else begin
      for (int k = 0; k < ISSUE_W; k++) begin
        r_q[k]       <= a_q[k];
        r_q[k].valid <= pass[k];
      end
      for (int l = 0; l < N_LATE; l++) begin
        r_late[l].valid <= late_valid[l] & wgnt[l];
        r_late[l].tag   <= late_tag[l];
        r_late[l].data  <= late_data[l];
      end
      r_wcfg    <= wcfg_d;
      r_bl_en   <= bl_en_d;  r_bl_row  <= bl_row_d;
      r_br_en   <= br_en_d;  r_br_row  <= br_row_d;
      r_gl_bank <= lbank;    r_gl_port <= lport;
      r_gr_bank <= rbank;    r_gr_port <= rport;
    end
  end

  uop_t  [ISSUE_W-1:0]                            e_q;
  uop_t  [WB_STAGES-1:0][ISSUE_W-1:0]             w_q;
  logic  [ISSUE_W-1:0][DATA_W-1:0]                e_a, e_b, alu_y;
  logic  [WB_STAGES-1:0][ISSUE_W-1:0][DATA_W-1:0] w_data;
  logic  [ISSUE_W-1:0][DATA_W-1:0] gl_data, gr_data;
  logic  [N_GW-1:0][DATA_W-1:0]    gw_data;

  banked_regfile #(
    .NUM_PREGS(NUM_PREGS), .NUM_BANKS(NUM_BANKS), .DATA_W(DATA_W),
    .RD_PER_SIDE(RD_PER_SIDE), .WR_PER_BANK(WR_PER_BANK), .N_GR(ISSUE_W), .N_GW(N_GW)
  ) u_rf (
    .clk, .rst_n,
    .bl_en(r_bl_en), .bl_row(r_bl_row), .br_en(r_br_en), .br_row(r_br_row),
    .gl_bank(r_gl_bank), .gl_port(r_gl_port), .gr_bank(r_gr_bank), .gr_port(r_gr_port),
    .gl_data, .gr_data,
    .bw_en(w_wcfg[WB_STAGES-1].en), .bw_row(w_wcfg[WB_STAGES-1].row), .bw_src(w_wcfg[WB_STAGES-1].src), .gw_data
  );

  // bypass sources in priority order: execute stage, then the writeback
  // stages from the first to the last; in each stage the issue slots, then
  // the late results
  localparam int unsigned N_STG = ISSUE_W + N_LATE;
  logic [N_SRC-1:0]              bp_valid;
  logic [N_SRC-1:0][TAG_W-1:0]   bp_tag;
  logic [N_SRC-1:0][DATA_W-1:0]  bp_data;
  always_comb begin
    for (int k = 0; k < ISSUE_W; k++) begin
      bp_valid[k] = e_q[k].valid & e_q[k].dst_valid;
      bp_tag[k]   = e_q[k].dst;
      bp_data[k]  = alu_y[k];
    end
    for (int l = 0; l < N_LATE; l++) begin
      bp_valid[ISSUE_W+l] = e_late[l].valid;
      bp_tag[ISSUE_W+l]   = e_late[l].tag;
      bp_data[ISSUE_W+l]  = e_late[l].data;
    end
    for (int s = 0; s < WB_STAGES; s++) begin
      for (int k = 0; k < ISSUE_W; k++) begin
        bp_valid[(s+1)*N_STG+k] = w_q[s][k].valid & w_q[s][k].dst_valid;
        bp_tag[(s+1)*N_STG+k]   = w_q[s][k].dst;
        bp_data[(s+1)*N_STG+k]  = w_data[s][k];
      end
      for (int l = 0; l < N_LATE; l++) begin
        bp_valid[(s+1)*N_STG+ISSUE_W+l] = w_late[s][l].valid;
        bp_tag[(s+1)*N_STG+ISSUE_W+l]   = w_late[s][l].tag;
        bp_data[(s+1)*N_STG+ISSUE_W+l]  = w_late[s][l].data;
      end
    end
  end

  logic [ISSUE_W-1:0][1:0][DATA_W-1:0] opnd;
  logic [ISSUE_W-1:0][1:0][N_SRC-1:0]  opnd_src;

  for (genvar k = 0; k < ISSUE_W; k++) begin : g_slot
    bypass_mux #(.DATA_W(DATA_W), .TAG_W(TAG_W), .N_SRC(N_SRC)) u_bp_left (
      .is_zero(r_q[k].src_zero[0]), .tag(r_q[k].src[0]), .rf_data(gl_data[k]),
      .src_valid(bp_valid), .src_tag(bp_tag), .src_data(bp_data),
      .y(opnd[k][0]), .hit(), .hit_src(opnd_src[k][0])
    );
    bypass_mux #(.DATA_W(DATA_W), .TAG_W(TAG_W), .N_SRC(N_SRC)) u_bp_right (
      .is_zero(r_q[k].src_zero[1]), .tag(r_q[k].src[1]), .rf_data(gr_data[k]),
      .src_valid(bp_valid), .src_tag(bp_tag), .src_data(bp_data),
      .y(opnd[k][1]), .hit(), .hit_src(opnd_src[k][1])
    );
    int_alu #(.DATA_W(DATA_W)) u_alu (.op(e_q[k].op), .a(e_a[k]), .b(e_b[k]), .y(alu_y[k]));

    // the bypass bit is conservative: an operand that skipped the read
    // ports always finds its value on the execute-stage bypass
    for (genvar s = 0; s < 2; s++) begin : g_opnd
      a_byp_correct: assert property (@(posedge clk) disable iff (!rst_n)
        (r_q[k].valid && BYPASS_SKIP && r_q[k].src_byp[s] && !r_q[k].src_zero[s])
          |-> (opnd_src[k][s][ISSUE_W-1:0] != '0))
        else $error("banked_rf_core: bypassed operand not on the execute-stage bypass");
    end
  end

  // ---------------------------------------------------- Execute / Writeback
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q <= '0; e_a <= '0; e_b <= '0; e_late <= '0; e_wcfg <= '0;
      w_q <= '0; w_data <= '0; w_late <= '0; w_wcfg <= '0;
    end else begin
      e_q    <= r_q;
      e_late <= r_late;
      e_wcfg <= r_wcfg;
      for (int k = 0; k < ISSUE_W; k++) begin
        e_a[k] <= opnd[k][0];
        e_b[k] <= opnd[k][1];
      end
      w_q[0]    <= e_q;
      w_data[0] <= alu_y;
      w_late[0] <= e_late;
      w_wcfg[0] <= e_wcfg;
      for (int s = 1; s < WB_STAGES; s++) begin
        w_q[s]    <= w_q[s-1];
        w_data[s] <= w_data[s-1];
        w_late[s] <= w_late[s-1];
        w_wcfg[s] <= w_wcfg[s-1];
      end
    end
  end

  always_comb begin
    for (int l = 0; l < N_LATE; l++) gw_data[l] = w_late[WB_STAGES-1][l].data;
    for (int k = 0; k < ISSUE_W; k++) begin
      gw_data[N_LATE+k] = w_data[WB_STAGES-1][k];
      cmp_valid[k]      = w_q[0][k].valid;
      cmp_id[k]         = w_q[0][k].id;
      cmp_dst_valid[k]  = w_q[0][k].dst_valid;
      cmp_dst[k]        = w_q[0][k].dst;
      cmp_data[k]       = w_data[0][k];
    end
  end
endmodule
