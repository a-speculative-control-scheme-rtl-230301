// tb_bank_port_arbiter: random request groups against an independent
// statement of the grant rule, for two instances:
//   u_rd : default read-side arbiter (4 requests, 8 banks, 1 port, sharing)
//   u_wr : write-side arbiter (5 requests, 8 banks, 2 ports, no sharing)
// Rule: request i is granted iff (sharing and an earlier granted request
// names the same register) or fewer than PORTS distinct registers of its
// bank were granted to earlier requests. Also checked: the port settings
// (enable, row, source index) of every granted request, that no port is
// enabled without a granted request, and the conflict flag.
`timescale 1ns/1ps
module tb_bank_port_arbiter;
  import brf_pkg::*;
  localparam int unsigned NP = DEF_NUM_PREGS;
  localparam int unsigned NB = DEF_NUM_BANKS;
  localparam int unsigned TW = idx_w(NP);
  localparam int unsigned RW = idx_w(NP / NB);
  localparam int unsigned BW = idx_w(NB);

  // read-side instance at defaults
  localparam int unsigned NR1 = DEF_ISSUE_W, P1 = DEF_RD_PER_SIDE;
  logic [NR1-1:0] req1, gnt1, sh1; logic conf1;
  logic [NR1-1:0][TW-1:0] tag1;
  logic [NR1-1:0][BW-1:0] bank1;
  logic [NR1-1:0][idx_w(P1)-1:0] port1;
  logic [NB-1:0][P1-1:0] ben1;
  logic [NB-1:0][P1-1:0][RW-1:0] brow1;
  logic [NB-1:0][P1-1:0][idx_w(NR1)-1:0] bsrc1;
  bank_port_arbiter u_rd (.req(req1), .tag(tag1), .gnt(gnt1), .bank(bank1), .port(port1),
    .shared(sh1), .conflict(conf1), .bank_en(ben1), .bank_row(brow1), .bank_src(bsrc1));

  // write-side instance
  localparam int unsigned NR2 = DEF_ISSUE_W + DEF_N_LATE, P2 = DEF_WR_PER_BANK;
  logic [NR2-1:0] req2, gnt2, sh2; logic conf2;
  logic [NR2-1:0][TW-1:0] tag2;
  logic [NR2-1:0][BW-1:0] bank2;
  logic [NR2-1:0][idx_w(P2)-1:0] port2;
  logic [NB-1:0][P2-1:0] ben2;
  logic [NB-1:0][P2-1:0][RW-1:0] brow2;
  logic [NB-1:0][P2-1:0][idx_w(NR2)-1:0] bsrc2;
  bank_port_arbiter #(.N_REQ(NR2), .PORTS(P2), .SHARING(1'b0)) u_wr (.req(req2), .tag(tag2),
    .gnt(gnt2), .bank(bank2), .port(port2), .shared(sh2), .conflict(conf2),
    .bank_en(ben2), .bank_row(brow2), .bank_src(bsrc2));

  int checks = 0, failures = 0;
  int n_conf = 0, n_share = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      // registers drawn from a small set so that banks collide often
      for (int i = 0; i < NR1; i++) begin
        req1[i] = $urandom_range(0, 4) != 0;
        tag1[i] = TW'($urandom_range(0, 3) * NB + $urandom_range(0, 2));
      end
      for (int i = 0; i < NR2; i++) begin
        req2[i] = $urandom_range(0, 4) != 0;
        tag2[i] = TW'($urandom_range(0, NP - 1) % 24);   // distinct destinations not required by the arbiter
      end
      for (int i = 0; i < NR2; i++)
        for (int j = 0; j < i; j++)
          if (tag2[i] == tag2[j]) tag2[i] = TW'(tag2[i] + 24 + 8 * j);
      #1;
      begin : rd_check
        bit exp_g; int distinct; bit any_miss;
        any_miss = 0;
        for (int i = 0; i < NR1; i++) begin
          bit same;
          same = 0; distinct = 0;
          for (int j = 0; j < i; j++) begin
            if (gnt1[j] && req1[j] && tag1[j] == tag1[i]) same = 1;
            if (gnt1[j] && !sh1[j] && (tag1[j] % NB) == (tag1[i] % NB)) distinct++;
          end
          exp_g = req1[i] && (same || distinct < P1);
          chk(gnt1[i] == exp_g, $sformatf("read grant %0d", i));
          chk(sh1[i] == (req1[i] && same), $sformatf("read shared %0d", i));
          if (gnt1[i]) begin
            chk(ben1[tag1[i] % NB][port1[i]] && brow1[tag1[i] % NB][port1[i]] == RW'(tag1[i] / NB),
                $sformatf("read port setting %0d", i));
          end
          if (req1[i] && !gnt1[i]) any_miss = 1;
          n_share += int'(sh1[i]);
        end
        chk(conf1 == any_miss, "read conflict flag");
        n_conf += int'(conf1);
        for (int b = 0; b < NB; b++)
          for (int p = 0; p < P1; p++)
            if (ben1[b][p]) chk(gnt1[bsrc1[b][p]] && !sh1[bsrc1[b][p]] && tag1[bsrc1[b][p]] % NB == b,
                                 "read port owned by a granted request");
      end
      begin : wr_check
        int cnt; bit any_miss;
        any_miss = 0;
        for (int i = 0; i < NR2; i++) begin
          cnt = 0;
          for (int j = 0; j < i; j++)
            if (req2[j] && (tag2[j] % NB) == (tag2[i] % NB)) cnt++;
          chk(gnt2[i] == (req2[i] && cnt < P2), $sformatf("write grant %0d", i));
          chk(!sh2[i], "no sharing on write side");
          if (gnt2[i])
            chk(ben2[tag2[i] % NB][port2[i]] && bsrc2[tag2[i] % NB][port2[i]] == i &&
                brow2[tag2[i] % NB][port2[i]] == RW'(tag2[i] / NB), "write port setting");
          if (req2[i] && !gnt2[i]) any_miss = 1;
        end
        chk(conf2 == any_miss, "write conflict flag");
      end
    end
    chk(n_conf > 0 && n_share > 0, "conflicts and sharing were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
