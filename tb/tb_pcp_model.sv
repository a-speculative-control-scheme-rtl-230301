// tb_pcp_model: the bank-conflict model for uniformly random accesses,
// checked against the port arbiter.
//
// The port conflict probability (PCP) is the probability that at least one
// bank receives more accesses in a cycle than it has ports, when A accesses
// go to B banks uniformly at random and each bank has N ports (no read
// sharing). Its exact value is computed here by counting assignments:
//   P(no conflict) = A! * [x^A] (sum_{k=0..N} x^k / k!)^B / B^A.
// For the (B, N) pairs of the model study (16 banks with 1, 2 or 3 ports; 2
// ports with 2, 4, 8, 16 or 32 banks) and 2 to 8 accesses, the testbench
// drives a bank_port_arbiter with A random register numbers per trial,
// counts the trials flagged as conflicts and checks the measured rate
// against the exact value within four standard deviations (plus 1 %). The
// table of measured and exact PCP is printed.
`timescale 1ns/1ps
module tb_pcp_model;
  import brf_pkg::*;
  localparam int unsigned NP = 512;
  localparam int unsigned TW = idx_w(NP);
  localparam int unsigned AMAX = 8;
  localparam int unsigned NCFG = 7;
  localparam int unsigned CB [NCFG] = '{16, 16, 16, 2, 4, 8, 32};
  localparam int unsigned CN [NCFG] = '{1, 2, 3, 2, 2, 2, 2};
  localparam int unsigned TRIALS = 4000;

  logic [NCFG-1:0][AMAX-1:0]         req;
  logic [NCFG-1:0][AMAX-1:0][TW-1:0] tag;
  logic [NCFG-1:0]                   conflict;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned B = CB[c], N = CN[c];
    logic [AMAX-1:0] gnt, shared;
    logic [AMAX-1:0][idx_w(B)-1:0] bank;
    logic [AMAX-1:0][idx_w(N)-1:0] port;
    logic [B-1:0][N-1:0] ben;
    logic [B-1:0][N-1:0][idx_w(NP / B)-1:0] brow;
    logic [B-1:0][N-1:0][idx_w(AMAX)-1:0] bsrc;
    bank_port_arbiter #(.N_REQ(AMAX), .NUM_PREGS(NP), .NUM_BANKS(B), .PORTS(N), .SHARING(1'b0)) u_arb (
      .req(req[c]), .tag(tag[c]), .gnt, .bank, .port, .shared, .conflict(conflict[c]),
      .bank_en(ben), .bank_row(brow), .bank_src(bsrc));
  end

  int checks = 0, failures = 0;

  // exact PCP for A accesses, B banks, N ports
  function automatic real pcp_exact(int a, int b, int n);
    real poly [AMAX + 1], acc [AMAX + 1], nxt [AMAX + 1];
    real fact, ways, total;
    for (int i = 0; i <= AMAX; i++) begin poly[i] = 0.0; acc[i] = 0.0; end
    fact = 1.0;
    for (int k = 0; k <= n && k <= AMAX; k++) begin
      if (k > 0) fact = fact * k;
      poly[k] = 1.0 / fact;
    end
    acc[0] = 1.0;
    for (int j = 0; j < b; j++) begin
      for (int i = 0; i <= AMAX; i++) begin
        nxt[i] = 0.0;
        for (int k = 0; k <= i; k++) nxt[i] += acc[i - k] * poly[k];
      end
      acc = nxt;
    end
    fact = 1.0;
    for (int k = 2; k <= a; k++) fact = fact * k;
    ways  = fact * acc[a];
    total = 1.0;
    for (int k = 0; k < a; k++) total = total * b;
    return 1.0 - ways / total;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits [NCFG];
    real p, m, tol;
    $display("banks ports accesses  measured%%  exact%%");
    for (int a = 2; a <= AMAX; a++) begin
      for (int c = 0; c < NCFG; c++) hits[c] = 0;
      for (int t = 0; t < TRIALS; t++) begin
        for (int c = 0; c < NCFG; c++)
          for (int i = 0; i < AMAX; i++) begin
            req[c][i] = (i < a);
            tag[c][i] = TW'($urandom_range(0, NP - 1));
          end
        #1;
        for (int c = 0; c < NCFG; c++) hits[c] += int'(conflict[c]);
      end
      for (int c = 0; c < NCFG; c++) begin
        p   = pcp_exact(a, CB[c], CN[c]);
        m   = real'(hits[c]) / TRIALS;
        tol = 4.0 * $sqrt(p * (1.0 - p) / TRIALS) + 0.01;
        $display("%5d %5d %8d  %9.2f  %6.2f", CB[c], CN[c], a, 100.0 * m, 100.0 * p);
        checks++;
        if (m > p + tol || m < p - tol) begin
          failures++;
          $display("FAIL B=%0d N=%0d A=%0d measured %f exact %f", CB[c], CN[c], a, m, p);
        end
      end
    end
    // a point that can be checked by hand: 8 accesses, 16 single-ported banks
    // give 1 - 16!/(8! 16^8) = 87.9 %
    checks++;
    if (pcp_exact(8, 16, 1) < 0.878 || pcp_exact(8, 16, 1) > 0.880) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
