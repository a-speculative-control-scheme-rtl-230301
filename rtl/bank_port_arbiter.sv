// bank_port_arbiter: grants the local ports of every bank to a group of
// register accesses, for one kind of port (left reads, right reads or writes).
//
// Each request names a physical register; its bank is the register number
// mod NUM_BANKS and its row the register number / NUM_BANKS. Requests are
// served in fixed priority, index 0 first: a request gets the next free local
// port of its bank, and is refused (a bank conflict) when all PORTS ports of
// that bank are taken. With SHARING set, a request for a register that an
// earlier request already reads is granted the same local port without using
// a new one (read sharing: one local port drives several global ports). The
// write arbiter instance runs with SHARING = 0 and places the late-writeback
// requests at the lowest indices, which gives them priority over the newly
// issued group.
//
// Purely combinational; the caller registers the port settings into the next
// pipeline stage. Fixed index priority and single-pass allocation (a port
// granted to an instruction that is killed for another reason is not handed
// to anyone else) are this design's own choices.
module bank_port_arbiter
  import brf_pkg::*;
#(
  parameter int unsigned N_REQ     = DEF_ISSUE_W,
  parameter int unsigned NUM_PREGS = DEF_NUM_PREGS,
  parameter int unsigned NUM_BANKS = DEF_NUM_BANKS,
  parameter int unsigned PORTS     = DEF_RD_PER_SIDE,
  parameter bit          SHARING   = 1'b1,
  localparam int unsigned TAG_W  = idx_w(NUM_PREGS),
  localparam int unsigned ROWS   = NUM_PREGS / NUM_BANKS,
  localparam int unsigned ROW_W  = idx_w(ROWS),
  localparam int unsigned BANK_W = idx_w(NUM_BANKS),
  localparam int unsigned P_W    = idx_w(PORTS),
  localparam int unsigned REQ_W  = idx_w(N_REQ)
) (
  input  logic [N_REQ-1:0]                             req,
  input  logic [N_REQ-1:0][TAG_W-1:0]                  tag,
  output logic [N_REQ-1:0]                             gnt,
  output logic [N_REQ-1:0][BANK_W-1:0]                 bank,    // bank of each request
  output logic [N_REQ-1:0][P_W-1:0]                    port,    // local port granted
  output logic [N_REQ-1:0]                             shared,  // granted by read sharing
  output logic                                         conflict,
  output logic [NUM_BANKS-1:0][PORTS-1:0]              bank_en,
  output logic [NUM_BANKS-1:0][PORTS-1:0][ROW_W-1:0]   bank_row,
  output logic [NUM_BANKS-1:0][PORTS-1:0][REQ_W-1:0]   bank_src
);
  always_comb begin
    int unsigned used [NUM_BANKS];
    logic [BANK_W-1:0] b;
    logic [ROW_W-1:0]  r;
    logic              hit;

    gnt      = '0;
    port     = '0;
    shared   = '0;
    bank     = '0;
    bank_en  = '0;
    bank_row = '0;
    bank_src = '0;
    for (int k = 0; k < NUM_BANKS; k++) used[k] = 0;

    for (int i = 0; i < N_REQ; i++) begin
      b       = BANK_W'(tag[i] % NUM_BANKS);
      r       = ROW_W'(tag[i] / NUM_BANKS);
      bank[i] = b;
      hit     = 1'b0;
      if (req[i]) begin
        if (SHARING) begin
          for (int p = 0; p < PORTS; p++) begin
            if (!hit && bank_en[b][p] && bank_row[b][p] == r) begin
              hit       = 1'b1;
              gnt[i]    = 1'b1;
              shared[i] = 1'b1;
              port[i]   = P_W'(p);
            end
          end
        end
        if (!hit && used[b] < PORTS) begin
          gnt[i]                 = 1'b1;
          port[i]                = P_W'(used[b]);
          bank_en[b][used[b]]    = 1'b1;
          bank_row[b][used[b]]   = r;
          bank_src[b][used[b]]   = REQ_W'(i);
          used[b]                = used[b] + 1;
        end
      end
    end
    conflict = |(req & ~gnt);
  end
endmodule
