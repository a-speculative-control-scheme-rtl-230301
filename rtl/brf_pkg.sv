// brf_pkg: shared constants and types of the banked register file core.
//
// The default sizes are the main four-issue configuration: 64 physical
// registers of 32 bits, eight interleaved banks, each bank with two local
// read ports (one on the left operand side, one on the right) and two local
// write ports, with bypass-skip and read sharing both enabled ("8B2R2WYY").
// The issue-window depth, the number of late-writeback ports and the
// instruction-id width are this design's own choices.
package brf_pkg;

  parameter int unsigned DEF_ISSUE_W      = 4;   // four-issue, four integer ALUs
  parameter int unsigned DEF_NUM_PREGS    = 64;  // physical registers
  parameter int unsigned DEF_NUM_BANKS    = 8;   // interleaved banks
  parameter int unsigned DEF_RD_PER_SIDE  = 1;   // 2 local read ports = 1 left + 1 right
  parameter int unsigned DEF_WR_PER_BANK  = 2;   // local write ports per bank
  parameter int unsigned DEF_DATA_W       = 32;  // register width
  parameter int unsigned DEF_IQ_DEPTH     = 32;  // issue-window entries (own choice)
  parameter int unsigned DEF_N_LATE       = 1;   // late (long-latency) writeback ports (own choice)
  parameter int unsigned DEF_ID_W         = 8;   // instruction id carried for completion (own choice)

  // Operations of the integer functional units. OP_LATE marks an
  // instruction whose result arrives later through a late-writeback port
  // (a load miss, a divide): it is not placed in the issue window.
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,
    OP_SUB  = 3'd1,
    OP_AND  = 3'd2,
    OP_OR   = 3'd3,
    OP_XOR  = 3'd4,
    OP_LATE = 3'd7
  } op_e;

  // Width of an index into N things; never zero so that it can size a port.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
