// iq_pkg: sizes and record types shared by the mixed-clock issue queue and
// the dispatch stage that feeds it.
//
// The queue holds 32 entries and the pipeline is two instructions wide, as
// in the original design.  Physical register tags are 6 bits (64 physical
// registers) and each entry carries a 16-bit opaque payload (opcode,
// immediate index, ROB slot, ...); both of these widths are this design's
// own choice, since the source design does not fix them.
package iq_pkg;

  localparam int unsigned WAYS      = 2;   // dispatch and issue width
  localparam int unsigned IQ_DEPTH  = 32;  // issue queue entries
  localparam int unsigned NPREG     = 64;  // physical registers (assumed)
  localparam int unsigned TAG_W     = $clog2(NPREG);
  localparam int unsigned PAYLOAD_W = 16;  // opaque instruction payload (assumed)
  localparam int unsigned GROUP     = 4;   // requests per disable group
  // Issue-clock cycles a broadcast tag is held back before matching.  The
  // source design uses 3; this RTL needs 4 + 3*T1/T2 (T1, T2 = dispatch and
  // issue clock periods) to cover its two-flop synchronizers in the worst
  // case, i.e. 7 for the 1.1 GHz / 1.0 GHz clock pair.
  localparam int unsigned TAG_DELAY = 7;

  typedef logic [TAG_W-1:0]     tag_t;
  typedef logic [PAYLOAD_W-1:0] payload_t;

  // One destination tag broadcast from an execution unit.
  typedef struct packed {
    logic valid;
    tag_t tag;
  } tag_bcast_t;

  // A renamed instruction as it enters the dispatch stage.
  typedef struct packed {
    logic     valid;
    logic     src1_used;
    tag_t     src1;
    logic     src2_used;
    tag_t     src2;
    tag_t     dst;
    payload_t payload;
  } ren_inst_t;

  // What the dispatch stage writes into one issue queue entry.
  typedef struct packed {
    tag_t     src1;
    logic     rdy1;
    tag_t     src2;
    logic     rdy2;
    tag_t     dst;
    payload_t payload;
  } iq_data_t;

  // One instruction leaving the issue queue towards a functional unit.
  typedef struct packed {
    logic     valid;
    tag_t     src1;
    tag_t     src2;
    tag_t     dst;
    payload_t payload;
  } issue_t;

endpackage
