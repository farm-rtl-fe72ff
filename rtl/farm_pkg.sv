// farm_pkg: types and constants shared by the FARM FPGA-side modules.
//
// The FPGA talks to the two CPUs through a coherent HyperTransport (cHT)
// link-layer core. Behind that core, every module here exchanges whole
// packets of type ht_pkt_t. The document fixes the 40-bit physical address,
// the 64-bit stream word and the 32 transaction tags of cHT. The packet
// layout itself (one struct carrying a command, a tag and up to one cache
// line of data) and the command encoding are this design's own: a real cHT
// core presents separate command and data flits.
package farm_pkg;

  localparam int unsigned ADDR_W     = 40;                 // physical address bits
  localparam int unsigned WORD_W     = 64;                 // stream/cache word bits
  localparam int unsigned LINE_BYTES = 64;                 // cache line (Opteron line size)
  localparam int unsigned LINE_WORDS = LINE_BYTES / (WORD_W / 8);
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned OFFS_W     = $clog2(LINE_BYTES);
  localparam int unsigned NUM_TAGS   = 32;                 // cHT active transactions
  localparam int unsigned TAG_W      = $clog2(NUM_TAGS);
  localparam int unsigned NODE_W     = 3;
  localparam int unsigned CNT_W      = $clog2(LINE_WORDS) + 1;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [NODE_W-1:0] node_t;

  typedef enum logic [3:0] {
    CMD_NOP        = 4'd0,
    CMD_WR_SIZED   = 4'd1,   // CPU -> FPGA range: MMR or stream write
    CMD_RD_SIZED   = 4'd2,   // CPU -> FPGA range: MMR read
    CMD_RD_BLK_MOD = 4'd3,   // FPGA -> home: exclusive line read
    CMD_VIC_BLK    = 4'd4,   // FPGA -> home: dirty line writeback
    CMD_PROBE      = 4'd5,   // snoop broadcast
    CMD_PROBE_RESP = 4'd6,   // snoop answer (dirty=1 carries the line)
    CMD_RD_RESP    = 4'd7,   // read data
    CMD_TGT_DONE   = 4'd8,   // target completion
    CMD_SRC_DONE   = 4'd9    // requester completion
  } ht_cmd_e;

  typedef struct packed {
    ht_cmd_e          cmd;
    node_t            src;    // requester node of the transaction
    tag_t             tag;    // transaction tag (of the original requester)
    addr_t            addr;
    logic [CNT_W-1:0] count;  // valid 64-bit words of a sized access
    logic             posted; // sized write that needs no TgtDone
    logic             dirty;  // probe response / read response with owned data
    line_t            data;
  } ht_pkt_t;

  localparam int unsigned PKT_W = $bits(ht_pkt_t);

  // Outstanding FPGA-issued transaction, kept per tag by the DTE
  typedef enum logic {XK_FETCH = 1'b0, XK_WB = 1'b1} xact_kind_e;
  localparam int unsigned SLOT_W = 3;   // index of a prefetch- or write-buffer slot
  typedef struct packed {
    xact_kind_e        kind;
    logic [SLOT_W-1:0] slot;
    addr_t             addr;
  } tag_info_t;

  // Line address helpers
  function automatic addr_t line_base(addr_t a);
    return {a[ADDR_W-1:OFFS_W], {OFFS_W{1'b0}}};
  endfunction

endpackage
