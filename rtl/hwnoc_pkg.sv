// Shared types and constants of the hardwired NOC (HWNOC).
//
// The NOC carries single-flit packets: every flit holds its own source route,
// the destination channel (queue id) in the receiving NI kernel, a returned
// credit count for the reverse direction of the connection, and one 32-bit
// data word. A flit is either guaranteed-throughput (GT, sent only in TDMA
// slots reserved in the sending NI's slot table) or best-effort (BE, sent in
// any free cycle and flow controlled link by link).
//
// From the design description: GT/BE traffic types, the per-connection path
// and slot registers written through an MMIO port, source-to-destination
// credit-based flow control. This design's own choices: the flit layout, one
// word per flit, 2-bit router port fields in the path, the MMIO word layout
// and the register map below.
package hwnoc_pkg;

  parameter int unsigned DATA_W   = 32;  // data word carried by one flit
  parameter int unsigned PORT_W   = 2;   // router output port field per hop
  parameter int unsigned PATH_W   = 8;   // source route: up to 4 hops
  parameter int unsigned QID_W    = 2;   // channel (queue) id inside an NI kernel
  parameter int unsigned MAX_CH   = 1 << QID_W;
  parameter int unsigned CRED_W   = 5;   // credit field of a flit (0..31)
  parameter int unsigned CCNT_W   = 6;   // credit counters (0..63)

  // Router port numbering. Port 0 is always the local NI; an all-zero
  // remaining path therefore means "deliver here".
  parameter logic [PORT_W-1:0] PORT_LOCAL = 2'd0;
  parameter logic [PORT_W-1:0] PORT_H     = 2'd1;  // horizontal neighbour
  parameter logic [PORT_W-1:0] PORT_V     = 2'd2;  // vertical neighbour

  typedef struct packed {
    logic                 gt;        // 1: guaranteed throughput, 0: best effort
    logic [PATH_W-1:0]    path;      // remaining route, low field first
    logic [QID_W-1:0]     qid;       // destination channel in the target NI
    logic [CRED_W-1:0]    credit;    // credits returned for the reverse channel
    logic                 has_data;  // 0: credit-only flit
    logic [DATA_W-1:0]    data;
  } flit_t;

  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // Per-channel connection registers of an NI kernel.
  typedef struct packed {
    logic              en;     // channel may send
    logic              gt;     // traffic type of the channel
    logic [QID_W-1:0]  rqid;   // channel id in the remote NI
    logic [PATH_W-1:0] path;   // route to the remote NI
  } chan_cfg_t;

  // ---------------------------------------------------------------------
  // MMIO access word, used both on the local MMIO port and when an MMIO
  // request travels over the NOC as a data word:
  //   [31] write, [30:24] register address, [23:0] write data.
  // A read response word is {1'b0, address, read data}.
  // ---------------------------------------------------------------------
  parameter int unsigned MMIO_AW = 7;
  parameter int unsigned MMIO_DW = 24;

  // Register map of an NI kernel.
  //   0x00+c  channel c: [7:0] path, [9:8] remote qid, [10] GT, [11] enable,
  //           [17:12] credits (write: initial remote buffer space,
  //           read: current remote credit count)
  //   0x10+s  slot s of the TDMA table: [0] reserved, [2:1] channel
  //   0x20    status: [2:0] current slot
  parameter logic [MMIO_AW-1:0] REG_CHAN_BASE = 7'h00;
  parameter logic [MMIO_AW-1:0] REG_SLOT_BASE = 7'h10;
  parameter logic [MMIO_AW-1:0] REG_STATUS    = 7'h20;

  function automatic logic [DATA_W-1:0] mmio_word(input logic we,
                                                  input logic [MMIO_AW-1:0] addr,
                                                  input logic [MMIO_DW-1:0] data);
    return {we, addr, data};
  endfunction

  function automatic logic [MMIO_DW-1:0] chan_word(input logic en, input logic gt,
                                                   input logic [QID_W-1:0] rqid,
                                                   input logic [PATH_W-1:0] path,
                                                   input logic [CCNT_W-1:0] credits);
    return {6'd0, credits, en, gt, rqid, path};
  endfunction

  function automatic logic [MMIO_DW-1:0] slot_word(input logic rsv,
                                                   input logic [QID_W-1:0] ch);
    return {21'd0, ch, rsv};
  endfunction

  // ---------------------------------------------------------------------
  // Configuration port commands (bitstream words sent to a CFR):
  //   [31:28] = CFG_FAR   : [15:0] first frame address
  //   [31:28] = CFG_FDRI  : [15:0] number of frames N; N*FRAME_WORDS data
  //                         words follow, frame address increments per frame
  //   [31:28] = CFG_START : enable the region's clock, then release reset
  //   [31:28] = CFG_SHUT  : stop the clock and hold the region in reset
  // ---------------------------------------------------------------------
  parameter logic [3:0] CFG_FAR   = 4'hA;
  parameter logic [3:0] CFG_FDRI  = 4'hB;
  parameter logic [3:0] CFG_START = 4'hC;
  parameter logic [3:0] CFG_SHUT  = 4'hD;

  // Boot processor command stream from the configuration IO:
  //   {op, word} with op as below.
  typedef enum logic [1:0] {
    BOP_LOCAL  = 2'd0,  // word is an MMIO access to the boot NI itself
    BOP_REMOTE = 2'd1,  // word is sent on channel 0 (remote MMIO requests)
    BOP_BITS   = 2'd2,  // word is sent on channel 1 (bitstream)
    BOP_WAIT   = 2'd3   // wait for word[15:0] responses on channel 0
  } bop_e;

endpackage
