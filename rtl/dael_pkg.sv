// Shared constants and types of the TDM network.
//
// The network moves data over links that are time-division multiplexed: time is cut into
// slots of SLOT_WORDS cycles, NSLOTS slots form one turn of the TDM wheel, and every
// router and NI repeats the same schedule each turn. Configuration travels on a separate
// tree of narrow links, one CW_W-bit configuration word per cycle.
//
// From the original description: 2-word slots, 7-bit configuration words (one flag bit plus a 6-bit
// payload that holds an element ID for up to 64 elements, a credit value up to 63 or a
// pair of port numbers), 3 credit wires per link carrying a 6-bit credit value per slot,
// the path set-up header code 4, and the placement of the fields in a configuration word
// as they can be read from the path set-up example.
// Own choices: the 32-bit data width, the per-word valid bit on the data link, the
// encodings of the other configuration operations and of read-back responses.
package dael_pkg;

  // ---------------- data links ----------------
  localparam int DATA_W     = 32;        // data bits per link word
  localparam int CRED_W     = 3;         // credit wires per link
  localparam int SLOT_WORDS = 2;         // words (cycles) per TDM slot
  localparam int CNT_W      = CRED_W * SLOT_WORDS;  // credit value sent per slot: 6 bits

  typedef struct packed {
    logic              valid;   // a data word is present in this cycle
    logic [DATA_W-1:0] data;
    logic [CRED_W-1:0] credit;  // slice of a credit value, MSBs in the first word of a slot
  } link_t;

  // ---------------- configuration links ----------------
  localparam int CW_W = 7;               // configuration word width
  localparam int PL_W = CW_W - 1;        // payload bits per configuration word
  typedef logic [CW_W-1:0] cword_t;

  // A word with the flag bit (MSB) clear is a header carrying an operation code; an
  // all-zero word is idle padding. A word with the flag bit set carries a payload.
  typedef enum logic [PL_W-1:0] {
    OP_NONE  = 6'd0,   // idle / padding
    OP_WRITE = 6'd1,   // ID, select, value: write an NI register
    OP_READ  = 6'd2,   // ID, select: read an NI register back over the reverse tree
    OP_BUS   = 6'd3,   // ID, BUS_WORDS payloads: one wide word for the adjacent bus
    OP_PATH  = 6'd4    // slot mask, then (ID, ports) pairs: path set-up / tear-down
  } cfg_op_e;

  // Register select of OP_WRITE / OP_READ: payload[5:4] = register, payload[3:0] = channel
  typedef enum logic [1:0] {
    REG_CREDITS = 2'd0,   // source-side credit counter
    REG_CBACK   = 2'd1,   // destination-side delivered-words counter
    REG_FLAGS   = 2'd2    // connection state flags (bit 0: channel enabled)
  } ni_reg_e;

  localparam int BUS_W     = 37;                        // bus configuration word width
  localparam int BUS_WORDS = (BUS_W + PL_W - 1) / PL_W; // payloads per bus word: 7

  // Number of configuration words that carry an NSLOTS-bit slot mask
  function automatic int mask_words(int nslots);
    return (nslots + PL_W - 1) / PL_W;
  endfunction

  // Width of a port field in a (input, output) configuration pair: enough for NPORTS ports
  // plus the all-ones code meaning "no port" (used for tear-down).
  function automatic int port_w(int nports);
    return $clog2(nports + 1);
  endfunction

  // Element IDs used by the 2x2 mesh: router Rab has ID 2a+b, NIab has ID 32+2a+b.
  function automatic logic [PL_W-1:0] router_id(int row, int col);
    return PL_W'(2 * row + col);
  endfunction
  function automatic logic [PL_W-1:0] ni_id(int row, int col);
    return PL_W'(32 + 2 * row + col);
  endfunction

endpackage
