// onuca_pkg: types and constants shared by the optical overlay NUCA L2.
//
// The system has 32 cores and 32 L2 banks on 16 tiles; each tile has one
// optical station serving 2 cores and 2 banks. Every core and bank has a 6-bit
// node id (cores 0..31, banks 32..63, this design's numbering). Messages follow
// the document's 100-bit header: message id 32, core id 5, source id 6,
// destination id 6, request type 3, home bank id 6 and physical address 42
// bits. Data messages add a 64-byte line sent as four 16-byte flits after the
// head flit. The 3-bit type encoding is this design's own.
//
// The overlay structure vector (OSV) holds six overlays of eight 5-bit bank
// ids: slots 0..3 are the base banks, slots 4..7 the overflow banks in
// eviction order. Overlays 0..3 are hybrid-o, 4..5 infreq-o. The overlay bit
// vector (OBV) has one bit per bank, 1 when its home overlay is infreq-o.
package onuca_pkg;

  localparam int N_BANKS    = 32;
  localparam int N_CORES    = 32;
  localparam int BANK_W     = 5;
  localparam int NODE_W     = 6;
  localparam int CORE_W     = 5;
  localparam int ADDR_W     = 42;
  localparam int MSGID_W    = 32;
  localparam int SEQ_W      = 27;     // per-bank sequence part of a message id
  localparam int LINE_BYTES = 64;
  localparam int LINE_BITS  = LINE_BYTES * 8;
  localparam int FLIT_BITS  = 128;
  localparam int DATA_FLITS = 5;      // head flit + 4 payload flits
  localparam int OFF_W      = 6;      // byte offset in a 64-byte line
  localparam int SETS       = 256;    // 128 KB / (8 ways * 64 B)
  localparam int SET_W      = 8;
  localparam int WAYS       = 8;
  localparam int LINES      = SETS * WAYS;  // 2048
  localparam int LINE_IDX_W = 11;
  localparam int TAG_W      = ADDR_W - OFF_W - SET_W;  // 28, includes home bank bits
  localparam int N_OVL      = 6;
  localparam int OVL_SIZE   = 8;
  localparam int N_BASE     = 4;
  localparam int N_OVF      = 4;

  typedef enum logic [2:0] {
    MSG_REQ     = 3'd0,  // search request (core -> home, home -> overflow banks)
    MSG_RESP    = 3'd1,  // data response to a core
    MSG_NACK    = 3'd2,  // message queue was full, sender retries
    MSG_KILL    = 3'd3,  // remove queued copies of a request
    MSG_HIT     = 3'd4,  // overflow bank hit, frees the RCB entry
    MSG_MISS    = 3'd5,  // overflow bank miss, sets an MRBV bit
    MSG_FILL    = 3'd6,  // line moved between banks (eviction or migration)
    MSG_MEMFILL = 3'd7   // line from main memory to its home bank
  } msg_type_e;

  typedef struct packed {
    logic [MSGID_W-1:0] msg_id;
    logic [CORE_W-1:0]  core_id;
    logic [NODE_W-1:0]  src_id;
    logic [NODE_W-1:0]  dst_id;
    msg_type_e          mtype;
    logic [NODE_W-1:0]  home_id;
    logic [ADDR_W-1:0]  addr;
  } msg_hdr_t;  // 100 bits, one control flit

  typedef struct packed {
    msg_hdr_t             hdr;
    logic [LINE_BITS-1:0] data;
  } msg_t;

  typedef logic [N_OVL-1:0][OVL_SIZE-1:0][BANK_W-1:0] osv_t;  // 240 bits
  typedef logic [N_BANKS-1:0] obv_t;

  // Where a home bank sits in the overlays.
  typedef struct packed {
    logic                 searchable; // home bank is a base bank of some overlay
    logic [2:0]           ovl;        // that overlay
    logic [1:0]           pos;        // its slot (bank-map position) 0..3
  } home_info_t;

  // Memory-controller request: a read (RCB miss) or a write-back (eviction).
  typedef struct packed {
    logic                 write;
    logic [ADDR_W-1:0]    addr;
    logic [MSGID_W-1:0]   msg_id;
    logic [CORE_W-1:0]    core_id;
    logic [BANK_W-1:0]    home;
    logic [LINE_BITS-1:0] data;
  } mem_req_t;

  // One-cycle event pulses of a home bank controller (for statistics).
  typedef struct packed {
    logic home_hit;     // request hit in its home bank
    logic vb_hit;       // request found in the victim buffer
    logic forward;      // home miss searched in the overflow banks
    logic ovf_hit;      // forwarded request hit in an overflow bank
    logic ovf_miss;     // forwarded request missed, Miss sent home
    logic migrate;      // line moved one step towards its home bank
    logic evict_bank;   // evicted line moved to the next bank
    logic evict_mem;    // evicted line written to memory
    logic mem_read;     // line requested from main memory
    logic nack_sent;    // MQ full, NACK returned
    logic nack_retry;   // a refused message is sent again
    logic eff_kill;     // Kill removed a queued request
    logic reconf_evict; // line removed by the reconfiguration controller
  } hbc_events_t;

  function automatic logic [NODE_W-1:0] bank_node(input logic [BANK_W-1:0] b);
    return {1'b1, b};
  endfunction

  function automatic logic [NODE_W-1:0] core_node(input logic [CORE_W-1:0] c);
    return {1'b0, c};
  endfunction

  // Home bank: lowest address bits above the block offset and set index.
  function automatic logic [BANK_W-1:0] home_of(input logic [ADDR_W-1:0] a);
    return a[OFF_W+SET_W +: BANK_W];
  endfunction

  function automatic logic [SET_W-1:0] set_of(input logic [ADDR_W-1:0] a);
    return a[OFF_W +: SET_W];
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  function automatic logic [ADDR_W-1:0] line_addr(input logic [ADDR_W-1:0] a);
    return {a[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  endfunction

  // Messages carrying a line occupy the data waveguide for 5 flits (TM bit 0),
  // the others for one flit (TM bit 1).
  function automatic logic has_payload(input msg_type_e t);
    return (t == MSG_RESP) || (t == MSG_FILL) || (t == MSG_MEMFILL);
  endfunction

  // Base-bank lookup of a home bank in the OSV. A bank that is base in no
  // overlay (the 8 least accessed) is not searched beyond itself.
  function automatic home_info_t home_lookup(input osv_t osv, input logic valid,
                                             input logic [BANK_W-1:0] h);
    home_info_t r;
    r = '0;
    if (valid) begin
      for (int o = N_OVL - 1; o >= 0; o--)
        for (int s = N_BASE - 1; s >= 0; s--)
          if (osv[o][s] == h) begin
            r.searchable = 1'b1;
            r.ovl        = 3'(o);
            r.pos        = 2'(s);
          end
    end
    return r;
  endfunction

endpackage
