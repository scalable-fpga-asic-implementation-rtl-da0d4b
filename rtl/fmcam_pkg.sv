// fmcam_pkg -- geometry, types and constants shared by the adapted flexible
// multi-ported CAM (FMCAM) and the parallel table-lookup coder built on it.
//
// The geometry is the evaluated configuration: a contents-table of 2^a = 256
// reference words (a = 8) of d = 32 bits, classified into c = 16 categories.
// Every category owns one single-port bank of 2^a / c = 16 words, so a match
// address is {category (bank) index, word address inside the bank}. The port
// count p is a module parameter (NUM_PORTS) because the design is meant to be
// scaled in ports; a, d and c are fixed here because the structs carry them.
//
// The code-word format (16-bit code plus 5-bit length, enough for JPEG
// Huffman codes of up to 16 bits) is this design's own choice.
package fmcam_pkg;

  // a: match-address width (contents-table holds 2^a words)
  localparam int unsigned ADDR_W   = 8;
  // d: reference-word width
  localparam int unsigned DATA_W   = 32;
  // c: number of categories = number of category banks
  localparam int unsigned NUM_CAT  = 16;
  localparam int unsigned CAT_W    = $clog2(NUM_CAT);
  // words per category bank and the loop-address width
  localparam int unsigned WADDR_W  = ADDR_W - CAT_W;
  localparam int unsigned BANK_DEPTH = 1 << WADDR_W;
  // counting-limit register: 1 .. BANK_DEPTH, so one bit wider than WADDR_W
  localparam int unsigned LIMIT_W  = WADDR_W + 1;

  // code word held in the multi-port RAM
  localparam int unsigned CODE_W   = 16;
  localparam int unsigned LEN_W    = 5;

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [WADDR_W-1:0] waddr_t;
  typedef logic [CAT_W-1:0]   cat_t;
  typedef logic [LIMIT_W-1:0] limit_t;
  typedef logic [NUM_CAT-1:0] catvec_t;

  typedef enum logic {
    MODE_MULTIPLE = 1'b0,   // report every match, always run the whole loop
    MODE_SINGLE   = 1'b1    // stop at the first match
  } search_mode_t;

  // one stored reference word; invalid words never match
  typedef struct packed {
    logic  valid;
    word_t data;
  } entry_t;

  // one category register: a word belongs to this category when the bits
  // selected by 'bits' equal the same bits of 'pattern'
  typedef struct packed {
    logic  en;
    word_t pattern;
    word_t bits;
  } catreg_t;

  // bus broadcast from the controller / category block to every port
  //   valid     : entries[] hold the words at 'addr' of every bank this cycle
  //   addr      : loop address of the broadcast words
  //   next_addr : loop address of the next valid broadcast
  typedef struct packed {
    logic                        valid;
    waddr_t                      addr;
    waddr_t                      next_addr;
    entry_t [NUM_CAT-1:0]        entries;
  } bcast_t;

  // search request at a port: mask bit = 1 excludes that bit from comparison
  typedef struct packed {
    word_t data;
    word_t mask;
  } search_req_t;

  // port response
  //   hit   : a match was found this cycle at 'addr'
  //   done  : the search has ended this cycle
  //   found : with done, at least one match was found during the search
  typedef struct packed {
    logic  hit;
    logic  done;
    logic  found;
    addr_t addr;
  } search_rsp_t;

  // controller configuration writes
  typedef enum logic [1:0] {
    CFG_CATREG = 2'd0,   // write category register cfg.idx
    CFG_MODE   = 2'd1,   // write search mode select
    CFG_LIMIT  = 2'd2    // write counting value (loop length)
  } cfg_kind_t;

  typedef struct packed {
    cfg_kind_t    kind;
    cat_t         idx;
    catreg_t      catreg;
    search_mode_t mode;
    limit_t       limit;
  } cfg_wr_t;

  // contents-table write: one word of one category bank
  typedef struct packed {
    cat_t   bank;
    waddr_t addr;
    entry_t entry;
  } tbl_wr_t;

  typedef struct packed {
    logic [LEN_W-1:0]  len;
    logic [CODE_W-1:0] bits;
  } codeword_t;

  // index of the lowest set bit (0 when none is set)
  function automatic cat_t first_set(input catvec_t v);
    cat_t r;
    r = '0;
    for (int i = NUM_CAT - 1; i >= 0; i--)
      if (v[i]) r = cat_t'(i);
    return r;
  endfunction

endpackage
