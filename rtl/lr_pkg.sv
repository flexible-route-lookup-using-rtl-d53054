// Shared types and constants of the range-search route lookup engine.
//
// A range-table entry holds the last address of an address range, the prefix
// length of the prefix that owns the range, and the destination port. The
// 32-bit address and 12-bit port follow the document (IPv4, "a destination
// port field of 12 bits"); the 6-bit length field (0..32) is this design's
// choice. One entry is 50 bits, which matches the document's 25 Mbit for
// 500000 entries.
//
// Every token that travels down a search pipeline is a tok_t: a command or a
// search (cmd_t), the column chosen by the range search, a data word used by
// FORWARD and READ, and the running destination/found result of a search.
// The index and unit-number fields are sized generously (IDX_W, NUM_W); the
// modules use the low bits they need.
package lr_pkg;

  localparam int ADDR_W = 32;   // IPv4 address
  localparam int LEN_W  = 6;    // prefix length 0..32
  localparam int PORT_W = 12;   // destination port
  localparam int IDX_W  = 16;   // column (memory position) field, up to 65536
  localparam int NUM_W  = 8;    // search unit number field, up to 255
  localparam int TAG_W  = 8;    // caller tag, returned with the result

  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    addr_t             ip;      // last address of the range
    logic [LEN_W-1:0]  len;     // prefix length owning the range
    logic [PORT_W-1:0] port;    // destination port
  } entry_t;

  // Commands of the document (Sec. 4) plus SEARCH and NOP.
  typedef enum logic [3:0] {
    OP_NOP       = 4'd0,
    OP_SEARCH    = 4'd1,
    OP_WRITE     = 4'd2,   // WRITE(m, j, ENTRY)
    OP_READ      = 4'd3,   // READ(m, j)
    OP_NEWRANGE  = 4'd4,   // NEWRANGE(m, ENTRY)
    OP_READCOL   = 4'd5,   // READCOL(m)
    OP_FORWARD   = 4'd6,   // FORWARD(m, j, k)
    OP_BACKWARD  = 4'd7,   // BACKWARD(m, j, k)
    OP_WRITECOL  = 4'd8,   // WRITECOL(m)
    OP_CHANGECOL = 4'd9    // CHANGECOL(m, j, k, len, newlen, p)
  } op_e;

  typedef struct packed {
    op_e               op;
    logic [TAG_W-1:0]  tag;     // returned unchanged with the result
    addr_t             key;     // SearchIP of a search
    logic [IDX_W-1:0]  m;       // memory position (column)
    logic [NUM_W-1:0]  j;       // first unit number (1-based)
    logic [NUM_W-1:0]  k;       // last unit number (1-based)
    logic [LEN_W-1:0]  len;     // CHANGECOL: length to match
    logic [LEN_W-1:0]  newlen;  // CHANGECOL: new length
    logic [PORT_W-1:0] p;       // CHANGECOL: new port
    entry_t            entry;   // WRITE / NEWRANGE payload
  } cmd_t;

  typedef struct packed {
    logic              valid;
    cmd_t              cmd;
    logic [IDX_W-1:0]  index;   // column chosen by the range search
    entry_t            data;    // FORWARD data of the previous unit, READ result
    logic [PORT_W-1:0] dest;    // Destination so far
    logic              found;   // a matching entry has been seen
  } tok_t;

  typedef struct packed {
    logic              valid;
    op_e               op;
    logic [TAG_W-1:0]  tag;
    logic              found;
    logic [PORT_W-1:0] dest;
    logic [IDX_W-1:0]  index;
    entry_t            data;
  } result_t;

endpackage
