// abd_pkg: types and constants shared by the ABD replicated-memory blocks.
//
// Every block exchanges one message format, abd_msg_t, whether it travels
// between a client memory controller and the switch or between the switch and
// a memory replica. A message carries one 64-byte cache line, the cache-line
// address inside a 4 GB address space, an ABD timestamp and a tag that pairs
// responses with requests.
//
// Timestamps follow the ABD rule t = p*M + i: the low CID_W bits of a
// timestamp name the client i that issued it, the upper bits are the round p.
// M = 32 follows the protocol example with 32 user processes (and the 32-port
// switch); the 32-bit timestamp width, the 8-bit tags and the opcode encoding
// are this design's own choices.
package abd_pkg;

  // Cache line of 64 bytes and an address space of 4 GB (cache-line granularity).
  localparam int unsigned LINE_BYTES      = 64;
  localparam int unsigned LINE_W          = LINE_BYTES * 8;           // 512 bits
  localparam longint unsigned ADDR_SPACE  = 64'd4 * 1024 * 1024 * 1024;
  localparam int unsigned NUM_LINES_LOG2  = $clog2(ADDR_SPACE / 64'(LINE_BYTES)); // 26
  localparam int unsigned LINE_ADDR_W     = NUM_LINES_LOG2;

  // ABD timestamp t = p*M + i with M = 2**CID_W user processes.
  localparam int unsigned TS_W            = 32;
  localparam int unsigned CID_W           = 5;                         // M = 32
  localparam int unsigned MAX_CLIENTS     = 1 << CID_W;

  localparam int unsigned TAG_W           = 8;   // request tag / operation id
  localparam int unsigned RID_W           = 4;   // replica id (up to 16 replicas)
  localparam int unsigned QCNT_W          = 8;   // quorum counter cell width

  typedef logic [LINE_W-1:0]      line_t;
  typedef logic [LINE_ADDR_W-1:0] laddr_t;
  typedef logic [TS_W-1:0]        ts_t;
  typedef logic [CID_W-1:0]       cid_t;
  typedef logic [TAG_W-1:0]       tag_t;
  typedef logic [RID_W-1:0]       rid_t;

  typedef enum logic [3:0] {
    // client memory controller <-> switch
    MSG_CLI_READ      = 4'd0,   // plain read of a cache line
    MSG_CLI_WRITE     = 4'd1,   // plain write of a cache line
    MSG_CLI_READ_RSP  = 4'd2,   // read data back to the client
    MSG_CLI_WRITE_ACK = 4'd3,   // write completed
    // switch <-> replicas (the two ABD phases)
    MSG_GET_TS        = 4'd4,   // write phase 1: "send me your timestamps"
    MSG_TS_RSP        = 4'd5,   // ts_j
    MSG_READ          = 4'd6,   // read phase 1: "reading"
    MSG_READ_RSP      = 4'd7,   // (v_j, ts_j)
    MSG_WRITE         = 4'd8,   // phase 2 of both: (v, t)
    MSG_WRITE_ACK     = 4'd9    // "OK"
  } msg_op_e;

  typedef struct packed {
    msg_op_e op;
    cid_t    client;   // issuing client (its switch port)
    tag_t    tag;      // client request tag, or the switch's operation id
    rid_t    src;      // replica that produced a response
    laddr_t  addr;     // cache-line address
    ts_t     ts;       // ABD timestamp
    line_t   value;    // cache-line contents
  } abd_msg_t;

  // Word stored per cache line at a replica: its value and timestamp.
  typedef struct packed {
    ts_t   ts;
    line_t value;
  } scm_word_t;

  // Smallest timestamp of the form p*M + i that is larger than floor.
  function automatic ts_t next_ts(ts_t floor, cid_t i);
    ts_t cand;
    cand = {floor[TS_W-1:CID_W], i};
    if (cand <= floor) cand = cand + ts_t'(MAX_CLIENTS);
    return cand;
  endfunction

  // Majority of the set bits of a replica mask.
  function automatic logic [QCNT_W-1:0] majority(logic [15:0] mask);
    logic [QCNT_W-1:0] n;
    n = '0;
    for (int k = 0; k < 16; k++) n = n + QCNT_W'(mask[k]);
    return (n >> 1) + QCNT_W'(1);
  endfunction

endpackage
