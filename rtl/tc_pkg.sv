// Shared types and constants of the transaction cache (TC) persistent path.
//
// The transaction cache is a small nonvolatile CAM FIFO placed beside the
// L1 cache of each core. Persistent stores of a transaction are copied into
// it, held there until the transaction commits, written back to NVRAM in
// global program order, and released when NVRAM acknowledges the write.
//
// Field widths follow the hardware cost figures of the design: a 6-bit
// transaction ID (64 lines of a 4 KB TC), an 8-bit sequence ID (4 cores x
// 64 lines), 64-byte lines. The 48-bit physical address (42-bit line
// address used as the fully-associative tag) is this design's own choice.
package tc_pkg;

  localparam int unsigned TXID_W      = 6;    // transaction ID width
  localparam int unsigned SEQ_W       = 8;    // global sequence ID width
  localparam int unsigned LINE_BYTES  = 64;   // cache line size
  localparam int unsigned DATA_W      = LINE_BYTES * 8;
  localparam int unsigned PADDR_W     = 48;   // physical address (assumed)
  localparam int unsigned LINE_ADDR_W = PADDR_W - $clog2(LINE_BYTES);

  typedef logic [TXID_W-1:0]      txid_t;
  typedef logic [SEQ_W-1:0]       seq_t;
  typedef logic [LINE_ADDR_W-1:0] laddr_t;
  typedef logic [DATA_W-1:0]      line_t;

  // Per-line state of the TC data array (three states of the line life cycle).
  typedef enum logic [1:0] {
    ST_AVAIL  = 2'd0,   // free, may be filled at the TC head
    ST_ACTIVE = 2'd1,   // holds a store of a transaction that has not committed
    ST_COMMIT = 2'd2    // transaction committed; may be written back to NVRAM
  } tc_state_e;

  // Requests from the CPU core to its TC.
  typedef enum logic {
    REQ_WRITE  = 1'b0,
    REQ_COMMIT = 1'b1
  } cpu_req_kind_e;

  typedef struct packed {
    cpu_req_kind_e kind;
    txid_t         txid;
    seq_t          seq;    // 0 = coherence not finished yet (invalid)
    laddr_t        addr;   // line address (TC tag)
    line_t         data;
  } cpu_req_t;

  // Messages from the LLC (miss lookups) and the NVRAM controller (acks).
  typedef enum logic {
    MSG_MISS = 1'b0,
    MSG_ACK  = 1'b1
  } msg_kind_e;

  typedef struct packed {
    msg_kind_e kind;
    laddr_t    addr;
  } tc_msg_t;

  // Answer of one TC to an LLC miss lookup.
  typedef struct packed {
    logic   hit;
    seq_t   seq;
    line_t  data;
  } miss_rsp_t;

  // Write-back request from a TC toward the NVRAM controller.
  typedef struct packed {
    seq_t   seq;
    laddr_t addr;
    line_t  data;
  } nv_wr_t;

  // Operations of the CPU core seen by its transaction mode unit.
  typedef enum logic [1:0] {
    OP_STORE    = 2'd0,
    OP_TX_BEGIN = 2'd1,
    OP_TX_END   = 2'd2
  } cpu_op_e;

  // Sequence IDs count 1..2**SEQ_W-1; 0 marks "not yet ordered".
  function automatic seq_t seq_inc(seq_t s);
    return (s == '1) ? seq_t'(1) : s + seq_t'(1);
  endfunction

  // Transaction IDs count 1..2**TXID_W-1; 0 in the mode register means normal mode.
  function automatic txid_t txid_inc(txid_t t);
    return (t == '1) ? txid_t'(1) : t + txid_t'(1);
  endfunction

endpackage
