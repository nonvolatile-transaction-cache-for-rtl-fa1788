// Transaction cache data array: the content-addressable storage of one TC.
//
// Each of the ENTRIES lines holds a transaction ID, a line state (available,
// active, committed), the global sequence ID of the write, the line address
// used as the fully-associative tag, and the 64-byte line. In silicon the
// array is STT-RAM and keeps its contents over a power loss; here it is a
// register array, and rst_n only marks every line available, standing for
// the first power-up of an empty cache (payload fields are not reset).
//
// Operations, all applied at the clock edge, at most one of each per cycle:
//   insert  - write one line (at the TC head) and make it active;
//   commit  - content-addressed on the TxID: every active line of that
//             transaction becomes committed, in one cycle;
//   free    - one line (acknowledged by NVRAM) becomes available.
// The controller never aims two operations at the same line in one cycle:
// insert targets an available line, commit active lines, free a committed
// line. Content search is combinational: match[i] is set when line i is not
// available and its tag equals srch_addr. Two combinational read ports serve
// the NVRAM issue path and the LLC miss path.
//
// The field set and the three states follow the document. Storing the state
// in two bits (three states do not fit the one bit the document's cost table
// lists) and the sequence ID field of the multicore extension are noted in
// the design notes.
module tc_data_array
  import tc_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // insert at the head
  input  logic      ins_en,
  input  logic [$clog2(ENTRIES)-1:0] ins_idx,
  input  txid_t     ins_txid,
  input  seq_t      ins_seq,
  input  laddr_t    ins_addr,
  input  line_t     ins_data,
  // commit a transaction
  input  logic      cmt_en,
  input  txid_t     cmt_txid,
  // release a written-back line
  input  logic      free_en,
  input  logic [$clog2(ENTRIES)-1:0] free_idx,
  // content search on the tag
  input  laddr_t    srch_addr,
  output logic [ENTRIES-1:0] match,
  // line states, for the head/tail/issue logic
  output tc_state_e state [ENTRIES],
  // read port A (issue toward NVRAM)
  input  logic [$clog2(ENTRIES)-1:0] rda_idx,
  output seq_t      rda_seq,
  output laddr_t    rda_addr,
  output line_t     rda_data,
  // read port B (LLC miss answer)
  input  logic [$clog2(ENTRIES)-1:0] rdb_idx,
  output seq_t      rdb_seq,
  output line_t     rdb_data
);

  tc_state_e st_q   [ENTRIES];
  txid_t     txid_q [ENTRIES];
  seq_t      seq_q  [ENTRIES];
  laddr_t    tag_q  [ENTRIES];
  line_t     data_q [ENTRIES];

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      state[i] = st_q[i];
      match[i] = (st_q[i] != ST_AVAIL) && (tag_q[i] == srch_addr);
    end
  end

  assign rda_seq  = seq_q[rda_idx];
  assign rda_addr = tag_q[rda_idx];
  assign rda_data = data_q[rda_idx];
  assign rdb_seq  = seq_q[rdb_idx];
  assign rdb_data = data_q[rdb_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) st_q[i] <= ST_AVAIL;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (cmt_en && st_q[i] == ST_ACTIVE && txid_q[i] == cmt_txid)
          st_q[i] <= ST_COMMIT;
      end
      if (free_en) st_q[free_idx] <= ST_AVAIL;
      if (ins_en)  st_q[ins_idx]  <= ST_ACTIVE;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_en) begin
      txid_q[ins_idx] <= ins_txid;
      seq_q[ins_idx]  <= ins_seq;
      tag_q[ins_idx]  <= ins_addr;
      data_q[ins_idx] <= ins_data;
    end
  end

  a_ins_free: assert property (@(posedge clk) disable iff (!rst_n)
                               ins_en |-> st_q[ins_idx] == ST_AVAIL);
  a_free_cmt: assert property (@(posedge clk) disable iff (!rst_n)
                               free_en |-> st_q[free_idx] == ST_COMMIT);

endmodule
