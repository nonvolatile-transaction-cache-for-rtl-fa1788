// Transaction cache (TC) of one core: request queue, controller and data
// array, as one unit beside the L1 cache.
//
// Persistent writes of a transaction enter from the CPU, wait in the request
// queue until the L1 controller reports that their coherence operation is
// done (and a global sequence ID has been stamped on them), and are then
// inserted at the TC head as active lines. A commit request turns all lines
// of its transaction to committed. Committed lines are written back to NVRAM
// in FIFO order, each only when its sequence ID is the global write-back
// sequence ID, and are released when NVRAM acknowledges them. The LLC looks
// up the newest copy of a missed line here. Because the array is
// nonvolatile, the held lines are the undo-free log of every transaction not
// yet fully written back.
//
// Interface: valid/ready CPU requests and LLC/NVRAM messages; coh_fin pulse
// with its stamped coh_seq; the global write-back SeqID in and a wb_issue
// pulse out; a valid/ready write-back port toward NVRAM; a one-cycle miss
// answer. Latency: a stamped write reaches the array two cycles after it
// enters the queue at the earliest (queue register, then insert); a miss is
// answered two cycles after it is accepted (queue, then registered answer).
module tx_cache
  import tc_pkg::*;
#(
  parameter int unsigned ENTRIES      = 64,
  parameter int unsigned CPU_DEPTH    = 8,
  parameter int unsigned MSG_DEPTH    = 4,
  parameter int unsigned DRAIN_THRESH = ENTRIES - ENTRIES / 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cpu_in_valid,
  output logic      cpu_in_ready,
  input  cpu_req_t  cpu_in,
  input  logic      coh_fin,
  input  seq_t      coh_seq,
  input  logic      miss_in_valid,
  output logic      miss_in_ready,
  input  laddr_t    miss_in_addr,
  input  logic      ack_in_valid,
  output logic      ack_in_ready,
  input  laddr_t    ack_in_addr,
  input  seq_t      wb_seq,
  output logic      wb_issue,
  output logic      nv_wr_valid,
  input  logic      nv_wr_ready,
  output nv_wr_t    nv_wr,
  output logic      drain_req,
  output logic      miss_rsp_valid,
  output miss_rsp_t miss_rsp,
  output logic      stall,
  output logic      commit_event,
  output logic      ack_event,
  output logic      ack_orphan,
  output logic [$clog2(ENTRIES):0] used,
  output logic [$clog2(CPU_DEPTH):0] unordered
);

  localparam int unsigned PW = $clog2(ENTRIES);

  logic      q_cpu_valid, q_cpu_ready, q_msg_valid, q_msg_ready;
  cpu_req_t  q_cpu;
  tc_msg_t   q_msg;

  logic      ins_en, cmt_en, free_en;
  logic [PW-1:0] ins_idx, free_idx, rda_idx, rdb_idx;
  txid_t     ins_txid, cmt_txid;
  seq_t      ins_seq, rda_seq, rdb_seq;
  laddr_t    ins_addr, srch_addr, rda_addr;
  line_t     ins_data, rda_data, rdb_data;
  logic [ENTRIES-1:0] match;
  tc_state_e state [ENTRIES];

  tc_request_queue #(.CPU_DEPTH(CPU_DEPTH), .MSG_DEPTH(MSG_DEPTH)) u_queue (
    .clk, .rst_n,
    .cpu_in_valid, .cpu_in_ready, .cpu_in,
    .coh_fin, .coh_seq,
    .miss_in_valid, .miss_in_ready, .miss_in_addr,
    .ack_in_valid, .ack_in_ready, .ack_in_addr,
    .cpu_out_valid(q_cpu_valid), .cpu_out_ready(q_cpu_ready), .cpu_out(q_cpu),
    .msg_out_valid(q_msg_valid), .msg_out_ready(q_msg_ready), .msg_out(q_msg),
    .unordered
  );

  tc_controller #(.ENTRIES(ENTRIES), .DRAIN_THRESH(DRAIN_THRESH)) u_ctrl (
    .clk, .rst_n,
    .cpu_valid(q_cpu_valid), .cpu_ready(q_cpu_ready), .cpu_req(q_cpu),
    .msg_valid(q_msg_valid), .msg_ready(q_msg_ready), .msg(q_msg),
    .wb_seq, .wb_issue,
    .nv_wr_valid, .nv_wr_ready, .nv_wr, .drain_req,
    .miss_rsp_valid, .miss_rsp,
    .stall, .ack_event, .ack_orphan, .used,
    .ins_en, .ins_idx, .ins_txid, .ins_seq, .ins_addr, .ins_data,
    .cmt_en, .cmt_txid, .free_en, .free_idx,
    .srch_addr, .match, .state,
    .rda_idx, .rda_seq, .rda_addr, .rda_data,
    .rdb_idx, .rdb_seq, .rdb_data
  );

  tc_data_array #(.ENTRIES(ENTRIES)) u_array (
    .clk, .rst_n,
    .ins_en, .ins_idx, .ins_txid, .ins_seq, .ins_addr, .ins_data,
    .cmt_en, .cmt_txid, .free_en, .free_idx,
    .srch_addr, .match, .state,
    .rda_idx, .rda_seq, .rda_addr, .rda_data,
    .rdb_idx, .rdb_seq, .rdb_data
  );

  assign commit_event = cmt_en;

endmodule
