// Transaction cache controller: the FIFO and CAM control of one TC.
//
// The data array is used as a circular FIFO. Three pointers walk it in the
// same direction: the head (next line to fill), the issue pointer (next
// committed line to write back to NVRAM) and the tail (oldest line still
// held). Lines from tail up to the issue pointer have been sent to NVRAM and
// wait for its acknowledgement; lines from the issue pointer up to the head
// are committed (not yet sent) or active. Each cycle the controller may do
// all of the following at once:
//
//  * CPU request (one per cycle, from the request queue):
//      write  - if the line at the head is available, fill it (TxID, SeqID,
//               tag, data), make it active and advance the head; otherwise
//               the TC is full and the request waits (stall is high).
//      commit - every active line with the commit's TxID becomes committed.
//  * Issue: if the line at the issue pointer is committed and its SeqID
//    equals the global write-back SeqID, offer it to the NVRAM controller;
//    when accepted, advance the issue pointer (wb_issue pulses so the global
//    write-back SeqID advances). Lines thus leave strictly in FIFO order and
//    in global coherence order over all cores.
//  * Message (one per cycle):
//      NVRAM ack - among sent lines whose tag matches the ack address, the
//                  one nearest the tail becomes available (same-address
//                  writes complete in issue order at NVRAM);
//      LLC miss  - among held lines whose tag matches, the one nearest the
//                  head (the newest) is returned with its SeqID; the answer
//                  appears one cycle later on miss_rsp_valid/miss_rsp.
//  * Tail: the tail moves past every available line in front of it, so it
//    always rests on the oldest line not yet acknowledged.
//
// drain_req is raised while DRAIN_THRESH or more lines are held, asking the
// NVRAM controller to drain its writes. The head-availability test, the
// commit broadcast, the issue rule, nearest-tail ack and nearest-head miss
// matching and the tail movement follow the document. The separate issue
// pointer, the occupancy counters, the threshold value and the one-cycle
// miss answer are this design's own choices.
module tc_controller
  import tc_pkg::*;
#(
  parameter int unsigned ENTRIES      = 64,
  parameter int unsigned DRAIN_THRESH = ENTRIES - ENTRIES / 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // CPU requests (from the request queue)
  input  logic      cpu_valid,
  output logic      cpu_ready,
  input  cpu_req_t  cpu_req,
  // LLC miss / NVRAM ack messages (from the request queue)
  input  logic      msg_valid,
  output logic      msg_ready,
  input  tc_msg_t   msg,
  // global write-back sequence ID
  input  seq_t      wb_seq,
  output logic      wb_issue,
  // write-back toward the NVRAM controller
  output logic      nv_wr_valid,
  input  logic      nv_wr_ready,
  output nv_wr_t    nv_wr,
  output logic      drain_req,
  // answer to the LLC
  output logic      miss_rsp_valid,
  output miss_rsp_t miss_rsp,
  // status and events
  output logic      stall,       // a write waits because the TC is full
  output logic      ack_event,   // an acknowledged line was released
  output logic      ack_orphan,  // an ack matched no sent line
  output logic [$clog2(ENTRIES):0] used,
  // data array
  output logic      ins_en,
  output logic [$clog2(ENTRIES)-1:0] ins_idx,
  output txid_t     ins_txid,
  output seq_t      ins_seq,
  output laddr_t    ins_addr,
  output line_t     ins_data,
  output logic      cmt_en,
  output txid_t     cmt_txid,
  output logic      free_en,
  output logic [$clog2(ENTRIES)-1:0] free_idx,
  output laddr_t    srch_addr,
  input  logic [ENTRIES-1:0] match,
  input  tc_state_e state [ENTRIES],
  output logic [$clog2(ENTRIES)-1:0] rda_idx,
  input  seq_t      rda_seq,
  input  laddr_t    rda_addr,
  input  line_t     rda_data,
  output logic [$clog2(ENTRIES)-1:0] rdb_idx,
  input  seq_t      rdb_seq,
  input  line_t     rdb_data
);

  localparam int unsigned PW = $clog2(ENTRIES);
  localparam int unsigned CW = PW + 1;

  typedef logic [PW-1:0] ptr_t;
  typedef logic [CW-1:0] cnt_t;

  function automatic ptr_t ptr_add(ptr_t p, int unsigned k);
    return ptr_t'((32'(p) + k) % ENTRIES);
  endfunction

  ptr_t head_q, tail_q, iss_q;
  cnt_t used_q;   // lines from tail to head
  cnt_t sent_q;   // lines from tail to the issue pointer

  // ---------------- tail movement ----------------
  cnt_t adv;
  always_comb begin
    logic stop;
    adv  = '0;
    stop = 1'b0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!stop && cnt_t'(i) < sent_q && state[ptr_add(tail_q, i)] == ST_AVAIL)
        adv = adv + 1'b1;
      else
        stop = 1'b1;
    end
  end

  // ---------------- CPU requests ----------------
  logic head_free, ins_fire;
  assign head_free = (used_q < cnt_t'(ENTRIES)) && (state[head_q] == ST_AVAIL);

  always_comb begin
    cpu_ready = 1'b0;
    ins_en    = 1'b0;
    cmt_en    = 1'b0;
    if (cpu_valid) begin
      if (cpu_req.kind == REQ_COMMIT) begin
        cpu_ready = 1'b1;
        cmt_en    = 1'b1;
      end else begin
        cpu_ready = head_free;
        ins_en    = head_free;
      end
    end
  end
  assign ins_fire = ins_en;
  assign ins_idx  = head_q;
  assign ins_txid = cpu_req.txid;
  assign ins_seq  = cpu_req.seq;
  assign ins_addr = cpu_req.addr;
  assign ins_data = cpu_req.data;
  assign cmt_txid = cpu_req.txid;
  assign stall    = cpu_valid && (cpu_req.kind == REQ_WRITE) && !head_free;

  // ---------------- issue toward NVRAM ----------------
  logic iss_fire;
  assign rda_idx     = iss_q;
  assign nv_wr_valid = (sent_q < used_q) && (state[iss_q] == ST_COMMIT) && (rda_seq == wb_seq);
  assign nv_wr.seq   = rda_seq;
  assign nv_wr.addr  = rda_addr;
  assign nv_wr.data  = rda_data;
  assign iss_fire    = nv_wr_valid && nv_wr_ready;
  assign wb_issue    = iss_fire;

  // ---------------- messages: CAM search ----------------
  logic ack_hit, miss_hit;
  ptr_t ack_idx, miss_idx;
  assign srch_addr = msg.addr;
  assign msg_ready = 1'b1;

  always_comb begin
    ack_hit  = 1'b0;
    ack_idx  = tail_q;
    miss_hit = 1'b0;
    miss_idx = tail_q;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      ptr_t idx;
      idx = ptr_add(tail_q, i);
      // nearest the tail among sent, committed lines
      if (!ack_hit && cnt_t'(i) < sent_q && match[idx] && state[idx] == ST_COMMIT) begin
        ack_hit = 1'b1;
        ack_idx = idx;
      end
      // nearest the head among all held lines
      if (cnt_t'(i) < used_q && match[idx]) begin
        miss_hit = 1'b1;
        miss_idx = idx;
      end
    end
  end

  assign free_en    = msg_valid && msg.kind == MSG_ACK && ack_hit;
  assign free_idx   = ack_idx;
  assign ack_event  = free_en;
  assign ack_orphan = msg_valid && msg.kind == MSG_ACK && !ack_hit;
  assign rdb_idx    = miss_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_rsp_valid <= 1'b0;
      miss_rsp       <= '0;
    end else begin
      miss_rsp_valid <= msg_valid && msg.kind == MSG_MISS;
      miss_rsp.hit   <= miss_hit;
      miss_rsp.seq   <= miss_hit ? rdb_seq  : '0;
      miss_rsp.data  <= miss_hit ? rdb_data : '0;
    end
  end

  // ---------------- pointers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      iss_q  <= '0;
      used_q <= '0;
      sent_q <= '0;
    end else begin
      if (ins_fire) head_q <= ptr_add(head_q, 1);
      if (iss_fire) iss_q  <= ptr_add(iss_q, 1);
      tail_q <= ptr_add(tail_q, 32'(adv));
      used_q <= used_q + cnt_t'(ins_fire) - adv;
      sent_q <= sent_q + cnt_t'(iss_fire) - adv;
    end
  end

  assign used      = used_q;
  assign drain_req = (used_q >= cnt_t'(DRAIN_THRESH));

  a_no_orphan_ack: assert property (@(posedge clk) disable iff (!rst_n) !ack_orphan);
  a_sent_le_used:  assert property (@(posedge clk) disable iff (!rst_n) sent_q <= used_q);

endmodule
