// Directed, self-checking testbench of tc_controller (with a tc_data_array
// of four lines behind it).
//
// Walks through the life of TC lines step by step and checks the outputs,
// with expected values written out by hand:
//   - the funds-transfer example: A=0 and B=20 written in transaction 1,
//     kept back from NVRAM until the commit, then sent A first, B second;
//   - the write-back gate: a committed line waits while the global
//     write-back ID is not its own;
//   - out-of-order acks: B acknowledged before A frees B but leaves the tail
//     (and the occupancy) until A is acknowledged too;
//   - LLC misses: the newest of two copies of a line is returned, the answer
//     comes exactly one cycle after the lookup, a missing line gives no hit;
//   - an ack releases the older of two same-address copies (nearest tail);
//   - full TC: a fifth write stalls until a line is released; drain_req
//     follows the occupancy threshold.
module tb_tc_controller;
  import tc_pkg::*;

  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cpu_valid, cpu_ready, msg_valid, msg_ready, wb_issue;
  cpu_req_t cpu_req;
  tc_msg_t msg;
  seq_t wb_seq;
  logic nv_wr_valid, nv_wr_ready, drain_req, miss_rsp_valid;
  nv_wr_t nv_wr;
  miss_rsp_t miss_rsp;
  logic stall, ack_event, ack_orphan;
  logic [2:0] used;
  logic ins_en, cmt_en, free_en;
  logic [1:0] ins_idx, free_idx, rda_idx, rdb_idx;
  txid_t ins_txid, cmt_txid;
  seq_t ins_seq, rda_seq, rdb_seq;
  laddr_t ins_addr, srch_addr, rda_addr;
  line_t ins_data, rda_data, rdb_data;
  logic [N-1:0] match;
  tc_state_e state [N];

  tc_controller #(.ENTRIES(N), .DRAIN_THRESH(3)) dut (.*);
  tc_data_array #(.ENTRIES(N)) u_array (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam laddr_t A = 'hAAAA, B = 'hBBBB, C = 'hCCCC;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one CPU request for one cycle; returns whether it was accepted
  task automatic cpu(cpu_req_kind_e k, txid_t t, seq_t s, laddr_t a, int d, output bit acc);
    @(negedge clk);
    cpu_valid = 1; cpu_req = '0;
    cpu_req.kind = k; cpu_req.txid = t; cpu_req.seq = s; cpu_req.addr = a; cpu_req.data = line_t'(d);
    #1 acc = cpu_ready;
    @(posedge clk);
    #1 cpu_valid = 0;
  endtask

  // send one message; for a miss, check the answer of the next cycle
  task automatic send(msg_kind_e k, laddr_t a, bit exp_hit, int exp_data, seq_t exp_seq);
    @(negedge clk);
    msg_valid = 1; msg.kind = k; msg.addr = a;
    @(posedge clk);
    #1 msg_valid = 0;
    if (k == MSG_MISS) begin
      check(miss_rsp_valid, "miss answered one cycle later");
      check(miss_rsp.hit == exp_hit, "miss hit flag");
      if (exp_hit) check(miss_rsp.data == line_t'(exp_data) && miss_rsp.seq == exp_seq, "miss data/seq");
    end else begin
      check(!miss_rsp_valid, "ack gives no miss answer");
    end
  endtask

  // take one NVRAM write, expecting address, data and sequence ID
  task automatic take(laddr_t a, int d, seq_t s);
    @(negedge clk);
    #1;
    check(nv_wr_valid, "write-back offered");
    check(nv_wr.addr == a && nv_wr.data == line_t'(d) && nv_wr.seq == s, "write-back line");
    nv_wr_ready = 1;
    #1 check(wb_issue, "wb_issue pulse");
    @(posedge clk);
    #1 nv_wr_ready = 0;
    wb_seq = seq_inc(wb_seq);
  endtask

  initial begin
    bit acc;
    cpu_valid = 0; cpu_req = '0; msg_valid = 0; msg = '0; wb_seq = 1; nv_wr_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    check(used == 0 && !nv_wr_valid && !drain_req, "empty after reset");

    // transaction 1: A=0, B=20 (the transfer example)
    cpu(REQ_WRITE, 1, 1, A, 0, acc);  check(acc, "write A accepted");
    cpu(REQ_WRITE, 1, 2, B, 20, acc); check(acc, "write B accepted");
    check(used == 2, "two lines held");
    check(state[0] == ST_ACTIVE && state[1] == ST_ACTIVE, "lines active");
    repeat (3) begin @(negedge clk); #1 check(!nv_wr_valid, "active lines stay in TC"); end
    send(MSG_MISS, A, 1, 0, 1);        // readable before commit, newest copy
    send(MSG_MISS, C, 0, 0, 0);
    cpu(REQ_COMMIT, 1, 0, '0, 0, acc); check(acc, "commit accepted");
    check(state[0] == ST_COMMIT && state[1] == ST_COMMIT, "lines committed");

    // write-back gate: pretend another core owns ID 1 first
    wb_seq = 8'd9;
    repeat (2) begin @(negedge clk); #1 check(!nv_wr_valid, "gate holds line back"); end
    wb_seq = 8'd1;
    take(A, 0, 1);
    take(B, 20, 2);
    @(negedge clk); #1 check(!nv_wr_valid, "nothing more to send");

    // acknowledgements out of order: B first
    send(MSG_ACK, B, 0, 0, 0);
    check(state[1] == ST_AVAIL && state[0] == ST_COMMIT, "B released, A held");
    @(negedge clk); #1 check(used == 2, "tail waits on A");
    send(MSG_ACK, A, 0, 0, 0);
    @(posedge clk); #1 check(used == 0, "tail moved past A and B");
    send(MSG_MISS, A, 0, 0, 0);

    // transaction 2: two copies of A, then fill the TC
    cpu(REQ_WRITE, 2, 3, A, 100, acc); check(acc, "A v1");
    cpu(REQ_WRITE, 2, 4, A, 101, acc); check(acc, "A v2");
    send(MSG_MISS, A, 1, 101, 4);     // newest copy
    cpu(REQ_WRITE, 2, 5, C, 7, acc);  check(acc, "C");
    @(negedge clk); #1 check(drain_req, "drain request at threshold");
    cpu(REQ_WRITE, 2, 6, B, 8, acc);  check(acc, "B");
    check(used == 4, "TC full");
    @(negedge clk);
    cpu_valid = 1; cpu_req = '0; cpu_req.kind = REQ_WRITE; cpu_req.txid = 3; cpu_req.seq = 7;
    cpu_req.addr = C; cpu_req.data = line_t'(9);
    #1 check(!cpu_ready && stall, "write stalls on a full TC");
    @(posedge clk); #1 cpu_valid = 0;
    cpu(REQ_COMMIT, 2, 0, '0, 0, acc);
    take(A, 100, 3);
    take(A, 101, 4);
    send(MSG_ACK, A, 0, 0, 0);        // releases the older copy
    send(MSG_MISS, A, 1, 101, 4);     // the newer one is still there
    check(state[2] == ST_AVAIL && state[3] == ST_COMMIT, "nearest-tail ack");
    @(posedge clk); #1 check(used == 3, "one line released");
    cpu(REQ_WRITE, 3, 7, C, 9, acc);  check(acc, "stalled write now accepted");
    check(state[2] == ST_ACTIVE, "new line at the wrapped head");
    send(MSG_MISS, C, 1, 9, 7);
    send(MSG_ACK, A, 0, 0, 0);
    send(MSG_MISS, A, 0, 0, 0);
    check(!ack_orphan, "no orphan ack");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
