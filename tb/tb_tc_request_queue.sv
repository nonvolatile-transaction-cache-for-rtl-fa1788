// Self-checking testbench of tc_request_queue.
//
// The CPU channel gets random writes and commits; a model L1 sends the
// finishing pulse for the writes in program order after a random delay,
// with increasing sequence IDs. A reference queue in the testbench predicts
// the order and contents at the output: every request leaves in order, each
// write carries the ID of its own finishing pulse, and nothing leaves while
// the head write is still unfinished (this is checked every cycle). The
// message channel gets random misses and acks; the testbench checks that
// every message leaves exactly once, acks before a waiting miss, and each
// kind in arrival order.
module tb_tc_request_queue;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cpu_in_valid, cpu_in_ready, coh_fin;
  cpu_req_t cpu_in, cpu_out;
  seq_t coh_seq;
  logic miss_in_valid, miss_in_ready, ack_in_valid, ack_in_ready;
  laddr_t miss_in_addr, ack_in_addr;
  logic cpu_out_valid, cpu_out_ready, msg_out_valid, msg_out_ready;
  tc_msg_t msg_out;
  logic [3:0] unordered;

  int checks = 0, failures = 0, n_block = 0, n_wr = 0, n_cm = 0, n_ack = 0, n_miss = 0;

  tc_request_queue #(.CPU_DEPTH(8), .MSG_DEPTH(4)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  cpu_req_t ref_q[$];       // accepted CPU requests, in order
  int       pend_fin[$];    // index in ref_q of writes not finished yet
  int       base = 0;       // number of requests already popped
  seq_t     ref_seq[int];   // expected seq per request index
  laddr_t   ack_q[$], miss_q[$];
  seq_t     gseq = 1;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    cpu_in_valid = 0; cpu_in = '0; coh_fin = 0; coh_seq = 0;
    miss_in_valid = 0; ack_in_valid = 0; miss_in_addr = 0; ack_in_addr = 0;
    cpu_out_ready = 0; msg_out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // drive inputs
      cpu_in_valid = ($urandom_range(0, 2) == 0);
      cpu_in       = '0;
      cpu_in.kind  = ($urandom_range(0, 3) == 0) ? REQ_COMMIT : REQ_WRITE;
      cpu_in.txid  = txid_t'($urandom);
      cpu_in.seq   = seq_t'($urandom);    // must be ignored on entry
      cpu_in.addr  = laddr_t'({$urandom, $urandom});
      cpu_in.data  = {16{$urandom}};
      coh_fin      = (pend_fin.size() > 0) && ($urandom_range(0, 2) == 0);
      coh_seq      = gseq;
      cpu_out_ready = ($urandom_range(0, 3) != 0);
      ack_in_valid  = ($urandom_range(0, 3) == 0);
      miss_in_valid = ($urandom_range(0, 3) == 0);
      ack_in_addr   = laddr_t'($urandom);
      miss_in_addr  = laddr_t'($urandom);
      msg_out_ready = ($urandom_range(0, 2) != 0);
      #1;
      check(unordered == 4'(pend_fin.size()), "unordered count");
      // output checks
      if (ref_q.size() > 0) begin
        bit head_ready;
        head_ready = (ref_q[0].kind == REQ_COMMIT) || ref_seq.exists(base);
        check(cpu_out_valid == head_ready, "head valid only when ordered");
        if (!head_ready && ref_q[0].kind == REQ_WRITE) n_block++;
        if (cpu_out_valid) begin
          check(cpu_out.kind == ref_q[0].kind && cpu_out.txid == ref_q[0].txid &&
                cpu_out.addr == ref_q[0].addr && cpu_out.data == ref_q[0].data, "head payload");
          if (ref_q[0].kind == REQ_WRITE) check(cpu_out.seq == ref_seq[base], "head sequence ID");
        end
      end else begin
        check(!cpu_out_valid, "empty queue idle");
      end
      if (ack_q.size() > 0) begin
        check(msg_out_valid && msg_out.kind == MSG_ACK && msg_out.addr == ack_q[0], "ack first");
      end else if (miss_q.size() > 0) begin
        check(msg_out_valid && msg_out.kind == MSG_MISS && msg_out.addr == miss_q[0], "miss next");
      end else begin
        check(!msg_out_valid, "no message");
      end
      @(posedge clk);
      // update reference with what happened at this edge
      if (coh_fin) begin
        idx = pend_fin.pop_front();
        ref_seq[idx] = gseq;
        gseq = (gseq == 8'hFF) ? 8'd1 : gseq + 8'd1;
      end
      if (cpu_out_valid && cpu_out_ready) begin
        void'(ref_q.pop_front());
        if (ref_seq.exists(base)) ref_seq.delete(base);
        base++;
        if (cpu_out.kind == REQ_WRITE) n_wr++; else n_cm++;
      end
      if (cpu_in_valid && cpu_in_ready) begin
        ref_q.push_back(cpu_in);
        if (cpu_in.kind == REQ_WRITE) pend_fin.push_back(base + ref_q.size() - 1);
      end
      if (msg_out_valid && msg_out_ready) begin
        if (msg_out.kind == MSG_ACK) begin void'(ack_q.pop_front()); n_ack++; end
        else begin void'(miss_q.pop_front()); n_miss++; end
      end
      if (ack_in_valid && ack_in_ready) ack_q.push_back(ack_in_addr);
      if (miss_in_valid && miss_in_ready) miss_q.push_back(miss_in_addr);
    end
    check(n_block > 0 && n_wr > 0 && n_cm > 0 && n_ack > 0 && n_miss > 0, "all cases seen");
    $display("writes=%0d commits=%0d blocked-cycles=%0d acks=%0d misses=%0d",
             n_wr, n_cm, n_block, n_ack, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
