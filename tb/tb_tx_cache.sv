// Self-checking random testbench of one transaction cache (tx_cache).
//
// The testbench plays the CPU (transactions of 1..12 persistent writes to a
// small set of line addresses, each closed by a commit), the L1 controller
// (finishing pulses in program order after random delays, stamping
// increasing sequence IDs and sometimes skipping IDs that stand for writes
// of other cores), the global write-back counter (advanced on wb_issue, and
// by the testbench itself for the skipped IDs after a delay), the NVRAM
// controller (random acceptance, acknowledgements after random delays and
// out of order, but in issue order for one address) and the LLC (random
// miss lookups).
//
// A reference list of the held lines in FIFO order predicts: which line
// each NVRAM write must be (the oldest committed, not yet sent line, never a
// line of an uncommitted transaction) and that its SeqID equals the
// write-back ID; the answer to each miss (newest held copy, or no hit); and
// that all lines are gone when everything has been acknowledged. The TC is
// kept small and NVRAM slow so that the TC fills up and writes stall.
module tb_tx_cache;
  import tc_pkg::*;

  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cpu_in_valid, cpu_in_ready, coh_fin;
  cpu_req_t cpu_in;
  seq_t coh_seq, wb_seq;
  logic miss_in_valid, miss_in_ready, ack_in_valid, ack_in_ready;
  laddr_t miss_in_addr, ack_in_addr;
  logic wb_issue, nv_wr_valid, nv_wr_ready, drain_req, miss_rsp_valid;
  nv_wr_t nv_wr;
  miss_rsp_t miss_rsp;
  logic stall, commit_event, ack_event, ack_orphan;
  logic [4:0] used;
  logic [3:0] unordered;

  tx_cache #(.ENTRIES(N), .CPU_DEPTH(8), .MSG_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  int n_wr = 0, n_stall = 0, n_drain = 0, n_hit = 0, n_nohit = 0, n_ooo = 0, n_phantom_wait = 0;
  int n_commit = 0;
  bit h_issue, h_fin, h_cpu;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct {
    laddr_t addr; line_t data; seq_t seq; txid_t txid;
    bit committed; bit sent; bit acked;
  } line_rec_t;

  line_rec_t lines[$];              // held lines, FIFO order
  cpu_req_t  accepted[$];           // CPU requests accepted, not yet served
  int        pend_fin;              // accepted writes without a finishing pulse
  seq_t      stamp_of[$];           // IDs given to accepted writes, in order
  seq_t      gseq = 1, r_wb = 1;
  bit        phantom[int];          // IDs taken by other cores
  int        phantom_delay = 0;
  typedef struct { laddr_t addr; int due; } nv_out_t;
  nv_out_t   nv_out[$];             // sent, not yet acknowledged writes
  int        cyc = 0;
  bit        exp_valid = 0;
  miss_rsp_t exp_rsp;

  // CPU stimulus state
  txid_t cur_tx = 1;
  int    left_in_tx = 0;
  int    n_tx_done = 0;
  localparam int NTX = 120;

  assign wb_seq = r_wb;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic seq_t nxt(seq_t s);
    return (s == 8'hFF) ? 8'd1 : s + 8'd1;
  endfunction

  initial begin
    cpu_in_valid = 0; cpu_in = '0; coh_fin = 0; coh_seq = 0;
    miss_in_valid = 0; miss_in_addr = 0; ack_in_valid = 0; ack_in_addr = 0;
    nv_wr_ready = 0; pend_fin = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (cyc < 60000) begin
      @(negedge clk);
      cyc++;
      // ---- CPU ----
      if (n_tx_done < NTX && $urandom_range(0, 1)) begin
        cpu_in_valid = 1;
        cpu_in = '0;
        if (left_in_tx == 0) left_in_tx = $urandom_range(1, 12);
        cpu_in.txid = cur_tx;
        cpu_in.addr = laddr_t'($urandom_range(0, 7));
        cpu_in.data = {16{$urandom}};
        cpu_in.kind = (left_in_tx == 1) ? REQ_COMMIT : REQ_WRITE;
      end else begin
        cpu_in_valid = 0;
      end
      // ---- L1 finishing pulses, with IDs skipped for other cores ----
      coh_fin = 0;
      if (pend_fin > 0 && $urandom_range(0, 2) == 0) begin
        if ($urandom_range(0, 4) == 0) begin
          phantom[gseq] = 1;
          gseq = nxt(gseq);
        end
        coh_fin = 1;
        coh_seq = gseq;
      end
      // ---- NVRAM and LLC ----
      nv_wr_ready = ($urandom_range(0, 3) == 0);
      ack_in_valid = 0;
      if (nv_out.size() > 0) begin
        int k;
        k = $urandom_range(0, nv_out.size() - 1);
        // same address must be acknowledged in issue order
        for (int j = 0; j < k; j++) if (nv_out[j].addr == nv_out[k].addr) begin k = j; break; end
        if (nv_out[k].due <= cyc) begin
          ack_in_valid = 1;
          ack_in_addr = nv_out[k].addr;
        end
      end
      miss_in_valid = ($urandom_range(0, 5) == 0);
      miss_in_addr  = laddr_t'($urandom_range(0, 9));
      #1;
      // ---- checks before the edge ----
      if (stall) n_stall++;
      if (drain_req) n_drain++;
      check(!ack_orphan, "no orphan ack");
      if (exp_valid) begin
        check(miss_rsp_valid, "miss answer timing");
        check(miss_rsp.hit == exp_rsp.hit, "miss hit");
        if (exp_rsp.hit) begin
          check(miss_rsp.data == exp_rsp.data && miss_rsp.seq == exp_rsp.seq, "miss newest copy");
          n_hit++;
        end else n_nohit++;
      end else check(!miss_rsp_valid, "no spurious miss answer");
      exp_valid = 0;
      if (nv_wr_valid) begin
        int f;
        f = -1;
        foreach (lines[i]) if (!lines[i].sent) begin f = i; break; end
        check(f >= 0 && lines[f].committed, "only committed lines leave");
        if (f >= 0) check(nv_wr.addr == lines[f].addr && nv_wr.data == lines[f].data &&
                          nv_wr.seq == lines[f].seq, "FIFO write-back order");
        check(nv_wr.seq == r_wb, "write-back ID gate");
      end
      if (phantom.exists(r_wb)) n_phantom_wait++;
      // ---- model updates for this edge ----
      if (dut.q_msg_valid && dut.q_msg_ready) begin
        if (dut.q_msg.kind == MSG_MISS) begin
          exp_valid = 1;
          exp_rsp = '0;
          foreach (lines[i])
            if (!lines[i].acked && lines[i].addr == dut.q_msg.addr) begin
              exp_rsp.hit = 1; exp_rsp.data = lines[i].data; exp_rsp.seq = lines[i].seq;
            end
        end else begin
          bit found;
          found = 0;
          foreach (lines[i])
            if (!found && lines[i].sent && !lines[i].acked && lines[i].addr == dut.q_msg.addr) begin
              lines[i].acked = 1; found = 1;
            end
          check(found, "ack for a sent line");
        end
      end
      if (dut.q_cpu_valid && dut.q_cpu_ready) begin
        cpu_req_t r;
        r = accepted.pop_front();
        if (r.kind == REQ_WRITE) begin
          line_rec_t l;
          l.addr = r.addr; l.data = r.data; l.txid = r.txid; l.seq = stamp_of.pop_front();
          l.committed = 0; l.sent = 0; l.acked = 0;
          lines.push_back(l);
          n_wr++;
        end else begin
          foreach (lines[i]) if (lines[i].txid == r.txid && !lines[i].committed) lines[i].committed = 1;
          n_commit++;
        end
      end
      if (nv_wr_valid && nv_wr_ready) begin
        nv_out_t o;
        foreach (lines[i]) if (!lines[i].sent) begin lines[i].sent = 1; break; end
        o.addr = nv_wr.addr; o.due = cyc + $urandom_range(5, 40);
        nv_out.push_back(o);
        if (nv_out.size() > 1 && $urandom_range(0, 1)) n_ooo++;
      end
      if (ack_in_valid && ack_in_ready) begin
        for (int j = 0; j < nv_out.size(); j++)
          if (nv_out[j].addr == ack_in_addr) begin nv_out.delete(j); break; end
      end
      while (lines.size() > 0 && lines[0].acked) void'(lines.pop_front());
      // sample this cycle's handshakes before the edge, apply them after it
      h_issue = wb_issue;
      h_fin   = coh_fin;
      h_cpu   = cpu_in_valid && cpu_in_ready;
      @(posedge clk);
      #1;
      if (h_issue) r_wb = nxt(r_wb);
      else if (phantom.exists(r_wb)) begin
        if (phantom_delay == 0) phantom_delay = $urandom_range(1, 10);
        else if (--phantom_delay == 0) begin phantom.delete(r_wb); r_wb = nxt(r_wb); end
      end
      if (h_fin) begin
        stamp_of.push_back(gseq);
        gseq = nxt(gseq);
        pend_fin--;
      end
      if (h_cpu) begin
        accepted.push_back(cpu_in);
        if (cpu_in.kind == REQ_WRITE) pend_fin++;
        left_in_tx--;
        if (cpu_in.kind == REQ_COMMIT) begin
          cur_tx = (cur_tx == 6'h3F) ? 6'd1 : cur_tx + 6'd1;
          n_tx_done++;
        end
      end
      if (n_tx_done == NTX && accepted.size() == 0 && lines.size() == 0 && nv_out.size() == 0)
        break;
    end
    repeat (3) @(posedge clk);
    #1;
    check(n_tx_done == NTX && lines.size() == 0, "all transactions written back");
    check(used == 0, "TC empty at the end");
    check(n_stall > 0, "TC became full");
    check(n_drain > 0, "drain request raised");
    check(n_hit > 0 && n_nohit > 0, "miss hits and misses seen");
    check(n_phantom_wait > 0, "write-back waited for another core's ID");
    $display("tx=%0d writes=%0d commits=%0d stall-cycles=%0d drain-cycles=%0d hits=%0d no-hits=%0d gate-waits=%0d cycles=%0d",
             n_tx_done, n_wr, n_commit, n_stall, n_drain, n_hit, n_nohit, n_phantom_wait, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
