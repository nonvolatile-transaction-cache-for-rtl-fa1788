// End-to-end testbench of tc_system at its default size (4 cores, 4 KB =
// 64-line transaction cache per core).
//
// Each core runs transactions (TX_BEGIN, 1..8 stores, TX_END) mixed with
// volatile stores in normal mode, on a shared pool of 12 line addresses so
// that cores write the same lines. Testbench models stand in for the parts
// around the persistent path:
//   - L1 controllers: each persistent store gets its coherence finishing
//     pulse after a random delay, in program order per core;
//   - NVRAM controller: accepts write-backs with random back-pressure (with a
//     long stall phase so that TCs fill up), keeps a memory image, returns
//     acknowledgements with the core number after random delays, out of
//     order except for the same address; answers reads from its image;
//   - LLC: random miss lookups and random persistent/volatile evictions.
//
// Checked: every write-back carries the next global sequence ID (the
// testbench numbers the finishing pulses itself, core-index order within a
// cycle) and exactly the address and data of the store that received that
// ID; no line reaches NVRAM before its transaction's TX_END was accepted;
// the first transaction gets TxID 1; every LLC fill from a TC carries data
// of a store to that address and every other fill the NVRAM image; persistent
// evictions never reach memory; at the end each NVRAM line holds the data
// of the last store to it in global order and every TC is empty.
// Mechanisms counted, each must occur: transaction mode switches, TC-full
// stalls, drain requests, write-back hand-over between cores, out-of-order
// acknowledgements, fills served by a TC, dropped persistent evictions,
// sequence-ID holds (the L1 model obeys coh_hold).
module tb_tc_system;
  import tc_pkg::*;

  localparam int NC = 4;
  localparam int NADDR = 12;
  localparam int NTX = 60;           // transactions per core

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0] op_valid, op_ready, l1_wr_valid, l1_wr_pv, coh_fin;
  logic coh_hold;
  cpu_op_e op_kind [NC];
  laddr_t  op_addr [NC], l1_wr_addr [NC];
  line_t   op_data [NC], l1_wr_data [NC];
  logic evict_valid, evict_ready, evict_pv, mem_wr_valid, mem_wr_ready, evict_dropped;
  laddr_t evict_addr, mem_wr_addr, miss_addr, fill_addr, nv_rd_addr, ack_addr;
  line_t evict_data, mem_wr_data, fill_data, nv_rsp_data;
  logic miss_valid, miss_ready, fill_valid, fill_from_tc;
  logic nv_rd_valid, nv_rd_ready, nv_rsp_valid, nv_wr_valid, nv_wr_ready;
  nv_wr_t nv_wr;
  logic [1:0] nv_wr_core, ack_core;
  logic ack_valid, ack_ready, drain_req;
  txid_t mode_txid [NC], next_txid [NC];
  logic [NC-1:0] tc_stall, commit_event, ack_event, ack_orphan;
  logic [6:0] tc_used [NC];
  logic [3:0] tc_unordered [NC];
  seq_t next_seq, wb_seq;

  tc_system dut (.*);

  int checks = 0, failures = 0;
  int n_begin = 0, n_end = 0, n_pst = 0, n_vst = 0, n_stall = 0, n_drain = 0, n_handover = 0;
  int n_ooo = 0, n_fill_tc = 0, n_fill_nv = 0, n_drop = 0, n_fwd = 0, n_nvwr = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic laddr_t pool(int i);
    return laddr_t'(42'h100 + i * 7);
  endfunction

  function automatic seq_t nxt(seq_t s);
    return (s == 8'hFF) ? 8'd1 : s + 8'd1;
  endfunction

  // ---------------- reference bookkeeping ----------------
  typedef struct { laddr_t addr; line_t data; int core; int tx; } store_t;
  store_t pend [NC][$];          // persistent stores waiting for coherence
  store_t by_seq [int];          // store that received each sequence ID
  int     tx_done [NC];          // transactions whose TX_END was accepted
  int     fin_delay [NC];
  seq_t   t_gseq = 1, t_wb = 1;
  int     tx_no [NC];            // current transaction number per core
  line_t  last_data [laddr_t];   // newest persistent data per address (global order)
  line_t  nv_mem [laddr_t];
  typedef struct { laddr_t addr; int core; int due; } out_t;
  out_t   outst [$];
  int     cyc = 0, last_core = -1, n_hold = 0;
  bit     all_cpu_done = 0;
  int     cores_done = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- CPU drivers ----------------
  // present one operation on core c until it is accepted (ready sampled
  // between clock edges)
  task automatic do_op(int c, cpu_op_e k, laddr_t a, line_t d);
    bit r;
    @(negedge clk);
    op_valid[c] = 1; op_kind[c] = k; op_addr[c] = a; op_data[c] = d;
    do begin
      #1 r = op_ready[c];
      @(posedge clk);
      if (!r) @(negedge clk);
    end while (!r);
    #1 op_valid[c] = 0;
  endtask

  for (genvar c = 0; c < NC; c++) begin : g_cpu
    initial begin
      op_valid[c] = 0; op_kind[c] = OP_STORE; op_addr[c] = '0; op_data[c] = '0;
      tx_done[c] = 0; tx_no[c] = 0;
      @(posedge rst_n);
      for (int t = 0; t < NTX; t++) begin
        int k;
        k = $urandom_range(1, 8);
        // a few volatile stores in normal mode
        repeat ($urandom_range(0, 2))
          do_op(c, OP_STORE, pool($urandom_range(0, NADDR - 1)), {16{$urandom}});
        do_op(c, OP_TX_BEGIN, '0, '0);
        tx_no[c] = t;
        if (t == 0) check(mode_txid[c] == 1, "first transaction gets TxID 1");
        check(mode_txid[c] != 0, "transaction mode entered");
        repeat (k) begin
          do_op(c, OP_STORE, pool($urandom_range(0, NADDR - 1)), {32'(c), 32'(t), {14{$urandom}}});
          repeat ($urandom_range(0, 3)) @(posedge clk);
        end
        do_op(c, OP_TX_END, '0, '0);
        tx_done[c] = t + 1;
        check(mode_txid[c] == 0, "normal mode after TX_END");
        repeat ($urandom_range(0, 20)) @(posedge clk);
      end
      cores_done++;
    end
  end

  // count operations and record persistent stores (sampled before the edge)
  always @(negedge clk) if (rst_n) begin
    #1;
    for (int c = 0; c < NC; c++) begin
      if (op_valid[c] && op_ready[c]) begin
        if (op_kind[c] == OP_TX_BEGIN) n_begin++;
        if (op_kind[c] == OP_TX_END && mode_txid[c] != 0) n_end++;
      end
      if (l1_wr_valid[c]) begin
        if (l1_wr_pv[c]) begin
          store_t s;
          s.addr = l1_wr_addr[c]; s.data = l1_wr_data[c]; s.core = c; s.tx = tx_no[c];
          pend[c].push_back(s);
          n_pst++;
        end else n_vst++;
      end
      if (tc_stall[c]) n_stall++;
    end
    if (drain_req) n_drain++;
    if (coh_hold) n_hold++;
  end

  // ---------------- L1 coherence model ----------------
  initial begin
    coh_fin = '0;
    for (int c = 0; c < NC; c++) fin_delay[c] = 0;
    forever begin
      @(negedge clk);
      coh_fin = '0;
      for (int c = 0; c < NC; c++) begin
        // stores are recorded after this point of the cycle, so a store is
        // finished one cycle after its acceptance at the earliest
        if (pend[c].size() > 0 && !coh_hold && $urandom_range(0, 3) == 0) begin
          store_t s;
          coh_fin[c] = 1;
          s = pend[c].pop_front();
          by_seq[int'(t_gseq)] = s;
          last_data[s.addr] = s.data;
          t_gseq = nxt(t_gseq);
        end
      end
    end
  end

  // ---------------- NVRAM controller model ----------------
  bit stall_phase = 0;
  initial begin
    nv_wr_ready = 0; ack_valid = 0; ack_core = 0; ack_addr = 0;
    nv_rd_ready = 0; nv_rsp_valid = 0; nv_rsp_data = 0;
    forever begin
      @(negedge clk);
      cyc++;
      // a long back-pressure phase early in the run lets the TCs fill up
      stall_phase = (cyc > 300 && cyc < 2300);
      nv_wr_ready = !stall_phase && ($urandom_range(0, 2) != 0);
      ack_valid = 0;
      if (outst.size() > 0) begin
        int k;
        k = $urandom_range(0, outst.size() - 1);
        for (int j = 0; j < k; j++) if (outst[j].addr == outst[k].addr) begin k = j; break; end
        if (outst[k].due <= cyc) begin
          ack_valid = 1; ack_addr = outst[k].addr; ack_core = 2'(outst[k].core);
          if (k != 0) n_ooo++;
        end
      end
      #1;
      check(ack_orphan == '0, "no orphan ack");
      if (nv_wr_valid) begin
        check(nv_wr.seq == t_wb, "write-back in global sequence order");
        if (by_seq.exists(int'(nv_wr.seq))) begin
          store_t s;
          s = by_seq[int'(nv_wr.seq)];
          check(nv_wr.addr == s.addr && nv_wr.data == s.data && int'(nv_wr_core) == s.core,
                "write-back is the store with that ID");
          check(tx_done[s.core] > s.tx, "no write-back before TX_END");
        end else check(0, "write-back of an unknown ID");
      end
      if (nv_wr_valid && nv_wr_ready) begin
        out_t o;
        nv_mem[nv_wr.addr] = nv_wr.data;
        o.addr = nv_wr.addr; o.core = int'(nv_wr_core); o.due = cyc + $urandom_range(3, 60);
        outst.push_back(o);
        if (last_core >= 0 && last_core != int'(nv_wr_core)) n_handover++;
        last_core = int'(nv_wr_core);
        by_seq.delete(int'(nv_wr.seq));
        t_wb = nxt(t_wb);
        n_nvwr++;
      end
      if (ack_valid && ack_ready) begin
        for (int j = 0; j < outst.size(); j++)
          if (outst[j].addr == ack_addr && outst[j].core == int'(ack_core)) begin outst.delete(j); break; end
      end
    end
  end

  // NVRAM read path for LLC misses: fixed latency, always ready
  laddr_t rd_a; int rd_due = -1;
  initial begin
    forever begin
      @(negedge clk);
      nv_rd_ready = (rd_due < 0);
      nv_rsp_valid = 0;
      if (rd_due >= 0 && cyc >= rd_due) begin
        nv_rsp_valid = 1;
        nv_rsp_data = nv_mem.exists(rd_a) ? nv_mem[rd_a] : '0;
        rd_due = -1;
      end
      #1;
      if (nv_rd_valid && nv_rd_ready) begin rd_a = nv_rd_addr; rd_due = cyc + 8; end
    end
  end

  // ---------------- LLC model ----------------
  initial begin
    miss_valid = 0; miss_addr = 0;
    evict_valid = 0; evict_pv = 0; evict_addr = 0; evict_data = 0; mem_wr_ready = 1;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      miss_valid = ($urandom_range(0, 9) == 0);
      miss_addr  = pool($urandom_range(0, NADDR + 3));
      evict_valid = ($urandom_range(0, 7) == 0);
      evict_pv    = 1'($urandom_range(0, 1));
      evict_addr  = pool($urandom_range(0, NADDR - 1));
      evict_data  = {16{$urandom}};
      mem_wr_ready = 1'($urandom_range(0, 1));
      #1;
      if (evict_valid && evict_pv) begin
        check(!mem_wr_valid && evict_dropped, "persistent eviction dropped");
        n_drop++;
      end
      if (evict_valid && !evict_pv) begin
        check(mem_wr_valid && mem_wr_addr == evict_addr, "volatile eviction kept");
        n_fwd++;
      end
      if (fill_valid) begin
        if (fill_from_tc) begin
          bit seen;
          seen = 0;
          foreach (by_seq[i]) if (by_seq[i].addr == fill_addr && by_seq[i].data == fill_data) seen = 1;
          if (nv_mem.exists(fill_addr) && nv_mem[fill_addr] == fill_data) seen = 1;
          check(seen, "TC fill carries a store to that line");
          n_fill_tc++;
        end else n_fill_nv++;
      end
    end
  end

  // ---------------- run and final checks ----------------
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (cores_done == NC);
    // let everything drain
    while (outst.size() > 0 || by_seq.size() > 0 || pend[0].size() + pend[1].size() +
           pend[2].size() + pend[3].size() > 0) @(posedge clk);
    repeat (20) @(posedge clk);
    #1;
    for (int c = 0; c < NC; c++) check(tc_used[c] == 0, "TC empty at the end");
    foreach (last_data[a]) check(nv_mem.exists(a) && nv_mem[a] == last_data[a], "NVRAM holds the newest data");
    check(n_begin == NC * NTX && n_end == NC * NTX, "all transactions ran");
    check(n_pst > 0 && n_vst > 0, "persistent and volatile stores");
    check(n_stall > 0, "TC-full stall happened");
    check(n_drain > 0, "drain request happened");
    check(n_handover > 0, "write-back passed between cores");
    check(n_ooo > 0, "out-of-order acknowledgement happened");
    check(n_fill_tc > 0 && n_fill_nv > 0, "fills from TC and from NVRAM");
    check(n_drop > 0 && n_fwd > 0, "dropped and kept evictions");
    check(n_hold > 0, "sequence ID hold happened");
    $display("tx=%0d/%0d pstores=%0d vstores=%0d nv-writes=%0d stall-cycles=%0d drain-cycles=%0d handovers=%0d ooo-acks=%0d fills tc/nv=%0d/%0d evictions dropped/kept=%0d/%0d seq-hold=%0d cycles=%0d",
             n_begin, n_end, n_pst, n_vst, n_nvwr, n_stall, n_drain, n_handover, n_ooo,
             n_fill_tc, n_fill_nv, n_drop, n_fwd, n_hold, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
