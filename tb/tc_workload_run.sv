// Workload harness: one tc_system of a given TC size, driven by the write
// patterns of five persistent data-structure benchmarks, one after another.
//
// Used by tb_tc_workloads, which instantiates it once per TC size. For each
// workload every core runs NTX transactions; a transaction's number of line
// writes is drawn from the workload's range, and its addresses from a shared
// pool of line addresses (so cores conflict):
//   graph      2..4   lines (edge node, adjacency list pointer, counters)
//   rbtree     2..14  lines (new node plus recoloured/rotated ancestors)
//   sps        2      lines (the two swapped array elements)
//   btree      3..12  lines (leaf, split node, parents)
//   hashtable  2..3   lines (bucket head, entry)
// These line counts are estimates of what such benchmarks touch with 64-bit
// keys and values, not measured traces. The upper bound stays below 16 so that
// every transaction fits into the smallest (1 KB, 16-line) TC.
//
// Around the DUT: L1 models give finishing signals in program order after
// random delays and obey coh_hold; the NVRAM model accepts a write about
// every fourth cycle and acknowledges after 20..60 cycles, out of order
// except for the same address, and keeps a memory image. No LLC traffic.
//
// Checks per write-back: global sequence order, the exact store of that ID,
// nothing before its transaction's TX_END. At the end of each workload,
// after the TCs have emptied: each NVRAM line holds the last store to it in
// global order. Reports per workload the cycles taken and the cycles any
// core spent stalled on a full TC (done rises when all are finished).
module tc_workload_run
  import tc_pkg::*;
#(
  parameter int unsigned TC_BYTES = 4096,
  parameter int          NTX      = 25
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stall_cyc [5],
  output int   run_cyc [5]
);

  localparam int NC = 4;
  localparam int ENT = TC_BYTES / LINE_BYTES;
  localparam int NADDR = 48;

  logic rst_n = 1'b0;
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
  logic [$clog2(ENT):0] tc_used [NC];
  logic [3:0] tc_unordered [NC];
  seq_t next_seq, wb_seq;

  tc_system #(.TC_BYTES(TC_BYTES)) dut (.*);

  assign evict_valid = 1'b0;
  assign evict_pv    = 1'b0;
  assign evict_addr  = '0;
  assign evict_data  = '0;
  assign mem_wr_ready = 1'b1;
  assign miss_valid  = 1'b0;
  assign miss_addr   = '0;
  assign nv_rd_ready = 1'b1;
  assign nv_rsp_valid = 1'b0;
  assign nv_rsp_data = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d B] %s at %0t", TC_BYTES, what, $time);
    end
  endtask

  function automatic seq_t nxt(seq_t s);
    return (s == 8'hFF) ? 8'd1 : s + 8'd1;
  endfunction

  function automatic laddr_t pool(int i);
    return laddr_t'(42'h2000 + i * 3);
  endfunction

  typedef struct { laddr_t addr; line_t data; int core; int tx; } store_t;
  store_t pend [NC][$];
  store_t by_seq [int];
  int     tx_done [NC], tx_no [NC];
  seq_t   t_gseq = 1, t_wb = 1;
  line_t  last_data [laddr_t];
  line_t  nv_mem [laddr_t];
  typedef struct { laddr_t addr; int core; int due; } out_t;
  out_t   outst [$];
  int     cyc = 0, wl = 0, cores_done = 0, nstall = 0;
  bit     go = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < 5; i++) begin stall_cyc[i] = 0; run_cyc[i] = 0; end
  end

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

  function automatic int tx_len(int w);
    case (w)
      0: return $urandom_range(2, 4);    // graph
      1: return $urandom_range(2, 14);   // rbtree
      2: return 2;                       // sps
      3: return $urandom_range(3, 12);   // btree
      default: return $urandom_range(2, 3);  // hashtable
    endcase
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_cpu
    initial begin
      op_valid[c] = 0; op_kind[c] = OP_STORE; op_addr[c] = '0; op_data[c] = '0;
      tx_done[c] = 0; tx_no[c] = 0;
      for (int w = 0; w < 5; w++) begin
        wait (go && wl == w);
        for (int t = 0; t < NTX; t++) begin
          int n;
          n = tx_len(w);
          do_op(c, OP_TX_BEGIN, '0, '0);
          tx_no[c] = w * NTX + t;
          repeat (n) begin
            do_op(c, OP_STORE, pool($urandom_range(0, NADDR - 1)), {32'(c), 32'(w * NTX + t), {14{$urandom}}});
            repeat ($urandom_range(0, 1)) @(posedge clk);
          end
          do_op(c, OP_TX_END, '0, '0);
          tx_done[c] = w * NTX + t + 1;
          repeat ($urandom_range(0, 4)) @(posedge clk);
        end
        cores_done++;
        wait (wl != w);
      end
    end
  end

  // persistent stores and stall cycles, sampled between edges
  always @(negedge clk) if (rst_n) begin
    #1;
    for (int c = 0; c < NC; c++) begin
      if (l1_wr_valid[c] && l1_wr_pv[c]) begin
        store_t s;
        s.addr = l1_wr_addr[c]; s.data = l1_wr_data[c]; s.core = c; s.tx = tx_no[c];
        pend[c].push_back(s);
      end
      if (tc_stall[c]) nstall++;
    end
  end

  // L1 finishing signals
  initial begin
    coh_fin = '0;
    forever begin
      @(negedge clk);
      coh_fin = '0;
      for (int c = 0; c < NC; c++)
        if (pend[c].size() > 0 && !coh_hold && $urandom_range(0, 2) == 0) begin
          store_t s;
          coh_fin[c] = 1;
          s = pend[c].pop_front();
          by_seq[int'(t_gseq)] = s;
          last_data[s.addr] = s.data;
          t_gseq = nxt(t_gseq);
        end
    end
  end

  // NVRAM controller model
  initial begin
    nv_wr_ready = 0; ack_valid = 0; ack_core = 0; ack_addr = 0;
    forever begin
      @(negedge clk);
      cyc++;
      nv_wr_ready = ($urandom_range(0, 3) == 0);
      ack_valid = 0;
      if (outst.size() > 0) begin
        int k;
        k = $urandom_range(0, outst.size() - 1);
        for (int j = 0; j < k; j++) if (outst[j].addr == outst[k].addr) begin k = j; break; end
        if (outst[k].due <= cyc) begin
          ack_valid = 1; ack_addr = outst[k].addr; ack_core = 2'(outst[k].core);
        end
      end
      #1;
      if (rst_n) check(ack_orphan == '0, "no orphan ack");
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
        o.addr = nv_wr.addr; o.core = int'(nv_wr_core); o.due = cyc + $urandom_range(20, 60);
        outst.push_back(o);
        by_seq.delete(int'(nv_wr.seq));
        t_wb = nxt(t_wb);
      end
      if (ack_valid && ack_ready)
        for (int j = 0; j < outst.size(); j++)
          if (outst[j].addr == ack_addr && outst[j].core == int'(ack_core)) begin outst.delete(j); break; end
    end
  end

  // sequencing of the workloads
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    go = 1;
    for (int w = 0; w < 5; w++) begin
      int c0, s0;
      c0 = cyc; s0 = nstall;
      wait (cores_done == NC * (w + 1));
      while (outst.size() > 0 || by_seq.size() > 0 ||
             pend[0].size() + pend[1].size() + pend[2].size() + pend[3].size() > 0) @(posedge clk);
      repeat (5) @(posedge clk);
      #1;
      run_cyc[w] = cyc - c0;
      stall_cyc[w] = nstall - s0;
      for (int c = 0; c < NC; c++) check(tc_used[c] == 0, "TC empty after the workload");
      foreach (last_data[a]) check(nv_mem.exists(a) && nv_mem[a] == last_data[a], "NVRAM holds the newest data");
      wl = w + 1;
    end
    done = 1;
  end

endmodule
