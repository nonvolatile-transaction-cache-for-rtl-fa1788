// Self-checking testbench of llc_persist_ext.
//
// Evictions: random persistent and volatile evictions with random memory
// back-pressure; a persistent one must be dropped (accepted, never sent to
// memory), a volatile one forwarded unchanged.
// Misses: 300 lookups. For each, the four TC models answer after random
// delays, each with a random hit and a distinct random sequence ID, and the
// NVRAM model answers after its own delay. Each miss uses a random seq_ref
// (next global ID) and TC IDs drawn as distinct distances back from it, so
// that the IDs often wrap past 255. The expected fill is computed in the
// testbench (TC copy with the most recent SeqID, i.e. the smallest distance,
// or the NVRAM data when no TC hits) and must appear exactly one cycle after
// the last answer.
module tb_llc_persist_ext;
  import tc_pkg::*;

  localparam int NC = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic evict_valid, evict_ready, evict_pv, mem_wr_valid, mem_wr_ready, evict_dropped;
  laddr_t evict_addr, mem_wr_addr, miss_addr, tc_miss_addr, nv_rd_addr, fill_addr;
  line_t evict_data, mem_wr_data, nv_rsp_data, fill_data;
  logic miss_valid, miss_ready, nv_rd_valid, nv_rd_ready, nv_rsp_valid, fill_valid, fill_from_tc;
  logic [NC-1:0] tc_miss_valid, tc_miss_ready, tc_rsp_valid;
  miss_rsp_t tc_rsp [NC];
  seq_t seq_ref;

  llc_persist_ext #(.NCORES(NC)) dut (.*);

  int checks = 0, failures = 0, n_drop = 0, n_fwd = 0, n_from_tc = 0, n_from_nv = 0, n_multi = 0, n_wrap = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // evictions, checked every cycle
  always @(negedge clk) if (rst_n) begin
    evict_valid  = $urandom_range(0, 1);
    evict_pv     = $urandom_range(0, 1);
    evict_addr   = laddr_t'({$urandom, $urandom});
    evict_data   = {16{$urandom}};
    mem_wr_ready = $urandom_range(0, 1);
    #1;
    if (evict_valid) begin
      if (evict_pv) begin
        check(!mem_wr_valid && evict_dropped && evict_ready, "persistent eviction dropped");
        n_drop++;
      end else begin
        check(mem_wr_valid && !evict_dropped && evict_ready == mem_wr_ready &&
              mem_wr_addr == evict_addr && mem_wr_data == evict_data, "volatile eviction forwarded");
        n_fwd++;
      end
    end else check(!mem_wr_valid && !evict_dropped, "no eviction");
  end

  initial begin
    evict_valid = 0; evict_pv = 0; evict_addr = 0; evict_data = 0; mem_wr_ready = 0;
    miss_valid = 0; miss_addr = 0; tc_miss_ready = 0; tc_rsp_valid = 0; nv_rd_ready = 0;
    nv_rsp_valid = 0; nv_rsp_data = 0; seq_ref = 1;
    for (int c = 0; c < NC; c++) tc_rsp[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 300; m++) begin
      miss_rsp_t ans [NC];
      int due [NC];
      int nv_due, last, cyc, nhit, dback, best_d;
      line_t nv_d, exp_d;
      bit exp_tc;
      seq_t best;
      laddr_t a;
      a = laddr_t'({$urandom, $urandom});
      nv_d = {16{$urandom}};
      nv_due = $urandom_range(2, 12);
      last = nv_due;
      exp_tc = 0; best = 0; exp_d = nv_d; nhit = 0; best_d = 1000;
      seq_ref = seq_t'($urandom_range(1, 255));
      for (int c = 0; c < NC; c++) begin
        ans[c].hit  = ($urandom_range(0, 2) == 0);
        dback = c + 1 + 4 * $urandom_range(0, 60);
        ans[c].seq  = seq_t'(((int'(seq_ref) - dback + 254) % 255) + 1);
        if (ans[c].hit && int'(ans[c].seq) > int'(seq_ref)) n_wrap++;
        ans[c].data = {16{$urandom}};
        due[c] = $urandom_range(2, 12);
        if (due[c] > last) last = due[c];
        if (ans[c].hit) begin
          nhit++;
          if (!exp_tc || dback < best_d) begin exp_tc = 1; best_d = dback; best = ans[c].seq; exp_d = ans[c].data; end
        end
      end
      if (nhit > 1) n_multi++;
      @(negedge clk);
      miss_valid = 1; miss_addr = a;
      #1 check(miss_ready, "idle miss port ready");
      @(posedge clk);
      #1 miss_valid = 0;
      cyc = 0;
      while (1) begin
        @(negedge clk);
        cyc++;
        tc_miss_ready = NC'($urandom);
        nv_rd_ready   = $urandom_range(0, 1);
        tc_rsp_valid  = '0;
        nv_rsp_valid  = 0;
        for (int c = 0; c < NC; c++) if (cyc == due[c]) begin tc_rsp_valid[c] = 1; tc_rsp[c] = ans[c]; end
        if (cyc == nv_due) begin nv_rsp_valid = 1; nv_rsp_data = nv_d; end
        #1;
        if (cyc == 1) check(tc_miss_addr == a && nv_rd_addr == a && nv_rd_valid && tc_miss_valid == '1,
                            "lookup sent to all TCs and NVRAM");
        check(!fill_valid, "no early fill");
        if (cyc == last) break;
      end
      @(posedge clk);
      #1;
      tc_rsp_valid = 0; nv_rsp_valid = 0;
      check(!fill_valid, "fill not in the answer cycle");
      @(posedge clk);
      #1;
      check(fill_valid && fill_addr == a, "fill one cycle after last answer");
      check(fill_from_tc == exp_tc && fill_data == exp_d, "fill picks most recent SeqID or NVRAM");
      if (exp_tc) n_from_tc++; else n_from_nv++;
    end
    check(n_drop > 0 && n_fwd > 0 && n_from_tc > 0 && n_from_nv > 0 && n_multi > 0 && n_wrap > 0, "all cases seen");
    $display("dropped=%0d forwarded=%0d fills-from-TC=%0d fills-from-NVRAM=%0d multi-hit=%0d wrapped-IDs=%0d",
             n_drop, n_fwd, n_from_tc, n_from_nv, n_multi, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
