// Self-checking testbench of tc_data_array.
//
// Random inserts (into available lines only), commit broadcasts and frees
// (of committed lines only), as the controller would issue them, against a
// reference copy of every line kept in the testbench. Each cycle the state
// vector, the CAM match vector for a random tag (drawn from a small address
// set so that several lines match), and both read ports are compared with
// the reference. A commit must move exactly the active lines of its TxID,
// never committed or available lines with the same TxID.
module tb_tc_data_array;
  import tc_pkg::*;

  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ins_en, cmt_en, free_en;
  logic [3:0] ins_idx, free_idx, rda_idx, rdb_idx;
  txid_t ins_txid, cmt_txid;
  seq_t ins_seq, rda_seq, rdb_seq;
  laddr_t ins_addr, srch_addr, rda_addr;
  line_t ins_data, rda_data, rdb_data;
  logic [N-1:0] match;
  tc_state_e state [N];

  int checks = 0, failures = 0, n_ins = 0, n_cmt = 0, n_free = 0, n_multi = 0;

  tc_data_array #(.ENTRIES(N)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  tc_state_e r_st [N];
  txid_t  r_tx [N];
  seq_t   r_sq [N];
  laddr_t r_tg [N];
  line_t  r_dt [N];

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_en = 0; cmt_en = 0; free_en = 0; ins_idx = 0; free_idx = 0; rda_idx = 0; rdb_idx = 0;
    ins_txid = 0; cmt_txid = 0; ins_seq = 0; ins_addr = 0; srch_addr = 0; ins_data = 0;
    for (int i = 0; i < N; i++) r_st[i] = ST_AVAIL;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int cand;
      @(negedge clk);
      // insert into a random available line
      ins_en = 0; free_en = 0;
      cand = $urandom_range(0, N-1);
      if (r_st[cand] == ST_AVAIL && $urandom_range(0, 1)) begin
        ins_en = 1; ins_idx = 4'(cand);
      end
      ins_txid = txid_t'($urandom_range(1, 3));
      ins_seq  = seq_t'($urandom);
      ins_addr = laddr_t'($urandom_range(0, 5));
      ins_data = {16{$urandom}};
      cmt_en   = ($urandom_range(0, 5) == 0);
      cmt_txid = txid_t'($urandom_range(1, 3));
      cand = $urandom_range(0, N-1);
      if (r_st[cand] == ST_COMMIT && $urandom_range(0, 1) && !(ins_en && ins_idx == 4'(cand))) begin
        free_en = 1; free_idx = 4'(cand);
      end
      srch_addr = laddr_t'($urandom_range(0, 5));
      rda_idx = 4'($urandom); rdb_idx = 4'($urandom);
      #1;
      begin
        int nm;
        nm = 0;
        for (int i = 0; i < N; i++) begin
          check(state[i] == r_st[i], "state");
          check(match[i] == (r_st[i] != ST_AVAIL && r_tg[i] == srch_addr), "match");
          if (match[i]) nm++;
        end
        if (nm > 1) n_multi++;
      end
      if (r_st[rda_idx] != ST_AVAIL)
        check(rda_seq == r_sq[rda_idx] && rda_addr == r_tg[rda_idx] && rda_data == r_dt[rda_idx], "read port A");
      if (r_st[rdb_idx] != ST_AVAIL)
        check(rdb_seq == r_sq[rdb_idx] && rdb_data == r_dt[rdb_idx], "read port B");
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (cmt_en && r_st[i] == ST_ACTIVE && r_tx[i] == cmt_txid) begin r_st[i] = ST_COMMIT; n_cmt++; end
      if (free_en) begin r_st[free_idx] = ST_AVAIL; n_free++; end
      if (ins_en) begin
        r_st[ins_idx] = ST_ACTIVE; r_tx[ins_idx] = ins_txid; r_sq[ins_idx] = ins_seq;
        r_tg[ins_idx] = ins_addr; r_dt[ins_idx] = ins_data; n_ins++;
      end
    end
    check(n_ins > 0 && n_cmt > 0 && n_free > 0 && n_multi > 0, "all operations seen");
    $display("inserts=%0d commits=%0d frees=%0d multi-match=%0d", n_ins, n_cmt, n_free, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
