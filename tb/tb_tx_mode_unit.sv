// Self-checking testbench of tx_mode_unit.
//
// Drives a random mix of stores, TX_BEGIN and TX_END with random TC
// back-pressure and compares, every cycle, the L1 write (valid and P/V flag),
// the TC request (valid, kind, TxID) and the two registers with a reference
// model of the mode and next-TxID registers kept in the testbench. Also
// checks the documented start state (normal mode, next TxID 1) and that the
// first TX_BEGIN yields TxID 1, and runs next-TxID through its wrap.
module tb_tx_mode_unit;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic op_valid, op_ready, tc_req_ready;
  cpu_op_e op_kind;
  laddr_t op_addr;
  line_t  op_data;
  logic l1_wr_valid, l1_wr_pv, tc_req_valid;
  laddr_t l1_wr_addr;
  line_t  l1_wr_data;
  cpu_req_t tc_req;
  txid_t mode_txid, next_txid;

  int checks = 0, failures = 0;
  int n_begin = 0, n_commit = 0, n_pstore = 0, n_vstore = 0, n_wrap = 0;

  tx_mode_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference registers
  txid_t r_mode, r_next;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_valid = 0; op_kind = OP_STORE; op_addr = '0; op_data = '0; tc_req_ready = 1;
    r_mode = '0; r_next = txid_t'(1);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(mode_txid == 0 && next_txid == 1, "reset state");
    for (int i = 0; i < 3000; i++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 9);
      op_valid = ($urandom_range(0, 4) != 0);
      op_kind  = (r < 6) ? OP_STORE : (r < 8 ? OP_TX_BEGIN : OP_TX_END);
      op_addr  = laddr_t'({$urandom, $urandom});
      op_data  = {16{$urandom}};
      tc_req_ready = ($urandom_range(0, 3) != 0);
      #1;
      // combinational checks against the reference
      if (op_valid) begin
        bit in_tx;
        in_tx = (r_mode != 0);
        case (op_kind)
          OP_STORE: begin
            check(tc_req_valid == in_tx, "store TC valid");
            check(op_ready == (in_tx ? tc_req_ready : 1'b1), "store ready");
            check(l1_wr_valid == (in_tx ? tc_req_ready : 1'b1), "store L1 valid");
            check(l1_wr_pv == in_tx, "P/V flag");
            check(l1_wr_addr == op_addr && l1_wr_data == op_data, "L1 payload");
            if (in_tx) check(tc_req.kind == REQ_WRITE && tc_req.txid == r_mode &&
                             tc_req.addr == op_addr && tc_req.data == op_data &&
                             tc_req.seq == 0, "TC write payload");
            if (op_ready) begin
              if (in_tx) n_pstore++; else n_vstore++;
            end
          end
          OP_TX_BEGIN: begin
            check(!tc_req_valid && !l1_wr_valid && op_ready, "begin quiet");
          end
          default: begin
            check(tc_req_valid == in_tx, "end TC valid");
            if (in_tx) check(tc_req.kind == REQ_COMMIT && tc_req.txid == r_mode, "commit payload");
          end
        endcase
      end else begin
        check(!tc_req_valid && !l1_wr_valid, "idle");
      end
      @(posedge clk);
      if (op_valid && op_ready) begin
        if (op_kind == OP_TX_BEGIN && r_mode == 0) begin
          r_mode = r_next;
          if (r_next == '1) begin r_next = 1; n_wrap++; end else r_next = r_next + 1;
          n_begin++;
        end else if (op_kind == OP_TX_END && r_mode != 0) begin
          r_mode = 0;
          n_commit++;
        end
      end
      #1;
      check(mode_txid == r_mode && next_txid == r_next, "registers");
    end
    check(n_begin > 0 && n_commit > 0 && n_pstore > 0 && n_vstore > 0, "all operations seen");
    check(n_wrap > 0, "next TxID wrapped");
    $display("begins=%0d commits=%0d persistent stores=%0d volatile stores=%0d wraps=%0d",
             n_begin, n_commit, n_pstore, n_vstore, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
