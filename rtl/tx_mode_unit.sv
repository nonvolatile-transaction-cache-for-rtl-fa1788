// Transaction mode unit of one CPU core.
//
// Holds the two registers a core needs to take part in the persistent path:
// the TxID/mode register (zero = normal mode, non-zero = the ID of the
// running transaction) and the next-TxID register. TX_BEGIN copies next-TxID
// into the mode register and advances next-TxID by one; TX_END sends a commit
// request carrying the running TxID to the transaction cache (TC) and clears
// the mode register. A store in normal mode goes to the L1 only and is marked
// volatile; a store in transaction mode goes to the L1 marked persistent and,
// in the same cycle, to the TC as a write request tagged with the TxID.
//
// Interface: one CPU operation per cycle on op_valid/op_ready. The L1 write
// port has no back-pressure (the L1 controller queues writes itself); the TC
// request port is valid/ready, and a transactional store or a TX_END waits
// (op_ready low) until the TC request queue accepts it. Outputs are
// combinational from the operation; the registers change at the next clock.
//
// Follows the design: register meaning, the next-TxID start value 1, the
// increment at TX_BEGIN, the P/V flag and the dual issue of stores. This
// design's own choices: TxID 0 is skipped when next-TxID wraps (0 means
// normal mode), a nested TX_BEGIN is ignored, and TX_END in normal mode does
// nothing.
module tx_mode_unit
  import tc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // CPU operation
  input  logic     op_valid,
  output logic     op_ready,
  input  cpu_op_e  op_kind,
  input  laddr_t   op_addr,
  input  line_t    op_data,
  // write toward the L1 cache, with the persistent/volatile flag
  output logic     l1_wr_valid,
  output logic     l1_wr_pv,      // 1 = persistent line
  output laddr_t   l1_wr_addr,
  output line_t    l1_wr_data,
  // write / commit request toward the transaction cache
  output logic     tc_req_valid,
  input  logic     tc_req_ready,
  output cpu_req_t tc_req,
  // register contents, for observation
  output txid_t    mode_txid,
  output txid_t    next_txid
);

  txid_t mode_q, next_q;
  logic  in_tx;

  assign in_tx     = (mode_q != '0);
  assign mode_txid = mode_q;
  assign next_txid = next_q;

  always_comb begin
    tc_req_valid  = 1'b0;
    tc_req        = '0;
    tc_req.txid   = mode_q;
    tc_req.addr   = op_addr;
    tc_req.data   = op_data;
    tc_req.kind   = REQ_WRITE;
    l1_wr_valid   = 1'b0;
    l1_wr_pv      = in_tx;
    l1_wr_addr    = op_addr;
    l1_wr_data    = op_data;
    op_ready      = 1'b1;
    if (op_valid) begin
      unique case (op_kind)
        OP_STORE: begin
          if (in_tx) begin
            tc_req_valid = 1'b1;
            op_ready     = tc_req_ready;
            l1_wr_valid  = tc_req_ready;
          end else begin
            l1_wr_valid  = 1'b1;
          end
        end
        OP_TX_END: begin
          if (in_tx) begin
            tc_req_valid = 1'b1;
            tc_req.kind  = REQ_COMMIT;
            tc_req.addr  = '0;
            tc_req.data  = '0;
            op_ready     = tc_req_ready;
          end
        end
        default: ;  // OP_TX_BEGIN: always accepted
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= '0;
      next_q <= txid_t'(1);
    end else if (op_valid && op_ready) begin
      if (op_kind == OP_TX_BEGIN && !in_tx) begin
        mode_q <= next_q;
        next_q <= txid_inc(next_q);
      end else if (op_kind == OP_TX_END && in_tx) begin
        mode_q <= '0;
      end
    end
  end

endmodule
