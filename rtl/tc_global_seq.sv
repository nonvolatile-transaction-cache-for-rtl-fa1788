// Global sequence registers shared by the transaction caches of all cores.
//
// The global sequence ID records the total order of persistent writes after
// cache coherence: each time an L1 controller reports that a persistent write
// has finished its coherence operation (fin[c]), that write receives the
// current global sequence ID and the register advances by one. The global
// write-back sequence ID names the only committed line, over all cores, that
// may be issued to NVRAM next; it advances by one each time a TC issues that
// line (wb_issue). Together they make the NVRAM write-back order equal to
// the coherence order, across cores.
//
// Interface: fin[c] is a one-cycle pulse per finished write; fin_seq[c] is
// the ID for it in the same cycle (combinational). When several cores finish
// in one cycle they receive consecutive IDs in core-index order, which is
// this design's own tie-break. Sequence ID 0 means "not ordered yet" and is
// never handed out: both registers start at 1 and wrap from 2**SEQ_W-1 to 1.
//
// seq_hold (own addition) asks the L1 controllers to hold back finishing
// signals while the IDs in flight (handed out but not yet written back) come
// within NCORES of the 2**SEQ_W-1 usable IDs, so that two writes in flight
// never carry the same ID. It is computed from registers only.
module tc_global_seq
  import tc_pkg::*;
#(
  parameter int unsigned NCORES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  [NCORES-1:0] fin,
  output seq_t  fin_seq [NCORES],
  input  logic  wb_issue,
  output seq_t  wb_seq,
  output seq_t  next_seq,
  output logic  seq_hold
);

  localparam int unsigned NIDS = (1 << SEQ_W) - 1;  // usable IDs 1..2**SEQ_W-1

  seq_t gseq_q, gseq_d, wb_q;

  always_comb begin
    gseq_d = gseq_q;
    for (int c = 0; c < NCORES; c++) begin
      fin_seq[c] = gseq_d;
      if (fin[c]) gseq_d = seq_inc(gseq_d);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gseq_q <= seq_t'(1);
      wb_q   <= seq_t'(1);
    end else begin
      gseq_q <= gseq_d;
      if (wb_issue) wb_q <= seq_inc(wb_q);
    end
  end

  assign wb_seq   = wb_q;
  assign next_seq = gseq_q;

  // IDs in flight: from wb_q (inclusive) up to gseq_q (exclusive), cyclic over 1..NIDS
  logic [SEQ_W:0] inflight;
  assign inflight = (gseq_q >= wb_q) ? {1'b0, gseq_q} - {1'b0, wb_q}
                                     : {1'b0, gseq_q} + (SEQ_W+1)'(NIDS) - {1'b0, wb_q};
  assign seq_hold = (inflight >= (SEQ_W+1)'(NIDS - NCORES));

  a_fin_held: assert property (@(posedge clk) disable iff (!rst_n) seq_hold |-> fin == '0)
    else $error("coherence finishing signal while seq_hold is set");


endmodule
