// Persistence extension of the last-level cache (LLC) controller.
//
// Two changes let the LLC coexist with the transaction caches (TCs):
//
//  * Dropped evictions. A dirty line whose persistent flag (P/V) is set is
//    not written back when the LLC evicts it: its data reaches NVRAM through
//    the TC instead. Volatile evictions pass on to memory unchanged.
//  * Miss merging. A dropped line may be newer in a TC than in NVRAM, so an
//    LLC miss on NVRAM is sent both to the NVRAM controller and to the TC of
//    every core. Once all answers are in, the fill data is the TC copy with
//    the biggest sequence ID (the most recently ordered write); only if no
//    TC holds the line is the NVRAM data used.
//
// Interface: eviction in (valid/ready) and the volatile eviction out
// (valid/ready, combinational pass-through); one miss at a time on
// miss_valid/miss_ready; per-core TC lookup requests (valid/ready) with
// answers on tc_rsp_valid/tc_rsp; an NVRAM read request (valid/ready) with
// its answer on nv_rsp_valid/nv_rsp_data; the fill on fill_valid (one cycle).
// The fill follows the last answer by one cycle.
//
// "Biggest" is measured against the wrap of the 8-bit IDs: seq_ref is the
// global sequence ID that will be handed out next, every ID held by a TC
// was handed out before it, and the newest copy is the one whose distance
// back from seq_ref, counted over the 255 usable IDs, is smallest. This is
// exact while no more than 255 IDs separate the oldest held copy from
// seq_ref, which the sequence hold of the global sequence unit keeps for
// lines not yet written back.
//
// The two behaviours and the biggest-SeqID rule follow the document. Waiting
// for all answers, one outstanding miss, and the wrap-aware comparison are
// this design's own choices.
module llc_persist_ext
  import tc_pkg::*;
#(
  parameter int unsigned NCORES = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  seq_t      seq_ref,       // next global sequence ID (not yet handed out)
  // LLC evictions toward memory
  input  logic      evict_valid,
  output logic      evict_ready,
  input  logic      evict_pv,
  input  laddr_t    evict_addr,
  input  line_t     evict_data,
  output logic      mem_wr_valid,
  input  logic      mem_wr_ready,
  output laddr_t    mem_wr_addr,
  output line_t     mem_wr_data,
  output logic      evict_dropped,
  // LLC miss on an NVRAM line
  input  logic      miss_valid,
  output logic      miss_ready,
  input  laddr_t    miss_addr,
  // lookups in the transaction caches
  output logic      [NCORES-1:0] tc_miss_valid,
  input  logic      [NCORES-1:0] tc_miss_ready,
  output laddr_t    tc_miss_addr,
  input  logic      [NCORES-1:0] tc_rsp_valid,
  input  miss_rsp_t tc_rsp [NCORES],
  // read of NVRAM
  output logic      nv_rd_valid,
  input  logic      nv_rd_ready,
  output laddr_t    nv_rd_addr,
  input  logic      nv_rsp_valid,
  input  line_t     nv_rsp_data,
  // fill toward the LLC
  output logic      fill_valid,
  output laddr_t    fill_addr,
  output line_t     fill_data,
  output logic      fill_from_tc
);

  // ---------------- evictions ----------------
  assign mem_wr_valid  = evict_valid && !evict_pv;
  assign mem_wr_addr   = evict_addr;
  assign mem_wr_data   = evict_data;
  assign evict_ready   = evict_pv ? 1'b1 : mem_wr_ready;
  assign evict_dropped = evict_valid && evict_pv;

  // ---------------- misses ----------------
  logic              busy_q;
  laddr_t            addr_q;
  logic [NCORES-1:0] tc_sent_q, tc_got_q;
  logic              nv_sent_q, nv_got_q;
  logic              best_hit_q;
  seq_t              best_seq_q;
  line_t             best_data_q;
  line_t             nv_data_q;

  logic all_in;
  assign all_in = busy_q && (&tc_got_q) && nv_got_q;

  assign miss_ready    = !busy_q;
  assign tc_miss_addr  = addr_q;
  assign nv_rd_addr    = addr_q;
  assign tc_miss_valid = busy_q ? ~tc_sent_q : '0;
  assign nv_rd_valid   = busy_q && !nv_sent_q;

  // distance of an ID back from seq_ref over the usable IDs 1..2**SEQ_W-1
  function automatic logic [SEQ_W:0] age(seq_t s, seq_t r);
    return (r > s) ? {1'b0, r} - {1'b0, s}
                   : {1'b0, r} + (SEQ_W+1)'((1 << SEQ_W) - 1) - {1'b0, s};
  endfunction

  // best TC answer among those arriving this cycle and the one kept so far
  logic  nb_hit;
  seq_t  nb_seq;
  line_t nb_data;
  always_comb begin
    nb_hit  = best_hit_q;
    nb_seq  = best_seq_q;
    nb_data = best_data_q;
    for (int c = 0; c < NCORES; c++) begin
      if (tc_rsp_valid[c] && tc_rsp[c].hit && (!nb_hit || age(tc_rsp[c].seq, seq_ref) < age(nb_seq, seq_ref))) begin
        nb_hit  = 1'b1;
        nb_seq  = tc_rsp[c].seq;
        nb_data = tc_rsp[c].data;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      addr_q     <= '0;
      tc_sent_q  <= '0;
      tc_got_q   <= '0;
      nv_sent_q  <= 1'b0;
      nv_got_q   <= 1'b0;
      best_hit_q <= 1'b0;
      best_seq_q <= '0;
      best_data_q <= '0;
      nv_data_q  <= '0;
      fill_valid <= 1'b0;
      fill_addr  <= '0;
      fill_data  <= '0;
      fill_from_tc <= 1'b0;
    end else begin
      fill_valid <= 1'b0;
      if (!busy_q) begin
        if (miss_valid) begin
          busy_q     <= 1'b1;
          addr_q     <= miss_addr;
          tc_sent_q  <= '0;
          tc_got_q   <= '0;
          nv_sent_q  <= 1'b0;
          nv_got_q   <= 1'b0;
          best_hit_q <= 1'b0;
          best_seq_q <= '0;
        end
      end else if (all_in) begin
        busy_q       <= 1'b0;
        fill_valid   <= 1'b1;
        fill_addr    <= addr_q;
        fill_from_tc <= best_hit_q;
        fill_data    <= best_hit_q ? best_data_q : nv_data_q;
      end else begin
        tc_sent_q   <= tc_sent_q | (tc_miss_valid & tc_miss_ready);
        tc_got_q    <= tc_got_q | tc_rsp_valid;
        best_hit_q  <= nb_hit;
        best_seq_q  <= nb_seq;
        best_data_q <= nb_data;
        if (nv_rd_valid && nv_rd_ready) nv_sent_q <= 1'b1;
        if (nv_rsp_valid) begin
          nv_got_q  <= 1'b1;
          nv_data_q <= nv_rsp_data;
        end
      end
    end
  end

endmodule
