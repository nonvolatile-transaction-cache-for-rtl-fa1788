// Persistent path of a multicore processor built on transaction caches.
//
// Each of NCORES cores has a transaction mode unit (TxID/mode and next-TxID
// registers) and a private transaction cache (TC). Inside a transaction,
// every store goes both to the L1 cache (marked persistent) and to the TC.
// The L1 controllers report the end of each persistent write's coherence
// operation (coh_fin); the global sequence unit gives that write its place
// in the total write order. TCs write committed lines back to the NVRAM
// controller one at a time, in that global order, and free them when the
// NVRAM controller acknowledges. The LLC extension drops persistent
// evictions and merges LLC misses from the TCs and NVRAM.
//
// Outside this module, and reached through its ports: the core pipelines
// (op_*), the L1 caches (l1_wr_*, coh_fin), the LLC (evict_*, miss_*,
// fill_*), the memory path for volatile evictions (mem_wr_*), and the NVRAM
// controller (nv_wr_*, ack_*, nv_rd_*, nv_rsp_*, drain_req).
//
// NVRAM write port: because a TC may issue only the line whose sequence ID
// equals the global write-back ID, at most one TC offers a write in any
// cycle; the port carries that write and the number of the core it came
// from (nv_wr_core). The NVRAM controller returns the core number with each
// acknowledgement (ack_core) so that the ack reaches the TC that issued the
// line. This core tag is this design's own addition: with several TCs the
// address alone does not name the TC, since two TCs may hold the same line.
// drain_req is the OR of the TCs' almost-full requests.
//
// coh_hold (own addition) tells the L1 controllers to hold back finishing
// signals while nearly all 255 usable 8-bit sequence IDs are in flight;
// without it, four 64-line TCs plus their queues could hold two writes with
// the same ID.
module tc_system
  import tc_pkg::*;
#(
  parameter int unsigned NCORES       = 4,
  parameter int unsigned TC_BYTES     = 4096,
  parameter int unsigned ENTRIES      = TC_BYTES / LINE_BYTES,
  parameter int unsigned CPU_DEPTH    = 8,
  parameter int unsigned MSG_DEPTH    = 4,
  parameter int unsigned DRAIN_THRESH = ENTRIES - ENTRIES / 8,
  localparam int unsigned CIDW        = (NCORES > 1) ? $clog2(NCORES) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  // core operations
  input  logic      [NCORES-1:0] op_valid,
  output logic      [NCORES-1:0] op_ready,
  input  cpu_op_e   op_kind [NCORES],
  input  laddr_t    op_addr [NCORES],
  input  line_t     op_data [NCORES],
  // L1 side
  output logic      [NCORES-1:0] l1_wr_valid,
  output logic      [NCORES-1:0] l1_wr_pv,
  output laddr_t    l1_wr_addr [NCORES],
  output line_t     l1_wr_data [NCORES],
  input  logic      [NCORES-1:0] coh_fin,
  output logic      coh_hold,
  // LLC evictions and volatile write-back
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
  // LLC misses and fills
  input  logic      miss_valid,
  output logic      miss_ready,
  input  laddr_t    miss_addr,
  output logic      fill_valid,
  output laddr_t    fill_addr,
  output line_t     fill_data,
  output logic      fill_from_tc,
  // NVRAM controller
  output logic      nv_rd_valid,
  input  logic      nv_rd_ready,
  output laddr_t    nv_rd_addr,
  input  logic      nv_rsp_valid,
  input  line_t     nv_rsp_data,
  output logic      nv_wr_valid,
  input  logic      nv_wr_ready,
  output nv_wr_t    nv_wr,
  output logic      [CIDW-1:0] nv_wr_core,
  input  logic      ack_valid,
  output logic      ack_ready,
  input  logic      [CIDW-1:0] ack_core,
  input  laddr_t    ack_addr,
  output logic      drain_req,
  // observation
  output txid_t     mode_txid [NCORES],
  output logic      [NCORES-1:0] tc_stall,
  output logic      [NCORES-1:0] commit_event,
  output logic      [NCORES-1:0] ack_event,
  output logic      [NCORES-1:0] ack_orphan,
  output txid_t     next_txid [NCORES],
  output logic      [$clog2(ENTRIES):0] tc_used [NCORES],
  output logic      [$clog2(CPU_DEPTH):0] tc_unordered [NCORES],
  output seq_t      next_seq,
  output seq_t      wb_seq
);

  logic      [NCORES-1:0] req_valid, req_ready;
  cpu_req_t  req [NCORES];
  seq_t      fin_seq [NCORES];
  logic      [NCORES-1:0] wb_issue_c, c_nv_valid, c_drain, c_ack_valid, c_ack_ready;
  nv_wr_t    c_nv_wr [NCORES];
  logic      [NCORES-1:0] c_miss_valid, c_miss_ready, c_rsp_valid;
  miss_rsp_t c_rsp [NCORES];
  laddr_t    tc_miss_addr;

  tc_global_seq #(.NCORES(NCORES)) u_gseq (
    .clk, .rst_n,
    .fin(coh_fin), .fin_seq,
    .wb_issue(|wb_issue_c), .wb_seq, .next_seq, .seq_hold(coh_hold)
  );

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    tx_mode_unit u_mode (
      .clk, .rst_n,
      .op_valid(op_valid[c]), .op_ready(op_ready[c]), .op_kind(op_kind[c]),
      .op_addr(op_addr[c]), .op_data(op_data[c]),
      .l1_wr_valid(l1_wr_valid[c]), .l1_wr_pv(l1_wr_pv[c]),
      .l1_wr_addr(l1_wr_addr[c]), .l1_wr_data(l1_wr_data[c]),
      .tc_req_valid(req_valid[c]), .tc_req_ready(req_ready[c]), .tc_req(req[c]),
      .mode_txid(mode_txid[c]), .next_txid(next_txid[c])
    );

    tx_cache #(
      .ENTRIES(ENTRIES), .CPU_DEPTH(CPU_DEPTH), .MSG_DEPTH(MSG_DEPTH),
      .DRAIN_THRESH(DRAIN_THRESH)
    ) u_tc (
      .clk, .rst_n,
      .cpu_in_valid(req_valid[c]), .cpu_in_ready(req_ready[c]), .cpu_in(req[c]),
      .coh_fin(coh_fin[c]), .coh_seq(fin_seq[c]),
      .miss_in_valid(c_miss_valid[c]), .miss_in_ready(c_miss_ready[c]),
      .miss_in_addr(tc_miss_addr),
      .ack_in_valid(c_ack_valid[c]), .ack_in_ready(c_ack_ready[c]), .ack_in_addr(ack_addr),
      .wb_seq, .wb_issue(wb_issue_c[c]),
      .nv_wr_valid(c_nv_valid[c]), .nv_wr_ready(nv_wr_ready), .nv_wr(c_nv_wr[c]),
      .drain_req(c_drain[c]),
      .miss_rsp_valid(c_rsp_valid[c]), .miss_rsp(c_rsp[c]),
      .stall(tc_stall[c]), .commit_event(commit_event[c]),
      .ack_event(ack_event[c]), .ack_orphan(ack_orphan[c]), .used(tc_used[c]), .unordered(tc_unordered[c])
    );

    assign c_ack_valid[c] = ack_valid && (ack_core == CIDW'(c));
  end

  // NVRAM write port: at most one TC holds the write-back sequence ID.
  always_comb begin
    nv_wr_valid = 1'b0;
    nv_wr       = '0;
    nv_wr_core  = '0;
    for (int c = 0; c < NCORES; c++) begin
      if (c_nv_valid[c]) begin
        nv_wr_valid = 1'b1;
        nv_wr       = c_nv_wr[c];
        nv_wr_core  = CIDW'(c);
      end
    end
  end
  assign ack_ready = c_ack_ready[ack_core];
  assign drain_req = |c_drain;

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(c_nv_valid));

  llc_persist_ext #(.NCORES(NCORES)) u_llc (
    .clk, .rst_n, .seq_ref(next_seq),
    .evict_valid, .evict_ready, .evict_pv, .evict_addr, .evict_data,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data, .evict_dropped,
    .miss_valid, .miss_ready, .miss_addr,
    .tc_miss_valid(c_miss_valid), .tc_miss_ready(c_miss_ready), .tc_miss_addr,
    .tc_rsp_valid(c_rsp_valid), .tc_rsp(c_rsp),
    .nv_rd_valid, .nv_rd_ready, .nv_rd_addr, .nv_rsp_valid, .nv_rsp_data,
    .fill_valid, .fill_addr, .fill_data, .fill_from_tc
  );

endmodule
