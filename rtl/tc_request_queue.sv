// Transaction cache request queue of one core.
//
// Buffers everything the TC controller serves: write and commit requests
// from the CPU, miss lookups from the LLC and write acknowledgements from the
// NVRAM controller. A persistent write must not become visible in the TC
// before the L1 controller has finished the coherence operation for it, so
// every write enters with sequence ID 0 ("not ordered") and is held until
// the L1 controller's finishing signal (coh_fin) arrives. The finishing
// signals come in program order (total store order), so each one stamps the
// oldest write still at sequence ID 0 with the global sequence ID (coh_seq).
// The CPU channel is strictly in order: its head leaves only when it is a
// commit or a stamped write.
//
// LLC misses and NVRAM acks travel in a second channel so that they can
// still be served while a write waits for a full TC to drain; otherwise a
// full TC would block the very ack that frees it. Acks are offered to the
// controller before misses. The split into two channels, the depths and the
// ack-first order are this design's own choices; the request kinds, the
// sequence stamping and the ordering rule follow the document.
//
// Interface: valid/ready on every input and output; coh_fin is a pulse that
// must come at least one cycle after the write it finishes was accepted.
module tc_request_queue
  import tc_pkg::*;
#(
  parameter int unsigned CPU_DEPTH = 8,
  parameter int unsigned MSG_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  // from the CPU (transaction mode unit)
  input  logic     cpu_in_valid,
  output logic     cpu_in_ready,
  input  cpu_req_t cpu_in,
  // coherence finishing signal from the L1 controller, with its global ID
  input  logic     coh_fin,
  input  seq_t     coh_seq,
  // from the LLC and the NVRAM controller
  input  logic     miss_in_valid,
  output logic     miss_in_ready,
  input  laddr_t   miss_in_addr,
  input  logic     ack_in_valid,
  output logic     ack_in_ready,
  input  laddr_t   ack_in_addr,
  // toward the TC controller
  output logic     cpu_out_valid,
  input  logic     cpu_out_ready,
  output cpu_req_t cpu_out,
  output logic     msg_out_valid,
  input  logic     msg_out_ready,
  output tc_msg_t  msg_out,
  // number of writes still waiting for their coherence finishing signal
  output logic [$clog2(CPU_DEPTH):0] unordered
);

  localparam int unsigned PW = $clog2(CPU_DEPTH);

  // ---------------- CPU channel with sequence stamping ----------------
  cpu_req_t      q [CPU_DEPTH];
  logic [PW-1:0] rd_q, wr_q;
  logic [PW:0]   cnt_q;
  logic          push, pop;
  logic          stamp_hit;
  logic [PW-1:0] stamp_idx;
  logic [PW:0]   unord;

  function automatic logic [PW-1:0] ptr_add(logic [PW-1:0] p, int unsigned k);
    return PW'((32'(p) + k) % CPU_DEPTH);
  endfunction

  // oldest write still waiting for coherence
  always_comb begin
    stamp_hit = 1'b0;
    stamp_idx = rd_q;
    unord     = '0;
    for (int unsigned i = 0; i < CPU_DEPTH; i++) begin
      logic [PW-1:0] idx;
      idx = ptr_add(rd_q, i);
      if ((PW+1)'(i) < cnt_q && q[idx].kind == REQ_WRITE && q[idx].seq == '0) begin
        unord = unord + 1'b1;
        if (!stamp_hit) begin
          stamp_hit = 1'b1;
          stamp_idx = idx;
        end
      end
    end
  end
  assign unordered = unord;

  assign cpu_out_valid = (cnt_q != '0) &&
                         (q[rd_q].kind == REQ_COMMIT || q[rd_q].seq != '0);
  assign cpu_out       = q[rd_q];
  assign pop           = cpu_out_valid && cpu_out_ready;
  assign cpu_in_ready  = (cnt_q != (PW+1)'(CPU_DEPTH)) || pop;
  assign push          = cpu_in_valid && cpu_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= ptr_add(wr_q, 1);
      if (pop)  rd_q <= ptr_add(rd_q, 1);
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (coh_fin && stamp_hit) q[stamp_idx].seq <= coh_seq;
    if (push) begin
      q[wr_q]     <= cpu_in;
      q[wr_q].seq <= '0;
    end
  end

  // A finishing signal always has a waiting write to stamp.
  a_fin_has_write: assert property (@(posedge clk) disable iff (!rst_n)
                                    coh_fin |-> stamp_hit);

  // ---------------- message channel: acks before misses ----------------
  logic    ack_v, miss_v;
  laddr_t  ack_a, miss_a;
  logic    ack_pop, miss_pop;

  tc_fifo #(.T(laddr_t), .DEPTH(MSG_DEPTH)) u_ack_fifo (
    .clk, .rst_n,
    .in_valid (ack_in_valid), .in_ready (ack_in_ready), .in_data (ack_in_addr),
    .out_valid(ack_v),        .out_ready(ack_pop),      .out_data(ack_a)
  );

  tc_fifo #(.T(laddr_t), .DEPTH(MSG_DEPTH)) u_miss_fifo (
    .clk, .rst_n,
    .in_valid (miss_in_valid), .in_ready (miss_in_ready), .in_data (miss_in_addr),
    .out_valid(miss_v),        .out_ready(miss_pop),      .out_data(miss_a)
  );

  always_comb begin
    msg_out_valid = ack_v || miss_v;
    msg_out.kind  = ack_v ? MSG_ACK : MSG_MISS;
    msg_out.addr  = ack_v ? ack_a : miss_a;
    ack_pop       = msg_out_ready && ack_v;
    miss_pop      = msg_out_ready && !ack_v && miss_v;
  end

endmodule
