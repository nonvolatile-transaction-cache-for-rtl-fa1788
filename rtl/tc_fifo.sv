// Small synchronous FIFO used for the message channels of the TC request
// queue (LLC miss lookups and NVRAM acknowledgements).
//
// A circular buffer of DEPTH entries of type T with a read and a write
// pointer and an occupancy counter. Valid/ready on both sides; the head entry
// is visible on out_data whenever out_valid is high. A push and a pop may
// happen in the same cycle, also when the FIFO is full if the head leaves.
// The FIFO itself is this design's own helper; the document only names the
// queue it belongs to.
module tc_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [PW-1:0]    rd_q, wr_q;
  logic [PW:0]      cnt_q;
  logic             push, pop;

  assign out_valid = (cnt_q != '0);
  assign out_data  = mem[rd_q];
  assign pop       = out_valid && out_ready;
  assign in_ready  = (cnt_q != (PW+1)'(DEPTH)) || pop;
  assign push      = in_valid && in_ready;

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= ptr_inc(wr_q);
      if (pop)  rd_q <= ptr_inc(rd_q);
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= in_data;
  end

endmodule
