// Self-checking testbench of tc_global_seq.
//
// Random finishing pulses from four cores (several in one cycle) and random
// write-back issue pulses. A reference counter in the testbench predicts the
// ID each finishing core must receive (consecutive, core-index order, never
// 0, wrapping from 255 to 1) and the write-back ID after each issue.
// Write-backs are issued only for IDs in flight and finishing pulses are
// held while seq_hold is set, as the L1 controllers would; the testbench
// counts the IDs in flight itself and checks seq_hold against that count
// (hold at 251 or more of the 255 usable IDs).
module tb_tc_global_seq;
  import tc_pkg::*;

  localparam int NC = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0] fin;
  seq_t fin_seq [NC];
  logic wb_issue;
  seq_t wb_seq, next_seq;
  logic seq_hold;

  int checks = 0, failures = 0, n_multi = 0, n_wrap = 0, n_hold = 0, inflight = 0;

  tc_global_seq #(.NCORES(NC)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic seq_t nxt(seq_t s);
    return (s == 8'hFF) ? 8'd1 : s + 8'd1;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t r_g, r_wb;
    fin = '0; wb_issue = 0;
    r_g = 1; r_wb = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      fin      = (inflight >= 255 - NC) ? '0 : NC'($urandom);
      wb_issue = (inflight > 0) && ($urandom_range(0, 2) == 0);
      #1;
      check(next_seq == r_g && wb_seq == r_wb, "register values");
      check(seq_hold == (inflight >= 255 - NC), "seq_hold");
      if (seq_hold) n_hold++;
      if ($countones(fin) > 1) n_multi++;
      for (int c = 0; c < NC; c++) begin
        if (fin[c]) begin
          check(fin_seq[c] == r_g && fin_seq[c] != 0, "assigned ID");
          if (r_g == 8'hFF) n_wrap++;
          r_g = nxt(r_g);
          inflight++;
        end
      end
      if (wb_issue) begin r_wb = nxt(r_wb); inflight--; end
    end
    check(n_multi > 0 && n_wrap > 0 && n_hold > 0, "simultaneous finishes, wrap and hold seen");
    $display("multi=%0d wraps=%0d hold-cycles=%0d", n_multi, n_wrap, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
