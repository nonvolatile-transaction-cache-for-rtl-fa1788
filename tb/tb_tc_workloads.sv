// Benchmark workloads on the whole design at four TC sizes.
//
// Runs the write patterns of the graph, rbtree, sps, btree and hashtable
// benchmarks (see tc_workload_run for the per-transaction line counts) on
// four copies of tc_system with 1 KB, 2 KB, 4 KB and 8 KB of TC per core
// (16, 32, 64 and 128 lines), all with 4 cores and the same NVRAM
// bandwidth. Every copy checks write-back order, transaction atomicity and
// the final NVRAM image. The table printed at the end gives, per workload
// and size, the cycles taken and the cycles cores spent stalled on a full
// TC. Expected trend, checked: for each workload the 1 KB TC stalls at least
// as much as the 8 KB TC, and the workloads with the longest transactions
// (rbtree, btree) stall at 1 KB at all.
module tb_tc_workloads;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NS = 4;
  logic done [NS];
  int   chk [NS], fail [NS];
  int   stall [NS][5], runc [NS][5];

  tc_workload_run #(.TC_BYTES(1024)) u_1k (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]),
                                           .stall_cyc(stall[0]), .run_cyc(runc[0]));
  tc_workload_run #(.TC_BYTES(2048)) u_2k (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]),
                                           .stall_cyc(stall[1]), .run_cyc(runc[1]));
  tc_workload_run #(.TC_BYTES(4096)) u_4k (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]),
                                           .stall_cyc(stall[2]), .run_cyc(runc[2]));
  tc_workload_run #(.TC_BYTES(8192)) u_8k (.clk, .done(done[3]), .checks(chk[3]), .failures(fail[3]),
                                           .stall_cyc(stall[3]), .run_cyc(runc[3]));

  int checks = 0, failures = 0;

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    string names [5];
    names = '{"graph", "rbtree", "sps", "btree", "hashtable"};
    wait (done[0] && done[1] && done[2] && done[3]);
    #1;
    for (int s = 0; s < NS; s++) begin checks += chk[s]; failures += fail[s]; end
    $display("workload    cycles 1K/2K/4K/8K            stall-cycles 1K/2K/4K/8K");
    for (int w = 0; w < 5; w++) begin
      $display("%-10s  %6d %6d %6d %6d    %6d %6d %6d %6d", names[w],
               runc[0][w], runc[1][w], runc[2][w], runc[3][w],
               stall[0][w], stall[1][w], stall[2][w], stall[3][w]);
      checks++;
      if (stall[0][w] < stall[3][w]) begin
        failures++;
        $display("FAIL %s: 1 KB TC stalls less than 8 KB TC", names[w]);
      end
    end
    checks++;
    if (stall[0][1] == 0 || stall[0][3] == 0) begin
      failures++;
      $display("FAIL no TC-full stall at 1 KB for the long transactions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
