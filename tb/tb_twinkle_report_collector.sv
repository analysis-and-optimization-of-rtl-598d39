// tb_twinkle_report_collector -- self-checking test of the identity read-out.
//
// A model of 40 report flags is set at random, as the cells would after a
// query, and cleared by the collector's clr output. The identities must come
// out in ascending order, one per cycle, each exactly once, tagged with the
// location, and busy must fall once every flag has been read.
module tb_twinkle_report_collector;
  import twinkle_pkg::*;

  localparam int N = 40;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] flags = '0, clr;
  logic [LOC_W-1:0] loc = '0, rep_loc;
  logic busy, rep_valid;
  logic [$clog2(N)-1:0] rep_id;
  int checks = 0, failures = 0;

  twinkle_report_collector #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always_ff @(posedge clk) flags <= flags & ~clr;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int ev = 0; ev < 50; ev++) begin
      logic [N-1:0] set;
      int expect_ids[$];
      int cycles;
      set = {N'($urandom), N'($urandom)} & N'($urandom);
      if (ev == 0) set = '0;
      if (ev == 1) set = N'(1) << (N - 1);
      if (ev == 2) set = '1;
      for (int i = 0; i < N; i++) if (set[i]) expect_ids.push_back(i);
      @(negedge clk);
      flags = set;
      loc = LOC_W'($urandom);
      cycles = 0;
      #1;
      check(busy == (set != 0), "busy after flags set");
      while (busy) begin
        @(posedge clk); #1;
        cycles++;
        check(rep_valid, "rep_valid while draining");
        if (expect_ids.size() == 0) begin
          check(0, "extra identity");
          break;
        end
        check(rep_id == expect_ids.pop_front(), "identity order");
        check(rep_loc == loc, "rep_loc");
      end
      check(expect_ids.size() == 0, "missing identities");
      check(cycles == $countones(set), "one identity per cycle");
      @(posedge clk); #1;
      check(!rep_valid && !busy, "idle after drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
