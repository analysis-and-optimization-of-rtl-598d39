// tb_twinkle_controller -- self-checking test of the sieve sequencer.
//
// For several line lengths, with queries injected at random ticks and a
// report collector model that stays busy for a random number of cycles per
// query, it checks: the ticks carry locations 0, 1, 2, ... with loc_valid
// exactly for the first L, the line ends after L + 10 ticks, no tick is
// issued while the collector is busy, ev_loc holds the query's location,
// done pulses once, and the line takes L + 10 + (stall cycles) cycles.
module tb_twinkle_controller;
  import twinkle_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, query = 0, rep_busy = 0;
  logic [LOC_W-1:0] line_len = '0, query_loc = '0, loc, ev_loc;
  logic tick, loc_valid, busy, done;
  logic [31:0] ev_count, stall_cycles;
  int checks = 0, failures = 0;

  twinkle_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    int lens[5] = '{1, 5, 37, 200, 1000};
    int total_ev = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (lens[li]) begin
      int L, ticks, cycles, busy_left, ev0, st0, stalls, dones;
      L = lens[li];
      ev0 = ev_count; st0 = stall_cycles;
      line_len <= LOC_W'(L);
      start <= 1;
      @(posedge clk);
      start <= 0;
      ticks = 0; cycles = 0; busy_left = 0; stalls = 0; dones = 0;
      while (1) begin
        // collector model: busy for busy_left cycles after a query
        rep_busy = (busy_left > 0);
        query = 0;
        #1;
        if (done) begin dones++; break; end
        cycles++;
        if (rep_busy) check(!tick, "tick while collector busy");
        if (tick) begin
          check(loc == LOC_W'(ticks), "location sequence");
          check(loc_valid == (ticks < L), "loc_valid");
          if ($urandom % 7 == 0) begin
            query = 1;
            query_loc = LOC_W'(ticks);
            total_ev++;
          end
          ticks++;
        end else stalls++;
        @(posedge clk);
        if (busy_left > 0) busy_left--;
        if (query) begin
          busy_left = 1 + $urandom % 5;
          #1;
          check(ev_loc == query_loc, "ev_loc holds the query location");
        end
      end
      check(ticks == L + 10, $sformatf("ticks per line L=%0d got %0d", L, ticks));
      check(cycles == L + 10 + stalls, "cycles = ticks + stalls");
      check(stall_cycles - st0 == 32'(stalls), "stall counter");
      @(posedge clk); #1;
      check(!busy && !done, "idle after line");
      check(dones == 1, "done pulse");
    end
    check(ev_count == 32'(total_ev) && total_ev > 0, "event count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
