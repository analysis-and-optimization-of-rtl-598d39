// tb_twinkle_counter -- self-checking test of one B register.
//
// Drives ticks with random idle cycles in between and compares flash and
// in_report, tick by tick, with the expected sieve locations: a register
// loaded for first hit k with period p must flash at k, k+p, k+2p, ... and be
// in its report state 8 ticks after each flash. Also checks that a register
// without reload flashes once, that disarm silences it, and that a register
// never loaded stays dark.
module tb_twinkle_counter;
  import twinkle_pkg::*;

  logic clk = 0, rst_n = 0, tick = 0, load = 0, disarm = 0, reload_en = 1;
  logic [CNT_W-1:0] load_val = '0, a_val = '0;
  logic armed, flash, in_report;
  int checks = 0, failures = 0;

  twinkle_counter dut (.*);

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

  // Run n ticks (with random gaps) and check the outputs against a
  // progression with first hit k and period p (p = 0: single hit).
  task automatic run_and_check(input int k, input int p, input int n, input bit rand_gaps);
    for (int t = 0; t < n; t++) begin
      bit exp_flash, exp_rep;
      exp_flash = (t == k) || (p > 0 && t > k && (t - k) % p == 0);
      exp_rep   = (t == k + 8) || (p > 0 && t > k + 8 && (t - k - 8) % p == 0);
      // idle cycles: state must hold
      if (rand_gaps && ($urandom % 3 == 0)) begin
        tick <= 0;
        @(posedge clk);
      end
      tick <= 1;
      #1;
      check(flash == exp_flash, $sformatf("flash loc %0d (k=%0d p=%0d)", t, k, p));
      check(in_report == exp_rep, $sformatf("report loc %0d", t));
      @(posedge clk);
    end
    tick <= 0;
  endtask

  task automatic do_load(input logic [CNT_W-1:0] v);
    load <= 1; load_val <= v;
    @(posedge clk);
    load <= 0;
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // never loaded: dark
    run_and_check(-100, 0, 40, 0);
    check(armed == 0, "unloaded counter armed");

    // progression, several primes and phases
    foreach (int_primes[i]) begin
      int p, k;
      p = int_primes[i];
      k = $urandom % p;
      reload_en <= 1;
      a_val <= a_value(CNT_W'(p));
      do_load(b_init(CNT_W'(k)));
      check(armed == 1, "armed after load");
      run_and_check(k, p, k + 6 * p + 3, 1);
      disarm <= 1; @(posedge clk); disarm <= 0; #1;
      check(armed == 0, "disarm");
      run_and_check(-100, 0, 50, 0);
    end

    // single hit, no reload
    reload_en <= 0;
    do_load(b_init(CNT_W'(23)));
    run_and_check(23, 0, 200, 1);
    check(armed == 0, "single-hit counter disarmed after reload state");

    // large prime near 2^24
    reload_en <= 1;
    a_val <= a_value(CNT_W'(16777213));
    do_load(b_init(CNT_W'(3)));
    run_and_check(3, 16777213, 40, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int int_primes[6] = '{11, 13, 17, 31, 97, 251};
endmodule
