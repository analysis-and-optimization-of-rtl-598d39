// tb_twinkle_photodetector -- self-checking test of the summing photodetector.
//
// Sixteen cells with random LEDs and intensities. For every tick the two sums
// and the threshold decision are computed here; the decision must come back
// on query exactly 8 ticks later with its location, the registered sums must
// match one tick later, and idle cycles between ticks must freeze the pipe.
module tb_twinkle_photodetector;
  import twinkle_pkg::*;

  localparam int N = 16;
  localparam int SW = W_W + $clog2(N + 1);
  logic clk = 0, rst_n = 0, tick = 0, loc_valid = 0;
  logic [LOC_W-1:0] loc = '0, query_loc;
  logic [N-1:0] led_rat = '0, led_alg = '0;
  logic [W_W-1:0] weight [N];
  logic [SW-1:0] t_rat = SW'(20), t_alg = SW'(20), sum_rat_q, sum_alg_q;
  logic query;
  int checks = 0, failures = 0;

  twinkle_photodetector #(.N(N)) dut (.*);

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

  bit exp_hit [int];
  int exp_sr [int], exp_sa [int];
  int nhits = 0;

  initial begin
    for (int i = 0; i < N; i++) weight[i] = W_W'(1 + $urandom % 31);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      int sr, sa;
      if ($urandom % 4 == 0) begin
        tick <= 0; led_rat <= N'($urandom); led_alg <= N'($urandom);
        @(posedge clk);
      end
      sr = 0; sa = 0;
      tick <= 1;
      loc <= LOC_W'(t);
      loc_valid <= (t % 500) < 450;
      led_rat <= N'($urandom) & N'($urandom);
      led_alg <= N'($urandom) & N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        if (led_rat[i]) sr += weight[i];
        if (led_alg[i]) sa += weight[i];
      end
      exp_sr[t] = sr; exp_sa[t] = sa;
      exp_hit[t] = loc_valid && sr > 20 && sa > 20;
      if (exp_hit[t]) nhits++;
      // outputs during this tick: query for location t-8, sums of t-1
      if (t >= 8) begin
        check(query == exp_hit[t-8], $sformatf("query for loc %0d", t - 8));
        if (query) check(query_loc == LOC_W'(t - 8), "query_loc");
      end else begin
        check(query == 0, "query before pipeline filled");
      end
      if (t >= 1) check(sum_rat_q == SW'(exp_sr[t-1]) && sum_alg_q == SW'(exp_sa[t-1]), "sums");
      @(posedge clk);
    end
    check(nhits > 10, "too few threshold crossings generated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
