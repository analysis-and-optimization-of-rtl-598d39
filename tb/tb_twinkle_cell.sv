// tb_twinkle_cell -- self-checking test of the arithmetic-progression cell.
//
// Uses the largest cell type: one rational and five algebraic B registers
// sharing one prime p. For several primes and random roots it checks, tick by
// tick, the rational LED (hits of the rational root) and the algebraic LED
// (hits of any algebraic root) against sieve locations computed here, the
// intensity readback, that a query raises rep_flag only when some register
// flashed exactly 8 ticks earlier, that rep_clr drops it, and that
// SEL_DISARM silences the cell.
module tb_twinkle_cell;
  import twinkle_pkg::*;

  localparam int NA = 5;
  logic clk = 0, rst_n = 0, tick = 0, wr = 0, query = 0, rep_clr = 0;
  reg_sel_e wr_sel = SEL_A;
  logic [CNT_W-1:0] wr_data = '0;
  logic led_rat, led_alg, rep_flag;
  logic [W_W-1:0] weight;
  int checks = 0, failures = 0;

  twinkle_cell #(.N_RAT(1), .N_ALG(NA)) dut (.*);

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

  task automatic write(input reg_sel_e s, input logic [CNT_W-1:0] d);
    wr <= 1; wr_sel <= s; wr_data <= d;
    @(posedge clk);
    wr <= 0;
    #1;
  endtask

  int p, k_rat, k_alg[NA];
  int queries_hit = 0;

  function automatic bit hits(input int t, input int k);
    return t >= k && (t - k) % p == 0;
  endfunction

  initial begin
    int primes[4] = '{11, 29, 53, 101};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (primes[pi]) begin
      p = primes[pi];
      write(SEL_A, a_value(CNT_W'(p)));
      write(SEL_WEIGHT, CNT_W'($clog2(p)));
      check(weight == W_W'($clog2(p)), "weight readback");
      k_rat = $urandom % p;
      write(SEL_BRAT, b_init(CNT_W'(k_rat)));
      for (int a = 0; a < NA; a++) begin
        k_alg[a] = $urandom % p;
        write(reg_sel_e'(4'(SEL_BALG0) + 4'(a)), b_init(CNT_W'(k_alg[a])));
      end
      for (int t = 0; t < 5 * p + 20; t++) begin
        bit er, ea, flashed8;
        er = hits(t, k_rat);
        ea = 0;
        flashed8 = (t >= 8) && hits(t - 8, k_rat);
        for (int a = 0; a < NA; a++) begin
          ea |= hits(t, k_alg[a]);
          flashed8 |= (t >= 8) && hits(t - 8, k_alg[a]);
        end
        tick <= 1;
        query <= ($urandom % 4 == 0);
        #1;
        check(led_rat == er, $sformatf("led_rat p=%0d loc=%0d", p, t));
        check(led_alg == ea, $sformatf("led_alg p=%0d loc=%0d", p, t));
        @(posedge clk);
        #1;
        check(rep_flag == (query && flashed8), $sformatf("rep_flag p=%0d loc=%0d", p, t));
        if (rep_flag) queries_hit++;
        // read the flag out
        tick <= 0; query <= 0; rep_clr <= 1;
        @(posedge clk);
        rep_clr <= 0;
        #1;
        check(rep_flag == 0, "rep_clr");
      end
      write(SEL_DISARM, '0);
      for (int t = 0; t < 2 * p; t++) begin
        tick <= 1; #1;
        check(!led_rat && !led_alg, "disarmed cell flashed");
        @(posedge clk);
      end
      tick <= 0;
    end
    check(queries_hit > 0, "no query ever matched a flash");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
