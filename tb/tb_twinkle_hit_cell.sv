// tb_twinkle_hit_cell -- self-checking test of the single-hit cell.
//
// For random hit locations it checks that an algebraic single-hit cell lights
// its algebraic LED exactly once, at the hit, never its rational LED, that a
// query 8 ticks after the hit raises rep_flag while a query at any other tick
// does not, and that the cell stays dark afterwards (no reload).
module tb_twinkle_hit_cell;
  import twinkle_pkg::*;

  logic clk = 0, rst_n = 0, tick = 0, wr = 0, query = 0, rep_clr = 0;
  reg_sel_e wr_sel = SEL_A;
  logic [CNT_W-1:0] wr_data = '0;
  logic led_rat, led_alg, rep_flag;
  logic [W_W-1:0] weight;
  int checks = 0, failures = 0;

  twinkle_hit_cell #(.IS_ALG(1'b1)) dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int trial = 0; trial < 12; trial++) begin
      int k, qloc;
      k = $urandom % 200;
      // half the trials query at the report location, half elsewhere
      qloc = (trial % 2 == 0) ? k + 8 : k + 1 + ($urandom % 7);
      write(SEL_WEIGHT, CNT_W'(14 + trial % 10));
      check(weight == W_W'(14 + trial % 10), "weight readback");
      write(SEL_BALG0, b_init(CNT_W'(k)));
      for (int t = 0; t < 300; t++) begin
        tick <= 1;
        query <= (t == qloc);
        #1;
        check(led_alg == (t == k), $sformatf("led_alg loc=%0d hit=%0d", t, k));
        check(led_rat == 0, "rational LED of an algebraic cell");
        @(posedge clk);
        #1;
        if (t == qloc)
          check(rep_flag == (qloc == k + 8), $sformatf("rep_flag q=%0d hit=%0d", qloc, k));
        else if (t < qloc)
          check(rep_flag == 0, "early rep_flag");
      end
      tick <= 0; query <= 0; rep_clr <= 1;
      @(posedge clk);
      rep_clr <= 0;
      #1;
      check(rep_flag == 0, "rep_clr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
