// tb_twinkle_device_line -- the end-to-end test of tb_twinkle_device on a
// larger array (512 progression cells, 1536 single-hit cells, 10 load lanes)
// over one full special-q line of 8192 locations.
//
// The testbench plays the host. It gives each pair of progression cells
// (rational, algebraic) a prime p >= 11 with random roots, and each used
// single-hit cell a random hit location and intensity; it loads all of this
// over the parallel load lanes, picks thresholds from its own sieve model so
// that a few locations qualify, and sieves NLINES lines (new B values, new
// hits, same A registers). Its sieve model adds log-weights per location
// exactly as the device should; the reported (location, identity) stream
// must equal the model's: for every location whose rational and algebraic
// sums both exceed the thresholds, in location order, every cell that
// flashed there, in ascending identity order. It also checks the tick count
// per line (L + 10), the stall cycles (identities + 1 per report), and that
// each mechanism happened: parallel loading, report stalls, multi-identity
// reports, single-hit cells reporting, and progression reloads (a cell
// reporting a later hit of its progression).
module tb_twinkle_device_line;
  import twinkle_pkg::*;

  localparam int NAP    = 512;    // progression cells (primes 11 .. 1931)
  localparam int NHIT   = 1536;   // single-hit cells
  localparam int LANES  = 10;     // load lanes
  localparam int L      = 8192;   // locations per line: 2*2^12
  localparam int NLINES = 1;      // lines sieved
  localparam int HUSED  = 1536;   // single-hit pairs per line
  localparam int N      = NAP + NHIT;
  localparam int ID_W   = $clog2(N);
  localparam int SUM_W  = W_W + $clog2(N + 1);
  localparam int BANK   = (N + LANES - 1) / LANES;

  logic clk = 0, rst_n = 0, start = 0;
  logic [LANES-1:0] load_valid = '0;
  load_word_t load_word [LANES];
  logic [LOC_W-1:0] line_len = LOC_W'(L), rep_loc;
  logic [SUM_W-1:0] t_rat = '0, t_alg = '0, sum_rat, sum_alg;
  logic busy, done, sieve_tick, rep_valid;
  logic [ID_W-1:0] rep_id;
  logic [31:0] ev_count, stall_cycles;
  int checks = 0, failures = 0;

  twinkle_device #(.N_AP_CELLS(NAP), .N_HIT_CELLS(NHIT), .LOAD_LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- host data
  int prime_of [NAP];      // prime of progression cell i
  int wt [N];              // intensity of cell i
  int kfirst [N];          // first hit of cell i in the current line (-1: none)
  int rs [L], as_ [L];     // model sums
  int first_ap_hit [NAP];

  // mechanism counters
  int n_par_load = 0, n_stall_ev = 0, n_multi = 0, n_hit_rep = 0, n_reload_rep = 0;

  function automatic bit is_prime(input int v);
    if (v < 2) return 0;
    for (int d = 2; d * d <= v; d++) if (v % d == 0) return 0;
    return 1;
  endfunction

  function automatic bit is_alg(input int i);
    return (i % 2) == 1;
  endfunction

  // Does cell i flash at location t of the current line?
  function automatic bit flashes(input int i, input int t);
    if (kfirst[i] < 0 || t < kfirst[i]) return 0;
    if (i < NAP) return ((t - kfirst[i]) % prime_of[i]) == 0;
    return t == kfirst[i];
  endfunction

  load_word_t q [LANES][$];

  task automatic queue_write(input int id, input reg_sel_e s, input logic [CNT_W-1:0] d);
    load_word_t w;
    w.id = 16'(id); w.sel = s; w.data = d;
    q[id / BANK].push_back(w);
  endtask

  task automatic drive_loads();
    bit any;
    do begin
      int active = 0;
      any = 0;
      for (int k = 0; k < LANES; k++) begin
        if (q[k].size() > 0) begin
          load_word[k] <= q[k].pop_front();
          load_valid[k] <= 1;
          any = 1;
          active++;
        end else begin
          load_valid[k] <= 0;
        end
      end
      if (active > 1) n_par_load++;
      @(posedge clk);
    end while (any);
    load_valid <= '0;
    @(posedge clk);
  endtask

  task automatic run_line(input int line);
    int mins [L];
    int sorted [$];
    int T;
    int exp_loc [$], exp_id [$];
    int n_ids_ev [$];
    int ticks, cycles, st0, ev0, exp_stall;

    // new line data
    for (int i = 0; i < NAP; i++) begin
      kfirst[i] = $urandom % prime_of[i];
      queue_write(i, is_alg(i) ? SEL_BALG0 : SEL_BRAT, b_init(CNT_W'(kfirst[i])));
    end
    for (int i = NAP; i < N; i++) kfirst[i] = -1;
    for (int h = 0; h < HUSED; h++) begin
      int i;
      i = NAP + ((h + line * 37) % NHIT);
      kfirst[i] = $urandom % L;
      wt[i] = 13 + $urandom % 11;
      queue_write(i, SEL_WEIGHT, CNT_W'(wt[i]));
      queue_write(i, is_alg(i) ? SEL_BALG0 : SEL_BRAT, b_init(CNT_W'(kfirst[i])));
    end
    drive_loads();

    // model
    for (int t = 0; t < L; t++) begin rs[t] = 0; as_[t] = 0; end
    for (int i = 0; i < N; i++) begin
      if (kfirst[i] < 0) continue;
      for (int t = kfirst[i]; t < L; t += (i < NAP) ? prime_of[i] : L) begin
        if (is_alg(i)) as_[t] += wt[i]; else rs[t] += wt[i];
      end
    end
    for (int t = 0; t < L; t++) begin
      mins[t] = (rs[t] < as_[t]) ? rs[t] : as_[t];
      sorted.push_back(mins[t]);
    end
    sorted.rsort();
    T = sorted[2] - 1;
    if (T < 0) T = 0;
    exp_stall = 0;
    for (int t = 0; t < L; t++) if (rs[t] > T && as_[t] > T) begin
      int n = 0;
      for (int i = 0; i < N; i++) if (flashes(i, t)) begin
        exp_loc.push_back(t); exp_id.push_back(i); n++;
        if (i >= NAP) n_hit_rep++;
        if (i < NAP && t > kfirst[i]) n_reload_rep++;
      end
      n_ids_ev.push_back(n);
      if (n > 1) n_multi++;
      exp_stall += n + 1;
    end
    t_rat <= SUM_W'(T); t_alg <= SUM_W'(T);
    st0 = stall_cycles; ev0 = ev_count;

    // sieve
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    ticks = 0; cycles = 0;
    while (1) begin
      #1;
      if (done) break;
      cycles++;
      if (sieve_tick) ticks++;
      if (rep_valid) begin
        if (exp_loc.size() == 0) check(0, "unexpected report");
        else begin
          int el, ei;
          el = exp_loc.pop_front(); ei = exp_id.pop_front();
          check(rep_loc == LOC_W'(el) && rep_id == ID_W'(ei),
                $sformatf("report got (%0d,%0d) expected (%0d,%0d)", rep_loc, rep_id, el, ei));
        end
      end
      @(posedge clk);
    end
    // the last identity may leave in the cycle of done
    if (rep_valid && exp_loc.size() > 0) begin
      check(rep_loc == LOC_W'(exp_loc.pop_front()) && rep_id == ID_W'(exp_id.pop_front()), "last report");
    end
    check(exp_loc.size() == 0, $sformatf("%0d reports missing", exp_loc.size()));
    check(ticks == L + 10, $sformatf("ticks per line %0d", ticks));
    check(stall_cycles - st0 == 32'(exp_stall), $sformatf("stall cycles %0d expected %0d", stall_cycles - st0, exp_stall));
    check(cycles == ticks + (stall_cycles - st0), "line cycles = ticks + stalls");
    check(ev_count - ev0 == 32'(n_ids_ev.size()), "report events");
    n_stall_ev += n_ids_ev.size();
    $display("line %0d: T=%0d events=%0d cycles=%0d", line, T, n_ids_ev.size(), cycles);
  endtask

  initial begin
    int p = 11;
    for (int k = 0; k < LANES; k++) load_word[k] = '0;
    // one prime per rational/algebraic pair of progression cells
    for (int i = 0; i < NAP; i += 2) begin
      while (!is_prime(p)) p++;
      prime_of[i] = p;
      if (i + 1 < NAP) prime_of[i + 1] = p;
      p++;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NAP; i++) begin
      wt[i] = $clog2(prime_of[i]);
      queue_write(i, SEL_A, a_value(CNT_W'(prime_of[i])));
      queue_write(i, SEL_WEIGHT, CNT_W'(wt[i]));
    end
    for (int line = 0; line < NLINES; line++) run_line(line);

    $display("mechanisms: parallel_load=%0d stall_events=%0d multi_id=%0d hit_cell_reports=%0d reload_reports=%0d",
             n_par_load, n_stall_ev, n_multi, n_hit_rep, n_reload_rep);
    check(n_par_load > 0, "parallel loading never happened");
    check(n_stall_ev > 0, "no report stall");
    check(n_multi > 0, "no multi-identity report");
    check(n_hit_rep > 0, "no single-hit cell reported");
    check(n_reload_rep > 0, "no report after a progression reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
