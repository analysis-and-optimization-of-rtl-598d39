// twinkle_device -- the simplified TWINKLE sieving array for special-q NFS
// sieving (one wafer, one line of sieve locations per run).
//
// The array has two kinds of cells. N_AP_CELLS arithmetic-progression cells
// (twinkle_cell, one A and one B register) sieve with the small primes, whose
// progressions hit a line many times; even-numbered ones are rational, odd
// ones algebraic. N_HIT_CELLS single-hit cells (twinkle_hit_cell, one B
// register) each take one (p, r) pair of a larger prime that hits the current
// line once; they too alternate rational/algebraic. The defaults, 2*pi(8192)
// = 2056 progression cells and 17944 hit cells for about 2*10^4 in all, are
// the sizes of the simplified device for lines of 2*2^12 = 8192 locations.
//
// Operation: while idle, the host writes A, B and intensity registers over
// LOAD_LANES parallel load lanes (lane k reaches the contiguous bank of cells
// k*BANK .. k*BANK+BANK-1; a word for another bank is ignored). A start pulse
// then sieves line_len locations, one per tick. In each tick every flashing
// LED adds its cell's intensity to the rational or algebraic sum
// (twinkle_photodetector). When both sums exceed t_rat and t_alg, the query
// returns QUERY_DELAY ticks later, the cells that flashed at that location
// raise their report flag, the controller stalls the array, and
// twinkle_report_collector sends their identities out, one per cycle, on
// rep_valid/rep_loc/rep_id. done pulses at the end of the line.
//
// The optical parts (LEDs, photodetectors, clocking LED, lens) become wires,
// an exact adder and a clock enable. Bank-per-lane loading, stalling during
// read-out and loadable intensities are this design's choices.
module twinkle_device
  import twinkle_pkg::*;
#(
  parameter int unsigned N_AP_CELLS  = 2056,
  parameter int unsigned N_HIT_CELLS = 17944,
  parameter int unsigned LOAD_LANES  = 10,
  localparam int unsigned N     = N_AP_CELLS + N_HIT_CELLS,
  localparam int unsigned ID_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SUM_W = W_W + $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LOAD_LANES-1:0] load_valid,
  input  load_word_t       load_word [LOAD_LANES],
  input  logic             start,
  input  logic [LOC_W-1:0] line_len,
  input  logic [SUM_W-1:0] t_rat,
  input  logic [SUM_W-1:0] t_alg,
  output logic             busy,
  output logic             done,
  output logic             sieve_tick,
  output logic             rep_valid,
  output logic [LOC_W-1:0] rep_loc,
  output logic [ID_W-1:0]  rep_id,
  output logic [31:0]      ev_count,
  output logic [31:0]      stall_cycles,
  output logic [SUM_W-1:0] sum_rat,
  output logic [SUM_W-1:0] sum_alg
);

  localparam int unsigned BANK = (N + LOAD_LANES - 1) / LOAD_LANES;

  logic             tick, loc_valid, query, rep_busy;
  logic [LOC_W-1:0] loc, query_loc, ev_loc;
  logic [N-1:0]     led_rat, led_alg, rep_flag, rep_clr;
  logic [W_W-1:0]   weight [N];

  // Load lanes, registered once at the array edge.
  logic [LOAD_LANES-1:0] lv_q;
  load_word_t            lw_q [LOAD_LANES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lv_q <= '0;
      for (int k = 0; k < LOAD_LANES; k++) lw_q[k] <= '0;
    end else begin
      lv_q <= load_valid;
      for (int k = 0; k < LOAD_LANES; k++) lw_q[k] <= load_word[k];
    end
  end

  // Cells are generated bank by bank; bank k hangs on load lane k.
  for (genvar k = 0; k < LOAD_LANES; k++) begin : g_bank
    for (genvar j = 0; j < BANK; j++) begin : g_cell
      localparam int unsigned I = k * BANK + j;
      if (I < N) begin : g_on
        logic wr;
        assign wr = lv_q[k] && (lw_q[k].id == 16'(I));
        if (I < N_AP_CELLS) begin : g_ap
          twinkle_cell #(.N_RAT(32'(I % 2 == 0)), .N_ALG(I % 2)) u_cell (
            .clk, .rst_n, .tick, .wr,
            .wr_sel   (lw_q[k].sel),
            .wr_data  (lw_q[k].data),
            .query,
            .rep_clr  (rep_clr[I]),
            .led_rat  (led_rat[I]),
            .led_alg  (led_alg[I]),
            .weight   (weight[I]),
            .rep_flag (rep_flag[I])
          );
        end else begin : g_hit
          twinkle_hit_cell #(.IS_ALG(I % 2 == 1)) u_cell (
            .clk, .rst_n, .tick, .wr,
            .wr_sel   (lw_q[k].sel),
            .wr_data  (lw_q[k].data),
            .query,
            .rep_clr  (rep_clr[I]),
            .led_rat  (led_rat[I]),
            .led_alg  (led_alg[I]),
            .weight   (weight[I]),
            .rep_flag (rep_flag[I])
          );
        end
      end
    end
  end

  twinkle_photodetector #(.N(N), .SUM_W(SUM_W)) u_pd (
    .clk, .rst_n, .tick, .loc_valid, .loc,
    .led_rat, .led_alg, .weight, .t_rat, .t_alg,
    .sum_rat_q (sum_rat), .sum_alg_q (sum_alg), .query, .query_loc
  );

  twinkle_report_collector #(.N(N), .ID_W(ID_W)) u_rep (
    .clk, .rst_n,
    .flags (rep_flag),
    .loc   (ev_loc),
    .clr   (rep_clr),
    .busy  (rep_busy),
    .rep_valid, .rep_loc, .rep_id
  );

  twinkle_controller u_ctl (
    .clk, .rst_n, .start, .line_len, .query, .query_loc, .rep_busy,
    .tick, .loc, .loc_valid, .ev_loc, .busy, .done, .ev_count, .stall_cycles
  );

  assign sieve_tick = tick;

  // The I/O lines carry loads only while the array is idle.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(|load_valid))
    else $error("load word on the I/O lines while a line is being sieved");

endmodule
