// twinkle_photodetector -- two-colour summing photodetector, threshold and
// query LED, as an exact digital equivalent of the optical path.
//
// In each tick the intensities (weights) of all cells whose rational LED is
// on are added, and likewise for the algebraic LEDs. The adder works in two
// levels: sums over groups of 64 cells, then the sum of the group sums. A report is declared
// when the rational sum exceeds t_rat AND the algebraic sum exceeds t_alg
// (strict comparisons), for locations marked loc_valid. The report then
// raises the query output exactly QUERY_DELAY ticks after the flash, which is
// when the flashing B registers sit in their report state, together with the
// location it belongs to.
//
// Pipeline (advancing only on tick): stage 1 registers the two sums and the
// location, stage 2 registers the comparison, stages 3..QUERY_DELAY delay it.
// The optical summation itself is analog; this adder is its ideal function,
// and the split of the delay into sum, compare and delay stages is this
// design's choice.
module twinkle_photodetector
  import twinkle_pkg::*;
#(
  parameter int unsigned N     = 20000,
  parameter int unsigned SUM_W = W_W + $clog2(N + 1),
  parameter int unsigned QD    = QUERY_DELAY
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,
  input  logic                loc_valid,
  input  logic [LOC_W-1:0]    loc,
  input  logic [N-1:0]        led_rat,
  input  logic [N-1:0]        led_alg,
  input  logic [W_W-1:0]      weight [N],
  input  logic [SUM_W-1:0]    t_rat,
  input  logic [SUM_W-1:0]    t_alg,
  output logic [SUM_W-1:0]    sum_rat_q,
  output logic [SUM_W-1:0]    sum_alg_q,
  output logic                query,
  output logic [LOC_W-1:0]    query_loc
);

  // Two-level adder: groups of G cells, then the group sums.
  localparam int unsigned G  = (N < 64) ? N : 64;
  localparam int unsigned NG = (N + G - 1) / G;

  logic [SUM_W-1:0] sum_rat, sum_alg;
  logic [SUM_W-1:0] grp_rat [NG];
  logic [SUM_W-1:0] grp_alg [NG];

  for (genvar g = 0; g < NG; g++) begin : g_grp
    always_comb begin
      grp_rat[g] = '0;
      grp_alg[g] = '0;
      for (int unsigned j = 0; j < G; j++) begin
        if (g * G + j < N) begin
          if (led_rat[g * G + j]) grp_rat[g] = grp_rat[g] + SUM_W'(weight[g * G + j]);
          if (led_alg[g * G + j]) grp_alg[g] = grp_alg[g] + SUM_W'(weight[g * G + j]);
        end
      end
    end
  end

  always_comb begin
    sum_rat = '0;
    sum_alg = '0;
    for (int unsigned g = 0; g < NG; g++) begin
      sum_rat = sum_rat + grp_rat[g];
      sum_alg = sum_alg + grp_alg[g];
    end
  end

  // Stage 1: sums.
  logic             v1;
  logic [LOC_W-1:0] loc1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; loc1 <= '0; sum_rat_q <= '0; sum_alg_q <= '0;
    end else if (tick) begin
      v1 <= loc_valid; loc1 <= loc; sum_rat_q <= sum_rat; sum_alg_q <= sum_alg;
    end
  end

  // Stages 2..QD: threshold decision and delay line.
  logic             hit [2:QD];
  logic [LOC_W-1:0] hloc [2:QD];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 2; s <= QD; s++) begin
        hit[s]  <= 1'b0;
        hloc[s] <= '0;
      end
    end else if (tick) begin
      hit[2]  <= v1 && (sum_rat_q > t_rat) && (sum_alg_q > t_alg);
      hloc[2] <= loc1;
      for (int unsigned s = 3; s <= QD; s++) begin
        hit[s]  <= hit[s-1];
        hloc[s] <= hloc[s-1];
      end
    end
  end

  assign query     = hit[QD];
  assign query_loc = hloc[QD];

endmodule
