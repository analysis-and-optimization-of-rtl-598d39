// twinkle_hit_cell -- single-hit cell of the simplified special-q array.
//
// For primes larger than the line length a (p, r) pair hits a line at most
// once, so such a cell needs neither an A register nor a real arithmetic
// progression: the host loads its B register for each line so that it flashes
// at the one hit location, and the prime is recovered from the cell's identity
// when it reports. The cell has one LED, rational (IS_ALG = 0) or algebraic
// (IS_ALG = 1). After the flash it waits for a query in its report state and
// then disarms itself in the reload state.
//
// Interface and timing are those of twinkle_cell: writes through wr/wr_sel/
// wr_data (SEL_BRAT or SEL_BALG0 load the B register, SEL_WEIGHT the
// intensity, SEL_DISARM parks it); rep_flag is set by a query in a tick while
// in the report state and cleared by rep_clr. Loading the intensity per line
// is this design's choice.
module twinkle_hit_cell
  import twinkle_pkg::*;
#(
  parameter bit IS_ALG = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic             wr,
  input  reg_sel_e         wr_sel,
  input  logic [CNT_W-1:0] wr_data,
  input  logic             query,
  input  logic             rep_clr,
  output logic             led_rat,
  output logic             led_alg,
  output logic [W_W-1:0]   weight,
  output logic             rep_flag
);

  logic flash, in_rep, load_b;

  assign load_b = wr && (wr_sel == SEL_BRAT || wr_sel == SEL_BALG0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             weight <= '0;
    else if (wr && wr_sel == SEL_WEIGHT)    weight <= wr_data[W_W-1:0];
  end

  twinkle_counter u_b (
    .clk, .rst_n, .tick,
    .load      (load_b),
    .load_val  (wr_data),
    .disarm    (wr && wr_sel == SEL_DISARM),
    .reload_en (1'b0),
    .a_val     ('0),
    .armed     (),
    .flash     (flash),
    .in_report (in_rep)
  );

  assign led_rat = flash && !IS_ALG;
  assign led_alg = flash &&  IS_ALG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      rep_flag <= 1'b0;
    else if (tick && query && in_rep) rep_flag <= 1'b1;
    else if (rep_clr)                rep_flag <= 1'b0;
  end

endmodule
