// twinkle_cell -- arithmetic-progression cell for one prime p.
//
// The cell holds one A register (the augmented reload value for p, see
// twinkle_pkg::a_value), N_RAT rational B registers (0 or 1) and N_ALG
// algebraic B registers (one per root of f1 mod p, 0..5). The rational LED
// flashes when the rational B register is in its flash state; the algebraic
// LED flashes when any algebraic B register is. Both LEDs shine with the
// cell's intensity, a W_W-bit weight approximating log2 p.
//
// The A, weight and B registers are written through the load port (wr,
// wr_sel, wr_data), one register per cycle. SEL_DISARM parks all B registers.
// When the query input is high in a tick and one of the B registers is in its
// report state (8 ticks after its flash), rep_flag is set; it stays set until
// rep_clr. That the intensity is a loaded register and that the cell reports
// only its identity, not which register fired, are this design's choices.
module twinkle_cell
  import twinkle_pkg::*;
#(
  parameter int unsigned N_RAT = 1,
  parameter int unsigned N_ALG = 1
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

  localparam int unsigned NB = N_RAT + N_ALG;  // B registers in this cell

  logic [CNT_W-1:0] a_reg;
  logic [NB-1:0]    flash, in_rep;
  logic [NB-1:0]    load_b;
  logic             disarm;

  assign disarm = wr && (wr_sel == SEL_DISARM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg  <= '0;
      weight <= '0;
    end else if (wr) begin
      if (wr_sel == SEL_A)      a_reg  <= wr_data;
      if (wr_sel == SEL_WEIGHT) weight <= wr_data[W_W-1:0];
    end
  end

  // Register k < N_RAT is rational, the rest are algebraic roots 0..N_ALG-1.
  for (genvar k = 0; k < NB; k++) begin : g_b
    if (k < N_RAT) begin : g_sel_rat
      assign load_b[k] = wr && (wr_sel == SEL_BRAT);
    end else begin : g_sel_alg
      assign load_b[k] = wr && (wr_sel == reg_sel_e'(4'(SEL_BALG0) + 4'(k - N_RAT)));
    end
    twinkle_counter u_b (
      .clk, .rst_n, .tick,
      .load      (load_b[k]),
      .load_val  (wr_data),
      .disarm    (disarm),
      .reload_en (1'b1),
      .a_val     (a_reg),
      .armed     (),
      .flash     (flash[k]),
      .in_report (in_rep[k])
    );
  end

  if (N_RAT > 0) begin : g_rat
    assign led_rat = flash[0];
  end else begin : g_norat
    assign led_rat = 1'b0;
  end

  if (N_ALG > 0) begin : g_alg
    assign led_alg = |flash[NB-1:N_RAT];
  end else begin : g_noalg
    assign led_alg = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        rep_flag <= 1'b0;
    else if (tick && query && |in_rep) rep_flag <= 1'b1;
    else if (rep_clr)                  rep_flag <= 1'b0;
  end

endmodule
