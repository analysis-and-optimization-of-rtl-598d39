// twinkle_report_collector -- reads cell identities out over the I/O lines.
//
// After a query, the cells that flashed at the reported location hold their
// report flag. Each cycle this block picks the lowest-numbered pending flag
// (a two-level priority encoder over groups of 64 flags),
// emits that cell identity with the report's location (rep_valid, rep_id,
// rep_loc) and pulses the matching bit of clr so the cell drops its flag.
// busy is high while any flag is pending; the controller holds the array still
// meanwhile. The priority-encoder read-out is this design's choice of
// "encoding technique"; one identity leaves per cycle.
module twinkle_report_collector
  import twinkle_pkg::*;
#(
  parameter int unsigned N    = 20000,
  parameter int unsigned ID_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     flags,
  input  logic [LOC_W-1:0] loc,
  output logic [N-1:0]     clr,
  output logic             busy,
  output logic             rep_valid,
  output logic [LOC_W-1:0] rep_loc,
  output logic [ID_W-1:0]  rep_id
);

  // Two-level priority encoder: lowest flag within each group of G, then
  // the lowest group that has one.
  localparam int unsigned G  = (N < 64) ? N : 64;
  localparam int unsigned NG = (N + G - 1) / G;

  logic [ID_W-1:0] pick;
  logic            any;
  logic [ID_W-1:0] grp_pick [NG];
  logic [NG-1:0]   grp_any;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    always_comb begin
      grp_pick[g] = '0;
      grp_any[g]  = 1'b0;
      for (int j = G - 1; j >= 0; j--) begin
        if (g * G + j < N && flags[g * G + j]) begin
          grp_pick[g] = ID_W'(g * G + j);
          grp_any[g]  = 1'b1;
        end
      end
    end
  end

  always_comb begin
    pick = '0;
    for (int g = NG - 1; g >= 0; g--) begin
      if (grp_any[g]) pick = grp_pick[g];
    end
  end

  assign any = |grp_any;

  assign busy = any;

  // The clear lands in the same edge that registers the identity.
  always_comb begin
    clr = '0;
    if (any) clr[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_valid <= 1'b0;
      rep_loc   <= '0;
      rep_id    <= '0;
    end else begin
      rep_valid <= any;
      rep_loc   <= loc;
      rep_id    <= pick;
    end
  end

endmodule
