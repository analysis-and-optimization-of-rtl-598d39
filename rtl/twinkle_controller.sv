// twinkle_controller -- sieve sequencing; plays the role of the clocking LED.
//
// On start the controller latches the line length L and issues one tick per
// cycle: tick number j is sieve location j for j < L (loc_valid high). After
// the last location it issues DRAIN more ticks with loc_valid low, so that
// every flash of the line reaches its query and every counter passes its
// reload state. When the query comes back in a tick, the array is stalled
// from the next cycle (tick low) and the location of the report is held on
// ev_loc until the report collector has no pending flag (rep_busy low);
// then ticking resumes. done pulses for one cycle at the end of the line.
//
// A line of L locations with R reported identities therefore takes
// L + DRAIN ticks plus, per report event, one stall cycle per identity plus
// one. Stalling the array while reading out is this design's choice; the
// location counting and the one-location-per-tick rate follow the device.
module twinkle_controller
  import twinkle_pkg::*;
#(
  parameter int unsigned DR = DRAIN
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LOC_W-1:0] line_len,
  input  logic             query,
  input  logic [LOC_W-1:0] query_loc,
  input  logic             rep_busy,
  output logic             tick,
  output logic [LOC_W-1:0] loc,
  output logic             loc_valid,
  output logic [LOC_W-1:0] ev_loc,
  output logic             busy,
  output logic             done,
  output logic [31:0]      ev_count,
  output logic [31:0]      stall_cycles
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_STALL, S_FIN} state_e;

  state_e         state;
  logic [LOC_W:0] step;

  assign tick      = (state == S_RUN);
  assign loc       = step[LOC_W-1:0];
  assign busy      = (state == S_RUN) || (state == S_STALL);
  assign done      = (state == S_FIN);

  logic [LOC_W:0] len_q;
  assign loc_valid = (step < len_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      step         <= '0;
      len_q        <= '0;
      ev_loc       <= '0;
      ev_count     <= '0;
      stall_cycles <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          step  <= '0;
          len_q <= {1'b0, line_len};
          state <= S_RUN;
        end
        S_RUN: begin
          step <= step + 1'b1;
          if (query) begin
            ev_loc   <= query_loc;
            ev_count <= ev_count + 1'b1;
            state    <= S_STALL;
          end else if (step + 1'b1 == len_q + (LOC_W+1)'(DR)) begin
            state <= S_FIN;
          end
        end
        S_STALL: begin
          stall_cycles <= stall_cycles + 1'b1;
          if (!rep_busy)
            state <= (step == len_q + (LOC_W+1)'(DR)) ? S_FIN : S_RUN;
        end
        S_FIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
