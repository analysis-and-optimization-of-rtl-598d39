// twinkle_counter -- one B register of a TWINKLE cell.
//
// The register counts sieve ticks upward. Loading it with flash_state() - k
// makes it reach the flash state 10...010000 after k ticks; the flash output
// is then high for that one location. Eight ticks later, in state 10...011000,
// in_report tells the cell to answer a query; one tick after that, in state
// 10...011001, the register either reloads the augmented A value (arithmetic
// progression cells, reload_en = 1) so that the next flash comes p ticks after
// the last one, or disarms itself (single-hit cells, reload_en = 0).
//
// Only the MSB and the five low bits are decoded, which is the state encoding
// of the enhanced cell. That encoding was chosen for an asynchronous ripple
// counter, to save power; here the counter is synchronous, which gives the
// same sequence of states on every tick. The armed bit, which keeps a counter
// that was never loaded (or was disarmed) dark, is this design's addition.
//
// Timing: load has priority and takes effect at the next edge; all outputs
// are combinational functions of the registered state. Counting happens only
// in cycles with tick = 1.
module twinkle_counter
  import twinkle_pkg::*;
#(
  parameter int unsigned CW = CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          load,
  input  logic [CW-1:0] load_val,
  input  logic          disarm,
  input  logic          reload_en,
  input  logic [CW-1:0] a_val,
  output logic          armed,
  output logic          flash,
  output logic          in_report
);

  logic [CW-1:0] cnt;
  logic          msb;
  logic [4:0]    low;

  assign msb       = cnt[CW-1];
  assign low       = cnt[4:0];
  assign flash     = armed && msb && (low == FLASH_LOW);
  assign in_report = armed && msb && (low == REPORT_LOW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      armed <= 1'b0;
    end else if (load) begin
      cnt   <= load_val;
      armed <= 1'b1;
    end else if (disarm) begin
      armed <= 1'b0;
    end else if (tick && armed) begin
      if (msb && low == RELOAD_LOW) begin
        if (reload_en) cnt <= a_val;
        else           armed <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
