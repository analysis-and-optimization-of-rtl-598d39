// twinkle_pkg -- types and constants shared by the TWINKLE sieving array.
//
// The array sieves one "line" of sieve locations per run: every enabled clock
// cycle (a "tick") is one location j. Each cell holds B registers that count
// ticks upward; a B register flashes its cell's LED in state 10...010000,
// reports its cell's identity on a query in state 10...011000 and reloads
// from its A register in state 10...011001. Only the MSB and the five low bits
// of the count are decoded, as in the enhanced counter design this array
// follows. The widths below are this design's choice: CNT_W = 25 covers
// primes below 2^24, LOC_W = 16 covers lines of 2*2^12 = 8192 locations.
package twinkle_pkg;

  parameter int unsigned CNT_W = 25;  // B/A register width, MSB is the flash flag
  parameter int unsigned LOC_W = 16;  // sieve location counter width
  parameter int unsigned W_W   = 5;   // LED intensity (approx. log2 p)

  // Low five bits of the three special counter states (MSB set, middle bits 0).
  parameter logic [4:0] FLASH_LOW  = 5'b10000;
  parameter logic [4:0] REPORT_LOW = 5'b11000;
  parameter logic [4:0] RELOAD_LOW = 5'b11001;

  // Query path length: report state minus flash state.
  parameter int unsigned QUERY_DELAY = 8;
  // Ticks from the flash state until a counter has left the reload state.
  parameter int unsigned DRAIN = 10;

  // Register select of a load word on the I/O lines.
  typedef enum logic [3:0] {
    SEL_A      = 4'd0,   // A register (augmented reload value)
    SEL_WEIGHT = 4'd1,   // LED intensity
    SEL_BRAT   = 4'd2,   // rational B register
    SEL_DISARM = 4'd3,   // park every B register of the cell
    SEL_BALG0  = 4'd8    // algebraic B register k is SEL_BALG0 + k, k < 5
  } reg_sel_e;

  // One write on one load lane.
  typedef struct packed {
    logic [15:0]      id;    // cell identity
    reg_sel_e         sel;
    logic [CNT_W-1:0] data;
  } load_word_t;

  // The flash state value 2^(CNT_W-1) + 16.
  function automatic logic [CNT_W-1:0] flash_state();
    return {1'b1, {(CNT_W-6){1'b0}}, FLASH_LOW};
  endfunction

  // Value to load so that the first flash comes after k ticks.
  function automatic logic [CNT_W-1:0] b_init(input logic [CNT_W-1:0] k);
    return flash_state() - k;
  endfunction

  // Augmented A value: after the reload the next flash comes p ticks after
  // the previous one (the reload happens 10 ticks after the flash).
  function automatic logic [CNT_W-1:0] a_value(input logic [CNT_W-1:0] p);
    return flash_state() - p + CNT_W'(DRAIN);
  endfunction

endpackage
