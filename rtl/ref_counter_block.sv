// ref_counter_block: 512 counters of 36 bits in one memory, each of which can
// be incremented once per clock while a second, independent port reads any
// counter for the profilers.
//
// How it works: an increment request is taken in one cycle and its counter is
// read from the array at that clock edge; in the next cycle the value plus one
// is written back. When two increments of the same counter follow each other
// back to back, the second one would read the value before the first one's
// write, so the value being written is forwarded instead (bypass). A new
// increment is accepted every cycle. The query port reads the array
// synchronously and is fully independent of the increment port.
// After reset the block walks through all counters and writes zero, one per
// cycle (NCNT cycles); oReady is low meanwhile and increments are dropped.
// Counters wrap around at 2^36; saturation handling is left open.
//
// The counter memory with one read-increment-write port and one read port
// follows the design; the original reaches it by running a dual-port block RAM
// at twice the system clock. Here it is written as a single-clock array with
// two read ports and one write port, and the pipelining, forwarding and the
// clear-on-reset sweep are this design's own.
//
// Interface / timing:
//   iIncValid, iIncIndex : increment request, one per cycle at most
//   iQueryIndex          : counter to read; oQueryValue holds it one cycle later
//   An increment taken in cycle t is visible on the query port for a query
//   index applied in cycle t+2 or later (value on oQueryValue in cycle t+3).
module ref_counter_block
  import mpu_pkg::*;
#(
  parameter int unsigned N_COUNTERS = NCNT,
  parameter int unsigned WIDTH      = CNT_W,
  localparam int unsigned AW        = $clog2(N_COUNTERS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             iIncValid,
  input  logic [AW-1:0]    iIncIndex,
  input  logic [AW-1:0]    iQueryIndex,
  output logic [WIDTH-1:0] oQueryValue,
  output logic             oReady,
  output logic             oBypass     // forwarding used this cycle (for statistics)
);

  logic [WIDTH-1:0] mem [N_COUNTERS];

  // Clear sweep after reset.
  logic          clr_active;
  logic [AW-1:0] clr_idx;

  // Stage A: request whose old value has just been read.
  logic             a_valid;
  logic [AW-1:0]    a_idx;
  logic [WIDTH-1:0] a_data;
  // Stage B: the write that was done at the end of the previous cycle.
  logic             b_valid;
  logic [AW-1:0]    b_idx;
  logic [WIDTH-1:0] b_value;

  logic [WIDTH-1:0] a_next;
  logic             fwd;

  assign fwd    = a_valid && b_valid && (a_idx == b_idx);
  assign a_next = (fwd ? b_value : a_data) + WIDTH'(1);
  assign oReady = !clr_active;
  assign oBypass = fwd;

  always_ff @(posedge clk) begin
    if (rst) begin
      clr_active <= 1'b1;
      clr_idx    <= '0;
      a_valid    <= 1'b0;
      b_valid    <= 1'b0;
    end else begin
      if (clr_active) begin
        clr_idx <= clr_idx + AW'(1);
        if (clr_idx == AW'(N_COUNTERS - 1)) clr_active <= 1'b0;
      end
      a_valid <= iIncValid && !clr_active;
      b_valid <= a_valid;
    end
    a_idx   <= iIncIndex;
    b_idx   <= a_idx;
    b_value <= a_next;
  end

  // Memory: one write port, two synchronous read ports.
  always_ff @(posedge clk) begin
    if (clr_active && !rst) mem[clr_idx] <= '0;
    else if (a_valid)       mem[a_idx]   <= a_next;
    a_data      <= mem[iIncIndex];
    oQueryValue <= mem[iQueryIndex];
  end

endmodule
