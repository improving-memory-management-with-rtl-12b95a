// update_logic: presents every counter of every address monitor, one by one
// and over and over, to the profilers.
//
// How it works: a 14-bit roll-over scan counter runs while iEnable is high.
// Its low 9 bits go to all monitors as the query index; its high 5 bits pick
// the monitor whose answer is put on the profiling bus. Because the monitors
// answer a query one cycle later, the monitor select and the key are delayed
// by one cycle to line up with the data, and the multiplexed pair is
// registered once more before it drives the bus. The key of a beat is the scan
// value itself, zero-extended to 16 bits, so it names one counter pair of the
// whole unit. A full sweep takes 2^14 = 16384 cycles.
//
// The scan counter, the bit split and the multiplexer follow the design; the
// two pipeline registers, the enable and the oWrap pulse are this design's
// own.
//
// Timing: the counter value c applied in cycle t appears on oBus in cycle t+2
// with oBus.key = c. oWrap is high in the cycle the counter goes from its last
// value back to zero.
module update_logic
  import mpu_pkg::*;
#(
  parameter int unsigned N_MON = NMON,
  parameter int unsigned M_W   = MON_W,
  parameter int unsigned I_W   = IDX_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           iEnable,
  output logic [I_W-1:0] oQueryIndex,
  input  cnt_t           iReads  [N_MON],
  input  cnt_t           iWrites [N_MON],
  output prof_bus_t      oBus,
  output logic           oWrap
);

  logic [M_W+I_W-1:0] scan_q;
  logic [M_W+I_W-1:0] key_q;
  logic [M_W-1:0]     sel;
  logic               valid_q;

  assign oQueryIndex = scan_q[I_W-1:0];
  assign sel         = key_q[M_W+I_W-1:I_W];
  assign oWrap       = iEnable && (scan_q == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      scan_q  <= '0;
      key_q   <= '0;
      valid_q <= 1'b0;
      oBus    <= '0;
    end else begin
      if (iEnable) scan_q <= scan_q + 1'b1;
      key_q   <= scan_q;
      valid_q <= iEnable;
      oBus.valid  <= valid_q && (32'(sel) < N_MON);
      oBus.key    <= key_t'(key_q);
      oBus.reads  <= (32'(sel) < N_MON) ? iReads[sel]  : '0;
      oBus.writes <= (32'(sel) < N_MON) ? iWrites[sel] : '0;
    end
  end

endmodule
