// address_monitor: counts read and write references to 512 contiguous, equally
// sized regions of memory.
//
// The monitored range starts at iStartAddress and spans 2^(iSize+9) bytes;
// each of its 512 regions is 2^iSize bytes. An access inside the range is
// mapped to counter index (iAddress - iStartAddress) >> iSize, and that counter
// is incremented in the write counter block if iWriteAccess is high, in the read
// counter block otherwise. Accesses outside the range are ignored. iQueryIndex
// reads one counter pair for the update logic, independently of the counting.
//
// The range test, the index formula, the two counter blocks and the port
// names and widths follow the design. The access strobe iAccessValid (the
// memory bus must say when an access takes place) and the oHit/oReady/oBypass
// outputs are this design's own additions. The address arithmetic is done
// 41 bits wide so that every size code 0..31 is well defined.
//
// Timing: an access in cycle t is counted in cycle t+1 (see ref_counter_block);
// oReads/oWrites show the counter selected by iQueryIndex one cycle later.
module address_monitor
  import mpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              iAccessValid,
  input  addr_t             iAddress,
  input  logic              iWriteAccess,
  input  idx_t              iQueryIndex,
  input  addr_t             iStartAddress,
  input  logic [SIZE_W-1:0] iSize,
  output cnt_t              oReads,
  output cnt_t              oWrites,
  output logic              oHit,      // access falls inside the monitored range
  output logic              oReady,    // counters cleared after reset
  output logic              oBypass    // a back-to-back increment was forwarded
);

  localparam int unsigned XW = ADDR_W + 9;  // enough for a 2^40 byte scope

  logic [XW-1:0] offset;
  logic [XW-1:0] limit;
  logic          in_range;
  idx_t          counter_index;
  logic          rd_ready, wr_ready;
  logic          rd_bypass, wr_bypass;

  always_comb begin
    offset        = XW'(iAddress) - XW'(iStartAddress);
    limit         = XW'(1) << ({1'b0, iSize} + 6'd9);
    in_range      = (iAddress >= iStartAddress) && (offset < limit);
    counter_index = idx_t'(offset >> iSize);
  end

  assign oHit   = iAccessValid && in_range;
  assign oReady  = rd_ready && wr_ready;
  assign oBypass = rd_bypass || wr_bypass;

  ref_counter_block u_reads (
    .clk         (clk),
    .rst         (rst),
    .iIncValid   (oHit && !iWriteAccess),
    .iIncIndex   (counter_index),
    .iQueryIndex (iQueryIndex),
    .oQueryValue (oReads),
    .oReady      (rd_ready),
    .oBypass     (rd_bypass)
  );

  ref_counter_block u_writes (
    .clk         (clk),
    .rst         (rst),
    .iIncValid   (oHit && iWriteAccess),
    .iIncIndex   (counter_index),
    .iQueryIndex (iQueryIndex),
    .oQueryValue (oWrites),
    .oReady      (wr_ready),
    .oBypass     (wr_bypass)
  );

endmodule
