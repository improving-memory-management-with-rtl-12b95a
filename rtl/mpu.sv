// mpu: memory profiling unit. It sits on the memory bus, counts every read and
// write reference per memory region, and keeps, without ever stalling the bus,
// the four most and the four least read and written regions ready for the
// operating system to read.
//
// Structure:
//   * 32 address monitors in two banks. Bank 0 (monitors 0..15) covers
//     BANK0_BASE + 0..64 MiB, 4 MiB per monitor and 8 KiB per counter
//     (size code 13). Bank 1 (monitors 16..31) covers BANK1_BASE + 0..32 KiB,
//     2 KiB per monitor and 4 bytes per counter (size code 2). The ranges are
//     fixed by parameters; overlapping ranges are allowed and both banks see
//     every access.
//   * The update logic scans all 32 x 512 counter pairs with a 14-bit
//     roll-over counter and puts them on the profiling bus, one per cycle.
//   * Profiler 0 takes the keys of bank 0 (0..8191), profiler 1 those of
//     bank 1 (8192..16383).
//   * iProfile[4] picks the profiler, iProfile[3:0] the profile entry
//     (see topflop_profiler); the entry is on oProfileKey/oProfileValue from
//     the next clock edge. The key names monitor (bits 13:9) and counter
//     (bits 8:0), from which the region address follows.
//
// Bus side: a reference is counted when iAccessValid and iEnableMonitoring are
// both high; iWriteAccess tells a write from a read. One reference per cycle
// is accepted. Profiling runs while iEnableProfiling is high and the counters
// have been cleared after reset (oReady, 512 cycles after reset ends).
//
// The monitor/bank/profiler arrangement, the bank ranges, the 14-bit scan and
// the port names follow the design. iAccessValid, oProfileValid, oReady, the oEvents flags,
// the bit used to select the profiler and the clear-on-reset sweep are this
// design's own; the memory-mapped register interface through which the
// operating system reads the profiles is not part of this module (the profile
// selector and the key/value outputs are what such an interface would use).
module mpu
  import mpu_pkg::*;
#(
  parameter addr_t             BANK0_BASE = 32'h0000_0000,
  parameter logic [SIZE_W-1:0] BANK0_SIZE = 5'd13,
  parameter addr_t             BANK1_BASE = 32'h0000_0000,
  parameter logic [SIZE_W-1:0] BANK1_SIZE = 5'd2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       iAccessValid,
  input  addr_t      iAddress,
  input  logic       iWriteAccess,
  input  logic [4:0] iProfile,
  input  logic       iEnableMonitoring,
  input  logic       iEnableProfiling,
  output key_t       oProfileKey,
  output cnt_t       oProfileValue,
  output logic       oProfileValid,
  output logic       oReady,
  output mpu_events_t oEvents
);

  localparam int unsigned BANK_MON = NMON / 2;  // monitors per bank

  idx_t       query_index;
  cnt_t       mon_reads  [NMON];
  cnt_t       mon_writes [NMON];
  logic [NMON-1:0] mon_ready;
  logic [NMON-1:0] mon_hit;
  logic [NMON-1:0] mon_bypass;
  prof_bus_t  bus;
  logic       scan_wrap;

  // Address monitors.
  for (genvar m = 0; m < NMON; m++) begin : g_mon
    localparam bit                BANK  = (m >= BANK_MON);
    localparam logic [SIZE_W-1:0] SIZE  = BANK ? BANK1_SIZE : BANK0_SIZE;
    localparam addr_t             BASE  = BANK ? BANK1_BASE : BANK0_BASE;
    localparam addr_t             START = BASE + addr_t'((m % BANK_MON) << (SIZE + 9));
    address_monitor u_mon (
      .clk           (clk),
      .rst           (rst),
      .iAccessValid  (iAccessValid && iEnableMonitoring),
      .iAddress      (iAddress),
      .iWriteAccess  (iWriteAccess),
      .iQueryIndex   (query_index),
      .iStartAddress (START),
      .iSize         (SIZE),
      .oReads        (mon_reads[m]),
      .oWrites       (mon_writes[m]),
      .oHit          (mon_hit[m]),
      .oReady        (mon_ready[m]),
      .oBypass       (mon_bypass[m])
    );
  end

  assign oReady = &mon_ready;

  // Update logic.
  update_logic u_update (
    .clk         (clk),
    .rst         (rst),
    .iEnable     (iEnableProfiling && oReady),
    .oQueryIndex (query_index),
    .iReads      (mon_reads),
    .iWrites     (mon_writes),
    .oBus        (bus),
    .oWrap       (scan_wrap)
  );

  // Profilers.
  key_t       p_key   [2];
  cnt_t       p_value [2];
  logic       p_valid [2];
  logic       p_update[2];
  logic [3:0] p_insert[2];
  logic [3:0] p_move  [2];

  for (genvar p = 0; p < 2; p++) begin : g_prof
    localparam key_t START_KEY = key_t'(p * BANK_MON * NCNT);
    localparam key_t END_KEY   = key_t'((p + 1) * BANK_MON * NCNT - 1);
    topflop_profiler u_prof (
      .clk            (clk),
      .rst            (rst),
      .iCounterValid  (bus.valid),
      .iCounterKey    (bus.key),
      .iCounterReads  (bus.reads),
      .iCounterWrites (bus.writes),
      .iStartKey      (START_KEY),
      .iEndKey        (END_KEY),
      .iProfile       (iProfile[3:0]),
      .oProfileKey    (p_key[p]),
      .oProfileValue  (p_value[p]),
      .oProfileValid  (p_valid[p]),
      .oUpdate        (p_update[p]),
      .oInsert        (p_insert[p]),
      .oMove          (p_move[p])
    );
  end

  // Profile read-out multiplexer; the profilers register their outputs, so
  // the profiler select is registered alongside.
  logic prof_sel_q;
  always_ff @(posedge clk) begin
    if (rst) prof_sel_q <= 1'b0;
    else     prof_sel_q <= iProfile[4];
  end

  assign oProfileKey   = p_key[prof_sel_q];
  assign oProfileValue = p_value[prof_sel_q];
  assign oProfileValid = p_valid[prof_sel_q];

  always_comb begin
    oEvents.access_hit  = |mon_hit;
    oEvents.bypass      = |mon_bypass;
    oEvents.scan_wrap   = scan_wrap;
    oEvents.prof_update = p_update[0] || p_update[1];
    oEvents.list_insert = |{p_insert[0], p_insert[1]};
    oEvents.list_move   = |{p_move[0], p_move[1]};
  end

endmodule
