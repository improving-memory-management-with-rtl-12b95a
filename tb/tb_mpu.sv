// tb_mpu: end-to-end test of the memory profiling unit at its default
// configuration (32 monitors, bank 0 = 0..64 MiB in 8 KiB regions, bank 1 =
// 0..32 KiB in 4-byte regions, two profilers).
//
// A synthetic memory trace is driven, one reference per cycle at most, while
// the unit profiles: hot 8 KiB pages, dense traffic in the low 32 KiB (seen by
// both banks), back-to-back references to one address, references above
// 64 MiB that no monitor covers, idle cycles, a stretch with monitoring
// switched off (those references must not count) and a stretch with profiling
// switched off. A model counts reads and writes per global key by its own
// address arithmetic. After the trace, the unit keeps profiling for two full
// scans (2 x 16384 cycles), after which every profile must be exact: all 32
// entries are read through the 5-bit profile selector (one clock of latency),
// each entry's count must equal the model's count for its key, the key must
// belong to the right bank, and the four counts of each profile must be the
// four largest (or smallest) counts of that bank. Ties between equal counts
// are allowed to resolve either way, so keys are checked through their counts.
// Every mechanism of the unit (range hit, forwarding of back-to-back
// increments, scan wrap, profile update, list insertion, list move, ignored
// references with monitoring off, pausing with profiling off) is counted and
// must occur at least once.
module tb_mpu;
  import mpu_pkg::*;

  localparam int NKEY = NMON * NCNT;   // 16384 global keys
  localparam int SWEEP = NKEY;

  logic clk = 1'b0;
  logic rst;
  logic acc_valid, wr, en_mon, en_prof;
  addr_t addr;
  logic [4:0] prof;
  key_t okey;
  cnt_t oval;
  logic ovalid, ready;
  mpu_events_t ev;

  int checks = 0, failures = 0;
  longint unsigned m_reads  [NKEY];
  longint unsigned m_writes [NKEY];

  int n_hit = 0, n_bypass = 0, n_wrap = 0, n_update = 0, n_insert = 0, n_move = 0;
  int n_ignored = 0, n_paused = 0;

  mpu dut (
    .clk(clk), .rst(rst), .iAccessValid(acc_valid), .iAddress(addr), .iWriteAccess(wr),
    .iProfile(prof), .iEnableMonitoring(en_mon), .iEnableProfiling(en_prof),
    .oProfileKey(okey), .oProfileValue(oval), .oProfileValid(ovalid), .oReady(ready),
    .oEvents(ev)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (ev.access_hit)  n_hit++;
    if (ev.bypass)      n_bypass++;
    if (ev.scan_wrap)   n_wrap++;
    if (ev.prof_update) n_update++;
    if (ev.list_insert) n_insert++;
    if (ev.list_move)   n_move++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: which counters does a reference touch?
  task automatic model_access(input longint unsigned a, input logic w);
    int k;
    if (a < 64'd64 * 1024 * 1024) begin
      k = int'(a / (4 * 1024 * 1024)) * 512 + int'((a % (4 * 1024 * 1024)) / 8192);
      if (w) m_writes[k] = m_writes[k] + 1; else m_reads[k] = m_reads[k] + 1;
    end
    if (a < 64'd32 * 1024) begin
      k = (16 + int'(a / 2048)) * 512 + int'((a % 2048) / 4);
      if (w) m_writes[k] = m_writes[k] + 1; else m_reads[k] = m_reads[k] + 1;
    end
  endtask

  task automatic ref_cycle(input longint unsigned a, input logic w, input logic counted);
    @(negedge clk);
    acc_valid = 1'b1; addr = addr_t'(a); wr = w;
    if (counted && en_mon) model_access(a, w);
    else n_ignored++;
  endtask

  function automatic longint unsigned pick_addr();
    int r;
    r = $urandom_range(0, 99);
    if (r < 45) return longint'($urandom_range(0, 32 * 1024 - 1));              // low 32 KiB
    if (r < 75) return longint'($urandom_range(0, 5)) * 8192 * 37 + 64'h40_0000  // hot pages
                       + longint'($urandom_range(0, 8191));
    if (r < 90) return longint'($urandom_range(0, 64 * 1024 * 1024 - 1));       // anywhere in bank 0
    return 64'h0400_0000 + longint'($urandom_range(0, 32'h0FFF_FFFF));            // above 64 MiB
  endfunction

  task automatic traffic(input int n);
    longint unsigned a;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); acc_valid = 1'b0;
      end else if ($urandom_range(0, 19) == 0) begin
        a = pick_addr();
        for (int b = 0; b < 4; b++) ref_cycle(a, 1'b1, 1'b1);  // back-to-back
      end else begin
        ref_cycle(pick_addr(), $urandom_range(0, 2) == 0, 1'b1);
      end
    end
    @(negedge clk); acc_valid = 1'b0;
  endtask

  // Values of the true top/flop four of one bank for reads or writes.
  task automatic expected_values(input int bank, input bit writes, input bit flop,
                                 output longint unsigned vals [4]);
    longint unsigned v [$];
    for (int k = bank * 8192; k < (bank + 1) * 8192; k++) v.push_back(writes ? m_writes[k] : m_reads[k]);
    if (flop) v.sort(); else v.rsort();
    for (int i = 0; i < 4; i++) vals[i] = v[i];
  endtask

  task automatic check_profiles();
    longint unsigned exp_v [4];
    for (int p = 0; p < 2; p++) begin
      for (int prof_i = 0; prof_i < 4; prof_i++) begin
        bit is_w, is_f;
        key_t seen [4];
        is_w = (prof_i >= 2); is_f = (prof_i % 2 == 1);
        expected_values(p, is_w, is_f, exp_v);
        for (int slot = 0; slot < 4; slot++) begin
          longint unsigned model_v;
          @(negedge clk); prof = 5'(p * 16 + prof_i * 4 + slot);
          @(posedge clk); #1;
          model_v = is_w ? m_writes[okey] : m_reads[okey];
          seen[slot] = okey;
          checks++;
          if (!ovalid || int'(okey) / 8192 != p || longint'(oval) != model_v || longint'(oval) != exp_v[slot]) begin
            failures++;
            $display("FAIL profiler %0d profile %0d slot %0d: key %0d value %0d (model %0d, expected %0d) valid %0b",
                     p, prof_i, slot, okey, oval, model_v, exp_v[slot], ovalid);
          end
          for (int j = 0; j < slot; j++) begin
            checks++;
            if (seen[j] == okey) begin failures++; $display("FAIL duplicate key %0d", okey); end
          end
        end
      end
    end
  endtask

  initial begin
    int cyc;
    rst = 1'b1; acc_valid = 1'b0; addr = '0; wr = 1'b0; prof = '0;
    en_mon = 1'b1; en_prof = 1'b1;
    for (int k = 0; k < NKEY; k++) begin m_reads[k] = 0; m_writes[k] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NCNT) begin failures++; $display("FAIL counters ready after %0d cycles", cyc); end

    traffic(30000);
    // Monitoring switched off: references are not counted.
    en_mon = 1'b0;
    for (int i = 0; i < 500; i++) ref_cycle(pick_addr(), 1'b0, 1'b0);
    @(negedge clk); acc_valid = 1'b0; en_mon = 1'b1;
    // Profiling paused: after the two beats already in the scan pipeline,
    // no beat may reach the profilers.
    en_prof = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      if (i >= 2) begin
        checks++; n_paused++;
        if (ev.prof_update) begin failures++; $display("FAIL update while paused"); end
      end
    end
    en_prof = 1'b1;
    traffic(20000);

    // Let two full scans pass over the final counts.
    repeat (2 * SWEEP + 8) @(negedge clk);
    check_profiles();

    $display("hits=%0d bypasses=%0d wraps=%0d updates=%0d inserts=%0d moves=%0d ignored=%0d paused=%0d",
             n_hit, n_bypass, n_wrap, n_update, n_insert, n_move, n_ignored, n_paused);
    checks++;
    if (n_hit == 0 || n_bypass == 0 || n_wrap == 0 || n_update == 0 || n_insert == 0 ||
        n_move == 0 || n_ignored == 0 || n_paused == 0) begin
      failures++; $display("FAIL some mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
