// tb_untouched_regions: the case the periodic scan exists for. Every 8 KiB
// page of 0..64 MiB (bank 0) and every 4-byte word of 0..32 KiB (bank 1) is
// read and written at least once (a few of them several times), except for
// four pages and four words that are never read and four others that are
// never written. A profiler that only saw changing counters could not find
// them. After two full scans the least-read and least-written profiles of both
// banks must hold exactly those regions, each with a count of zero, and the
// most-read and most-written profiles must hold the regions that were hit
// most often, with their exact counts. The MPU runs at its default size.
module tb_untouched_regions;
  import mpu_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic acc_valid, wr;
  addr_t addr;
  logic [4:0] prof;
  key_t okey;
  cnt_t oval;
  logic ovalid, ready;
  mpu_events_t ev;

  int checks = 0, failures = 0;

  // Untouched regions, as region numbers inside each bank (0..8191).
  int no_read  [2][4] = '{'{100, 2047, 4096, 8191}, '{3, 777, 5000, 8190}};
  int no_write [2][4] = '{'{11, 1234, 6000, 7777},   '{0, 64, 4095, 8000}};
  // Hot regions: region number and extra references per bank.
  int hot      [2][4] = '{'{10, 20, 30, 40},        '{9, 99, 999, 7000}};
  int hot_n    [4]    = '{40, 30, 20, 10};

  mpu dut (
    .clk(clk), .rst(rst), .iAccessValid(acc_valid), .iAddress(addr), .iWriteAccess(wr),
    .iProfile(prof), .iEnableMonitoring(1'b1), .iEnableProfiling(1'b1),
    .oProfileKey(okey), .oProfileValue(oval), .oProfileValid(ovalid), .oReady(ready),
    .oEvents(ev)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit member(input int r, input int list [4]);
    foreach (list[i]) if (list[i] == r) return 1'b1;
    return 1'b0;
  endfunction

  // Address of region r of a bank. Bank-0 references go to the middle of the
  // page, above 32 KiB for every page but 0..3, so that bank 1 is not
  // disturbed by them.
  function automatic addr_t region_addr(input int bank, input int r);
    return (bank == 0) ? addr_t'(r * 8192 + 4096) : addr_t'(r * 4);
  endfunction

  task automatic ref_cycle(input addr_t a, input logic w);
    @(negedge clk);
    acc_valid = 1'b1; addr = a; wr = w;
  endtask

  // Bank-0 pages 0..3 also receive every bank-1 reference (they share the low
  // 32 KiB), so bank-0 counts are kept by this model rather than assumed; the
  // untouched bank-0 pages are chosen outside pages 0..3.
  longint unsigned rd0 [8192], wr0 [8192];

  task automatic bank_refs(input int bank);
    for (int r = 0; r < 8192; r++) begin
      int n;
      n = 1;
      for (int h = 0; h < 4; h++) if (hot[bank][h] == r) n = 1 + hot_n[h];
      if (!member(r, no_read[bank])) for (int i = 0; i < n; i++) begin
        ref_cycle(region_addr(bank, r), 1'b0);
        if (bank == 0) rd0[r]++; else rd0[r / 2048]++;
      end
      if (!member(r, no_write[bank])) for (int i = 0; i < n; i++) begin
        ref_cycle(region_addr(bank, r), 1'b1);
        if (bank == 0) wr0[r]++; else wr0[r / 2048]++;
      end
    end
    @(negedge clk); acc_valid = 1'b0;
  endtask

  task automatic read_entry(input int p, input int pr, input int slot);
    @(negedge clk); prof = 5'(p * 16 + pr * 4 + slot);
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1'b1; acc_valid = 1'b0; addr = '0; wr = 1'b0; prof = '0;
    for (int r = 0; r < 8192; r++) begin rd0[r] = 0; wr0[r] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (!ready) @(negedge clk);
    bank_refs(1);
    bank_refs(0);
    repeat (2 * 16384 + 8) @(negedge clk);

    for (int p = 0; p < 2; p++) begin
      // Least read (profile 1) and least written (profile 3): exactly the
      // untouched regions, in any order (all counts are zero).
      for (int pr = 1; pr <= 3; pr += 2) begin
        for (int slot = 0; slot < 4; slot++) begin
          int region;
          read_entry(p, pr, slot);
          region = int'(okey) - p * 8192;
          checks++;
          if (!ovalid || oval != 0 || region < 0 || region > 8191 ||
              !member(region, (pr == 1) ? no_read[p] : no_write[p])) begin
            failures++;
            $display("FAIL bank %0d profile %0d slot %0d: key %0d count %0d is not an untouched region",
                     p, pr, slot, okey, oval);
          end
        end
      end
      // Most read (0) and most written (2): hot regions in order of heat,
      // except that bank-0 page 0..3 counts include the bank-1 sweep.
      for (int pr = 0; pr <= 2; pr += 2) begin
        for (int slot = 0; slot < 4; slot++) begin
          longint unsigned exp_v;
          int exp_r;
          if (p == 1) begin
            exp_r = hot[1][slot]; exp_v = 64'(1 + hot_n[slot]);
          end else begin
            // Rank bank-0 pages by the model counts.
            int order [$];
            order.delete();
            for (int r = 0; r < 8192; r++) order.push_back(r);
            if (pr == 0) order.rsort() with (rd0[item]);
            else         order.rsort() with (wr0[item]);
            exp_r = order[slot];
            exp_v = (pr == 0) ? rd0[exp_r] : wr0[exp_r];
          end
          read_entry(p, pr, slot);
          checks++;
          if (!ovalid || int'(okey) != p * 8192 + exp_r || longint'(oval) != exp_v) begin
            failures++;
            $display("FAIL bank %0d profile %0d slot %0d: key %0d count %0d, expected region %0d count %0d",
                     p, pr, slot, okey, oval, exp_r, exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
