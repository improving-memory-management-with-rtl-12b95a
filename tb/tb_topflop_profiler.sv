// tb_topflop_profiler: self-checking test of the TOP/FLOP profiler.
// Each round first churns the four lists with random beats, then gives every
// key 0..299 a fixed, distinct read count and write count and sweeps all keys
// twice, the way the update logic does. After two sweeps over fixed counts the
// lists must hold exactly the four largest and four smallest counts among the
// keys inside [iStartKey, iEndKey]; keys outside the range get extreme counts,
// so a profiler that took them would show them. All 16 profile entries are
// read through iProfile and compared with a sorted reference; the read-out
// latency of one clock edge is checked on each read.
module tb_topflop_profiler;
  import mpu_pkg::*;

  localparam int NKEYS = 300;

  logic clk = 1'b0;
  logic rst;
  logic cvalid;
  key_t ckey, skey, ekey;
  cnt_t creads, cwrites;
  logic [3:0] prof;
  key_t okey;
  cnt_t oval;
  logic ovalid, oupd;
  logic [3:0] oins, omov;

  int checks = 0, failures = 0;
  cnt_t rd_cnt [NKEYS];
  cnt_t wr_cnt [NKEYS];

  topflop_profiler dut (
    .clk(clk), .rst(rst), .iCounterValid(cvalid), .iCounterKey(ckey),
    .iCounterReads(creads), .iCounterWrites(cwrites), .iStartKey(skey), .iEndKey(ekey),
    .iProfile(prof), .oProfileKey(okey), .oProfileValue(oval), .oProfileValid(ovalid),
    .oUpdate(oupd), .oInsert(oins), .oMove(omov)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic beat(input key_t k, input cnt_t r, input cnt_t w);
    @(negedge clk);
    cvalid = 1'b1; ckey = k; creads = r; cwrites = w;
  endtask

  // Expected key at slot `slot` of profile `p` (0 most read, 1 least read,
  // 2 most written, 3 least written), found by selection over the range.
  function automatic int expect_key(input int p, input int slot);
    bit used [NKEYS];
    int best;
    for (int s = 0; s <= slot; s++) begin
      best = -1;
      for (int k = int'(skey); k <= int'(ekey); k++) begin
        cnt_t v, b;
        if (used[k]) continue;
        v = (p < 2) ? rd_cnt[k] : wr_cnt[k];
        if (best >= 0) b = (p < 2) ? rd_cnt[best] : wr_cnt[best];
        if (best < 0 || ((p % 2 == 0) ? (v > b) : (v < b))) best = k;
      end
      used[best] = 1'b1;
      if (s == slot) return best;
    end
    return -1;
  endfunction

  task automatic round(input key_t s, input key_t e);
    int perm_r [NKEYS];
    int perm_w [NKEYS];
    // A new key range starts from empty lists: entries taken under an old
    // range would otherwise stay.
    @(negedge clk); cvalid = 1'b0; rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    skey = s; ekey = e;
    // Churn with random beats.
    for (int n = 0; n < 2000; n++)
      beat(key_t'($urandom_range(0, NKEYS - 1)), cnt_t'($urandom_range(0, 5000)), cnt_t'($urandom_range(0, 5000)));
    // Distinct fixed counts: a shuffled 0..NKEYS-1 scaled; outside the range
    // keys get counts far above and below all others.
    for (int k = 0; k < NKEYS; k++) begin perm_r[k] = k; perm_w[k] = k; end
    perm_r.shuffle(); perm_w.shuffle();
    for (int k = 0; k < NKEYS; k++) begin
      if (k >= int'(s) && k <= int'(e)) begin
        rd_cnt[k] = cnt_t'(100 + 7 * perm_r[k]);
        wr_cnt[k] = cnt_t'(100 + 5 * perm_w[k]);
      end else begin
        rd_cnt[k] = (k % 2 == 0) ? 36'hF_FFFF_FFFF : 36'd0;
        wr_cnt[k] = (k % 2 == 0) ? 36'd0 : 36'hF_FFFF_FFFF;
      end
    end
    for (int sweep = 0; sweep < 2; sweep++)
      for (int k = 0; k < NKEYS; k++) beat(key_t'(k), rd_cnt[k], wr_cnt[k]);
    @(negedge clk); cvalid = 1'b0;
    // Read all sixteen entries.
    for (int p = 0; p < 4; p++) begin
      for (int slot = 0; slot < 4; slot++) begin
        int ek;
        cnt_t ev;
        ek = expect_key(p, slot);
        ev = (p < 2) ? rd_cnt[ek] : wr_cnt[ek];
        @(negedge clk); prof = 4'(p * 4 + slot);
        @(posedge clk); #1;
        checks++;
        if (!ovalid || okey != key_t'(ek) || oval != ev) begin
          failures++;
          $display("FAIL range %0d..%0d profile %0d slot %0d: got %0b %0d/%0d expected %0d/%0d",
                   s, e, p, slot, ovalid, okey, oval, ek, ev);
        end
      end
    end
  endtask

  initial begin
    rst = 1'b1; cvalid = 1'b0; ckey = '0; creads = '0; cwrites = '0;
    skey = '0; ekey = '0; prof = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Empty after reset.
    @(negedge clk); prof = 4'd5;
    @(posedge clk); #1;
    checks++;
    if (ovalid) begin failures++; $display("FAIL entry valid after reset"); end
    round(16'd100, 16'd163);
    round(16'd0,   16'd299);
    round(16'd37,  16'd44);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
