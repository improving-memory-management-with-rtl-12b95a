// tb_update_logic: self-checking test of the counter scan.
// Thirty-two model monitors answer a query index one cycle later with a count
// that is a fixed function of monitor and index. With the enable toggled at
// random, every valid beat on the profiling bus must carry the next key in
// order (wrapping from 16383 to 0), the counts belonging to that key, and must
// be registered at the second clock edge after its query index was applied. The wrap pulse must come
// once per 16384 enabled cycles, and no beat may appear while disabled.
module tb_update_logic;
  import mpu_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic en;
  idx_t qidx;
  cnt_t mreads  [NMON];
  cnt_t mwrites [NMON];
  prof_bus_t bus;
  logic wrap;

  int checks = 0, failures = 0, wraps = 0, beats = 0;

  update_logic dut (
    .clk(clk), .rst(rst), .iEnable(en), .oQueryIndex(qidx),
    .iReads(mreads), .iWrites(mwrites), .oBus(bus), .oWrap(wrap)
  );

  function automatic cnt_t fr(input int m, input int i);
    return cnt_t'(m * 100000 + i * 3 + 1);
  endfunction
  function automatic cnt_t fw(input int m, input int i);
    return cnt_t'(m * 7 + i * 1000 + 2);
  endfunction

  // Model monitors: synchronous read of the query index.
  always_ff @(posedge clk)
    for (int m = 0; m < NMON; m++) begin
      mreads[m]  <= fr(m, int'(qidx));
      mwrites[m] <= fw(m, int'(qidx));
    end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] en_hist;      // enable of the last two cycles
  int expect_key;
  int enabled_cycles;

  initial begin
    rst = 1'b1; en = 1'b0; en_hist = '0; expect_key = 0; enabled_cycles = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 60000; n++) begin
      @(negedge clk);
      en = (n > 100) ? ($urandom_range(0, 7) != 0) : 1'b0;
      @(posedge clk);
      #1;
      // The bus now shows the beat of the previous cycle's enable: its query
      // index was applied then, the monitors answered, and it was registered.
      checks++;
      if (bus.valid != en_hist[0]) begin
        failures++; $display("FAIL valid %0b expected %0b at n=%0d", bus.valid, en_hist[0], n);
      end
      if (bus.valid) begin
        int m, i;
        beats++;
        m = expect_key >> 9; i = expect_key & 511;
        checks++;
        if (int'(bus.key) != expect_key || bus.reads != fr(m, i) || bus.writes != fw(m, i)) begin
          failures++;
          $display("FAIL beat key %0d reads %0d writes %0d, expected key %0d", bus.key, bus.reads, bus.writes, expect_key);
        end
        expect_key = (expect_key + 1) % 16384;
      end
      en_hist = {en_hist[0], en};
    end
    @(negedge clk); en = 1'b0;
    checks++;
    if (wraps != enabled_cycles / 16384 || wraps == 0) begin
      failures++; $display("FAIL %0d wraps for %0d enabled cycles", wraps, enabled_cycles);
    end
    $display("beats=%0d wraps=%0d", beats, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && en) enabled_cycles <= enabled_cycles + 1;
    if (wrap) wraps <= wraps + 1;
  end
endmodule
