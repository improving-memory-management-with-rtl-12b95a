// tb_ref_counter_block: self-checking test of the 512 x 36-bit counter memory.
// Checks the clear sweep after reset (length and zero contents), that
// increments during the sweep are dropped, random increments at one per cycle
// with many back-to-back hits on the same counter (forwarding path), the
// independence of the query port, and the query latency (an increment taken
// in cycle t is read back by a query applied two cycles later). A software
// array is the reference model.
module tb_ref_counter_block;
  import mpu_pkg::*;

  localparam int unsigned N = 512;
  localparam int unsigned W = 36;

  logic clk = 1'b0;
  logic rst;
  logic inc_valid;
  logic [8:0] inc_idx, q_idx;
  logic [W-1:0] q_val;
  logic ready, bypass;

  int checks = 0, failures = 0, bypasses = 0;
  logic [W-1:0] model [N];

  ref_counter_block dut (
    .clk(clk), .rst(rst), .iIncValid(inc_valid), .iIncIndex(inc_idx),
    .iQueryIndex(q_idx), .oQueryValue(q_val), .oReady(ready), .oBypass(bypass)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (bypass) bypasses++;

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Query one counter: apply index after a falling edge, read after the next rise.
  task automatic query(input int i, output logic [W-1:0] v);
    @(negedge clk); q_idx = 9'(i);
    @(posedge clk); #1 v = q_val;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    logic [W-1:0] v;
    rst = 1'b1; inc_valid = 1'b0; inc_idx = '0; q_idx = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    // Clear sweep: must take N cycles; increments offered now are dropped.
    cycles = 0;
    inc_valid = 1'b1; inc_idx = 9'd7;
    while (!ready) begin @(negedge clk); cycles++; end
    inc_valid = 1'b0;
    checks++;
    if (cycles != N) begin failures++; $display("FAIL clear sweep took %0d cycles", cycles); end
    for (int i = 0; i < N; i++) model[i] = '0;
    for (int i = 0; i < N; i++) begin query(i, v); check("cleared", v, '0); end

    // Latency: increment counter 5 at cycle t, query at t+2 sees it.
    @(negedge clk); inc_valid = 1'b1; inc_idx = 9'd5;
    @(negedge clk); inc_valid = 1'b0; q_idx = 9'd5;
    @(negedge clk);
    @(posedge clk); #1 check("latency t+2", q_val, 36'd1);
    model[5] = 1;

    // Random traffic, one increment per cycle, a small hot set so that
    // back-to-back hits on one counter are frequent.
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      inc_valid = ($urandom_range(0, 9) != 0);
      if ($urandom_range(0, 1)) inc_idx = 9'($urandom_range(0, 3));
      else inc_idx = 9'($urandom_range(0, N - 1));
      q_idx = 9'($urandom_range(0, N - 1));
      if (inc_valid) model[inc_idx] = model[inc_idx] + 1;
    end
    @(negedge clk); inc_valid = 1'b0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < N; i++) begin query(i, v); check($sformatf("count[%0d]", i), v, model[i]); end

    // Query port runs while increments continue on another counter.
    for (int n = 0; n < 50; n++) begin
      @(negedge clk); inc_valid = 1'b1; inc_idx = 9'd100; q_idx = 9'd200;
      @(posedge clk); #1 check("independent query", q_val, model[200]);
    end
    @(negedge clk); inc_valid = 1'b0;

    checks++;
    if (bypasses == 0) begin failures++; $display("FAIL forwarding never used"); end
    $display("bypasses=%0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
