// tb_address_monitor: self-checking test of one read/write address monitor.
// Three configurations are run, each after a reset: 8 KiB regions (size code
// 13), 4-byte regions (size code 2) at a non-zero start, and 1 GiB regions
// (size code 21) reaching the top of the 32-bit space. Random reads and writes
// are issued every cycle, half of them in_rng the range, plus the four range
// boundaries. A software model maps each address with plain integer division;
// afterwards every read and write counter is queried and compared, and the hit
// flag is checked access by access.
module tb_address_monitor;
  import mpu_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic acc_valid, wr;
  addr_t addr, start;
  logic [4:0] size;
  idx_t q_idx;
  cnt_t reads, writes;
  logic hit, ready, bypass;

  int checks = 0, failures = 0;
  longint unsigned m_reads [512];
  longint unsigned m_writes[512];

  address_monitor dut (
    .clk(clk), .rst(rst), .iAccessValid(acc_valid), .iAddress(addr), .iWriteAccess(wr),
    .iQueryIndex(q_idx), .iStartAddress(start), .iSize(size),
    .oReads(reads), .oWrites(writes), .oHit(hit), .oReady(ready), .oBypass(bypass)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue one access in the current cycle and update the model.
  task automatic access(input longint unsigned a, input logic w);
    longint unsigned s, scope, idx;
    logic in_rng;
    s     = longint'(start);
    scope = 64'd1 << (size + 9);
    in_rng = (a >= s) && (a < s + scope);
    @(negedge clk);
    acc_valid = 1'b1; addr = addr_t'(a); wr = w;
    #1 check("hit flag", 64'(hit), 64'(in_rng));
    if (in_rng) begin
      idx = (a - s) / (64'd1 << size);
      if (w) m_writes[idx] = m_writes[idx] + 1; else m_reads[idx] = m_reads[idx] + 1;
    end
  endtask

  task automatic run(input addr_t st, input logic [4:0] sz, input int n);
    longint unsigned s, scope, a;
    start = st; size = sz; acc_valid = 1'b0;
    for (int i = 0; i < 512; i++) begin m_reads[i] = 0; m_writes[i] = 0; end
    @(negedge clk); rst = 1'b1;
    repeat (2) @(negedge clk); rst = 1'b0;
    while (!ready) @(negedge clk);
    s = longint'(st); scope = 64'd1 << (sz + 9);
    if (s > 0) access(s - 1, 1'b0);
    access(s, 1'b1);
    access(s + scope - 1, 1'b0);
    if (s + scope <= 64'hFFFF_FFFF) access(s + scope, 1'b1);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 1)) a = s + (longint'($urandom()) % scope);
      else a = longint'($urandom());
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk); acc_valid = 1'b0;   // idle cycle
      end else begin
        access(a, $urandom_range(0, 1) == 1);
      end
    end
    @(negedge clk); acc_valid = 1'b0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 512; i++) begin
      q_idx = idx_t'(i);
      @(posedge clk); #1;
      check($sformatf("reads[%0d]", i), reads, m_reads[i]);
      check($sformatf("writes[%0d]", i), writes, m_writes[i]);
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b0; acc_valid = 1'b0; addr = '0; wr = 1'b0; q_idx = '0;
    start = '0; size = '0;
    run(32'h0000_0000, 5'd13, 20000);
    run(32'h0000_8000, 5'd2,  20000);
    run(32'h4000_0000, 5'd21, 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
