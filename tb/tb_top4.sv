// tb_top4: self-checking test of the TOP4 and FLOP4 sorted lists.
// One TOP4 and one FLOP4 instance see the same random stream of key/value
// pairs (few keys and few values, so that known keys, ties and every
// key-position/value-position combination occur). A queue-based model keeps
// each list: a known key is taken out and put back at its new rank, a new key
// is inserted at its rank if that is one of the first four. After every pair
// all four slots of both lists are compared with the model, the list is
// checked to be sorted, and the (key position, value position) pair is
// recorded; all 21 rows of the transition table must be seen. A directed
// case checks the insertion of a new key at the third place. Each update is
// visible at the clock edge that takes the pair (one per cycle).
module tb_top4;
  import mpu_pkg::*;

  typedef struct {
    key_t k;
    cnt_t v;
  } pair_t;

  logic clk = 1'b0;
  logic rst;
  logic valid;
  key_t key;
  cnt_t value;

  key_t tk [2][4];
  cnt_t tv [2][4];
  logic [3:0] tval [2];
  logic ins [2];
  logic mov [2];

  int checks = 0, failures = 0;
  pair_t model [2][$];
  bit    row_seen [2][5][5];   // [list][key pos 0=none,1..4][value pos 0=none,1..4]

  for (genvar f = 0; f < 2; f++) begin : g_dut
    top4 #(.FLOP(f == 1)) dut (
      .clk(clk), .rst(rst), .iValid(valid), .iCandidateValue(value), .iCandidateKey(key),
      .oFirstKey(tk[f][0]),  .oFirstValue(tv[f][0]),
      .oSecondKey(tk[f][1]), .oSecondValue(tv[f][1]),
      .oThirdKey(tk[f][2]),  .oThirdValue(tv[f][2]),
      .oFourthKey(tk[f][3]), .oFourthValue(tv[f][3]),
      .oValid(tval[f]), .oInsert(ins[f]), .oMove(mov[f])
    );
  end

  always #5 clk = ~clk;

  function automatic bit ahead(input int f, input cnt_t a, input cnt_t b);
    return (f == 1) ? (a < b) : (a > b);
  endfunction

  // Model update; returns the table row that applies.
  task automatic model_step(input int f, input key_t k, input cnt_t v);
    int kp, vp;
    pair_t p;
    kp = -1;
    foreach (model[f][i]) if (model[f][i].k == k) kp = i;
    p.k = k; p.v = v;
    if (kp >= 0) begin
      model[f].delete(kp);
      vp = 0;
      foreach (model[f][i])
        if (ahead(f, model[f][i].v, v) || (model[f][i].v == v && i < kp)) vp++;
      model[f].insert(vp, p);
      row_seen[f][kp + 1][vp + 1] = 1'b1;
    end else begin
      vp = 0;
      foreach (model[f][i]) if (!ahead(f, v, model[f][i].v)) vp++;
      if (vp < 4) begin
        model[f].insert(vp, p);
        if (model[f].size() > 4) void'(model[f].pop_back());
        row_seen[f][0][vp + 1] = 1'b1;
      end else begin
        row_seen[f][0][0] = 1'b1;
      end
    end
  endtask

  task automatic compare(input int f, input string tag);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (i < model[f].size()) begin
        if (!tval[f][i] || tk[f][i] != model[f][i].k || tv[f][i] != model[f][i].v) begin
          failures++;
          $display("FAIL %s list%0d slot%0d: got %0b %0d/%0d expected %0d/%0d", tag, f, i,
                   tval[f][i], tk[f][i], tv[f][i], model[f][i].k, model[f][i].v);
        end
      end else if (tval[f][i]) begin
        failures++;
        $display("FAIL %s list%0d slot%0d should be empty", tag, f, i);
      end
    end
    for (int i = 1; i < 4; i++) begin
      if (tval[f][i]) begin
        checks++;
        if (ahead(f, tv[f][i], tv[f][i-1])) begin
          failures++;
          $display("FAIL %s list%0d not sorted at slot %0d", tag, f, i);
        end
      end
    end
  endtask

  task automatic send(input key_t k, input cnt_t v);
    @(negedge clk);
    valid = 1'b1; key = k; value = v;
    for (int f = 0; f < 2; f++) model_step(f, k, v);
    @(posedge clk); #1;
    for (int f = 0; f < 2; f++) compare(f, $sformatf("k=%0d v=%0d", k, v));
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int missing;
    rst = 1'b1; valid = 1'b0; key = '0; value = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 2; f++) compare(f, "after reset");

    // Directed: fill the TOP list with 40,30,20,10, then a new key with 25
    // must land in 3rd place and push 20 to 4th; 10 drops out.
    send(16'd1, 36'd40); send(16'd2, 36'd30); send(16'd3, 36'd20); send(16'd4, 36'd10);
    send(16'd5, 36'd25);
    checks++;
    if (!(tk[0][0] == 1 && tk[0][1] == 2 && tk[0][2] == 5 && tk[0][3] == 3)) begin
      failures++; $display("FAIL directed insert at 3rd place");
    end

    // An idle cycle leaves the lists alone.
    @(negedge clk); valid = 1'b0; key = 16'd9; value = 36'd99;
    @(posedge clk); #1;
    for (int f = 0; f < 2; f++) compare(f, "idle");

    // Random stream.
    for (int n = 0; n < 30000; n++) begin
      if (n % 5000 == 0) begin
        @(negedge clk); valid = 1'b0; rst = 1'b1;
        @(negedge clk); rst = 1'b0;
        for (int f = 0; f < 2; f++) model[f].delete();
      end
      send(key_t'($urandom_range(0, 7)), cnt_t'($urandom_range(0, 12)));
    end

    missing = 0;
    for (int f = 0; f < 2; f++)
      for (int kp = 0; kp < 5; kp++)
        for (int vp = 0; vp < 5; vp++)
          if (!(kp > 0 && vp == 0) && !row_seen[f][kp][vp]) begin
            missing++;
            $display("FAIL list%0d table row key=%0d value=%0d never exercised", f, kp, vp);
          end
    checks++;
    if (missing != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
