// top4: a sorted list of the four best key/value pairs seen on a bus, kept
// up to date at one pair per clock. With FLOP = 0 it is a TOP4 list (largest
// value first); with FLOP = 1 it is a FLOP4 list (smallest value first).
//
// How it works: every cycle in which iValid is high the incoming pair is
// compared with all four entries at once. Two numbers are derived:
//   key position   - the slot that already holds iCandidateKey, or none;
//   value position - the slot the new value ranks into. For a key already in
//                    the list it is ranked against the other three entries
//                    and always lands in the list; for a new key it is
//                    ranked against all four and may miss the list.
// From these two the next list is chosen slot by slot, exactly as in the
// 21-row transition table of the design: a new key is inserted at its value
// position and the entries below it move down one slot (the last one drops
// out); a known key is updated and moved from its key position to its value
// position, the entries in between shifting by one towards the freed slot.
// Only how the value position is found differs between TOP and FLOP, so the
// transition logic is shared.
//
// Ties are this design's choice: a new key must beat an equal value to enter,
// and a known key keeps its order relative to entries of equal value. Empty
// slots (after reset) rank below every value; oValid shows which slots hold a
// pair. The valid flags, iValid and the reset are this design's own.
//
// Assertions check that filled slots come first, are sorted and hold
// distinct keys.
//
// Timing: the list registers are updated at the clock edge that ends the cycle
// in which the pair was presented; outputs come straight from them.
module top4
  import mpu_pkg::*;
#(
  parameter bit FLOP = 1'b0   // 0: TOP4 (largest first), 1: FLOP4 (smallest first)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       iValid,
  input  cnt_t       iCandidateValue,
  input  key_t       iCandidateKey,
  output key_t       oFirstKey,
  output cnt_t       oFirstValue,
  output key_t       oSecondKey,
  output cnt_t       oSecondValue,
  output key_t       oThirdKey,
  output cnt_t       oThirdValue,
  output key_t       oFourthKey,
  output cnt_t       oFourthValue,
  output logic [3:0] oValid,
  output logic       oInsert,   // a new key entered the list this cycle
  output logic       oMove      // a known key changed its slot this cycle
);

  entry_t list_q [LIST_LEN];
  entry_t list_d [LIST_LEN];
  entry_t upd;

  logic       key_found;
  logic [1:0] key_pos;
  logic [2:0] val_pos;     // 0..3, or 4 = does not make it into the list

  // True if value a ranks strictly ahead of value b in this list.
  function automatic logic ahead(input cnt_t a, input cnt_t b);
    return FLOP ? (a < b) : (a > b);
  endfunction

  always_comb begin
    // Key position.
    key_found = 1'b0;
    key_pos   = '0;
    for (int i = 0; i < LIST_LEN; i++) begin
      if (list_q[i].valid && list_q[i].key == iCandidateKey) begin
        key_found = 1'b1;
        key_pos   = 2'(i);
      end
    end

    // Value position: number of entries that stay ahead of the new value.
    val_pos = '0;
    for (int i = 0; i < LIST_LEN; i++) begin
      if (list_q[i].valid) begin
        if (key_found) begin
          if (2'(i) != key_pos &&
              (ahead(list_q[i].value, iCandidateValue) ||
               (list_q[i].value == iCandidateValue && 2'(i) < key_pos)))
            val_pos = val_pos + 3'd1;
        end else if (!ahead(iCandidateValue, list_q[i].value)) begin
          val_pos = val_pos + 3'd1;
        end
      end
    end

    upd = '{valid: 1'b1, key: iCandidateKey, value: iCandidateValue};

    // Transition table.
    for (int j = 0; j < LIST_LEN; j++) list_d[j] = list_q[j];
    oInsert = 1'b0;
    oMove   = 1'b0;
    if (iValid) begin
      if (!key_found) begin
        if (val_pos < 3'(LIST_LEN)) begin
          oInsert = 1'b1;
          for (int j = 0; j < LIST_LEN; j++) begin
            if (3'(j) == val_pos)     list_d[j] = upd;
            else if (3'(j) > val_pos) list_d[j] = list_q[j-1];
          end
        end
      end else begin
        oMove = (val_pos != {1'b0, key_pos});
        for (int j = 0; j < LIST_LEN; j++) begin
          if (3'(j) == val_pos)
            list_d[j] = upd;
          else if (val_pos < {1'b0, key_pos} && 3'(j) > val_pos && 2'(j) <= key_pos)
            list_d[j] = list_q[j-1];
          else if (val_pos > {1'b0, key_pos} && 3'(j) < val_pos && 2'(j) >= key_pos)
            list_d[j] = list_q[j+1];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < LIST_LEN; j++) list_q[j] <= '0;
    end else begin
      for (int j = 0; j < LIST_LEN; j++) list_q[j] <= list_d[j];
    end
  end

  // Invariants of the list: filled slots come first, are sorted, and hold
  // distinct keys.
  for (genvar g = 1; g < LIST_LEN; g++) begin : g_check
    a_filled_first: assert property (@(posedge clk) disable iff (rst)
      list_q[g].valid |-> list_q[g-1].valid);
    a_sorted: assert property (@(posedge clk) disable iff (rst)
      list_q[g].valid |-> !ahead(list_q[g].value, list_q[g-1].value));
    for (genvar h = 0; h < g; h++) begin : g_unique
      a_unique: assert property (@(posedge clk) disable iff (rst)
        list_q[g].valid |-> list_q[g].key != list_q[h].key);
    end
  end

  assign oFirstKey    = list_q[0].key;
  assign oFirstValue  = list_q[0].value;
  assign oSecondKey   = list_q[1].key;
  assign oSecondValue = list_q[1].value;
  assign oThirdKey    = list_q[2].key;
  assign oThirdValue  = list_q[2].value;
  assign oFourthKey   = list_q[3].key;
  assign oFourthValue = list_q[3].value;
  for (genvar g = 0; g < LIST_LEN; g++) begin : g_valid
    assign oValid[g] = list_q[g].valid;
  end

endmodule
