// topflop_profiler: keeps four profiles of the regions whose keys lie in
// [iStartKey, iEndKey]: the four most read, the four least read, the four most
// written and the four least written regions.
//
// How it works: the profiler watches the profiling bus (key, read count, write
// count). When a valid beat carries a key inside the configured range, the
// pair (key, reads) is offered to a TOP4 and a FLOP4 list and the pair
// (key, writes) to another TOP4 and FLOP4 list, all four in the same cycle.
// Because the update logic presents every counter over and over, a region that
// is never touched is still seen (with count zero) and can enter the FLOP
// lists.
//
// Read-out: iProfile[3:2] picks the profile (0 most read, 1 least read,
// 2 most written, 3 least written), iProfile[1:0] the slot, 0 being the most
// (or least) referenced region. oProfileKey/oProfileValue hold the entry from
// the clock edge after iProfile is applied. The four lists, the inclusive key
// range and the index encoding follow the design; the oProfileValid flag
// (slot holds an entry), the oUpdate/oInsert/oMove event flags, iCounterValid and the range inputs being ports are
// this design's own choices.
module topflop_profiler
  import mpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       iCounterValid,
  input  key_t       iCounterKey,
  input  cnt_t       iCounterReads,
  input  cnt_t       iCounterWrites,
  input  key_t       iStartKey,
  input  key_t       iEndKey,
  input  logic [3:0] iProfile,
  output key_t       oProfileKey,
  output cnt_t       oProfileValue,
  output logic       oProfileValid,
  output logic       oUpdate,     // a beat was taken into the profiles this cycle
  output logic [3:0] oInsert,     // per profile: a new key entered the list
  output logic [3:0] oMove        // per profile: a listed key changed its slot
);

  logic take;
  assign take    = iCounterValid && iCounterKey >= iStartKey && iCounterKey <= iEndKey;
  assign oUpdate = take;

  // Outputs of the four lists, indexed by profile and slot.
  key_t       lkey [4][LIST_LEN];
  cnt_t       lval [4][LIST_LEN];
  logic [3:0] lvalid [4];

  for (genvar p = 0; p < 4; p++) begin : g_list
    localparam bit IS_FLOP  = (p == int'(PROF_LEAST_READ)) || (p == int'(PROF_LEAST_WRITE));
    localparam bit IS_WRITE = (p == int'(PROF_MOST_WRITE)) || (p == int'(PROF_LEAST_WRITE));
    top4 #(.FLOP(IS_FLOP)) u_list (
      .clk             (clk),
      .rst             (rst),
      .iValid          (take),
      .iCandidateValue (IS_WRITE ? iCounterWrites : iCounterReads),
      .iCandidateKey   (iCounterKey),
      .oFirstKey       (lkey[p][0]),
      .oFirstValue     (lval[p][0]),
      .oSecondKey      (lkey[p][1]),
      .oSecondValue    (lval[p][1]),
      .oThirdKey       (lkey[p][2]),
      .oThirdValue     (lval[p][2]),
      .oFourthKey      (lkey[p][3]),
      .oFourthValue    (lval[p][3]),
      .oValid          (lvalid[p]),
      .oInsert         (oInsert[p]),
      .oMove           (oMove[p])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      oProfileKey   <= '0;
      oProfileValue <= '0;
      oProfileValid <= 1'b0;
    end else begin
      oProfileKey   <= lkey[iProfile[3:2]][iProfile[1:0]];
      oProfileValue <= lval[iProfile[3:2]][iProfile[1:0]];
      oProfileValid <= lvalid[iProfile[3:2]][iProfile[1:0]];
    end
  end

endmodule
