// state_data_handler: per-flow counting and metering, the state update that
// the local state table applies to each packet.
//
// Counting adds the packet length to the flow's byte count (usage for
// charging). Metering is a token bucket kept in the same state word: the
// bucket refills at rate bytes per microsecond since last_us and holds at
// most rate * BUCKET_US bytes; a packet that finds fewer tokens than its
// length does not conform and is dropped, and is not counted. Once the byte
// count has passed the rule's quota (quota_64k units of 64 KiB, 0 = none) the rate becomes
// rate_over_quota, which is how a UE is slowed down after using its quota.
// With meter_en = 0 (the rule is not known yet, as for the first packet of a
// flow) or a rate of 0 the packet always conforms.
// fresh = 1 starts from empty state (new flow): byte count 0 and a full bucket.
//
// Counting, metering and quota-triggered rate limiting are the UPF functions
// the design names; the token-bucket form, the units and the bucket depth are
// this design's choices. Combinational, no latency.
module state_data_handler
  import xp_pkg::*;
(
  input  state_t      cur,
  input  logic        fresh,
  input  rule_t       rule,
  input  logic        meter_en,
  input  logic [15:0] len,
  input  logic [31:0] now_us,
  output state_t      nxt,
  output logic        conform
);
  state_t      base;
  logic [15:0] rate_eff;
  logic [63:0] refill, filled, cap;

  always_comb begin
    base = cur;
    if (fresh) begin
      base.bytes   = '0;
      base.tokens  = '1;               // clipped to the bucket depth below
      base.last_us = now_us;
    end

    rate_eff = rule.rate;
    if (rule.quota_64k != '0 && base.bytes >= {rule.quota_64k, 16'd0})
      rate_eff = rule.rate_over_quota;

    cap    = 64'(rate_eff) * 64'(BUCKET_US);
    refill = 64'(rate_eff) * 64'(now_us - base.last_us);
    filled = 64'(base.tokens) + refill;
    if (filled > cap) filled = cap;

    nxt         = base;
    nxt.last_us = now_us;
    if (!meter_en || rate_eff == '0) begin
      conform = 1'b1;
    end else if (filled >= 64'(len)) begin
      conform    = 1'b1;
      nxt.tokens = 32'(filled - 64'(len));
    end else begin
      conform    = 1'b0;
      nxt.tokens = 32'(filled);
    end
    if (conform) nxt.bytes = base.bytes + 32'(len);
  end
endmodule
