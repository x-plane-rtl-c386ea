// tb_state_data_handler: checks byte counting, a fresh flow's start, token
// bucket refill, clipping at the bucket depth, a non-conforming packet (not
// counted), and the switch to the lower rate once the quota is used.
module tb_state_data_handler;
  import xp_pkg::*;
  import xp_tb_pkg::*;
  int checks = 0, failures = 0;

  state_t      cur, nxt;
  logic        fresh, meter_en, conform;
  rule_t       rule;
  logic [15:0] len;
  logic [31:0] now_us;

  state_data_handler dut (.cur, .fresh, .rule, .meter_en, .len, .now_us, .nxt, .conform);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fresh flow, rule unknown: counted, bucket full marker
    cur = '{bytes: 32'd999, tokens: 32'd5, last_us: 32'd1};
    fresh = 1; meter_en = 0; rule = '0; len = 300; now_us = 100;
    #1 check(conform && nxt.bytes == 300 && nxt.last_us == 100, "fresh flow counted from zero");
    check(nxt.tokens == 32'hFFFF_FFFF, "fresh bucket starts full");

    // metered at 125 B/us (1 Gb/s): full bucket clipped to 125*64 = 8000
    cur = nxt; fresh = 0; meter_en = 1; rule = mk_rule(ACT_FORWARD, 0, 125, 32, 0);
    len = 1000; now_us = 110;
    #1 check(conform && nxt.tokens == 8000 - 1000 && nxt.bytes == 1300, "clip and spend");

    // 10 us later: +1250 tokens
    cur = nxt; now_us = 112; len = 1500;
    #1 check(conform && nxt.tokens == 7000 + 250 - 1500 && nxt.bytes == 2800, "refill");

    // empty bucket: packet does not conform and is not counted
    cur = '{bytes: 32'd2800, tokens: 32'd100, last_us: 32'd120};
    now_us = 121; len = 400;
    #1 check(!conform && nxt.tokens == 225 && nxt.bytes == 2800, "over rate");

    // quota of 64 KiB passed: rate drops to 32 B/us
    rule = mk_rule(ACT_FORWARD, 0, 125, 32, 1);
    cur = '{bytes: 32'd65536, tokens: 32'd0, last_us: 32'd200};
    now_us = 210; len = 300;
    #1 check(conform && nxt.tokens == 320 - 300, "rate over quota");
    cur.bytes = 32'd65535;
    #1 check(conform && nxt.tokens == 1250 - 300, "rate under quota");

    // no meter in the rule
    rule = mk_rule(ACT_FORWARD);
    cur = '{bytes: 32'd5, tokens: 32'd0, last_us: 32'd0};
    len = 9000;
    #1 check(conform && nxt.bytes == 9005, "unmetered rule");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
