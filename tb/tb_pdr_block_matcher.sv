// tb_pdr_block_matcher: checks priority order inside a block, prefix, port
// range, protocol and QFI filters, uplink/downlink roles of the addresses,
// an invalid PDR and a block without a match.
module tb_pdr_block_matcher;
  import xp_pkg::*;
  import xp_tb_pkg::*;
  int checks = 0, failures = 0;

  pkt_t       pkt;
  pdr_block_t pdrs;
  logic       hit;
  logic [2:0] idx;
  rule_t      rule;

  pdr_block_matcher dut (.pkt, .pdrs, .hit, .idx, .rule);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // downlink packet from 1.2.3.4:1234 to UE 20.0.0.23:80, TCP
    pkt = mk_pkt(1, DIR_DL, 32'h0102_0304, 32'h1400_0017, 16'd1234, 16'd80, 8'd6, 100);
    pdrs = '0;
    pdrs[0] = mk_pdr_port(16'd53, mk_rule(ACT_DROP));               // DNS only
    pdrs[1] = mk_pdr_any(mk_rule(ACT_ENCAP, 32'd11));
    pdrs[1].remote_ip = 32'h0A00_0000; pdrs[1].remote_plen = 8;     // 10/8 only
    pdrs[2] = mk_pdr_any(mk_rule(ACT_ENCAP, 32'd6789));
    pdrs[2].remote_ip = 32'h0102_0300; pdrs[2].remote_plen = 24;    // 1.2.3/24
    pdrs[2].proto = 8'd6; pdrs[2].proto_any = 0;
    pdrs[2].lport_lo = 80; pdrs[2].lport_hi = 80;
    pdrs[3] = mk_pdr_any(mk_rule(ACT_FORWARD, 32'd99));              // wildcard
    #1 check(hit && idx == 2 && rule.teid == 6789 && rule.action == ACT_ENCAP, "third PDR matches");

    pkt.tuple.proto = 8'd17;
    #1 check(hit && idx == 3 && rule.teid == 99, "wrong protocol falls to the wildcard");

    pkt.tuple.proto = 8'd6; pkt.tuple.src_port = 53;
    #1 check(hit && idx == 0 && rule.action == ACT_DROP, "highest priority wins");

    pdrs[0].valid = 0;
    #1 check(hit && idx == 2, "invalid PDR skipped");

    pkt.tuple.src_ip = 32'h0A01_0101;
    #1 check(hit && idx == 1 && rule.teid == 11, "prefix /8");

    pdrs[3].valid = 0; pkt.tuple.src_ip = 32'h0808_0808;
    #1 check(!hit, "no match in block");

    // uplink: remote is the destination; QFI filter applies
    pkt = mk_pkt(2, DIR_UL, 32'h1400_0017, 32'h0102_0304, 16'd80, 16'd1234, 8'd6, 100, 32'd5, 6'd9);
    pdrs = '0;
    pdrs[0] = mk_pdr_any(mk_rule(ACT_FORWARD, 32'd1));
    pdrs[0].qfi_any = 0; pdrs[0].qfi = 6'd5;
    pdrs[4] = mk_pdr_any(mk_rule(ACT_FORWARD, 32'd2));
    pdrs[4].remote_ip = 32'h0102_0304; pdrs[4].remote_plen = 32;
    pdrs[4].rport_lo = 1000; pdrs[4].rport_hi = 2000;
    #1 check(hit && idx == 4 && rule.teid == 2, "uplink QFI mismatch, remote = destination");
    pdrs[0].qfi = 6'd9;
    #1 check(hit && idx == 0, "uplink QFI match");
    pdrs[0].valid = 0; pdrs[4].rport_lo = 1235;
    #1 check(!hit, "port range excludes");

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
