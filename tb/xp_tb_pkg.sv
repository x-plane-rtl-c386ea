// xp_tb_pkg: reference functions shared by the testbenches.
//
// crc32_ref recomputes the CRC-32 hash (polynomial 0x04C11DB7, all-ones
// start, most significant bit first, no final inversion) with a byte-wise
// table-free loop written independently of the RTL; the testbenches use it
// to predict table indices. Helpers build packets, rules and PDRs.
package xp_tb_pkg;
  import xp_pkg::*;

  function automatic logic [31:0] crc32_ref(input logic [1023:0] key, input int nbits);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = nbits - 1; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ key[i];
      c  = c << 1;
      if (fb) c = c ^ 32'h04C1_1DB7;
    end
    return c;
  endfunction

  function automatic logic [31:0] tuple_hash(input five_tuple_t t, input int aw);
    logic [31:0] c;
    c = crc32_ref(1024'(t), $bits(five_tuple_t));
    return c & ((32'd1 << aw) - 1);
  endfunction

  function automatic ue_key_t ue_key_of(input pkt_t p);
    ue_key_t k;
    k = '0;
    k.dir = p.dir;
    if (p.dir == DIR_UL) begin
      k.teid = p.teid; k.ue_ip = p.tuple.src_ip; k.qfi = p.qfi;
    end else begin
      k.ue_ip = p.tuple.dst_ip;
    end
    return k;
  endfunction

  function automatic logic [31:0] ue_hash(input ue_key_t k, input int aw);
    logic [31:0] c;
    c = crc32_ref(1024'(k), $bits(ue_key_t));
    return c & ((32'd1 << aw) - 1);
  endfunction

  function automatic pkt_t mk_pkt(input logic [31:0] id, input dir_e dir,
                                  input logic [31:0] sip, input logic [31:0] dip,
                                  input logic [15:0] sp, input logic [15:0] dp,
                                  input logic [7:0] proto, input logic [15:0] len,
                                  input logic [31:0] teid = 0, input logic [5:0] qfi = 0);
    pkt_t p;
    p = '0;
    p.id = id; p.dir = dir; p.len = len; p.teid = teid; p.qfi = qfi;
    p.tuple.src_ip = sip; p.tuple.dst_ip = dip;
    p.tuple.src_port = sp; p.tuple.dst_port = dp; p.tuple.proto = proto;
    return p;
  endfunction

  function automatic rule_t mk_rule(input action_e a, input logic [31:0] teid = 0,
                                    input logic [15:0] rate = 0, input logic [15:0] rate2 = 0,
                                    input logic [15:0] quota_64k = 0);
    rule_t r;
    r.action = a; r.teid = teid; r.rate = rate; r.rate_over_quota = rate2; r.quota_64k = quota_64k;
    return r;
  endfunction

  // a PDR that matches every packet of the given protocol (or any, proto_any)
  function automatic pdr_t mk_pdr_any(input rule_t r);
    pdr_t d;
    d = '0;
    d.valid = 1'b1; d.qfi_any = 1'b1; d.proto_any = 1'b1;
    d.rport_lo = 16'h0000; d.rport_hi = 16'hFFFF;
    d.lport_lo = 16'h0000; d.lport_hi = 16'hFFFF;
    d.rule = r;
    return d;
  endfunction

  // a PDR for one remote port, any remote address
  function automatic pdr_t mk_pdr_port(input logic [15:0] rport, input rule_t r);
    pdr_t d;
    d = mk_pdr_any(r);
    d.rport_lo = rport; d.rport_hi = rport;
    return d;
  endfunction
endpackage
