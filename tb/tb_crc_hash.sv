// tb_crc_hash: checks the CRC-32 hash against the published CRC-32/MPEG-2
// check value of "123456789" (0x0376E6E7, same polynomial, start value and
// bit order) and against a reference model for random 104-bit keys and a
// truncated 11-bit index.
module tb_crc_hash;
  import xp_tb_pkg::*;
  int checks = 0, failures = 0;

  logic [71:0]  k72;
  logic [31:0]  h72;
  logic [103:0] k104;
  logic [31:0]  h104;
  logic [10:0]  h11;

  crc_hash #(.IN_W(72),  .OUT_W(32)) u72  (.key(k72),  .hash(h72));
  crc_hash #(.IN_W(104), .OUT_W(32)) u104 (.key(k104), .hash(h104));
  crc_hash #(.IN_W(104), .OUT_W(11)) u11  (.key(k104), .hash(h11));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    k72 = "123456789";
    #1;
    check(h72 == 32'h0376_E6E7, $sformatf("check value %h", h72));
    for (int i = 0; i < 200; i++) begin
      k104 = {$urandom, $urandom, $urandom, 8'($urandom)};
      #1;
      check(h104 == crc32_ref(1024'(k104), 104), "random key");
      check(h11 == h104[10:0], "truncated index");
    end
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
