// crc_hash: CRC-32 hash of a key, used to index the on-chip register tables
// and the hashed tables in DRAM.
//
// The key is shifted in most significant bit first through the CRC-32
// polynomial 0x04C11DB7 with an all-ones start value; the low OUT_W bits of
// the final register are the hash. Purely combinational, no latency.
// Hashing keys with a CRC follows the UPF design; the polynomial, bit order
// and start value are this design's choice.
module crc_hash #(
  parameter int IN_W  = 104,
  parameter int OUT_W = 32
) (
  input  logic [IN_W-1:0]  key,
  output logic [OUT_W-1:0] hash
);
  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  logic [31:0] crc;

  always_comb begin
    crc = 32'hFFFF_FFFF;
    for (int i = IN_W - 1; i >= 0; i--) begin
      if (crc[31] ^ key[i]) crc = {crc[30:0], 1'b0} ^ POLY;
      else                  crc = {crc[30:0], 1'b0};
    end
  end

  if (OUT_W <= 32) begin : g_narrow
    assign hash = crc[OUT_W-1:0];
  end else begin : g_wide
    assign hash = {{(OUT_W-32){1'b0}}, crc};
  end
endmodule
