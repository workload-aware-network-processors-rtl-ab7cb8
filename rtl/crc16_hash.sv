// crc16_hash: CRC16 of a packet's flow five-tuple.
//
// The scheduler maps flows to cores by hashing the five-tuple; CRC16 spreads
// Internet addresses evenly over the buckets. This is a purely combinational,
// bit-serial-unrolled CRC-16/CCITT (polynomial x^16+x^12+x^5+1 = 0x1021,
// initial value 0xFFFF, most significant key bit first, no reflection, no
// final XOR). Using CRC16 is the design's; the particular CRC16 variant is
// this implementation's choice.
//
// Interface: key (IN_W bits) in, crc (16 bits) out, same cycle. Its delay is
// the start of the scheduler's critical path (hash -> map table -> mux).
module crc16_hash #(
  parameter int          IN_W = np_pkg::FLOW_W,
  parameter logic [15:0] POLY = 16'h1021,
  parameter logic [15:0] INIT = 16'hFFFF
) (
  input  logic [IN_W-1:0] key,
  output logic [15:0]     crc
);
  always_comb begin
    logic [15:0] c;
    c = INIT;
    for (int i = IN_W - 1; i >= 0; i--) begin
      if (c[15] ^ key[i]) c = {c[14:0], 1'b0} ^ POLY;
      else                c = {c[14:0], 1'b0};
    end
    crc = c;
  end
endmodule
