// tb_crc16_hash: checks the CRC16 flow hash.
// Checks the published CRC-16/CCITT-FALSE check value of "123456789"
// (0x29B1) on a 72-bit instance, then random 104-bit five-tuples against a
// byte-at-a-time reference written here.
module tb_crc16_hash;
  int checks = 0, failures = 0;
  logic [71:0]  k9;
  logic [15:0]  c9;
  logic [103:0] key;
  logic [15:0]  crc;

  crc16_hash #(.IN_W(72)) dut9 (.key(k9), .crc(c9));
  crc16_hash dut (.key(key), .crc(crc));

  function automatic logic [15:0] ref_crc(input logic [103:0] k);
    logic [15:0] r;
    r = 16'hFFFF;
    for (int b = 12; b >= 0; b--) begin
      r = r ^ {k[b*8 +: 8], 8'h00};
      repeat (8) r = r[15] ? ((r << 1) ^ 16'h1021) : (r << 1);
    end
    return r;
  endfunction

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k9 = "123456789";
    #1 chk(c9, 16'h29B1, "check value");
    for (int i = 0; i < 200; i++) begin
      key = {$urandom, $urandom, $urandom, 8'($urandom)};
      #1 chk(crc, ref_crc(key), "random key");
    end
    key = '0;
    #1 chk(crc, ref_crc(key), "zero key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
