// tb_crc_hash: self-checking test of the reversible CRC address hash.
//
// The forward hash is compared with a bit-serial CRC (shift register fed
// with the address MSB first, zero initial value), for the 32-bit default
// and for a 16-bit instance. The inverse is checked to undo the forward hash
// and vice versa, and a full sweep of the 16-bit instance checks that no
// two addresses collide.
module tb_crc_hash;
  localparam logic [15:0] POLY16 = 16'h1021;

  logic [31:0] a32, h32, u32, hu32;
  logic [15:0] a16, h16, u16;
  int checks = 0, failures = 0;
  bit seen [65536];

  crc_hash #(.W(32))                                     f32 (.din(a32), .dout(h32));
  crc_hash #(.W(32), .INVERSE(1'b1))                     i32 (.din(h32), .dout(u32));
  crc_hash #(.W(32), .INVERSE(1'b1))                     j32 (.din(a32), .dout(hu32));
  crc_hash #(.W(16), .POLY(POLY16))                      f16 (.din(a16), .dout(h16));
  crc_hash #(.W(16), .POLY(POLY16), .INVERSE(1'b1))      i16 (.din(h16), .dout(u16));

  logic [31:0] h_of_hu;
  crc_hash #(.W(32)) g32 (.din(hu32), .dout(h_of_hu));

  function automatic logic [31:0] serial_crc(input logic [31:0] msg, input int w, input logic [31:0] poly);
    logic [31:0] crc, mask;
    mask = (w == 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
    crc = '0;
    for (int i = w - 1; i >= 0; i--) begin
      logic fb;
      fb  = crc[w-1] ^ msg[i];
      crc = (crc << 1) & mask;
      if (fb) crc = crc ^ poly;
    end
    return crc;
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a32 = (n < 32) ? (32'd1 << n) : $urandom;
      a16 = 16'($urandom);
      #1;
      check(h32, serial_crc(a32, 32, scv_pkg::CRC32_POLY), "crc32 forward");
      check(u32, a32, "crc32 inverse of forward");
      check(h_of_hu, a32, "crc32 forward of inverse");
      check(32'(h16), serial_crc(32'(a16), 16, 32'(POLY16)), "crc16 forward");
      check(32'(u16), 32'(a16), "crc16 inverse of forward");
    end
    // bijectivity of the 16-bit hash over its whole domain
    begin
      int coll;
      coll = 0;
      for (int v = 0; v < 65536; v++) begin
        a16 = 16'(v);
        #1;
        if (seen[h16]) coll++;
        seen[h16] = 1'b1;
      end
      check(32'(coll), 0, "crc16 collisions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
