// crc_hash: reversible CRC bit hash of a cache address.
//
// The forward hash is the W-bit CRC of the W-bit input (zero initial
// value, no reflection): h(x) = a(x) * x^W mod P(x) over GF(2), where P is
// the degree-W polynomial x^W + POLY. Because P has a nonzero constant term,
// x is invertible modulo P and the map is one-to-one, so a cache needs to
// store only the tag part of the hashed address and can rebuild the
// original address for a write-back. With INVERSE = 1 the module computes
// that inverse, a(x) = h(x) * x^-W mod P(x), by W divisions by x. Both
// directions are pure XOR networks with no state (combinational, no
// clock). Hashing the address with a CRC before indexing, and requiring the
// CRC to be at least as wide as the address, follows the reference design;
// the polynomial is this design's choice.
module crc_hash #(
  parameter int unsigned W       = 32,
  parameter logic [W-1:0] POLY   = W'(scv_pkg::CRC32_POLY),
  parameter bit           INVERSE = 1'b0
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  always_comb begin
    logic [W-1:0] r;
    r = din;
    for (int i = 0; i < int'(W); i++) begin
      if (!INVERSE) begin
        // multiply by x modulo P
        r = r[W-1] ? ((r << 1) ^ POLY) : (r << 1);
      end else begin
        // divide by x modulo P: make the constant term zero, then shift
        r = r[0] ? (((r ^ POLY) >> 1) | {1'b1, {(W-1){1'b0}}}) : (r >> 1);
      end
    end
    dout = r;
  end

endmodule
