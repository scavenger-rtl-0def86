// cache_index: index/tag split for power-of-two and non-power-of-two caches.
//
// A direct-mapped cache with LINES = M * 2^R lines (M odd, M < 16) looks up
// a hashed address as follows. The low R bits are the index base IB, the
// remaining bits are the tag. For M = 1 the index is IB itself. For M > 1
// let K be the smallest width with LINES < 2^K; the low K-R+n bits of the
// tag form the index range IR (n = 4 extra bits spread the ranges evenly),
// and
//     index = (IR mod M) * 2^R + IB
// where IR mod M comes from a constant table of 2^(K-R+n) entries, so no
// divider or adder is needed: the index is the table output concatenated
// with IB. The tag keeps all address bits above IB, which lets the cache
// recover the hashed address as {tag, IB} for write-backs. The indexing
// equation, the table and n = 4 follow the reference design. The default
// size, 5 * 2^16 lines, is the 2560 KB non-power-of-two cache of 64-bit
// words reported for the priority-queue kernel. Purely combinational.
module cache_index #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned M      = 5,
  parameter int unsigned R      = 16,
  localparam int unsigned LINES = M << R,
  localparam int unsigned IDX_W = $clog2(LINES),
  localparam int unsigned TAG_W = ADDR_W - R
) (
  input  logic [ADDR_W-1:0] haddr,
  output logic [IDX_W-1:0]  index,
  output logic [TAG_W-1:0]  tag
);

  logic [R-1:0] ib;

  assign ib  = haddr[R-1:0];
  assign tag = haddr[ADDR_W-1:R];

  if (M == 1) begin : g_pow2
    assign index = ib;
  end else begin : g_npot
    localparam int unsigned MW   = IDX_W - R;                        // K - R
    localparam int unsigned IR_W = MW + scv_pkg::NPOT_EXTRA_BITS;    // K - R + n

    logic [IR_W-1:0] ir;
    logic [MW-1:0]   mod_lut [2**IR_W];

    // Modulus table: entry i holds i mod M.
    for (genvar i = 0; i < 2**IR_W; i++) begin : g_lut
      assign mod_lut[i] = MW'(i % M);
    end

    assign ir    = tag[IR_W-1:0];
    assign index = {mod_lut[ir], ib};
  end

endmodule
