// bram_bank: one single-port synchronous block RAM.
//
// This is the primitive the caches are built from: a BRAM with a
// one-cycle read. When en is high and we is low, the word at addr appears
// on rdata on the next clock edge and is held there until the next read;
// when en and we are high, wdata is written and rdata keeps its old value.
// The array is not reset, as block RAM cannot be; callers initialise what
// they read (the caches sweep their metadata after reset).
module bram_bank #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
