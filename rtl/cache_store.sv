// cache_store: the data/metadata store of a cache, monolithic or banked.
//
// Cache controllers talk to their BRAM store only through this
// request/response handshake, so the store can be swapped without touching
// the controller. NBANKS = 1 builds the single-cycle monolithic store;
// NBANKS > 1 (a power of two dividing DEPTH) builds the multi-cycle banked
// store, which returns reads 3 cycles after acceptance instead of 1 but
// keeps every routing path local to one bank.
module cache_store #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned W      = 64,
  parameter int unsigned NBANKS = 4,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic [W-1:0]  req_wdata,
  output logic          resp_valid,
  input  logic          resp_ready,
  output logic [W-1:0]  resp_data
);

  if (NBANKS > 1) begin : g_banked
    banked_store #(.DEPTH(DEPTH), .W(W), .NBANKS(NBANKS)) u_store (.*);
  end else begin : g_mono
    mono_store #(.DEPTH(DEPTH), .W(W)) u_store (.*);
  end

endmodule
