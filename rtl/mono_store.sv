// mono_store: monolithic BRAM store with a request/response handshake.
//
// One bram_bank holds all DEPTH words. A request (req_valid/req_ready)
// either writes a word or reads one; a read's word is offered on
// resp_valid/resp_data one cycle after the request was accepted and is
// held there until resp_ready. While a read response waits, no new request
// is taken unless the response is consumed in the same cycle, so the store
// sustains one operation per cycle when the client never stalls.
// Writes produce no response. This is the single-cycle baseline store that
// a cache uses when banking is switched off.
module mono_store #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
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

  logic rd_pend;
  logic fire;

  assign req_ready  = !rd_pend || resp_ready;
  assign fire       = req_valid && req_ready;
  assign resp_valid = rd_pend;

  bram_bank #(.DEPTH(DEPTH), .W(W)) u_bank (
    .clk   (clk),
    .en    (fire),
    .we    (req_we),
    .addr  (req_addr),
    .wdata (req_wdata),
    .rdata (resp_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rd_pend <= 1'b0;
    else if (fire)       rd_pend <= !req_we;
    else if (resp_ready) rd_pend <= 1'b0;
  end

endmodule
