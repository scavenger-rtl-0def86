// mem_arbiter: interconnect from N first-level caches to the shared cache.
//
// Each client port carries word reads and word writes. The arbiter picks
// one valid request per cycle in round-robin order (starting after the
// client granted last), forwards it with the client's index as its ID and
// passes the downstream ready back to the granted client only. Read
// responses come back with that ID and are steered to the client it names;
// the downstream ready is the addressed client's ready. The grant is
// combinational, so a request passes in the cycle it is presented.
// The reference design only names a compiler-built interconnect between
// the caches; the round-robin policy and the ID-tagged response routing
// are this design's choices.
module mem_arbiter #(
  parameter int unsigned N      = 4,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64,
  localparam int unsigned ID_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // client side
  input  logic              in_req_valid  [N],
  output logic              in_req_ready  [N],
  input  logic              in_req_write  [N],
  input  logic [ADDR_W-1:0] in_req_addr   [N],
  input  logic [DATA_W-1:0] in_req_wdata  [N],
  output logic              in_resp_valid [N],
  input  logic              in_resp_ready [N],
  output logic [DATA_W-1:0] in_resp_data  [N],
  // shared side
  output logic              out_req_valid,
  input  logic              out_req_ready,
  output logic [ID_W-1:0]   out_req_id,
  output logic              out_req_write,
  output logic [ADDR_W-1:0] out_req_addr,
  output logic [DATA_W-1:0] out_req_wdata,
  input  logic              out_resp_valid,
  output logic              out_resp_ready,
  input  logic [ID_W-1:0]   out_resp_id,
  input  logic [DATA_W-1:0] out_resp_data
);

  logic [ID_W-1:0] last;   // client granted most recently
  logic [ID_W-1:0] grant;
  logic            any;

  // k-th client after client p, wrapping around
  function automatic logic [ID_W-1:0] rr_pick(input logic [ID_W-1:0] p, input int k);
    return ID_W'((int'(p) + k) % int'(N));
  endfunction

  always_comb begin
    any   = 1'b0;
    grant = '0;
    for (int k = 1; k <= int'(N); k++) begin
      if (in_req_valid[rr_pick(last, k)] && !any) begin
        any   = 1'b1;
        grant = rr_pick(last, k);
      end
    end
  end

  assign out_req_valid = any;
  assign out_req_id    = grant;
  assign out_req_write = in_req_write[grant];
  assign out_req_addr  = in_req_addr[grant];
  assign out_req_wdata = in_req_wdata[grant];

  always_comb begin
    for (int c = 0; c < int'(N); c++) begin
      in_req_ready[c]  = out_req_ready && any && (grant == ID_W'(c));
      in_resp_valid[c] = out_resp_valid && (out_resp_id == ID_W'(c));
      in_resp_data[c]  = out_resp_data;
    end
  end
  assign out_resp_ready = in_resp_ready[out_resp_id];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             last <= ID_W'(N - 1);
    else if (out_req_valid && out_req_ready) last <= grant;
  end

endmodule
