// tb_banked_store: self-checking test of the four-bank banked store.
//
// See store_tb_common.svh for the phases: fill, lone-read latency
// (expected 3 cycle(s)), one-read-per-cycle streaming, and random traffic
// with response back-pressure checked against a model.
module tb_banked_store;
  localparam int unsigned STORE_DEPTH = 64;
  localparam int unsigned W           = 48;
  localparam int unsigned AW          = 6;
  localparam int          EXP_LAT     = 3;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          req_valid, req_ready, req_we;
  logic [AW-1:0] req_addr;
  logic [W-1:0]  req_wdata;
  logic          resp_valid, resp_ready;
  logic [W-1:0]  resp_data;

  banked_store #(.DEPTH(STORE_DEPTH), .W(W), .NBANKS(4)) dut (.*);

`include "store_tb_common.svh"
endmodule
