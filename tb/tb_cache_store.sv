// tb_cache_store: self-checking test of the store selector.
//
// Built with two banks, so the banked store must be selected: the lone
// read latency must be the banked store's 3 cycles. The phases of
// store_tb_common.svh then check the data path under back-pressure.
module tb_cache_store;
  localparam int unsigned STORE_DEPTH = 64;
  localparam int unsigned W           = 36;
  localparam int unsigned AW          = 6;
  localparam int          EXP_LAT     = 3;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          req_valid, req_ready, req_we;
  logic [AW-1:0] req_addr;
  logic [W-1:0]  req_wdata;
  logic          resp_valid, resp_ready;
  logic [W-1:0]  resp_data;

  cache_store #(.DEPTH(STORE_DEPTH), .W(W), .NBANKS(2)) dut (.*);

`include "store_tb_common.svh"
endmodule
