// tb_scavenger_top_nol2: end-to-end test of the memory hierarchy built
// without the shared cache.
//
// Four clients with 16-line first-level caches on 4-bank stores talk
// through the interconnect straight to the (modelled) central cache, with
// 16-bit word addresses and 32-bit words. The backing port is one word wide
// and the model answers several outstanding reads in order, so responses
// must be routed by the top's client-ID FIFO. See top_tb_common.svh for the
// traffic and the checks.
module tb_scavenger_top_nol2;
  localparam int N           = 4;
  localparam int AW          = 16;
  localparam int DW          = 32;
  localparam int WORDS       = 1;
  localparam bit L1EN        = 1;
  localparam bit L2EN        = 0;
  localparam int NOPS        = 3000;
  localparam int RANGE       = 256;
  localparam int CONFLICT_STRIDE = 32;
  localparam int LOCAL_RANGE = 24;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  scavenger_top #(
    .N_CLIENTS (N), .ADDR_W (AW), .DATA_W (DW), .L1_M (1), .L1_R (4), .L1_NBANKS (4),
    .L2_EN (1'b0)
  ) dut (.*);

`include "top_tb_common.svh"
endmodule
