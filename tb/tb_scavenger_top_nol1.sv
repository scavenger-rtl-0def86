// tb_scavenger_top_nol1: end-to-end test of the memory hierarchy built
// without first-level caches.
//
// Four clients go through the interconnect straight to a shared cache of
// 8 sets x 4 ways x 4-word lines on 2-bank stores, with 16-bit word
// addresses and 32-bit words, so every client access reaches the shared
// cache. See top_tb_common.svh for the traffic and the checks.
module tb_scavenger_top_nol1;
  localparam int N           = 4;
  localparam int AW          = 16;
  localparam int DW          = 32;
  localparam int WORDS       = 4;
  localparam bit L1EN        = 0;
  localparam bit L2EN        = 1;
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
    .N_CLIENTS (N), .ADDR_W (AW), .DATA_W (DW), .L1_EN (1'b0),
    .L2_SETS (8), .L2_WAYS (4), .L2_WORDS (WORDS), .L2_NBANKS (2)
  ) dut (.*);

`include "top_tb_common.svh"
endmodule
