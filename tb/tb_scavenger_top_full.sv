// tb_scavenger_top_full: end-to-end test of the memory hierarchy at its
// default size.
//
// The top is built with all its defaults: four first-level caches of 64K
// 64-bit words on 4-bank stores and a four-way shared cache of 4096 sets of
// 4-word lines, with 32-bit word addresses. After the caches have cleared
// their metadata (65536 cycles), each client runs random traffic; words
// 2^16 apart share a shared-cache set, which forces shared-cache
// evictions at this size. See top_tb_common.svh for the traffic and checks.
module tb_scavenger_top_full;
  localparam int N           = 4;
  localparam int AW          = 32;
  localparam int DW          = 64;
  localparam int WORDS       = 4;
  localparam bit L1EN        = 1;
  localparam bit L2EN        = 1;
  localparam int NOPS        = 3000;
  localparam int RANGE       = 1 << 20;
  localparam int CONFLICT_STRIDE = 1 << 16;
  localparam int LOCAL_RANGE = 64;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  scavenger_top dut (.*);

`include "top_tb_common.svh"
endmodule
