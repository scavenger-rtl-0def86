// tb_memperf: memory-performance sweep on the hierarchy (one client).
//
// A single private memory (client 0) walks a working set of WS words with
// a fixed stride, twice: a warm-up pass that writes every word and a
// measured pass that reads every word back and checks it. The sweep runs
// three working sets (64, 512 and 8192 accesses) against a reduced
// hierarchy (256-word first-level cache on a 4-bank store, four-way shared
// cache of 256 sets x 4-word lines = 4096 words): one that fits
// in the first level, one that fits only in the shared cache, and one that
// fits in neither, each with stride 1 and 4. For the measured pass it
// reports cycles per access and hit counts, and checks that the small set
// mostly hits in the first level, that the middle set's first-level misses
// mostly hit in the shared cache, that with stride 1 the 4-word lines catch
// most accesses of the largest set, and that the cost per access grows
// from first-level hits to shared-cache hits to off-chip accesses.
module tb_memperf;
  localparam int N = 4, AW = 16, DW = 32, WORDS = 4;
  localparam int IDW = 2, LAW = IDW + AW - 2;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic          c_req_valid [N], c_req_ready [N], c_req_write [N];
  logic [AW-1:0] c_req_addr [N];
  logic [DW-1:0] c_req_wdata [N];
  logic          c_resp_valid [N], c_resp_ready [N];
  logic [DW-1:0] c_resp_data [N];
  logic          b_req_valid, b_req_ready, b_req_write;
  logic [LAW-1:0] b_req_laddr;
  logic [WORDS*DW-1:0] b_req_wline, b_resp_line;
  logic          b_resp_valid, b_resp_ready;
  logic          init_done;
  logic          l1_hit [N], l1_miss [N], l1_writeback [N];
  logic          l2_hit, l2_miss, l2_evict;

  scavenger_top #(
    .N_CLIENTS (N), .ADDR_W (AW), .DATA_W (DW), .L1_R (8), .L1_NBANKS (4),
    .L2_SETS (256), .L2_WAYS (4), .L2_WORDS (WORDS), .L2_NBANKS (2)
  ) dut (.*);

  int checks = 0, failures = 0;
  int h1 = 0, m1 = 0, h2 = 0, m2 = 0;

  // off-chip model: fixed 20-cycle line latency, always ready
  logic [WORDS*DW-1:0] bmem [logic [LAW-1:0]];
  int fill_cnt = -1;
  logic [LAW-1:0] fill_la;
  assign b_req_ready  = 1'b1;
  assign b_resp_valid = (fill_cnt == 0);
  assign b_resp_line  = bmem.exists(fill_la) ? bmem[fill_la] : '0;
  always @(posedge clk) if (rst_n) begin
    if (l1_hit[0]) h1++;
    if (l1_miss[0]) m1++;
    if (l2_hit) h2++;
    if (l2_miss) m2++;
    if (b_req_valid && b_req_write) bmem[b_req_laddr] = b_req_wline;
    if (b_req_valid && !b_req_write) begin fill_la = b_req_laddr; fill_cnt = 20; end
    else if (fill_cnt > 0) fill_cnt--;
    else if (fill_cnt == 0 && b_resp_ready) fill_cnt = -1;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int c = 0; c < N; c++) c_resp_ready[c] = 1'b1;

  task automatic access(input bit wr, input logic [AW-1:0] a, input logic [DW-1:0] d);
    c_req_valid[0] = 1; c_req_write[0] = wr; c_req_addr[0] = a; c_req_wdata[0] = d;
    #1;
    while (!c_req_ready[0]) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    c_req_valid[0] = 0;
    if (!wr) begin
      while (!c_resp_valid[0]) @(negedge clk);
      checks++;
      if (c_resp_data[0] !== d) begin
        failures++;
        $display("FAIL read %h: %h expected %h", a, c_resp_data[0], d);
      end
    end
  endtask

  // one measured configuration; returns cycles per access x 100
  task automatic run(input int ws, input int stride, input int base, output int cpa100,
                     output int l1h, output int l1m, output int l2h);
    longint t0;
    int nacc;
    nacc = ws / stride;
    for (int i = 0; i < nacc; i++) access(1'b1, AW'(base + i * stride), DW'(base + i * stride) ^ 32'hA5A5_0000);
    h1 = 0; m1 = 0; h2 = 0; m2 = 0;
    t0 = $time;
    for (int i = 0; i < nacc; i++) access(1'b0, AW'(base + i * stride), DW'(base + i * stride) ^ 32'hA5A5_0000);
    cpa100 = int'((($time - t0) / 10) * 100 / nacc);
    l1h = h1; l1m = m1; l2h = h2;
    $display("memperf ws=%0d stride=%0d: %0d.%02d cycles/access, L1 hits %0d misses %0d, L2 hits %0d misses %0d",
             ws, stride, cpa100 / 100, cpa100 % 100, h1, m1, h2, m2);
  endtask

  task automatic need(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cpa [3];
    int l1h, l1m, l2h;
    int wss [3] = '{64, 512, 8192};
    for (int c = 0; c < N; c++) begin
      c_req_valid[c] = 0; c_req_write[c] = 0; c_req_addr[c] = '0; c_req_wdata[c] = '0;
    end
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    @(negedge clk);
    for (int s = 1; s <= 4; s += 3) begin
      for (int w = 0; w < 3; w++) begin
        run(wss[w] * s, s, (w == 2) ? 0 : 32768 + 4096 * w + 16384 * (s - 1), cpa[w], l1h, l1m, l2h);
        if (w == 0) need(l1h * 10 >= (l1h + l1m) * 9, "small working set hits in the first level");
        if (w == 1) need(l2h * 10 >= l1m * 9, "middle working set hits in the shared cache");
        // with stride 1, multi-word lines still catch 3 of 4 words of a set
        // far larger than the shared cache
        if (w == 2 && s == 1) need(l2h * 2 >= l1m, "shared cache captures spatial locality");
      end
      need(cpa[0] < cpa[1], "first-level hits are cheaper than shared-cache hits");
      if (s == 4) need(cpa[1] < cpa[2], "shared-cache hits are cheaper than off-chip accesses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
