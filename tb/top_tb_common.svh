// Shared body of the end-to-end testbenches of scavenger_top. The
// including module declares N, AW, DW, WORDS, L1EN, L2EN, NOPS, RANGE,
// LOCAL_RANGE and CONFLICT_STRIDE, and instantiates the top as dut with the port signals
// declared here.
//
// Each of the N clients runs NOPS random reads and writes on its own
// private memory: a third within LOCAL_RANGE words (first-level hits), a
// third anywhere in RANGE words, and a third on 16 groups of 8 words spaced
// CONFLICT_STRIDE words apart, which all fall into the same few shared-cache
// sets (evictions). Reads see random response back-pressure, and checks every
// read against a per-client reference memory. The off-chip side is a line
// memory model with random delays; untouched words read as a function of
// their {client, address}. At the end every written word is read back.
// Every mechanism must occur at least once: first-level hits, misses and
// write-backs, shared-cache hits, misses and dirty evictions, two clients
// contending for the interconnect in one cycle, and a client stalled
// because its cache is busy. Without the shared cache (L2EN = 0, WORDS = 1)
// its three events are replaced by several reads being outstanding at the
// central cache at once, which exercises the client-ID FIFO. Without
// first-level caches (L1EN = 0) their three events are not required.

  localparam int IDW  = (N > 1) ? $clog2(N) : 1;
  localparam int OFFW = $clog2(WORDS);
  localparam int LAW  = IDW + AW - OFFW;

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

  int checks = 0, failures = 0;
  int n_l1_hit = 0, n_l1_miss = 0, n_l1_wb = 0;
  int n_l2_hit = 0, n_l2_miss = 0, n_l2_evict = 0;
  int n_contend = 0, n_stall = 0;
  int n_done = 0;
  longint cycles = 0;

  function automatic logic [DW-1:0] word_init(input logic [IDW+AW-1:0] key);
    return DW'({key, key}) ^ DW'(64'h0123_4567_89AB_CDEF);
  endfunction

  logic [WORDS*DW-1:0] bmem [logic [LAW-1:0]];
  logic [LAW-1:0]      fillq [$];
  int                  fill_delay;
  int                  n_multi = 0;

  // word k of line la is word la*WORDS + k of the memory space
  function automatic logic [WORDS*DW-1:0] line_read(input logic [LAW-1:0] la);
    logic [WORDS*DW-1:0] l;
    if (bmem.exists(la)) return bmem[la];
    for (int k = 0; k < WORDS; k++)
      l[k*DW +: DW] = word_init((IDW+AW)'(longint'(la) * WORDS + k));
    return l;
  endfunction

  // off-chip memory model: accepts fill requests while earlier ones are
  // still pending and answers them in order after random delays
  always @(negedge clk) b_req_ready <= ($urandom_range(3) != 0);
  always @(posedge clk) if (rst_n) begin
    int nreq;
    cycles++;
    if (l2_hit) n_l2_hit++;
    if (l2_miss) n_l2_miss++;
    if (l2_evict) n_l2_evict++;
    nreq = 0;
    for (int c = 0; c < N; c++) begin
      if (l1_hit[c]) n_l1_hit++;
      if (l1_miss[c]) n_l1_miss++;
      if (l1_writeback[c]) n_l1_wb++;
      if (c_req_valid[c] && !c_req_ready[c] && init_done) n_stall++;
      if (dut.m_req_valid[c]) nreq++;
    end
    if (nreq > 1) n_contend++;
    if (fillq.size() > 1) n_multi++;
    if (b_resp_valid && b_resp_ready) begin
      void'(fillq.pop_front());
      fill_delay = $urandom_range(10);
    end
    if (b_req_valid && b_req_ready) begin
      if (b_req_write) bmem[b_req_laddr] = b_req_wline;
      else begin
        if (fillq.size() == 0) fill_delay = $urandom_range(10);
        fillq.push_back(b_req_laddr);
      end
    end
  end
  always @(negedge clk) begin
    if (fillq.size() > 0 && fill_delay > 0) fill_delay--;
    b_resp_valid <= fillq.size() > 0 && fill_delay == 0;
    b_resp_line  <= (fillq.size() > 0) ? line_read(fillq[0]) : '0;
  end

  for (genvar c = 0; c < N; c++) begin : g_client
    logic [DW-1:0] refm [logic [AW-1:0]];
    logic [DW-1:0] expq [$];

    always @(negedge clk) c_resp_ready[c] <= ($urandom_range(3) != 0);
    always @(posedge clk) if (rst_n && c_resp_valid[c] && c_resp_ready[c]) begin
      checks++;
      if (expq.size() == 0 || c_resp_data[c] !== expq[0]) begin
        failures++;
        $display("FAIL client %0d read %h expected %h", c, c_resp_data[c], expq.size() != 0 ? expq[0] : '0);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end

    task automatic op(input bit wr, input logic [AW-1:0] a, input logic [DW-1:0] d);
      c_req_valid[c] = 1; c_req_write[c] = wr; c_req_addr[c] = a; c_req_wdata[c] = d;
      #1;
      while (!c_req_ready[c]) begin @(negedge clk); #1; end
      @(posedge clk);
      if (wr) refm[a] = d;
      else    expq.push_back(refm.exists(a) ? refm[a] : word_init((IDW+AW)'({IDW'(c), a})));
      @(negedge clk);
      c_req_valid[c] = 0;
    endtask

    initial begin
      c_req_valid[c] = 0; c_req_write[c] = 0; c_req_addr[c] = '0; c_req_wdata[c] = '0;
      wait (rst_n);
      @(negedge clk);
      // the first request is issued before the caches finish clearing
      op(1'b0, AW'(c), '0);
      for (int n = 0; n < NOPS; n++) begin
        logic [AW-1:0] a;
        case ($urandom_range(2))
          0:       a = AW'($urandom_range(LOCAL_RANGE - 1));
          1:       a = AW'($urandom_range(RANGE - 1));
          default: a = AW'($urandom_range(15) * CONFLICT_STRIDE + $urandom_range(7));
        endcase
        if ($urandom_range(2) == 0) op(1'b1, a, DW'({$urandom, $urandom}));
        else                        op(1'b0, a, '0);
      end
      foreach (refm[a]) op(1'b0, a, '0);
      wait (expq.size() == 0);
      n_done++;
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_done == N);
    repeat (10) @(negedge clk);
    $display("cycles %0d: L1 hits %0d misses %0d write-backs %0d; L2 hits %0d misses %0d dirty evictions %0d; contention %0d; stalls %0d; multiple fills outstanding %0d",
             cycles, n_l1_hit, n_l1_miss, n_l1_wb, n_l2_hit, n_l2_miss, n_l2_evict, n_contend, n_stall, n_multi);
    if (L1EN) begin
      need(n_l1_hit, "first-level hit");
      need(n_l1_miss, "first-level miss");
      need(n_l1_wb, "first-level write-back");
    end
    if (L2EN) begin
      need(n_l2_hit, "shared-cache hit");
      need(n_l2_miss, "shared-cache miss");
      need(n_l2_evict, "shared-cache dirty eviction");
    end else begin
      need(n_multi, "several reads outstanding at the central cache");
    end
    need(n_contend, "interconnect contention");
    need(n_stall, "client stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
