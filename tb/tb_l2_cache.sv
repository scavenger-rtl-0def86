// tb_l2_cache: self-checking test of the set-associative shared cache.
//
// Two caches run side by side on 16-bit word addresses, 32-bit words and
// four memory-space IDs: 8 sets x 4 ways x 4-word lines on 2-bank stores
// with serial metadata/data reads, and 4 sets x 2 ways x 2-word lines on
// monolithic stores with the parallel data read. Each is backed by a line
// memory model with random delays whose untouched words are a function of
// their address. First a directed sequence on one set checks LRU
// replacement hit by hit: fill all ways, touch the oldest line, bring in
// one more line (which must evict the second-oldest), then re-access.
// Then random word reads and writes from all IDs, with response
// back-pressure, are checked against a reference memory, including the
// response ID; the same address under different IDs must never alias.
// Hits, misses and dirty evictions must all occur.
module tb_l2_cache;
  localparam int unsigned AW   = 16;
  localparam int unsigned DW   = 32;
  localparam int unsigned IDW  = 2;
  localparam int          NCFG = 2;
  localparam int CFG_SETS  [NCFG] = '{8, 4};
  localparam int CFG_WAYS  [NCFG] = '{4, 2};
  localparam int CFG_WORDS [NCFG] = '{4, 2};
  localparam int CFG_NB    [NCFG] = '{2, 1};
  localparam bit CFG_PAR   [NCFG] = '{1'b0, 1'b1};

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  int checks [NCFG];
  int failures [NCFG];
  int n_hit [NCFG], n_miss [NCFG], n_evict [NCFG];
  bit done [NCFG];

  // initial content of word {id, addr} of the backing memory
  function automatic logic [DW-1:0] word_init(input logic [IDW+AW-1:0] key);
    return (32'(key) * 32'h9E37_79B1) ^ 32'h1234_5678;
  endfunction

  initial begin
    int c, f;
    repeat (400000) @(posedge clk);
    c = 0; f = 1;
    for (int i = 0; i < NCFG; i++) begin c += checks[i]; f += failures[i]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int WORDS = CFG_WORDS[g];
    localparam int OFFW  = $clog2(WORDS);
    localparam int LAW   = IDW + AW - OFFW;
    localparam int SETS  = CFG_SETS[g];
    localparam int WAYS  = CFG_WAYS[g];

    logic               req_valid, req_ready, req_write;
    logic [IDW-1:0]     req_id, resp_id;
    logic [AW-1:0]      req_addr;
    logic [DW-1:0]      req_wdata, resp_data;
    logic               resp_valid, resp_ready;
    logic               b_req_valid, b_req_ready, b_req_write;
    logic [LAW-1:0]     b_req_laddr;
    logic [WORDS*DW-1:0] b_req_wline, b_resp_line;
    logic               b_resp_valid, b_resp_ready;
    logic               init_done, ev_hit, ev_miss, ev_evict;

    l2_cache #(
      .ADDR_W (AW), .DATA_W (DW), .ID_W (IDW), .SETS (SETS), .WAYS (WAYS),
      .WORDS (WORDS), .NBANKS (CFG_NB[g]), .PARALLEL (CFG_PAR[g])
    ) dut (.*);

    logic [WORDS*DW-1:0] bmem [logic [LAW-1:0]];
    logic [DW-1:0]       refm [logic [IDW+AW-1:0]];
    logic [DW-1:0]       expq [$];
    logic [IDW-1:0]      expid [$];
    bit                  fill_pend;
    int                  fill_delay;
    logic [LAW-1:0]      fill_laddr;

    function automatic logic [WORDS*DW-1:0] line_read(input logic [LAW-1:0] la);
      logic [WORDS*DW-1:0] l;
      if (bmem.exists(la)) return bmem[la];
      for (int k = 0; k < WORDS; k++) l[k*DW +: DW] = word_init((IDW+AW)'({la, OFFW'(k)}));
      return l;
    endfunction

    // backing line memory
    always @(negedge clk) b_req_ready <= ($urandom_range(3) != 0);
    always @(posedge clk) if (rst_n) begin
      if (ev_hit) n_hit[g]++;
      if (ev_miss) n_miss[g]++;
      if (ev_evict) n_evict[g]++;
      if (b_req_valid && b_req_ready) begin
        if (b_req_write) bmem[b_req_laddr] = b_req_wline;
        else begin
          fill_pend  = 1;
          fill_laddr = b_req_laddr;
          fill_delay = $urandom_range(8);
        end
      end
      if (b_resp_valid && b_resp_ready) fill_pend = 0;
    end
    always @(negedge clk) begin
      if (fill_pend && fill_delay > 0) fill_delay--;
      b_resp_valid <= fill_pend && fill_delay == 0;
      b_resp_line  <= line_read(fill_laddr);
    end

    // response checker
    bit rand_ready = 0;
    always @(negedge clk) resp_ready <= rand_ready ? ($urandom_range(3) != 0) : 1'b1;
    always @(posedge clk) if (rst_n && resp_valid && resp_ready) begin
      checks[g]++;
      if (expq.size() == 0 || resp_data !== expq[0] || resp_id !== expid[0]) begin
        failures[g]++;
        $display("FAIL cfg %0d read id %0d data %h expected id %0d data %h", g, resp_id, resp_data,
                 expid.size() ? expid[0] : '0, expq.size() ? expq[0] : '0);
      end
      if (expq.size()) begin void'(expq.pop_front()); void'(expid.pop_front()); end
    end

    task automatic op(input bit wr, input logic [IDW-1:0] id, input logic [AW-1:0] a,
                      input logic [DW-1:0] d);
      logic [IDW+AW-1:0] key;
      key = {id, a};
      req_valid = 1; req_write = wr; req_id = id; req_addr = a; req_wdata = d;
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      if (wr) refm[key] = d;
      else begin
        expq.push_back(refm.exists(key) ? refm[key] : word_init(key));
        expid.push_back(id);
      end
      @(negedge clk);
      req_valid = 0;
    endtask

    // read one word of tag t in set 0 and report whether it hit
    task automatic probe(input int t, input bit exp_hit, input string what);
      int h0;
      h0 = n_hit[g];
      op(1'b0, '0, AW'(t * SETS * WORDS + 1), '0);
      wait (expq.size() == 0);
      @(negedge clk);
      checks[g]++;
      if ((n_hit[g] != h0) != exp_hit) begin
        failures[g]++;
        $display("FAIL cfg %0d LRU step %s: hit=%0d expected %0d", g, what, n_hit[g] != h0, exp_hit);
      end
    endtask

    initial begin
      req_valid = 0; req_write = 0; req_id = '0; req_addr = '0; req_wdata = '0;
      wait (rst_n);
      wait (init_done);
      @(negedge clk);
      // directed LRU sequence in set 0
      for (int t = 0; t < WAYS; t++) probe(t, 1'b0, "fill");
      probe(0, 1'b1, "touch oldest");
      probe(WAYS, 1'b0, "new line");
      probe(0, 1'b1, "recently used line kept");
      for (int t = 2; t < WAYS; t++) probe(t, 1'b1, "younger lines kept");
      probe(1, 1'b0, "least recently used line evicted");
      // random traffic from all memory spaces
      rand_ready = 1;
      for (int n = 0; n < 4000; n++) begin
        logic [AW-1:0] a;
        logic [IDW-1:0] id;
        id = IDW'($urandom);
        a  = AW'($urandom_range(63));
        if ($urandom_range(2) == 0) op(1'b1, id, a, $urandom);
        else                        op(1'b0, id, a, '0);
      end
      foreach (refm[k]) op(1'b0, k[IDW+AW-1:AW], k[AW-1:0], '0);
      rand_ready = 0;
      wait (expq.size() == 0);
      repeat (10) @(negedge clk);
      checks[g]++;
      if (n_hit[g] == 0 || n_miss[g] == 0 || n_evict[g] == 0) begin
        failures[g]++;
        $display("FAIL cfg %0d hits %0d misses %0d evictions %0d", g, n_hit[g], n_miss[g], n_evict[g]);
      end
      done[g] = 1;
    end
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    begin
      int c, f;
      c = 0; f = 0;
      for (int i = 0; i < NCFG; i++) begin
        c += checks[i]; f += failures[i];
        $display("cfg %0d: hits %0d misses %0d dirty evictions %0d", i, n_hit[i], n_miss[i], n_evict[i]);
      end
      $display("TB_RESULT checks=%0d failures=%0d", c, f);
    end
    $finish;
  end
endmodule
