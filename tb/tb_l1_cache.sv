// tb_l1_cache: self-checking test of the direct-mapped first-level cache.
//
// Two caches run side by side on 16-bit word addresses and 32-bit words:
// a power-of-two cache of 32 lines on a 4-bank store, and a
// non-power-of-two cache of 3*16 = 48 lines on a monolithic store. Each is
// backed by a memory model with random accept and answer delays whose
// untouched words read as a function of the address. A driver issues
// random reads and writes over 256 words (so lines are evicted, many of
// them dirty) with random response back-pressure, and every read is
// compared with a reference memory. Directed checks measure the read-hit
// latency (4 cycles banked, 2 monolithic), and check that after the run
// every written word can still be read back. Hits, misses and write-backs
// must all occur.
module tb_l1_cache;
  localparam int unsigned AW = 16;
  localparam int unsigned DW = 32;
  localparam int          NCFG = 2;
  localparam int          CFG_M   [NCFG] = '{1, 3};
  localparam int          CFG_R   [NCFG] = '{5, 4};
  localparam int          CFG_NB  [NCFG] = '{4, 1};
  localparam int          CFG_LAT [NCFG] = '{4, 2};

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  int checks [NCFG];
  int failures [NCFG];
  int n_hit [NCFG], n_miss [NCFG], n_wb [NCFG];
  bit done [NCFG];

  function automatic logic [DW-1:0] backing_init(input logic [AW-1:0] a);
    return {a ^ 16'hBEEF, a};
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
    logic          c_req_valid, c_req_ready, c_req_write;
    logic [AW-1:0] c_req_addr;
    logic [DW-1:0] c_req_wdata;
    logic          c_resp_valid, c_resp_ready;
    logic [DW-1:0] c_resp_data;
    logic          m_req_valid, m_req_ready, m_req_write;
    logic [AW-1:0] m_req_addr;
    logic [DW-1:0] m_req_wdata;
    logic          m_resp_valid, m_resp_ready;
    logic [DW-1:0] m_resp_data;
    logic          init_done, ev_hit, ev_miss, ev_writeback;

    l1_cache #(
      .ADDR_W (AW), .DATA_W (DW), .M (CFG_M[g]), .R (CFG_R[g]), .NBANKS (CFG_NB[g]),
      .POLY   (16'h1021)
    ) dut (.*);

    logic [DW-1:0] bmem [logic [AW-1:0]];
    logic [DW-1:0] refm [logic [AW-1:0]];
    logic [DW-1:0] expq [$];
    int            fill_delay;
    bit            fill_pend;
    logic [AW-1:0] fill_addr;

    // backing memory model
    always @(negedge clk) m_req_ready <= ($urandom_range(3) != 0);
    always @(posedge clk) if (rst_n) begin
      if (ev_hit) n_hit[g]++;
      if (ev_miss) n_miss[g]++;
      if (ev_writeback) n_wb[g]++;
      if (m_req_valid && m_req_ready) begin
        if (m_req_write) bmem[m_req_addr] = m_req_wdata;
        else begin
          fill_pend  = 1;
          fill_addr  = m_req_addr;
          fill_delay = $urandom_range(6);
        end
      end
      if (m_resp_valid && m_resp_ready) fill_pend = 0;
    end
    always @(negedge clk) begin
      if (fill_pend && fill_delay > 0) fill_delay--;
      m_resp_valid <= fill_pend && fill_delay == 0;
      m_resp_data  <= bmem.exists(fill_addr) ? bmem[fill_addr] : backing_init(fill_addr);
    end

    // response checker
    bit rand_ready = 0;
    always @(negedge clk) c_resp_ready <= rand_ready ? ($urandom_range(3) != 0) : 1'b1;
    always @(posedge clk) if (rst_n && c_resp_valid && c_resp_ready) begin
      checks[g]++;
      if (expq.size() == 0 || c_resp_data !== expq[0]) begin
        failures[g]++;
        $display("FAIL cfg %0d read data %h expected %h", g, c_resp_data,
                 expq.size() ? expq[0] : '0);
      end
      if (expq.size()) void'(expq.pop_front());
    end

    function automatic logic [DW-1:0] ref_read(input logic [AW-1:0] a);
      return refm.exists(a) ? refm[a] : backing_init(a);
    endfunction

    task automatic op(input bit wr, input logic [AW-1:0] a, input logic [DW-1:0] d);
      c_req_valid = 1; c_req_write = wr; c_req_addr = a; c_req_wdata = d;
      #1;
      while (!c_req_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      if (wr) refm[a] = d;
      else    expq.push_back(ref_read(a));
      @(negedge clk);
      c_req_valid = 0;
    endtask

    initial begin
      c_req_valid = 0; c_req_write = 0; c_req_addr = '0; c_req_wdata = '0;
      wait (rst_n);
      wait (init_done);
      @(negedge clk);
      // directed: read-hit latency
      op(1'b1, 16'h0007, 32'hCAFE_0007);
      repeat (10) @(negedge clk);
      begin
        int lat;
        op(1'b0, 16'h0007, '0);
        lat = 0;
        while (!c_resp_valid) begin @(negedge clk); lat++; end
        lat++;   // edges from acceptance to the edge that can take the answer
        checks[g]++;
        if (lat != CFG_LAT[g]) begin
          failures[g]++;
          $display("FAIL cfg %0d read-hit latency %0d expected %0d", g, lat, CFG_LAT[g]);
        end
      end
      repeat (5) @(negedge clk);
      // random traffic
      rand_ready = 1;
      for (int n = 0; n < 4000; n++) begin
        logic [AW-1:0] a;
        a = ($urandom_range(1) == 0) ? AW'($urandom_range(31)) : AW'($urandom_range(255));
        if ($urandom_range(2) == 0) op(1'b1, a, $urandom);
        else                        op(1'b0, a, '0);
      end
      // read back every word the run wrote
      foreach (refm[a]) op(1'b0, a, '0);
      rand_ready = 0;
      wait (expq.size() == 0);
      repeat (10) @(negedge clk);
      checks[g]++;
      if (n_hit[g] == 0 || n_miss[g] == 0 || n_wb[g] == 0) begin
        failures[g]++;
        $display("FAIL cfg %0d hits %0d misses %0d write-backs %0d", g, n_hit[g], n_miss[g], n_wb[g]);
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
        $display("cfg %0d: hits %0d misses %0d write-backs %0d", i, n_hit[i], n_miss[i], n_wb[i]);
      end
      $display("TB_RESULT checks=%0d failures=%0d", c, f);
    end
    $finish;
  end
endmodule
