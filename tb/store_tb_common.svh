// Shared body of the store testbenches (mono_store, banked_store,
// cache_store). The including module declares STORE_DEPTH, clk, rst_n, the
// store's request/response signals and an instance named dut, plus
// EXP_LAT, the read latency expected with no stalls.
//
// Phase 1 fills the store. Phase 2 measures the read latency of a lone
// read. Phase 3 checks that reads spread over consecutive addresses are
// accepted one per cycle when the response side never stalls. Phase 4 runs
// random reads and writes with random response back-pressure and checks
// every returned word, in order, against a model.

  logic [W-1:0] model [STORE_DEPTH];
  logic [W-1:0] expq [$];
  int checks = 0, failures = 0;
  int stalls = 0;
  bit rand_ready = 0;

  always #5 clk = ~clk;

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  // response scoreboard
  always @(posedge clk) begin
    if (rst_n && resp_valid && resp_ready) begin
      checks++;
      if (expq.size() == 0) fail("response with no read outstanding");
      else begin
        logic [W-1:0] e;
        e = expq.pop_front();
        if (resp_data !== e) begin
          failures++;
          $display("FAIL read data %h expected %h", resp_data, e);
        end
      end
    end
    if (rst_n && resp_valid && !resp_ready) stalls++;
  end

  always @(negedge clk) resp_ready <= rand_ready ? ($urandom_range(3) != 0) : 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue one request and wait until it is accepted (drive on negedge).
  task automatic issue(input bit we, input int a, input logic [W-1:0] d);
    req_valid = 1; req_we = we; req_addr = AW'(a); req_wdata = d;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    if (we) model[a] = d;
    else    expq.push_back(model[a]);
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    rst_n = 0; req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: fill
    for (int i = 0; i < int'(STORE_DEPTH); i++) issue(1'b1, i, W'({$urandom, $urandom}));
    repeat (5) @(negedge clk);
    // phase 2: latency of a lone read
    begin
      int lat;
      issue(1'b0, 5, '0);
      lat = 0;
      // issue() returned at the negedge after acceptance
      while (!resp_valid) begin @(negedge clk); lat++; end
      lat++;
      checks++;
      if (lat != EXP_LAT) begin
        failures++;
        $display("FAIL read latency %0d expected %0d", lat, EXP_LAT);
      end
      @(negedge clk);
    end
    // phase 3: streaming reads, one accepted per cycle
    begin
      int accepted, cycles;
      accepted = 0; cycles = 0;
      while (accepted < 32) begin
        req_valid = 1; req_we = 0; req_addr = AW'(accepted);
        @(posedge clk);
        cycles++;
        if (req_ready) begin
          expq.push_back(model[accepted]);
          accepted++;
        end
        @(negedge clk);
      end
      req_valid = 0;
      checks++;
      if (cycles != 32) begin
        failures++;
        $display("FAIL 32 streaming reads took %0d cycles", cycles);
      end
      repeat (10) @(negedge clk);
    end
    // phase 4: random traffic with back-pressure
    rand_ready = 1;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(2) == 0) issue(1'b1, $urandom_range(STORE_DEPTH - 1), W'({$urandom, $urandom}));
      else                        issue(1'b0, $urandom_range(STORE_DEPTH - 1), '0);
    end
    rand_ready = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d reads never answered", expq.size());
    end
    checks++;
    if (stalls == 0) fail("response back-pressure never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
