// tb_mem_arbiter: self-checking test of the round-robin cache interconnect.
//
// Four clients issue random reads and writes. A downstream model accepts
// requests with random stalls, records them, and answers each read some
// cycles later, in order, with a word derived from the ID and address.
// Checks: every forwarded request carries the ID of the client that
// issued it and that client's address; every client gets back exactly the
// answers to its own reads, in order; and while all four clients keep
// requesting, the grants rotate 0,1,2,3 without skipping anyone.
module tb_mem_arbiter;
  localparam int unsigned N  = 4;
  localparam int unsigned AW = 16;
  localparam int unsigned DW = 32;

  logic clk = 1'b0, rst_n;
  logic          in_req_valid [N], in_req_ready [N], in_req_write [N];
  logic [AW-1:0] in_req_addr [N];
  logic [DW-1:0] in_req_wdata [N];
  logic          in_resp_valid [N], in_resp_ready [N];
  logic [DW-1:0] in_resp_data [N];
  logic          out_req_valid, out_req_ready, out_req_write;
  logic [1:0]    out_req_id, out_resp_id;
  logic [AW-1:0] out_req_addr;
  logic [DW-1:0] out_req_wdata, out_resp_data;
  logic          out_resp_valid, out_resp_ready;

  mem_arbiter #(.N(N), .ADDR_W(AW), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  int conflicts = 0;
  bit saturate = 0;
  int sat_grants = 0;
  logic [1:0] prev_grant;
  logic [DW-1:0] expq [N][$];
  logic [DW-1:0] pendq [$];
  logic [1:0]    pend_id [$];
  int sent [N];
  int done_cl = 0;
  int at_sync = 0;

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] answer(input logic [1:0] id, input logic [AW-1:0] a);
    return {id, 14'h1234, a} ^ 32'h5A5A_0000;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // downstream model
  always @(negedge clk) out_req_ready <= saturate ? 1'b1 : ($urandom_range(3) != 0);
  always @(posedge clk) if (rst_n) begin
    int nv;
    nv = 0;
    for (int c = 0; c < int'(N); c++) nv += int'(in_req_valid[c]);
    if (nv > 1) conflicts++;
    if (out_req_valid && out_req_ready) begin
      checks++;
      if (!in_req_valid[out_req_id] || in_req_addr[out_req_id] !== out_req_addr ||
          in_req_write[out_req_id] !== out_req_write) begin
        failures++;
        $display("FAIL forwarded request does not match client %0d", out_req_id);
      end
      if (!out_req_write) begin
        pendq.push_back(answer(out_req_id, out_req_addr));
        pend_id.push_back(out_req_id);
      end
      if (saturate) begin
        if (sat_grants > 0) begin
          checks++;
          if (out_req_id != prev_grant + 2'd1) begin
            failures++;
            $display("FAIL round robin: grant %0d after %0d", out_req_id, prev_grant);
          end
        end
        sat_grants++;
      end
      prev_grant = out_req_id;
    end
    if (out_resp_valid && out_resp_ready) begin
      void'(pendq.pop_front());
      void'(pend_id.pop_front());
    end
  end
  always @(negedge clk) begin
    out_resp_valid <= (pendq.size() > 0) && ($urandom_range(2) != 0);
    out_resp_data  <= (pendq.size() > 0) ? pendq[0] : '0;
    out_resp_id    <= (pend_id.size() > 0) ? pend_id[0] : '0;
  end

  // client response checkers
  for (genvar c = 0; c < N; c++) begin : g_cl
    always @(negedge clk) in_resp_ready[c] <= ($urandom_range(4) != 0);
    always @(posedge clk) if (rst_n && in_resp_valid[c] && in_resp_ready[c]) begin
      checks++;
      if (expq[c].size() == 0 || in_resp_data[c] !== expq[c][0]) begin
        failures++;
        $display("FAIL client %0d got %h", c, in_resp_data[c]);
      end
      if (expq[c].size() != 0) void'(expq[c].pop_front());
    end

    initial begin
      in_req_valid[c] = 0; in_req_write[c] = 0; in_req_addr[c] = '0; in_req_wdata[c] = '0;
      @(posedge rst_n);
      @(negedge clk);
      for (int n = 0; n < 400; n++) begin
        in_req_valid[c] = ($urandom_range(1) == 0) || saturate;
        in_req_write[c] = ($urandom_range(2) == 0);
        in_req_addr[c]  = AW'($urandom);
        in_req_wdata[c] = $urandom;
        if (in_req_valid[c]) begin
          // ready is stable between the falling and the rising edge
          #1;
          while (!in_req_ready[c]) begin @(negedge clk); #1; end
          @(posedge clk);
          if (!in_req_write[c]) expq[c].push_back(answer(2'(c), in_req_addr[c]));
          sent[c]++;
        end else @(posedge clk);
        @(negedge clk);
        in_req_valid[c] = 0;
        if (n == 300) begin
          // saturation phase: every client requests back to back
          at_sync++;
          wait (saturate);
          @(negedge clk);
        end
      end
      done_cl++;
    end
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (at_sync == N);
    repeat (5) @(negedge clk);
    saturate = 1;
    wait (done_cl == N);
    saturate = 0;
    wait (pendq.size() == 0);
    repeat (20) @(negedge clk);
    for (int c = 0; c < int'(N); c++) begin
      checks++;
      if (expq[c].size() != 0) begin
        failures++;
        $display("FAIL client %0d missing %0d responses", c, expq[c].size());
      end
    end
    checks++;
    if (sat_grants < 40 || conflicts == 0) begin
      failures++;
      $display("FAIL saturation grants %0d conflicts %0d", sat_grants, conflicts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
