// tb_cache_index: self-checking test of power-of-two and non-power-of-two
// cache indexing.
//
// Three instances (1*2^6, 5*2^4 and 3*2^8 lines, 20-bit addresses) are
// driven with random hashed addresses. The reference computes
// index = ((tag mod 2^(K-R+4)) mod M) * 2^R + (addr mod 2^R) with ordinary
// arithmetic, and tag = addr >> R. Every index must be below the line count,
// the tag and index base must rebuild the address, and over many addresses
// every line must be used.
module tb_cache_index;
  localparam int unsigned AW = 20;

  logic [AW-1:0] haddr;
  logic [5:0]  idx_a;  logic [13:0] tag_a;   // M=1, R=6: 64 lines
  logic [6:0]  idx_b;  logic [15:0] tag_b;   // M=5, R=4: 80 lines, K=7
  logic [9:0]  idx_c;  logic [11:0] tag_c;   // M=3, R=8: 768 lines, K=10
  int checks = 0, failures = 0;
  int used_b [80];
  int used_c [768];

  cache_index #(.ADDR_W(AW), .M(1), .R(6)) ua (.haddr(haddr), .index(idx_a), .tag(tag_a));
  cache_index #(.ADDR_W(AW), .M(5), .R(4)) ub (.haddr(haddr), .index(idx_b), .tag(tag_b));
  cache_index #(.ADDR_W(AW), .M(3), .R(8)) uc (.haddr(haddr), .index(idx_c), .tag(tag_c));

  function automatic int ref_index(input int a, input int m, input int r, input int k);
    int ir;
    ir = (a >> r) % (1 << (k - r + 4));
    return (ir % m) * (1 << r) + (a % (1 << r));
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (addr %h)", what, got, exp, haddr);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int a;
      a = int'($urandom_range((1 << AW) - 1));
      haddr = AW'(a);
      #1;
      check(int'(idx_a), a % 64, "pow2 index");
      check(int'(tag_a), a >> 6, "pow2 tag");
      check(int'(idx_b), ref_index(a, 5, 4, 7), "M=5 index");
      check(int'(tag_b), a >> 4, "M=5 tag");
      check(int'(idx_c), ref_index(a, 3, 8, 10), "M=3 index");
      check(int'(tag_c), a >> 8, "M=3 tag");
      check(int'({tag_b, idx_b[3:0]}), a, "M=5 address rebuilt from tag and index base");
      if (int'(idx_b) < 80) used_b[idx_b]++;
      if (int'(idx_c) < 768) used_c[idx_c]++;
    end
    begin
      int unused;
      unused = 0;
      foreach (used_b[i]) if (used_b[i] == 0) unused++;
      foreach (used_c[i]) if (used_c[i] == 0) unused++;
      check(unused, 0, "lines never indexed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
