// tb_bram_bank: self-checking test of the single-port BRAM.
//
// Fills a 64-word bank with random words, then reads every word back in
// random order and compares with a model array, checking that the word
// appears exactly one cycle after the read and that it is held while
// the bank is idle or being written.
module tb_bram_bank;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned W     = 40;

  logic         clk = 1'b0;
  logic         en, we;
  logic [5:0]   addr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_bank #(.DEPTH(DEPTH), .W(W)) dut (.*);

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) begin
      model[i] = {$urandom, $urandom} & {W{1'b1}};
      en = 1; we = 1; addr = 6'(i); wdata = model[i];
      @(negedge clk);
    end
    for (int n = 0; n < 300; n++) begin
      int a;
      logic [W-1:0] held;
      a = $urandom_range(DEPTH - 1);
      en = 1; we = 0; addr = 6'(a);
      @(negedge clk);
      check(rdata, model[a], "read one cycle after request");
      held = rdata;
      // idle cycle, then a write elsewhere: rdata must hold
      en = 0;
      @(negedge clk);
      check(rdata, held, "hold while idle");
      a = $urandom_range(DEPTH - 1);
      model[a] = {$urandom, $urandom} & {W{1'b1}};
      en = 1; we = 1; addr = 6'(a); wdata = model[a];
      @(negedge clk);
      check(rdata, held, "hold during write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
