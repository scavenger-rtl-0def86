// banked_store: multi-cycle banked BRAM store.
//
// A large store is split into NBANKS bram_banks, each with a FIFO buffer
// on its request side and another on its response side, so that no path
// has to cross the whole array in one cycle. Word addresses are interleaved
// over the banks: the low log2(NBANKS) address bits pick the bank and the
// rest address the word inside it. A read records its bank in an in-flight
// queue when it is accepted; responses are returned strictly in request
// order by waiting, at the head of that queue, for the named bank's output
// buffer. Requests to one bank stay in order in its input buffer, so a read
// after a write to the same address sees the new word.
//
// Handshake as mono_store (valid/ready requests, valid/ready read
// responses, no response to writes). With no stalls, a read is answered 3
// cycles after acceptance (input buffer, BRAM, output buffer) against 1
// cycle for mono_store; back-to-back requests to different banks proceed in
// parallel, one accepted per cycle. A bank only reads when its output
// buffer has room for the word, so a stalled client never loses data.
// The banking scheme, buffer sizes and in-order return follow the
// reference architecture; interleaving on low bits and the buffer depths
// are this design's choices.
module banked_store #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned W         = 64,
  parameter int unsigned NBANKS    = 4,
  parameter int unsigned IN_DEPTH  = 2,
  parameter int unsigned OUT_DEPTH = 2,
  parameter int unsigned IFQ_DEPTH = 8,
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic [W-1:0]  req_wdata,
  output logic          resp_valid,
  input  logic          resp_ready,
  output logic [W-1:0]  resp_data
);

  localparam int unsigned BB     = (NBANKS > 1) ? $clog2(NBANKS) : 1;
  localparam int unsigned BDEPTH = DEPTH / NBANKS;
  localparam int unsigned BAW    = (BDEPTH > 1) ? $clog2(BDEPTH) : 1;
  localparam int unsigned OCW    = $clog2(OUT_DEPTH + 1);

  typedef struct packed {
    logic           we;
    logic [BAW-1:0] addr;
    logic [W-1:0]   wdata;
  } bank_req_t;

  logic [BB-1:0]  sel;
  logic [BAW-1:0] baddr;
  logic           fire;
  logic           resp_fire;

  logic [NBANKS-1:0] in_full, in_empty, out_empty;
  logic [W-1:0]      out_dout [NBANKS];
  logic              ifq_full, ifq_empty;
  logic [BB-1:0]     ifq_head;

  assign sel   = BB'(req_addr % NBANKS);
  assign baddr = BAW'(req_addr / NBANKS);

  assign req_ready = !in_full[sel] && (req_we || !ifq_full);
  assign fire      = req_valid && req_ready;

  assign resp_valid = !ifq_empty && !out_empty[ifq_head];
  assign resp_data  = out_dout[ifq_head];
  assign resp_fire  = resp_valid && resp_ready;

  // In-flight queue: the bank of every outstanding read, in request order.
  sync_fifo #(.W(BB), .DEPTH(IFQ_DEPTH)) u_ifq (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (fire && !req_we),
    .din   (sel),
    .pop   (resp_fire),
    .dout  (ifq_head),
    .empty (ifq_empty),
    .full  (ifq_full),
    .count ()
  );

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    bank_req_t      in_head;
    logic           issue;
    logic           rd_pend;
    logic [W-1:0]   rdata;
    logic [OCW-1:0] out_cnt;

    sync_fifo #(.W($bits(bank_req_t)), .DEPTH(IN_DEPTH)) u_in (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (fire && (sel == BB'(b))),
      .din   ({req_we, baddr, req_wdata}),
      .pop   (issue),
      .dout  (in_head),
      .empty (in_empty[b]),
      .full  (in_full[b]),
      .count ()
    );

    // A read may start only if its word will find a free output slot.
    assign issue = !in_empty[b] &&
                   (in_head.we || (32'(out_cnt) + 32'(rd_pend) < OUT_DEPTH));

    bram_bank #(.DEPTH(BDEPTH), .W(W)) u_bram (
      .clk   (clk),
      .en    (issue),
      .we    (in_head.we),
      .addr  (in_head.addr),
      .wdata (in_head.wdata),
      .rdata (rdata)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rd_pend <= 1'b0;
      else        rd_pend <= issue && !in_head.we;
    end

    sync_fifo #(.W(W), .DEPTH(OUT_DEPTH)) u_out (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (rd_pend),
      .din   (rdata),
      .pop   (resp_fire && (ifq_head == BB'(b))),
      .dout  (out_dout[b]),
      .empty (out_empty[b]),
      .full  (),
      .count (out_cnt)
    );
  end

endmodule
