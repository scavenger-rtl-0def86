// scavenger_top: application-optimized on-chip memory hierarchy.
//
// N_CLIENTS private memories each get a direct-mapped first-level cache
// (l1_cache) built on a banked BRAM store. Their misses and write-backs
// are merged by a round-robin interconnect (mem_arbiter) into one
// set-associative shared cache (l2_cache), which takes the BRAM left over
// after the user kernel and the first-level caches. The shared cache's line
// port leaves the top towards the off-chip central cache, which is not part
// of this design. Each memory space is tagged with its client index inside
// the shared cache and in the line addresses it sends out.
//
// Client ports follow the private-memory interface: a request channel
// (valid/ready, write flag, word address, write word) and an in-order read
// response channel (valid/ready, word). All clients and the backing port
// are on one clock; all resets are asynchronous, active low, and the
// caches clear their metadata after reset (init_done rises when both levels
// are ready; requests before that simply wait).
//
// Defaults follow the largest configuration reported for the four-memory
// list-merging kernel: four first-level caches of 64K 64-bit words each
// (2048 KB in total) built from 4-bank stores, and a four-way shared cache
// with 4096 sets of 4-word lines. The event outputs pulse once per
// hit/miss/write-back of each cache, for performance counters.
//
// L2_EN = 0 leaves the shared cache out, for a kernel that leaves too little
// BRAM to build one: the interconnect then talks to the central cache
// directly. The backing port then carries single words ({client, word
// address}, DATA_W bits), a small FIFO remembers which client each
// outstanding read belongs to (responses come back in request order), and
// the l2_* event outputs stay low. Leaving the level out is the design's
// option; the word-wide port and the ID FIFO are this implementation's.
// L1_EN = 0 likewise gives the clients no local cache (for a well-pipelined
// kernel that does not need one): each client port goes to the
// interconnect unchanged and the l1_* event outputs stay low. Without first-
// level caches a client may have several reads outstanding; they are still
// answered in order because the level below serves requests in order.
module scavenger_top #(
  parameter int unsigned N_CLIENTS   = 4,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned DATA_W      = 64,
  parameter int unsigned L1_M        = 1,
  parameter int unsigned L1_R        = 16,
  parameter int unsigned L1_NBANKS   = 4,
  parameter int unsigned L2_SETS     = 4096,
  parameter int unsigned L2_WAYS     = 4,
  parameter int unsigned L2_WORDS    = 4,
  parameter int unsigned L2_NBANKS   = 4,
  parameter bit          L2_PARALLEL = 1'b0,
  parameter bit          L1_EN       = 1'b1,
  parameter bit          L2_EN       = 1'b1,
  localparam int unsigned ID_W       = (N_CLIENTS > 1) ? $clog2(N_CLIENTS) : 1,
  localparam int unsigned B_WORDS    = L2_EN ? L2_WORDS : 1,
  localparam int unsigned LADDR_W    = ID_W + ADDR_W - $clog2(B_WORDS),
  localparam int unsigned LINE_W     = B_WORDS * DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // private-memory client ports
  input  logic              c_req_valid  [N_CLIENTS],
  output logic              c_req_ready  [N_CLIENTS],
  input  logic              c_req_write  [N_CLIENTS],
  input  logic [ADDR_W-1:0] c_req_addr   [N_CLIENTS],
  input  logic [DATA_W-1:0] c_req_wdata  [N_CLIENTS],
  output logic              c_resp_valid [N_CLIENTS],
  input  logic              c_resp_ready [N_CLIENTS],
  output logic [DATA_W-1:0] c_resp_data  [N_CLIENTS],
  // line port to the off-chip central cache
  output logic               b_req_valid,
  input  logic               b_req_ready,
  output logic               b_req_write,
  output logic [LADDR_W-1:0] b_req_laddr,
  output logic [LINE_W-1:0]  b_req_wline,
  input  logic               b_resp_valid,
  output logic               b_resp_ready,
  input  logic [LINE_W-1:0]  b_resp_line,
  // status and event pulses
  output logic               init_done,
  output logic               l1_hit       [N_CLIENTS],
  output logic               l1_miss      [N_CLIENTS],
  output logic               l1_writeback [N_CLIENTS],
  output logic               l2_hit,
  output logic               l2_miss,
  output logic               l2_evict
);

  logic              m_req_valid  [N_CLIENTS];
  logic              m_req_ready  [N_CLIENTS];
  logic              m_req_write  [N_CLIENTS];
  logic [ADDR_W-1:0] m_req_addr   [N_CLIENTS];
  logic [DATA_W-1:0] m_req_wdata  [N_CLIENTS];
  logic              m_resp_valid [N_CLIENTS];
  logic              m_resp_ready [N_CLIENTS];
  logic [DATA_W-1:0] m_resp_data  [N_CLIENTS];
  logic [N_CLIENTS-1:0] l1_init;

  for (genvar c = 0; c < N_CLIENTS; c++) begin : g_l1
    if (L1_EN) begin : g_cache
      l1_cache #(
        .ADDR_W (ADDR_W),
        .DATA_W (DATA_W),
        .M      (L1_M),
        .R      (L1_R),
        .NBANKS (L1_NBANKS)
      ) u_l1 (
        .clk          (clk),
        .rst_n        (rst_n),
        .c_req_valid  (c_req_valid[c]),
        .c_req_ready  (c_req_ready[c]),
        .c_req_write  (c_req_write[c]),
        .c_req_addr   (c_req_addr[c]),
        .c_req_wdata  (c_req_wdata[c]),
        .c_resp_valid (c_resp_valid[c]),
        .c_resp_ready (c_resp_ready[c]),
        .c_resp_data  (c_resp_data[c]),
        .m_req_valid  (m_req_valid[c]),
        .m_req_ready  (m_req_ready[c]),
        .m_req_write  (m_req_write[c]),
        .m_req_addr   (m_req_addr[c]),
        .m_req_wdata  (m_req_wdata[c]),
        .m_resp_valid (m_resp_valid[c]),
        .m_resp_ready (m_resp_ready[c]),
        .m_resp_data  (m_resp_data[c]),
        .init_done    (l1_init[c]),
        .ev_hit       (l1_hit[c]),
        .ev_miss      (l1_miss[c]),
        .ev_writeback (l1_writeback[c])
      );
    end else begin : g_direct
      // no local cache: the client talks to the interconnect itself
      assign m_req_valid[c]  = c_req_valid[c];
      assign c_req_ready[c]  = m_req_ready[c];
      assign m_req_write[c]  = c_req_write[c];
      assign m_req_addr[c]   = c_req_addr[c];
      assign m_req_wdata[c]  = c_req_wdata[c];
      assign c_resp_valid[c] = m_resp_valid[c];
      assign m_resp_ready[c] = c_resp_ready[c];
      assign c_resp_data[c]  = m_resp_data[c];
      assign l1_init[c]      = 1'b1;
      assign l1_hit[c]       = 1'b0;
      assign l1_miss[c]      = 1'b0;
      assign l1_writeback[c] = 1'b0;
    end
  end

  logic              s_req_valid, s_req_ready, s_req_write;
  logic [ID_W-1:0]   s_req_id, s_resp_id;
  logic [ADDR_W-1:0] s_req_addr;
  logic [DATA_W-1:0] s_req_wdata, s_resp_data;
  logic              s_resp_valid, s_resp_ready;
  logic              l2_init;

  mem_arbiter #(.N(N_CLIENTS), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_xbar (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_req_valid   (m_req_valid),
    .in_req_ready   (m_req_ready),
    .in_req_write   (m_req_write),
    .in_req_addr    (m_req_addr),
    .in_req_wdata   (m_req_wdata),
    .in_resp_valid  (m_resp_valid),
    .in_resp_ready  (m_resp_ready),
    .in_resp_data   (m_resp_data),
    .out_req_valid  (s_req_valid),
    .out_req_ready  (s_req_ready),
    .out_req_id     (s_req_id),
    .out_req_write  (s_req_write),
    .out_req_addr   (s_req_addr),
    .out_req_wdata  (s_req_wdata),
    .out_resp_valid (s_resp_valid),
    .out_resp_ready (s_resp_ready),
    .out_resp_id    (s_resp_id),
    .out_resp_data  (s_resp_data)
  );

  if (L2_EN) begin : g_l2
    l2_cache #(
      .ADDR_W   (ADDR_W),
      .DATA_W   (DATA_W),
      .ID_W     (ID_W),
      .SETS     (L2_SETS),
      .WAYS     (L2_WAYS),
      .WORDS    (L2_WORDS),
      .NBANKS   (L2_NBANKS),
      .PARALLEL (L2_PARALLEL)
    ) u_l2 (
      .clk          (clk),
      .rst_n        (rst_n),
      .req_valid    (s_req_valid),
      .req_ready    (s_req_ready),
      .req_id       (s_req_id),
      .req_write    (s_req_write),
      .req_addr     (s_req_addr),
      .req_wdata    (s_req_wdata),
      .resp_valid   (s_resp_valid),
      .resp_ready   (s_resp_ready),
      .resp_id      (s_resp_id),
      .resp_data    (s_resp_data),
      .b_req_valid  (b_req_valid),
      .b_req_ready  (b_req_ready),
      .b_req_write  (b_req_write),
      .b_req_laddr  (b_req_laddr),
      .b_req_wline  (b_req_wline),
      .b_resp_valid (b_resp_valid),
      .b_resp_ready (b_resp_ready),
      .b_resp_line  (b_resp_line),
      .init_done    (l2_init),
      .ev_hit       (l2_hit),
      .ev_miss      (l2_miss),
      .ev_evict     (l2_evict)
    );
  end else begin : g_no_l2
    // The interconnect talks to the central cache directly. Each blocking
    // first-level cache has at most one read outstanding, so 2^ID_W entries
    // hold the client IDs of all outstanding reads; without first-level
    // caches, a full FIFO holds further reads back.
    logic idq_full;
    logic rd_go;

    assign rd_go        = s_req_valid && !s_req_write && !idq_full && b_req_ready;
    assign b_req_valid  = s_req_valid && (s_req_write || !idq_full);
    assign s_req_ready  = b_req_ready && (s_req_write || !idq_full);
    assign b_req_write  = s_req_write;
    assign b_req_laddr  = {s_req_id, s_req_addr};
    assign b_req_wline  = s_req_wdata;
    assign s_resp_valid = b_resp_valid;
    assign s_resp_data  = b_resp_line;
    assign b_resp_ready = s_resp_ready;

    sync_fifo #(.W(ID_W), .DEPTH(1 << ID_W)) u_idq (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (rd_go),
      .din   (s_req_id),
      .pop   (b_resp_valid && b_resp_ready),
      .dout  (s_resp_id),
      .empty (),
      .full  (idq_full),
      .count ()
    );

    assign l2_init  = 1'b1;
    assign l2_hit   = 1'b0;
    assign l2_miss  = 1'b0;
    assign l2_evict = 1'b0;
  end

  assign init_done = (&l1_init) && l2_init;

endmodule
