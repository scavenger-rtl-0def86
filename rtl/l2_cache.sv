// l2_cache: set-associative, multi-word on-chip shared cache.
//
// The shared cache sits between the first-level caches of several
// memory spaces and the off-chip central cache. Requests are word reads and
// word writes tagged with the ID of the memory space they belong to; the ID
// is part of the cache key, so different spaces never alias and no
// coherence is needed. Lines hold WORDS words; the set is taken from the
// low bits of the line address and the rest of the key is the tag.
//
// Storage follows the classic last-level-cache split. One metadata store
// holds, per set, {valid, dirty, tag, age} for every way. The data live in
// WAYS * WORDS separate stores, one per (way, word) pair, each holding that
// word of that way for all sets, so a word write touches one store and a
// line fill writes all of a way's stores in parallel. Every store is a
// cache_store and can be banked (NBANKS > 1). Replacement is true LRU with a
// per-way age (0 = most recent); an invalid way is filled first.
//
// The controller handles one request at a time:
//   1. read the set's metadata (and, with PARALLEL = 1, the requested word
//      of every way at the same time);
//   2. compare the tags in a stage of their own;
//   3. hit: read or write the word in the hit way (already read if
//      PARALLEL); miss: if the LRU victim is dirty, read its line and write
//      it to the backing port, then fetch the new line, merge a write into
//      it and write all its words;
//   4. write the updated metadata (LRU ages, dirty, tag), then answer a read.
// The backing port moves whole lines addressed by {ID, line address}.
// After reset every set is cleared (one per cycle) before init_done rises.
//
// Set associativity, LRU, multi-word lines, separate serially read
// metadata and data, one store per word (and per way), the optional
// parallel data read and the banked stores follow the reference design.
// The write-allocate/write-back policy, the blocking controller and set
// selection by low address bits are this design's choices.
module l2_cache #(
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned DATA_W   = 64,
  parameter int unsigned ID_W     = 2,
  parameter int unsigned SETS     = 8192,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned WORDS    = 4,
  parameter int unsigned NBANKS   = 4,
  parameter bit          PARALLEL = 1'b0,
  localparam int unsigned OFF_W   = $clog2(WORDS),
  localparam int unsigned LADDR_W = ID_W + ADDR_W - OFF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // word requests from the first-level caches
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic [ID_W-1:0]         req_id,
  input  logic                    req_write,
  input  logic [ADDR_W-1:0]       req_addr,
  input  logic [DATA_W-1:0]       req_wdata,
  output logic                    resp_valid,
  input  logic                    resp_ready,
  output logic [ID_W-1:0]         resp_id,
  output logic [DATA_W-1:0]       resp_data,
  // line port to the backing (central) cache
  output logic                    b_req_valid,
  input  logic                    b_req_ready,
  output logic                    b_req_write,
  output logic [LADDR_W-1:0]      b_req_laddr,
  output logic [WORDS*DATA_W-1:0] b_req_wline,
  input  logic                    b_resp_valid,
  output logic                    b_resp_ready,
  input  logic [WORDS*DATA_W-1:0] b_resp_line,
  // status
  output logic                    init_done,
  output logic                    ev_hit,
  output logic                    ev_miss,
  output logic                    ev_evict
);

  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = LADDR_W - SET_W;
  localparam int unsigned AGE_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WAY_W = AGE_W;
  localparam int unsigned NDS   = WAYS * WORDS;   // number of data stores

  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
    logic [AGE_W-1:0] age;
  } way_meta_t;

  typedef way_meta_t [WAYS-1:0] set_meta_t;

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_META_RD, S_META_WAIT, S_TAG, S_EVICT_RD, S_EVICT_WR,
    S_FILL_REQ, S_FILL_WAIT, S_DATA_WAIT, S_META_WR, S_RESP
  } state_e;

  state_e state;

  // ---------------------------------------------------------------- request
  logic              r_write;
  logic [ID_W-1:0]   r_id;
  logic [DATA_W-1:0] r_wdata;
  logic [OFF_W-1:0]  r_off;
  logic [SET_W-1:0]  r_set;
  logic [TAG_W-1:0]  r_tag;
  logic [WAY_W-1:0]  r_way;       // hit way or victim
  logic              r_rd_dbuf;   // answer comes from the data buffer
  set_meta_t         r_meta;
  logic [DATA_W-1:0] r_rdata;
  logic [SET_W-1:0]  init_set;

  logic [LADDR_W-1:0] req_laddr;
  assign req_laddr = LADDR_W'({req_id, req_addr} >> OFF_W);

  // ---------------------------------------------------------------- metadata store
  logic      ms_req_valid, ms_req_ready, ms_req_we, ms_resp_valid;
  logic [SET_W-1:0] ms_req_addr;
  set_meta_t ms_req_wdata, ms_resp_data;

  cache_store #(.DEPTH(SETS), .W($bits(set_meta_t)), .NBANKS(1)) u_meta (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_valid  (ms_req_valid),
    .req_ready  (ms_req_ready),
    .req_we     (ms_req_we),
    .req_addr   (ms_req_addr),
    .req_wdata  (ms_req_wdata),
    .resp_valid (ms_resp_valid),
    .resp_ready (1'b1),
    .resp_data  (ms_resp_data)
  );

  // ---------------------------------------------------------------- data stores
  // Store j = way * WORDS + word. issue[j] asks store j to take the pending
  // operation; pend[j] marks a read whose word has not come back yet.
  logic [NDS-1:0]    d_issue, d_pend, d_ready, d_rvalid;
  logic              d_we;
  logic [DATA_W-1:0] d_wdata [NDS];
  logic [DATA_W-1:0] d_rdata [NDS];
  logic [DATA_W-1:0] dbuf    [NDS];
  logic              d_busy;

  for (genvar j = 0; j < NDS; j++) begin : g_data
    cache_store #(.DEPTH(SETS), .W(DATA_W), .NBANKS(NBANKS)) u_data (
      .clk        (clk),
      .rst_n      (rst_n),
      .req_valid  (d_issue[j]),
      .req_ready  (d_ready[j]),
      .req_we     (d_we),
      .req_addr   (r_set),
      .req_wdata  (d_wdata[j]),
      .resp_valid (d_rvalid[j]),
      .resp_ready (1'b1),
      .resp_data  (d_rdata[j])
    );
  end

  assign d_busy = |d_issue || |d_pend;

  // ---------------------------------------------------------------- tag compare
  logic              hit;
  logic [WAY_W-1:0]  hit_way, victim;

  always_comb begin
    hit          = 1'b0;
    hit_way      = '0;
    victim       = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (r_meta[w].valid && r_meta[w].tag == r_tag && !hit) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (r_meta[w].valid && r_meta[w].age == AGE_W'(WAYS - 1)) victim = WAY_W'(w);
    end
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (!r_meta[w].valid) victim = WAY_W'(w);
    end
  end

  // LRU update: the touched way becomes age 0, younger ways age by one.
  function automatic set_meta_t lru_touch(input set_meta_t m, input logic [WAY_W-1:0] way);
    set_meta_t n;
    n = m;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (m[w].age < m[way].age) n[w].age = m[w].age + 1'b1;
    end
    n[way].age = '0;
    return n;
  endfunction

  function automatic set_meta_t init_meta();
    set_meta_t n;
    for (int w = 0; w < int'(WAYS); w++) begin
      n[w] = '{valid: 1'b0, dirty: 1'b0, tag: '0, age: AGE_W'(w)};
    end
    return n;
  endfunction

  // ---------------------------------------------------------------- outputs
  assign req_ready  = (state == S_IDLE);
  assign resp_valid = (state == S_RESP);
  assign resp_id    = r_id;
  assign resp_data  = r_rdata;

  always_comb begin
    ms_req_valid = 1'b0;
    ms_req_we    = 1'b0;
    ms_req_addr  = r_set;
    ms_req_wdata = r_meta;
    unique case (state)
      S_INIT: begin
        ms_req_valid = 1'b1;
        ms_req_we    = 1'b1;
        ms_req_addr  = init_set;
        ms_req_wdata = init_meta();
      end
      S_META_RD: ms_req_valid = 1'b1;
      S_META_WR: begin
        ms_req_valid = 1'b1;
        ms_req_we    = 1'b1;
      end
      default: ;
    endcase
  end

  logic [WORDS*DATA_W-1:0] evict_line;
  always_comb begin
    for (int k = 0; k < int'(WORDS); k++) begin
      evict_line[k*DATA_W +: DATA_W] = dbuf[int'(r_way) * int'(WORDS) + k];
    end
  end

  assign b_req_valid  = (state == S_EVICT_WR) || (state == S_FILL_REQ);
  assign b_req_write  = (state == S_EVICT_WR);
  assign b_req_laddr  = (state == S_EVICT_WR) ? {r_meta[r_way].tag, r_set} : {r_tag, r_set};
  assign b_req_wline  = evict_line;
  assign b_resp_ready = (state == S_FILL_WAIT);

  assign init_done = (state != S_INIT);
  assign ev_hit    = (state == S_TAG) && !d_busy && hit;
  assign ev_miss   = (state == S_TAG) && !d_busy && !hit;
  assign ev_evict  = (state == S_EVICT_WR) && b_req_ready;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_INIT;
      init_set  <= '0;
      r_write   <= 1'b0;
      r_id      <= '0;
      r_wdata   <= '0;
      r_off     <= '0;
      r_set     <= '0;
      r_tag     <= '0;
      r_way     <= '0;
      r_rd_dbuf <= 1'b0;
      r_meta    <= '0;
      r_rdata   <= '0;
      d_issue   <= '0;
      d_pend    <= '0;
      d_we      <= 1'b0;
      for (int j = 0; j < int'(NDS); j++) begin
        d_wdata[j] <= '0;
        dbuf[j]    <= '0;
      end
    end else begin
      // data-store bookkeeping, common to all states
      d_issue <= d_issue & ~d_ready;
      for (int j = 0; j < int'(NDS); j++) begin
        if (d_rvalid[j]) begin
          dbuf[j]   <= d_rdata[j];
          d_pend[j] <= 1'b0;
        end
      end

      unique case (state)
        S_INIT: if (ms_req_ready) begin
          init_set <= init_set + 1'b1;
          if (init_set == SET_W'(SETS - 1)) state <= S_IDLE;
        end

        S_IDLE: if (req_valid) begin
          r_write <= req_write;
          r_id    <= req_id;
          r_wdata <= req_wdata;
          r_off   <= req_addr[OFF_W-1:0];
          r_set   <= req_laddr[SET_W-1:0];
          r_tag   <= req_laddr[LADDR_W-1:SET_W];
          state   <= S_META_RD;
        end

        S_META_RD: if (ms_req_ready) begin
          if (PARALLEL && !r_write) begin
            // read the requested word of every way alongside the metadata
            d_we <= 1'b0;
            for (int w = 0; w < int'(WAYS); w++) begin
              d_issue[w * int'(WORDS) + int'(r_off)] <= 1'b1;
              d_pend [w * int'(WORDS) + int'(r_off)] <= 1'b1;
            end
          end
          state <= S_META_WAIT;
        end

        S_META_WAIT: if (ms_resp_valid) begin
          r_meta <= ms_resp_data;
          state  <= S_TAG;
        end

        S_TAG: if (!d_busy) begin
          if (hit) begin
            r_way  <= hit_way;
            r_meta <= lru_touch(r_meta, hit_way);
            if (r_write) begin
              r_meta[hit_way].dirty <= 1'b1;
              d_we <= 1'b1;
              d_wdata[int'(hit_way) * int'(WORDS) + int'(r_off)] <= r_wdata;
              d_issue[int'(hit_way) * int'(WORDS) + int'(r_off)] <= 1'b1;
              r_rd_dbuf <= 1'b0;
              state <= S_DATA_WAIT;
            end else if (PARALLEL) begin
              r_rdata   <= dbuf[int'(hit_way) * int'(WORDS) + int'(r_off)];
              r_rd_dbuf <= 1'b0;
              state     <= S_META_WR;
            end else begin
              d_we <= 1'b0;
              d_issue[int'(hit_way) * int'(WORDS) + int'(r_off)] <= 1'b1;
              d_pend [int'(hit_way) * int'(WORDS) + int'(r_off)] <= 1'b1;
              r_rd_dbuf <= 1'b1;
              state <= S_DATA_WAIT;
            end
          end else begin
            r_way <= victim;
            if (r_meta[victim].valid && r_meta[victim].dirty) begin
              d_we <= 1'b0;
              for (int k = 0; k < int'(WORDS); k++) begin
                d_issue[int'(victim) * int'(WORDS) + k] <= 1'b1;
                d_pend [int'(victim) * int'(WORDS) + k] <= 1'b1;
              end
              state <= S_EVICT_RD;
            end else begin
              state <= S_FILL_REQ;
            end
          end
        end

        S_EVICT_RD: if (!d_busy) state <= S_EVICT_WR;

        S_EVICT_WR: if (b_req_ready) state <= S_FILL_REQ;

        S_FILL_REQ: if (b_req_ready) state <= S_FILL_WAIT;

        S_FILL_WAIT: if (b_resp_valid) begin
          d_we <= 1'b1;
          for (int k = 0; k < int'(WORDS); k++) begin
            d_issue[int'(r_way) * int'(WORDS) + k] <= 1'b1;
            d_wdata[int'(r_way) * int'(WORDS) + k] <=
              (r_write && k == int'(r_off)) ? r_wdata : b_resp_line[k*DATA_W +: DATA_W];
          end
          r_rdata   <= b_resp_line[int'(r_off)*DATA_W +: DATA_W];
          r_rd_dbuf <= 1'b0;
          r_meta    <= lru_touch(r_meta, r_way);
          r_meta[r_way].valid <= 1'b1;
          r_meta[r_way].dirty <= r_write;
          r_meta[r_way].tag   <= r_tag;
          state <= S_DATA_WAIT;
        end

        S_DATA_WAIT: if (!d_busy) begin
          if (r_rd_dbuf) r_rdata <= dbuf[int'(r_way) * int'(WORDS) + int'(r_off)];
          state <= S_META_WR;
        end

        S_META_WR: if (ms_req_ready) state <= r_write ? S_IDLE : S_RESP;

        S_RESP: if (resp_ready) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
