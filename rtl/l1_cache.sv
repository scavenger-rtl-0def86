// l1_cache: direct-mapped first-level cache of one private memory.
//
// The client sees the private-memory interface: a request channel that
// carries either a read (address) or a write (address and word), and a
// response channel that returns the word of each read, in order. Every
// line holds one DATA_W-bit word. Addresses are word addresses; before the
// lookup they pass through a reversible CRC hash (crc_hash) so that
// power-of-two strides do not all fall into the same lines, and the hashed
// address is split into index and tag by cache_index, which supports
// M * 2^R lines (M = 1 for the usual power-of-two size). Each store entry is
// {valid, dirty, tag, word}; the store is a cache_store, monolithic
// (NBANKS = 1) or banked (NBANKS > 1).
//
// The controller handles one request at a time. A request is accepted
// together with the store read of its line. Read hit: the word is returned.
// Write (hit or miss): the line is overwritten and marked dirty; a miss
// needs no fill since a line is a single word. Read miss: the word is
// fetched over the memory port, written into the line and returned. A dirty
// victim is first written back over the memory port, its address rebuilt
// from the stored tag and the index base through the inverse hash.
// After reset the controller clears every line (one per cycle, init_done
// rises when done) before it accepts requests.
//
// Timing with no stalls: a read hit answers 2 cycles after acceptance
// with the monolithic store and 4 with the banked store; a write returns
// to idle after 3 (monolithic) or 5 (banked) cycles.
//
// Direct mapping, one word per line, CRC hashing and the indexing scheme
// follow the reference design; the write-back/write-allocate policy, the
// blocking controller and the port layout are this design's choices. The
// ev_* outputs pulse once per hit, miss and write-back for performance
// counting.
module l1_cache #(
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned DATA_W       = 64,
  parameter int unsigned M            = 1,
  parameter int unsigned R            = 18,
  parameter int unsigned NBANKS       = 4,
  parameter logic [ADDR_W-1:0] POLY   = ADDR_W'(scv_pkg::CRC32_POLY)
) (
  input  logic              clk,
  input  logic              rst_n,
  // client side
  input  logic              c_req_valid,
  output logic              c_req_ready,
  input  logic              c_req_write,
  input  logic [ADDR_W-1:0] c_req_addr,
  input  logic [DATA_W-1:0] c_req_wdata,
  output logic              c_resp_valid,
  input  logic              c_resp_ready,
  output logic [DATA_W-1:0] c_resp_data,
  // next-level memory side (word reads, word write-backs)
  output logic              m_req_valid,
  input  logic              m_req_ready,
  output logic              m_req_write,
  output logic [ADDR_W-1:0] m_req_addr,
  output logic [DATA_W-1:0] m_req_wdata,
  input  logic              m_resp_valid,
  output logic              m_resp_ready,
  input  logic [DATA_W-1:0] m_resp_data,
  // status
  output logic              init_done,
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_writeback
);

  localparam int unsigned LINES = M << R;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - R;

  typedef struct packed {
    logic              valid;
    logic              dirty;
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] data;
  } line_t;

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_WB, S_FILL_REQ, S_FILL_WAIT, S_UPDATE, S_RESP
  } state_e;

  state_e state;

  // request being served
  logic              r_write;
  logic [ADDR_W-1:0] r_addr;
  logic [DATA_W-1:0] r_wdata;
  logic [IDX_W-1:0]  r_idx;
  logic [TAG_W-1:0]  r_tag;
  line_t             r_new;     // line to write in S_UPDATE
  logic [DATA_W-1:0] r_rdata;   // word to return
  logic [ADDR_W-1:0] r_wb_addr;
  logic [DATA_W-1:0] r_wb_data;
  logic [IDX_W-1:0]  init_idx;

  // hashing and indexing of the incoming address
  logic [ADDR_W-1:0] c_haddr;
  logic [IDX_W-1:0]  c_idx;
  logic [TAG_W-1:0]  c_tag;

  crc_hash #(.W(ADDR_W), .POLY(POLY), .INVERSE(1'b0)) u_hash (
    .din (c_req_addr), .dout (c_haddr)
  );
  cache_index #(.ADDR_W(ADDR_W), .M(M), .R(R)) u_index (
    .haddr (c_haddr), .index (c_idx), .tag (c_tag)
  );

  // store
  logic              st_req_valid, st_req_ready, st_req_we;
  logic [IDX_W-1:0]  st_req_addr;
  line_t             st_req_wdata, st_resp_data;
  logic              st_resp_valid;

  cache_store #(.DEPTH(LINES), .W($bits(line_t)), .NBANKS(NBANKS)) u_store (
    .clk        (clk),
    .rst_n      (rst_n),
    .req_valid  (st_req_valid),
    .req_ready  (st_req_ready),
    .req_we     (st_req_we),
    .req_addr   (st_req_addr),
    .req_wdata  (st_req_wdata),
    .resp_valid (st_resp_valid),
    .resp_ready (1'b1),
    .resp_data  (st_resp_data)
  );

  // victim address recovery: hashed address = {stored tag, index base}
  logic [ADDR_W-1:0] v_haddr, v_addr;
  assign v_haddr = {st_resp_data.tag, r_idx[R-1:0]};

  crc_hash #(.W(ADDR_W), .POLY(POLY), .INVERSE(1'b1)) u_unhash (
    .din (v_haddr), .dout (v_addr)
  );

  logic c_fire, hit, victim_dirty;
  assign c_req_ready  = (state == S_IDLE) && st_req_ready;
  assign c_fire       = c_req_valid && c_req_ready;
  assign hit          = st_resp_data.valid && (st_resp_data.tag == r_tag);
  assign victim_dirty = st_resp_data.valid && st_resp_data.dirty && !hit;

  always_comb begin
    st_req_valid = 1'b0;
    st_req_we    = 1'b0;
    st_req_addr  = c_idx;
    st_req_wdata = r_new;
    unique case (state)
      S_INIT: begin
        st_req_valid = 1'b1;
        st_req_we    = 1'b1;
        st_req_addr  = init_idx;
        st_req_wdata = '0;
      end
      S_IDLE: begin
        st_req_valid = c_req_valid;
      end
      S_UPDATE: begin
        st_req_valid = 1'b1;
        st_req_we    = 1'b1;
        st_req_addr  = r_idx;
      end
      default: ;
    endcase
  end

  assign m_req_valid  = (state == S_WB) || (state == S_FILL_REQ);
  assign m_req_write  = (state == S_WB);
  assign m_req_addr   = (state == S_WB) ? r_wb_addr : r_addr;
  assign m_req_wdata  = r_wb_data;
  assign m_resp_ready = (state == S_FILL_WAIT);

  assign c_resp_valid = (state == S_RESP);
  assign c_resp_data  = r_rdata;
  assign init_done    = (state != S_INIT);

  assign ev_hit       = (state == S_LOOKUP) && st_resp_valid && hit;
  assign ev_miss      = (state == S_LOOKUP) && st_resp_valid && !hit;
  assign ev_writeback = (state == S_WB) && m_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_INIT;
      init_idx  <= '0;
      r_write   <= 1'b0;
      r_addr    <= '0;
      r_wdata   <= '0;
      r_idx     <= '0;
      r_tag     <= '0;
      r_new     <= '0;
      r_rdata   <= '0;
      r_wb_addr <= '0;
      r_wb_data <= '0;
    end else begin
      unique case (state)
        S_INIT: if (st_req_ready) begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == IDX_W'(LINES - 1)) state <= S_IDLE;
        end
        S_IDLE: if (c_fire) begin
          r_write <= c_req_write;
          r_addr  <= c_req_addr;
          r_wdata <= c_req_wdata;
          r_idx   <= c_idx;
          r_tag   <= c_tag;
          state   <= S_LOOKUP;
        end
        S_LOOKUP: if (st_resp_valid) begin
          r_wb_addr <= v_addr;
          r_wb_data <= st_resp_data.data;
          r_new     <= '{valid: 1'b1, dirty: 1'b1, tag: r_tag, data: r_wdata};
          r_rdata   <= st_resp_data.data;
          if (hit)               state <= r_write ? S_UPDATE : S_RESP;
          else if (victim_dirty) state <= S_WB;
          else                   state <= r_write ? S_UPDATE : S_FILL_REQ;
        end
        S_WB: if (m_req_ready) state <= r_write ? S_UPDATE : S_FILL_REQ;
        S_FILL_REQ: if (m_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (m_resp_valid) begin
          r_new   <= '{valid: 1'b1, dirty: 1'b0, tag: r_tag, data: m_resp_data};
          r_rdata <= m_resp_data;
          state   <= S_UPDATE;
        end
        S_UPDATE: if (st_req_ready) state <= r_write ? S_IDLE : S_RESP;
        S_RESP: if (c_resp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The client must hold a request stable until it is accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    c_req_valid && !c_req_ready |=> c_req_valid && $stable(c_req_addr) && $stable(c_req_write));

endmodule
