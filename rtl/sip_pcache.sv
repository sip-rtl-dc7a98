// sip_pcache: the property cache (P-cache) of SIP.
//
// A small, fully associative cache that holds only vertex property data and
// sits between the processor and the last-level cache (LLC), bypassing the
// D-cache and the L2. It is filled by the processor's own misses and by the
// property prefetcher. Because properties arrive in the order they will be
// used and are rarely reused soon, victims are chosen first-in first-out: a
// single pointer walks round the lines.
//
// Organisation: CACHE_BYTES / LINE_BYTES lines (default 1 KB of 64-byte
// lines: 16 lines), each with a valid bit and a tag that is the full line
// address. The processor accesses aligned 32-bit words.
//
// Processor port (valid/ready request, response one cycle after the
// request is accepted):
//   load hit  : accepted at once; resp_valid with the word in the next cycle
//               (the 1-cycle hit latency).
//   load miss : held (ready low) while the line is fetched from the LLC and
//               installed; the request then hits. Load hits are also served
//               while a fill (for a miss or a prefetch) is outstanding; a
//               miss or a store waits until the fill has finished.
//   store     : written through to the LLC at once (accepted when the LLC
//               takes the write); a hit also updates the cached word, a miss
//               does not allocate. resp_valid acknowledges it.
// Prefetch port: an address is always accepted when the cache is idle and no
// processor request is waiting. If its line is present it is dropped,
// otherwise the line is fetched and installed.
// LLC port: one request channel (valid/ready, write enable, address, word
// data), one line-wide read response channel. One line fill at a time.
//
// Size, full associativity, FIFO replacement and the 1-cycle hit follow the
// document. Line size, write-through without write-allocate, processor
// priority over prefetches, one fill at a time with hits served under it,
// are this design's choices.
module sip_pcache
  import sip_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned LINE_BYTES  = 64,
  localparam int unsigned LINES      = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8,
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W      = XLEN - OFF_W,
  localparam int unsigned WORDS      = LINE_BYTES / 4,
  localparam int unsigned IDX_W      = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // processor
  input  logic  req_valid,
  output logic  req_ready,
  input  logic  req_we,
  input  word_t req_addr,
  input  word_t req_wdata,
  output logic  resp_valid,
  output word_t resp_rdata,
  // property prefetcher
  input  logic  pf_valid,
  output logic  pf_ready,
  input  word_t pf_addr,
  // LLC
  output logic  llc_req_valid,
  input  logic  llc_req_ready,
  output logic  llc_req_we,
  output word_t llc_req_addr,
  output word_t llc_req_wdata,
  input  logic  llc_resp_valid,
  input  logic [LINE_BITS-1:0] llc_resp_data
);

  typedef enum logic [1:0] {PC_IDLE, PC_FILL_REQ, PC_FILL_WAIT} pc_state_e;
  pc_state_e state;

  logic [TAG_W-1:0]     tags  [LINES];
  logic [LINES-1:0]     valid;
  logic [LINE_BITS-1:0] data  [LINES];
  logic [IDX_W-1:0]     fifo_ptr;
  logic [TAG_W-1:0]     fill_tag;

  // ---------------- lookup ----------------
  function automatic logic lookup(input logic [TAG_W-1:0] t,
                                  input logic [LINES-1:0] v,
                                  input logic [TAG_W-1:0] tg [LINES],
                                  output logic [IDX_W-1:0] way);
    logic h;
    h   = 1'b0;
    way = '0;
    for (int i = 0; i < LINES; i++) begin
      if (v[i] && tg[i] == t) begin
        h   = 1'b1;
        way = IDX_W'(i);
      end
    end
    return h;
  endfunction

  logic [TAG_W-1:0] req_tag, pf_tag;
  logic [IDX_W-1:0] req_way, pf_way;
  logic             req_hit, pf_hit;
  logic [$clog2(WORDS)-1:0] req_word;

  assign req_tag  = req_addr[XLEN-1:OFF_W];
  assign pf_tag   = pf_addr[XLEN-1:OFF_W];
  assign req_word = req_addr[OFF_W-1:2];

  always_comb begin
    req_hit = lookup(req_tag, valid, tags, req_way);
    pf_hit  = lookup(pf_tag, valid, tags, pf_way);
  end

  // ---------------- control ----------------
  wire idle      = (state == PC_IDLE);
  wire ld_hit    = req_valid && !req_we && req_hit;   // also during a fill
  wire ld_miss   = idle && req_valid && !req_we && !req_hit;
  wire st_go     = idle && req_valid && req_we;

  assign req_ready = ld_hit || (st_go && llc_req_ready);
  assign pf_ready  = idle && !req_valid;
  wire   pf_miss   = pf_valid && pf_ready && !pf_hit;

  always_comb begin
    llc_req_valid = 1'b0;
    llc_req_we    = 1'b0;
    llc_req_addr  = req_addr;
    llc_req_wdata = req_wdata;
    if (st_go) begin
      llc_req_valid = 1'b1;
      llc_req_we    = 1'b1;
    end else if (state == PC_FILL_REQ) begin
      llc_req_valid = 1'b1;
      llc_req_addr  = {fill_tag, {OFF_W{1'b0}}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= PC_IDLE;
      valid      <= '0;
      fifo_ptr   <= '0;
      fill_tag   <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
    end else begin
      resp_valid <= req_valid && req_ready;
      if (ld_hit) resp_rdata <= data[req_way][req_word*32 +: 32];
      unique case (state)
        PC_IDLE: begin
          if (ld_miss) begin
            fill_tag <= req_tag;
            state    <= PC_FILL_REQ;
          end else if (pf_miss) begin
            fill_tag <= pf_tag;
            state    <= PC_FILL_REQ;
          end
        end
        PC_FILL_REQ:  if (llc_req_ready) state <= PC_FILL_WAIT;
        PC_FILL_WAIT: if (llc_resp_valid) begin
          valid[fifo_ptr] <= 1'b1;
          fifo_ptr        <= (fifo_ptr == IDX_W'(LINES - 1)) ? '0 : fifo_ptr + 1'b1;
          state           <= PC_IDLE;
        end
        default: state <= PC_IDLE;
      endcase
    end
  end

  // tag and data arrays (no reset needed: guarded by `valid`)
  always_ff @(posedge clk) begin
    if (state == PC_FILL_WAIT && llc_resp_valid) begin
      tags[fifo_ptr] <= fill_tag;
      data[fifo_ptr] <= llc_resp_data;
    end else if (st_go && llc_req_ready && req_hit) begin
      data[req_way][req_word*32 +: 32] <= req_wdata;
    end
  end

  a_hit_latency: assert property (@(posedge clk) disable iff (!rst_n)
    ld_hit |=> resp_valid);

endmodule
