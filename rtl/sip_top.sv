// sip_top: the SIP additions to one processor core.
//
// SIP ("Separating the Irregular Properties") speeds up graph analytics on
// a general-purpose core by keeping vertex property data, whose accesses
// are irregular and seldom reused, out of the D-cache and L2. This block
// holds everything SIP adds to a core:
//
//   sip_cfg_regs            registers loaded by the configuration instruction
//   sip_req_classifier      at the end of the load/store queue: property
//                           addresses go to the P-cache, the rest to the
//                           D-cache; edge loads are counted
//   sip_timeliness_counter  edges prefetched minus edges read; paces stage 3
//   sip_struct_prefetcher   walks active vertices, offsets and edges into the
//                           D-cache (three stages, FIFOs of 5)
//   sip_prop_prefetcher     turns vertex and neighbor IDs into property
//                           prefetches for the P-cache
//   sip_pcache              1 KB fully associative FIFO property cache
//                           between the core and the LLC
//
// The conventional parts (the core and its load/store queue, the D-cache,
// L2 and LLC) are outside: their connections are ports.
//   cfg_*      the decoded configuration instruction (index, value)
//   cpu_req_*  requests leaving the load/store queue
//   pc_resp_*  P-cache responses to the core (1 cycle after a hit)
//   dc_req_*   the non-property requests, passed on to the D-cache
//   sp_*       the structure prefetcher's read port into the D-cache
//   llc_*      the P-cache's port to the LLC
//   sp_busy    high while the structure prefetcher is walking a frontier
//
// Any configuration write restarts the walk from the start of the frontier
// and clears the timeliness counter: software writes the registers once at
// initialisation, and the active list bounds before each iteration.
// The block structure and connections follow the document; the restart
// rule and the port protocols are this design's choices.
module sip_top
  import sip_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 5,
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned CNT_W       = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  // configuration instruction
  input  logic    cfg_we,
  input  logic [3:0] cfg_idx,
  input  word_t   cfg_wdata,
  // load/store queue
  input  logic    cpu_req_valid,
  output logic    cpu_req_ready,
  input  logic    cpu_req_we,
  input  word_t   cpu_req_addr,
  input  word_t   cpu_req_wdata,
  output logic    pc_resp_valid,
  output word_t   pc_resp_rdata,
  // D-cache, processor side
  output logic    dc_req_valid,
  input  logic    dc_req_ready,
  output logic    dc_req_we,
  output word_t   dc_req_addr,
  output word_t   dc_req_wdata,
  // D-cache, structure prefetcher side
  output logic    sp_req_valid,
  input  logic    sp_req_ready,
  output word_t   sp_req_addr,
  output sp_tag_e sp_req_tag,
  input  logic    sp_resp_valid,
  input  word_t   sp_resp_data,
  input  sp_tag_e sp_resp_tag,
  output logic    sp_busy,
  // LLC, P-cache side
  output logic    llc_req_valid,
  input  logic    llc_req_ready,
  output logic    llc_req_we,
  output word_t   llc_req_addr,
  output word_t   llc_req_wdata,
  input  logic    llc_resp_valid,
  input  logic [LINE_BYTES*8-1:0] llc_resp_data
);

  sip_cfg_t cfg;
  logic     restart;

  logic  pc_req_valid, pc_req_ready, pc_req_we;
  word_t pc_req_addr, pc_req_wdata;
  logic  edge_read;

  logic  edge_inc, skip_valid, cnt_stall, cnt_behind;
  word_t skip_amount;
  logic signed [CNT_W-1:0] cnt_value;

  logic  vid_valid, vid_ready, nid_valid, nid_ready;
  word_t vid, nid;
  logic  pf_valid, pf_ready;
  word_t pf_addr;

  sip_cfg_regs u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_wdata, .cfg, .cfg_written(restart)
  );

  sip_req_classifier u_cls (
    .cfg,
    .cpu_valid(cpu_req_valid), .cpu_ready(cpu_req_ready), .cpu_we(cpu_req_we),
    .cpu_addr(cpu_req_addr), .cpu_wdata(cpu_req_wdata),
    .pc_valid(pc_req_valid), .pc_ready(pc_req_ready), .pc_we(pc_req_we),
    .pc_addr(pc_req_addr), .pc_wdata(pc_req_wdata),
    .dc_valid(dc_req_valid), .dc_ready(dc_req_ready), .dc_we(dc_req_we),
    .dc_addr(dc_req_addr), .dc_wdata(dc_req_wdata),
    .edge_read
  );

  sip_timeliness_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clear(restart),
    .inc(edge_inc), .dec(edge_read),
    .add_valid(skip_valid), .add_amount(skip_amount),
    .threshold(cfg.threshold),
    .count(cnt_value), .stall(cnt_stall), .behind(cnt_behind)
  );

  sip_struct_prefetcher #(.FIFO_DEPTH(FIFO_DEPTH)) u_sp (
    .clk, .rst_n, .cfg, .start(restart), .busy(sp_busy),
    .cnt_stall, .cnt_behind, .edge_inc, .skip_valid, .skip_amount,
    .mem_req_valid(sp_req_valid), .mem_req_ready(sp_req_ready),
    .mem_req_addr(sp_req_addr), .mem_req_tag(sp_req_tag),
    .mem_resp_valid(sp_resp_valid), .mem_resp_data(sp_resp_data),
    .mem_resp_tag(sp_resp_tag),
    .vid_valid, .vid_ready, .vid, .nid_valid, .nid_ready, .nid
  );

  sip_prop_prefetcher #(.FIFO_DEPTH(FIFO_DEPTH)) u_pp (
    .clk, .rst_n, .cfg, .flush(restart),
    .vid_valid, .vid_ready, .vid, .nid_valid, .nid_ready, .nid,
    .pf_valid, .pf_ready, .pf_addr
  );

  sip_pcache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_pc (
    .clk, .rst_n,
    .req_valid(pc_req_valid), .req_ready(pc_req_ready), .req_we(pc_req_we),
    .req_addr(pc_req_addr), .req_wdata(pc_req_wdata),
    .resp_valid(pc_resp_valid), .resp_rdata(pc_resp_rdata),
    .pf_valid, .pf_ready, .pf_addr,
    .llc_req_valid, .llc_req_ready, .llc_req_we, .llc_req_addr, .llc_req_wdata,
    .llc_resp_valid, .llc_resp_data
  );

endmodule
