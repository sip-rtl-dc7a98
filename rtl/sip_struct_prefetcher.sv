// sip_struct_prefetcher: the three-stage structure prefetcher of SIP.
//
// It walks the frontier of a graph in CSR form on its own, ahead of the
// processor, so that the structure data are in the D-cache when the
// processor asks for them:
//
//   stage 1  next active vertex. All-active: vertex IDs active1..active2
//            (inclusive), no memory access. Active list: reads the list from
//            address active1 up to active2 (exclusive), one entry of `size`
//            bytes per vertex.
//   stage 2  pops a vertex (register t_v), hands its ID to the property
//            prefetcher, then reads front = off_list[v] and
//            rear = off_list[v+1].
//   stage 3  pops front/rear (t_front, t_rear), then for t_offset from front
//            to rear reads nei_list[t_offset] (t_neighbor) and hands each
//            neighbor ID to the property prefetcher.
//
// Three FIFOs of FIFO_DEPTH entries (one for vertices, two for the front
// and rear offsets) join the stages. Stage 3 is paced by the timeliness
// counter: every edge request it sends pulses `edge_inc`; while `cnt_stall`
// is high it sends none; when `cnt_behind` is high (the processor has
// overtaken it) it drops the vertex it is working on and reports the number
// of neighbors it did not fetch on `skip_valid`/`skip_amount`, then goes on
// with the next vertex. Back-pressure through the full or empty FIFOs stalls
// the earlier stages.
//
// Memory port: all three stages share one read port into the D-cache
// (valid/ready request with a stage tag, a response carrying the same tag,
// any latency, responses may come in any order between tags). Each stage
// has at most one request outstanding; stage 3 has priority over stage 2,
// stage 2 over stage 1. A request that is outstanding when the walk is
// restarted is still waited for, and its data dropped.
//
// `start` (one cycle; any configuration write) flushes everything and walks
// the frontier from its beginning. `busy` is high from then until the last
// edge has been fetched or skipped.
//
// The stages, the registers t_v/t_front/t_rear/t_offset/t_neighbor, the FIFO
// depth of 5 and the counter rules follow the document. The shared port, its
// priority order, one request per stage, handing the active vertex's ID to
// the property prefetcher from stage 2 and the restart rule are this
// design's choices.
module sip_struct_prefetcher
  import sip_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  sip_cfg_t cfg,
  input  logic     start,
  output logic     busy,
  // timeliness counter
  input  logic     cnt_stall,
  input  logic     cnt_behind,
  output logic     edge_inc,
  output logic     skip_valid,
  output word_t    skip_amount,
  // memory port into the D-cache
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output word_t    mem_req_addr,
  output sp_tag_e  mem_req_tag,
  input  logic     mem_resp_valid,
  input  word_t    mem_resp_data,
  input  sp_tag_e  mem_resp_tag,
  // vertex IDs to the property prefetcher
  output logic     vid_valid,
  input  logic     vid_ready,
  output word_t    vid,
  // neighbor IDs to the property prefetcher
  output logic     nid_valid,
  input  logic     nid_ready,
  output word_t    nid
);

  // ------------------------------------------------------------------
  // memory port: one outstanding request per tag
  // ------------------------------------------------------------------
  logic [2:0] outstanding;
  logic       s1_req, s2_req, s3_req;
  word_t      s1_addr, s2_addr, s3_addr;
  logic       s1_gnt, s2_gnt, s3_gnt;

  always_comb begin
    s1_gnt = 1'b0;
    s2_gnt = 1'b0;
    s3_gnt = 1'b0;
    mem_req_valid = 1'b0;
    mem_req_addr  = '0;
    mem_req_tag   = TAG_VERTEX;
    if (s3_req) begin
      mem_req_valid = 1'b1;
      mem_req_addr  = s3_addr;
      mem_req_tag   = TAG_EDGE;
      s3_gnt        = mem_req_ready;
    end else if (s2_req) begin
      mem_req_valid = 1'b1;
      mem_req_addr  = s2_addr;
      mem_req_tag   = TAG_OFFSET;
      s2_gnt        = mem_req_ready;
    end else if (s1_req) begin
      mem_req_valid = 1'b1;
      mem_req_addr  = s1_addr;
      mem_req_tag   = TAG_VERTEX;
      s1_gnt        = mem_req_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else begin
      for (int t = 0; t < 3; t++) begin
        if ((s1_gnt && t == 0) || (s2_gnt && t == 1) || (s3_gnt && t == 2))
          outstanding[t] <= 1'b1;
        else if (mem_resp_valid && int'(mem_resp_tag) == t)
          outstanding[t] <= 1'b0;
      end
    end
  end

  wire resp_v = mem_resp_valid && mem_resp_tag == TAG_VERTEX;
  wire resp_o = mem_resp_valid && mem_resp_tag == TAG_OFFSET;
  wire resp_e = mem_resp_valid && mem_resp_tag == TAG_EDGE;

  // ------------------------------------------------------------------
  // FIFOs between the stages
  // ------------------------------------------------------------------
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic  vf_push_valid, vf_push_ready, vf_pop_valid, vf_pop_ready;
  word_t vf_push_data, vf_pop_data;
  logic  of_push, ff_push_ready, rf_push_ready, ff_pop_valid, rf_pop_valid, of_pop;
  word_t ff_pop_data, rf_pop_data;
  word_t t_front_in;
  logic [CW-1:0] vf_count, ff_count, rf_count;

  sip_fifo #(.WIDTH(XLEN), .DEPTH(FIFO_DEPTH)) u_vertex_fifo (
    .clk, .rst_n, .flush(start),
    .push_valid(vf_push_valid), .push_ready(vf_push_ready), .push_data(vf_push_data),
    .pop_valid(vf_pop_valid), .pop_ready(vf_pop_ready), .pop_data(vf_pop_data),
    .count(vf_count)
  );

  sip_fifo #(.WIDTH(XLEN), .DEPTH(FIFO_DEPTH)) u_front_fifo (
    .clk, .rst_n, .flush(start),
    .push_valid(of_push), .push_ready(ff_push_ready), .push_data(t_front_in),
    .pop_valid(ff_pop_valid), .pop_ready(of_pop), .pop_data(ff_pop_data),
    .count(ff_count)
  );

  sip_fifo #(.WIDTH(XLEN), .DEPTH(FIFO_DEPTH)) u_rear_fifo (
    .clk, .rst_n, .flush(start),
    .push_valid(of_push), .push_ready(rf_push_ready), .push_data(mem_resp_data),
    .pop_valid(rf_pop_valid), .pop_ready(of_pop), .pop_data(rf_pop_data),
    .count(rf_count)
  );

  // ------------------------------------------------------------------
  // stage 1: active vertices
  // ------------------------------------------------------------------
  logic  s1_run, s1_wait;
  word_t s1_cur;   // vertex ID (all-active) or list address (active list)

  wire s1_more = cfg.all_active ? (s1_cur <= cfg.active2) : (s1_cur < cfg.active2);

  assign s1_addr = s1_cur;
  // Ask for the next list entry only when its FIFO slot is sure to be free.
  assign s1_req  = s1_run && !cfg.all_active && s1_more && !s1_wait &&
                   !outstanding[0] && vf_push_ready;

  always_comb begin
    vf_push_valid = 1'b0;
    vf_push_data  = s1_cur;
    if (cfg.all_active) begin
      vf_push_valid = s1_run && s1_more;
    end else if (s1_wait && resp_v) begin
      vf_push_valid = 1'b1;
      vf_push_data  = mem_resp_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_run  <= 1'b0;
      s1_wait <= 1'b0;
      s1_cur  <= '0;
    end else if (start) begin
      s1_run  <= 1'b1;
      s1_wait <= 1'b0;
      s1_cur  <= cfg.active1;
    end else begin
      if (cfg.all_active) begin
        if (vf_push_valid && vf_push_ready) begin
          // stop after the maximal ID, also when it is the largest word
          if (s1_cur == cfg.active2) s1_run <= 1'b0;
          else                       s1_cur <= s1_cur + 1'b1;
        end else if (!s1_more) begin
          s1_run <= 1'b0;
        end
      end else begin
        if (s1_gnt) s1_wait <= 1'b1;
        if (s1_wait && resp_v) begin
          s1_wait <= 1'b0;
          s1_cur  <= s1_cur + cfg.size;
        end
        if (s1_run && !s1_more && !s1_wait) s1_run <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------------
  // stage 2: offsets
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {S2_IDLE, S2_REQ_F, S2_WAIT_F, S2_REQ_R, S2_WAIT_R} s2_state_e;
  s2_state_e s2_state;
  word_t     t_v, t_front_q;
  logic      vid_pending;
  word_t     off_addr;

  sip_addr_gen u_off_addr (
    .base(cfg.off_list),
    .index((s2_state == S2_REQ_R) ? t_v + 1'b1 : t_v),
    .size(cfg.size),
    .addr(off_addr)
  );

  assign s2_addr      = off_addr;
  assign s2_req       = ((s2_state == S2_REQ_F) || (s2_state == S2_REQ_R)) && !outstanding[1];
  // take a new vertex only when both offset FIFOs have room for its result
  assign vf_pop_ready = (s2_state == S2_IDLE) && !vid_pending && ff_push_ready && rf_push_ready;
  assign of_push      = (s2_state == S2_WAIT_R) && resp_o;
  assign t_front_in   = t_front_q;

  assign vid_valid = vid_pending;
  assign vid       = t_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_state    <= S2_IDLE;
      t_v         <= '0;
      t_front_q   <= '0;
      vid_pending <= 1'b0;
    end else if (start) begin
      s2_state    <= S2_IDLE;
      vid_pending <= 1'b0;
    end else begin
      if (vid_valid && vid_ready) vid_pending <= 1'b0;
      unique case (s2_state)
        S2_IDLE: if (vf_pop_valid && vf_pop_ready) begin
          t_v         <= vf_pop_data;
          vid_pending <= 1'b1;
          s2_state    <= S2_REQ_F;
        end
        S2_REQ_F:  if (s2_gnt) s2_state <= S2_WAIT_F;
        S2_WAIT_F: if (resp_o) begin
          t_front_q <= mem_resp_data;
          s2_state  <= S2_REQ_R;
        end
        S2_REQ_R:  if (s2_gnt) s2_state <= S2_WAIT_R;
        S2_WAIT_R: if (resp_o) s2_state <= S2_IDLE;
        default:   s2_state <= S2_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // stage 3: edges
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {S3_IDLE, S3_RUN, S3_WAIT} s3_state_e;
  s3_state_e s3_state;
  word_t     t_front, t_rear, t_offset, t_neighbor;
  logic      nid_pending;
  word_t     edge_addr;

  sip_addr_gen u_edge_addr (
    .base(cfg.nei_list), .index(t_offset), .size(cfg.size), .addr(edge_addr)
  );

  wire s3_done = (t_offset >= t_rear);

  assign of_pop      = (s3_state == S3_IDLE) && ff_pop_valid && rf_pop_valid;
  assign s3_addr     = edge_addr;
  assign s3_req      = (s3_state == S3_RUN) && !cnt_behind && !s3_done && !cnt_stall &&
                       !nid_pending && !outstanding[2];
  assign edge_inc    = s3_gnt;
  assign skip_valid  = (s3_state == S3_RUN) && cnt_behind && !s3_done;
  assign skip_amount = t_rear - t_offset;

  assign nid_valid = nid_pending;
  assign nid       = t_neighbor;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_state    <= S3_IDLE;
      t_front     <= '0;
      t_rear      <= '0;
      t_offset    <= '0;
      t_neighbor  <= '0;
      nid_pending <= 1'b0;
    end else if (start) begin
      s3_state    <= S3_IDLE;
      nid_pending <= 1'b0;
    end else begin
      if (nid_valid && nid_ready) nid_pending <= 1'b0;
      unique case (s3_state)
        S3_IDLE: if (of_pop) begin
          t_front  <= ff_pop_data;
          t_rear   <= rf_pop_data;
          t_offset <= ff_pop_data;
          s3_state <= S3_RUN;
        end
        S3_RUN: begin
          if (s3_done || cnt_behind) s3_state <= S3_IDLE;   // finished or dropped
          else if (s3_gnt)           s3_state <= S3_WAIT;
        end
        S3_WAIT: if (resp_e) begin
          t_neighbor  <= mem_resp_data;
          nid_pending <= 1'b1;
          t_offset    <= t_offset + 1'b1;
          s3_state    <= S3_RUN;
        end
        default: s3_state <= S3_IDLE;
      endcase
    end
  end

  assign busy = s1_run || s1_wait || vf_pop_valid || (s2_state != S2_IDLE) || vid_pending ||
                ff_pop_valid || (s3_state != S3_IDLE) || nid_pending || (|outstanding);

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({s1_gnt, s2_gnt, s3_gnt}));

endmodule
