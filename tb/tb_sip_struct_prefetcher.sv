// tb_sip_struct_prefetcher: runs the structure prefetcher over CSR graphs
// held in a memory model with random latency, while a simple processor
// model reads edges at a chosen rate and a counter model provides the
// stall / behind inputs.
//
// Phases: (1) the example graph of 7 vertices with an active list
// {0, 1, 3} and a slow processor, so the threshold stall occurs;
// (2) a random 48-vertex graph, all-active, with a fast processor and a
// slow memory, so the prefetcher falls behind and drops vertices;
// (3) the random graph with an active list and a middling processor.
// Checks: vertex IDs leave in frontier order; every edge request is the
// next unfetched offset of the current vertex; every dropped vertex reports
// exactly its unfetched neighbors; neighbor IDs match the memory; no edge
// request is sent while the count is at the threshold; fetched + dropped edges equal the edges of
// the frontier; the walk ends (busy low). Each phase begins with `start`
// while the previous walk may still have requests in flight.
module tb_sip_struct_prefetcher;
  import sip_pkg::*;

  localparam word_t OFF_BASE = 32'h0000_1000;
  localparam word_t NEI_BASE = 32'h0000_2000;
  localparam word_t ACT_BASE = 32'h0000_3000;
  localparam int    MAXV = 64, MAXE = 512;

  logic clk = 0, rst_n = 0;
  sip_cfg_t cfg;
  logic start = 0, busy;
  logic cnt_stall, cnt_behind, edge_inc, skip_valid;
  word_t skip_amount;
  logic mem_req_valid, mem_req_ready = 0;
  word_t mem_req_addr;
  sp_tag_e mem_req_tag;
  logic mem_resp_valid = 0;
  word_t mem_resp_data = 0;
  sp_tag_e mem_resp_tag = TAG_VERTEX;
  logic vid_valid, vid_ready = 0, nid_valid, nid_ready = 0;
  word_t vid, nid;

  sip_struct_prefetcher dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_skip = 0, n_allactive = 0, n_list = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- graph ----------------
  int nv, ne;
  word_t offs [MAXV+1];
  word_t neis [MAXE];
  word_t front [$];   // the frontier in order
  int    act_len;

  function automatic word_t mem_read(word_t a);
    if (a >= OFF_BASE && a < NEI_BASE) return offs[(a - OFF_BASE) / 4];
    if (a >= NEI_BASE && a < ACT_BASE) return neis[(a - NEI_BASE) / 4];
    if (a >= ACT_BASE && a < ACT_BASE + 32'h1000) return front[(a - ACT_BASE) / 4];
    return 32'hdead_beef;
  endfunction

  // ---------------- memory model ----------------
  int lat_min = 1, lat_max = 4;
  typedef struct { longint due; word_t addr; sp_tag_e tag; } pend_t;
  pend_t pend [$];
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (mem_req_valid && mem_req_ready)
      pend.push_back('{cyc + longint'($urandom_range(lat_min, lat_max)), mem_req_addr, mem_req_tag});
  end

  always @(negedge clk) begin
    mem_resp_valid = 0;
    mem_req_ready  = $urandom_range(0, 3) != 0;
    for (int i = 0; i < pend.size(); i++) begin
      if (pend[i].due <= cyc) begin
        mem_resp_valid = 1;
        mem_resp_data  = mem_read(pend[i].addr);
        mem_resp_tag   = pend[i].tag;
        pend.delete(i);
        break;
      end
    end
    vid_ready = $urandom_range(0, 3) != 0;
    nid_ready = $urandom_range(0, 3) != 0;
  end

  // ---------------- counter and processor model ----------------
  int count = 0, cpu_reads = 0, total_edges = 0, cpu_rate = 10;
  int fetched = 0, dropped = 0;
  assign cnt_stall  = count >= int'(cfg.threshold);
  assign cnt_behind = count < 0;

  // ---------------- reference walk ----------------
  int k, e;          // current frontier position and next offset
  word_t exp_vid [$];
  word_t exp_nid [$];
  logic running = 0;

  function automatic int fr(int idx); return int'(offs[front[idx]]); endfunction
  function automatic int rr(int idx); return int'(offs[front[idx] + 1]); endfunction

  int delta;
  always @(posedge clk) begin
    if (running) begin
      if (cnt_stall) n_stall++;
      if (edge_inc) check(count < int'(cfg.threshold), "no edge request at the threshold");
      if (edge_inc) begin
        int o;
        o = int'((mem_req_addr - NEI_BASE) / 4);
        while (k < front.size() && e >= rr(k)) begin k++; if (k < front.size()) e = fr(k); end
        check(k < front.size() && o == e && mem_req_tag == TAG_EDGE, $sformatf("edge request offset %0d expected %0d", o, e));
        exp_nid.push_back(neis[o]);
        e++;
        fetched++;
      end
      if (skip_valid) begin
        while (k < front.size() && e >= rr(k)) begin k++; if (k < front.size()) e = fr(k); end
        check(k < front.size() && int'(skip_amount) == rr(k) - e, "dropped neighbor count");
        dropped += int'(skip_amount);
        n_skip++;
        k++;
        if (k < front.size()) e = fr(k);
      end
      if (vid_valid && vid_ready) begin
        check(exp_vid.size() > 0 && vid == exp_vid[0], "active vertex order");
        if (exp_vid.size() > 0) void'(exp_vid.pop_front());
      end
      if (nid_valid && nid_ready) begin
        check(exp_nid.size() > 0 && nid == exp_nid[0], "neighbor ID");
        if (exp_nid.size() > 0) void'(exp_nid.pop_front());
      end
      delta = int'(edge_inc) + (skip_valid ? int'(skip_amount) : 0);
      if (cpu_reads < total_edges && $urandom_range(0, 99) < cpu_rate) begin
        cpu_reads++;
        delta = delta - 1;
      end
      count <= count + delta;
    end
  end

  // ---------------- phases ----------------
  task automatic run_phase(input logic all_act, input int rate, input int lmin, input int lmax, input int thr);
    @(negedge clk);
    cfg.all_active = all_act;
    cfg.threshold  = thr;
    if (all_act) begin
      cfg.active1 = 0;
      cfg.active2 = nv - 1;
      front.delete();
      for (int v = 0; v < nv; v++) front.push_back(v);
      n_allactive++;
    end else begin
      cfg.active1 = ACT_BASE;
      cfg.active2 = ACT_BASE + 4 * act_len;
      n_list++;
    end
    total_edges = 0;
    foreach (front[i]) total_edges += rr(i) - fr(i);
    exp_vid = front;
    exp_nid.delete();
    k = 0; e = fr(0);
    count = 0; cpu_reads = 0; fetched = 0; dropped = 0;
    cpu_rate = rate; lat_min = lmin; lat_max = lmax;
    start = 1;
    @(negedge clk);
    start = 0;
    running = 1;
    while (busy || cpu_reads < total_edges) @(negedge clk);
    repeat (5) @(negedge clk);
    running = 0;
    check(!busy, "walk finished");
    check(exp_vid.size() == 0, "every active vertex handed on");
    check(exp_nid.size() == 0, "every fetched neighbor handed on");
    check(fetched + dropped == total_edges, $sformatf("fetched %0d + dropped %0d = %0d edges", fetched, dropped, total_edges));
    $display("phase: all_active=%0d vertices=%0d edges=%0d fetched=%0d dropped=%0d", all_act, front.size(), total_edges, fetched, dropped);
  endtask

  initial begin
    cfg = '0;
    cfg.size     = 4;
    cfg.off_list = OFF_BASE;
    cfg.nei_list = NEI_BASE;
    // the 7-vertex example graph: edges 0->1,2,3; 1->3,4; 3->5,6
    nv = 7;
    offs[0] = 0; offs[1] = 3; offs[2] = 5; offs[3] = 5; offs[4] = 7;
    offs[5] = 7; offs[6] = 7; offs[7] = 7;
    neis[0] = 1; neis[1] = 2; neis[2] = 3; neis[3] = 3; neis[4] = 4; neis[5] = 5; neis[6] = 6;
    front = '{0, 1, 3};
    act_len = 3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_phase(0, 5, 1, 3, 4);

    // random graph
    nv = 48;
    ne = 0;
    for (int v = 0; v < nv; v++) begin
      int d;
      d = $urandom_range(0, 9);
      offs[v] = ne;
      for (int j = 0; j < d; j++) begin neis[ne] = $urandom_range(0, nv - 1); ne++; end
    end
    offs[nv] = ne;
    run_phase(1, 50, 8, 20, 4);
    front.delete();
    for (int v = 0; v < nv; v += 3) front.push_back(v);
    act_len = front.size();
    run_phase(0, 10, 1, 6, 3);
    check(n_stall > 0, "threshold stall occurred");
    check(n_skip > 0, "late prefetch dropped a vertex");
    check(n_allactive > 0 && n_list > 0, "both frontier modes ran");
    $display("stall cycles=%0d drops=%0d", n_stall, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
