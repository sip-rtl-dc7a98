// tb_sip_workloads: runs the three kernels SIP is meant for (BFS, SSSP
// and one PageRank iteration) on a synthetic Graph500-style R-MAT graph,
// through the SIP block at its default sizes, each once with the
// prefetchers walking the frontier and once with an empty frontier
// configured (prefetching off, the P-cache still separating properties).
//
// Graph: 2^SCALE vertices, EDGE_FACTOR * 2^SCALE edges drawn with R-MAT
// probabilities a=0.57, b=0.19, c=0.19 (the Graph500 generator), stored in
// CSR; SSSP weights 1..15 in a separate array. Latencies of the models:
// structure reads 8 cycles (an L2 hit), P-cache line fills LLC_LAT = 32
// cycles, processor D-cache accesses 4 cycles.
//
// Checks: BFS levels, SSSP distances and PageRank values (fixed point)
// against software references, in both runs; every property value the
// P-cache returns; the timeliness counter is zero after every prefetched
// iteration; and, per kernel, prefetching leaves fewer P-cache demand
// misses than the run without it. Hit rates and cycle counts are printed.
module tb_sip_workloads;
  import sip_pkg::*;

  localparam word_t OFF_BASE  = 32'h0001_0000;
  localparam word_t NEI_BASE  = 32'h0002_0000;
  localparam word_t ACT_A     = 32'h0004_0000;
  localparam word_t ACT_B     = 32'h0004_4000;
  localparam word_t PROP_BASE = 32'h0005_0000;
  localparam word_t RES_BASE  = 32'h0006_0000;
  localparam word_t WGT_BASE  = 32'h0008_0000;
  localparam word_t INF       = 32'hffff_ffff;
  localparam int    THRESHOLD = 8;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [3:0] cfg_idx = 0;
  word_t cfg_wdata = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_we = 0;
  word_t cpu_req_addr = 0, cpu_req_wdata = 0;
  logic pc_resp_valid;
  word_t pc_resp_rdata;
  logic dc_req_valid, dc_req_ready = 0, dc_req_we;
  word_t dc_req_addr, dc_req_wdata;
  logic sp_req_valid, sp_req_ready = 0;
  word_t sp_req_addr;
  sp_tag_e sp_req_tag;
  logic sp_resp_valid = 0;
  word_t sp_resp_data = 0;
  sp_tag_e sp_resp_tag = TAG_VERTEX;
  logic sp_busy;
  logic llc_req_valid, llc_req_ready = 0, llc_req_we;
  word_t llc_req_addr, llc_req_wdata;
  logic llc_resp_valid = 0;
  logic [511:0] llc_resp_data = '0;

  sip_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory image ----------------
  word_t mem [word_t];
  function automatic word_t rd(word_t a);
    word_t wa = {a[31:2], 2'b00};
    return mem.exists(wa) ? mem[wa] : 32'h0;
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- D-cache model, processor side ----------------
  always @(negedge clk) dc_req_ready = $urandom_range(0, 3) != 0;
  always @(posedge clk) begin
    if (dc_req_valid && dc_req_ready) begin
      check(!(dc_req_addr >= PROP_BASE && dc_req_addr < PROP_BASE + 32'h1_0000), "property request sent to the D-cache");
      if (dc_req_we) mem[{dc_req_addr[31:2], 2'b00}] = dc_req_wdata;
    end
  end

  // ---------------- D-cache model, prefetcher side ----------------
  int sp_lat_min = 8, sp_lat_max = 8;
  typedef struct { longint due; word_t addr; sp_tag_e tag; } pend_t;
  pend_t pend [$];
  always @(posedge clk) begin
    if (sp_req_valid && sp_req_ready)
      pend.push_back('{cyc + longint'($urandom_range(sp_lat_min, sp_lat_max)), sp_req_addr, sp_req_tag});
  end
  always @(negedge clk) begin
    sp_req_ready  = $urandom_range(0, 3) != 0;
    sp_resp_valid = 0;
    for (int i = 0; i < pend.size(); i++) begin
      if (pend[i].due <= cyc) begin
        sp_resp_valid = 1;
        sp_resp_data  = rd(pend[i].addr);
        sp_resp_tag   = pend[i].tag;
        pend.delete(i);
        break;
      end
    end
  end

  // ---------------- LLC model ----------------
  longint fill_due = -1;
  word_t fill_line;
  int n_wt = 0;
  always @(posedge clk) begin
    if (llc_req_valid && llc_req_ready) begin
      check(llc_req_addr >= PROP_BASE && llc_req_addr < PROP_BASE + 32'h1_0000, "only property data at the LLC port");
      if (llc_req_we) begin
        mem[{llc_req_addr[31:2], 2'b00}] = llc_req_wdata;
        n_wt++;
      end else begin
        fill_line = llc_req_addr;
        fill_due  = cyc + longint'(LLC_LAT);
      end
    end
  end
  always @(negedge clk) begin
    llc_req_ready  = $urandom_range(0, 3) != 0;
    llc_resp_valid = 0;
    if (fill_due >= 0 && cyc >= fill_due) begin
      llc_resp_valid = 1;
      for (int w = 0; w < 16; w++) llc_resp_data[w*32 +: 32] = rd(fill_line + 32'(4 * w));
      fill_due = -1;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_drop = 0, n_hit = 0, n_miss = 0, n_pf_fill = 0, n_pf_drop = 0;
  int n_evict = 0, n_edge_read = 0, n_restart = 0, n_allactive = 0, n_list = 0;
  always @(posedge clk) begin
    if (dut.u_cnt.stall && dut.u_sp.s3_state == dut.u_sp.S3_RUN && !dut.u_sp.s3_done) n_stall++;
    if (dut.u_sp.skip_valid) n_drop++;
    if (dut.u_pc.ld_hit) n_hit++;
    if (dut.u_pc.ld_miss) n_miss++;
    if (dut.u_pc.pf_miss) n_pf_fill++;
    if (dut.u_pc.pf_valid && dut.u_pc.pf_ready && dut.u_pc.pf_hit) n_pf_drop++;
    if (dut.u_pc.state == dut.u_pc.PC_FILL_WAIT && llc_resp_valid && dut.u_pc.valid[dut.u_pc.fifo_ptr]) n_evict++;
    if (dut.u_cls.edge_read) n_edge_read++;
    if (dut.restart) n_restart++;
  end

  // ---------------- processor model ----------------
  int cpu_gap = 0;

  task automatic cfg_write(input cfg_idx_e idx, input word_t v);
    @(negedge clk);
    cfg_we = 1; cfg_idx = idx; cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic logic is_prop(word_t a);
    return a >= PROP_BASE && a < PROP_BASE + 32'h1_0000;
  endfunction

  task automatic access(input logic we, input word_t a, input word_t wd, output word_t data);
    repeat (cpu_gap) @(negedge clk);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_we = we; cpu_req_addr = a; cpu_req_wdata = wd;
    data = rd(a);
    @(posedge clk);
    while (!cpu_req_ready) @(posedge clk);
    #1;
    cpu_req_valid = 0;
    if (is_prop(a)) begin
      check(pc_resp_valid, "P-cache answers one cycle after acceptance");
      if (!we) data = pc_resp_rdata;
    end
  endtask

  task automatic load(input word_t a, output word_t d); access(0, a, 0, d); endtask
  task automatic store(input word_t a, input word_t v);
    word_t dummy;
    access(1, a, v, dummy);
  endtask


  localparam int SCALE = 9, EDGE_FACTOR = 8, LLC_LAT = 32, DC_LAT = 4;

  // ---------------- graph ----------------
  int nv, ne;
  word_t offs [];
  word_t neis [];
  word_t wgts [];
  word_t ref_prop [];
  logic  prefetch_on;

  task automatic build_rmat();
    int src [$], dst [$];
    int cnt [];
    nv = 1 << SCALE;
    for (int i = 0; i < EDGE_FACTOR * nv; i++) begin
      int s, d;
      s = 0; d = 0;
      for (int b = 0; b < SCALE; b++) begin
        int r;
        r = $urandom_range(0, 99);
        if (r < 57) ;
        else if (r < 76) d |= 1 << b;
        else if (r < 95) s |= 1 << b;
        else begin s |= 1 << b; d |= 1 << b; end
      end
      src.push_back(s); dst.push_back(d);
    end
    ne = src.size();
    cnt = new[nv];
    foreach (cnt[i]) cnt[i] = 0;
    foreach (src[i]) cnt[src[i]]++;
    offs = new[nv + 1];
    offs[0] = 0;
    for (int v = 0; v < nv; v++) offs[v + 1] = offs[v] + cnt[v];
    neis = new[ne];
    wgts = new[ne];
    foreach (cnt[i]) cnt[i] = int'(offs[i]);
    foreach (src[i]) begin
      neis[cnt[src[i]]] = dst[i];
      wgts[cnt[src[i]]] = $urandom_range(1, 15);
      cnt[src[i]]++;
    end
    mem.delete();
    for (int v = 0; v <= nv; v++) mem[OFF_BASE + 32'(4 * v)] = offs[v];
    for (int i = 0; i < ne; i++) begin
      mem[NEI_BASE + 32'(4 * i)] = neis[i];
      mem[WGT_BASE + 32'(4 * i)] = wgts[i];
    end
  endtask

  task automatic dload(input word_t a, output word_t d);
    load(a, d);
    repeat (DC_LAT - 1) @(negedge clk);
  endtask

  task automatic common_cfg();
    cfg_write(CFG_SIZE, 4);
    cfg_write(CFG_OFF_LIST, OFF_BASE);
    cfg_write(CFG_NEI_LIST, NEI_BASE);
    cfg_write(CFG_PROP_LIST, PROP_BASE);
    cfg_write(CFG_NEI1, NEI_BASE);
    cfg_write(CFG_NEI2, NEI_BASE + 32'(4 * ne));
    cfg_write(CFG_PROP1, PROP_BASE);
    cfg_write(CFG_PROP2, PROP_BASE + 32'(4 * nv));
    cfg_write(CFG_THRESHOLD, THRESHOLD);
  endtask

  // frontier registers; an empty range turns the walk off
  task automatic set_frontier(input word_t a1, input word_t a2);
    if (prefetch_on) begin
      cfg_write(CFG_ACTIVE1, a1);
      cfg_write(CFG_ACTIVE2, a2);
    end else begin
      cfg_write(CFG_ACTIVE1, 1);
      cfg_write(CFG_ACTIVE2, 0);
    end
  endtask

  task automatic end_of_iteration();
    int waited = 0;
    while (dut.sp_busy && waited < 50000) begin @(negedge clk); waited++; end
    repeat (3) @(negedge clk);
    check(!dut.sp_busy, "prefetcher finished the frontier");
    if (prefetch_on)
      check(dut.u_cnt.count == 0, $sformatf("edges fetched + dropped = edges read (count %0d)", dut.u_cnt.count));
  endtask

  // Frontier-driven kernel shared by BFS (weights ignored, unit steps) and
  // SSSP (Bellman-Ford over active lists): prop = level / distance.
  task automatic frontier_kernel(input logic weighted, output int iters);
    word_t cur_list = ACT_A, nxt_list = ACT_B, tmp;
    int cur_len = 1, nxt_len;
    logic in_next [];
    word_t refd [];
    logic changed;
    // reference: iterate to a fixed point
    refd = new[nv];
    foreach (refd[i]) refd[i] = INF;
    refd[0] = 0;
    changed = 1;
    while (changed) begin
      changed = 0;
      for (int v = 0; v < nv; v++) if (refd[v] != INF)
        for (int i = int'(offs[v]); i < int'(offs[v + 1]); i++) begin
          word_t nd;
          nd = refd[v] + (weighted ? wgts[i] : 1);
          if (nd < refd[neis[i]]) begin refd[neis[i]] = nd; changed = 1; end
        end
    end
    common_cfg();
    cfg_write(CFG_ACTIVE, 0);
    ref_prop = new[nv];
    for (int v = 0; v < nv; v++) begin
      ref_prop[v] = (v == 0) ? 0 : INF;
      store(PROP_BASE + 32'(4 * v), ref_prop[v]);
    end
    in_next = new[nv];
    mem[cur_list] = 0;
    iters = 0;
    while (cur_len > 0) begin
      foreach (in_next[i]) in_next[i] = 0;
      set_frontier(cur_list, cur_list + 32'(4 * cur_len));
      nxt_len = 0;
      for (int k = 0; k < cur_len; k++) begin
        word_t v, f, r, pv;
        dload(cur_list + 32'(4 * k), v);
        dload(OFF_BASE + 4 * v, f);
        dload(OFF_BASE + 4 * v + 4, r);
        load(PROP_BASE + 4 * v, pv);
        check(pv == ref_prop[v], "active vertex property");
        for (word_t o = f; o < r; o++) begin
          word_t u, pu, w, nd;
          dload(NEI_BASE + 4 * o, u);
          w = 1;
          if (weighted) dload(WGT_BASE + 4 * o, w);
          load(PROP_BASE + 4 * u, pu);
          check(pu == ref_prop[u], "neighbor property");
          nd = pv + w;
          if (nd < pu) begin
            store(PROP_BASE + 4 * u, nd);
            ref_prop[u] = nd;
            if (!in_next[u]) begin
              in_next[u] = 1;
              store(nxt_list + 32'(4 * nxt_len), u);
              nxt_len++;
            end
          end
        end
      end
      end_of_iteration();
      tmp = cur_list; cur_list = nxt_list; nxt_list = tmp;
      cur_len = nxt_len;
      iters++;
    end
    for (int v = 0; v < nv; v++)
      check(rd(PROP_BASE + 32'(4 * v)) == refd[v], weighted ? "SSSP distance" : "BFS level");
  endtask

  // One PageRank iteration, pull form over the CSR lists, 16.16 fixed
  // point: prop[u] = rank[u] / outdeg[u]; new[v] = 0.15/N + 0.85 * sum.
  task automatic pagerank();
    word_t contrib [];
    contrib = new[nv];
    common_cfg();
    cfg_write(CFG_ACTIVE, 1);
    for (int v = 0; v < nv; v++) begin
      int deg;
      deg = int'(offs[v + 1] - offs[v]);
      contrib[v] = (32'h0001_0000 / 32'(nv)) / 32'((deg == 0) ? 1 : deg);
      store(PROP_BASE + 32'(4 * v), contrib[v]);
    end
    set_frontier(0, nv - 1);
    for (int v = 0; v < nv; v++) begin
      word_t f, r, sum, pu, u;
      dload(OFF_BASE + 32'(4 * v), f);
      dload(OFF_BASE + 32'(4 * v + 4), r);
      load(PROP_BASE + 32'(4 * v), pu);
      check(pu == contrib[v], "PR own property");
      sum = 0;
      for (word_t o = f; o < r; o++) begin
        dload(NEI_BASE + 4 * o, u);
        load(PROP_BASE + 4 * u, pu);
        check(pu == contrib[u], "PR neighbor property");
        sum += pu;
      end
      store(RES_BASE + 32'(4 * v), (32'd9830 / 32'(nv)) + ((sum * 32'd55706) >> 16));
    end
    end_of_iteration();
    for (int v = 0; v < nv; v++) begin
      word_t s = 0;
      for (int i = int'(offs[v]); i < int'(offs[v + 1]); i++) s += contrib[neis[i]];
      check(rd(RES_BASE + 32'(4 * v)) == (32'd9830 / 32'(nv)) + ((s * 32'd55706) >> 16), "PR value");
    end
  endtask

  task automatic run(input string name, input int kind);
    int h0 [2], m0 [2];
    longint c0 [2];
    int iters;
    for (int p = 1; p >= 0; p--) begin
      prefetch_on = (p == 1);
      h0[p] = n_hit; m0[p] = n_miss; c0[p] = cyc;
      if (kind == 0) frontier_kernel(0, iters);
      else if (kind == 1) frontier_kernel(1, iters);
      else pagerank();
      h0[p] = n_hit - h0[p]; m0[p] = n_miss - m0[p]; c0[p] = cyc - c0[p];
      // a miss is held and then served as a hit, so loads = hits
      $display("%s prefetch=%0d: P-cache loads %0d misses %0d (hit rate %0d%%), %0d cycles",
               name, p, h0[p], m0[p], 100 * (h0[p] - m0[p]) / h0[p], c0[p]);
    end
    check(h0[1] == h0[0], {name, ": same number of property loads in both runs"});
    check(m0[1] < m0[0], {name, ": prefetching lowers the P-cache demand misses"});
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    build_rmat();
    $display("R-MAT graph: %0d vertices, %0d edges", nv, ne);
    run("BFS", 0);
    run("SSSP", 1);
    run("PR", 2);
    check(n_drop + n_stall > 0, "counter acted");
    $display("stall=%0d drop=%0d pf_fill=%0d pf_drop=%0d evict=%0d", n_stall, n_drop, n_pf_fill, n_pf_drop, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
