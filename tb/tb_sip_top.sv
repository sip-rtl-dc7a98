// tb_sip_top: end-to-end run of the SIP block at its default sizes (1 KB
// P-cache of 64-byte lines, FIFOs of 5), driven by a processor model that
// runs real graph kernels through the load/store queue port.
//
// Around the block sit models of the conventional parts: a D-cache that
// answers processor requests from a flat memory image, the D-cache side of
// the structure prefetcher's port (random latency, set per phase), and an
// LLC that returns 64-byte lines and takes the P-cache's write-through
// stores. The processor model uses only the configuration instruction and
// ordinary loads and stores:
//
//   1. BFS on the 7-vertex example graph from vertex 0, active list, slow
//      processor: the prefetcher runs ahead and stalls at the threshold.
//   2. BFS on a random 300-vertex graph from vertex 0, active list,
//      alternating between two active-list buffers per level, with a slow
//      prefetch port in some levels so that the prefetcher falls behind
//      and drops vertices.
//   3. One all-active pass (PageRank-like) over the random graph that sums
//      each vertex's neighbor properties into a result array.
//
// Checks: BFS levels and pass sums against a software reference; every
// P-cache load returns the current property value; no property request
// reaches the D-cache and no other request reaches the P-cache; after each
// iteration the timeliness counter is back at zero (every edge the
// processor read was fetched or dropped by the prefetcher). Each mechanism
// is counted and must occur: threshold stall, late-prefetch drop, P-cache
// demand hit, demand miss, prefetch fill, redundant prefetch, FIFO eviction,
// write-through store, edge-read decrement, both frontier modes, restart.
module tb_sip_top;
  import sip_pkg::*;

  localparam word_t OFF_BASE  = 32'h0001_0000;
  localparam word_t NEI_BASE  = 32'h0002_0000;
  localparam word_t ACT_A     = 32'h0004_0000;
  localparam word_t ACT_B     = 32'h0004_8000;
  localparam word_t PROP_BASE = 32'h0005_0000;
  localparam word_t RES_BASE  = 32'h0006_0000;
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
    repeat (3000000) @(posedge clk);
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
  int sp_lat_min = 1, sp_lat_max = 4;
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
        fill_due  = cyc + longint'($urandom_range(6, 12));
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

  // ---------------- graph and reference ----------------
  int nv, ne;
  word_t offs [];
  word_t neis [];
  word_t ref_prop [];

  task automatic load_graph();
    mem.delete();
    for (int v = 0; v <= nv; v++) mem[OFF_BASE + 32'(4 * v)] = offs[v];
    for (int i = 0; i < ne; i++)  mem[NEI_BASE + 32'(4 * i)] = neis[i];
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

  task automatic end_of_iteration();
    int waited = 0;
    while (dut.sp_busy && waited < 20000) begin @(negedge clk); waited++; end
    repeat (3) @(negedge clk);
    check(!dut.sp_busy, "prefetcher finished the frontier");
    check(dut.u_cnt.count == 0, $sformatf("edges fetched + dropped = edges read (count %0d)", dut.u_cnt.count));
  endtask

  // BFS with active lists; property = level
  task automatic bfs(input int slow_levels);
    word_t cur_list = ACT_A, nxt_list = ACT_B, tmp;
    int cur_len = 1, nxt_len, level = 0;
    word_t ref_level [];
    int q [$];
    // reference BFS
    ref_level = new[nv];
    foreach (ref_level[i]) ref_level[i] = INF;
    ref_level[0] = 0;
    q.push_back(0);
    while (q.size() > 0) begin
      int v = q.pop_front();
      for (int i = int'(offs[v]); i < int'(offs[v + 1]); i++)
        if (ref_level[neis[i]] == INF) begin ref_level[neis[i]] = ref_level[v] + 1; q.push_back(int'(neis[i])); end
    end
    // initial properties, written by the processor (through the P-cache)
    common_cfg();
    ref_prop = new[nv];
    for (int v = 0; v < nv; v++) begin
      ref_prop[v] = (v == 0) ? 0 : INF;
      store(PROP_BASE + 32'(4 * v), ref_prop[v]);
    end
    mem[cur_list] = 0;
    cfg_write(CFG_ACTIVE, 0);
    while (cur_len > 0) begin
      sp_lat_min = (level < slow_levels) ? 12 : 1;
      sp_lat_max = (level < slow_levels) ? 30 : 4;
      cfg_write(CFG_ACTIVE1, cur_list);
      cfg_write(CFG_ACTIVE2, cur_list + 32'(4 * cur_len));
      n_list++;
      nxt_len = 0;
      for (int k = 0; k < cur_len; k++) begin
        word_t v, f, r, pv;
        load(cur_list + 32'(4 * k), v);
        load(OFF_BASE + 4 * v, f);
        load(OFF_BASE + 4 * v + 4, r);
        load(PROP_BASE + 4 * v, pv);
        check(pv == ref_prop[v], "active vertex property");
        for (word_t o = f; o < r; o++) begin
          word_t u, pu;
          load(NEI_BASE + 4 * o, u);
          load(PROP_BASE + 4 * u, pu);
          check(pu == ref_prop[u], $sformatf("property of %0d: %h expected %h", u, pu, ref_prop[u]));
          if (pu == INF) begin
            store(PROP_BASE + 4 * u, pv + 1);
            ref_prop[u] = pv + 1;
            store(nxt_list + 32'(4 * nxt_len), u);
            nxt_len++;
          end
        end
      end
      end_of_iteration();
      tmp = cur_list; cur_list = nxt_list; nxt_list = tmp;
      cur_len = nxt_len;
      level++;
    end
    for (int v = 0; v < nv; v++)
      check(rd(PROP_BASE + 32'(4 * v)) == ref_level[v], $sformatf("BFS level of vertex %0d", v));
    $display("BFS: %0d vertices, %0d edges, %0d levels", nv, ne, level);
  endtask

  // all-active pass: result[v] = sum of property over v's neighbors
  task automatic all_active_pass();
    common_cfg();
    for (int v = 0; v < nv; v++) store(PROP_BASE + 32'(4 * v), 32'(v * 3 + 1));
    cfg_write(CFG_ACTIVE, 1);
    cfg_write(CFG_ACTIVE1, 0);
    cfg_write(CFG_ACTIVE2, nv - 1);
    n_allactive++;
    for (int v = 0; v < nv; v++) begin
      word_t f, r, pv, sum;
      load(OFF_BASE + 32'(4 * v), f);
      load(OFF_BASE + 32'(4 * v + 4), r);
      load(PROP_BASE + 32'(4 * v), pv);
      check(pv == 32'(v * 3 + 1), "all-active vertex property");
      sum = 0;
      for (word_t o = f; o < r; o++) begin
        word_t u, pu;
        load(NEI_BASE + 4 * o, u);
        load(PROP_BASE + 4 * u, pu);
        check(pu == 3 * u + 1, "all-active neighbor property");
        sum += pu;
      end
      store(RES_BASE + 32'(4 * v), sum);
    end
    end_of_iteration();
    for (int v = 0; v < nv; v++) begin
      word_t s = 0;
      for (int i = int'(offs[v]); i < int'(offs[v + 1]); i++) s += 3 * neis[i] + 1;
      check(rd(RES_BASE + 32'(4 * v)) == s, "all-active result");
    end
    $display("all-active pass: %0d vertices", nv);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. example graph
    nv = 7; ne = 7;
    offs = '{0, 3, 5, 5, 7, 7, 7, 7};
    neis = '{1, 2, 3, 3, 4, 5, 6};
    load_graph();
    cpu_gap = 6;
    bfs(0);

    // 2. random graph
    nv = 300;
    offs = new[nv + 1];
    neis = new[nv * 12];
    ne = 0;
    for (int v = 0; v < nv; v++) begin
      int d;
      d = $urandom_range(0, 10);
      offs[v] = ne;
      for (int j = 0; j < d; j++) begin neis[ne] = $urandom_range(0, nv - 1); ne++; end
    end
    offs[nv] = ne;
    load_graph();
    cpu_gap = 0;
    bfs(2);

    // 3. all-active pass
    cpu_gap = 1;
    sp_lat_min = 1; sp_lat_max = 4;
    all_active_pass();

    $display("stall=%0d drop=%0d hit=%0d miss=%0d pf_fill=%0d pf_drop=%0d evict=%0d write_through=%0d edge_read=%0d restart=%0d",
             n_stall, n_drop, n_hit, n_miss, n_pf_fill, n_pf_drop, n_evict, n_wt, n_edge_read, n_restart);
    check(n_stall > 0, "threshold stall occurred");
    check(n_drop > 0, "late prefetch drop occurred");
    check(n_hit - n_miss > 0, "P-cache demand hit occurred");   // a miss is served as a hit after its fill
    check(n_miss > 0, "P-cache demand miss occurred");
    check(n_pf_fill > 0, "prefetch fill occurred");
    check(n_pf_drop > 0, "redundant prefetch occurred");
    check(n_evict > 0, "FIFO eviction occurred");
    check(n_wt > 0, "write-through store occurred");
    check(n_edge_read > 0, "edge-read decrement occurred");
    check(n_restart > 0, "restart occurred");
    check(n_allactive > 0 && n_list > 0, "both frontier modes ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
