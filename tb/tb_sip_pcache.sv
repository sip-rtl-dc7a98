// tb_sip_pcache: drives the P-cache from a processor model and a prefetch
// model against an LLC model with random latency, and predicts every hit
// and miss with a reference FIFO of the 16 cached line addresses.
//
// Checks: load data (from the LLC image, including earlier stores); a
// predicted hit is accepted at once, answered one cycle later and sends
// nothing to the LLC; a miss fetches exactly its line; stores are written
// through with address and data; a prefetch of a present line causes no
// LLC traffic and a prefetch of an absent line makes the next load of it
// hit; a load hit is served while a prefetch fill is outstanding; the 17th
// distinct line evicts the first one filled (FIFO). Each of
// these events is counted and must occur.
module tb_sip_pcache;
  import sip_pkg::*;
  localparam int LINES = 16;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  word_t req_addr = 0, req_wdata = 0;
  logic resp_valid;
  word_t resp_rdata;
  logic pf_valid = 0, pf_ready;
  word_t pf_addr = 0;
  logic llc_req_valid, llc_req_ready = 0, llc_req_we;
  word_t llc_req_addr, llc_req_wdata;
  logic llc_resp_valid = 0;
  logic [511:0] llc_resp_data = '0;

  sip_pcache dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_store = 0, n_pf_fill = 0, n_pf_drop = 0, n_evict = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- LLC model ----------------
  word_t written [word_t];
  function automatic word_t llc_word(word_t a);
    word_t wa = {a[31:2], 2'b00};
    if (written.exists(wa)) return written[wa];
    return wa ^ 32'h5a5a_0000 ^ (wa << 7);
  endfunction

  int llc_reads = 0, llc_writes = 0;
  word_t last_read_line = 0, last_write_addr = 0, last_write_data = 0;
  longint fill_due = -1;
  int llc_lat_min = 2;
  word_t fill_line;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (llc_req_valid && llc_req_ready) begin
      if (llc_req_we) begin
        written[{llc_req_addr[31:2], 2'b00}] = llc_req_wdata;
        llc_writes++;
        last_write_addr = llc_req_addr;
        last_write_data = llc_req_wdata;
      end else begin
        llc_reads++;
        last_read_line = llc_req_addr;
        fill_line = llc_req_addr;
        fill_due = cyc + longint'($urandom_range(llc_lat_min, 8));
      end
    end
  end

  always @(negedge clk) begin
    llc_req_ready  = $urandom_range(0, 3) != 0;
    llc_resp_valid = 0;
    if (fill_due >= 0 && cyc >= fill_due) begin
      llc_resp_valid = 1;
      for (int w = 0; w < 16; w++) llc_resp_data[w*32 +: 32] = llc_word(fill_line + 32'(4 * w));
      fill_due = -1;
    end
  end

  int n_hit_under_fill = 0;
  always @(posedge clk) if (dut.ld_hit && dut.state != dut.PC_IDLE) n_hit_under_fill++;

  // ---------------- reference contents ----------------
  word_t lines_q [$];
  function automatic logic present(word_t a);
    foreach (lines_q[i]) if (lines_q[i] == {a[31:6], 6'b0}) return 1;
    return 0;
  endfunction
  function automatic void install(word_t a);
    if (lines_q.size() == LINES) begin void'(lines_q.pop_front()); n_evict++; end
    lines_q.push_back({a[31:6], 6'b0});
  endfunction

  // ---------------- operations ----------------
  task automatic cpu_op(input logic we, input word_t a, input word_t wd);
    int waited = 0, reads0 = llc_reads;
    logic hit = present(a);
    word_t expect_v;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    expect_v = llc_word(a);
    @(posedge clk);
    while (!req_ready) begin waited++; @(posedge clk); end
    @(negedge clk);
    req_valid = 0;
    check(resp_valid, "response one cycle after acceptance");
    if (we) begin
      n_store++;
      check(last_write_addr == a && last_write_data == wd, "store written through");
      check(llc_reads == reads0, "store does not allocate");
    end else begin
      check(resp_rdata == expect_v, $sformatf("load data %h expected %h", resp_rdata, expect_v));
      if (hit) begin
        n_hit++;
        check(waited == 0 && llc_reads == reads0, "hit is served in one cycle without the LLC");
      end else begin
        n_miss++;
        check(llc_reads == reads0 + 1 && last_read_line == {a[31:6], 6'b0}, "miss fetches its line");
        install(a);
      end
    end
  endtask

  task automatic prefetch(input word_t a);
    int reads0 = llc_reads;
    logic hit = present(a);
    @(negedge clk);
    pf_valid = 1; pf_addr = a;
    @(posedge clk);
    while (!pf_ready) @(posedge clk);
    @(negedge clk);
    pf_valid = 0;
    repeat (2) @(negedge clk);
    while (dut.state != dut.PC_IDLE) @(negedge clk);
    if (hit) begin
      n_pf_drop++;
      check(llc_reads == reads0, "prefetch of a present line is dropped");
    end else begin
      n_pf_fill++;
      check(llc_reads == reads0 + 1 && last_read_line == {a[31:6], 6'b0}, "prefetch fills its line");
      install(a);
    end
  endtask

  function automatic word_t rand_addr();
    return 32'h0008_0000 + 32'($urandom_range(0, 23)) * 64 + 32'($urandom_range(0, 15)) * 4;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // directed: miss, hit, FIFO eviction of the first line by the 17th
    cpu_op(0, 32'h0001_0004, 0);
    cpu_op(0, 32'h0001_0008, 0);
    for (int i = 1; i <= LINES; i++) cpu_op(0, 32'h0001_0000 + 32'(64 * i), 0);
    check(!present(32'h0001_0000), "reference evicted the first line");
    cpu_op(0, 32'h0001_0000, 0);   // misses again
    cpu_op(0, 32'h0001_0000 + 32'(64 * 16), 0);  // still present
    // prefetch then hit
    prefetch(32'h0002_0040);
    cpu_op(0, 32'h0002_0044, 0);
    prefetch(32'h0002_0048);
    // stores
    cpu_op(1, 32'h0002_0044, 32'hcafe_f00d);
    cpu_op(0, 32'h0002_0044, 0);
    cpu_op(1, 32'h0003_0000, 32'h1234_5678);
    cpu_op(0, 32'h0003_0000, 0);
    // a load hit is served while a prefetch fill is outstanding
    check(present(32'h0002_0044), "reference holds the line used for hit-under-fill");
    llc_lat_min = 8;
    @(negedge clk);
    pf_valid = 1; pf_addr = 32'h0007_0000;
    @(posedge clk);
    while (!pf_ready) @(posedge clk);
    @(negedge clk);
    pf_valid = 0;
    while (dut.state != dut.PC_FILL_WAIT) @(negedge clk);
    check(fill_due >= 0, "prefetch fill outstanding");
    cpu_op(0, 32'h0002_0044, 0);
    while (dut.state != dut.PC_IDLE) @(negedge clk);
    install(32'h0007_0000);
    n_pf_fill++;
    llc_lat_min = 2;
    check(n_hit_under_fill > 0, "hit served under a fill");
    // random mix
    for (int n = 0; n < 600; n++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind < 5)      cpu_op(0, rand_addr(), 0);
      else if (kind < 7) cpu_op(1, rand_addr(), $urandom);
      else               prefetch(rand_addr());
    end
    check(n_hit > 0 && n_miss > 0 && n_store > 0 && n_pf_fill > 0 && n_pf_drop > 0 && n_evict > 0,
          "every event occurred");
    $display("hits=%0d misses=%0d stores=%0d pf_fill=%0d pf_drop=%0d evictions=%0d",
             n_hit, n_miss, n_store, n_pf_fill, n_pf_drop, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
