// tb_sip_prop_prefetcher: offers vertex and neighbor IDs with random
// back-pressure and checks that prefetch addresses prop_list + ID * size
// leave in the order the IDs were accepted, vertices first when both offer.
module tb_sip_prop_prefetcher;
  import sip_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  sip_cfg_t cfg;
  logic vid_valid = 0, vid_ready, nid_valid = 0, nid_ready, pf_valid, pf_ready = 0;
  word_t vid = 0, nid = 0, pf_addr;
  word_t q[$];
  int checks = 0, failures = 0, both = 0;

  sip_prop_prefetcher dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.prop_list = 32'h0004_0000;
    cfg.size      = 4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc == 1500) cfg.size = 8;
      if (!(vid_valid && !vid_ready)) begin vid_valid = $urandom_range(0, 3) == 0; vid = $urandom_range(0, 5000); end
      if (!(nid_valid && !nid_ready)) begin nid_valid = 1'($urandom_range(0, 1));      nid = $urandom_range(0, 5000); end
      pf_ready = 1'($urandom_range(0, 1));
      #1;
      if (vid_valid && nid_valid) begin
        both++;
        check(!nid_ready, "vertex has priority");
      end
      if (pf_valid) begin
        check(q.size() > 0, "no spurious prefetch");
        if (q.size() > 0) check(pf_addr == cfg.prop_list + q[0] * cfg.size, "prefetch address");
      end
      @(posedge clk);
      if (pf_valid && pf_ready && q.size() > 0) void'(q.pop_front());
      if (vid_valid && vid_ready) q.push_back(vid);
      else if (nid_valid && nid_ready) q.push_back(nid);
    end
    check(both > 0, "both inputs offered together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
