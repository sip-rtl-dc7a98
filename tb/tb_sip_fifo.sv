// tb_sip_fifo: random pushes and pops against a queue model at the default
// depth of 5; checks data order, the full and empty flags, and flush.
module tb_sip_fifo;
  logic clk = 0, rst_n = 0, flush = 0;
  logic push_valid = 0, push_ready, pop_valid, pop_ready = 0;
  logic [31:0] push_data = 0, pop_data;
  logic [2:0] count;
  logic [31:0] q[$];
  int checks = 0, failures = 0, fulls = 0;

  sip_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      flush      = ($urandom_range(0, 199) == 0);
      push_valid = ($urandom_range(0, 99) < (((cyc / 500) % 2 != 0) ? 70 : 30));
      pop_ready  = ($urandom_range(0, 99) < (((cyc / 500) % 2 != 0) ? 30 : 70));
      push_data  = $urandom;
      #1;
      check(push_ready == (q.size() < 5), "full flag");
      check(pop_valid == (q.size() > 0), "empty flag");
      check(count == 3'(q.size()), "count");
      if (pop_valid) check(pop_data == q[0], "data order");
      if (q.size() == 5) fulls++;
      @(posedge clk);
      if (flush) q.delete();
      else begin
        if (pop_valid && pop_ready) void'(q.pop_front());
        if (push_valid && push_ready) q.push_back(push_data);
      end
    end
    check(fulls > 0, "FIFO was full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
