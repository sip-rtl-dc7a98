// tb_sip_timeliness_counter: random increments, decrements and skip amounts
// against an integer model; checks the count and the stall (>= threshold)
// and behind (< 0) decodes, and that each was seen.
module tb_sip_timeliness_counter;
  import sip_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0, dec = 0, add_valid = 0;
  word_t add_amount = 0, threshold = 8;
  logic signed [31:0] count;
  logic stall, behind;
  int model = 0;
  int checks = 0, failures = 0, n_stall = 0, n_behind = 0;

  sip_timeliness_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s count=%0d model=%0d", what, count, model); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(count == model, "count");
      check(stall == (model >= int'(threshold)), "stall decode");
      check(behind == (model < 0), "behind decode");
      if (stall) n_stall++;
      if (behind) n_behind++;
      inc = $urandom_range(0, 99) < (((cyc / 400) % 2 != 0) ? 60 : 35);
      dec = $urandom_range(0, 99) < 50;
      add_valid = (model < 0) && ($urandom_range(0, 3) == 0);
      add_amount = $urandom_range(0, 6);
      clear = ($urandom_range(0, 499) == 0);
      if (cyc % 1000 == 999) threshold = $urandom_range(1, 16);
      @(posedge clk);
      if (clear) model = 0;
      else model = model + int'(inc) - int'(dec) + (add_valid ? int'(add_amount) : 0);
    end
    check(n_stall > 0, "stall seen");
    check(n_behind > 0, "behind seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
