// tb_sip_cfg_regs: writes every configuration register with random values
// and checks each struct field, the one-cycle restart pulse, and that writes
// to an index outside the register table change nothing.
module tb_sip_cfg_regs;
  import sip_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [3:0] cfg_idx = 0;
  word_t cfg_wdata = 0;
  sip_cfg_t cfg, model;
  logic cfg_written;
  int checks = 0, failures = 0;

  sip_cfg_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(input int idx, input word_t v);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 4'(idx); cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
    check(cfg_written == (idx < 12), "restart pulse");
    @(negedge clk);
    check(cfg_written == 0, "pulse lasts one cycle");
  endtask

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg == '0, "reset value");
    for (int round = 0; round < 20; round++) begin
      int idx;
      word_t v;
      idx = $urandom_range(0, 15);
      v   = $urandom;
      case (idx)
        0:  model.size       = v;
        1:  model.all_active = v[0];
        2:  model.active1    = v;
        3:  model.active2    = v;
        4:  model.off_list   = v;
        5:  model.nei_list   = v;
        6:  model.prop_list  = v;
        7:  model.nei1       = v;
        8:  model.nei2       = v;
        9:  model.prop1      = v;
        10: model.prop2      = v;
        11: model.threshold  = v;
        default: ;
      endcase
      write(idx, v);
      check(cfg == model, $sformatf("register contents after write to %0d", idx));
    end
    for (int idx = 0; idx < 12; idx++) begin
      word_t v;
      v = $urandom;
      write(idx, v);
      case (idx)
        0:  check(cfg.size == v, "size");
        1:  check(cfg.all_active == v[0], "active");
        2:  check(cfg.active1 == v, "active1");
        3:  check(cfg.active2 == v, "active2");
        4:  check(cfg.off_list == v, "off_list");
        5:  check(cfg.nei_list == v, "nei_list");
        6:  check(cfg.prop_list == v, "prop_list");
        7:  check(cfg.nei1 == v, "nei1");
        8:  check(cfg.nei2 == v, "nei2");
        9:  check(cfg.prop1 == v, "prop1");
        10: check(cfg.prop2 == v, "prop2");
        11: check(cfg.threshold == v, "threshold");
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
