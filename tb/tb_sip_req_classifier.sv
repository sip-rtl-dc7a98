// tb_sip_req_classifier: random requests around the property and neighbor
// ranges; checks the routing to P-cache or D-cache, the ready returned,
// and the edge-read pulse.
module tb_sip_req_classifier;
  import sip_pkg::*;
  sip_cfg_t cfg;
  logic cpu_valid, cpu_ready, cpu_we;
  word_t cpu_addr, cpu_wdata;
  logic pc_valid, pc_ready, pc_we, dc_valid, dc_ready, dc_we, edge_read;
  word_t pc_addr, pc_wdata, dc_addr, dc_wdata;
  int checks = 0, failures = 0;

  sip_req_classifier dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h", what, cpu_addr); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.nei1  = 32'h0002_0000; cfg.nei2  = 32'h0002_0100;
    cfg.prop1 = 32'h0003_0000; cfg.prop2 = 32'h0003_0040;
    for (int n = 0; n < 3000; n++) begin
      logic exp_prop, exp_nei;
      case ($urandom_range(0, 3))
        0: cpu_addr = cfg.prop1 + 32'($urandom_range(0, 'h48)) - 32'd4;
        1: cpu_addr = cfg.nei1 + 32'($urandom_range(0, 'h108)) - 32'd4;
        default: cpu_addr = $urandom;
      endcase
      cpu_valid = $urandom_range(0, 3) != 0;
      cpu_we    = 1'($urandom_range(0, 1));
      cpu_wdata = $urandom;
      pc_ready  = 1'($urandom_range(0, 1));
      dc_ready  = 1'($urandom_range(0, 1));
      #1;
      exp_prop = cpu_addr >= 32'h0003_0000 && cpu_addr < 32'h0003_0040;
      exp_nei  = cpu_addr >= 32'h0002_0000 && cpu_addr < 32'h0002_0100;
      check(pc_valid == (cpu_valid && exp_prop), "to P-cache");
      check(dc_valid == (cpu_valid && !exp_prop), "to D-cache");
      check(cpu_ready == (exp_prop ? pc_ready : dc_ready), "ready");
      check(edge_read == (cpu_valid && dc_ready && !cpu_we && exp_nei), "edge read");
      check(pc_addr == cpu_addr && dc_addr == cpu_addr && pc_wdata == cpu_wdata &&
            dc_wdata == cpu_wdata && pc_we == cpu_we && dc_we == cpu_we, "payload");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
