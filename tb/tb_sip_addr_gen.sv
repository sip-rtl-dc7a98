// tb_sip_addr_gen: compares base + index * size with the shift-and-add
// address generator for random bases, indices and every power-of-two size.
module tb_sip_addr_gen;
  import sip_pkg::*;
  word_t base, index, size, addr;
  int checks = 0, failures = 0;

  sip_addr_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint unsigned expect_v;
      base  = $urandom;
      index = (n % 2 != 0) ? $urandom : $urandom_range(0, 1000);
      size  = 32'd1 << $urandom_range(0, 4);
      #1;
      expect_v = (longint'(base) + longint'(index) * longint'(size)) & 64'hffff_ffff;
      checks++;
      if (addr != word_t'(expect_v)) begin
        failures++;
        $display("FAIL base=%h index=%h size=%0d addr=%h expected %h", base, index, size, addr, expect_v);
      end
    end
    // Fig. 1 example: offset list at 0x1000, 4-byte entries, vertex 3 -> 0x100c
    base = 32'h1000; index = 3; size = 4; #1;
    checks++;
    if (addr != 32'h100c) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
