// tb_lc3_io_decode: memory versus device-register routing over the address space.
module tb_lc3_io_decode;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  word_t addr, mem_rdata, kbd_rdata, ext_rdata, rdata;
  logic en, mem_en, kbd_en, ext_en, mem_ready, kbd_ready, ext_ready, ready;

  lc3_io_decode dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit io, kb;
    mem_rdata = 16'h1111; kbd_rdata = 16'h2222; ext_rdata = 16'h3333;
    mem_ready = 1; kbd_ready = 0; ext_ready = 1;
    for (int i = 0; i < 3000; i++) begin
      addr = (i < 64) ? 16'(16'hFFC0 + i) : 16'($urandom);
      en = 1'($urandom);
      mem_ready = 1'($urandom); kbd_ready = 1'($urandom); ext_ready = 1'($urandom);
      #1;
      io = addr >= 16'hFFE0;
      kb = addr == 16'hFFE0 || addr == 16'hFFE2;
      checks++;
      if (mem_en !== (en && !io) || kbd_en !== (en && kb) || ext_en !== (en && io && !kb) ||
          rdata !== (!io ? 16'h1111 : kb ? 16'h2222 : 16'h3333) ||
          ready !== (!io ? mem_ready : kb ? kbd_ready : ext_ready)) begin
        failures++;
        $display("FAIL addr %h en %b: mem %b kbd %b ext %b rdata %h", addr, en, mem_en, kbd_en, ext_en, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
