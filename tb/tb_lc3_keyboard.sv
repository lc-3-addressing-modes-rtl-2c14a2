// tb_lc3_keyboard: key arrival, status/data reads, interrupt enable and request.
module tb_lc3_keyboard;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, key_valid, en, we, ready, irq;
  logic [7:0] key_data;
  logic [2:0] irq_priority;
  word_t addr, wdata, rdata;

  lc3_keyboard dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, word_t got, word_t e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s got %h expected %h", w, got, e); end
  endtask

  task automatic rd(word_t a, output word_t d);
    en = 1; we = 0; addr = a; #1;
    chk("ready", {15'b0, ready}, 16'd1);
    d = rdata;
    @(posedge clk); #1 en = 0;
  endtask

  task automatic wr(word_t a, word_t d);
    en = 1; we = 1; addr = a; wdata = d;
    @(posedge clk); #1 en = 0; we = 0;
  endtask

  initial begin
    word_t d;
    rst = 1; key_valid = 0; key_data = 0; en = 0; we = 0; addr = 0; wdata = 0;
    @(posedge clk); #1 rst = 0;
    chk("priority", {13'b0, irq_priority}, 16'd4);
    rd(KBSR_ADDR, d); chk("KBSR idle", d, 16'h0000);
    key_data = 8'h41; key_valid = 1; @(posedge clk); #1 key_valid = 0;
    rd(KBSR_ADDR, d); chk("KBSR key waiting", d, 16'h8000);
    chk("no irq while disabled", {15'b0, irq}, 16'd0);
    wr(KBSR_ADDR, 16'h4000);
    #1 chk("irq when enabled", {15'b0, irq}, 16'd1);
    rd(KBSR_ADDR, d); chk("KBSR ready+IE", d, 16'hC000);
    rd(KBDR_ADDR, d); chk("KBDR", d, 16'h0041);
    #1 chk("irq cleared by KBDR read", {15'b0, irq}, 16'd0);
    rd(KBSR_ADDR, d); chk("KBSR after read", d, 16'h4000);
    key_data = 8'h7A; key_valid = 1; @(posedge clk); #1 key_valid = 0;
    chk("irq again", {15'b0, irq}, 16'd1);
    wr(KBSR_ADDR, 16'h0000);
    #1 chk("irq masked", {15'b0, irq}, 16'd0);
    rd(KBDR_ADDR, d); chk("KBDR second", d, 16'h007A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
