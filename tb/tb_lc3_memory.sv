// tb_lc3_memory: read/write against a reference model, with a 3-cycle latency.
module tb_lc3_memory;
  import lc3_pkg::*;
  localparam int LAT = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en, we, ready;
  word_t addr, wdata, rdata;
  word_t model [word_t];

  lc3_memory #(.LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(bit w, word_t a, word_t d);
    int n = 0;
    en = 1; we = w; addr = a; wdata = d;
    forever begin
      #1;
      n++;
      if (ready) break;
      @(posedge clk);
    end
    checks++;
    if (n != LAT) begin failures++; $display("FAIL latency %0d expected %0d", n, LAT); end
    if (!w) begin
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read %h got %h expected %h", a, rdata, model[a]); end
    end else model[a] = d;
    @(posedge clk);
    #1 en = 0;
  endtask

  initial begin
    word_t a;
    rst = 1; en = 0; we = 0; addr = 0; wdata = 0;
    @(posedge clk); #1 rst = 0;
    // Fig. 4 values: xFE02 at x3003 and x1234 at xFE02.
    access(1, 16'h3003, 16'hFE02);
    access(1, 16'hFE02, 16'h1234);
    access(0, 16'h3003, 0);
    access(0, 16'hFE02, 0);
    for (int i = 0; i < 400; i++) begin
      a = (i % 4 == 0) ? 16'($urandom) : 16'($urandom_range(0, 15));
      if (!model.exists(a) || $urandom_range(0, 1)) access(1, a, 16'($urandom));
      else access(0, a, 0);
    end
    access(1, 16'hFFFF, 16'hBEEF);
    access(1, 16'h0000, 16'h1111);
    access(0, 16'hFFFF, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
