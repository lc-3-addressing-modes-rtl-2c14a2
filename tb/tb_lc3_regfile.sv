// tb_lc3_regfile: random writes and reads against a reference register array.
module tb_lc3_regfile;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [2:0] dr, sr1, sr2;
  word_t wdata, sr1_data, sr2_data;
  word_t model [8];

  lc3_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; dr = 0; sr1 = 0; sr2 = 0; wdata = 0;
    @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); dr = 3'($urandom); wdata = 16'($urandom);
      sr1 = 3'($urandom); sr2 = 3'($urandom);
      #1;
      checks += 2;
      if (sr1_data !== model[sr1] || sr2_data !== model[sr2]) begin
        failures++;
        $display("FAIL read R%0d=%h R%0d=%h expected %h %h", sr1, sr1_data, sr2, sr2_data, model[sr1], model[sr2]);
      end
      @(posedge clk);
      if (we) model[dr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
