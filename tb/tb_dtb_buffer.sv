// tb_dtb_buffer -- checks that the Telecom Bus buffer delays random bytes by exactly 9 clocks.
`timescale 1ns/1ps
module tb_dtb_buffer;
  logic clk = 0, rst_n = 0;
  logic [7:0] d, q;
  int checks = 0, failures = 0;
  logic [7:0] hist[$];

  dtb_buffer dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = 8'($urandom);
      hist.push_back(d);
      @(posedge clk); #1;
      if (hist.size() >= 9) begin
        checks++;
        if (q !== hist[hist.size() - 9]) begin
          failures++;
          $display("FAIL cycle %0d: q=%h expected %h", i, q, hist[hist.size() - 9]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
