// tb_delay_line -- checks that delay_line repeats a random bit stream exactly 8 clocks later
// (the default depth) and that reset clears it.
`timescale 1ns/1ps
module tb_delay_line;
  logic clk = 0, rst_n = 0;
  logic d, q;
  int checks = 0, failures = 0;
  bit hist[$];

  delay_line dut (.clk, .rst_n, .d, .q);

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
    #1 checks++; if (q !== 1'b0) failures++;
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      hist.push_back(d);
      @(posedge clk); #1;
      if (hist.size() >= 8) begin
        checks++;
        if (q !== hist[hist.size() - 8]) begin
          failures++;
          $display("FAIL cycle %0d: q=%0b expected %0b", i, q, hist[hist.size() - 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
