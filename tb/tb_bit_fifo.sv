// tb_bit_fifo -- dual-clock test of bit_fifo (128 cells, up to 8 bits read per cycle).
// The writer (period 488 ns, like an E1 clock) stores a PRBS bit every cycle; the reader
// (period 51.44 ns, like the Telecom Bus clock) first waits for DELTA to reach 72, then takes 8 bits whenever DELTA is at least 72 and a
// random 0..8 bits otherwise when DELTA allows it. Every bit read is compared with the bit
// written at that position, DELTA is checked never to exceed the true fill, and the reader must
// see DELTA reach its target so that the pointer crossing is shown to work.
`timescale 1ps/1ps
module tb_bit_fifo;
  import sdh_tb_pkg::*;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wbit;
  logic [3:0] rcount;
  logic [7:0] rdata;
  logic [6:0] delta, rd_ptr, wr_ptr_sync;
  int checks = 0, failures = 0;
  bit written[$];
  int nread = 0;
  bit_src src = new(77);

  bit_fifo #(.DEPTH(128), .RBITS(8)) dut (
    .wclk, .wrst_n(rst_n), .wen(1'b1), .wbit, .rclk, .rrst_n(rst_n), .rcount, .rdata, .delta,
    .rd_ptr, .wr_ptr_sync
  );

  always #244000 wclk = ~wclk;
  always #25720 rclk = ~rclk;

  initial begin
    #1500000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer: the bit presented before each rising edge is the one stored.
  initial begin
    wbit = src.next();
    @(posedge wclk);   // reset still asserted: not stored
    wait (rst_n);
    forever begin
      @(posedge wclk);
      written.push_back(wbit);
      #1000 wbit = src.next();
    end
  end

  initial begin
    int reached = 0;
    rcount = 0;
    #1000000 rst_n = 1;
    repeat (20000) begin
      @(negedge rclk);
      checks++;
      if (int'(delta) > written.size() - nread) begin
        failures++;
        $display("FAIL: DELTA %0d above fill %0d", delta, written.size() - nread);
      end
      if (delta >= 72) reached++;
      if (reached == 0) rcount = 0;            // fill first, then drain at random
      else if (delta >= 72) rcount = 8;
      else rcount = 4'($urandom_range(0, 8));
      if (int'(rcount) > int'(delta)) rcount = 0;
      for (int i = 0; i < int'(rcount); i++) begin
        checks++;
        if (rdata[7 - i] !== written[nread + i]) begin
          failures++;
          $display("FAIL: bit %0d read %0b expected %0b", nread + i, rdata[7 - i], written[nread + i]);
        end
      end
      nread += int'(rcount);
      @(posedge rclk);
    end
    checks++;
    if (reached == 0) begin failures++; $display("FAIL: DELTA never reached 72"); end
    checks++;
    if (nread < 1000) begin failures++; $display("FAIL: only %0d bits read", nread); end
    $display("bits read %0d", nread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
