// tb_column_address -- feeds column_address with generated STM-1 frames whose VC-4 starts in
// the middle of a frame (J1 at payload byte 500) and checks, byte by byte, the VC-4 column number,
// the J1 flag and the V1 (superframe start) flag against the generator's own bookkeeping. The
// superframe start is announced by H4 of the previous VC-4, so the first V1 is expected on VC-4
// number 4 and then on every fourth VC-4.
`timescale 1ps/1ps
module tb_column_address;
  import sdh_tb_pkg::*;
  logic dtbyck = 0, rst_n = 0;
  logic dtbpay = 0, dtbj0j1 = 0;
  logic [7:0] dtbdata = 0;
  logic [8:0] col_address;
  logic j1, v1;
  int checks = 0, failures = 0, n_v1 = 0, n_j1 = 0;

  column_address dut (.dtbyck, .rst_n, .dtbpay, .dtbj0j1, .dtbdata, .col_address, .j1, .v1);

  always #25720 dtbyck = ~dtbyck;

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_gen g;
    bus_byte_t r;
    g = new(500, 3, 10'd0);
    repeat (3) @(posedge dtbyck);
    rst_n = 1;
    repeat (2430 * 14) begin
      @(negedge dtbyck);
      r = g.next();
      dtbpay = r.pay; dtbj0j1 = r.j0j1; dtbdata = r.d;
      #1000;
      if (r.col >= 0) begin
        checks++;
        if (int'(col_address) != r.col) begin
          failures++;
          if (failures < 10) $display("FAIL col %0d expected %0d (n=%0d)", col_address, r.col, r.n);
        end
      end
      checks++;
      if (j1 != (r.pay && r.j0j1)) failures++;
      checks++;
      if (v1 != r.v1) begin
        failures++;
        $display("FAIL v1=%0b expected %0b at VC-4 %0d", v1, r.v1, r.n);
      end
      n_v1 += v1;
      n_j1 += j1;
    end
    checks++;
    if (n_v1 != 3) begin failures++; $display("FAIL: %0d V1 marks, expected 3", n_v1); end
    $display("J1 seen %0d, V1 seen %0d", n_j1, n_v1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
