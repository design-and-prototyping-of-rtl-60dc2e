// tb_vc12_add -- VC12Add at its default sizes (128-bit FIFO, hysteresis 32/64/96).
// A TU-12 model supplies the incoming VC-12 bytes (one channel byte every 67 or 68 Telecom Bus
// cycles, one superframe per 500 us) and E1IN carries a PRBS whose clock runs at 2.048 MHz, then
// just under 2.050 MHz, then just above 2.046 MHz. The replacement bytes on data_to_insert are
// decoded by a VC-12 demapper model (pointer, C-bit majority, S1/S2). Checks:
//   * the decoded bits are the E1IN bits in order (no bit lost or repeated);
//   * V5, J2, N2 and K4 leave unchanged and the fixed stuffing bytes are 0;
//   * superframes in normal (1024 bits), fast (1025) and slow (1023) justification all occur.
`timescale 1ps/1ps
module tb_vc12_add;
  import sdh_tb_pkg::*;
  import ems_pkg::*;
  logic dtbyck = 0, cke1in = 0, rst_n = 0;
  logic e1in = 0;
  logic [7:0] data_in = 0;
  logic data_valid = 0, sfs = 0;
  logic [7:0] data_to_insert;
  logic [6:0] delta;
  just_mode_t mode;
  logic running;
  int checks = 0, failures = 0;
  bit sent[$];
  int half_ps = 244141;
  bit_src e1src = new(999);

  vc12_add dut (
    .dtbyck, .cke1in, .rst_n, .e1in, .data_in, .data_valid, .super_frame_start (sfs),
    .data_to_insert, .delta, .mode, .running
  );

  always #25720 dtbyck = ~dtbyck;

  initial begin
    #(64'd90_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // E1 source: data changes half a period before the sampling edge.
  initial begin
    wait (rst_n);
    forever begin
      e1in = e1src.next();
      #half_ps cke1in = 1;
      sent.push_back(e1in);
      #half_ps cke1in = 0;
    end
  end

  initial begin
    vc12_tx tx;
    vc12_rx rx;
    int n_ok, errs, sf;
    tx = new(4321, 10'd120);
    rx = new();
    repeat (3) @(posedge dtbyck);
    rst_n = 1;
    for (int b = 0; b < 144 * 150; b++) begin
      bit [7:0] d;
      sf = b / 144;
      half_ps = (sf < 15) ? 244141 : (sf < 70) ? 243914 : 244367;
      d = tx.next_byte();
      @(negedge dtbyck);
      data_in = d;
      data_valid = (tx.last_k >= 0);
      sfs = (tx.last_k == 0);
      @(negedge dtbyck);
      data_valid = 0;
      sfs = 0;
      if (tx.last_k >= 0) begin
        rx.push(data_to_insert);
        if (tx.last_pass) begin
          checks++;
          if (data_to_insert != d) begin
            failures++;
            $display("FAIL: overhead byte %0d changed to %h", tx.last_k, data_to_insert);
          end
        end
        if (tx.last_k == 1 || tx.last_k == 34 || tx.last_k == 139) begin
          checks++;
          if (data_to_insert != 8'h00) failures++;
        end
      end else rx.push(d);
      repeat ((b % 2 == 0) ? 65 : 66) @(negedge dtbyck);
    end
    n_ok = match_streams(sent, rx.got, 12000, errs);
    checks++;
    if (n_ok < 100000 || errs != 0) begin
      failures++;
      $display("FAIL: mapped stream: %0d bits compared, %0d wrong", n_ok, errs);
    end
    checks += n_ok;
    failures += errs;
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (rx.n_sf[m] == 0) begin failures++; $display("FAIL: no superframe of mode %0d", m); end
    end
    $display("superframes normal/fast/slow decoded: %0d/%0d/%0d, bits compared %0d", rx.n_sf[0],
             rx.n_sf[1], rx.n_sf[2], n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
