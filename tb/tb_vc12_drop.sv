// tb_vc12_drop -- VC12Drop at its default sizes (64-bit FIFO, hysteresis 16/32/48).
// A TU-12 model hands the block one channel byte every 67 or 68 Telecom Bus cycles, i.e. one
// 144-byte superframe per 500 us as on a real STM-1. The superframes are sent in normal mode
// (1024 bits), then fast mode (1025 bits, S1 and S2 both data) and then slow mode (1023 bits),
// so that the FIFO fill climbs to the upper limit and falls to the lower one. Checks:
//   * the bits on E1OUT, sampled on the falling edge of CKE1OUT, are the sent E1 bits in order;
//   * CKE1OUT periods of 32 reference clocks (nominal), 31 (fast) and 33 (slow) all occur, and no
//     other period does;
//   * DELTA never comes close to the ends of the FIFO once reading has begun.
`timescale 1ps/1ps
module tb_vc12_drop;
  import sdh_tb_pkg::*;
  import ems_pkg::*;
  logic dtbyck = 0, ck65 = 0, rst_n = 0;
  logic [7:0] data_in = 0;
  logic data_valid = 0, sfs = 0;
  logic e1out, cke1out;
  logic [5:0] delta, limit;
  just_mode_t mode;
  int checks = 0, failures = 0;
  int per_cnt [int];
  bit got[$];
  bit started = 0;

  vc12_drop dut (
    .dtbyck, .ck65_536 (ck65), .rst_n, .data_in, .data_valid, .super_frame_start (sfs),
    .e1out, .cke1out, .delta, .limit_counter_clock (limit), .mode
  );

  always #25720 dtbyck = ~dtbyck;
  always #7629 ck65 = ~ck65;

  initial begin
    #(64'd60_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CKE1OUT period in reference clock cycles; E1OUT sampled on the falling edge.
  int cyc = 0;
  always @(posedge ck65) begin
    cyc++;
  end
  int last_rise = -1;
  always @(posedge cke1out) begin
    if (last_rise >= 0) per_cnt[cyc - last_rise]++;
    last_rise = rst_n ? cyc : -1;
  end
  always @(negedge cke1out) got.push_back(e1out);
  always @(posedge ck65) begin
    if (rst_n && delta >= 32) started = 1;
    if (started && rst_n) begin
      checks++;
      if (delta < 2 || delta > 61) begin
        failures++;
        if (failures < 10) $display("FAIL: DELTA %0d at %0t mode %0d", delta, $time, mode);
      end
    end
  end

  initial begin
    vc12_tx tx;
    int n_ok, errs, sf;
    tx = new(1234, 10'd45);
    repeat (3) @(posedge dtbyck);
    rst_n = 1;
    for (int b = 0; b < 144 * 100; b++) begin
      bit [7:0] d;
      sf = b / 144;
      tx.mode_next = (sf < 20) ? 0 : (sf < 50) ? 1 : (sf < 85) ? 2 : 0;
      d = tx.next_byte();
      @(negedge dtbyck);
      data_in = d;
      data_valid = (tx.last_k >= 0);
      sfs = (tx.last_k == 0);
      @(negedge dtbyck);
      data_valid = 0;
      sfs = 0;
      repeat ((b % 2 == 0) ? 65 : 66) @(negedge dtbyck);
    end
    n_ok = match_streams(tx.sent, got, 8000, errs);
    checks++;
    if (n_ok < 80000 || errs != 0) begin
      failures++;
      $display("FAIL: E1OUT stream: %0d bits compared, %0d wrong", n_ok, errs);
    end
    checks += n_ok;
    failures += errs;
    foreach (per_cnt[p]) $display("CKE1OUT period %0d cycles: %0d times", p, per_cnt[p]);
    for (int p = 31; p <= 33; p++) begin
      checks++;
      if (!per_cnt.exists(p)) begin failures++; $display("FAIL: no period of %0d", p); end
    end
    foreach (per_cnt[p]) begin
      checks++;
      if (p < 31 || p > 33) begin failures++; $display("FAIL: period %0d", p); end
    end
    $display("superframes normal/fast/slow sent: %0d/%0d/%0d, bits compared %0d", tx.n_sf[0],
             tx.n_sf[1], tx.n_sf[2], n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
