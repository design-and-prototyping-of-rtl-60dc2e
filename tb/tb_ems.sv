// tb_ems -- end-to-end test of the full 63-channel core with every parameter at its default.
//
// A generated STM-1 Telecom Bus (19.44 MHz; VC-4 floating, J1 at payload byte 1500) carries 63
// TU-12s with different pointer offsets, some of them placing V5 ahead of V2. Channel i of the
// core is set to TU-12 number 5*i mod 63 + 1, so every TU-12 is added and dropped. The drop
// traffic of a third of the TU-12s is sent in normal justification, a third in fast and a third
// in slow; the E1 inputs run at 2.048 MHz, just under 2.050 MHz and just above 2.046 MHz.
// Checks:
//   * DTBDATAOUT is DTBDATA delayed by exactly 9 clocks wherever the core must not change it:
//     transport overhead, VC-4 path overhead and stuffing, V1..V4 and the VC-12 path overhead;
//   * every E1OUT carries, in order, the bits sent in its TU-12 (drop direction);
//   * every E1IN's bits are found, in order, in its TU-12 of DTBDATAOUT (add direction);
//   * mechanisms, each of which must occur: bypassed bytes, replaced bytes, the drop clock at
//     divide-by-31, -32 and -33, and added superframes in normal, fast and slow justification.
`timescale 1ps/1ps
module tb_ems;
  import sdh_tb_pkg::*;
  localparam int N = 63;
  localparam int N_SF = 80;
  logic rst_n = 0, ck32 = 0, ck65 = 0, dtbyck = 0;
  logic dtbpay = 0, dtbj0j1 = 0;
  logic [7:0] dtbdata = 0, dtbdataout;
  logic [5:0] channel [N];
  logic [N-1:0] e1in = '0, cke1in = '0, e1out, cke1out;
  int checks = 0, failures = 0;
  int ch_of [N];          // TU-12 served by core channel i
  int core_of [64];       // core channel serving TU-12 c

  ems dut (
    .rst_n, .ck32_768 (ck32), .ck65_536 (ck65), .dtbyck, .dtbpay, .dtbj0j1, .dtbdata,
    .dtbdataout, .channel, .e1in, .cke1in, .e1out, .cke1out
  );

  always #25720 dtbyck = ~dtbyck;
  always #7629 ck65 = ~ck65;
  always #15259 ck32 = ~ck32;

  initial begin
    #(64'd100_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      ch_of[i] = (5 * i) % 63 + 1;
      core_of[ch_of[i]] = i;
      channel[i] = 6'(ch_of[i]);
    end
  end

  int cyc = 0;
  always @(posedge ck65) cyc++;

  bit got_out [N][$];     // E1OUT bits
  bit sent_in [N][$];     // E1IN bits
  int per_cnt [3];        // CKE1OUT periods of 31, 32, 33
  int per_bad = 0;

  for (genvar i = 0; i < N; i++) begin : g_e1
    int last_rise = -1;
    bit_src src = new(500 + i);
    always @(negedge cke1out[i]) got_out[i].push_back(e1out[i]);
    always @(posedge cke1out[i]) begin
      if (last_rise >= 0 && rst_n) begin
        if (cyc - last_rise >= 31 && cyc - last_rise <= 33) per_cnt[cyc - last_rise - 31]++;
        else per_bad++;
      end
      last_rise = rst_n ? cyc : -1;
    end
    initial begin
      int half_ps;
      half_ps = (i % 3 == 0) ? 244141 : (i % 3 == 1) ? 243914 : 244367;
      #(i * 7001);
      wait (rst_n);
      forever begin
        e1in[i] = src.next();
        #half_ps cke1in[i] = 1;
        sent_in[i].push_back(e1in[i]);
        #half_ps cke1in[i] = 0;
      end
    end
  end

  initial begin
    bus_gen g;
    bus_byte_t inq[$];
    vc12_rx rx [64];
    int n_bypass = 0, n_replaced = 0, n_cycles;
    g = new(1500, 11, 10'd30);
    for (int c = 1; c <= 63; c++) begin
      rx[c] = new();
      g.tx[c].mode_next = core_of[c] % 3;
    end
    repeat (3) @(posedge dtbyck);
    rst_n = 1;
    n_cycles = 2430 * 4 * N_SF;
    for (int t = 0; t < n_cycles; t++) begin
      bus_byte_t r;
      @(negedge dtbyck);
      if (inq.size() >= 9) begin
        bus_byte_t o;
        o = inq.pop_front();
        if (o.ch != 0) rx[o.ch].push(dtbdataout);
        if (o.ch == 0 || o.pass || o.n < 4) begin
          checks++;
          if (dtbdataout != o.d) begin
            failures++;
            if (failures < 10) $display("FAIL: byte %h expected %h (col %0d ch %0d)", dtbdataout,
                                        o.d, o.col, o.ch);
          end
          n_bypass++;
        end
      end
      if (dut.u_mux.replace != '0) n_replaced++;
      r = g.next();
      dtbpay = r.pay; dtbj0j1 = r.j0j1; dtbdata = r.d;
      inq.push_back(r);
    end
    for (int i = 0; i < N; i++) begin
      int n_ok, errs, c;
      bit exp_q[$], got_q[$];
      c = ch_of[i];
      exp_q = g.tx[c].sent;
      got_q = got_out[i];
      n_ok = match_streams(exp_q, got_q, 12000, errs);
      checks++;
      if (n_ok < 40000 || errs != 0) begin
        failures++;
        $display("FAIL: drop channel %0d (TU-12 %0d): %0d bits compared, %0d wrong", i, c, n_ok, errs);
      end
      exp_q = sent_in[i];
      got_q = rx[c].got;
      n_ok = match_streams(exp_q, got_q, 12000, errs);
      checks++;
      if (n_ok < 40000 || errs != 0) begin
        failures++;
        $display("FAIL: add channel %0d (TU-12 %0d): %0d bits compared, %0d wrong", i, c, n_ok, errs);
      end
    end
    begin
      int modes [3];
      modes = '{0, 0, 0};
      for (int c = 1; c <= 63; c++) for (int m = 0; m < 3; m++) modes[m] += rx[c].n_sf[m];
      $display("bypassed bytes %0d, replaced bytes %0d", n_bypass, n_replaced);
      $display("drop clock periods 31/32/33: %0d/%0d/%0d, other %0d", per_cnt[0], per_cnt[1],
               per_cnt[2], per_bad);
      $display("added superframes normal/fast/slow: %0d/%0d/%0d", modes[0], modes[1], modes[2]);
      checks += 8;
      if (n_bypass == 0)   begin failures++; $display("FAIL: no bypass"); end
      if (n_replaced == 0) begin failures++; $display("FAIL: no replacement"); end
      if (per_cnt[0] == 0) begin failures++; $display("FAIL: drop never fast"); end
      if (per_cnt[1] == 0) begin failures++; $display("FAIL: drop never nominal"); end
      if (per_cnt[2] == 0) begin failures++; $display("FAIL: drop never slow"); end
      if (per_bad != 0)    begin failures++; $display("FAIL: bad drop clock periods"); end
      for (int m = 0; m < 3; m++)
        if (modes[m] == 0) begin failures++; $display("FAIL: add mode %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
