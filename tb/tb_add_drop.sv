// tb_add_drop -- one AddDrop channel (TU-12 40) on a generated Telecom Bus.
// The VC-4 column number and the V1 mark come from the generator; the testbench itself models
// the 9-cycle buffer and the output multiplexer (the byte 9 clocks old, or data_to_insert while
// 'replace' is high). Checks: bytes the channel must not change (other TU-12s, V-bytes, VC-12
// path overhead) leave unchanged, E1OUT carries the channel's dropped bits in order, and the E1IN
// bits (clock just under 2.050 MHz) are found in order in the rebuilt VC-12.
`timescale 1ps/1ps
module tb_add_drop;
  import sdh_tb_pkg::*;
  localparam int CH = 40;
  logic rst_n = 0, ck65 = 0, dtbyck = 0;
  logic dtbpay = 0, v1 = 0;
  logic [7:0] dtbdata = 0;
  logic [8:0] col_address = 0;
  logic replace, e1out, cke1out, cke1in = 0, e1in = 0;
  logic [7:0] data_to_insert;
  int checks = 0, failures = 0, n_replaced = 0;
  bit got_out[$], sent_in[$];
  bit_src src = new(4242);

  add_drop dut (
    .dtbyck, .ck65_536 (ck65), .rst_n, .channel (6'(CH)), .dtbpay, .dtbdata, .col_address, .v1,
    .replace, .data_to_insert, .e1out, .cke1out, .e1in, .cke1in
  );

  always #25720 dtbyck = ~dtbyck;
  always #7629 ck65 = ~ck65;
  always @(negedge cke1out) got_out.push_back(e1out);

  initial begin
    #(64'd20_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (rst_n);
    forever begin
      e1in = src.next();
      #243914 cke1in = 1;
      sent_in.push_back(e1in);
      #243914 cke1in = 0;
    end
  end

  initial begin
    bus_gen g;
    bus_byte_t inq[$];
    vc12_rx rx;
    g = new(700, 21, 10'd3);
    rx = new();
    repeat (3) @(posedge dtbyck);
    rst_n = 1;
    for (int t = 0; t < 2430 * 4 * 24; t++) begin
      bus_byte_t r;
      @(negedge dtbyck);
      if (inq.size() >= 9) begin
        bus_byte_t o;
        logic [7:0] out;
        o = inq.pop_front();
        out = replace ? data_to_insert : o.d;
        n_replaced += replace;
        if (o.ch == CH) rx.push(out);
        if (o.ch != CH || o.pass || o.n < 4) begin
          checks++;
          if (out != o.d) begin
            failures++;
            if (failures < 10) $display("FAIL: byte %h expected %h (ch %0d k %0d)", out, o.d, o.ch, o.k);
          end
        end
      end
      r = g.next();
      dtbpay = r.pay; dtbdata = r.d; v1 = r.v1;
      col_address = (r.col >= 0) ? 9'(r.col) : 9'd300;
      inq.push_back(r);
    end
    begin
      int n_ok, errs;
      bit exp_q[$], got_q[$];
      exp_q = g.tx[CH].sent;
      got_q = got_out;
      n_ok = match_streams(exp_q, got_q, 12000, errs);
      checks++;
      if (n_ok < 15000 || errs != 0) begin
        failures++;
        $display("FAIL: drop: %0d bits compared, %0d wrong", n_ok, errs);
      end
      checks += n_ok; failures += errs;
      got_q = rx.got;
      exp_q = sent_in;
      n_ok = match_streams(exp_q, got_q, 12000, errs);
      checks++;
      if (n_ok < 15000 || errs != 0) begin
        failures++;
        $display("FAIL: add: %0d bits compared, %0d wrong", n_ok, errs);
      end
      checks += n_ok; failures += errs;
      checks++;
      if (n_replaced == 0) failures++;
      $display("replaced bytes %0d, added superframes normal/fast/slow %0d/%0d/%0d", n_replaced,
               rx.n_sf[0], rx.n_sf[1], rx.n_sf[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
