// tb_v5_enable -- drives four v5_enable instances (channels 1, 22, 63 and 0 = disabled) with a
// generated Telecom Bus; the column number and the V1 mark come from the generator. Each output
// is checked one clock after its byte: data_valid must be high exactly for the channel's TU-12
// bytes other than V1..V4 once the superframe is found, data_out must equal the bus byte, and
// super_frame_start must mark the byte the generator put at the V5 position its pointer offset
// gives (a different offset per channel, some placing V5 before V2).
`timescale 1ps/1ps
module tb_v5_enable;
  import sdh_tb_pkg::*;
  localparam int NI = 4;
  localparam int CHS [NI] = '{1, 22, 63, 0};
  logic dtbyck = 0, rst_n = 0;
  logic dtbpay = 0;
  logic [7:0] dtbdata = 0;
  logic [8:0] col_address = 0;
  logic v1 = 0;
  logic [7:0] data_out [NI];
  logic [NI-1:0] data_valid, sfs;
  int checks = 0, failures = 0, n_sfs = 0, n_dv = 0;

  for (genvar i = 0; i < NI; i++) begin : g_dut
    v5_enable dut (
      .dtbyck, .rst_n, .channel (6'(CHS[i])), .dtbpay, .dtbdata, .col_address, .v1,
      .data_out (data_out[i]), .data_valid (data_valid[i]), .super_frame_start (sfs[i])
    );
  end

  always #25720 dtbyck = ~dtbyck;

  initial begin
    #(64'd3_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_gen g;
    bus_byte_t r, prev;
    bit locked [NI];
    bit ptr_seen [NI];
    g = new(1200, 5, 10'd100);
    foreach (locked[i]) begin locked[i] = 0; ptr_seen[i] = 0; end
    prev.pay = 0; prev.ch = 0; prev.k = -1; prev.pos = -1; prev.d = 0;
    repeat (3) @(posedge dtbyck);
    rst_n = 1;
    repeat (2430 * 14) begin
      @(negedge dtbyck);
      // outputs now describe 'prev'
      for (int i = 0; i < NI; i++) begin
        bit exp_dv, exp_sfs;
        if (prev.ch == CHS[i] && prev.pos == 0 && prev.n >= 4) locked[i] = 1;
        exp_dv  = locked[i] && prev.ch == CHS[i] && !is_v(prev.pos);
        exp_sfs = exp_dv && ptr_seen[i] && prev.k == 0;
        if (locked[i] && prev.ch == CHS[i] && prev.pos == 36) ptr_seen[i] = 1;
        checks++;
        if (data_valid[i] != exp_dv || sfs[i] != exp_sfs || (exp_dv && data_out[i] != prev.d)) begin
          failures++;
          if (failures < 20)
            $display("FAIL ch %0d pos %0d k %0d: dv=%0b/%0b sfs=%0b/%0b data %h/%h", CHS[i], prev.pos,
                     prev.k, data_valid[i], exp_dv, sfs[i], exp_sfs, data_out[i], prev.d);
        end
        n_sfs += sfs[i];
        n_dv  += data_valid[i];
      end
      r = g.next();
      dtbpay = r.pay; dtbdata = r.d; v1 = r.v1;
      col_address = (r.col >= 0) ? 9'(r.col) : 9'd300;
      prev = r;
    end
    checks++;
    if (n_sfs < 6) begin failures++; $display("FAIL: only %0d superframe starts", n_sfs); end
    $display("superframe starts %0d, valid bytes %0d", n_sfs, n_dv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
