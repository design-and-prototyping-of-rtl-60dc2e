// tb_ems_pkg -- checks the channel-to-column table and the V5 address rule of ems_pkg.
// The column of a channel is compared with values listed for the original design's ROM (channels
// 1-4, 22, 40, 62, 63) and, for every channel, with a column found by counting TUG-3, TUG-2 and
// TU-12 numbers; the V5 address is compared for all 140 valid offsets with a walk along the TU-12
// that skips the V-bytes (sdh_tb_pkg::v5_pos_of).
`timescale 1ns/1ps
module tb_ems_pkg;
  import ems_pkg::*;
  import sdh_tb_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cols [int];
    exp_cols[1] = 9;  exp_cols[2] = 30; exp_cols[3] = 51; exp_cols[4] = 12;
    exp_cols[22] = 10; exp_cols[40] = 28; exp_cols[62] = 50; exp_cols[63] = 71;
    foreach (exp_cols[c])
      check(channel_column(6'(c)) == 7'(exp_cols[c]), $sformatf("column of channel %0d", c));
    check(channel_column(6'd0) == 7'h7F, "channel 0 is unused");
    for (int c = 1; c <= 63; c++) begin
      int col;
      col = int'(channel_column(6'(c)));
      check(channel_of_column(col) == c, $sformatf("channel %0d maps back from column %0d", c, col));
    end
    for (int off = 0; off < 140; off++)
      check(int'(v5_address(10'(off))) == v5_pos_of(off), $sformatf("V5 address of offset %0d", off));
    check(v5_address(10'd140) == 8'hFF, "offset 140 is invalid");
    check(vc12_byte_kind(8'd107) == VB_S2 && vc12_byte_kind(8'd106) == VB_CTRL_S1 &&
          vc12_byte_kind(8'd71) == VB_CTRL && vc12_byte_kind(8'd105) == VB_POH &&
          vc12_byte_kind(8'd139) == VB_FIXED && vc12_byte_kind(8'd2) == VB_DATA, "byte kinds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
