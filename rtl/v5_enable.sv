// v5_enable -- the V5Enable block: finds one channel's VC-12 bytes on the Telecom Bus.
//
// The selected channel (1..63; 0 = none) owns four VC-4 columns: the first comes from
// channel_column() and the others are 63, 126 and 189 columns further on. A payload byte in one
// of them is a TU-12 byte of the channel. The block counts these bytes with counter144 (0..143),
// which is set to 0 on the first channel byte after the v1 mark from column_address; that byte is
// V1. Bytes 0, 36, 72 and 108 are the pointer bytes V1..V4 and are removed; every other TU-12 byte
// is a VC-12 byte and is presented on data_out with data_valid high. The pointer offset is
// V1[1:0] & V2; v5_address() turns it into the TU-12 byte number of V5, and super_frame_start is
// raised together with data_valid on that byte. The offset of the last completed V1/V2 pair is
// used, so an offset that places V5 ahead of V2 works from the second superframe on.
//
// Pointer justification (increment/decrement via inverted I/D bits) and the new-data flag are not
// handled: the original design describes only the offset decode.
//
// Timing: registered. data_out, data_valid and super_frame_start describe the byte that was on
// the bus one rising edge of dtbyck earlier. rst_n is asynchronous, active low.
module v5_enable
  import ems_pkg::*;
(
  input  logic       dtbyck,
  input  logic       rst_n,
  input  logic [5:0] channel,            // selected channel 1..63, 0 disables the channel
  input  logic       dtbpay,
  input  logic [7:0] dtbdata,
  input  logic [8:0] col_address,        // from column_address
  input  logic       v1,                 // from column_address
  output logic [7:0] data_out,           // VC-12 byte
  output logic       data_valid,         // data_out holds a VC-12 byte of this channel
  output logic       super_frame_start   // data_out is V5
);

  logic [8:0] c1, c2, c3, c4;
  logic       valid_column;

  always_comb begin
    c1 = {2'b00, channel_column(channel)};
    c2 = c1 + 9'd63;
    c3 = c1 + 9'd126;
    c4 = c1 + 9'd189;
    valid_column = dtbpay && (channel != 6'd0) &&
                   (col_address == c1 || col_address == c2 ||
                    col_address == c3 || col_address == c4);
  end

  logic       v1_pending_q;   // v1 seen, next channel byte is V1
  logic       locked_q;       // counter144 is aligned to the TU-12 superframe
  logic [7:0] counter144_q;   // TU-12 byte number of the last channel byte
  logic [7:0] v1_byte_q;
  logic [7:0] v5_addr_q;
  logic       ptr_valid_q;

  logic [7:0] cur_pos;
  assign cur_pos = v1_pending_q ? 8'd0 :
                   (counter144_q == 8'(TU12_BYTES - 1)) ? 8'd0 : counter144_q + 8'd1;

  always_ff @(posedge dtbyck or negedge rst_n) begin
    if (!rst_n) begin
      v1_pending_q      <= 1'b0;
      locked_q          <= 1'b0;
      counter144_q      <= '0;
      v1_byte_q         <= '0;
      v5_addr_q         <= 8'hFF;
      ptr_valid_q       <= 1'b0;
      data_out          <= '0;
      data_valid        <= 1'b0;
      super_frame_start <= 1'b0;
    end else begin
      data_valid        <= 1'b0;
      super_frame_start <= 1'b0;
      if (v1) v1_pending_q <= 1'b1;
      if (valid_column) begin
        v1_pending_q <= 1'b0;
        counter144_q <= cur_pos;
        if (v1_pending_q) locked_q <= 1'b1;
        if (locked_q || v1_pending_q) begin
          if (cur_pos == 8'd0) v1_byte_q <= dtbdata;
          if (cur_pos == 8'd36) begin
            v5_addr_q   <= v5_address({v1_byte_q[1:0], dtbdata});
            ptr_valid_q <= 1'b1;
          end
          if (!is_v_byte(cur_pos)) begin
            data_valid        <= 1'b1;
            data_out          <= dtbdata;
            super_frame_start <= ptr_valid_q && (cur_pos == v5_addr_q);
          end
        end
      end
    end
  end

endmodule
