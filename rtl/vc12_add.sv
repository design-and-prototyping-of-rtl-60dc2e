// vc12_add -- the VC12Add block: maps one E1 input into a VC-12 with bit justification.
//
// E1 side (cke1in): e1in is sampled on every rising edge of CKE1IN and written into a 128-bit
// circular FIFO.
//
// Telecom Bus side (dtbyck): the channel's incoming VC-12 bytes (from v5_enable) are numbered
// 0..139 from V5, and for each one the block prepares the byte that replaces it on the outgoing
// bus (data_to_insert, layout in ems_pkg):
//   * V5, J2, N2, K4 (path overhead) are passed through unchanged;
//   * the fixed stuffing bytes R and the O/R bits of the control bytes are sent as 0;
//   * data bytes take the next 8 FIFO bits, the first-received bit in the MSB;
//   * C1 and C2 are repeated in bytes 36, 71 and 106; S1 (byte 106, bit 0) and S2 (byte 107,
//     bit 7) carry a FIFO bit when the matching C bits are 1 and are 0 otherwise.
// The justification choice is made once per superframe, on V5, from DELTA, the FIFO fill, by a
// hysteresis controller like the one of VC12Drop, with the limits of the original design:
// minimum 32, middle 64, maximum 96. Normal mode (C1 = 0, C2 = 1) carries 1024 bits per
// superframe; when DELTA reaches 96 the block turns to fast mode (C1 = C2 = 1, 1025 bits) and
// when DELTA falls to 32 to slow mode (C1 = C2 = 0, 1023 bits); either returns to normal when
// DELTA is back at 64. Mapping starts on the first V5 at which the FIFO holds 64 bits (half);
// until then the superframes are sent in normal mode with all data bits 0, and the FIFO is kept
// at half full by discarding its oldest bit whenever it holds more (this design's choice: without
// it the fill count, taken modulo the FIFO size, could wrap before the first V5). Before the first V5 the incoming bytes are passed through.
//
// Timing: data_to_insert is loaded on the rising edge of dtbyck after data_valid and holds until
// the next channel byte, which is at least 63 cycles later. The Delay block times the 'replace'
// strobe so that the output multiplexer picks this byte 9 cycles after the original byte was on
// the bus. rst_n resets both clock domains asynchronously.
module vc12_add
  import ems_pkg::*;
#(
  parameter int unsigned FIFO_BITS = 128,
  parameter int unsigned HYST_MIN  = 32,
  parameter int unsigned HYST_MID  = 64,
  parameter int unsigned HYST_MAX  = 96,
  localparam int unsigned AW = $clog2(FIFO_BITS)
) (
  input  logic          dtbyck,
  input  logic          cke1in,
  input  logic          rst_n,
  input  logic          e1in,
  input  logic [7:0]    data_in,            // incoming VC-12 byte from v5_enable
  input  logic          data_valid,
  input  logic          super_frame_start,
  output logic [7:0]    data_to_insert,
  output logic [AW-1:0] delta,              // FIFO fill, in the dtbyck domain
  output just_mode_t    mode,               // justification of the current superframe
  output logic          running             // mapping of E1 data has begun
);

  logic [7:0]    rdata;
  logic [3:0]    rcount;
  logic [AW-1:0] rd_ptr, wr_ptr_sync;

  bit_fifo #(.DEPTH(FIFO_BITS), .RBITS(8)) u_fifo (
    .wclk        (cke1in),
    .wrst_n      (rst_n),
    .wen         (1'b1),
    .wbit        (e1in),
    .rclk        (dtbyck),
    .rrst_n      (rst_n),
    .rcount      (rcount),
    .rdata       (rdata),
    .delta       (delta),
    .rd_ptr      (rd_ptr),
    .wr_ptr_sync (wr_ptr_sync)
  );

  logic       aligned_q;
  logic [7:0] idx_q;
  logic [7:0] cur_idx;
  logic       accept;
  assign cur_idx = super_frame_start ? 8'd0 : idx_q + 8'd1;
  assign accept  = data_valid && (aligned_q || super_frame_start);

  // Justification decided for the superframe that starts with this byte (used from byte 36 on).
  logic c1, c2;
  assign c1 = (mode == JUST_FAST);
  assign c2 = (mode != JUST_SLOW);

  logic [7:0] byte_out;
  always_comb begin
    byte_out = 8'h00;
    rcount   = 4'd0;
    if (accept) begin
      unique case (vc12_byte_kind(cur_idx))
        VB_POH:   byte_out = data_in;
        VB_FIXED: byte_out = 8'h00;
        VB_CTRL:  byte_out = {c1, c2, 6'b0};
        VB_CTRL_S1: begin
          byte_out = {c1, c2, 5'b0, c1 && running && rdata[7]};
          rcount   = (c1 && running) ? 4'd1 : 4'd0;
        end
        VB_S2: begin
          if (!running)  byte_out = 8'h00;
          else if (c2) begin
            byte_out = rdata;
            rcount   = 4'd8;
          end else begin
            byte_out = {1'b0, rdata[7:1]};
            rcount   = 4'd7;
          end
        end
        VB_DATA: begin
          byte_out = running ? rdata : 8'h00;
          rcount   = running ? 4'd8 : 4'd0;
        end
        default: ;
      endcase
    end
    // Until mapping begins, hold the FIFO at half full by dropping its oldest bit, so that the
    // fill cannot wrap around before the first superframe start.
    if (!running && delta > AW'(HYST_MID)) rcount = 4'd1;
  end

  always_ff @(posedge dtbyck or negedge rst_n) begin
    if (!rst_n) begin
      aligned_q      <= 1'b0;
      idx_q          <= '0;
      mode           <= JUST_NORMAL;
      running        <= 1'b0;
      data_to_insert <= '0;
    end else if (data_valid) begin
      if (accept) begin
        aligned_q      <= 1'b1;
        idx_q          <= cur_idx;
        data_to_insert <= byte_out;
        if (cur_idx == 8'd0) begin
          if (!running) begin
            if (delta >= AW'(HYST_MID)) running <= 1'b1;
          end else begin
            unique case (mode)
              JUST_NORMAL:
                if (delta >= AW'(HYST_MAX))      mode <= JUST_FAST;
                else if (delta <= AW'(HYST_MIN)) mode <= JUST_SLOW;
              JUST_FAST: if (delta <= AW'(HYST_MID)) mode <= JUST_NORMAL;
              JUST_SLOW: if (delta >= AW'(HYST_MID)) mode <= JUST_NORMAL;
              default:   mode <= JUST_NORMAL;
            endcase
          end
        end
      end else begin
        data_to_insert <= data_in;
      end
    end
  end

endmodule
