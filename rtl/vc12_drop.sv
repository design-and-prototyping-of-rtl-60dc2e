// vc12_drop -- the VC12Drop block: demaps one VC-12 onto an E1 output.
//
// Telecom Bus side (dtbyck): the VC-12 bytes from v5_enable are numbered 0..139 from V5
// (super_frame_start). The E1 bits they carry are written into a 64-bit circular FIFO: all bits
// of the 127 data bytes, S1 when two or more of the three C1 bits are 1, S2 when two or more of
// the C2 bits are 1, and the seven I bits of byte 107 (layout in ems_pkg). A byte is accepted on
// one bus cycle and then shifted into the FIFO one bit per cycle; channel bytes arrive at least
// 63 bus cycles apart, so the 8-bit serializer is always empty again in time. Nothing is written
// before the first V5.
//
// E1 side (ck65_536): a counter divides the 65.536 MHz reference clock by limitCounterClock + 1
// to make CKE1OUT. Reading begins once the FIFO holds 32 bits (half of it), and from then on one
// bit is read per CKE1OUT period. DELTA, the FIFO fill, drives a hysteresis controller: it stays
// at the nominal divide-by-32 (2.048 MHz) while DELTA lies between the limits, switches to
// divide-by-31 (about 2.114 MHz) when DELTA reaches 48 and to divide-by-33 (about 1.986 MHz) when
// DELTA falls to 16, and goes back to divide-by-32 when DELTA returns to 32. These numbers are
// those of the original design. The controller is updated once per CKE1OUT period, at the moment a
// bit is read.
//
// Timing: CKE1OUT is high for the first 16 reference-clock cycles of each period. E1OUT changes
// with the rising edge of CKE1OUT and is meant to be sampled on its falling edge (this design's
// choice). E1OUT is 0 until reading begins. rst_n resets both clock domains asynchronously.
module vc12_drop
  import ems_pkg::*;
#(
  parameter int unsigned FIFO_BITS = 64,
  parameter int unsigned HYST_MIN  = 16,
  parameter int unsigned HYST_MID  = 32,
  parameter int unsigned HYST_MAX  = 48,
  parameter int unsigned DIV_NOM   = 32,
  localparam int unsigned AW = $clog2(FIFO_BITS)
) (
  input  logic          dtbyck,
  input  logic          ck65_536,
  input  logic          rst_n,
  input  logic [7:0]    data_in,            // VC-12 byte from v5_enable
  input  logic          data_valid,
  input  logic          super_frame_start,
  output logic          e1out,
  output logic          cke1out,
  output logic [AW-1:0] delta,              // FIFO fill, in the ck65_536 domain
  output logic [5:0]    limit_counter_clock,// current divider limit: 30, 31 or 32
  output just_mode_t    mode
);

  // ------------------------------------------------------------ Telecom Bus side
  logic       aligned_q;
  logic [7:0] idx_q;
  logic [1:0] c1_votes_q, c2_votes_q;
  logic       s2_data_q;
  logic [7:0] ser_q;          // bits waiting to enter the FIFO, MSB first
  logic [3:0] ser_cnt_q;

  logic [7:0] cur_idx;
  assign cur_idx = super_frame_start ? 8'd0 : idx_q + 8'd1;

  logic [1:0] c1_total, c2_total;
  assign c1_total = c1_votes_q + 2'(data_in[7]);
  assign c2_total = c2_votes_q + 2'(data_in[6]);

  always_ff @(posedge dtbyck or negedge rst_n) begin
    if (!rst_n) begin
      aligned_q  <= 1'b0;
      idx_q      <= '0;
      c1_votes_q <= '0;
      c2_votes_q <= '0;
      s2_data_q  <= 1'b0;
      ser_q      <= '0;
      ser_cnt_q  <= '0;
    end else begin
      if (ser_cnt_q != 4'd0) begin
        ser_q     <= {ser_q[6:0], 1'b0};
        ser_cnt_q <= ser_cnt_q - 4'd1;
      end
      if (data_valid && (aligned_q || super_frame_start)) begin
        aligned_q <= 1'b1;
        idx_q     <= cur_idx;
        unique case (vc12_byte_kind(cur_idx))
          VB_DATA: begin
            ser_q     <= data_in;
            ser_cnt_q <= 4'd8;
          end
          VB_CTRL: begin
            c1_votes_q <= (cur_idx == 8'd36) ? 2'(data_in[7]) : c1_total;
            c2_votes_q <= (cur_idx == 8'd36) ? 2'(data_in[6]) : c2_total;
          end
          VB_CTRL_S1: begin
            s2_data_q <= c2_total >= 2'd2;
            if (c1_total >= 2'd2) begin
              ser_q     <= {data_in[0], 7'b0};
              ser_cnt_q <= 4'd1;
            end
          end
          VB_S2: begin
            if (s2_data_q) begin
              ser_q     <= data_in;
              ser_cnt_q <= 4'd8;
            end else begin
              ser_q     <= {data_in[6:0], 1'b0};
              ser_cnt_q <= 4'd7;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ FIFO
  logic       rd_bit;
  logic       rd_en;
  logic [AW-1:0] rd_ptr, wr_ptr_sync;

  bit_fifo #(.DEPTH(FIFO_BITS), .RBITS(1)) u_fifo (
    .wclk        (dtbyck),
    .wrst_n      (rst_n),
    .wen         (ser_cnt_q != 4'd0),
    .wbit        (ser_q[7]),
    .rclk        (ck65_536),
    .rrst_n      (rst_n),
    .rcount      (rd_en),
    .rdata       (rd_bit),
    .delta       (delta),
    .rd_ptr      (rd_ptr),
    .wr_ptr_sync (wr_ptr_sync)
  );

  // ------------------------------------------------------------ E1 side
  logic [5:0] div_cnt_q;
  logic       started_q;
  logic       tick;

  assign tick  = (div_cnt_q == limit_counter_clock);
  assign rd_en = tick && started_q;

  always_ff @(posedge ck65_536 or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt_q           <= '0;
      limit_counter_clock <= 6'(DIV_NOM - 1);
      mode                <= JUST_NORMAL;
      started_q           <= 1'b0;
      e1out               <= 1'b0;
    end else begin
      div_cnt_q <= tick ? 6'd0 : div_cnt_q + 6'd1;
      if (!started_q && delta >= AW'(HYST_MID)) started_q <= 1'b1;
      if (rd_en) begin
        e1out <= rd_bit;
        unique case (mode)
          JUST_NORMAL:
            if (delta >= AW'(HYST_MAX))      mode <= JUST_FAST;
            else if (delta <= AW'(HYST_MIN)) mode <= JUST_SLOW;
          JUST_FAST: if (delta <= AW'(HYST_MID)) mode <= JUST_NORMAL;
          JUST_SLOW: if (delta >= AW'(HYST_MID)) mode <= JUST_NORMAL;
          default:   mode <= JUST_NORMAL;
        endcase
      end
      if (tick) begin
        unique case (mode)
          JUST_FAST: limit_counter_clock <= 6'(DIV_NOM - 2);
          JUST_SLOW: limit_counter_clock <= 6'(DIV_NOM);
          default:   limit_counter_clock <= 6'(DIV_NOM - 1);
        endcase
      end
    end
  end

  assign cke1out = (div_cnt_q < 6'(DIV_NOM / 2));

endmodule
