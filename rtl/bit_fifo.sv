// bit_fifo -- dual-clock circular bit FIFO with a DELTA fill output, used by VC12Drop and VC12Add.
//
// DEPTH one-bit cells form a circular buffer. The write side stores one bit per rising edge of
// wclk when wen is high. The read side presents the RBITS oldest bits on rdata (rdata[RBITS-1] is
// the oldest) and, on a rising edge of rclk, drops rcount of them (0..RBITS). The fill level
// DELTA is computed in the read clock domain as in the original design: with writeCount and
// readCount the two circular pointers, DELTA = writeCount - readCount when readCount <= writeCount
// and FIFO size - readCount + writeCount otherwise, i.e. the pointer difference modulo DEPTH.
// A completely full FIFO therefore reads as 0; the hysteresis controllers keep DELTA far from both
// ends, and the original design relies on the same sizing.
//
// Clock crossing (this design's choice; the original used dual-port block RAM and does not
// describe it): the write pointer advances by at most one per wclk edge, so it crosses into the
// read domain Gray-coded through two flip-flops. DELTA therefore lags the writes by two to three
// rclk cycles. The memory cells are written in the wclk domain and read in the rclk domain; a cell
// is only read after the pointer that covers it has crossed, so it is stable when read.
// No read pointer is sent back: the writer never checks for a full FIFO. The hysteresis control
// around it keeps it from filling.
//
// Reset: wrst_n and rrst_n are asynchronous, active low, and clear the pointers of their domain.
module bit_fifo #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned RBITS = 1,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(RBITS + 1)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic             wbit,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic [CW-1:0]    rcount,
  output logic [RBITS-1:0] rdata,
  output logic [AW-1:0]    delta,
  output logic [AW-1:0]    rd_ptr,
  output logic [AW-1:0]    wr_ptr_sync
);

  logic [DEPTH-1:0] mem_q;

  // ---- write domain ----
  logic [AW-1:0] wptr_q, wgray_q;
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr_q  <= '0;
      wgray_q <= '0;
    end else if (wen) begin
      wptr_q  <= wptr_q + 1'b1;
      wgray_q <= (wptr_q + 1'b1) ^ ((wptr_q + 1'b1) >> 1);
    end
  end

  always_ff @(posedge wclk) begin
    if (wen) mem_q[wptr_q] <= wbit;
  end

  // ---- read domain ----
  logic [AW-1:0] wgray_s1_q, wgray_s2_q, wptr_r, rptr_q;
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      wgray_s1_q <= '0;
      wgray_s2_q <= '0;
    end else begin
      wgray_s1_q <= wgray_q;
      wgray_s2_q <= wgray_s1_q;
    end
  end

  always_comb begin
    wptr_r[AW-1] = wgray_s2_q[AW-1];
    for (int i = int'(AW) - 2; i >= 0; i--) wptr_r[i] = wptr_r[i+1] ^ wgray_s2_q[i];
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) rptr_q <= '0;
    else         rptr_q <= rptr_q + AW'(rcount);
  end

  always_comb begin
    for (int i = 0; i < int'(RBITS); i++)
      rdata[int'(RBITS) - 1 - i] = mem_q[AW'(rptr_q + AW'(i))];
  end

  assign delta       = wptr_r - rptr_q;
  assign rd_ptr      = rptr_q;
  assign wr_ptr_sync = wptr_r;

endmodule
