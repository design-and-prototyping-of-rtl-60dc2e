// column_address -- VC-4 column counter of the Telecom Bus (ColumnAddress block).
//
// Watches the Telecom Bus control signals and numbers every payload byte with its VC-4 column
// (0..260). A payload byte marked with J0J1 is J1, the first byte of a VC-4: it is column 0 and
// row 0. The count then advances on every byte with PAY high and wraps after column 260, so the
// VC-4 may float anywhere in the STM-1 payload, as the AU-4 pointer allows. The column number is
// what lets each AddDrop channel find its own four TU-12 columns.
//
// The block also marks the start of a TU-12 multiframe ("superframe"): v1 pulses on the J1 byte
// of the VC-4 whose TU-12 bytes begin with V1. The original design names this output but does not
// say how the multiframe phase is found; this design uses the standard multiframe indicator, the
// two low bits of H4 (VC-4 path overhead, row 5): the value H4[1:0] received in one VC-4 is the
// multiframe phase (0 = V1, 1 = V2, 2 = V3, 3 = V4) of the next one. No v1 is given before the
// first H4 has been seen.
//
// Timing: outputs are combinational and belong to the byte on the bus in the same cycle. The
// counter state is updated on the rising edge of dtbyck; rst_n is an asynchronous active-low reset.
module column_address
  import ems_pkg::*;
(
  input  logic       dtbyck,       // Telecom Bus clock, 19.44 MHz
  input  logic       rst_n,
  input  logic       dtbpay,       // byte belongs to the STM-1 payload (AU-4)
  input  logic       dtbj0j1,      // J0 (with PAY low) or J1 (with PAY high)
  input  logic [7:0] dtbdata,
  output logic [8:0] col_address,  // VC-4 column of the current payload byte
  output logic       j1,           // current byte is J1
  output logic       v1            // current byte is J1 of a VC-4 that starts a TU-12 superframe
);

  logic [8:0] next_col_q;          // column the next payload byte will have
  logic [3:0] row_q;               // VC-4 row of the current column count
  logic [1:0] h4_phase_q;          // multiframe phase announced for the next VC-4
  logic       h4_seen_q;
  logic       locked_q;            // a J1 has been seen

  assign j1          = dtbpay && dtbj0j1;
  assign col_address = j1 ? 9'd0 : next_col_q;
  assign v1          = j1 && h4_seen_q && (h4_phase_q == 2'd0);

  logic [3:0] cur_row;
  assign cur_row = j1 ? 4'd0 : row_q;

  always_ff @(posedge dtbyck or negedge rst_n) begin
    if (!rst_n) begin
      next_col_q <= '0;
      row_q      <= '0;
      h4_phase_q <= '0;
      h4_seen_q  <= 1'b0;
      locked_q   <= 1'b0;
    end else if (dtbpay) begin
      if (j1) locked_q <= 1'b1;
      if (col_address == 9'(VC4_COLS - 1)) begin
        next_col_q <= '0;
        row_q      <= (cur_row == 4'(ROWS - 1)) ? 4'd0 : cur_row + 4'd1;
      end else begin
        next_col_q <= col_address + 9'd1;
        row_q      <= cur_row;
      end
      if ((j1 || locked_q) && col_address == 9'd0 && cur_row == 4'(H4_ROW)) begin
        h4_phase_q <= dtbdata[1:0];
        h4_seen_q  <= 1'b1;
      end
    end
  end

endmodule
