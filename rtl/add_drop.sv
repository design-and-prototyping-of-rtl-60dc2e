// add_drop -- one E1 channel of the mapper: the AddDrop block.
//
// Groups the per-channel blocks: v5_enable finds the channel's VC-12 bytes on the Telecom Bus,
// vc12_drop demaps them onto E1OUT/CKE1OUT, vc12_add maps E1IN/CKE1IN into replacement bytes,
// and delay_line turns v5_enable's dataValid into the 'replace' strobe for the output
// multiplexer. A core for n channels instantiates this block n times next to one shared
// column_address, Telecom Bus buffer and multiplexer; the channels run concurrently, so the
// latency does not grow with n.
//
// The add direction reuses the TU-12 pointer of the incoming signal: every VC-12 byte of the
// channel (all TU-12 bytes except V1..V4) is replaced, and the V-bytes and the path overhead
// bytes travel through unchanged.
//
// Timing: 'replace' and 'data_to_insert' refer to the byte that left the 9-cycle Telecom Bus
// buffer in the same cycle, i.e. the byte that was on dtbdata 9 dtbyck cycles earlier.
module add_drop
  import ems_pkg::*;
(
  input  logic       dtbyck,
  input  logic       ck65_536,
  input  logic       rst_n,
  input  logic [5:0] channel,
  input  logic       dtbpay,
  input  logic [7:0] dtbdata,
  input  logic [8:0] col_address,
  input  logic       v1,
  output logic       replace,
  output logic [7:0] data_to_insert,
  output logic       e1out,
  output logic       cke1out,
  input  logic       e1in,
  input  logic       cke1in
);

  logic [7:0] data_out;
  logic       data_valid, super_frame_start;

  v5_enable u_v5 (
    .dtbyck, .rst_n, .channel, .dtbpay, .dtbdata, .col_address, .v1,
    .data_out, .data_valid, .super_frame_start
  );

  delay_line #(.DEPTH(BUFFER_CYCLES - 1), .WIDTH(1)) u_delay (
    .clk (dtbyck), .rst_n, .d (data_valid), .q (replace)
  );

  logic [5:0]  drop_delta;
  logic [5:0]  drop_limit;
  just_mode_t  drop_mode;

  vc12_drop u_drop (
    .dtbyck, .ck65_536, .rst_n,
    .data_in (data_out), .data_valid, .super_frame_start,
    .e1out, .cke1out,
    .delta (drop_delta), .limit_counter_clock (drop_limit), .mode (drop_mode)
  );

  logic [6:0]  add_delta;
  just_mode_t  add_mode;
  logic        add_running;

  vc12_add u_add (
    .dtbyck, .cke1in, .rst_n, .e1in,
    .data_in (data_out), .data_valid, .super_frame_start,
    .data_to_insert,
    .delta (add_delta), .mode (add_mode), .running (add_running)
  );

endmodule
