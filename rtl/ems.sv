// ems -- E1 mapper/demapper core (EMS): N E1 channels added to and dropped from an STM-1.
//
// The STM-1 arrives on a byte-wide Telecom Bus (DTBDATA, with DTBPAY marking payload bytes and
// DTBJ0J1 marking J0 and J1) clocked at 19.44 MHz. One column_address numbers the VC-4 columns
// for all channels. Each of the N AddDrop channels, set by its CHANNEL input to one of the 63
// TU-12s (0 = idle), drops that TU-12's VC-12 onto its E1OUT/CKE1OUT pair and maps its E1IN/CKE1IN
// pair into the same VC-12 of the outgoing bus. The incoming bytes pass a 9-cycle buffer; the
// multiplexer behind it replaces the bytes of every active channel and leaves all others as they
// came, so DTBDATAOUT is DTBDATA delayed by 9 cycles with the chosen VC-12s rewritten.
// N = 63 (the default) is the full-capacity configuration; N = 1 is the basic single-channel
// core.
//
// Clocks: dtbyck (19.44 MHz Telecom Bus clock), ck65_536 (65.536 MHz reference from which each
// channel divides its CKE1OUT), and one cke1in per channel. The original interface also lists
// ck32_768 (32.768 MHz) without saying what it clocks; it is brought in for interface
// compatibility and is not used. The original drawing shows DTBYCK leaving the core; a core fed
// only with the 32.768/65.536 MHz references cannot make 19.44 MHz, so here DTBYCK is the bus
// clock input that times DTBDATA and DTBDATAOUT.
//
// Reset: rst_n, asynchronous and active low, resets every clock domain.
module ems
  import ems_pkg::*;
#(
  parameter int unsigned N_CH = 63
) (
  input  logic            rst_n,
  input  logic            ck32_768,
  input  logic            ck65_536,
  input  logic            dtbyck,
  input  logic            dtbpay,
  input  logic            dtbj0j1,
  input  logic [7:0]      dtbdata,
  output logic [7:0]      dtbdataout,
  input  logic [5:0]      channel [N_CH],
  input  logic [N_CH-1:0] e1in,
  input  logic [N_CH-1:0] cke1in,
  output logic [N_CH-1:0] e1out,
  output logic [N_CH-1:0] cke1out
);

  logic [8:0] col_address;
  logic       j1, v1;

  column_address u_col (
    .dtbyck, .rst_n, .dtbpay, .dtbj0j1, .dtbdata, .col_address, .j1, .v1
  );

  logic [7:0] buffered;
  dtb_buffer #(.DEPTH(BUFFER_CYCLES), .WIDTH(8)) u_buf (
    .clk (dtbyck), .rst_n, .d (dtbdata), .q (buffered)
  );

  logic [N_CH-1:0] replace;
  logic [7:0]      insert_data [N_CH];

  for (genvar i = 0; i < int'(N_CH); i++) begin : g_ch
    add_drop u_ad (
      .dtbyck, .ck65_536, .rst_n,
      .channel (channel[i]), .dtbpay, .dtbdata, .col_address, .v1,
      .replace (replace[i]), .data_to_insert (insert_data[i]),
      .e1out (e1out[i]), .cke1out (cke1out[i]),
      .e1in (e1in[i]), .cke1in (cke1in[i])
    );
  end

  // Each TU-12 may be served by one channel only, so at most one channel replaces a byte.
  a_one_replace: assert property (@(posedge dtbyck) disable iff (!rst_n) $onehot0(replace))
    else $error("ems: several channels replace the same byte; check the CHANNEL inputs");

  insert_mux #(.N(N_CH)) u_mux (
    .bypass_data (buffered), .replace, .insert_data, .dout (dtbdataout)
  );

endmodule
