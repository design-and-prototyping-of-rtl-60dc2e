// ems_pkg -- shared geometry, types and helper functions of the E1 mapper/demapper (EMS).
//
// The core moves E1 (2.048 Mbit/s) tributaries in and out of an STM-1 frame carried on a
// byte-wide Telecom Bus at 19.44 MHz. One STM-1 frame is 9 rows x 270 byte columns: 9 columns of
// transport overhead, then the VC-4 (261 columns). VC-4 column 0 is the path overhead (J1 in row 0,
// H4 in row 5), columns 1..8 are fixed stuffing, and columns 9..260 hold 63 interleaved TU-12s, each
// owning 4 columns that lie 63 columns apart. Four frames form a TU-12 multiframe ("superframe")
// of 144 TU-12 bytes: the pointer bytes V1, V2, V3, V4 sit at TU-12 byte 0, 36, 72 and 108, and
// the remaining 140 bytes carry the VC-12, which starts at the V5 byte that V1/V2 point to.
//
// VC-12 layout (byte 0 = V5), asynchronous E1 mapping:
//    0 V5 | 1 R | 2..33 data | 34 R | 35 J2 | 36 C1 C2 O O O O R R | 37..68 data | 69 R |
//   70 N2 | 71 C1 C2 O O O O R R | 72..103 data | 104 R | 105 K4 | 106 C1 C2 R R R R R S1 |
//  107 S2 I I I I I I I | 108..138 data | 139 R
// which gives 1023 fixed data bits plus the two justification opportunity bits S1 and S2.
// Following the description this core was built from, a majority of ones among the three Cn bits
// marks Sn as a data bit; the nominal superframe carries S2 only (1024 bits), a "fast" one S1 and
// S2 (1025 bits) and a "slow" one neither (1023 bits).
//
// channel_column() gives the first VC-4 column of a TU-12 channel (1..63). It follows the
// channel numbering of the original design: channel n-1 = 21*(K-1) + 3*(L-1) + (M-1) for TUG-3 K,
// TUG-2 L and TU-12 M, and the column is 9 + (K-1) + 3*(L-1) + 21*(M-1); channel 1 -> column 9,
// channel 2 -> 30, channel 4 -> 12, channel 22 -> 10, channel 63 -> 71. Channel 0 means "none" and
// returns 127, a value the column counter never takes.
//
// v5_address() turns the 10-bit TU-12 pointer offset (V1[1:0] & V2) into the TU-12 byte number
// of V5, skipping the V-bytes: offsets 0..34 -> +37, 35..69 -> +38, 70..104 -> +39,
// 105..139 -> -104. An offset above 139 is invalid and returns 255, which never matches.
package ems_pkg;

  localparam int unsigned TOH_COLS      = 9;
  localparam int unsigned VC4_COLS      = 261;
  localparam int unsigned ROWS          = 9;
  localparam int unsigned TU12_COL0     = 9;    // first TU-12 column inside the VC-4
  localparam int unsigned TU12_SPACING  = 63;   // distance between the 4 columns of one TU-12
  localparam int unsigned TU12_BYTES    = 144;  // TU-12 bytes per superframe
  localparam int unsigned VC12_BYTES    = 140;  // VC-12 bytes per superframe
  localparam int unsigned H4_ROW        = 5;    // row of H4 in the VC-4 path overhead
  localparam int unsigned N_CHANNELS    = 63;
  localparam int unsigned BUFFER_CYCLES = 9;    // Telecom Bus in -> out latency

  // Justification state shared by the drop and add hysteresis controllers.
  typedef enum logic [1:0] {
    JUST_NORMAL = 2'd0,  // nominal: one of S1/S2 carries data / clock divided by 32
    JUST_FAST   = 2'd1,  // both S1 and S2 carry data / clock divided by 31
    JUST_SLOW   = 2'd2   // neither carries data / clock divided by 33
  } just_mode_t;

  // Kind of a VC-12 byte, indexed by its position 0..139 after V5.
  typedef enum logic [2:0] {
    VB_POH,    // V5, J2, N2, K4: path overhead, passed through
    VB_FIXED,  // R: fixed stuffing byte
    VB_CTRL,   // C1 C2 O O O O R R (bytes 36 and 71)
    VB_CTRL_S1,// C1 C2 R R R R R S1 (byte 106)
    VB_S2,     // S2 + seven data bits (byte 107)
    VB_DATA    // eight E1 data bits
  } vc12_byte_t;

  function automatic logic [6:0] channel_column(input logic [5:0] channel);
    int unsigned idx, k, l, m;
    if (channel == 6'd0) return 7'h7F;
    idx = int'(channel) - 1;
    k   = idx / 21;
    l   = (idx / 3) % 7;
    m   = idx % 3;
    return 7'(TU12_COL0 + k + 3 * l + 21 * m);
  endfunction

  function automatic logic [7:0] v5_address(input logic [9:0] offset);
    if (offset <= 10'd34)       return 8'(offset + 10'd37);
    else if (offset <= 10'd69)  return 8'(offset + 10'd38);
    else if (offset <= 10'd104) return 8'(offset + 10'd39);
    else if (offset <= 10'd139) return 8'(offset - 10'd104);
    else                        return 8'hFF;
  endfunction

  function automatic vc12_byte_t vc12_byte_kind(input logic [7:0] k);
    case (k)
      8'd0, 8'd35, 8'd70, 8'd105:         return VB_POH;
      8'd1, 8'd34, 8'd69, 8'd104, 8'd139: return VB_FIXED;
      8'd36, 8'd71:                       return VB_CTRL;
      8'd106:                             return VB_CTRL_S1;
      8'd107:                             return VB_S2;
      default:                            return VB_DATA;
    endcase
  endfunction

  // True for a TU-12 pointer byte position (V1..V4).
  function automatic logic is_v_byte(input logic [7:0] pos);
    return (pos == 8'd0) || (pos == 8'd36) || (pos == 8'd72) || (pos == 8'd108);
  endfunction

endpackage
