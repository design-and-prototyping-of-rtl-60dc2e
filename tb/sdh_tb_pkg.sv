// sdh_tb_pkg -- testbench models of the Telecom Bus side of an STM-1, shared by the EMS testbenches.
//
//  * bit_src   : PRBS-23 (x^23 + x^18 + 1) bit source; 64-bit windows of it are unique, which
//                lets a checker find where a received stream lines up with the sent one.
//  * vc12_tx   : produces the 144-byte TU-12 superframes of one channel: V1/V2 carrying a chosen
//                pointer offset, V3/V4 = 0, and a VC-12 with the asynchronous E1 mapping. The
//                justification of each superframe (normal 1024, fast 1025, slow 1023 data bits)
//                is taken from mode_next. Every data bit sent is kept in 'sent'.
//  * vc12_rx   : the reverse: follows the TU-12 bytes of one channel, reads the pointer, finds
//                V5, applies the C-bit majority vote and collects the data bits in 'got'.
//  * bus_gen   : produces the Telecom Bus byte by byte (9 rows x 270 columns, 9 overhead columns
//                with J0 marked, the VC-4 starting at payload byte j1_pos with J1 marked, H4 low
//                bits announcing the TU-12 multiframe phase of the next VC-4, stuffing columns 1..8,
//                63 TU-12s interleaved from column 9).
//  * match_streams : finds a 64-bit window common to a reference and a received bit stream and
//                compares everything after it.
// All positions and the pointer-to-V5 walk are computed here by counting, independently of the
// functions the design uses.
package sdh_tb_pkg;

  class bit_src;
    bit [22:0] s;
    function new(int unsigned seed);
      s = 23'(seed) | 23'h1;
    endfunction
    function bit next();
      bit b;
      b = s[22] ^ s[17];
      s = {s[21:0], b};
      return b;
    endfunction
  endclass

  // TU-12 position of V5 for a pointer offset: walk from the byte after V2, skipping V-bytes.
  function automatic int v5_pos_of(int offset);
    int p;
    p = 37;
    for (int i = 0; i < offset; i++) begin
      p = (p + 1) % 144;
      if (p % 36 == 0) p = (p + 1) % 144;
    end
    return p;
  endfunction

  function automatic bit is_v(int pos);
    return (pos % 36) == 0;
  endfunction

  // Channel number (1..63) owning TU-12 column index t = vc4_column - 9 (0..251).
  function automatic int channel_of_column(int vc4_col);
    int t, k, l, m;
    t = (vc4_col - 9) % 63;
    k = t % 3;           // TUG-3
    l = (t / 3) % 7;     // TUG-2
    m = t / 21;          // TU-12
    return 1 + 21 * k + 3 * l + m;
  endfunction

  localparam bit [7:0] POH_VAL [4] = '{8'hA5, 8'h3C, 8'h5A, 8'hC3};

  class vc12_tx;
    int       pos;        // TU-12 position of the next byte
    int       k;          // VC-12 index of the next VC-12 byte, -1 before the first V5
    int       v5pos;
    bit [9:0] offset;
    bit_src   src;
    bit       sent[$];
    int       mode;       // 0 normal, 1 fast, 2 slow
    int       mode_next;
    int       n_sf[3];
    // description of the byte just produced
    int       last_k;
    bit       last_pass;  // V-byte or path overhead
    function new(int unsigned seed, bit [9:0] off);
      src = new(seed);
      offset = off;
      v5pos = v5_pos_of(int'(off));
      pos = 0; k = -1; mode = 0; mode_next = 0;
      n_sf = '{0, 0, 0};
    endfunction
    function bit [7:0] take(int n);  // n data bits, first one in bit n-1
      bit [7:0] b;
      b = 0;
      for (int i = n - 1; i >= 0; i--) begin
        b[i] = src.next();
        sent.push_back(b[i]);
      end
      return b;
    endfunction
    function bit [7:0] vc12_byte(int kk);
      bit c1, c2;
      c1 = (mode == 1);
      c2 = (mode != 2);
      case (kk)
        0:   return POH_VAL[0];
        35:  return POH_VAL[1];
        70:  return POH_VAL[2];
        105: return POH_VAL[3];
        1, 34, 69, 104, 139: return 8'h00;
        36, 71: return {c1, c2, 6'b0};
        106: return {c1, c2, 5'b0, (c1 ? take(1) : 8'h00) & 8'h01};
        107: return c2 ? take(8) : {1'b0, take(7)};
        default: return take(8);
      endcase
    endfunction
    function bit [7:0] next_byte();
      bit [7:0] b;
      last_k = -1;
      last_pass = 1'b1;
      if (pos == 0)        b = {4'b0110, 2'b10, offset[9:8]};
      else if (pos == 36)  b = offset[7:0];
      else if (is_v(pos))  b = 8'h00;
      else begin
        if (pos == v5pos) begin
          k = 0;
          mode = mode_next;
          n_sf[mode]++;
        end
        if (k < 0) b = 8'h00;
        else begin
          b = vc12_byte(k);
          last_k = k;
          last_pass = (k == 0 || k == 35 || k == 70 || k == 105);
          k++;
        end
      end
      pos = (pos + 1) % 144;
      return b;
    endfunction
  endclass

  class vc12_rx;
    int       pos;
    int       k;
    int       v5pos;
    bit [7:0] v1b;
    int       c1v, c2v;
    bit       s2d;
    bit       got[$];
    int       n_sf[3];
    function new();
      pos = 0; k = -1; v5pos = -1; c1v = 0; c2v = 0; s2d = 0;
      n_sf = '{0, 0, 0};
    endfunction
    function void put(int n, bit [7:0] b);
      for (int i = n - 1; i >= 0; i--) got.push_back(b[i]);
    endfunction
    function void push(bit [7:0] b);
      if (pos == 0) v1b = b;
      else if (pos == 36) v5pos = v5_pos_of(int'({v1b[1:0], b}));
      if (!is_v(pos)) begin
        if (v5pos >= 0 && pos == v5pos) k = 0;
        if (k >= 0) begin
          case (k)
            0, 35, 70, 105, 1, 34, 69, 104, 139: ;
            36: begin c1v = b[7]; c2v = b[6]; end
            71: begin c1v += b[7]; c2v += b[6]; end
            106: begin
              c1v += b[7]; c2v += b[6];
              s2d = (c2v >= 2);
              if (c1v >= 2) put(1, b);
              n_sf[(c1v >= 2) ? 1 : (c2v >= 2) ? 0 : 2]++;
            end
            107: put(s2d ? 8 : 7, b);
            default: put(8, b);
          endcase
          k = (k == 139) ? -1 : k + 1;
          if (k < 0) k = 140;   // wait for the next V5
        end
      end
      pos = (pos + 1) % 144;
    endfunction
  endclass

  typedef struct {
    bit       pay;
    bit       j0j1;
    bit [7:0] d;
    int       col;    // VC-4 column, -1 outside a VC-4
    int       n;      // VC-4 number
    bit       v1;     // J1 of a VC-4 that starts a TU-12 superframe (after the first H4)
    int       ch;     // owning channel (0 = none)
    int       pos;    // TU-12 position of a channel byte (0..143)
    int       k;      // VC-12 index of a channel byte, -1 for V-bytes or before V5
    bit       pass;   // channel byte the core must not change (V-byte or path overhead)
  } bus_byte_t;

  class bus_gen;
    int     j1_pos;   // payload byte index of J1 (0..2348)
    int     frame, row, col;
    vc12_tx tx[64];
    function new(int j1p, int unsigned seed, bit [9:0] off0);
      j1_pos = j1p;
      frame = 0; row = 0; col = 0;
      for (int c = 1; c <= 63; c++) tx[c] = new(seed * 97 + c * 7919, 10'((int'(off0) + 11 * c) % 140));
    endfunction
    function bus_byte_t next();
      bus_byte_t r;
      int pi, j, n, vr, vc;
      r.pay = 0; r.j0j1 = 0; r.d = 8'h00; r.col = -1; r.n = -1; r.v1 = 0;
      r.ch = 0; r.pos = -1; r.k = -1; r.pass = 0;
      if (col < 9) begin
        r.j0j1 = (row == 0 && col == 0);
        r.d = (row == 0 && col < 3) ? 8'hF6 : 8'h00;
      end else begin
        r.pay = 1;
        pi = row * 261 + col - 9;
        j = pi - j1_pos;
        n = frame;
        if (j < 0) begin j += 2349; n--; end
        if (n >= 0) begin
          vr = j / 261;
          vc = j % 261;
          r.col = vc;
          r.n = n;
          if (vc == 0) begin
            if (vr == 0) begin
              r.j0j1 = 1;
              r.d = 8'h11;
              r.v1 = (n >= 4) && (n % 4 == 0);
            end else if (vr == 5) r.d = 8'(((n + 1) % 4) | 8'hF0);
            else r.d = 8'h40 + 8'(vr);
          end else if (vc < 9) r.d = 8'h00;
          else begin
            r.ch = channel_of_column(vc);
            r.pos = tx[r.ch].pos;
            r.d = tx[r.ch].next_byte();
            r.k = tx[r.ch].last_k;
            r.pass = tx[r.ch].last_pass;
          end
        end
      end
      col++;
      if (col == 270) begin
        col = 0;
        row++;
        if (row == 9) begin row = 0; frame++; end
      end
      return r;
    endfunction
  endclass

  // Finds the first 64-bit window of 'got' (within the first max_lead bits) that also appears in
  // 'exp' (within its first max_lead bits) and compares every later bit present in both.
  // Returns the number of bits compared (-1 if no window matches); errs counts the mismatches.
  function automatic int match_streams(ref bit exp[$], ref bit got[$], input int max_lead,
                                       output int errs);
    int gi, ei, n, w;
    bit ok;
    errs = 0;
    if (got.size() < 64 || exp.size() < 64) return -1;
    for (gi = 0; gi <= got.size() - 64 && gi < max_lead; gi++) begin
      for (ei = 0; ei <= exp.size() - 64 && ei < max_lead; ei++) begin
        ok = 1;
        for (w = 0; w < 64; w++) if (got[gi + w] != exp[ei + w]) begin ok = 0; break; end
        if (ok) begin
          n = 0;
          while (gi + n < got.size() && ei + n < exp.size()) begin
            if (got[gi + n] != exp[ei + n]) errs++;
            n++;
          end
          return n;
        end
      end
    end
    return -1;
  endfunction

endpackage
