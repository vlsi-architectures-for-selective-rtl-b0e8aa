// vlc_pkg: constants and elaboration-time helpers shared by the polar-code
// VLC transmitter, receiver and the centralized beacon transmitter.
//
// * frozen_mask(n,k): polar code construction. The document only says the
//   frozen positions are fixed "at the polar code construction stage"; this
//   design computes them with the Bhattacharyya bound on a binary erasure
//   channel with erasure probability 0.5 (z -> 2z - z^2 for the upper,
//   z -> z^2 for the lower branch, index MSB first, natural order) and keeps
//   the k most reliable indices. Ties go to the higher index. Bit i of the
//   result is 1 when index i is frozen. Only evaluated at elaboration.
// * crc16_ccitt: CRC of the beacon frame (polynomial x^16+x^12+x^5+1, init
//   0xFFFF, MSB first) over the 8-bit frame type and the 128-bit ID. The
//   document names a 16-bit CRC but not its polynomial: a design choice.
// * ct_req_t: the centralized transmitter's 136-bit write request.
// * enc4b6b: IEEE 802.15.7 4B6B table (every code word has three ones),
//   used by the 4B6B variant of the centralized transmitter.
package vlc_pkg;

  localparam int MAXN = 1024;

  // Beacon frame (JEITA layout): 6-bit preamble, 8-bit type, 128-bit ID, 16-bit CRC
  localparam int PRE_W   = 6;
  localparam int TYPE_W  = 8;
  localparam int ID_W    = 128;
  localparam int CRC_W   = 16;
  localparam int FRAME_W = PRE_W + TYPE_W + ID_W + CRC_W;  // 158
  localparam logic [PRE_W-1:0] PREAMBLE_DEFAULT = 6'b101010;

  // Scrambler polynomial x^4 + x^3 + 1
  localparam logic [3:0] SCR_SEED_DEFAULT = 4'b0001;

  typedef enum logic [0:0] {RLL_MANCHESTER = 1'b0, RLL_4B6B = 1'b1} rll_e;

  // Centralized transmitter: 100 front-ends, 128-bit messages, 136-bit
  // write requests (write flag, 7-bit front-end address, message)
  localparam int CT_N_FE   = 100;
  localparam int CT_MSG_W  = 128;
  localparam int CT_ADDR_W = 7;
  typedef struct packed {
    logic                 we;
    logic [CT_ADDR_W-1:0] addr;
    logic [CT_MSG_W-1:0]  msg;
  } ct_req_t;

  function automatic int rll_width(input rll_e r, input int n);
    return (r == RLL_MANCHESTER) ? 2 * n : (6 * n) / 4;
  endfunction

  function automatic logic [MAXN-1:0] frozen_mask(input int n, input int k);
    real z [MAXN];
    int  ord [MAXN];
    int  tmp [MAXN];
    logic [MAXN-1:0] m;
    int lg, lo, mid, hi, p, q;
    lg = $clog2(n);
    for (int i = 0; i < n; i++) begin
      z[i]   = 0.5;
      ord[i] = i;
      for (int b = lg - 1; b >= 0; b--) begin
        if (((i >> b) & 1) == 0) z[i] = 2.0 * z[i] - z[i] * z[i];
        else                     z[i] = z[i] * z[i];
      end
    end
    // bottom-up merge sort of the indices, most reliable (smallest z) first
    for (int w = 1; w < n; w = 2 * w) begin
      for (int s = 0; s < n; s += 2 * w) begin
        lo = s; mid = s + w; hi = s + 2 * w;
        p = lo; q = mid;
        for (int t = lo; t < hi; t++) begin
          if (q >= hi || (p < mid && (z[ord[p]] < z[ord[q]] ||
                                      (z[ord[p]] == z[ord[q]] && ord[p] > ord[q])))) begin
            tmp[t] = ord[p]; p++;
          end else begin
            tmp[t] = ord[q]; q++;
          end
        end
      end
      for (int i = 0; i < n; i++) ord[i] = tmp[i];
    end
    m = '0;
    for (int i = k; i < n; i++) m[ord[i]] = 1'b1;
    return m;
  endfunction

  function automatic logic [CRC_W-1:0] crc16_ccitt(input logic [TYPE_W+ID_W-1:0] d);
    logic [CRC_W-1:0] c;
    logic fb;
    c = 16'hFFFF;
    for (int i = TYPE_W + ID_W - 1; i >= 0; i--) begin
      fb = c[15] ^ d[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  function automatic logic [5:0] enc4b6b(input logic [3:0] nib);
    case (nib)
      4'h0: return 6'b001110;  4'h1: return 6'b001101;
      4'h2: return 6'b010011;  4'h3: return 6'b010110;
      4'h4: return 6'b010101;  4'h5: return 6'b100011;
      4'h6: return 6'b100110;  4'h7: return 6'b100101;
      4'h8: return 6'b011001;  4'h9: return 6'b011010;
      4'hA: return 6'b011100;  4'hB: return 6'b110001;
      4'hC: return 6'b110010;  4'hD: return 6'b101001;
      4'hE: return 6'b101010;  default: return 6'b101100;
    endcase
  endfunction

endpackage
