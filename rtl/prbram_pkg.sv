// prbram_pkg: types, constants and table functions shared by the PR_BRAM
// overlay and its JPEG processing elements.
//
// The overlay keeps the whole dataflow in one block RAM of 32-bit words, one
// sample per word, and every processing element (PE) works on 8x8 blocks of
// 64 consecutive words. The tables below are computed by constant functions
// rather than pasted as data:
//   - cosine factors of the 8x8 DCT (equation 1 of the design description),
//   - the zig-zag scan order,
//   - the quantization matrix (standard JPEG luminance table, ITU-T T.81 K.1;
//     the design description does not print its matrix),
//   - the DC SIZE Huffman codes (printed in full in the design description),
//   - the AC Run/SIZE Huffman codes, generated canonically from the standard
//     JPEG luminance AC code-length counts and symbol list (T.81 K.3); the
//     design description prints only its first rows.
package prbram_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned WORD_W    = 32;   // BRAM word width
  localparam int unsigned MEM_AW    = 17;   // 131072 words = 128 BRAM36 tiles

  // reconfigurable modules, in dataflow order
  typedef enum logic [1:0] {
    RM_DCT   = 2'd0,
    RM_QUANT = 2'd1,
    RM_RLE   = 2'd2,
    RM_HUFF  = 2'd3
  } rm_id_e;

  // one BRAM port request (read data returns one cycle after en && !we)
  typedef struct packed {
    logic                en;
    logic                we;
    logic [MEM_AW-1:0]   addr;
    logic [WORD_W-1:0]   wdata;
  } mem_req_t;

  // AXI4-Lite, master-driven signals
  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  // AXI4-Lite, slave-driven signals
  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  // ------------------------------------------------------- control bus map
  localparam logic [11:0] REG_CTRL   = 12'h000;  // [0] start, [1] pe_reset, [2] mux_sel
  localparam logic [11:0] REG_STATUS = 12'h004;  // [0] done, [1] busy
  localparam logic [11:0] REG_RM_ID  = 12'h008;  // [1:0] loaded reconfigurable module
  localparam logic [11:0] REG_NBLK   = 12'h00C;  // [15:0] blocks in BRAM
  localparam logic [11:0] REG_CYCLES = 12'h010;  // cycles of the last PE run

  // --------------------------------------------------------------- DCT
  // 4096*cos(m*pi/16), m = 0..8 (rounded)
  function automatic int cos12(input int m);
    case (m)
      0: return 4096;  1: return 4017;  2: return 3784;  3: return 3406;
      4: return 2896;  5: return 2276;  6: return 1567;  7: return 799;
      default: return 0;
    endcase
  endfunction

  // DCT factor 0.5*C(k)*cos((2n+1)*k*pi/16) scaled by 2^13.
  // 0.5*cos(a)*8192 = 4096*cos(a); for k = 0, 0.5/sqrt(2) = 0.5*cos(pi/4).
  function automatic int dct_coef(input int k, input int n);
    int m, sgn;
    if (k == 0) return cos12(4);
    m   = ((2 * n + 1) * k) % 32;
    sgn = 1;
    if (m > 16) m = 32 - m;             // cos(2pi - a) = cos(a)
    if (m > 8) begin                    // cos(pi - a) = -cos(a)
      m   = 16 - m;
      sgn = -1;
    end
    return sgn * cos12(m);
  endfunction

  // ---------------------------------------------------------- zig-zag scan
  // raster index (row*8+col) of the zig-zag position p
  function automatic int zigzag(input int p);
    int cnt, r, c, s, d;
    cnt = 0;
    for (s = 0; s < 15; s++) begin
      for (d = 0; d < 8; d++) begin
        // even diagonals go up-right (row falls), odd ones down-left
        if (s % 2 == 0) r = (s < 8) ? s - d : 7 - d;
        else            r = (s < 8) ? d     : s - 7 + d;
        c = s - r;
        if (r >= 0 && r < 8 && c >= 0 && c < 8) begin
          if (cnt == p) return r * 8 + c;
          cnt++;
        end
      end
    end
    return 0;
  endfunction

  // --------------------------------------------------------- quantization
  // standard JPEG luminance quantization table, raster order
  function automatic int qtable(input int idx);
    case (idx)
       0: return 16;  1: return 11;  2: return 10;  3: return 16;  4: return 24;  5: return 40;  6: return 51;  7: return 61;
       8: return 12;  9: return 12; 10: return 14; 11: return 19; 12: return 26; 13: return 58; 14: return 60; 15: return 55;
      16: return 14; 17: return 13; 18: return 16; 19: return 24; 20: return 40; 21: return 57; 22: return 69; 23: return 56;
      24: return 14; 25: return 17; 26: return 22; 27: return 29; 28: return 51; 29: return 87; 30: return 80; 31: return 62;
      32: return 18; 33: return 22; 34: return 37; 35: return 56; 36: return 68; 37: return 109; 38: return 103; 39: return 77;
      40: return 24; 41: return 35; 42: return 55; 43: return 64; 44: return 81; 45: return 104; 46: return 113; 47: return 92;
      48: return 49; 49: return 64; 50: return 78; 51: return 87; 52: return 103; 53: return 121; 54: return 120; 55: return 101;
      56: return 72; 57: return 92; 58: return 95; 59: return 98; 60: return 112; 61: return 100; 62: return 103; 63: return 99;
      default: return 1;
    endcase
  endfunction

  // --------------------------------------------------- entropy code tables
  // SIZE category of a value: bits needed for |v| (0 for v = 0)
  function automatic logic [3:0] size_of(input logic signed [15:0] v);
    logic [15:0] a;
    a = v[15] ? 16'(-v) : 16'(v);
    for (int b = 15; b >= 0; b--)
      if (a[b]) return 4'(b + 1);
    return 4'd0;
  endfunction

  // value bits of Table.1: v itself for v > 0, v-1 for v < 0, low SIZE bits
  function automatic logic [15:0] value_bits(input logic signed [15:0] v, input logic [3:0] sz);
    logic [15:0] raw;
    raw = v[15] ? 16'(v - 16'sd1) : 16'(v);
    return raw & ((16'd1 << sz) - 16'd1);
  endfunction

  // a Huffman code: length in bits and the code, right-aligned
  typedef struct packed {
    logic [4:0]  len;
    logic [15:0] code;
  } hcode_t;

  typedef hcode_t [255:0] ac_tab_t;

  // DC SIZE Huffman code (Table.2)
  function automatic hcode_t dc_code(input logic [3:0] sz);
    case (sz)
      4'd0:  return '{5'd2, 16'b00};
      4'd1:  return '{5'd3, 16'b010};
      4'd2:  return '{5'd3, 16'b011};
      4'd3:  return '{5'd3, 16'b100};
      4'd4:  return '{5'd3, 16'b101};
      4'd5:  return '{5'd3, 16'b110};
      4'd6:  return '{5'd4, 16'b1110};
      4'd7:  return '{5'd5, 16'b11110};
      4'd8:  return '{5'd6, 16'b111110};
      4'd9:  return '{5'd7, 16'b1111110};
      4'd10: return '{5'd8, 16'b11111110};
      default: return '{5'd9, 16'b111111110};
    endcase
  endfunction

  // Standard luminance AC table: number of codes of each length 1..16
  function automatic int ac_bits(input int len);
    case (len)
      1: return 0;  2: return 2;  3: return 1;  4: return 3;  5: return 3;  6: return 2;
      7: return 4;  8: return 3;  9: return 5; 10: return 5; 11: return 4; 12: return 4;
      13: return 0; 14: return 0; 15: return 1; 16: return 125;
      default: return 0;
    endcase
  endfunction

  // Standard luminance AC table: symbol (run<<4 | size) of code number i.
  // The 37 symbols with codes of up to 15 bits are listed; the 125 symbols of
  // 16-bit codes are every remaining (run, size) pair, in increasing order.
  function automatic logic [7:0] ac_val(input int i);
    logic [7:0] head [37] = '{
      8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12, 8'h21, 8'h31,
      8'h41, 8'h06, 8'h13, 8'h51, 8'h61, 8'h07, 8'h22, 8'h71, 8'h14, 8'h32,
      8'h81, 8'h91, 8'hA1, 8'h08, 8'h23, 8'h42, 8'hB1, 8'hC1, 8'h15, 8'h52,
      8'hD1, 8'hF0, 8'h24, 8'h33, 8'h62, 8'h72, 8'h82};
    int k, first;
    if (i < 37) return head[i];
    k = 37;
    for (int run = 0; run < 16; run++) begin
      // first size of this run that has a 16-bit code
      case (run)
        0:              first = 9;
        1:              first = 6;
        2:              first = 5;
        3:              first = 4;
        4, 5, 6, 7, 8:  first = 3;
        14, 15:         first = 1;
        default:        first = 2;
      endcase
      for (int s = first; s <= 10; s++) begin
        if (k == i) return 8'((run << 4) | s);
        k++;
      end
    end
    return 8'h00;
  endfunction

  // AC Run/SIZE Huffman table indexed by symbol (run<<4 | size).
  // Canonical construction (T.81 Annex C): codes of one length are
  // consecutive, and the next length starts at (last code + 1) << 1.
  // Symbols that have no code keep length 0.
  function automatic ac_tab_t build_ac_tab();
    ac_tab_t tab;
    int code, idx;
    tab  = '0;
    code = 0;
    idx  = 0;
    for (int len = 1; len <= 16; len++) begin
      for (int j = 0; j < ac_bits(len); j++) begin
        tab[ac_val(idx)] = '{len: 5'(len), code: 16'(code)};
        code++;
        idx++;
      end
      code = code << 1;
    end
    return tab;
  endfunction

  localparam ac_tab_t AC_TAB = build_ac_tab();

endpackage
