// tb_ref_pkg: reference models for the JPEG processing-element testbenches.
//
// Written independently of the RTL tables: the DCT uses real arithmetic and
// $cos, the zig-zag order and the AC Huffman symbol list are written out in
// full, and the Huffman codes are rebuilt from them here.
package tb_ref_pkg;

  // zig-zag position -> raster index
  localparam int ZZ_ORDER [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  localparam int QLUM [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,
    12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,
    14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,
    24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,
    72, 92, 95, 98, 112, 100, 103,  99};

  // standard luminance AC table (ITU-T T.81 K.3): counts per length, symbols
  localparam int AC_BITS [16] = '{0, 2, 1, 3, 3, 2, 4, 3, 5, 5, 4, 4, 0, 0, 1, 125};
  localparam int AC_VALS [162] = '{
    'h01, 'h02, 'h03, 'h00, 'h04, 'h11, 'h05, 'h12, 'h21, 'h31, 'h41, 'h06, 'h13, 'h51, 'h61, 'h07,
    'h22, 'h71, 'h14, 'h32, 'h81, 'h91, 'ha1, 'h08, 'h23, 'h42, 'hb1, 'hc1, 'h15, 'h52, 'hd1, 'hf0,
    'h24, 'h33, 'h62, 'h72, 'h82, 'h09, 'h0a, 'h16, 'h17, 'h18, 'h19, 'h1a, 'h25, 'h26, 'h27, 'h28,
    'h29, 'h2a, 'h34, 'h35, 'h36, 'h37, 'h38, 'h39, 'h3a, 'h43, 'h44, 'h45, 'h46, 'h47, 'h48, 'h49,
    'h4a, 'h53, 'h54, 'h55, 'h56, 'h57, 'h58, 'h59, 'h5a, 'h63, 'h64, 'h65, 'h66, 'h67, 'h68, 'h69,
    'h6a, 'h73, 'h74, 'h75, 'h76, 'h77, 'h78, 'h79, 'h7a, 'h83, 'h84, 'h85, 'h86, 'h87, 'h88, 'h89,
    'h8a, 'h92, 'h93, 'h94, 'h95, 'h96, 'h97, 'h98, 'h99, 'h9a, 'ha2, 'ha3, 'ha4, 'ha5, 'ha6, 'ha7,
    'ha8, 'ha9, 'haa, 'hb2, 'hb3, 'hb4, 'hb5, 'hb6, 'hb7, 'hb8, 'hb9, 'hba, 'hc2, 'hc3, 'hc4, 'hc5,
    'hc6, 'hc7, 'hc8, 'hc9, 'hca, 'hd2, 'hd3, 'hd4, 'hd5, 'hd6, 'hd7, 'hd8, 'hd9, 'hda, 'he1, 'he2,
    'he3, 'he4, 'he5, 'he6, 'he7, 'he8, 'he9, 'hea, 'hf1, 'hf2, 'hf3, 'hf4, 'hf5, 'hf6, 'hf7, 'hf8,
    'hf9, 'hfa};

  // DC SIZE codes as printed (Table.2), as strings
  localparam string DC_STR [12] = '{"00", "010", "011", "100", "101", "110", "1110", "11110",
                                    "111110", "1111110", "11111110", "111111110"};

  // AC code of symbol sym as a string of '0'/'1' ("" if none)
  function automatic string ac_code_str(input int sym);
    int code = 0, k = 0;
    for (int len = 1; len <= 16; len++) begin
      for (int j = 0; j < AC_BITS[len-1]; j++) begin
        if (AC_VALS[k] == sym) begin
          string s = "";
          for (int b = len - 1; b >= 0; b--) s = {s, (((code >> b) & 1) != 0) ? "1" : "0"};
          return s;
        end
        code++;
        k++;
      end
      code = code << 1;
    end
    return "";
  endfunction

  function automatic int ref_size(input int v);
    int a = (v < 0) ? -v : v;
    int s = 0;
    while (a != 0) begin
      a = a >> 1;
      s++;
    end
    return s;
  endfunction

  function automatic string ref_value_str(input int v, input int sz);
    int raw = (v < 0) ? v - 1 : v;
    string s = "";
    for (int b = sz - 1; b >= 0; b--) s = {s, (((raw >> b) & 1) != 0) ? "1" : "0"};
    return s;
  endfunction

  // 8x8 DCT of level-shifted pixels, equation (1), rounded to nearest
  function automatic void ref_dct(input int pix [64], output int res [64]);
    real pi = 3.14159265358979;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        real acc = 0.0;
        real ci = (i == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        real cj = (j == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        for (int x = 0; x < 8; x++)
          for (int y = 0; y < 8; y++)
            acc += real'(pix[x*8+y] - 128) * $cos((2*x+1)*i*pi/16.0) * $cos((2*y+1)*j*pi/16.0);
        acc = 0.25 * ci * cj * acc;
        res[i*8+j] = (acc >= 0.0) ? int'($floor(acc + 0.5)) : -int'($floor(-acc + 0.5));
      end
  endfunction

  // The same transform in the fixed-point format of the hardware: factors
  // round(4096*cos) (13 fraction bits including the 1/2), row sums rounded to
  // 3 fraction bits, column sums rounded to integers. Bit-exact, for checking
  // the later stages end to end.
  function automatic void ref_dct_fixed(input int pix [64], output int res [64]);
    real pi = 3.14159265358979;
    int k [8][8];
    int t [64];
    for (int a = 0; a < 8; a++)
      for (int n = 0; n < 8; n++)
        k[a][n] = (a == 0) ? int'($floor(4096.0 * $cos(pi / 4.0) + 0.5))
                           : int'($floor(4096.0 * $cos((2*n+1)*a*pi/16.0) + 0.5));
    for (int i = 0; i < 8; i++)
      for (int y = 0; y < 8; y++) begin
        int acc = 0;
        for (int x = 0; x < 8; x++) acc += k[i][x] * (pix[x*8+y] - 128);
        t[i*8+y] = (acc + 512) >>> 10;
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int acc = 0;
        for (int y = 0; y < 8; y++) acc += k[j][y] * t[i*8+y];
        res[i*8+j] = (acc + 32768) >>> 16;
      end
  endfunction

  function automatic int ref_quant(input int c, input int q);
    int m = (c < 0) ? -c : c;
    int r = (m + q / 2) / q;
    return (c < 0) ? -r : r;
  endfunction

  // run-length words of one block (layout of rle_pe)
  function automatic void ref_rle(input int coef [64], input int prev_dc, output int words [$]);
    int run = 0;
    words = {};
    words.push_back(coef[0] - prev_dc);
    for (int p = 1; p < 64; p++) begin
      int v = coef[ZZ_ORDER[p]];
      if (v == 0) run++;
      else begin
        while (run > 15) begin
          words.push_back(32'h000F_0000);
          run -= 16;
        end
        words.push_back((run << 16) | (v & 'hFFFF));
        run = 0;
      end
    end
    if (run > 0) words.push_back(0);
  endfunction

  // Huffman bit string of one block of run-length words
  function automatic string ref_huff(input int words [$]);
    string s;
    int dc = words[0];
    int sz = ref_size(dc);
    s = {DC_STR[sz], ref_value_str(dc, sz)};
    for (int k = 1; k < words.size(); k++) begin
      int run = (words[k] >> 16) & 'hF;
      int v   = int'(signed'(16'(words[k] & 'hFFFF)));
      int vs  = ref_size(v);
      s = {s, ac_code_str(run * 16 + vs), ref_value_str(v, vs)};
    end
    return s;
  endfunction

endpackage
