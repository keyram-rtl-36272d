// keyram_tb_pkg: testbench helpers shared by the DM2VM and full-chip testbenches: the example
// weight-memory map of one recurrent-attention glimpse, and integer reference models of the
// digital layers and of the ideal IMC + ADC + interface path.
//
// Example DM2VM SRAM map (96 rows x 64 bytes), all layer weights and biases on chip:
//   rows  0..63  fc2, two output tiles of 32 (N = 64 inputs)           cols 0..63
//   rows 64..73  fc5 inputs h[0..63]    rows 74..83  fc5 inputs h[64..126] (N = 63)
//   rows 84..85  fc6 inputs h[0..63]    rows 86..87  fc6 inputs h[64..126]
//   rows 88..95  fc1, eight output tiles of 8 (last 7) with N = 2, tile t on cols 2t..2t+1
//   biases in rows 88..91, cols 16..63: fc1 tiles 0..5 row 88, tiles 6..7 row 89 (cols 16..30),
//   fc5 row 89 cols 31..40, fc6 row 89 cols 41..42, fc2 tile 0 row 90, tile 1 row 91.
// IO buffer: l_t at 0..1, x_t at 2..65, h_t at 66..192, y_t at 193..202, l_{t+1} at 203..204.
package keyram_tb_pkg;
  import keyram_pkg::*;

  localparam int L_BASE = 0, X_BASE = 2, H_BASE = 66, Y_BASE = 193, LN_BASE = 203;

  typedef struct {
    int w1 [63][2];   int b1 [63];
    int w2 [64][64];  int b2 [64];
    int w5 [10][127]; int b5 [10];
    int w6 [2][127];  int b6 [2];
    int sh1, sh2, sh5, sh6, bias_shift;
  } dig_weights_t;

  function automatic dm_pass_t mkpass(int w_row, int n, int m, int col, int in_base, int out_base,
                                      int bias_row, int bias_col, bit first, bit last, act_e act,
                                      int shift, dest_e dest);
    dm_pass_t p;
    p.w_row = 7'(w_row); p.n_in_m1 = 6'(n - 1); p.m_out_m1 = 6'(m - 1); p.col = 6'(col);
    p.in_base = 8'(in_base); p.out_base = 8'(out_base); p.bias_row = 7'(bias_row);
    p.bias_col = 6'(bias_col); p.first = first; p.last = last; p.act = act;
    p.shift = 5'(shift); p.dest = dest;
    return p;
  endfunction

  function automatic void put_byte(ref logic [DM_ROW_BITS-1:0] img [DM_ROWS], input int row,
                                   input int col, input int v);
    img[row][8*col +: 8] = 8'(v);
  endfunction

  // Builds the SRAM image and the 14 pass descriptors (10 before the IMC layers, 4 after).
  function automatic void build_map(ref dig_weights_t d, ref logic [DM_ROW_BITS-1:0] img [DM_ROWS],
                                    ref dm_pass_t passes [N_PASSES]);
    int np;
    foreach (img[r]) img[r] = '0;
    np = 0;
    // fc1: tiles of 8 outputs, N = 2
    for (int t = 0; t < 8; t++) begin
      int m0, mm, brow, bcol;
      m0 = 8*t; mm = (t == 7) ? 7 : 8;
      brow = (t < 6) ? 88 : 89; bcol = (t < 6) ? 16 + 8*t : 16 + 8*(t-6);
      for (int r = 0; r < mm; r++) for (int k = 0; k < 2; k++)
        put_byte(img, 88 + r, 2*t + k, d.w1[m0 + ((r - (1 - k)) % mm + mm) % mm][k]);
      for (int m = 0; m < mm; m++) put_byte(img, brow, bcol + m, d.b1[m0 + m]);
      passes[np++] = mkpass(88, 2, mm, 2*t, L_BASE, m0, brow, bcol, 1, 1, ACT_RELU, d.sh1, DEST_IBUF0);
    end
    // fc2: two tiles of 32 outputs, N = 64
    for (int t = 0; t < 2; t++) begin
      for (int r = 0; r < 32; r++) for (int k = 0; k < 64; k++)
        put_byte(img, 32*t + r, k, d.w2[32*t + ((r - (63 - k)) % 32 + 32) % 32][k]);
      for (int m = 0; m < 32; m++) put_byte(img, 90 + t, 16 + m, d.b2[32*t + m]);
      passes[np++] = mkpass(32*t, 64, 32, 0, X_BASE, 63 + 32*t, 90 + t, 16, 1, 1, ACT_RELU, d.sh2, DEST_IBUF0);
    end
    // fc5 and fc6: two input halves each
    for (int L = 0; L < 2; L++) begin
      int mm, base_row, obase;
      mm = (L == 0) ? 10 : 2; base_row = (L == 0) ? 64 : 84; obase = (L == 0) ? Y_BASE : LN_BASE;
      for (int h = 0; h < 2; h++) begin
        int n, k0, row0;
        n = (h == 0) ? 64 : 63; k0 = 64*h; row0 = base_row + mm*h;
        for (int r = 0; r < mm; r++) for (int k = 0; k < n; k++) begin
          int m;
          m = ((r - (n - 1 - k)) % mm + mm) % mm;
          put_byte(img, row0 + r, k, (L == 0) ? d.w5[m][k0 + k] : d.w6[m][k0 + k]);
        end
        passes[np++] = mkpass(row0, n, mm, 0, H_BASE + k0, obase, 89, (L == 0) ? 31 : 41,
                              h == 0, h == 1, (L == 0) ? ACT_NONE : ACT_HTANH,
                              (L == 0) ? d.sh5 : d.sh6, DEST_IO);
      end
      for (int m = 0; m < mm; m++) put_byte(img, 89, ((L == 0) ? 31 : 41) + m, (L == 0) ? d.b5[m] : d.b6[m]);
    end
  endfunction

  function automatic int sat(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // one digital layer output before requantisation
  function automatic int act_out(longint acc, int shift, act_e act, dest_e dest);
    longint s; int y;
    s = acc >>> shift;
    case (act)
      ACT_RELU:  y = int'(s < 0 ? 0 : (s > 127 ? 127 : s));
      ACT_HTANH: y = int'(s < -64 ? -64 : (s > 64 ? 64 : s));
      default:   y = int'(s < -128 ? -128 : (s > 127 ? 127 : s));
    endcase
    if (dest == DEST_IBUF0) y = sat(y, 0, 15);
    return y;
  endfunction

  // ideal IMC dot product -> ADC codes -> interface; returns q4 and q8
  function automatic void imc_ref(input int w [256], input int x [256], input int step,
                                  input int sh4, input int sh8, output int q4, output int q8,
                                  output int nnz);
    longint sp, sn, vp, vn, cp, cn, dot;
    sp = 0; sn = 0; nnz = 0;
    for (int i = 0; i < 256; i++) if (x[i] != 0) begin
      nnz++;
      sp += longint'(x[i]) * (w[i] & 7);
      sn += longint'(x[i]) * ((w[i] < 0) ? 8 : 0);
    end
    vp = (nnz == 0) ? 0 : (sp * 256) / nnz;
    vn = (nnz == 0) ? 0 : (sn * 256) / nnz;
    cp = vp / step; if (cp > 63) cp = 63;
    cn = vn / step; if (cn > 63) cn = 63;
    dot = ((cp - cn) * step * nnz) >>> 8;
    if (dot < 0) dot = 0;
    q4 = int'((dot >> sh4) > 15 ? 15 : (dot >> sh4));
    q8 = int'((dot >> sh8) > 127 ? 127 : (dot >> sh8));
  endfunction

endpackage
