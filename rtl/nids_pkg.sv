// nids_pkg: shared constants, types and the signature-set tables of the
// multi-character signature matcher.
//
// The matcher stores every signature of a u-set (a subset of signatures in
// which each one owns a unique substring, its u-substring) as one row of a
// signature matrix. Rows are shifted so that all u-substrings start in the
// same column, the aligning column, at index W_HEAD. Columns left of it form
// the head, the aligning column and those right of it the tail.
//
// Each column holds only the distinct characters that occur in it (the
// character matrix); a signature character is stored as its index in that
// list, using ceil(log2(p)) bits for p distinct characters, and columns with
// a single character take no memory at all. The aligning column is stored as
// a raw 8-bit character. These ideas, the four characters per clock, the
// 1024-entry memory arrays, the six-bit slices and the stage/index mask
// follow the source architecture.
//
// The actual signature set (Snort rules) is compiled offline and is not part
// of the hardware, so this package defines a synthetic, deterministic u-set
// by formula instead of a data file. It is built so that the u-set rules hold:
//  * u-substrings are two characters long: a first character from
//    0xC0..0xDF and a second from 0xE0..0xFF, so 32 x 32 = 1024 of them;
//  * every other signature character is drawn from 0x00..0xBF, so no
//    u-substring can occur anywhere except at the aligning column;
//  * column widths (0..7 bits) follow a fixed spread whose sum, at 136
//    columns, is 688 bits per row (aligning column 8 bits, 43 columns of
//    6 bits).
// Changing the functions below to read a compiled signature set is all it
// takes to carry real signatures.
package nids_pkg;

  localparam int unsigned LANES   = 4;    // characters per clock
  localparam int unsigned NLINES  = 256;  // one-hot lines per character
  localparam int unsigned SLICE_W = 6;    // rm-vector bits per matching stage
  localparam int unsigned U_LEN   = 2;    // u-substring length
  localparam int unsigned X_BASE  = 'hC0;  // first u-substring characters
  localparam int unsigned Y_BASE  = 'hE0;  // second u-substring characters
  localparam int unsigned XY_SIZE = 32;
  localparam int unsigned Z_SIZE  = 192;  // body alphabet 0x00..0xBF
  localparam int unsigned MAX_ENTRY_W = 2048;

  typedef logic [NLINES-1:0] lines_t;
  typedef logic [7:0]        char_t;

  // ---------------------------------------------------------------- hashing
  function automatic int unsigned mix(input int unsigned a, input int unsigned b,
                                      input int unsigned c);
    int unsigned h;
    h = (a * 32'h9E3779B1) ^ ((b + 32'h7F4A7C15) * 32'h85EBCA77)
        ^ ((c + 32'h165667B1) * 32'hC2B2AE3D);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // ------------------------------------------------------ matrix geometry
  function automatic int unsigned num_slices(input int unsigned w);
    return (w + SLICE_W - 1) / SLICE_W;
  endfunction

  // Width of a stage field able to name slices 0 .. num_slices(w)-1.
  function automatic int unsigned stage_w(input int unsigned w);
    return (num_slices(w) > 1) ? $clog2(num_slices(w)) : 1;
  endfunction

  // Bits used to store column c of the signature matrix.
  function automatic int unsigned col_bits(input int unsigned c, input int unsigned wh);
    int unsigned o, r;
    if (c == wh)     return 8;   // aligning column: raw character
    if (c == wh + 1) return 5;   // second u-substring character: 32 choices
    o = (c < wh) ? c : c - 2;
    r = (o * 47 + 11) % 134;
    if (r < 3)   return 0;
    if (r < 5)   return 1;
    if (r < 11)  return 2;
    if (r < 23)  return 3;
    if (r < 36)  return 4;
    if (r < 71)  return 5;
    if (r < 114) return 6;
    return 7;
  endfunction

  // Distinct characters (cells of the character matrix) in column c.
  function automatic int unsigned col_p(input int unsigned c, input int unsigned wh);
    return 1 << col_bits(c, wh);
  endfunction

  // Bit offset of column c's code inside an SMA entry.
  function automatic int unsigned col_off(input int unsigned c, input int unsigned wh);
    int unsigned s = 0;
    for (int unsigned i = 0; i < c; i++) s += col_bits(i, wh);
    return s;
  endfunction

  // First cell of column c in the flattened character matrix.
  function automatic int unsigned cell_off(input int unsigned c, input int unsigned wh);
    int unsigned s = 0;
    for (int unsigned i = 0; i < c; i++) s += col_p(i, wh);
    return s;
  endfunction

  function automatic int unsigned codes_w(input int unsigned wh, input int unsigned w);
    return col_off(w, wh);
  endfunction

  function automatic int unsigned n_cells(input int unsigned wh, input int unsigned w);
    return cell_off(w, wh);
  endfunction

  // Entry = codes | h_stage | h_index | t_stage | t_index (LSB first).
  function automatic int unsigned mask_w(input int unsigned wh, input int unsigned wt);
    return stage_w(wh) + SLICE_W + stage_w(wt) + SLICE_W;
  endfunction

  function automatic int unsigned entry_w(input int unsigned wh, input int unsigned wt);
    return codes_w(wh, wh + wt) + mask_w(wh, wt);
  endfunction

  // ------------------------------------------------------ character matrix
  // Character held by cell k of column c in u-set smu.
  function automatic char_t cm_char(input int unsigned smu, input int unsigned c,
                                    input int unsigned k, input int unsigned wh);
    if (c == wh)     return char_t'(k);
    if (c == wh + 1) return char_t'(Y_BASE + k);
    return char_t'((c * 37 + smu * 53 + k * 5) % Z_SIZE);
  endfunction

  // j-th character of the u-substring of signature i.
  function automatic char_t usub_char(input int unsigned i, input int unsigned j);
    return (j == 0) ? char_t'(X_BASE + (i / XY_SIZE)) : char_t'(Y_BASE + (i % XY_SIZE));
  endfunction

  // ------------------------------------------------------ the signature set
  function automatic int unsigned sig_head_len(input int unsigned smu, input int unsigned i,
                                               input int unsigned wh);
    return mix(smu, i, 1) % (wh + 1);
  endfunction

  function automatic int unsigned sig_tail_len(input int unsigned smu, input int unsigned i,
                                               input int unsigned wt);
    return U_LEN + mix(smu, i, 2) % (wt - U_LEN + 1);
  endfunction

  // Code stored for column c of signature i (raw character in the aligning column).
  function automatic int unsigned sig_code(input int unsigned smu, input int unsigned i,
                                           input int unsigned c, input int unsigned wh);
    if (c == wh)     return int'(usub_char(i, 0));
    if (c == wh + 1) return i % XY_SIZE;
    return mix(smu, i, c + 3) % col_p(c, wh);
  endfunction

  function automatic char_t sig_char(input int unsigned smu, input int unsigned i,
                                     input int unsigned c, input int unsigned wh);
    return cm_char(smu, c, sig_code(smu, i, c, wh), wh);
  endfunction

  // Stage: outermost slice the signature reaches on one side; index: ones in
  // the bits of that slice it occupies (bit 0 is nearest the aligning column).
  function automatic int unsigned len_stage(input int unsigned n);
    return (n == 0) ? 0 : (n - 1) / SLICE_W;
  endfunction

  function automatic logic [SLICE_W-1:0] len_index(input int unsigned n);
    int unsigned rem;
    if (n == 0) return '0;
    rem = n - SLICE_W * len_stage(n);
    return SLICE_W'((1 << rem) - 1);
  endfunction

  // Full SMA entry of signature i (LSB-aligned in a MAX_ENTRY_W vector).
  function automatic logic [MAX_ENTRY_W-1:0] sma_entry(input int unsigned smu,
                                                       input int unsigned i,
                                                       input int unsigned wh,
                                                       input int unsigned wt);
    logic [MAX_ENTRY_W-1:0] e;
    int unsigned off, hl, tl, b, code, hs, ts;
    logic [SLICE_W-1:0] hx, tx;
    e  = '0;
    hl = sig_head_len(smu, i, wh);
    tl = sig_tail_len(smu, i, wt);
    off = 0;
    for (int unsigned c = 0; c < wh + wt; c++) begin
      b = col_bits(c, wh);
      if (c + hl >= wh && c < wh + tl) begin
        code = sig_code(smu, i, c, wh);
        for (int unsigned k = 0; k < b; k++) e[off + k] = code[k];
      end
      off += b;
    end
    hs = len_stage(hl);
    ts = len_stage(tl);
    hx = len_index(hl);
    tx = len_index(tl);
    for (int unsigned k = 0; k < stage_w(wh); k++) e[off + k] = hs[k];
    off += stage_w(wh);
    for (int unsigned k = 0; k < SLICE_W; k++) e[off + k] = hx[k];
    off += SLICE_W;
    for (int unsigned k = 0; k < stage_w(wt); k++) e[off + k] = ts[k];
    off += stage_w(wt);
    for (int unsigned k = 0; k < SLICE_W; k++) e[off + k] = tx[k];
    return e;
  endfunction

  // ------------------------------------------------------ SMU timing
  // Clocks from the u-substring detector's window to the SMA data: detector
  // register, two encoder stages, SMA read.
  localparam int unsigned LAT_FETCH = 4;

  // Section of the i-pipeline where the detector looks: the u-substring's
  // first character must reach the aligning column of the matching window
  // (sections 0 .. W+LANES-2) just when its signature leaves the SMA.
  function automatic int unsigned det_pos(input int unsigned wh);
    return wh + LANES * LAT_FETCH;
  endfunction

  // Steps of the i-pipeline needed by an SMU.
  function automatic int unsigned pipe_depth(input int unsigned wh, input int unsigned wt);
    int unsigned a, b;
    a = wh + wt + LANES - 1;
    b = det_pos(wh) + LANES + U_LEN - 1;
    return ((a > b ? a : b) + LANES - 1) / LANES;
  endfunction

  // Clocks from the detector's window to the SMU match output:
  // fetch, rm-vector register, matching pipeline, final register.
  function automatic int unsigned smu_latency(input int unsigned wh, input int unsigned wt);
    int unsigned nh, nt;
    nh = num_slices(wh);
    nt = num_slices(wt);
    return LAT_FETCH + 1 + (nh > nt ? nh : nt) + 1;
  endfunction

endpackage
