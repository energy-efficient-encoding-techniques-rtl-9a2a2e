// fvbus_pkg: types, sizes and helper functions shared by the frequent-value
// bus codec. A code word travels on a W-bit data bus beside one external
// "encode" line. When the line is high the word is one of four code kinds:
// a one-hot code for a whole frequent value (FV), a one-hot code for the
// most significant portion with the low portion sent as is (MSB), the
// reverse (LSB), or one-hot codes for both portions (MSB_LSB). Tables that
// use m "internal control" lines hold (n - m) * 2**m entries for an n-bit
// field: the upper n - m lines of the field carry a one-hot code for
// (index mod (n - m)) and the lowest m lines carry (index div (n - m)).
// The table sizing and the use of the lowest lines as control lines follow
// the paper; placing entry e's 1 on line m + (e mod (n - m)) is this
// design's reading of it, and reproduces the paper's worked examples.
// Field helpers below work on full W-bit vectors with shifts and masks so
// that a field of any width, including zero control lines, needs no special
// case.
package fvbus_pkg;

  // Widest bus the helpers handle, and the width of every table index port.
  localparam int MAX_W = 64;
  localparam int IDX_W = 10;

  typedef logic [MAX_W-1:0] word_t;
  typedef logic [IDX_W-1:0] idx_t;

  typedef enum logic [2:0] {
    CODE_RAW     = 3'd0,  // encode line low: data sent as is
    CODE_FV      = 3'd1,  // whole-value hit
    CODE_MSB     = 3'd2,  // MSB portion coded, LSB portion as is
    CODE_LSB     = 3'd3,  // LSB portion coded, MSB portion as is
    CODE_MSB_LSB = 3'd4,  // both portions coded
    CODE_BAD     = 3'd5   // encode line high but no valid code pattern
  } code_kind_e;

  // Number of entries of a table whose field is n bits wide and which uses
  // m internal control lines: (n - m) * 2**m.
  function automatic int table_entries(int n, int m);
    return (n - m) * (1 << m);
  endfunction

  function automatic word_t low_mask(int n);
    word_t r;
    r = '0;
    for (int b = 0; b < MAX_W; b++) if (b < n) r[b] = 1'b1;
    return r;
  endfunction

  function automatic int popcount(word_t v);
    int c;
    c = 0;
    for (int b = 0; b < MAX_W; b++) c += int'(v[b]);
    return c;
  endfunction

  // Position of the lowest set bit (0 when none).
  function automatic int lowest_one(word_t v);
    int p;
    p = 0;
    for (int b = MAX_W - 1; b >= 0; b--) if (v[b]) p = b;
    return p;
  endfunction

  // Code field, right aligned, for table entry idx of a table with an n-bit
  // field and m control lines: one-hot at bit m + idx mod (n-m), control
  // lines = idx div (n-m).
  function automatic word_t field_code(int idx, int n, int m);
    word_t r;
    int    seg;
    seg = idx / (n - m);
    r   = '0;
    r[m + (idx % (n - m))] = 1'b1;
    r   = r | (word_t'(seg) & low_mask(m));
    return r;
  endfunction

  // True when the right-aligned n-bit field f carries exactly one 1 above
  // its m control lines.
  function automatic logic field_is_code(word_t f, int n, int m);
    return popcount((f & low_mask(n)) >> m) == 1;
  endfunction

  // Table index carried by a right-aligned field that is a code.
  function automatic int field_index(word_t f, int n, int m);
    int seg;
    seg = int'(f & low_mask(m));
    return seg * (n - m) + lowest_one((f & low_mask(n)) >> m);
  endfunction

endpackage
