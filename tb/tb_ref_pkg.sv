// tb_ref_pkg: reference model of the 1-of-n parity code for the testbenches.
//
// Written with integer arithmetic, independently of the RTL: encode() builds
// the extended flit of a binary word (data codewords, least significant group
// first, then the codewords of the column parity), decode_ref() recovers the
// binary word from valid codewords. Matrices hold up to 40 rows of up to 8
// wires; only the low rows and wires are used.
package tb_ref_pkg;

  typedef bit [39:0][7:0] mat_t;

  function automatic int bpc(int n);
    int b = 0;
    while ((1 << b) < n) b++;
    return b;
  endfunction

  function automatic int ncw(int width, int n);
    return (width + bpc(n) - 1) / bpc(n);
  endfunction

  // Data codewords of d followed by the codewords of their column parity.
  function automatic mat_t encode(bit [63:0] d, int width, int n);
    mat_t m = '0;
    bit [7:0] p = '0;
    int b = bpc(n);
    int rows = ncw(width, n);
    for (int r = 0; r < rows; r++) begin
      int v = 0;
      for (int k = 0; k < b; k++)
        if (r * b + k < width && d[r * b + k]) v += (1 << k);
      m[r][v] = 1'b1;
      p ^= m[r];
    end
    for (int r = 0; r < ncw(n, n); r++) begin
      int v = 0;
      for (int k = 0; k < b; k++)
        if (r * b + k < n && p[r * b + k]) v += (1 << k);
      m[rows + r][v] = 1'b1;
    end
    return m;
  endfunction

  // Column parity of rows [0, rows).
  function automatic bit [7:0] col_parity(mat_t m, int rows);
    bit [7:0] p = '0;
    for (int r = 0; r < rows; r++) p ^= m[r];
    return p;
  endfunction

  // Binary word carried by the first ncw(width, n) rows (valid codewords).
  function automatic bit [63:0] decode_ref(mat_t m, int width, int n);
    bit [63:0] d = '0;
    int b = bpc(n);
    for (int r = 0; r < ncw(width, n); r++)
      for (int w = 0; w < n; w++)
        if (m[r][w])
          for (int k = 0; k < b; k++)
            if (r * b + k < width) d[r * b + k] = ((w >> k) & 1) != 0;
    return d;
  endfunction

endpackage
