// tb_err_pkg: error injection on extended flits for the testbenches.
//
// Each function takes a correctly encoded matrix (see tb_ref_pkg) and returns
// it with one class of link error, choosing rows and wires at random:
//   add_wire   - invalid codeword with one extra wire high (the common
//                single-upset error), in a data or a parity row
//   move_wire  - valid but wrong codeword (one wire lost, another gained)
//   drop_wire  - incomplete codeword (its only high wire lost)
//   add_two    - extra wires in two data rows, in two different columns that
//                hold neither row's true wire, so both can be repaired
package tb_err_pkg;
  import tb_ref_pkg::*;

  function automatic int hot(mat_t m, int r, int n);
    for (int w = 0; w < n; w++) if (m[r][w]) return w;
    return -1;
  endfunction

  function automatic mat_t add_wire(mat_t m, int first_row, int rows, int n);
    int r = first_row + $urandom_range(0, rows - 1);
    int w;
    do w = $urandom_range(0, n - 1); while (m[r][w]);
    m[r][w] = 1'b1;
    return m;
  endfunction

  function automatic mat_t move_wire(mat_t m, int rows, int n);
    int r = $urandom_range(0, rows - 1);
    int w;
    do w = $urandom_range(0, n - 1); while (m[r][w]);
    m[r] = '0;
    m[r][w] = 1'b1;
    return m;
  endfunction

  function automatic mat_t drop_wire(mat_t m, int rows);
    int r = $urandom_range(0, rows - 1);
    m[r] = '0;
    return m;
  endfunction

  // Needs n >= 4. Returns m unchanged when no such pair is found.
  function automatic mat_t add_two(mat_t m, int rows, int n);
    for (int tries = 0; tries < 100; tries++) begin
      int r1 = $urandom_range(0, rows - 1);
      int r2 = $urandom_range(0, rows - 1);
      int a = hot(m, r1, n);
      int c = hot(m, r2, n);
      int b = $urandom_range(0, n - 1);
      int e = $urandom_range(0, n - 1);
      if (r1 != r2 && b != e && b != a && b != c && e != a && e != c) begin
        m[r1][b] = 1'b1;
        m[r2][e] = 1'b1;
        return m;
      end
    end
    return m;
  endfunction

endpackage
