// mofn_parity_pkg: constants, sizing functions and types shared by the
// m-of-n parity encoder and decoder.
//
// The link code is 1-of-n with n a power of two (n = 2 is dual rail, n = 4 is
// the default 1-of-4 code), so each codeword carries log2(n) binary bits. A
// k-bit flit therefore needs ceil(k / log2(n)) codewords, and the n-bit column
// parity vector needs ceil(n / log2(n)) more. With the defaults (32-bit flit,
// 1-of-4) that is 16 data codewords plus 2 parity codewords.
//
// Codeword matrices are packed arrays [rows-1:0][n-1:0]. Row 0 carries the
// least significant bits of the binary word; within a row, wire i is set for
// binary value i (value "00" -> wire 0, "11" -> wire 3).
package mofn_parity_pkg;

  // Default configuration: 32-bit flits over a 1-of-4 link.
  localparam int unsigned DEFAULT_DATA_W  = 32;
  localparam int unsigned DEFAULT_N_WIRES = 4;

  // Binary bits carried by one 1-of-n codeword.
  function automatic int unsigned bits_per_cw(int unsigned n_wires);
    return $clog2(n_wires);
  endfunction

  // Number of 1-of-n codewords needed for a binary word of width bits.
  function automatic int unsigned num_cw(int unsigned width, int unsigned n_wires);
    return (width + bits_per_cw(n_wires) - 1) / bits_per_cw(n_wires);
  endfunction

  // Decoder verdict on one extended flit.
  typedef struct packed {
    logic corrected;     // data wires were cleared and the flit then checked good
    logic uncorrectable; // an error was detected that could not be repaired
    logic data_cw_err;   // a received data codeword was not a valid 1-of-n word
    logic parity_cw_err; // a received parity codeword was not a valid 1-of-n word
  } dec_status_t;

endpackage
