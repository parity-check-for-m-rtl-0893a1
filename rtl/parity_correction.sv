// parity_correction: locates and repairs single-wire errors in the data
// codewords of one flit.
//
// The code is a product code. The 1-of-n property finds the row: a data
// codeword with other than one wire high is an invalid codeword (typically a
// single upset that added a second high wire). The parity finds the column:
// the syndrome is the XOR of the transmitted parity with the parity
// regenerated from the received rows, and its high bits mark the wires in
// error. In every invalid row each wire marked by the syndrome is cleared
// (wire AND NOT syndrome), so an extra high wire is removed; rows that are
// valid are left alone. Several invalid rows are repaired in one pass as long
// as their errors sit in different columns.
//
// If a transmitted parity codeword is itself invalid, the parity is not used:
// with at most one error per flit the data rows are then taken as correct,
// and an invalid data row as well is reported as uncorrectable.
//
// After correction the result is checked: every row must be a valid codeword
// and the parity of the corrected rows must equal the transmitted parity.
// Otherwise the flit is reported uncorrectable. This catches a valid but
// wrong codeword (one wire lost and another gained in the same row), which
// leaves a syndrome with no invalid row to repair, and errors that the
// clearing rule cannot undo (a wire lost). Purely combinational.
//
// The row/column isolation, the clear-wire rule and the handling of an
// invalid parity codeword follow the scheme; the final consistency check and
// the status flags are this design's choices.
module parity_correction
  import mofn_parity_pkg::*;
#(
  parameter int unsigned DATA_W  = DEFAULT_DATA_W,
  parameter int unsigned N_WIRES = DEFAULT_N_WIRES,
  localparam int unsigned DCW    = num_cw(DATA_W, N_WIRES)
) (
  input  logic [DCW-1:0][N_WIRES-1:0] data_cw_i,
  input  logic [N_WIRES-1:0]          tx_parity_i,
  input  logic [N_WIRES-1:0]          calc_parity_i,
  input  logic                        parity_cw_err_i,
  output logic [DCW-1:0][N_WIRES-1:0] data_cw_o,
  output logic [N_WIRES-1:0]          syndrome_o,
  output dec_status_t                 status_o
);

  logic [DCW-1:0]     row_err;
  logic [DCW-1:0]     row_bad_after;
  logic [N_WIRES-1:0] parity_after;

  assign syndrome_o = tx_parity_i ^ calc_parity_i;

  always_comb begin
    for (int unsigned r = 0; r < DCW; r++) begin
      int unsigned ones;
      ones = 0;
      for (int unsigned w = 0; w < N_WIRES; w++) ones += int'(data_cw_i[r][w]);
      row_err[r] = (ones != 1);
    end

    for (int unsigned r = 0; r < DCW; r++) begin
      if (row_err[r] && !parity_cw_err_i) data_cw_o[r] = data_cw_i[r] & ~syndrome_o;
      else                                data_cw_o[r] = data_cw_i[r];
    end

    parity_after = '0;
    for (int unsigned r = 0; r < DCW; r++) begin
      int unsigned ones;
      ones = 0;
      for (int unsigned w = 0; w < N_WIRES; w++) ones += int'(data_cw_o[r][w]);
      row_bad_after[r] = (ones != 1);
      parity_after ^= data_cw_o[r];
    end

    status_o.parity_cw_err = parity_cw_err_i;
    status_o.data_cw_err   = |row_err;
    if (parity_cw_err_i)
      status_o.uncorrectable = |row_err;
    else
      status_o.uncorrectable = (|row_bad_after) || (parity_after != tx_parity_i);
    status_o.corrected     = (data_cw_o != data_cw_i) && !status_o.uncorrectable;
  end

endmodule
