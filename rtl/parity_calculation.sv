// parity_calculation: column parity of a matrix of 1-of-n codewords.
//
// The flit is seen as a matrix with one codeword per row and one wire per
// column. Parity bit j is the XOR of wire j over all rows, giving an
// N_WIRES-bit vector. The parity is taken over the codewords, not over the
// binary data, so that a single wire error on the link maps to exactly one
// parity bit. The same module serves the encoder and the decoder, which
// regenerates the parity from the received rows. Purely combinational.
module parity_calculation
  import mofn_parity_pkg::*;
#(
  parameter int unsigned ROWS    = num_cw(DEFAULT_DATA_W, DEFAULT_N_WIRES),
  parameter int unsigned N_WIRES = DEFAULT_N_WIRES
) (
  input  logic [ROWS-1:0][N_WIRES-1:0] cw_i,
  output logic [N_WIRES-1:0]           parity_o
);

  always_comb begin
    parity_o = '0;
    for (int unsigned r = 0; r < ROWS; r++) parity_o ^= cw_i[r];
  end

endmodule
