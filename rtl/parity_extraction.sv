// parity_extraction: splits a received extended flit into its data codewords
// and its transmitted parity.
//
// The lowest DCW rows are the data codewords and are passed on unchanged. The
// top PCW rows are the parity codewords; they are checked for being valid
// 1-of-n words (exactly one wire high) and converted back to the N_WIRES-bit
// transmitted parity vector. parity_cw_err_o is high when any parity
// codeword is invalid, in which case the decoder does not use the parity for
// correction. Purely combinational.
//
// The split and the use of the unordered property to judge the parity
// codewords follow the scheme; the validity test by counting high wires is
// this design's implementation.
module parity_extraction
  import mofn_parity_pkg::*;
#(
  parameter int unsigned DATA_W  = DEFAULT_DATA_W,
  parameter int unsigned N_WIRES = DEFAULT_N_WIRES,
  localparam int unsigned DCW    = num_cw(DATA_W, N_WIRES),
  localparam int unsigned PCW    = num_cw(N_WIRES, N_WIRES),
  localparam int unsigned EF_ROWS = DCW + PCW
) (
  input  logic [EF_ROWS-1:0][N_WIRES-1:0] flit_i,
  output logic [DCW-1:0][N_WIRES-1:0]     data_cw_o,
  output logic [N_WIRES-1:0]              tx_parity_o,
  output logic                            parity_cw_err_o
);

  logic [PCW-1:0][N_WIRES-1:0] parity_cw;

  assign data_cw_o = flit_i[DCW-1:0];
  assign parity_cw = flit_i[EF_ROWS-1:DCW];

  binary_conversion #(.WIDTH(N_WIRES), .N_WIRES(N_WIRES)) u_bin_parity (
    .cw_i  (parity_cw),
    .bin_o (tx_parity_o)
  );

  always_comb begin
    parity_cw_err_o = 1'b0;
    for (int unsigned r = 0; r < PCW; r++) begin
      int unsigned ones;
      ones = 0;
      for (int unsigned w = 0; w < N_WIRES; w++) ones += int'(parity_cw[r][w]);
      if (ones != 1) parity_cw_err_o = 1'b1;
    end
  end

endmodule
