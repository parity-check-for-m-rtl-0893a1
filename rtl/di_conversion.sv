// di_conversion: binary word to 1-of-n codewords, the DI(d) mapping.
//
// The word is cut into log2(N_WIRES)-bit groups, least significant group
// first; group r with value v becomes codeword r with only wire v high
// (for 1-of-4: "00" -> 0001, "01" -> 0010, "10" -> 0100, "11" -> 1000). A
// width that is not a multiple of the group size is padded with zeros at the
// top. Purely combinational.
//
// The code table and the row order (first row = lowest bits) follow the
// worked examples of the scheme; restricting the code to 1-of-n with n a
// power of two, which makes the conversion a plain decoder, is this design's
// choice.
module di_conversion
  import mofn_parity_pkg::*;
#(
  parameter int unsigned WIDTH   = DEFAULT_DATA_W,
  parameter int unsigned N_WIRES = DEFAULT_N_WIRES,
  localparam int unsigned B      = bits_per_cw(N_WIRES),
  localparam int unsigned NCW    = num_cw(WIDTH, N_WIRES)
) (
  input  logic [WIDTH-1:0]             bin_i,
  output logic [NCW-1:0][N_WIRES-1:0]  cw_o
);

  logic [NCW*B-1:0] padded;

  always_comb begin
    padded = '0;
    padded[WIDTH-1:0] = bin_i;
    for (int unsigned r = 0; r < NCW; r++) begin
      cw_o[r] = '0;
      cw_o[r][padded[r*B +: B]] = 1'b1;
    end
  end

endmodule
