// binary_conversion: 1-of-n codewords back to a binary word, the inverse of
// di_conversion.
//
// Codeword r gives binary group r (log2(N_WIRES) bits, least significant group
// first): the group value is the index of the high wire. The group is built as
// the OR of the indices of all high wires, so a valid codeword converts
// exactly and an invalid one (no wire or several wires high) converts to a
// defined but meaningless value; the decoder flags such words separately.
// Padding bits above WIDTH are dropped. Purely combinational.
module binary_conversion
  import mofn_parity_pkg::*;
#(
  parameter int unsigned WIDTH   = DEFAULT_DATA_W,
  parameter int unsigned N_WIRES = DEFAULT_N_WIRES,
  localparam int unsigned B      = bits_per_cw(N_WIRES),
  localparam int unsigned NCW    = num_cw(WIDTH, N_WIRES)
) (
  input  logic [NCW-1:0][N_WIRES-1:0]  cw_i,
  output logic [WIDTH-1:0]             bin_o
);

  logic [NCW*B-1:0] padded;

  always_comb begin
    padded = '0;
    for (int unsigned r = 0; r < NCW; r++) begin
      for (int unsigned w = 0; w < N_WIRES; w++) begin
        if (cw_i[r][w]) padded[r*B +: B] |= B'(w);
      end
    end
    bin_o = padded[WIDTH-1:0];
  end

endmodule
