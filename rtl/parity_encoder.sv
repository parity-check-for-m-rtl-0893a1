// parity_encoder: sender side of the m-of-n parity scheme.
//
// A binary flit from the sending IP core is converted to 1-of-n codewords
// (DI conversion), the column parity of those codewords is computed, and the
// parity vector is itself converted to 1-of-n codewords and appended below
// the data rows. The result, the extended flit, is what goes onto the
// delay-insensitive link. With the defaults a 32-bit flit becomes 16 data
// codewords plus 2 parity codewords of the 1-of-4 code.
//
// Interface: valid/ready on both sides, in the sender's clock domain. The
// extended flit is registered, so a flit accepted at one rising edge is
// offered on the output from the next: one cycle of latency, one flit per
// cycle throughput. in_ready is high when the output register is empty or is
// being emptied in the same cycle. Reset is active low and asynchronous, and
// only clears the valid flag.
//
// The conversion, the parity over codewords (not over binary data) and the
// one-cycle encoding latency follow the scheme; the valid/ready handshake and
// the reset are this design's choices.
module parity_encoder
  import mofn_parity_pkg::*;
#(
  parameter int unsigned DATA_W  = DEFAULT_DATA_W,
  parameter int unsigned N_WIRES = DEFAULT_N_WIRES,
  localparam int unsigned DCW    = num_cw(DATA_W, N_WIRES),
  localparam int unsigned PCW    = num_cw(N_WIRES, N_WIRES),
  localparam int unsigned EF_ROWS = DCW + PCW
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // binary side (sending IP core)
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [DATA_W-1:0]               in_data,
  // delay-insensitive side (towards the network)
  output logic                            out_valid,
  input  logic                            out_ready,
  output logic [EF_ROWS-1:0][N_WIRES-1:0] out_flit
);

  logic [DCW-1:0][N_WIRES-1:0] data_cw;
  logic [N_WIRES-1:0]          parity;
  logic [PCW-1:0][N_WIRES-1:0] parity_cw;

  di_conversion #(.WIDTH(DATA_W), .N_WIRES(N_WIRES)) u_di_data (
    .bin_i (in_data),
    .cw_o  (data_cw)
  );

  parity_calculation #(.ROWS(DCW), .N_WIRES(N_WIRES)) u_parity (
    .cw_i     (data_cw),
    .parity_o (parity)
  );

  di_conversion #(.WIDTH(N_WIRES), .N_WIRES(N_WIRES)) u_di_parity (
    .bin_i (parity),
    .cw_o  (parity_cw)
  );

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) out_flit <= {parity_cw, data_cw};
  end

  // The output must hold steady while it waits to be taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_flit));

endmodule
