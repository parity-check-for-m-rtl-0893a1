// parity_top: the parity-protected communication path between two
// synchronous IP cores of a GALS system.
//
// The sender side holds the parity encoder, clocked by the sender's clock;
// the receiver side holds the parity decoder, clocked by the receiver's
// clock. Between them lies the asynchronous network on chip, which is not
// part of this design: the extended flits the encoder produces leave on the
// noc_tx_* ports, and the extended flits the network delivers enter on the
// noc_rx_* ports. The two clocks are unrelated; the synchronisation between
// each clock domain and the asynchronous network is not part of this
// design either. Each side has its own active-low reset.
//
// Timing: one cycle from tx_data to noc_tx_flit (parity calculation), one
// cycle from noc_rx_flit to rx_data (decoding and correction); both sides
// take one flit per cycle. All handshakes are valid/ready.
//
// With the defaults a 32-bit flit is carried as 16 data codewords and 2
// parity codewords of the 1-of-4 code.
module parity_top
  import mofn_parity_pkg::*;
#(
  parameter int unsigned DATA_W  = DEFAULT_DATA_W,
  parameter int unsigned N_WIRES = DEFAULT_N_WIRES,
  localparam int unsigned EF_ROWS = num_cw(DATA_W, N_WIRES) + num_cw(N_WIRES, N_WIRES)
) (
  // sender clock domain
  input  logic                            tx_clk,
  input  logic                            tx_rst_n,
  input  logic                            tx_valid,
  output logic                            tx_ready,
  input  logic [DATA_W-1:0]               tx_data,
  output logic                            noc_tx_valid,
  input  logic                            noc_tx_ready,
  output logic [EF_ROWS-1:0][N_WIRES-1:0] noc_tx_flit,
  // receiver clock domain
  input  logic                            rx_clk,
  input  logic                            rx_rst_n,
  input  logic                            noc_rx_valid,
  output logic                            noc_rx_ready,
  input  logic [EF_ROWS-1:0][N_WIRES-1:0] noc_rx_flit,
  output logic                            rx_valid,
  input  logic                            rx_ready,
  output logic [DATA_W-1:0]               rx_data,
  output dec_status_t                     rx_status
);

  parity_encoder #(.DATA_W(DATA_W), .N_WIRES(N_WIRES)) u_encoder (
    .clk       (tx_clk),
    .rst_n     (tx_rst_n),
    .in_valid  (tx_valid),
    .in_ready  (tx_ready),
    .in_data   (tx_data),
    .out_valid (noc_tx_valid),
    .out_ready (noc_tx_ready),
    .out_flit  (noc_tx_flit)
  );

  parity_decoder #(.DATA_W(DATA_W), .N_WIRES(N_WIRES)) u_decoder (
    .clk        (rx_clk),
    .rst_n      (rx_rst_n),
    .in_valid   (noc_rx_valid),
    .in_ready   (noc_rx_ready),
    .in_flit    (noc_rx_flit),
    .out_valid  (rx_valid),
    .out_ready  (rx_ready),
    .out_data   (rx_data),
    .out_status (rx_status)
  );

endmodule
