// parity_decoder: receiver side of the m-of-n parity scheme.
//
// An extended flit from the link goes through four steps: parity extraction
// (split off and decode the transmitted parity codewords), parity
// calculation (regenerate the column parity of the received data rows),
// parity correction (syndrome, invalid-row isolation, clear the wrong wire)
// and binary conversion of the corrected rows for the receiving IP core.
// Alongside the data the decoder reports a status: whether a correction was
// made, whether an uncorrectable error was seen (the receiver may then ask
// for a retransmission), and whether data or parity codewords arrived
// invalid.
//
// Interface: valid/ready on both sides, in the receiver's clock domain. The
// result is registered: one cycle of latency for decoding and correction,
// one flit per cycle. Reset is active low and asynchronous and only clears
// the valid flag.
//
// The four steps and the one-cycle decode latency follow the scheme; the
// handshake, the reset and the exact status flags are this design's choices.
module parity_decoder
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
  // delay-insensitive side (from the network)
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [EF_ROWS-1:0][N_WIRES-1:0] in_flit,
  // binary side (receiving IP core)
  output logic                            out_valid,
  input  logic                            out_ready,
  output logic [DATA_W-1:0]               out_data,
  output dec_status_t                     out_status
);

  logic [DCW-1:0][N_WIRES-1:0] rx_cw;
  logic [DCW-1:0][N_WIRES-1:0] fixed_cw;
  logic [N_WIRES-1:0]          tx_parity;
  logic [N_WIRES-1:0]          calc_parity;
  logic                        parity_cw_err;
  logic [DATA_W-1:0]           data;
  dec_status_t                 status;

  parity_extraction #(.DATA_W(DATA_W), .N_WIRES(N_WIRES)) u_extract (
    .flit_i          (in_flit),
    .data_cw_o       (rx_cw),
    .tx_parity_o     (tx_parity),
    .parity_cw_err_o (parity_cw_err)
  );

  parity_calculation #(.ROWS(DCW), .N_WIRES(N_WIRES)) u_parity (
    .cw_i     (rx_cw),
    .parity_o (calc_parity)
  );

  parity_correction #(.DATA_W(DATA_W), .N_WIRES(N_WIRES)) u_correct (
    .data_cw_i       (rx_cw),
    .tx_parity_i     (tx_parity),
    .calc_parity_i   (calc_parity),
    .parity_cw_err_i (parity_cw_err),
    .data_cw_o       (fixed_cw),
    .syndrome_o      (),
    .status_o        (status)
  );

  binary_conversion #(.WIDTH(DATA_W), .N_WIRES(N_WIRES)) u_bin (
    .cw_i  (fixed_cw),
    .bin_o (data)
  );

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      out_data   <= data;
      out_status <= status;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
