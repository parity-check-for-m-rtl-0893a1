// qdi_wchb_pipeline: behavioural model of a quasi-delay-insensitive 1-of-n
// pipeline built from weak-conditioned half buffers (WCHB), four-phase
// return-to-zero protocol. Not synthesizable: its storage elements are the
// C-element model, with delays and strike inputs.
//
// Each stage is a row of N_WIRES C-elements, one per wire. Every C-element
// combines its data wire with an enable: the completion detector (an
// N-input NOR) of the stage that follows, or ack_in for the last stage. A
// codeword (one wire high) passes a stage when the next stage is empty
// (enable 1); the spacer (all wires low) passes when the next stage holds
// data (enable 0). ack_out is the completion detector of the first stage,
// returned to the sender.
//
// Handshake, in the polarity of the NOR detectors: ack_in = 1 tells the
// pipeline the receiver is ready for a codeword, ack_in = 0 that it has taken
// one and waits for the spacer. ack_out has the same meaning towards the
// sender. The acknowledge of the usual four-phase drawing is the complement
// of these signals: it rises when data is taken and falls when the spacer
// is.
//
// see[s][w] strikes the C-element of wire w in stage s (see c_element) and is
// used to create the corrupted codewords that the parity scheme repairs.
//
// The structure (C-element registers, NOR completion detection, three stages
// of 1-of-4 by default) follows the scheme's example pipeline; the reset and
// the delays are this model's choices.
module qdi_wchb_pipeline #(
  parameter int unsigned N_WIRES = 4,
  parameter int unsigned STAGES  = 3,
  parameter int unsigned DELAY   = 1
) (
  input  logic                            rst_n,
  input  logic [N_WIRES-1:0]              di,
  output logic                            ack_out,
  output logic [N_WIRES-1:0]              do_o,
  input  logic                            ack_in,
  input  logic [STAGES-1:0][N_WIRES-1:0]  see
);

  logic [STAGES:0][N_WIRES-1:0] data;   // data[0] = di, data[s+1] = stage s
  logic [STAGES-1:0]            empty;  // completion detector of each stage
  logic [STAGES-1:0]            enable; // enable of each stage's C-elements

  assign data[0] = di;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar w = 0; w < N_WIRES; w++) begin : g_wire
      c_element #(.DELAY(DELAY)) u_c (
        .rst_n (rst_n),
        .a     (data[s][w]),
        .b     (enable[s]),
        .see   (see[s][w]),
        .y     (data[s+1][w])
      );
    end

    completion_detector #(.N_WIRES(N_WIRES)) u_cd (
      .wires_i (data[s+1]),
      .empty_o (empty[s])
    );

    if (s == STAGES - 1) begin : g_last
      assign enable[s] = ack_in;
    end else begin : g_mid
      assign enable[s] = empty[s+1];
    end
  end

  assign ack_out = empty[0];
  assign do_o    = data[STAGES];

endmodule
