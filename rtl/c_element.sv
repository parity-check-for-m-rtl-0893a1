// c_element: behavioural model of a two-input Muller C-element with a
// single-event-effect (SEE) strike input. Not synthesizable: it uses delays
// and models a full-custom cell.
//
// The output follows the inputs when they agree (both 1 -> 1, both 0 -> 0)
// and keeps its value while they differ, after DELAY time units. An active
// low reset forces the output to 0, as the asynchronous registers of a
// four-phase pipeline start out holding the spacer.
//
// A rising edge on see models a particle strike on the output node. What it
// does depends on the state of the cell. With equal inputs the output is
// driven through a conducting path, so the strike is a single event
// transient (SET): the output flips for SET_WIDTH time units and then
// recovers. With different inputs the cell is only storing its value, so
// the strike is a single event upset (SEU): the stored value flips and stays
// flipped until the inputs agree again.
//
// The state-dependent SET/SEU behaviour follows the C-element state graph of
// the scheme; the reset, the delays and the strike port are this model's
// choices.
module c_element #(
  parameter int unsigned DELAY     = 1,
  parameter int unsigned SET_WIDTH = 2
) (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic see,
  output logic y
);
  logic q;        // stored value
  logic set_on;   // transient flip while a SET is in progress
  logic see_seen; // last value of see, to find its rising edge

  initial begin
    q        = 1'b0;
    set_on   = 1'b0;
    see_seen = 1'b0;
  end

  // State update and SEU.
  always @(a or b or rst_n or see) begin
    if (!rst_n)                      q <= 1'b0;
    else if (see && !see_seen && a != b) q <= ~q;
    else if (a == b)                 q <= a;
    see_seen = see;
  end

  // SET: a transient pulse on a driven output.
  always @(posedge see) begin
    if (rst_n && a == b) begin
      set_on = 1'b1;
      #(SET_WIDTH);
      set_on = 1'b0;
    end
  end

  assign #(DELAY) y = q ^ set_on;

endmodule
