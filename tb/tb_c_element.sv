// tb_c_element: checks the C-element model: reset, the hold/follow rule in
// all input combinations, a transient (SET) when struck with equal inputs in
// both output states, and a lasting flip (SEU) when struck with different
// inputs in both output states, cleared when the inputs agree again.
module tb_c_element;
  int checks = 0, failures = 0;
  logic rst_n, a, b, see, y;

  c_element #(.DELAY(1), .SET_WIDTH(2)) u_dut (.rst_n(rst_n), .a(a), .b(b), .see(see), .y(y));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: a=%b b=%b y=%b", what, $time, a, b, y);
    end
  endtask

  task automatic strike();
    see = 1'b1;
    #0.5;
    see = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; a = 1'b1; b = 1'b1; see = 1'b0;
    #5;
    check(y == 1'b0, "reset");
    rst_n = 1'b1; a = 1'b0; b = 1'b0;
    #5;
    // follow and hold
    a = 1'b1;        #5; check(y == 1'b0, "hold 0 with 10");
    b = 1'b1;        #5; check(y == 1'b1, "rise with 11");
    a = 1'b0;        #5; check(y == 1'b1, "hold 1 with 01");
    b = 1'b0;        #5; check(y == 1'b0, "fall with 00");
    b = 1'b1;        #5; check(y == 1'b0, "hold 0 with 01");
    b = 1'b0;        #5; check(y == 1'b0, "still 0 with 00");

    // SET in state 000: short pulse, then back
    strike();
    #1.2; check(y == 1'b1, "SET pulse in 000");
    #5;   check(y == 1'b0, "SET recovers in 000");
    // SET in state 111
    a = 1'b1; b = 1'b1; #5;
    strike();
    #1.2; check(y == 1'b0, "SET pulse in 111");
    #5;   check(y == 1'b1, "SET recovers in 111");

    // SEU with inputs 10 holding 1
    b = 1'b0; #5;
    strike();
    #5;  check(y == 1'b0, "SEU flips stored 1");
    #20; check(y == 1'b0, "SEU lasts");
    b = 1'b1; #5; check(y == 1'b1, "inputs 11 restore 1");
    // SEU with inputs 01 holding 0
    a = 1'b0; b = 1'b0; #5;
    b = 1'b1; #5;
    strike();
    #5;  check(y == 1'b1, "SEU flips stored 0");
    #20; check(y == 1'b1, "SEU lasts");
    b = 1'b0; #5; check(y == 1'b0, "inputs 00 restore 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
