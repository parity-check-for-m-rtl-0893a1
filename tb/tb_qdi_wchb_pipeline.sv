// tb_qdi_wchb_pipeline: drives the three-stage 1-of-4 WCHB pipeline model
// with a four-phase sender and receiver. Checks that a stream of random
// codewords comes out in order, each as a valid 1-of-4 word, with a spacer
// between every two, and that a handshake cycle completes within a bound.
// Then the receiver holds a codeword while the spacer arrives behind it,
// which leaves the last stage's C-elements storing with different inputs; a
// strike on one of the low wires there turns the output into an invalid
// codeword with two wires high that stays (the error the parity scheme
// repairs).
module tb_qdi_wchb_pipeline;
  int checks = 0, failures = 0;

  logic             rst_n = 1'b0;
  logic [3:0]       di, dout;
  logic             ack_out, ack_in;
  logic [2:0][3:0]  see;

  qdi_wchb_pipeline u_dut (.rst_n(rst_n), .di(di), .ack_out(ack_out), .do_o(dout),
                           .ack_in(ack_in), .see(see));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: do=%b", what, $time, dout);
    end
  endtask

  localparam int NWORDS = 40;
  logic [3:0] sent[$];
  int         got = 0;
  bit         hold_mode = 0;
  realtime    t_first, t_last;

  // four-phase sender
  initial begin
    di = '0;
    wait (rst_n);
    for (int i = 0; i < NWORDS + 1; i++) begin
      logic [3:0] cw;
      cw = 4'(1 << $urandom_range(0, 3));
      wait (ack_out == 1'b1);
      #($urandom_range(0, 3));
      di = cw;
      sent.push_back(cw);
      wait (ack_out == 1'b0);
      #($urandom_range(0, 3));
      di = '0;
    end
  end

  // four-phase receiver for the first NWORDS codewords
  initial begin
    ack_in = 1'b1;
    wait (rst_n);
    t_first = $realtime;
    for (int i = 0; i < NWORDS; i++) begin
      logic [3:0] exp;
      wait (dout != '0);
      #2;  // let the word settle
      exp = sent.pop_front();
      check(dout == exp, $sformatf("codeword %0d", i));
      got++;
      #($urandom_range(0, 3));
      ack_in = 1'b0;
      wait (dout == '0);
      check(dout == '0, "spacer between codewords");
      #($urandom_range(0, 3));
      ack_in = 1'b1;
    end
    t_last = $realtime;
    hold_mode = 1;
  end

  initial begin
    rst_n = 1'b0;
    see   = '0;
    #10;
    rst_n = 1'b1;
    wait (hold_mode);
    check(got == NWORDS, "all codewords received");
    check((t_last - t_first) / NWORDS < 30.0, "handshake cycle time bounded");
    // receiver keeps ack_in high and does not take the next codeword
    wait (dout != '0);
    #2;
    check($countones(dout) == 1, "held codeword valid");
    wait (ack_out == 1'b1 && di == '0);   // spacer entered behind it
    #20;
    check(u_dut.data[2] == '0, "spacer has reached the middle stage");
    begin
      int w;
      do w = $urandom_range(0, 3); while (dout[w]);
      see[2][w] = 1'b1;
      #0.5;
      see[2][w] = 1'b0;
      #10;
      check($countones(dout) == 2 && dout[w], "SEU gives an invalid codeword");
      #50;
      check($countones(dout) == 2, "invalid codeword persists");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
