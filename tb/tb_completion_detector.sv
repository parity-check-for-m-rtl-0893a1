// tb_completion_detector: exhaustive check of the 4-wire NOR completion
// detector: high only for the spacer.
module tb_completion_detector;
  int checks = 0, failures = 0;
  logic [3:0] w;
  logic       e;

  completion_detector u_dut (.wires_i(w), .empty_o(e));

  initial begin
    for (int v = 0; v < 16; v++) begin
      w = 4'(v);
      #1;
      checks++;
      if (e != (v == 0)) begin
        failures++;
        $display("FAIL wires %b empty %b", w, e);
      end
    end
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
