// tb_di_conversion: checks the binary to 1-of-n conversion against the
// worked 16-bit example (0111100110111100 -> eight 1-of-4 codewords) and
// against the reference model for random 32-bit words and for dual rail.
module tb_di_conversion;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0]      d16;
  logic [7:0][3:0]  cw16;
  logic [31:0]      d32;
  logic [15:0][3:0] cw32;
  logic [9:0]       d10;
  logic [9:0][1:0]  cw10;

  di_conversion #(.WIDTH(16), .N_WIRES(4)) u16 (.bin_i(d16), .cw_o(cw16));
  di_conversion                            u32 (.bin_i(d32), .cw_o(cw32));
  di_conversion #(.WIDTH(10), .N_WIRES(2)) u10 (.bin_i(d10), .cw_o(cw10));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    // worked example, rows listed from the least significant pair upwards
    d16 = 16'b0111100110111100;
    #1;
    check(cw16 == {4'b0010, 4'b1000, 4'b0100, 4'b0010,
                   4'b0100, 4'b1000, 4'b1000, 4'b0001}, "worked example");
    for (int i = 0; i < 500; i++) begin
      mat_t m;
      d32 = $urandom();
      d10 = 10'($urandom());
      #1;
      m = encode(64'(d32), 32, 4);
      for (int r = 0; r < 16; r++) check(cw32[r] == m[r][3:0], $sformatf("1-of-4 row %0d of %h", r, d32));
      m = encode(64'(d10), 10, 2);
      for (int r = 0; r < 10; r++) check(cw10[r] == m[r][1:0], $sformatf("dual rail row %0d", r));
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
