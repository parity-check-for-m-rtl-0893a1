// tb_binary_conversion: converts reference 1-of-n codewords back to binary
// for random words (1-of-4, 32 bits; dual rail, 9 bits with a padded group)
// and checks the result, plus the decoding of each single 1-of-4 codeword.
module tb_binary_conversion;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0][3:0] cw32;
  logic [31:0]      d32;
  logic [8:0][1:0]  cw9;
  logic [8:0]       d9;
  logic [0:0][3:0]  cw2;
  logic [1:0]       d2;

  binary_conversion                           u32 (.cw_i(cw32), .bin_o(d32));
  binary_conversion #(.WIDTH(9), .N_WIRES(2)) u9  (.cw_i(cw9),  .bin_o(d9));
  binary_conversion #(.WIDTH(2), .N_WIRES(4)) u2  (.cw_i(cw2),  .bin_o(d2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    // the four 1-of-4 codewords: 0001 "00", 0010 "01", 0100 "10", 1000 "11"
    for (int v = 0; v < 4; v++) begin
      cw2[0] = 4'(1 << v);
      #1;
      check(d2 == 2'(v), $sformatf("codeword for %0d", v));
    end
    for (int i = 0; i < 500; i++) begin
      mat_t m;
      bit [31:0] x;
      bit [8:0]  y;
      x = $urandom();
      y = 9'($urandom());
      m = encode(64'(x), 32, 4);
      for (int r = 0; r < 16; r++) cw32[r] = m[r][3:0];
      m = encode(64'(y), 9, 2);
      for (int r = 0; r < 9; r++) cw9[r] = m[r][1:0];
      #1;
      check(d32 == x, $sformatf("1-of-4 %h got %h", x, d32));
      check(d9 == y, $sformatf("dual rail %h got %h", y, d9));
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
