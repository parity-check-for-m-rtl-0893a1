// tb_parity_calculation: column parity of the worked 8-row example (parity
// 1001), of the 4-row corrupted matrix of the correction example (0010), and
// of random matrices against a bit-by-bit count of ones per column.
module tb_parity_calculation;
  int checks = 0, failures = 0;

  logic [7:0][3:0]  m8;
  logic [3:0]       p8;
  logic [3:0][3:0]  m4;
  logic [3:0]       p4;
  logic [15:0][3:0] m16;
  logic [3:0]       p16;

  parity_calculation #(.ROWS(8), .N_WIRES(4)) u8  (.cw_i(m8),  .parity_o(p8));
  parity_calculation #(.ROWS(4), .N_WIRES(4)) u4  (.cw_i(m4),  .parity_o(p4));
  parity_calculation                          u16 (.cw_i(m16), .parity_o(p16));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    m8 = {4'b0010, 4'b1000, 4'b0100, 4'b0010, 4'b0100, 4'b1000, 4'b1000, 4'b0001};
    m4 = {4'b0100, 4'b0110, 4'b1000, 4'b1000};
    #1;
    check(p8 == 4'b1001, "worked example parity");
    check(p4 == 4'b0010, "corrupted example parity");
    for (int i = 0; i < 1000; i++) begin
      for (int r = 0; r < 16; r++) m16[r] = 4'($urandom());
      #1;
      for (int w = 0; w < 4; w++) begin
        int ones;
        ones = 0;
        for (int r = 0; r < 16; r++) if (m16[r][w]) ones++;
        check(p16[w] == ones[0], $sformatf("column %0d", w));
      end
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
