// tb_parity_extraction: random extended flits, clean and with an extra wire in
// a parity codeword. Checks that the data rows pass unchanged, that the
// transmitted parity vector is recovered, and that an invalid parity codeword
// (extra wire or no wire) is flagged.
module tb_parity_extraction;
  import tb_ref_pkg::*;
  import tb_err_pkg::*;

  int checks = 0, failures = 0;

  logic [17:0][3:0] flit;
  logic [15:0][3:0] data_cw;
  logic [3:0]       tx_parity;
  logic             perr;

  parity_extraction u_dut (.flit_i(flit), .data_cw_o(data_cw), .tx_parity_o(tx_parity),
                           .parity_cw_err_o(perr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 600; i++) begin
      mat_t m, g;
      int kind;
      m = encode(64'($urandom()), 32, 4);
      kind = i % 3;
      g = m;
      if (kind == 1) g = add_wire(m, 16, 2, 4);
      if (kind == 2) g[16 + $urandom_range(0, 1)] = '0;
      for (int r = 0; r < 18; r++) flit[r] = g[r][3:0];
      #1;
      for (int r = 0; r < 16; r++) check(data_cw[r] == m[r][3:0], "data row passes");
      check(perr == (kind != 0), $sformatf("parity codeword error flag, case %0d", kind));
      if (kind == 0) check(tx_parity == col_parity(m, 16)[3:0], "transmitted parity");
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
