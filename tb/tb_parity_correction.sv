// tb_parity_correction: the 4-row 1-of-4 correction example (row 0110 with
// transmitted parity 0110 and regenerated parity 0010 becomes 0010), then
// random 32-bit flits with every class of injected error. Checks the
// corrected rows, the syndrome and the status flags.
module tb_parity_correction;
  import mofn_parity_pkg::*;
  import tb_ref_pkg::*;
  import tb_err_pkg::*;

  int checks = 0, failures = 0;

  // 8-bit example
  logic [3:0][3:0]  x_in, x_out;
  logic [3:0]       x_tx, x_calc, x_syn;
  dec_status_t      x_st;

  parity_correction #(.DATA_W(8), .N_WIRES(4)) u_small (
    .data_cw_i(x_in), .tx_parity_i(x_tx), .calc_parity_i(x_calc), .parity_cw_err_i(1'b0),
    .data_cw_o(x_out), .syndrome_o(x_syn), .status_o(x_st));

  logic [15:0][3:0] d_in, d_out;
  logic [3:0]       tx, calc, syn;
  logic             perr;
  dec_status_t      st;

  parity_correction u_dut (
    .data_cw_i(d_in), .tx_parity_i(tx), .calc_parity_i(calc), .parity_cw_err_i(perr),
    .data_cw_o(d_out), .syndrome_o(syn), .status_o(st));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    x_in   = {4'b0100, 4'b0110, 4'b1000, 4'b1000};
    x_tx   = 4'b0110;
    x_calc = 4'b0010;
    #1;
    check(x_syn == 4'b0100, "example column error indication");
    check(x_out == {4'b0100, 4'b0010, 4'b1000, 4'b1000}, "example corrected matrix");
    check(x_st.corrected && !x_st.uncorrectable && x_st.data_cw_err, "example status");

    for (int i = 0; i < 1200; i++) begin
      mat_t m, g;
      int kind;
      m = encode(64'($urandom()), 32, 4);
      kind = i % 5;
      case (kind)
        0: g = m;
        1: g = add_wire(m, 0, 16, 4);
        2: g = move_wire(m, 16, 4);
        3: g = drop_wire(m, 16);
        default: g = add_two(m, 16, 4);
      endcase
      for (int r = 0; r < 16; r++) d_in[r] = g[r][3:0];
      tx   = col_parity(m, 16)[3:0];
      calc = col_parity(g, 16)[3:0];
      perr = 1'b0;
      #1;
      check(syn == (tx ^ calc), "syndrome");
      case (kind)
        0: check(d_out == d_in && st == '0, "clean flit");
        1, 4: begin
          for (int r = 0; r < 16; r++) check(d_out[r] == m[r][3:0], $sformatf("repaired row %0d case %0d", r, kind));
          check(st.corrected && !st.uncorrectable && st.data_cw_err, "repair status");
        end
        2: check(st.uncorrectable && !st.corrected && !st.data_cw_err, "valid wrong codeword detected");
        default: check(st.uncorrectable && !st.corrected && st.data_cw_err, "lost wire detected");
      endcase
      // invalid parity codeword: data is trusted unless a data row is invalid too
      perr = 1'b1;
      #1;
      check(d_out == d_in, "no correction without parity");
      check(st.uncorrectable == (kind == 1 || kind == 3 || kind == 4), "parity and data error");
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
