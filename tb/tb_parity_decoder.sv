// tb_parity_decoder: random extended flits through the decoder, clean and
// with every class of injected link error, under random output
// backpressure. Checks the delivered word and status of each flit in order,
// the one-cycle decode latency, and that the output holds while stalled. A
// dual-rail instance is checked with single extra-wire errors.
module tb_parity_decoder;
  import mofn_parity_pkg::*;
  import tb_ref_pkg::*;
  import tb_err_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic             in_valid, in_ready, out_valid, out_ready;
  logic [17:0][3:0] in_flit;
  logic [31:0]      out_data;
  dec_status_t      out_status;

  parity_decoder u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_flit(in_flit),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_status(out_status));

  // dual rail, 12-bit flits: 12 data codewords + 2 parity codewords
  logic             dr_valid;
  logic [13:0][1:0] dr_flit;
  logic [11:0]      dr_data;
  dec_status_t      dr_status;

  parity_decoder #(.DATA_W(12), .N_WIRES(2)) u_dual (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in_ready(), .in_flit(dr_flit),
    .out_valid(dr_valid), .out_ready(1'b1), .out_data(dr_data), .out_status(dr_status));

  typedef struct {
    bit [31:0] data;
    int        kind;
  } exp_t;
  exp_t   expq[$];
  int     kind_seen[7];
  int     stalls = 0;
  bit     was_stalled = 0;
  logic [31:0] held;

  always @(posedge clk) if (rst_n) begin
    if (was_stalled) check(out_valid && out_data == held, "output held while stalled");
    was_stalled = out_valid && !out_ready;
    held = out_data;
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      exp_t e;
      e = expq.pop_front();
      kind_seen[e.kind]++;
      case (e.kind)
        0: check(out_data == e.data && out_status == '0, "clean flit");
        1, 5: check(out_data == e.data && out_status.corrected && !out_status.uncorrectable,
                    $sformatf("repaired flit case %0d: %h vs %h", e.kind, out_data, e.data));
        2, 6: check(out_status.uncorrectable && !out_status.corrected, $sformatf("detected case %0d", e.kind));
        3: check(out_data == e.data && out_status.parity_cw_err && !out_status.uncorrectable,
                 "parity codeword error ignored");
        default: check(out_status.uncorrectable && out_status.parity_cw_err && out_status.data_cw_err,
                       "parity and data errors");
      endcase
    end
  end

  // kinds: 0 clean, 1 extra wire in data, 2 valid wrong codeword, 3 extra wire
  // in parity, 4 extra wires in parity and data, 5 two repairable extra wires,
  // 6 lost wire
  function automatic mat_t corrupt(mat_t m, int kind);
    case (kind)
      1: return add_wire(m, 0, 16, 4);
      2: return move_wire(m, 16, 4);
      3: return add_wire(m, 16, 2, 4);
      4: return add_wire(add_wire(m, 16, 2, 4), 0, 16, 4);
      5: return add_two(m, 16, 4);
      6: return drop_wire(m, 16);
      default: return m;
    endcase
  endfunction

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0; in_flit = '0; out_ready = 1'b1; dr_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!out_valid, "empty after reset");

    // latency: one flit, output valid exactly one cycle later
    begin
      mat_t m;
      bit [31:0] d;
      d = $urandom();
      m = encode(64'(d), 32, 4);
      for (int r = 0; r < 18; r++) in_flit[r] = m[r][3:0];
      in_valid = 1'b1;
      expq.push_back('{d, 0});
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "one cycle latency");
      @(negedge clk);
    end

    for (int i = 0; i < 700; i++) begin
      mat_t m;
      bit [31:0] d;
      int kind;
      d = $urandom();
      kind = $urandom_range(0, 6);
      m = corrupt(encode(64'(d), 32, 4), kind);
      for (int r = 0; r < 18; r++) in_flit[r] = m[r][3:0];
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (in_valid && in_ready) expq.push_back('{d, kind});
      @(negedge clk);
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (3) @(negedge clk);
    check(expq.size() == 0, "all flits delivered");
    check(stalls > 0, "backpressure exercised");
    for (int k = 0; k < 7; k++) check(kind_seen[k] > 0, $sformatf("error class %0d exercised", k));

    // dual rail
    for (int i = 0; i < 200; i++) begin
      mat_t m;
      bit [11:0] d;
      d = 12'($urandom());
      m = encode(64'(d), 12, 2);
      if (i % 2 == 1) m = add_wire(m, 0, 12, 2);
      for (int r = 0; r < 14; r++) dr_flit[r] = m[r][1:0];
      @(negedge clk);
      check(dr_valid && dr_data == d && !dr_status.uncorrectable, "dual rail flit");
      check(dr_status.corrected == (i % 2 == 1), "dual rail repair flag");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
