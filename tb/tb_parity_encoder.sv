// tb_parity_encoder: drives the encoder with the worked 16-bit example and
// with random 32-bit flits under random output backpressure. Checks every
// extended flit against the reference model, the order of flits, the
// one-cycle latency from acceptance to output, that the output holds while
// stalled, and that a full-rate stream runs at one flit per cycle.
module tb_parity_encoder;
  import tb_ref_pkg::*;

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

  // Worked example: 16-bit word, 8 data codewords, 2 parity codewords.
  logic             e_in_valid, e_in_ready, e_out_valid;
  logic [15:0]      e_in_data;
  logic [9:0][3:0]  e_out_flit;

  parity_encoder #(.DATA_W(16), .N_WIRES(4)) u_small (
    .clk(clk), .rst_n(rst_n), .in_valid(e_in_valid), .in_ready(e_in_ready),
    .in_data(e_in_data), .out_valid(e_out_valid), .out_ready(1'b1), .out_flit(e_out_flit));

  // Default configuration.
  logic             in_valid, in_ready, out_valid, out_ready;
  logic [31:0]      in_data;
  logic [17:0][3:0] out_flit;

  parity_encoder u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_flit(out_flit));

  bit [31:0] sent[$];
  longint    accept_cycle[$];
  longint    cycle = 0;
  int        received = 0;
  int        stalls = 0;
  int        stream_phase = 0;  // 1 while measuring full-rate throughput
  int        stream_out = 0;
  logic [17:0][3:0] held;
  bit        was_stalled = 0;

  always @(negedge clk) cycle++;

  // Output monitor.
  always @(posedge clk) if (rst_n) begin
    if (was_stalled) check(out_valid && out_flit == held, "output held while stalled");
    was_stalled = out_valid && !out_ready;
    held = out_flit;
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      mat_t m;
      bit [31:0] d;
      longint c;
      d = sent.pop_front();
      c = accept_cycle.pop_front();
      m = encode(64'(d), 32, 4);
      for (int r = 0; r < 18; r++) check(out_flit[r] == m[r][3:0], $sformatf("flit %0d row %0d", received, r));
      if (stream_phase == 1) check(cycle == c + 1, "one cycle latency");
      if (stream_phase == 1) stream_out++;
      received++;
    end
  end

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    sent.push_back(in_data);
    accept_cycle.push_back(cycle);
  end

  initial begin
    rst_n = 1'b0;
    e_in_valid = 1'b0; e_in_data = '0;
    in_valid = 1'b0; in_data = '0; out_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!out_valid && !e_out_valid, "empty after reset");

    // worked example
    @(negedge clk);
    e_in_valid = 1'b1;
    e_in_data  = 16'b0111100110111100;
    @(negedge clk);
    e_in_valid = 1'b0;
    check(e_out_valid, "example valid after one cycle");
    check(e_out_flit == {4'b0100, 4'b0010,
                         4'b0010, 4'b1000, 4'b0100, 4'b0010,
                         4'b0100, 4'b1000, 4'b1000, 4'b0001}, "worked example extended flit");

    // random traffic with backpressure
    for (int i = 0; i < 400; i++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_data   = $urandom();
      out_ready = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      while (in_valid && !in_ready) begin
        out_ready = ($urandom_range(0, 2) != 0);
        @(negedge clk);
      end
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (3) @(negedge clk);

    // full-rate stream: 50 flits in 50 cycles
    stream_phase = 1;
    for (int i = 0; i < 50; i++) begin
      in_valid = 1'b1;
      in_data  = $urandom();
      @(negedge clk);
      check(in_ready, "ready during full-rate stream");
    end
    in_valid = 1'b0;
    @(negedge clk);
    check(stream_out == 50, $sformatf("throughput: %0d of 50 flits out", stream_out));
    check(stalls > 0, "backpressure exercised");
    check(sent.size() == 0, "all flits delivered");
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
