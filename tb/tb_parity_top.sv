// tb_parity_top: end-to-end test of the parity-protected path at the default
// configuration (32-bit flits, 1-of-4 code, 18 codewords per extended flit).
//
// A sending process offers random flits on the sender clock. A network model
// takes extended flits from noc_tx_* whenever it has room, delays them, may
// corrupt them with one class of link error, and delivers them on noc_rx_*
// on the unrelated receiver clock. A receiving process takes words from
// rx_* with random backpressure and checks each word and its status
// against what was sent and what was injected. Each mechanism is counted
// and must occur: repair of an extra wire in a data codeword, repair of two
// such errors in different columns, detection of a valid but wrong codeword,
// detection of a lost wire, an invalid parity codeword left uncorrected,
// parity and data errors together, and backpressure on both sides.
module tb_parity_top;
  import mofn_parity_pkg::*;
  import tb_ref_pkg::*;
  import tb_err_pkg::*;

  localparam int NFLITS = 2000;

  int checks = 0, failures = 0;
  logic tx_clk = 1'b0, rx_clk = 1'b0;
  logic tx_rst_n = 1'b0, rx_rst_n = 1'b0;
  always #5 tx_clk = ~tx_clk;
  always #7 rx_clk = ~rx_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic             tx_valid, tx_ready, noc_tx_valid, noc_tx_ready;
  logic [31:0]      tx_data;
  logic [17:0][3:0] noc_tx_flit;
  logic             noc_rx_valid, noc_rx_ready, rx_valid, rx_ready;
  logic [17:0][3:0] noc_rx_flit;
  logic [31:0]      rx_data;
  dec_status_t      rx_status;

  parity_top u_dut (
    .tx_clk(tx_clk), .tx_rst_n(tx_rst_n), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .tx_data(tx_data), .noc_tx_valid(noc_tx_valid), .noc_tx_ready(noc_tx_ready),
    .noc_tx_flit(noc_tx_flit),
    .rx_clk(rx_clk), .rx_rst_n(rx_rst_n), .noc_rx_valid(noc_rx_valid),
    .noc_rx_ready(noc_rx_ready), .noc_rx_flit(noc_rx_flit), .rx_valid(rx_valid),
    .rx_ready(rx_ready), .rx_data(rx_data), .rx_status(rx_status));

  typedef struct {
    mat_t flit;
    int   kind;
  } link_t;

  bit [31:0] sent[$];
  link_t     link[$];    // in flight in the network model
  int        kinds[$];   // error class of each flit handed to the decoder
  int        mech[10];
  string     mech_name[10] = '{"clean", "extra data wire repaired", "valid wrong codeword detected",
                               "invalid parity codeword ignored", "parity and data error detected",
                               "two errors repaired", "lost wire detected",
                               "sender stalled by network", "receiver backpressure", "network stalled by decoder"};
  int        received = 0;
  bit [31:0] sent_log[$]; // every word sent, in order
  int        to_network = 0;

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

  // sender IP core
  initial begin
    tx_valid = 1'b0;
    tx_data  = '0;
    wait (tx_rst_n);
    for (int i = 0; i < NFLITS; i++) begin
      @(negedge tx_clk);
      while ($urandom_range(0, 4) == 0) @(negedge tx_clk);
      tx_valid = 1'b1;
      tx_data  = $urandom();
      #1;
      while (!tx_ready) begin
        @(negedge tx_clk);
        #1;
      end
      sent.push_back(tx_data);
      sent_log.push_back(tx_data);
      @(posedge tx_clk);
      #1;
      tx_valid = 1'b0;
    end
  end

  // network model, sender side: accepts when it has room
  always @(negedge tx_clk) begin
    noc_tx_ready <= (link.size() < 6) && ($urandom_range(0, 5) != 0);
  end
  always @(posedge tx_clk) if (tx_rst_n) begin
    if (noc_tx_valid && !noc_tx_ready) mech[7]++;
    if (noc_tx_valid && noc_tx_ready) begin
      mat_t m;
      int kind;
      m = '0;
      for (int r = 0; r < 18; r++) m[r] = {4'b0, noc_tx_flit[r]};
      check(m == encode(64'(sent_log[to_network]), 32, 4), $sformatf("extended flit %0d from encoder", to_network));
      to_network++;
      kind = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 6);
      link.push_back('{corrupt(m, kind), kind});
    end
  end

  // network model, receiver side
  initial begin
    noc_rx_valid = 1'b0;
    noc_rx_flit  = '0;
    wait (rx_rst_n);
    forever begin
      @(negedge rx_clk);
      if (link.size() > 0 && $urandom_range(0, 3) != 0) begin
        link_t l;
        l = link.pop_front();
        for (int r = 0; r < 18; r++) noc_rx_flit[r] = l.flit[r][3:0];
        noc_rx_valid = 1'b1;
        #1;
        while (!noc_rx_ready) begin
          mech[9]++;
          @(negedge rx_clk);
          #1;
        end
        kinds.push_back(l.kind);
        @(posedge rx_clk);
        #1;
        noc_rx_valid = 1'b0;
      end
    end
  end

  // receiver IP core
  always @(negedge rx_clk) rx_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge rx_clk) if (rx_rst_n) begin
    if (rx_valid && !rx_ready) mech[8]++;
    if (rx_valid && rx_ready) begin
      bit [31:0] d;
      int kind;
      d = sent.pop_front();
      kind = kinds.pop_front();
      mech[kind]++;
      received++;
      case (kind)
        0: check(rx_data == d && rx_status == '0, $sformatf("flit %0d clean", received));
        1, 5: check(rx_data == d && rx_status.corrected && !rx_status.uncorrectable,
                    $sformatf("flit %0d repaired (class %0d)", received, kind));
        3: check(rx_data == d && rx_status.parity_cw_err && !rx_status.uncorrectable,
                 $sformatf("flit %0d parity codeword error", received));
        default: check(rx_status.uncorrectable && !rx_status.corrected,
                       $sformatf("flit %0d error detected (class %0d)", received, kind));
      endcase
    end
  end

  initial begin
    tx_rst_n = 1'b0;
    rx_rst_n = 1'b0;
    rx_ready = 1'b0;
    noc_tx_ready = 1'b0;
    #33;
    tx_rst_n = 1'b1;
    rx_rst_n = 1'b1;
    wait (received == NFLITS);
    repeat (5) @(posedge rx_clk);
    check(sent.size() == 0 && link.size() == 0, "nothing left in flight");
    for (int k = 0; k < 10; k++) begin
      $display("mechanism %-32s %0d", mech_name[k], mech[k]);
      check(mech[k] > 0, $sformatf("mechanism '%s' occurred", mech_name[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFLITS * 40) @(posedge tx_clk);
    failures++;
    $display("watchdog: %0d of %0d flits received", received, NFLITS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
