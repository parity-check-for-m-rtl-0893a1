// tb_parity_link_see: fault-injection run of the whole path over a modelled
// QDI link.
//
// parity_top at its default size sends each extended flit over 18 parallel
// three-stage 1-of-4 WCHB pipelines, one per codeword, with a four-phase
// handshake joined across all channels. While the receiving end holds a
// flit, with the spacer queued behind it, particle strikes are injected into
// the C-elements of the last stage, which are then storing:
//   - one strike on a low wire: an extra wire high (invalid codeword),
//   - two strikes in one channel, on its high wire and on a low wire:
//     a valid but wrong codeword.
// The channel is chosen among all 18, parity channels included. The received
// flits go to the decoder, and every delivered word and status is checked.
// At the end the testbench prints how many corrupted codewords reached the
// link output, split into invalid and valid-but-wrong, and how many were
// left after the parity decoder: none of the invalid ones, while every
// valid-but-wrong one is flagged uncorrectable.
module tb_parity_link_see;
  import mofn_parity_pkg::*;
  import tb_ref_pkg::*;

  localparam int NFLITS = 600;
  localparam int ROWS   = 18;

  int checks = 0, failures = 0;
  logic tx_clk = 1'b0, rx_clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 tx_clk = ~tx_clk;
  always #6 rx_clk = ~rx_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic                tx_valid, tx_ready, noc_tx_valid, noc_tx_ready;
  logic [31:0]         tx_data;
  logic [ROWS-1:0][3:0] noc_tx_flit;
  logic                noc_rx_valid, noc_rx_ready, rx_valid, rx_ready;
  logic [ROWS-1:0][3:0] noc_rx_flit;
  logic [31:0]         rx_data;
  dec_status_t         rx_status;

  parity_top u_dut (
    .tx_clk(tx_clk), .tx_rst_n(rst_n), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .tx_data(tx_data), .noc_tx_valid(noc_tx_valid), .noc_tx_ready(noc_tx_ready),
    .noc_tx_flit(noc_tx_flit),
    .rx_clk(rx_clk), .rx_rst_n(rst_n), .noc_rx_valid(noc_rx_valid),
    .noc_rx_ready(noc_rx_ready), .noc_rx_flit(noc_rx_flit), .rx_valid(rx_valid),
    .rx_ready(rx_ready), .rx_data(rx_data), .rx_status(rx_status));

  // the link: one QDI pipeline per codeword
  logic [ROWS-1:0][3:0]       ch_di, ch_do;
  logic [ROWS-1:0]            ch_ack_out;
  logic                       ch_ack_in;
  logic [ROWS-1:0][2:0][3:0]  ch_see;

  for (genvar i = 0; i < ROWS; i++) begin : g_ch
    qdi_wchb_pipeline u_ch (
      .rst_n(rst_n), .di(ch_di[i]), .ack_out(ch_ack_out[i]), .do_o(ch_do[i]),
      .ack_in(ch_ack_in), .see(ch_see[i]));
  end

  bit [31:0]            sent[$];
  logic [ROWS-1:0][3:0] to_link[$];
  logic [ROWS-1:0][3:0] from_link[$];
  int                   kinds[$];  // 0 clean, 1 one strike, 2 two strikes
  int                   received = 0;
  int                   link_invalid = 0, link_wrong_valid = 0;
  int                   left_invalid = 0, left_wrong_valid = 0;
  int                   repaired = 0, detected = 0, parity_hits = 0;

  function automatic bit all_valid(logic [ROWS-1:0][3:0] f);
    for (int r = 0; r < ROWS; r++) if ($countones(f[r]) != 1) return 0;
    return 1;
  endfunction

  // sender IP core
  initial begin
    tx_valid = 1'b0;
    tx_data  = '0;
    wait (rst_n);
    for (int i = 0; i < NFLITS; i++) begin
      @(negedge tx_clk);
      tx_valid = 1'b1;
      tx_data  = $urandom();
      #1;
      while (!tx_ready) begin
        @(negedge tx_clk);
        #1;
      end
      sent.push_back(tx_data);
      @(posedge tx_clk);
      #1;
      tx_valid = 1'b0;
    end
  end

  // clocked side of the link entry
  always @(negedge tx_clk) noc_tx_ready <= (to_link.size() < 4);
  always @(posedge tx_clk) if (rst_n && noc_tx_valid && noc_tx_ready) to_link.push_back(noc_tx_flit);

  // four-phase sender into the 18 channels
  initial begin
    ch_di = '0;
    wait (rst_n);
    forever begin
      logic [ROWS-1:0][3:0] f;
      while (to_link.size() == 0) #1;
      f = to_link.pop_front();
      wait (&ch_ack_out);
      #1;
      ch_di = f;
      wait (ch_ack_out == '0);
      #1;
      ch_di = '0;
    end
  end

  // four-phase receiver with strike injection
  initial begin
    ch_ack_in = 1'b1;
    ch_see    = '0;
    wait (rst_n);
    forever begin
      logic [ROWS-1:0][3:0] f;
      int kind, c, w, h;
      while (!all_valid(ch_do)) #1;
      #30;  // the spacer has queued behind the flit
      kind = ($urandom_range(0, 9) < 5) ? 0 : (($urandom_range(0, 9) < 7) ? 1 : 2);
      if (kind != 0) begin
        c = $urandom_range(0, ROWS - 1);
        if (c >= 16) parity_hits++;
        do w = $urandom_range(0, 3); while (ch_do[c][w]);
        ch_see[c][2][w] = 1'b1;
        if (kind == 2) begin
          for (int k = 0; k < 4; k++) if (ch_do[c][k]) h = k;
          ch_see[c][2][h] = 1'b1;
        end
        #0.5;
        ch_see = '0;
      end
      #5;
      f = ch_do;
      if (kind == 1) check(!all_valid(f), "strike left an invalid codeword");
      if (kind == 2) check(all_valid(f), "double strike left a valid codeword");
      if (kind == 1) link_invalid++;
      if (kind == 2) link_wrong_valid++;
      from_link.push_back(f);
      kinds.push_back(kind);
      ch_ack_in = 1'b0;
      wait (ch_do == '0);
      #1;
      ch_ack_in = 1'b1;
    end
  end

  // clocked side of the link exit
  initial begin
    noc_rx_valid = 1'b0;
    noc_rx_flit  = '0;
    wait (rst_n);
    forever begin
      @(negedge rx_clk);
      if (from_link.size() > 0) begin
        noc_rx_flit  = from_link.pop_front();
        noc_rx_valid = 1'b1;
        #1;
        while (!noc_rx_ready) begin
          @(negedge rx_clk);
          #1;
        end
        @(posedge rx_clk);
        #1;
        noc_rx_valid = 1'b0;
      end
    end
  end

  // receiver IP core
  assign rx_ready = 1'b1;
  always @(posedge rx_clk) if (rst_n && rx_valid) begin
    bit [31:0] d;
    int kind;
    d = sent.pop_front();
    kind = kinds.pop_front();
    received++;
    if (kind == 0) check(rx_data == d && rx_status == '0, $sformatf("flit %0d clean", received));
    if (kind == 1) begin
      check(rx_data == d && !rx_status.uncorrectable, $sformatf("flit %0d repaired", received));
      if (rx_data != d) left_invalid++;
      if (rx_status.corrected) repaired++;
    end
    if (kind == 2) begin
      check(rx_status.uncorrectable, $sformatf("flit %0d wrong codeword detected", received));
      if (!rx_status.uncorrectable) left_wrong_valid++;
      else detected++;
    end
  end

  initial begin
    #20;
    rst_n = 1'b1;
    wait (received == NFLITS);
    $display("corrupted flits at the link output: %0d invalid codeword, %0d valid but wrong",
             link_invalid, link_wrong_valid);
    $display("after the parity decoder: %0d invalid left, %0d valid-but-wrong undetected",
             left_invalid, left_wrong_valid);
    $display("repaired %0d, detected %0d, strikes on parity channels %0d", repaired, detected, parity_hits);
    check(link_invalid > 0 && link_wrong_valid > 0, "both error types injected");
    check(repaired > 0 && parity_hits > 0, "data and parity channels hit");
    check(left_invalid == 0 && left_wrong_valid == 0, "nothing left undetected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NFLITS * 2000);
    failures++;
    $display("watchdog: %0d of %0d flits received", received, NFLITS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
