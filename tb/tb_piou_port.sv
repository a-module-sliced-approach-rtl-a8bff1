// tb_piou_port: self-checking test of one PIOU I/O port.
// Local phase: the PE side writes random words whenever tx_ready and reads
// whenever rx_ready; the link side offers random messages and shows random
// back-pressure. Scoreboards (queues) check that every word the PE wrote
// leaves on the link once and in order, and every message accepted from the
// link reaches the PE once and in order. The one-edge write-to-link latency
// is checked. Remote phase: with SR remote, the port must never show full,
// refuse PE writes, and raise cfg_wr exactly for CONFIG messages.
module tb_piou_port;
  import rftsap_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  sr_state_e         sr = SR_LOCAL;
  logic              en = 1'b0, rd = 1'b0, wr = 1'b0;
  msg_kind_e         wkind = MSG_DATA;
  logic [DATA_W-1:0] wdata = '0;
  logic [DATA_W-1:0] rdata;
  msg_kind_e         rkind;
  logic              rx_ready, tx_ready;
  link_msg_t         tx_msg;
  logic              tx_full = 1'b0;
  link_msg_t         rx_msg = '0;
  logic              rx_full;
  logic              cfg_wr;
  logic [NSW-1:0]    cfg_data;

  int checks = 0, failures = 0;
  int n_tx = 0, n_rx = 0, n_cfg = 0;
  logic [DATA_W+1:0] txq [$];
  logic [DATA_W+1:0] rxq [$];

  piou_port dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    $display("FAIL @%0t: %s", $time, m);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // ---- local.control phase ----
    for (int c = 0; c < 3000; c++) begin
      logic do_wr, do_rd, acc_tx, acc_rx, was_ready;
      @(negedge clk);
      en      = 1'b1;
      do_wr   = tx_ready && $urandom_range(0, 1);
      do_rd   = rx_ready && $urandom_range(0, 1);
      wr      = do_wr;
      rd      = do_rd;
      wkind   = msg_kind_e'($urandom_range(0, 2));
      wdata   = DATA_W'($urandom);
      tx_full = ($urandom_range(0, 2) == 0);
      if (!rx_msg.valid || !rx_full)
        rx_msg = '{valid: ($urandom_range(0, 1) == 1), kind: msg_kind_e'($urandom_range(0, 2)),
                   data: DATA_W'($urandom)};
      #1;
      // rx side: a PE read returns the oldest accepted message
      if (do_rd) begin
        checks++;
        if (rxq.size() == 0) fail("read with nothing accepted");
        else begin
          automatic logic [DATA_W+1:0] e = rxq.pop_front();
          if ({rkind, rdata} !== e) fail($sformatf("rx data %h expected %h", {rkind, rdata}, e));
        end
      end
      acc_tx = tx_msg.valid && !tx_full;
      acc_rx = rx_msg.valid && !rx_full;
      was_ready = tx_ready;
      if (do_wr) txq.push_back({wkind, wdata});
      @(posedge clk);
      if (acc_tx) begin
        checks++; n_tx++;
        if (txq.size() == 0) fail("link took a word never written");
        else begin
          automatic logic [DATA_W+1:0] e = txq.pop_front();
          if ({tx_msg.kind, tx_msg.data} !== e) fail("tx data mismatch");
        end
      end
      if (acc_rx) begin
        rxq.push_back({rx_msg.kind, rx_msg.data});
        n_rx++;
      end
      #1;
      // latency: a word written at this edge is on the link right after it
      if (do_wr) begin
        checks++;
        if (!tx_msg.valid || tx_msg.data !== wdata) fail("write not on link after one edge");
      end
      checks++;
      if (cfg_wr) fail("cfg_wr in local.control");
    end
    // ---- remote.control phase ----
    @(negedge clk);
    sr = SR_REMOTE; rd = 1'b0; wr = 1'b0; en = 1'b0; rx_msg = '0;
    @(posedge clk); #1;
    checks++;
    if (tx_msg.valid || rx_ready || tx_ready) fail("remote: buffers not cleared");
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      en = 1'b1; wr = $urandom_range(0, 1); rd = $urandom_range(0, 1);
      rx_msg = '{valid: ($urandom_range(0, 1) == 1), kind: msg_kind_e'($urandom_range(0, 2)),
                 data: DATA_W'($urandom)};
      #1;
      checks++;
      if (rx_full) fail("remote: port shows full");
      checks++;
      if (cfg_wr !== (rx_msg.valid && rx_msg.kind == MSG_CONFIG)) fail("remote: cfg_wr wrong");
      if (cfg_wr) begin
        n_cfg++;
        checks++;
        if (cfg_data !== rx_msg.data[NSW-1:0]) fail("remote: cfg_data wrong");
      end
      @(posedge clk); #1;
      checks++;
      if (tx_msg.valid || tx_ready || rx_ready) fail("remote: PE side active");
    end
    checks++;
    if (n_tx < 100 || n_rx < 100 || n_cfg < 20) fail($sformatf("coverage tx=%0d rx=%0d cfg=%0d", n_tx, n_rx, n_cfg));
    $display("tx %0d rx %0d cfg %0d", n_tx, n_rx, n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
