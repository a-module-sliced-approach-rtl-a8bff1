// tb_piou: self-checking test of a complete programmable I/O unit.
// The bench plays the node's PE and the four neighbours. It checks, in order:
//  1. local traffic: a word written to each port leaves on that port's link
//     one edge later, and a word arriving on each link reaches the PE;
//  2. a refused RR setting (two switches sharing a port);
//  3. bypass with S4 (R-L) closed: messages and back-pressure cross the node
//     in the same cycle in both directions, and the R and L buffers are cut
//     off;
//  4. broadcasts through the closed switch: decoder 2 copies them for the
//     PE and holds the next one back until the PE acknowledges; a broadcast
//     through S3 (U-D) goes to decoder 1;
//  5. remote control: after pe_faulty, PE writes are ignored, a CONFIG
//     message from a neighbour loads RR, and broadcasts are not copied.
module tb_piou;
  import rftsap_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              pe_faulty = 1'b0;
  logic [NPORTS-1:0] pe_port_en = '0;
  logic              pe_rd = 1'b0, pe_wr = 1'b0;
  msg_kind_e         pe_wkind = MSG_DATA;
  logic [DATA_W-1:0] pe_wdata = '0;
  logic [DATA_W-1:0] pe_rdata;
  msg_kind_e         pe_rkind;
  logic [NPORTS-1:0] pe_rx_ready, pe_tx_ready;
  logic              pe_ctrl_wr = 1'b0;
  logic [NGRP-1:0]   pe_bcast_valid;
  logic [DATA_W-1:0] pe_bcast_data [NGRP];
  logic [NGRP-1:0]   pe_bcast_ack = '0;
  sr_state_e         sr_state;
  logic [NSW-1:0]    rr_closed;
  logic              rr_reject;
  link_msg_t         link_in       [NPORTS];
  logic              link_full_in  [NPORTS];
  link_msg_t         link_out      [NPORTS];
  logic              link_full_out [NPORTS];

  int checks = 0, failures = 0;

  piou dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic link_msg_t mk(msg_kind_e k, logic [DATA_W-1:0] d);
    return '{valid: 1'b1, kind: k, data: d};
  endfunction

  task automatic idle_links();
    for (int p = 0; p < NPORTS; p++) begin
      link_in[p] = '0;
      link_full_in[p] = 1'b0;
    end
  endtask

  task automatic ctrl_write(logic [NSW-1:0] v);
    @(negedge clk);
    pe_ctrl_wr = 1'b1; pe_wdata = DATA_W'(v);
    @(negedge clk);
    pe_ctrl_wr = 1'b0;
  endtask

  initial begin
    idle_links();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(sr_state == SR_LOCAL && rr_closed == '0, "reset state");

    // ---- 1. local traffic on every port ----
    for (int p = 0; p < NPORTS; p++) begin
      automatic logic [DATA_W-1:0] d = DATA_W'($urandom);
      @(negedge clk);
      chk(pe_tx_ready[p], "tx_ready before write");
      pe_port_en = NPORTS'(1 << p); pe_wr = 1'b1; pe_wkind = MSG_DATA; pe_wdata = d;
      @(negedge clk);
      pe_wr = 1'b0; pe_port_en = '0;
      chk(link_out[p].valid && link_out[p].data == d, $sformatf("port %0d tx on link", p));
      for (int q = 0; q < NPORTS; q++)
        if (q != p) chk(!link_out[q].valid, "no tx on other ports");
      @(negedge clk);
      chk(!link_out[p].valid, "tx taken after one edge");
      // receive
      link_in[p] = mk(MSG_DATA, ~d);
      @(negedge clk);
      link_in[p] = '0;
      chk(pe_rx_ready[p] && link_full_out[p], "rx ready and full");
      pe_port_en = NPORTS'(1 << p); pe_rd = 1'b1;
      #1 chk(pe_rdata == ~d, $sformatf("port %0d rx data", p));
      @(negedge clk);
      pe_rd = 1'b0; pe_port_en = '0;
      chk(!pe_rx_ready[p] && !link_full_out[p], "rx freed");
    end

    // ---- 2. refused setting: S4 (R-L) with S5 (R-D) ----
    ctrl_write(6'b011000);
    chk(rr_reject && rr_closed == '0, "conflicting RR setting refused");

    // ---- 3. bypass through S4 ----
    ctrl_write(6'b001000);
    chk(!rr_reject && rr_closed == 6'b001000, "S4 closed");
    for (int c = 0; c < 50; c++) begin
      automatic logic [DATA_W-1:0] d0 = DATA_W'($urandom);
      automatic logic [DATA_W-1:0] d1 = DATA_W'($urandom);
      automatic logic f0 = 1'($urandom_range(0, 1));
      automatic logic f1 = 1'($urandom_range(0, 1));
      @(negedge clk);
      link_in[PORT_L] = mk(MSG_DATA, d0);
      link_in[PORT_R] = mk(MSG_CONFIG, d1);
      link_full_in[PORT_R] = f0;
      link_full_in[PORT_L] = f1;
      #1;
      chk(link_out[PORT_R] == mk(MSG_DATA, d0), "L to R same cycle");
      chk(link_out[PORT_L] == mk(MSG_CONFIG, d1), "R to L same cycle");
      chk(link_full_out[PORT_L] == f0 && link_full_out[PORT_R] == f1, "full passed back");
      chk(!pe_rx_ready[PORT_L] && !pe_rx_ready[PORT_R], "bypassed ports receive nothing");
    end
    idle_links();
    // PE write to a bypassed port must not reach the link
    @(negedge clk);
    pe_port_en = NPORTS'(1 << PORT_R); pe_wr = 1'b1; pe_wdata = 8'h5a;
    @(negedge clk);
    pe_wr = 1'b0; pe_port_en = '0;
    chk(!link_out[PORT_R].valid, "bypassed port does not drive its link");

    // ---- 4. broadcasts through S4 ----
    link_in[PORT_L] = mk(MSG_BCAST, 8'h11);
    #1 chk(link_out[PORT_R].valid && !link_full_out[PORT_L], "first broadcast passes");
    @(negedge clk);
    chk(pe_bcast_valid == 2'b10 && pe_bcast_data[1] == 8'h11, "decoder 2 copied broadcast");
    link_in[PORT_L] = mk(MSG_BCAST, 8'h22);
    #1 chk(!link_out[PORT_R].valid && link_full_out[PORT_L], "second broadcast held");
    @(negedge clk);
    chk(pe_bcast_data[1] == 8'h11, "held broadcast not copied");
    pe_bcast_ack = 2'b10;
    @(negedge clk);
    pe_bcast_ack = '0;
    #1 chk(link_out[PORT_R].valid && link_out[PORT_R].data == 8'h22, "second broadcast released");
    @(negedge clk);
    chk(pe_bcast_valid[1] && pe_bcast_data[1] == 8'h22, "second broadcast copied");
    link_in[PORT_L] = mk(MSG_DATA, 8'h33);
    #1 chk(link_out[PORT_R].valid && !link_full_out[PORT_L], "data not held by full decoder");
    @(negedge clk);
    link_in[PORT_L] = '0;
    pe_bcast_ack = 2'b10;
    @(negedge clk);
    pe_bcast_ack = '0;
    // S3 (U-D) uses decoder 1
    ctrl_write(6'b000100);
    link_in[PORT_D] = mk(MSG_BCAST, 8'h44);
    #1 chk(link_out[PORT_U].valid && link_out[PORT_U].data == 8'h44, "D to U through S3");
    @(negedge clk);
    link_in[PORT_D] = '0;
    chk(pe_bcast_valid == 2'b01 && pe_bcast_data[0] == 8'h44, "decoder 1 copied broadcast");
    pe_bcast_ack = 2'b01;
    @(negedge clk);
    pe_bcast_ack = '0;

    // ---- 5. remote control ----
    pe_faulty = 1'b1;
    @(negedge clk);
    pe_faulty = 1'b0;
    chk(sr_state == SR_REMOTE, "SR remote after fault");
    ctrl_write(6'b000001);
    chk(rr_closed == 6'b000100, "PE write ignored in remote.control");
    link_in[PORT_L] = mk(MSG_CONFIG, 8'h20); // S6: L-D
    #1 chk(!link_full_out[PORT_L], "remote port accepts");
    @(negedge clk);
    link_in[PORT_L] = '0;
    chk(rr_closed == 6'b100000, "neighbour loaded RR");
    link_in[PORT_L] = mk(MSG_BCAST, 8'h55);
    #1 chk(link_out[PORT_D].valid && link_out[PORT_D].data == 8'h55, "L to D through S6");
    @(negedge clk);
    link_in[PORT_L] = '0;
    chk(pe_bcast_valid == 2'b00, "no copy in remote.control");
    link_in[PORT_U] = mk(MSG_DATA, 8'h66);
    @(negedge clk);
    link_in[PORT_U] = '0;
    chk(rr_closed == 6'b100000 && !pe_rx_ready[PORT_U], "data dropped in remote.control");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
