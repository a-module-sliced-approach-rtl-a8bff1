// piou: programmable I/O unit of one RFTSAP node.
//
// The unit joins the node's PE to its four neighbours and lets the array be
// rewired around faulty PEs. It holds, as in the source design, four I/O
// ports (U, R, L, D), a status register (SR), a reconfiguration register
// (RR), six programmable switches S1..S6 in two groups and one command
// decoder per group.
//
// PE bus (valid while SR is local.control):
//   pe_port_en[p] selects port p (0 U, 1 R, 2 L, 3 D); with pe_wr the word
//   pe_wdata of kind pe_wkind is queued for sending, with pe_rd the received
//   word (pe_rdata/pe_rkind of the lowest selected port) is taken.
//   pe_rx_ready/pe_tx_ready report each port's buffers.
//   pe_ctrl_wr is the Control_line: RR <= pe_wdata[5:0] (bit s = S(s+1)).
//   pe_bcast_* give each decoder's captured broadcast word to the PE.
// Links: link_in/link_out carry messages, link_full_in/link_full_out the
// back-pressure of the opposite direction; a message moves on an edge where
// it is valid and the receiving side's full is low.
//
// When pe_faulty is raised, SR goes to remote.control; the PE bus is then
// ignored and RR can only be written by a CONFIG message from a neighbour,
// arriving at any port whose switch is open (lowest port first if several
// arrive together). The remote-write mechanism is this design's choice; the
// source design says only that a neighbour takes control.
module piou
  import rftsap_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pe_faulty,
  // PE bus
  input  logic [NPORTS-1:0] pe_port_en,
  input  logic              pe_rd,
  input  logic              pe_wr,
  input  msg_kind_e         pe_wkind,
  input  logic [DATA_W-1:0] pe_wdata,
  output logic [DATA_W-1:0] pe_rdata,
  output msg_kind_e         pe_rkind,
  output logic [NPORTS-1:0] pe_rx_ready,
  output logic [NPORTS-1:0] pe_tx_ready,
  input  logic              pe_ctrl_wr,
  output logic [NGRP-1:0]   pe_bcast_valid,
  output logic [DATA_W-1:0] pe_bcast_data [NGRP],
  input  logic [NGRP-1:0]   pe_bcast_ack,
  output sr_state_e         sr_state,
  output logic [NSW-1:0]    rr_closed,
  output logic              rr_reject,
  // links, index = port
  input  link_msg_t         link_in       [NPORTS],
  input  logic              link_full_in  [NPORTS],
  output link_msg_t         link_out      [NPORTS],
  output logic              link_full_out [NPORTS]
);

  link_msg_t         port_tx      [NPORTS];
  link_msg_t         port_rx      [NPORTS];
  logic              port_tx_full [NPORTS];
  logic              port_rx_full [NPORTS];
  logic [DATA_W-1:0] port_rdata   [NPORTS];
  msg_kind_e         port_rkind   [NPORTS];
  logic [NPORTS-1:0] port_cfg_wr;
  logic [NSW-1:0]    port_cfg_data [NPORTS];

  logic              dec_active    [NGRP];
  link_msg_t         dec_msg       [NGRP][2];
  logic              dec_down_full [NGRP][2];
  logic              dec_hold      [NGRP][2];

  logic              remote_wr;
  logic [NSW-1:0]    remote_data;

  status_register u_sr (
    .clk, .rst_n, .pe_faulty, .sr(sr_state)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    piou_port u_port (
      .clk, .rst_n,
      .sr       (sr_state),
      .en       (pe_port_en[p]),
      .rd       (pe_rd),
      .wr       (pe_wr),
      .wkind    (pe_wkind),
      .wdata    (pe_wdata),
      .rdata    (port_rdata[p]),
      .rkind    (port_rkind[p]),
      .rx_ready (pe_rx_ready[p]),
      .tx_ready (pe_tx_ready[p]),
      .tx_msg   (port_tx[p]),
      .tx_full  (port_tx_full[p]),
      .rx_msg   (port_rx[p]),
      .rx_full  (port_rx_full[p]),
      .cfg_wr   (port_cfg_wr[p]),
      .cfg_data (port_cfg_data[p])
    );
  end

  // PE read data: lowest selected port.
  always_comb begin
    pe_rdata = port_rdata[0];
    pe_rkind = port_rkind[0];
    for (int p = NPORTS - 1; p >= 0; p--) begin
      if (pe_port_en[p]) begin
        pe_rdata = port_rdata[p];
        pe_rkind = port_rkind[p];
      end
    end
  end

  // Remote configuration: lowest port carrying a CONFIG message.
  always_comb begin
    remote_wr   = |port_cfg_wr;
    remote_data = port_cfg_data[0];
    for (int p = NPORTS - 1; p >= 0; p--)
      if (port_cfg_wr[p]) remote_data = port_cfg_data[p];
  end

  reconfig_register u_rr (
    .clk, .rst_n,
    .sr          (sr_state),
    .local_wr    (pe_ctrl_wr),
    .local_data  (pe_wdata[NSW-1:0]),
    .remote_wr   (remote_wr),
    .remote_data (remote_data),
    .closed      (rr_closed),
    .reject      (rr_reject)
  );

  switch_matrix u_sw (
    .clk, .rst_n,
    .closed        (rr_closed),
    .link_in       (link_in),
    .link_full_in  (link_full_in),
    .link_out      (link_out),
    .link_full_out (link_full_out),
    .port_tx       (port_tx),
    .port_tx_full  (port_tx_full),
    .port_rx       (port_rx),
    .port_rx_full  (port_rx_full),
    .dec_active    (dec_active),
    .dec_msg       (dec_msg),
    .dec_down_full (dec_down_full),
    .dec_hold      (dec_hold)
  );

  for (genvar g = 0; g < NGRP; g++) begin : g_dec
    command_decoder u_dec (
      .clk, .rst_n,
      .sr          (sr_state),
      .active      (dec_active[g]),
      .pass_msg    (dec_msg[g]),
      .down_full   (dec_down_full[g]),
      .hold        (dec_hold[g]),
      .bcast_valid (pe_bcast_valid[g]),
      .bcast_data  (pe_bcast_data[g]),
      .bcast_ack   (pe_bcast_ack[g])
    );
  end

endmodule
