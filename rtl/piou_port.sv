// piou_port: one of the four I/O ports (U, R, L or D) of a programmable I/O
// unit.
//
// The port sits between the PE's data/control bus and one inter-node link.
// It holds a one-entry transmit buffer and a one-entry receive buffer.
//   PE side : en selects the port; with wr the word wdata (kind wkind) is
//             placed in the transmit buffer if tx_ready; with rd the received
//             word (rdata/rkind, valid while rx_ready) is taken and the buffer
//             freed. The source figure shows one Ready line per port; here it
//             is split into rx_ready and tx_ready.
//   Link side: tx_msg is the buffered outgoing message; it is handed over on
//             a clock edge where tx_msg.valid is high and tx_full is low.
//             rx_msg is accepted on an edge where rx_msg.valid is high and
//             rx_full is low. rx_full and tx_msg come straight from flops.
// Timing: a word written at edge N is on the link after N and in the
// neighbour's receive buffer at edge N+1 if that buffer is free.
//
// In remote.control (sr = SR_REMOTE, the node's PE is faulty) the PE side is
// ignored, the transmit buffer is emptied, and the port never reports full:
// every incoming message is consumed, and a CONFIG message raises cfg_wr for
// one cycle with its low six bits on cfg_data, so that a neighbour can load
// the reconfiguration register. Remote configuration by message is this
// design's reading of "controlled by one of its neighboring nodes"; buffer
// depth and handshake are also this design's choices.
module piou_port
  import rftsap_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  sr_state_e         sr,
  // PE side
  input  logic              en,
  input  logic              rd,
  input  logic              wr,
  input  msg_kind_e         wkind,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output msg_kind_e         rkind,
  output logic              rx_ready,
  output logic              tx_ready,
  // link side
  output link_msg_t         tx_msg,
  input  logic              tx_full,
  input  link_msg_t         rx_msg,
  output logic              rx_full,
  // remote configuration
  output logic              cfg_wr,
  output logic [NSW-1:0]    cfg_data
);

  link_msg_t tx_q, rx_q;
  logic      local_ctl;

  assign local_ctl = (sr == SR_LOCAL);

  assign tx_msg   = tx_q;
  assign tx_ready = local_ctl && !tx_q.valid;
  assign rx_ready = local_ctl && rx_q.valid;
  assign rx_full  = local_ctl && rx_q.valid;
  assign rdata    = rx_q.data;
  assign rkind    = rx_q.kind;

  assign cfg_wr   = !local_ctl && rx_msg.valid && (rx_msg.kind == MSG_CONFIG);
  assign cfg_data = rx_msg.data[NSW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_q <= '0;
    end else if (!local_ctl) begin
      tx_q.valid <= 1'b0;
    end else if (tx_q.valid) begin
      if (!tx_full) tx_q.valid <= 1'b0;
    end else if (en && wr) begin
      tx_q <= '{valid: 1'b1, kind: wkind, data: wdata};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_q <= '0;
    end else if (!local_ctl) begin
      rx_q.valid <= 1'b0;
    end else if (rx_q.valid) begin
      if (en && rd) rx_q.valid <= 1'b0;
    end else if (rx_msg.valid) begin
      rx_q <= rx_msg;
    end
  end

endmodule
