// switch_matrix: the six programmable switches S1..S6 of a PIOU.
//
// Each switch joins two of the four ports (S1 U-R, S2 U-L, S3 U-D, S4 R-L,
// S5 R-D, S6 L-D; bit s of closed is S(s+1)). With a switch open, each port's
// link is wired to the port's own buffers. With a switch closed, a message
// arriving on one of its ports leaves on the other in the same cycle, and the
// "full" from the far side is passed back, also in the same cycle: the node
// is bypassed with no register in the path, as the source design asks ("the
// signal can propagate through them with a negligible delay"). The two ports
// of a closed switch are cut off from their buffers (their receive side sees
// no message, their transmit side sees full).
//
// The through-traffic of a closed switch is shown to the command decoder of
// its group (S1..S3: decoder 0, S4..S6: decoder 1); the decoder may hold a
// message back, which removes its valid on the far side and shows full to
// its sender. That six switches exist, close in pairs of ports and fall into
// the groups {S1,S2,S3} and {S4,S5,S6} follows the source design; which pair
// each switch joins is this design's reading of the figure.
//
// At most one closed switch may touch a port (the reconfiguration register
// refuses other settings); an assertion checks it.
//
// Purely combinational; clk and rst_n only serve the assertion.
module switch_matrix
  import rftsap_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NSW-1:0] closed,
  // node links
  input  link_msg_t      link_in       [NPORTS],
  input  logic           link_full_in  [NPORTS],
  output link_msg_t      link_out      [NPORTS],
  output logic           link_full_out [NPORTS],
  // port buffers
  input  link_msg_t      port_tx       [NPORTS],
  output logic           port_tx_full  [NPORTS],
  output link_msg_t      port_rx       [NPORTS],
  input  logic           port_rx_full  [NPORTS],
  // command decoders
  output logic           dec_active    [NGRP],
  output link_msg_t      dec_msg       [NGRP][2],
  output logic           dec_down_full [NGRP][2],
  input  logic           dec_hold      [NGRP][2]
);

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      link_out[p]      = port_tx[p];
      link_full_out[p] = port_rx_full[p];
      port_rx[p]       = link_in[p];
      port_tx_full[p]  = link_full_in[p];
    end
    for (int g = 0; g < NGRP; g++) begin
      dec_active[g] = 1'b0;
      for (int d = 0; d < 2; d++) begin
        dec_msg[g][d]       = '0;
        dec_down_full[g][d] = 1'b0;
      end
    end
    for (int unsigned s = 0; s < NSW; s++) begin
      if (closed[s]) begin
        automatic logic [1:0] a = 2'(sw_port_a(s));
        automatic logic [1:0] b = 2'(sw_port_b(s));
        automatic logic       g = 1'(sw_group(s));
        dec_active[g]       = 1'b1;
        dec_msg[g][0]       = link_in[a];
        dec_msg[g][1]       = link_in[b];
        dec_down_full[g][0] = link_full_in[b];
        dec_down_full[g][1] = link_full_in[a];
        link_out[b]         = link_in[a];
        link_out[b].valid   = link_in[a].valid && !dec_hold[g][0];
        link_out[a]         = link_in[b];
        link_out[a].valid   = link_in[b].valid && !dec_hold[g][1];
        link_full_out[a]    = link_full_in[b] || dec_hold[g][0];
        link_full_out[b]    = link_full_in[a] || dec_hold[g][1];
        port_rx[a].valid    = 1'b0;
        port_rx[b].valid    = 1'b0;
        port_tx_full[a]     = 1'b1;
        port_tx_full[b]     = 1'b1;
      end
    end
  end

  a_one_switch_per_port: assert property (@(posedge clk) disable iff (!rst_n)
    !sw_conflict(closed));

endmodule
