// command_decoder: the command decoder of one switch group of a PIOU.
//
// While a switch of its group is closed (active), the decoder watches the two
// messages crossing that switch, one per direction (slot 0: entering at the
// lower-numbered port of the pair, slot 1: entering at the other). A message
// of kind MSG_BCAST is a global operation: the decoder copies its data into a
// one-word buffer for the local PE (bcast_valid/bcast_data, freed by
// bcast_ack) while the message travels on. That decoders are enabled by a
// closed switch and respond to broadcasts follows the source design; the
// buffer and the flow control are this design's choices.
//
// Flow control: a broadcast that finds the buffer occupied is held back
// (hold[slot] high): its valid is removed from the far side of the switch and
// "full" is shown to its sender, so it waits until the PE has taken the
// previous word. If both slots carry a broadcast, slot 0 goes first and slot
// 1 is held. A broadcast is copied on the edge on which it is handed to the
// far side, i.e. when it is valid, not held and down_full is low.
// bcast_ack is a one-cycle pulse: a word copied while it is still high would
// be freed on the next edge. A copy cannot meet an ack on the same edge,
// since the buffer is then full and the broadcast is held.
// In remote.control (faulty PE) the decoder copies and holds nothing.
// hold is combinational from pass_msg and the buffer state; it does not
// depend on down_full.
module command_decoder
  import rftsap_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  sr_state_e         sr,
  input  logic              active,
  input  link_msg_t         pass_msg  [2],
  input  logic              down_full [2],
  output logic              hold      [2],
  output logic              bcast_valid,
  output logic [DATA_W-1:0] bcast_data,
  input  logic              bcast_ack
);

  logic       enabled;
  logic [1:0] is_bcast;
  logic [1:0] take;

  assign enabled = active && (sr == SR_LOCAL);

  always_comb begin
    for (int s = 0; s < 2; s++)
      is_bcast[s] = enabled && pass_msg[s].valid && (pass_msg[s].kind == MSG_BCAST);
    hold[0] = is_bcast[0] && bcast_valid;
    hold[1] = is_bcast[1] && (bcast_valid || is_bcast[0]);
    for (int s = 0; s < 2; s++)
      take[s] = is_bcast[s] && !hold[s] && !down_full[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcast_valid <= 1'b0;
      bcast_data  <= '0;
    end else if (take[0]) begin
      bcast_valid <= 1'b1;
      bcast_data  <= pass_msg[0].data;
    end else if (take[1]) begin
      bcast_valid <= 1'b1;
      bcast_data  <= pass_msg[1].data;
    end else if (bcast_ack) begin
      bcast_valid <= 1'b0;
    end
  end

endmodule
