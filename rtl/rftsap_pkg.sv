// rftsap_pkg: types and constants shared by the RFTSAP (reconfigurable
// fault-tolerant segmented array processor) modules.
//
// Every node of the array holds an 8-bit processing element; four such slices
// together act as one 32-bit processor. Links between nodes carry one message
// per transfer: a valid bit, a 2-bit message kind and an 8-bit data word.
// The 8-bit slice width follows the source design; the message kinds and the
// port numbering are this design's choices.
//
// Port numbering: 0 = U (up), 1 = R (right), 2 = L (left), 3 = D (down).
// Switch numbering: index 0..5 stands for S1..S6. Each switch joins one pair
// of ports: S1 U-R, S2 U-L, S3 U-D, S4 R-L, S5 R-D, S6 L-D. Group 1 (S1..S3)
// holds the switches on the U port and is served by command decoder 1;
// group 2 (S4..S6) holds the other three and is served by command decoder 2.
package rftsap_pkg;

  localparam int DATA_W = 8;   // width of one processor slice
  localparam int NPORTS = 4;   // U, R, L, D
  localparam int NSW    = 6;   // S1..S6
  localparam int NGRP   = 2;   // switch groups, one command decoder each

  localparam int PORT_U = 0;
  localparam int PORT_R = 1;
  localparam int PORT_L = 2;
  localparam int PORT_D = 3;

  typedef enum logic [1:0] {
    MSG_DATA   = 2'd0,  // point-to-point data, delivered to the receiving PE
    MSG_BCAST  = 2'd1,  // global operation: copied by every enabled decoder it passes
    MSG_CONFIG = 2'd2   // loads RR of a PIOU that is in remote.control
  } msg_kind_e;

  typedef struct packed {
    logic              valid;
    msg_kind_e         kind;
    logic [DATA_W-1:0] data;
  } link_msg_t;

  typedef enum logic {
    SR_LOCAL  = 1'b0,   // PIOU controlled by its own (fault-free) PE
    SR_REMOTE = 1'b1    // PE faulty: PIOU controlled by a neighbour
  } sr_state_e;

  // Ports joined by switch s (S1..S6 = 0..5).
  function automatic int unsigned sw_port_a(int unsigned s);
    case (s)
      0, 1, 2: return PORT_U;
      3, 4:    return PORT_R;
      default: return PORT_L;
    endcase
  endfunction

  function automatic int unsigned sw_port_b(int unsigned s);
    case (s)
      0:       return PORT_R;
      1, 3:    return PORT_L;
      default: return PORT_D;   // 2, 4, 5
    endcase
  endfunction

  // Group (command decoder) of switch s.
  function automatic int unsigned sw_group(int unsigned s);
    return (s < 3) ? 0 : 1;
  endfunction

  // True when two closed switches share a port.
  function automatic logic sw_conflict(logic [NSW-1:0] closed);
    logic [NPORTS-1:0] used;
    logic              bad;
    used = '0;
    bad  = 1'b0;
    for (int unsigned s = 0; s < NSW; s++) begin
      if (closed[s]) begin
        if (used[sw_port_a(s)] || used[sw_port_b(s)]) bad = 1'b1;
        used[sw_port_a(s)] = 1'b1;
        used[sw_port_b(s)] = 1'b1;
      end
    end
    return bad;
  endfunction

endpackage
