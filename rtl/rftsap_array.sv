// rftsap_array: a ROWS x COLS reconfigurable fault-tolerant segmented array
// processor (RFTSAP), the top of this design.
//
// Idea: a wide processor (e.g. 32 bits) has poor yield because its area is
// large. The array is built instead from many small 8-bit slices, each in a
// node with its own programmable I/O unit (PIOU). Working slices are grouped
// to act together as one wide processor; a faulty slice is bypassed by
// closing a switch in its PIOU, so that its neighbours are joined directly.
// One slice of a group leads the others by broadcasting commands, which every
// group member picks up as the message passes through its closed switch.
//
// Wiring (as in the source design's node diagram): the U port of node (i,j)
// goes to the D port of node (i-1,j), the R port to the L port of node
// (i,j+1). Links on the array edge come out as the north_*, south_* (indexed
// by column) and west_*, east_* (indexed by row) ports. The PEs are outside
// this RTL: the PE buses of all nodes come out as [ROWS][COLS] arrays with the
// meaning given in rftsap_node.sv and piou.sv.
//
// Bypass paths carry messages and back-pressure combinationally through the
// closed switches, so the netlist contains static combinational cycles around
// each square of nodes. A cycle is only closed in fact if the switch settings
// route a link back to itself in a ring, which a configuration must avoid;
// tools that report combinational loops will list these paths.
//
// Array size and memory depth are this design's choices (the source gives
// none): 4 x 4 lets every row form one 32-bit processor from four 8-bit
// slices.
module rftsap_array
  import rftsap_pkg::*;
#(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned COLS      = 4,
  parameter int unsigned MEM_DEPTH = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // per-node PE side
  input  logic                         pe_faulty      [ROWS][COLS],
  input  logic                         mem_en         [ROWS][COLS],
  input  logic                         mem_we         [ROWS][COLS],
  input  logic [$clog2(MEM_DEPTH)-1:0] mem_addr       [ROWS][COLS],
  input  logic [DATA_W-1:0]            mem_wdata      [ROWS][COLS],
  output logic [DATA_W-1:0]            mem_rdata      [ROWS][COLS],
  input  logic [NPORTS-1:0]            pe_port_en     [ROWS][COLS],
  input  logic                         pe_rd          [ROWS][COLS],
  input  logic                         pe_wr          [ROWS][COLS],
  input  msg_kind_e                    pe_wkind       [ROWS][COLS],
  input  logic [DATA_W-1:0]            pe_wdata       [ROWS][COLS],
  output logic [DATA_W-1:0]            pe_rdata       [ROWS][COLS],
  output msg_kind_e                    pe_rkind       [ROWS][COLS],
  output logic [NPORTS-1:0]            pe_rx_ready    [ROWS][COLS],
  output logic [NPORTS-1:0]            pe_tx_ready    [ROWS][COLS],
  input  logic                         pe_ctrl_wr     [ROWS][COLS],
  output logic [NGRP-1:0]              pe_bcast_valid [ROWS][COLS],
  output logic [DATA_W-1:0]            pe_bcast_data  [ROWS][COLS][NGRP],
  input  logic [NGRP-1:0]              pe_bcast_ack   [ROWS][COLS],
  output sr_state_e                    sr_state       [ROWS][COLS],
  output logic [NSW-1:0]               rr_closed      [ROWS][COLS],
  output logic                         rr_reject      [ROWS][COLS],
  // array edge links
  input  link_msg_t                    north_in       [COLS],
  input  logic                         north_full_in  [COLS],
  output link_msg_t                    north_out      [COLS],
  output logic                         north_full_out [COLS],
  input  link_msg_t                    south_in       [COLS],
  input  logic                         south_full_in  [COLS],
  output link_msg_t                    south_out      [COLS],
  output logic                         south_full_out [COLS],
  input  link_msg_t                    west_in        [ROWS],
  input  logic                         west_full_in   [ROWS],
  output link_msg_t                    west_out       [ROWS],
  output logic                         west_full_out  [ROWS],
  input  link_msg_t                    east_in        [ROWS],
  input  logic                         east_full_in   [ROWS],
  output link_msg_t                    east_out       [ROWS],
  output logic                         east_full_out  [ROWS]
);

  link_msg_t li  [ROWS][COLS][NPORTS];
  logic      lfi [ROWS][COLS][NPORTS];
  link_msg_t lo  [ROWS][COLS][NPORTS];
  logic      lfo [ROWS][COLS][NPORTS];

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col

      // U port
      if (i == 0) begin : g_u_edge
        assign li[i][j][PORT_U]  = north_in[j];
        assign lfi[i][j][PORT_U] = north_full_in[j];
        assign north_out[j]      = lo[i][j][PORT_U];
        assign north_full_out[j] = lfo[i][j][PORT_U];
      end else begin : g_u_mesh
        assign li[i][j][PORT_U]  = lo[i-1][j][PORT_D];
        assign lfi[i][j][PORT_U] = lfo[i-1][j][PORT_D];
      end

      // D port
      if (i == ROWS - 1) begin : g_d_edge
        assign li[i][j][PORT_D]  = south_in[j];
        assign lfi[i][j][PORT_D] = south_full_in[j];
        assign south_out[j]      = lo[i][j][PORT_D];
        assign south_full_out[j] = lfo[i][j][PORT_D];
      end else begin : g_d_mesh
        assign li[i][j][PORT_D]  = lo[i+1][j][PORT_U];
        assign lfi[i][j][PORT_D] = lfo[i+1][j][PORT_U];
      end

      // L port
      if (j == 0) begin : g_l_edge
        assign li[i][j][PORT_L]  = west_in[i];
        assign lfi[i][j][PORT_L] = west_full_in[i];
        assign west_out[i]       = lo[i][j][PORT_L];
        assign west_full_out[i]  = lfo[i][j][PORT_L];
      end else begin : g_l_mesh
        assign li[i][j][PORT_L]  = lo[i][j-1][PORT_R];
        assign lfi[i][j][PORT_L] = lfo[i][j-1][PORT_R];
      end

      // R port
      if (j == COLS - 1) begin : g_r_edge
        assign li[i][j][PORT_R]  = east_in[i];
        assign lfi[i][j][PORT_R] = east_full_in[i];
        assign east_out[i]       = lo[i][j][PORT_R];
        assign east_full_out[i]  = lfo[i][j][PORT_R];
      end else begin : g_r_mesh
        assign li[i][j][PORT_R]  = lo[i][j+1][PORT_L];
        assign lfi[i][j][PORT_R] = lfo[i][j+1][PORT_L];
      end

      rftsap_node #(.MEM_DEPTH(MEM_DEPTH)) u_node (
        .clk, .rst_n,
        .pe_faulty      (pe_faulty[i][j]),
        .mem_en         (mem_en[i][j]),
        .mem_we         (mem_we[i][j]),
        .mem_addr       (mem_addr[i][j]),
        .mem_wdata      (mem_wdata[i][j]),
        .mem_rdata      (mem_rdata[i][j]),
        .pe_port_en     (pe_port_en[i][j]),
        .pe_rd          (pe_rd[i][j]),
        .pe_wr          (pe_wr[i][j]),
        .pe_wkind       (pe_wkind[i][j]),
        .pe_wdata       (pe_wdata[i][j]),
        .pe_rdata       (pe_rdata[i][j]),
        .pe_rkind       (pe_rkind[i][j]),
        .pe_rx_ready    (pe_rx_ready[i][j]),
        .pe_tx_ready    (pe_tx_ready[i][j]),
        .pe_ctrl_wr     (pe_ctrl_wr[i][j]),
        .pe_bcast_valid (pe_bcast_valid[i][j]),
        .pe_bcast_data  (pe_bcast_data[i][j]),
        .pe_bcast_ack   (pe_bcast_ack[i][j]),
        .sr_state       (sr_state[i][j]),
        .rr_closed      (rr_closed[i][j]),
        .rr_reject      (rr_reject[i][j]),
        .link_in        (li[i][j]),
        .link_full_in   (lfi[i][j]),
        .link_out       (lo[i][j]),
        .link_full_out  (lfo[i][j])
      );
    end
  end

endmodule
