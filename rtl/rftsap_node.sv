// rftsap_node: node (i, j) of the RFTSAP array.
//
// A node is a processing element (PE), a local memory and a programmable I/O
// unit (PIOU), as in the source design. The PE, a conventional 8-bit
// microprocessor, is not part of this RTL: its two buses come out as ports,
// one to the local memory (mem_*) and one to the PIOU (pe_*, see piou.sv).
// The four links (index 0 U, 1 R, 2 L, 3 D) go to the neighbours above, to
// the right, to the left and below.
module rftsap_node
  import rftsap_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pe_faulty,
  // PE <-> local memory
  input  logic                         mem_en,
  input  logic                         mem_we,
  input  logic [$clog2(MEM_DEPTH)-1:0] mem_addr,
  input  logic [DATA_W-1:0]            mem_wdata,
  output logic [DATA_W-1:0]            mem_rdata,
  // PE <-> PIOU
  input  logic [NPORTS-1:0]            pe_port_en,
  input  logic                         pe_rd,
  input  logic                         pe_wr,
  input  msg_kind_e                    pe_wkind,
  input  logic [DATA_W-1:0]            pe_wdata,
  output logic [DATA_W-1:0]            pe_rdata,
  output msg_kind_e                    pe_rkind,
  output logic [NPORTS-1:0]            pe_rx_ready,
  output logic [NPORTS-1:0]            pe_tx_ready,
  input  logic                         pe_ctrl_wr,
  output logic [NGRP-1:0]              pe_bcast_valid,
  output logic [DATA_W-1:0]            pe_bcast_data [NGRP],
  input  logic [NGRP-1:0]              pe_bcast_ack,
  output sr_state_e                    sr_state,
  output logic [NSW-1:0]               rr_closed,
  output logic                         rr_reject,
  // links
  input  link_msg_t                    link_in       [NPORTS],
  input  logic                         link_full_in  [NPORTS],
  output link_msg_t                    link_out      [NPORTS],
  output logic                         link_full_out [NPORTS]
);

  local_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk,
    .en    (mem_en),
    .we    (mem_we),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  piou u_piou (
    .clk, .rst_n, .pe_faulty,
    .pe_port_en, .pe_rd, .pe_wr, .pe_wkind, .pe_wdata, .pe_rdata, .pe_rkind,
    .pe_rx_ready, .pe_tx_ready, .pe_ctrl_wr,
    .pe_bcast_valid, .pe_bcast_data, .pe_bcast_ack,
    .sr_state, .rr_closed, .rr_reject,
    .link_in, .link_full_in, .link_out, .link_full_out
  );

endmodule
