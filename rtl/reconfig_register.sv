// reconfig_register: the RR of a programmable I/O unit.
//
// RR stores the control signals C1..C6 (bit s = switch S(s+1) closed). In
// local.control it is written by the node's own PE over Control_line
// (local_wr, local_data); in remote.control only a configuration message
// received from a neighbour can write it (remote_wr, remote_data). These two
// write paths follow the source design's description of local and remote
// control.
//
// This design's own rule: a value that closes two switches sharing a port is
// refused (RR keeps its old value and reject goes high until the next
// accepted write), so that the switch matrix never joins one port to two
// others. Disjoint pairs, e.g. S3 (U-D) together with S4 (R-L), are allowed.
// A write takes effect at the next clock edge; reset opens all switches.
module reconfig_register
  import rftsap_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  sr_state_e      sr,
  input  logic           local_wr,
  input  logic [NSW-1:0] local_data,
  input  logic           remote_wr,
  input  logic [NSW-1:0] remote_data,
  output logic [NSW-1:0] closed,
  output logic           reject
);

  logic           wr;
  logic [NSW-1:0] wdata;

  always_comb begin
    wr    = 1'b0;
    wdata = local_data;
    if (sr == SR_LOCAL) begin
      wr    = local_wr;
      wdata = local_data;
    end else begin
      wr    = remote_wr;
      wdata = remote_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      closed <= '0;
      reject <= 1'b0;
    end else if (wr) begin
      if (sw_conflict(wdata)) begin
        reject <= 1'b1;
      end else begin
        closed <= wdata;
        reject <= 1'b0;
      end
    end
  end

endmodule
