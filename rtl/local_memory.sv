// local_memory: the local memory of an RFTSAP node.
//
// Holds the node's configuration settings and application programs, so that
// the PE can run programs and rewrite its PIOU at run time (the purpose given
// by the source design). Size and organisation are this design's choice: a
// synchronous single-port RAM of DEPTH words of DATA_W bits. A write
// (en && we) stores wdata at addr on the clock edge; a read (en && !we)
// returns the word on rdata after that edge (one cycle latency) and rdata
// keeps it until the next read. The array itself has no reset.
module local_memory
  import rftsap_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [DATA_W-1:0]        wdata,
  output logic [DATA_W-1:0]        rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
