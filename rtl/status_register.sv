// status_register: the SR of a programmable I/O unit.
//
// SR tells whether the PIOU is in local.control (its own PE drives it) or in
// remote.control (its PE is faulty and a neighbouring node drives it). The two
// states follow the source design. How a PE is found faulty is not given
// there: here the input pe_faulty (from a test or a self-test) moves SR to
// remote.control on the next clock edge, and SR stays there until reset, so
// that a PE once found faulty can never take the unit back. Reset gives
// local.control.
module status_register
  import rftsap_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      pe_faulty,
  output sr_state_e sr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sr <= SR_LOCAL;
    else if (pe_faulty) sr <= SR_REMOTE;
  end

endmodule
