// tb_switch_matrix: self-checking test of the six programmable switches.
// Drives random legal switch settings (none, one switch, or two disjoint
// switches) and random values on every input, then compares every output
// with a reference built from an explicit table of the port pair of each
// switch (S1 U-R, S2 U-L, S3 U-D, S4 R-L, S5 R-D, S6 L-D). Every switch must
// be exercised as a bypass.
module tb_switch_matrix;
  import rftsap_pkg::*;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic [NSW-1:0] closed = '0;
  link_msg_t      link_in       [NPORTS];
  logic           link_full_in  [NPORTS];
  link_msg_t      link_out      [NPORTS];
  logic           link_full_out [NPORTS];
  link_msg_t      port_tx       [NPORTS];
  logic           port_tx_full  [NPORTS];
  link_msg_t      port_rx       [NPORTS];
  logic           port_rx_full  [NPORTS];
  logic           dec_active    [NGRP];
  link_msg_t      dec_msg       [NGRP][2];
  logic           dec_down_full [NGRP][2];
  logic           dec_hold      [NGRP][2];

  int pa [NSW] = '{0, 0, 0, 1, 1, 2};
  int pb [NSW] = '{1, 2, 3, 2, 3, 3};
  int checks = 0, failures = 0;
  int used_sw [NSW];

  switch_matrix dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic link_msg_t rnd_msg();
    return '{valid: ($urandom_range(0, 1) == 1), kind: msg_kind_e'($urandom_range(0, 2)),
             data: DATA_W'($urandom)};
  endfunction

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL closed=%b %s: got %h expected %h", closed, what, got, exp);
    end
  endtask

  initial begin
    foreach (used_sw[s]) used_sw[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      link_msg_t e_out [NPORTS];
      logic      e_fout [NPORTS];
      link_msg_t e_rx [NPORTS];
      logic      e_txf [NPORTS];
      logic      e_act [NGRP];
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: closed = '0;
        1, 2: closed = NSW'(1 << $urandom_range(0, 5));
        default: begin
          // two disjoint switches: S1+S6, S2+S5 or S3+S4
          automatic int k = $urandom_range(0, 2);
          closed = '0; closed[k] = 1'b1; closed[5 - k] = 1'b1;
        end
      endcase
      for (int p = 0; p < NPORTS; p++) begin
        link_in[p] = rnd_msg(); port_tx[p] = rnd_msg();
        link_full_in[p] = $urandom_range(0, 1); port_rx_full[p] = $urandom_range(0, 1);
      end
      for (int g = 0; g < NGRP; g++)
        for (int d = 0; d < 2; d++) dec_hold[g][d] = ($urandom_range(0, 3) == 0);
      // reference
      for (int p = 0; p < NPORTS; p++) begin
        e_out[p] = port_tx[p]; e_fout[p] = port_rx_full[p];
        e_rx[p] = link_in[p]; e_txf[p] = link_full_in[p];
      end
      e_act[0] = 1'b0; e_act[1] = 1'b0;
      for (int s = 0; s < NSW; s++) begin
        if (closed[s]) begin
          automatic int a = pa[s];
          automatic int b = pb[s];
          automatic int g = s / 3;
          used_sw[s]++;
          e_act[g] = 1'b1;
          e_out[b] = link_in[a]; e_out[b].valid = link_in[a].valid && !dec_hold[g][0];
          e_out[a] = link_in[b]; e_out[a].valid = link_in[b].valid && !dec_hold[g][1];
          e_fout[a] = link_full_in[b] || dec_hold[g][0];
          e_fout[b] = link_full_in[a] || dec_hold[g][1];
          e_rx[a].valid = 1'b0; e_rx[b].valid = 1'b0;
          e_txf[a] = 1'b1; e_txf[b] = 1'b1;
          #1;
          expect_eq(32'(dec_msg[g][0]), 32'(link_in[a]), "dec_msg0");
          expect_eq(32'(dec_msg[g][1]), 32'(link_in[b]), "dec_msg1");
          expect_eq(32'(dec_down_full[g][0]), 32'(link_full_in[b]), "dec_down_full0");
          expect_eq(32'(dec_down_full[g][1]), 32'(link_full_in[a]), "dec_down_full1");
        end
      end
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        expect_eq(32'(link_out[p]), 32'(e_out[p]), $sformatf("link_out[%0d]", p));
        expect_eq(32'(link_full_out[p]), 32'(e_fout[p]), $sformatf("link_full_out[%0d]", p));
        expect_eq(32'(port_tx_full[p]), 32'(e_txf[p]), $sformatf("port_tx_full[%0d]", p));
        expect_eq(32'(port_rx[p].valid), 32'(e_rx[p].valid), $sformatf("port_rx.valid[%0d]", p));
        if (e_rx[p].valid) expect_eq(32'(port_rx[p]), 32'(e_rx[p]), $sformatf("port_rx[%0d]", p));
      end
      for (int g = 0; g < NGRP; g++) expect_eq(32'(dec_active[g]), 32'(e_act[g]), "dec_active");
    end
    for (int s = 0; s < NSW; s++) begin
      checks++;
      if (used_sw[s] == 0) begin failures++; $display("FAIL S%0d never closed", s + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
