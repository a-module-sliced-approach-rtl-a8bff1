// tb_rftsap_node: self-checking test of one RFTSAP node (PIOU + local memory).
// The bench plays the PE. It stores a table of switch settings in local
// memory, then for each entry reads it back (one-cycle read latency) and
// writes it to RR over the Control_line, checking RR (or the refusal of a
// setting that joins one port twice). The R link is looped back to the L
// link outside the node: with all switches open, a word sent on R must come
// back into the L buffer; with S4 (R-L) closed the loop is bypassed.
module tb_rftsap_node;
  import rftsap_pkg::*;

  localparam int unsigned MEM_DEPTH = 256;

  logic                         clk = 1'b0;
  logic                         rst_n = 1'b0;
  logic                         pe_faulty = 1'b0;
  logic                         mem_en = 1'b0, mem_we = 1'b0;
  logic [$clog2(MEM_DEPTH)-1:0] mem_addr = '0;
  logic [DATA_W-1:0]            mem_wdata = '0;
  logic [DATA_W-1:0]            mem_rdata;
  logic [NPORTS-1:0]            pe_port_en = '0;
  logic                         pe_rd = 1'b0, pe_wr = 1'b0;
  msg_kind_e                    pe_wkind = MSG_DATA;
  logic [DATA_W-1:0]            pe_wdata = '0;
  logic [DATA_W-1:0]            pe_rdata;
  msg_kind_e                    pe_rkind;
  logic [NPORTS-1:0]            pe_rx_ready, pe_tx_ready;
  logic                         pe_ctrl_wr = 1'b0;
  logic [NGRP-1:0]              pe_bcast_valid;
  logic [DATA_W-1:0]            pe_bcast_data [NGRP];
  logic [NGRP-1:0]              pe_bcast_ack = '0;
  sr_state_e                    sr_state;
  logic [NSW-1:0]               rr_closed;
  logic                         rr_reject;
  link_msg_t                    link_in       [NPORTS];
  logic                         link_full_in  [NPORTS];
  link_msg_t                    link_out      [NPORTS];
  logic                         link_full_out [NPORTS];

  int checks = 0, failures = 0;
  logic [NSW-1:0] table_v [16];

  // loop R back into L; U and D idle and never full
  always_comb begin
    link_in[PORT_L]      = link_out[PORT_R];
    link_full_in[PORT_R] = link_full_out[PORT_L];
    link_in[PORT_R]      = '0;
    link_full_in[PORT_L] = 1'b0;
    link_in[PORT_U]      = '0;
    link_full_in[PORT_U] = 1'b0;
    link_in[PORT_D]      = '0;
    link_full_in[PORT_D] = 1'b0;
  end

  rftsap_node #(.MEM_DEPTH(MEM_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic legal(logic [NSW-1:0] v);
    // pairs: S1 U-R, S2 U-L, S3 U-D, S4 R-L, S5 R-D, S6 L-D
    int pa [NSW] = '{0, 0, 0, 1, 1, 2};
    int pb [NSW] = '{1, 2, 3, 2, 3, 3};
    int cnt [4] = '{0, 0, 0, 0};
    for (int s = 0; s < NSW; s++) if (v[s]) begin cnt[pa[s]]++; cnt[pb[s]]++; end
    for (int p = 0; p < 4; p++) if (cnt[p] > 1) return 1'b0;
    return 1'b1;
  endfunction

  task automatic send_r(logic [DATA_W-1:0] d);
    @(negedge clk);
    pe_port_en = NPORTS'(1 << PORT_R); pe_wr = 1'b1; pe_wdata = d;
    @(negedge clk);
    pe_wr = 1'b0; pe_port_en = '0;
  endtask

  initial begin
    logic [NSW-1:0] expect_rr;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // store the configuration table at addresses 16..31
    for (int k = 0; k < 16; k++) begin
      table_v[k] = (k % 3 == 0) ? NSW'($urandom) : NSW'(1 << (k % NSW));
      @(negedge clk);
      mem_en = 1'b1; mem_we = 1'b1; mem_addr = 8'(16 + k); mem_wdata = DATA_W'(table_v[k]);
    end
    @(negedge clk);
    mem_en = 1'b0; mem_we = 1'b0;
    expect_rr = '0;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      mem_en = 1'b1; mem_addr = 8'(16 + k);
      @(negedge clk);
      mem_en = 1'b0;
      chk(mem_rdata[NSW-1:0] == table_v[k], "memory returns stored setting");
      pe_ctrl_wr = 1'b1; pe_wdata = mem_rdata;
      @(negedge clk);
      pe_ctrl_wr = 1'b0;
      if (legal(table_v[k])) expect_rr = table_v[k];
      chk(rr_closed == expect_rr && rr_reject == !legal(table_v[k]), $sformatf("RR after entry %0d", k));
    end
    // all switches open: loop back through the node's own buffers
    pe_ctrl_wr = 1'b1; pe_wdata = '0;
    @(negedge clk);
    pe_ctrl_wr = 1'b0;
    send_r(8'hc3);
    chk(!pe_rx_ready[PORT_L], "not yet arrived one edge after the write");
    @(negedge clk);
    chk(pe_rx_ready[PORT_L], "looped word arrived at L");
    pe_port_en = NPORTS'(1 << PORT_L); pe_rd = 1'b1;
    #1 chk(pe_rdata == 8'hc3 && pe_rkind == MSG_DATA, "looped word data");
    @(negedge clk);
    pe_rd = 1'b0; pe_port_en = '0;
    // S4 closed: R and L are joined, the PE's own R buffer is cut off
    pe_ctrl_wr = 1'b1; pe_wdata = 8'h08;
    @(negedge clk);
    pe_ctrl_wr = 1'b0;
    chk(rr_closed == 6'b001000, "S4 closed");
    send_r(8'h3c);
    repeat (2) @(negedge clk);
    chk(!pe_rx_ready[PORT_L] && !pe_tx_ready[PORT_R], "bypassed node keeps its buffers off the link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
