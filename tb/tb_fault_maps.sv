// tb_fault_maps: forming slice groups on random fault maps.
// For each of NMAPS random maps (each node faulty with probability 1/4) the
// array is reset and every row with at least two working PEs is made into one
// group:
//   - the leftmost working PE of the row leads, the rightmost one ends the
//     chain and receives at its L port;
//   - working PEs in between close S4 (R-L) themselves;
//   - the leader then sends one CONFIG message (S4) per faulty node between
//     leader and end; each message crosses the already bypassed nodes and is
//     taken by the first faulty node still open, so the chain is built left
//     to right;
//   - the leader broadcasts NB words; every member's decoder must copy every
//     word in order and the end node must receive them in order.
// All rows run at the same time. The bench counts how many slices were
// joined, and how many rows had four working slices (a full 32-bit module).
module tb_fault_maps;
  import rftsap_pkg::*;

  localparam int ROWS = 4, COLS = 4, MEM_DEPTH = 256, AW = $clog2(MEM_DEPTH);
  localparam int NMAPS = 100;
  localparam int NB = 6;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              pe_faulty      [ROWS][COLS];
  logic              mem_en         [ROWS][COLS];
  logic              mem_we         [ROWS][COLS];
  logic [AW-1:0]     mem_addr       [ROWS][COLS];
  logic [DATA_W-1:0] mem_wdata      [ROWS][COLS];
  logic [DATA_W-1:0] mem_rdata      [ROWS][COLS];
  logic [NPORTS-1:0] pe_port_en     [ROWS][COLS];
  logic              pe_rd          [ROWS][COLS];
  logic              pe_wr          [ROWS][COLS];
  msg_kind_e         pe_wkind       [ROWS][COLS];
  logic [DATA_W-1:0] pe_wdata       [ROWS][COLS];
  logic [DATA_W-1:0] pe_rdata       [ROWS][COLS];
  msg_kind_e         pe_rkind       [ROWS][COLS];
  logic [NPORTS-1:0] pe_rx_ready    [ROWS][COLS];
  logic [NPORTS-1:0] pe_tx_ready    [ROWS][COLS];
  logic              pe_ctrl_wr     [ROWS][COLS];
  logic [NGRP-1:0]   pe_bcast_valid [ROWS][COLS];
  logic [DATA_W-1:0] pe_bcast_data  [ROWS][COLS][NGRP];
  logic [NGRP-1:0]   pe_bcast_ack   [ROWS][COLS];
  sr_state_e         sr_state       [ROWS][COLS];
  logic [NSW-1:0]    rr_closed      [ROWS][COLS];
  logic              rr_reject      [ROWS][COLS];
  link_msg_t         north_in  [COLS], south_in  [COLS], north_out [COLS], south_out [COLS];
  logic              north_full_in [COLS], south_full_in [COLS];
  logic              north_full_out [COLS], south_full_out [COLS];
  link_msg_t         west_in [ROWS], east_in [ROWS], west_out [ROWS], east_out [ROWS];
  logic              west_full_in [ROWS], east_full_in [ROWS];
  logic              west_full_out [ROWS], east_full_out [ROWS];

  rftsap_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_joined = 0, n_bypassed = 0, n_full_modules = 0, n_groups = 0;
  logic [DATA_W-1:0] bwords [ROWS][NB];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic pe_send(int i, int j, int p, msg_kind_e k, logic [DATA_W-1:0] d);
    @(negedge clk);
    while (!pe_tx_ready[i][j][p]) @(negedge clk);
    pe_port_en[i][j] = NPORTS'(1 << p); pe_wr[i][j] = 1'b1; pe_wkind[i][j] = k; pe_wdata[i][j] = d;
    @(negedge clk);
    pe_port_en[i][j] = '0; pe_wr[i][j] = 1'b0;
  endtask

  task automatic pe_recv(int i, int j, int p, output msg_kind_e k, output logic [DATA_W-1:0] d);
    @(negedge clk);
    while (!pe_rx_ready[i][j][p]) @(negedge clk);
    pe_port_en[i][j] = NPORTS'(1 << p); pe_rd[i][j] = 1'b1;
    #1;
    k = pe_rkind[i][j]; d = pe_rdata[i][j];
    @(negedge clk);
    pe_port_en[i][j] = '0; pe_rd[i][j] = 1'b0;
  endtask

  task automatic pe_ctrl(int i, int j, logic [NSW-1:0] v);
    @(negedge clk);
    pe_ctrl_wr[i][j] = 1'b1; pe_wdata[i][j] = DATA_W'(v);
    @(negedge clk);
    pe_ctrl_wr[i][j] = 1'b0;
  endtask

  task automatic member(int i, int j);
    for (int n = 0; n < NB; n++) begin
      @(negedge clk);
      while (!pe_bcast_valid[i][j][1]) @(negedge clk);
      chk(pe_bcast_data[i][j][1] == bwords[i][n], $sformatf("member (%0d,%0d) word %0d", i, j, n));
      pe_bcast_ack[i][j][1] = 1'b1;
      @(negedge clk);
      pe_bcast_ack[i][j][1] = 1'b0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  task automatic terminal(int i, int j);
    msg_kind_e k;
    logic [DATA_W-1:0] d;
    for (int n = 0; n < NB; n++) begin
      pe_recv(i, j, PORT_L, k, d);
      chk(k == MSG_BCAST && d == bwords[i][n], $sformatf("end (%0d,%0d) word %0d", i, j, n));
    end
  endtask

  task automatic build_row(int i);
    int good [$];
    int lead, last;
    for (int j = 0; j < COLS; j++) if (!pe_faulty[i][j]) good.push_back(j);
    if (good.size() < 2) return;
    lead = good[0];
    last = good[good.size() - 1];
    n_groups++;
    n_joined += good.size();
    if (good.size() == 4) n_full_modules++;
    // members close S4 themselves
    for (int g = 1; g < good.size() - 1; g++) pe_ctrl(i, good[g], 6'b001000);
    // leader bypasses the faulty nodes one after the other
    for (int j = lead + 1; j < last; j++)
      if (pe_faulty[i][j]) begin
        pe_send(i, lead, PORT_R, MSG_CONFIG, 8'h08);
        repeat (2) @(negedge clk);
        chk(rr_closed[i][j] == 6'b001000, $sformatf("faulty (%0d,%0d) bypassed", i, j));
        n_bypassed++;
      end
    fork
      for (int n = 0; n < NB; n++) pe_send(i, lead, PORT_R, MSG_BCAST, bwords[i][n]);
      terminal(i, last);
      begin
        for (int g = 1; g < good.size() - 1; g++)
          fork
            automatic int jj = good[g];
            member(i, jj);
          join_none
        wait fork;
      end
    join
  endtask

  initial begin
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        pe_faulty[i][j] = 1'b0; mem_en[i][j] = 1'b0; mem_we[i][j] = 1'b0;
        mem_addr[i][j] = '0; mem_wdata[i][j] = '0; pe_port_en[i][j] = '0;
        pe_rd[i][j] = 1'b0; pe_wr[i][j] = 1'b0; pe_wkind[i][j] = MSG_DATA;
        pe_wdata[i][j] = '0; pe_ctrl_wr[i][j] = 1'b0; pe_bcast_ack[i][j] = '0;
      end
    for (int j = 0; j < COLS; j++) begin
      north_in[j] = '0; south_in[j] = '0; north_full_in[j] = 1'b0; south_full_in[j] = 1'b0;
    end
    for (int i = 0; i < ROWS; i++) begin
      west_in[i] = '0; east_in[i] = '0; west_full_in[i] = 1'b0; east_full_in[i] = 1'b0;
    end

    for (int m = 0; m < NMAPS; m++) begin
      @(negedge clk);
      rst_n = 1'b0;
      for (int i = 0; i < ROWS; i++) begin
        for (int j = 0; j < COLS; j++) pe_faulty[i][j] = ($urandom_range(0, 3) == 0);
        for (int n = 0; n < NB; n++) bwords[i][n] = DATA_W'($urandom);
      end
      @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          chk(sr_state[i][j] == (pe_faulty[i][j] ? SR_REMOTE : SR_LOCAL), "SR follows fault map");
      fork
        build_row(0);
        build_row(1);
        build_row(2);
        build_row(3);
      join
    end
    $display("maps=%0d groups=%0d slices joined=%0d faulty nodes bypassed=%0d full 32-bit rows=%0d",
             NMAPS, n_groups, n_joined, n_bypassed, n_full_modules);
    chk(n_bypassed > 0, "some faulty node was bypassed");
    chk(n_full_modules > 0, "some row formed a full 32-bit module");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
