// tb_rftsap_array: end-to-end test of the RFTSAP array at its default size
// (4 x 4 nodes, 256-word memories). The bench plays all sixteen PEs.
//
// Scenario: the PE of node (1,1) is faulty. Nodes (1,0), (1,2), (1,3) and
// (2,3) are combined into one 32-bit module of four 8-bit slices, led by
// (1,0):
//   - (1,0) sends a CONFIG message to the faulty node, whose PIOU is in
//     remote.control: its RR closes S4 (R-L), bypassing it;
//   - (1,2) reads its switch settings from local memory; the first one joins
//     one port twice and is refused, the second closes S4;
//   - (1,3) closes S6 (L-D) so that the chain turns down to (2,3);
//   - (1,0) broadcasts a stream of instruction words. They cross the three
//     bypassed nodes in the cycle they are sent (checked for the first word),
//     the decoders of (1,2) and (1,3) copy every word, and (2,3) receives
//     them at its U port. Members take the words after random delays, so
//     broadcasts are held back at times;
//   - (2,3) replies with data words that travel back through the same closed
//     switches to (1,0) without being copied.
// Besides: (2,0) closes S3 (U-D) and a broadcast from (1,0) down the column
// is copied by its decoder 1 on the way to (3,0); (3,0) streams words to a
// slow reader (3,1) (link back-pressure); (3,2) sends upward to (2,2);
// (0,3) sends off the north edge while the edge shows full; every node's
// memory is written and read back.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_rftsap_array;
  import rftsap_pkg::*;

  localparam int ROWS = 4, COLS = 4, MEM_DEPTH = 256, AW = $clog2(MEM_DEPTH);
  localparam int NB = 32;  // broadcast words
  localparam int NR = 8;   // reply words

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
  int cycles = 0;
  // mechanism counters
  int n_remote_cfg = 0, n_reject = 0, n_bypass = 0, n_bcast_g2 = 0, n_bcast_g1 = 0;
  int n_hold = 0, n_backpressure = 0, n_edge = 0, n_mem = 0, n_reply = 0, n_vertical = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observers
  always @(posedge clk) begin
    cycles++;
    // a message crossing the bypassed faulty node (1,1) in either direction
    if ((dut.lo[1][1][PORT_R].valid && !dut.lfi[1][1][PORT_R]) ||
        (dut.lo[1][1][PORT_L].valid && !dut.lfi[1][1][PORT_L])) n_bypass++;
    // a broadcast held back by the decoder of (1,2) or (1,3)
    if (dut.g_row[1].g_col[2].u_node.u_piou.dec_hold[1][0] ||
        dut.g_row[1].g_col[3].u_node.u_piou.dec_hold[1][0]) n_hold++;
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

  task automatic take_bcast(int i, int j, int g, output logic [DATA_W-1:0] d);
    @(negedge clk);
    while (!pe_bcast_valid[i][j][g]) @(negedge clk);
    d = pe_bcast_data[i][j][g];
    pe_bcast_ack[i][j][g] = 1'b1;
    @(negedge clk);
    pe_bcast_ack[i][j][g] = 1'b0;
  endtask

  task automatic mem_write(int i, int j, int a, logic [DATA_W-1:0] d);
    @(negedge clk);
    mem_en[i][j] = 1'b1; mem_we[i][j] = 1'b1; mem_addr[i][j] = AW'(a); mem_wdata[i][j] = d;
    @(negedge clk);
    mem_en[i][j] = 1'b0; mem_we[i][j] = 1'b0;
  endtask

  task automatic mem_read(int i, int j, int a, output logic [DATA_W-1:0] d);
    @(negedge clk);
    mem_en[i][j] = 1'b1; mem_we[i][j] = 1'b0; mem_addr[i][j] = AW'(a);
    @(negedge clk);
    mem_en[i][j] = 1'b0;
    d = mem_rdata[i][j];
    n_mem++;
  endtask

  logic [DATA_W-1:0] bwords [NB];
  logic [DATA_W-1:0] rwords [NR];

  task automatic member(int i, int j);
    logic [DATA_W-1:0] d;
    for (int n = 1; n < NB; n++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      take_bcast(i, j, 1, d);
      n_bcast_g2++;
      chk(d == bwords[n], $sformatf("member (%0d,%0d) broadcast %0d", i, j, n));
    end
  endtask

  initial begin
    msg_kind_e         k;
    logic [DATA_W-1:0] d;
    int                t0;

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
    for (int n = 0; n < NB; n++) bwords[n] = DATA_W'($urandom);
    for (int n = 0; n < NR; n++) rwords[n] = DATA_W'($urandom);
    pe_faulty[1][1] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(sr_state[1][1] == SR_REMOTE && sr_state[1][0] == SR_LOCAL, "SR of faulty and good node");

    // --- remote configuration of the faulty node by its left neighbour ---
    pe_send(1, 0, PORT_R, MSG_CONFIG, 8'h08);
    @(negedge clk);
    chk(rr_closed[1][1] == 6'b001000, "faulty node bypassed by remote CONFIG");
    if (rr_closed[1][1] == 6'b001000) n_remote_cfg++;

    // --- (1,2) takes its settings from local memory ---
    mem_write(1, 2, 0, 8'h18);   // S4+S5: R used twice, refused
    mem_write(1, 2, 1, 8'h08);   // S4
    mem_read(1, 2, 0, d);
    pe_ctrl(1, 2, d[NSW-1:0]);
    chk(rr_reject[1][2] && rr_closed[1][2] == '0, "conflicting setting refused");
    if (rr_reject[1][2]) n_reject++;
    mem_read(1, 2, 1, d);
    pe_ctrl(1, 2, d[NSW-1:0]);
    chk(!rr_reject[1][2] && rr_closed[1][2] == 6'b001000, "(1,2) joins R and L");
    pe_ctrl(1, 3, 6'b100000);    // S6: L-D
    chk(rr_closed[1][3] == 6'b100000, "(1,3) joins L and D");

    // --- first broadcast: crosses three nodes in one cycle ---
    @(negedge clk);
    pe_port_en[1][0] = NPORTS'(1 << PORT_R); pe_wr[1][0] = 1'b1;
    pe_wkind[1][0] = MSG_BCAST; pe_wdata[1][0] = bwords[0];
    @(negedge clk);       // written at this edge
    pe_port_en[1][0] = '0; pe_wr[1][0] = 1'b0;
    @(negedge clk);       // handed over at the next edge
    chk(pe_rx_ready[2][3][PORT_U] && pe_bcast_valid[1][2][1] && pe_bcast_valid[1][3][1],
        "broadcast reached all group members one edge after the write");
    chk(pe_bcast_data[1][2][1] == bwords[0] && pe_bcast_data[1][3][1] == bwords[0], "broadcast copies");
    chk(pe_bcast_valid[1][1] == '0, "faulty node copies nothing");
    pe_recv(2, 3, PORT_U, k, d);
    chk(k == MSG_BCAST && d == bwords[0], "terminal got first broadcast");
    take_bcast(1, 2, 1, d);
    take_bcast(1, 3, 1, d);
    n_bcast_g2 += 2;

    // --- broadcast stream with random member delays ---
    fork
      for (int n = 1; n < NB; n++) pe_send(1, 0, PORT_R, MSG_BCAST, bwords[n]);
      member(1, 2);
      member(1, 3);
      for (int n = 1; n < NB; n++) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        pe_recv(2, 3, PORT_U, k, d);
        chk(k == MSG_BCAST && d == bwords[n], $sformatf("terminal broadcast %0d", n));
      end
    join

    // --- reply from (2,3) back through the closed switches ---
    fork
      for (int n = 0; n < NR; n++) pe_send(2, 3, PORT_U, MSG_DATA, rwords[n]);
      for (int n = 0; n < NR; n++) begin
        pe_recv(1, 0, PORT_R, k, d);
        chk(k == MSG_DATA && d == rwords[n], $sformatf("reply %0d at leader", n));
        n_reply++;
      end
    join
    chk(pe_bcast_valid[1][2] == '0 && pe_bcast_valid[1][3] == '0, "data not copied by decoders");

    // --- column broadcast through S3 of (2,0): decoder 1 ---
    pe_ctrl(2, 0, 6'b000100);
    pe_send(1, 0, PORT_D, MSG_BCAST, 8'h9e);
    fork
      begin
        take_bcast(2, 0, 0, d);
        chk(d == 8'h9e, "column broadcast copied by decoder 1");
        n_bcast_g1++;
      end
      begin
        pe_recv(3, 0, PORT_U, k, d);
        chk(k == MSG_BCAST && d == 8'h9e, "column broadcast at (3,0)");
      end
    join
    pe_ctrl(2, 0, 6'b000000);

    // --- neighbour stream with back-pressure, vertical link, edge link ---
    fork
      for (int n = 0; n < 16; n++) pe_send(3, 0, PORT_R, MSG_DATA, DATA_W'(n * 7));
      for (int n = 0; n < 16; n++) begin
        repeat (3) @(negedge clk);
        pe_recv(3, 1, PORT_L, k, d);
        chk(d == DATA_W'(n * 7), "neighbour stream word");
      end
      begin
        t0 = cycles;
        while (cycles - t0 < 60) begin
          @(negedge clk);
          if (dut.lo[3][0][PORT_R].valid && dut.lfi[3][0][PORT_R]) n_backpressure++;
        end
      end
      for (int n = 0; n < 4; n++) begin
        pe_send(3, 2, PORT_U, MSG_DATA, DATA_W'(8'ha0 + n));
        pe_recv(2, 2, PORT_D, k, d);
        chk(d == DATA_W'(8'ha0 + n), "upward word");
        n_vertical++;
      end
      begin
        north_full_in[3] = 1'b1;
        pe_send(0, 3, PORT_U, MSG_DATA, 8'h77);
        repeat (3) @(negedge clk);
        chk(north_out[3].valid && north_out[3].data == 8'h77 && !pe_tx_ready[0][3][PORT_U],
            "edge word waits while edge is full");
        north_full_in[3] = 1'b0;
        @(negedge clk);
        chk(!north_out[3].valid && pe_tx_ready[0][3][PORT_U], "edge word taken");
        n_edge++;
      end
    join

    // --- every node's local memory ---
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) mem_write(i, j, 200 + i * COLS + j, DATA_W'(i * 16 + j));
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        mem_read(i, j, 200 + i * COLS + j, d);
        chk(d == DATA_W'(i * 16 + j), "local memory word");
      end

    $display("remote_cfg=%0d reject=%0d bypass=%0d bcast_g2=%0d bcast_g1=%0d hold=%0d backpressure=%0d edge=%0d mem=%0d reply=%0d vertical=%0d cycles=%0d",
             n_remote_cfg, n_reject, n_bypass, n_bcast_g2, n_bcast_g1, n_hold, n_backpressure,
             n_edge, n_mem, n_reply, n_vertical, cycles);
    chk(n_remote_cfg > 0, "remote configuration happened");
    chk(n_reject > 0, "refused setting happened");
    chk(n_bypass > 0, "bypass transfer happened");
    chk(n_bcast_g2 > 0, "group 2 broadcast copy happened");
    chk(n_bcast_g1 > 0, "group 1 broadcast copy happened");
    chk(n_hold > 0, "broadcast hold happened");
    chk(n_backpressure > 0, "link back-pressure happened");
    chk(n_edge > 0, "edge transfer happened");
    chk(n_mem > 0, "memory access happened");
    chk(n_reply > 0, "reply through bypass happened");
    chk(n_vertical > 0, "vertical transfer happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
