// tb_command_decoder: self-checking test of a command decoder.
// Random through-traffic in both slots, random downstream back-pressure,
// random PE acknowledges, and random enable / SR state. A reference model in
// the bench computes the expected hold outputs and the expected captured
// broadcast word each cycle. Counts captures, holds and both-slot conflicts,
// and fails if one of them never happened.
module tb_command_decoder;
  import rftsap_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  sr_state_e         sr = SR_LOCAL;
  logic              active = 1'b0;
  link_msg_t         pass_msg  [2];
  logic              down_full [2];
  logic              hold      [2];
  logic              bcast_valid;
  logic [DATA_W-1:0] bcast_data;
  logic              bcast_ack = 1'b0;

  int checks = 0, failures = 0;
  int n_take = 0, n_hold = 0, n_both = 0;
  logic              ref_valid;
  logic [DATA_W-1:0] ref_data;

  command_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pass_msg[0] = '0; pass_msg[1] = '0; down_full[0] = 1'b0; down_full[1] = 1'b0;
    ref_valid = 1'b0; ref_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      logic en, b0, b1, h0, h1, t0, t1;
      @(negedge clk);
      active    = $urandom_range(0, 7) != 0;
      sr        = ($urandom_range(0, 9) == 0) ? SR_REMOTE : SR_LOCAL;
      bcast_ack = $urandom_range(0, 2) == 0;
      for (int s = 0; s < 2; s++) begin
        pass_msg[s]  = '{valid: ($urandom_range(0, 1) == 1),
                         kind: ($urandom_range(0, 1) == 1) ? MSG_BCAST : msg_kind_e'($urandom_range(0, 2)),
                         data: DATA_W'($urandom)};
        down_full[s] = $urandom_range(0, 3) == 0;
      end
      // reference
      en = active && sr == SR_LOCAL;
      b0 = en && pass_msg[0].valid && pass_msg[0].kind == MSG_BCAST;
      b1 = en && pass_msg[1].valid && pass_msg[1].kind == MSG_BCAST;
      h0 = b0 && ref_valid;
      h1 = b1 && (ref_valid || b0);
      t0 = b0 && !h0 && !down_full[0];
      t1 = b1 && !h1 && !down_full[1];
      #1;
      checks++;
      if (hold[0] !== h0 || hold[1] !== h1) begin
        failures++;
        $display("FAIL cycle %0d: hold=%b%b expected %b%b", c, hold[1], hold[0], h1, h0);
      end
      if (h0 || h1) n_hold++;
      if (b0 && b1) n_both++;
      @(posedge clk);
      if (t0) begin ref_valid = 1'b1; ref_data = pass_msg[0].data; n_take++; end
      else if (t1) begin ref_valid = 1'b1; ref_data = pass_msg[1].data; n_take++; end
      else if (bcast_ack) ref_valid = 1'b0;
      #1;
      checks++;
      if (bcast_valid !== ref_valid || (ref_valid && bcast_data !== ref_data)) begin
        failures++;
        $display("FAIL cycle %0d: bcast %b/%h expected %b/%h", c, bcast_valid, bcast_data, ref_valid, ref_data);
      end
    end
    checks++;
    if (n_take == 0 || n_hold == 0 || n_both == 0) begin
      failures++; $display("FAIL coverage take=%0d hold=%0d both=%0d", n_take, n_hold, n_both);
    end
    $display("take %0d hold %0d both %0d", n_take, n_hold, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
