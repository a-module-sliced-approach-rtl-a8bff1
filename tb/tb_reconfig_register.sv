// tb_reconfig_register: self-checking test of the reconfiguration register.
// Random writes from both the local (Control_line) and remote paths under both
// SR states. The reference model keeps the expected switch setting: a write
// is taken only from the path that matches SR, and only if no two closed
// switches share a port (computed here from an explicit pair table, not from
// the package function).
module tb_reconfig_register;
  import rftsap_pkg::*;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  sr_state_e      sr = SR_LOCAL;
  logic           local_wr = 1'b0, remote_wr = 1'b0;
  logic [NSW-1:0] local_data = '0, remote_data = '0;
  logic [NSW-1:0] closed;
  logic           reject;
  int             checks = 0, failures = 0;
  int             n_reject = 0, n_accept = 0;
  logic [NSW-1:0] ref_closed;
  logic           ref_reject;

  // port pairs of S1..S6: U-R U-L U-D R-L R-D L-D
  int pa [NSW] = '{0, 0, 0, 1, 1, 2};
  int pb [NSW] = '{1, 2, 3, 2, 3, 3};

  reconfig_register dut (.clk, .rst_n, .sr, .local_wr, .local_data,
                         .remote_wr, .remote_data, .closed, .reject);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic legal(logic [NSW-1:0] v);
    int cnt [4] = '{0, 0, 0, 0};
    for (int s = 0; s < NSW; s++)
      if (v[s]) begin cnt[pa[s]]++; cnt[pb[s]]++; end
    for (int p = 0; p < 4; p++) if (cnt[p] > 1) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    ref_closed = '0; ref_reject = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (closed !== 6'b0 || reject !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int c = 0; c < 2000; c++) begin
      logic           w;
      logic [NSW-1:0] d;
      @(negedge clk);
      sr          = ($urandom_range(0, 3) == 0) ? SR_REMOTE : SR_LOCAL;
      local_wr    = $urandom_range(0, 1);
      remote_wr   = $urandom_range(0, 1);
      local_data  = NSW'($urandom);
      remote_data = NSW'($urandom);
      // bias towards single-switch and legal double settings
      if ($urandom_range(0, 1)) local_data = NSW'(1 << $urandom_range(0, 5));
      if ($urandom_range(0, 3) == 0) local_data = 6'b001100; // S3 + S4: legal
      w = (sr == SR_LOCAL) ? local_wr : remote_wr;
      d = (sr == SR_LOCAL) ? local_data : remote_data;
      @(posedge clk);
      if (w) begin
        if (legal(d)) begin ref_closed = d; ref_reject = 1'b0; n_accept++; end
        else begin ref_reject = 1'b1; n_reject++; end
      end
      #1;
      checks++;
      if (closed !== ref_closed || reject !== ref_reject) begin
        failures++;
        $display("FAIL cycle %0d: closed=%b/%b reject=%b/%b", c, closed, ref_closed, reject, ref_reject);
      end
    end
    checks++;
    if (n_reject == 0 || n_accept == 0) begin failures++; $display("FAIL coverage"); end
    $display("accepted %0d rejected %0d", n_accept, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
