// tb_status_register: self-checking test of the status register (SR).
// Checks reset to local.control, that pe_faulty moves SR to remote.control
// one edge later, and that SR stays there after pe_faulty falls, until a
// new reset. The expected state is kept by a reference flag in the bench.
module tb_status_register;
  import rftsap_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      pe_faulty = 1'b0;
  sr_state_e sr;
  int        checks = 0, failures = 0;
  logic      ref_remote;

  status_register dut (.clk, .rst_n, .pe_faulty, .sr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if ((sr == SR_REMOTE) !== ref_remote) begin
      failures++;
      $display("FAIL %s: sr=%0d expected remote=%0d", what, sr, ref_remote);
    end
  endtask

  initial begin
    ref_remote = 1'b0;
    #1; check("in reset");
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 4; round++) begin
      for (int c = 0; c < 50; c++) begin
        @(negedge clk);
        pe_faulty = ($urandom_range(0, 19) == 0);
        @(posedge clk);
        if (pe_faulty) ref_remote = 1'b1;
        #1; check("run");
      end
      // after the fault the state must hold with pe_faulty low
      pe_faulty = 1'b0;
      repeat (5) @(posedge clk);
      #1; check("hold");
      rst_n = 1'b0; ref_remote = 1'b0;
      #1; check("reset");
      @(negedge clk); rst_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
