// tb_local_memory: self-checking test of the node's local memory.
// Random reads and writes against a reference array in the bench; checks the
// one-cycle read latency and that rdata holds between reads.
module tb_local_memory;
  import rftsap_pkg::*;

  localparam int unsigned DEPTH = 256;

  logic                     clk = 1'b0;
  logic                     en = 1'b0, we = 1'b0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  logic [DATA_W-1:0]        wdata = '0;
  logic [DATA_W-1:0]        rdata;
  logic [DATA_W-1:0]        ref_mem [DEPTH];
  logic [DATA_W-1:0]        ref_rdata;
  int                       checks = 0, failures = 0;
  logic                     have_read = 1'b0;

  local_memory #(.DEPTH(DEPTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = a[$clog2(DEPTH)-1:0]; wdata = DATA_W'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk); en = 1'b0; we = 1'b0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      en    = $urandom_range(0, 3) != 0;
      we    = $urandom_range(0, 2) == 0;
      addr  = $clog2(DEPTH)'($urandom);
      wdata = DATA_W'($urandom);
      @(posedge clk);
      if (en && we) ref_mem[addr] = wdata;
      else if (en) begin ref_rdata = ref_mem[addr]; have_read = 1'b1; end
      #1;
      if (have_read) begin
        checks++;
        if (rdata !== ref_rdata) begin
          failures++;
          $display("FAIL cycle %0d addr %0d: rdata=%h expected %h", c, addr, rdata, ref_rdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
