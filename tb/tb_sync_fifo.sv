// Testbench for sync_fifo: random pushes and pops against a reference queue,
// full and empty flags, count, and flush.
//
// How: a SystemVerilog queue is the reference; random push/pop/flush are
// driven at the falling edge and dout, empty, full and count are compared
// every clock. A small DEPTH (16) is used so full is reached often.
module tb_sync_fifo;
  localparam int unsigned W = 64, D = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0, full, empty;
  logic [W-1:0] din = '0, dout;
  logic [$clog2(D):0] count;
  bit [W-1:0] q [$];
  int pushes = 0, pops = 0, fulls = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // count and full are exact at every clock
      checks += 2;
      if (count != q.size()) begin failures++; $display("count %0d exp %0d", count, q.size()); end
      if (full != (q.size() == D)) begin failures++; $display("full flag wrong"); end
      if (full) fulls++;
      push = ($urandom_range(99) < ((i / 500) % 2 ? 30 : 70));
      din  = {$urandom, $urandom};
      pop  = !empty && $urandom_range(1);
      if (pop) begin
        checks++;
        if (q.size() == 0 || dout !== q[0]) begin failures++; $display("pop got %h exp %h", dout, q.size() ? q[0] : 0); end
      end
      if (i == 1500) begin flush = 1; push = 0; pop = 0; end
      @(posedge clk); #1;
      if (flush) begin q.delete(); flush = 0; end
      else begin
        int nbefore;
        nbefore = q.size();
        if (pop) begin void'(q.pop_front()); pops++; end
        if (push && nbefore < D) begin q.push_back(din); pushes++; end
      end
      push = 0; pop = 0;
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("pushes %0d pops %0d full cycles %0d", pushes, pops, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
