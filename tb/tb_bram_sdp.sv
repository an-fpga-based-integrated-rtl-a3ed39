// Testbench for bram_sdp: random writes and reads against a reference array,
// checking the one-clock read latency, read-first behaviour on a same-address
// write, and that rdata holds while re is low.
//
// How: stimulus at the falling edge, a plain array as the reference,
// a small WIDTH/DEPTH so addresses repeat often.
module tb_bram_sdp;
  localparam int unsigned W = 104, D = 64, AW = 6;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  bit [W-1:0] ref_mem [D];

  bram_sdp #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic step_write(int a, bit [W-1:0] d);
    @(negedge clk); we = 1; waddr = AW'(a); wdata = d; re = 0;
    @(posedge clk); #1 we = 0; ref_mem[a] = d;
  endtask

  initial begin
    bit [W-1:0] expd, held;
    for (int a = 0; a < D; a++) step_write(a, {$urandom, $urandom, $urandom, $urandom});
    for (int i = 0; i < 300; i++) begin
      int ra = $urandom_range(D - 1);
      int wa = (i % 4 == 0) ? ra : $urandom_range(D - 1);
      bit [W-1:0] d = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      re = 1; raddr = AW'(ra); we = 1; waddr = AW'(wa); wdata = d;
      expd = ref_mem[ra];              // read-first: old contents
      @(posedge clk); #1;
      ref_mem[wa] = d;
      we = 0; re = 0;
      checks++;
      if (rdata !== expd) begin failures++; $display("read %0d got %h exp %h", ra, rdata, expd); end
      held = rdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== held) begin failures++; $display("rdata did not hold"); end
    end
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
