// Testbench for avg_divider: random and corner divisions, and the latency of
// DW+1 clocks from start to done.
//
// How: a reference quotient is computed with the simulator's own division;
// start is driven at the falling edge and the clocks to done are counted.
// Divisor zero must give all ones. Runs at the default DW=32, SW=7.
module tb_avg_divider;
  localparam int unsigned DW = 32, SW = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DW-1:0] dividend = '0, quot;
  logic [SW-1:0] divisor = '0;

  avg_divider #(.DW(DW), .SW(SW)) dut (.*);
  always #5 clk = ~clk;

  task automatic div_one(bit [DW-1:0] a, bit [SW-1:0] b);
    int lat;
    bit [DW-1:0] e;
    @(negedge clk); dividend = a; divisor = b; start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    e = (b == 0) ? '1 : a / b;
    checks += 2;
    if (quot !== e) begin failures++; $display("%0d / %0d = %0d, exp %0d", a, b, quot, e); end
    if (lat - 1 != DW + 1) begin failures++; $display("latency %0d, exp %0d", lat - 1, DW + 1); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    div_one(100, 7); div_one('1, 1); div_one('1, 127); div_one(0, 3); div_one(5, 0); div_one(126, 127);
    for (int i = 0; i < 200; i++) div_one($urandom, SW'($urandom_range(127)));
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
