// Testbench for map_histogram: random pixels in the bank, emitted pairs
// collected by a slave model, the histogram of the pairs compared with the
// histogram of the pixels; every pair has value 1 and a key below 768.
// Runs three images (len 57, len 0, full bank) to check restart and done.
module tb_map_histogram;
  import mr_pkg::*;
  localparam int unsigned BW = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load_we = 0, start = 0, done, stall;
  logic [5:0] load_addr = '0;
  logic [31:0] load_data = '0;
  logic [6:0] len = '0;
  axil_req_t axi_req;
  axil_rsp_t axi_rsp;
  logic got; int unsigned got_slot; logic [63:0] got_key; logic [31:0] got_val;
  int hist [768];
  int n_pairs = 0, n_stall = 0;

  map_histogram #(.SLOT(2), .BANK_WORDS(BW)) dut (.*);
  axil_sink #(.NSLOT(4)) sink (.clk, .req(axi_req), .rsp(axi_rsp), .got, .got_slot, .got_key, .got_val);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (stall) n_stall++;
    if (got) begin
      n_pairs++;
      if (got_key < 768 && got_val == 1 && got_slot == 2) hist[got_key]--;
      else begin checks++; failures++; $display("bad pair slot %0d key %0d val %0d", got_slot, got_key, got_val); end
    end
  end

  task automatic run(int n);
    bit [31:0] pix;
    foreach (hist[i]) hist[i] = 0;
    n_pairs = 0;
    for (int a = 0; a < BW; a++) begin
      @(negedge clk);
      pix = $urandom;
      if (a % 7 == 0) pix[23:0] = 24'hFF00FF;   // repeated values, extremes
      load_we = 1; load_addr = 6'(a); load_data = pix;
      if (a < n) begin hist[pix[7:0]]++; hist[256 + pix[15:8]]++; hist[512 + pix[23:16]]++; end
    end
    @(negedge clk); load_we = 0; len = 7'(n); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);   // done must mean every pair is delivered
    checks += 2;
    if (n_pairs != 3 * n) begin failures++; $display("len %0d: %0d pairs", n, n_pairs); end
    begin
      int bad = 0;
      foreach (hist[i]) if (hist[i] != 0) bad++;
      if (bad) begin failures++; $display("len %0d: %0d histogram bins differ", n, bad); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(57); run(0); run(64);
    checks++;
    if (n_stall == 0) begin failures++; $display("never waited for the bus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
