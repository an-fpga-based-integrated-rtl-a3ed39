// Full-size testbench of mr_top with every parameter at its default: 8
// Histogram accelerators process a 640 x 480 RGB image (307,200 pixels,
// 921,600 emitted pairs) in direct mode, then 32 Word Count accelerators
// process 90,094 bytes of generated text in hashing mode. Every one of the
// 768 histogram bins and every distinct word is checked against a reference
// computed here.
module tb_mr_top_full;
  import mr_pkg::*;
  localparam int NH = 8, NW = 32, HBW = 38400, WBW = 768;
  int checks = 0, failures = 0, cyc = 0;
  logic clk = 0, rst_n = 0;
  logic load_we = 0, len_we = 0, hist_start = 0, wc_start = 0;
  logic [7:0] load_sel = '0;
  logic [31:0] load_addr = '0, load_data = '0, len_data = '0;
  logic hist_done, wc_done, ev_map_stall, ev_emit_stall, ev_kick, ev_ins_fail;
  logic [31:0] wc_long_words;
  axil_req_t hreq = '0;
  axil_rsp_t hrsp;

  mr_top dut (
    .clk, .rst_n, .load_we, .len_we, .load_sel, .load_addr, .load_data, .len_data,
    .hist_start, .wc_start, .hist_done, .wc_done, .wc_long_words,
    .host_req(hreq), .host_rsp(hrsp),
    .ev_map_stall, .ev_emit_stall, .ev_kick, .ev_ins_fail);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  `include "axil_host_tasks.svh"
  `include "mr_top_flow.svh"

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_histogram(640 * 480);
    run_wordcount(90094, 2000, 0);
    $display("map stalls %0d, emit stalls %0d, displacements %0d, failed insertions %0d",
             n_map_stall, n_emit_stall, n_kick, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
