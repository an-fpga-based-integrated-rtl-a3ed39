// End-to-end testbench of mr_top at reduced size: 2 Histogram and 3 Word
// Count Map accelerators, small banks, 2 x 512-row tables, a 2-entry emit
// queue and at most 1 cuckoo displacement per insertion, so that every
// mechanism shows up in a short run. Runs Histogram (direct mode), switches
// to hashing and runs Word Count (started while the tables are still being
// cleared), checks every result, then switches back and runs Histogram
// again. Counts: Map accelerators waiting for the bus, emit writes held by a
// full queue, cuckoo displacements, failed insertions (kept in software),
// mode switches, long words left to software, key FIFO pops, averaging
// reads and direct-mode hits; each must be seen at least once.
module tb_mr_top;
  import mr_pkg::*;
  localparam int NH = 2, NW = 3, HBW = 128, WBW = 512;
  int checks = 0, failures = 0, cyc = 0;
  logic clk = 0, rst_n = 0;
  logic load_we = 0, len_we = 0, hist_start = 0, wc_start = 0;
  logic [7:0] load_sel = '0;
  logic [31:0] load_addr = '0, load_data = '0, len_data = '0;
  logic hist_done, wc_done, ev_map_stall, ev_emit_stall, ev_kick, ev_ins_fail;
  logic [31:0] wc_long_words;
  axil_req_t hreq = '0;
  axil_rsp_t hrsp;

  mr_top #(.NUM_HIST(NH), .NUM_WC(NW), .HIST_BANK_WORDS(HBW), .WC_BANK_WORDS(WBW),
           .ADDR_W(9), .QDEPTH(2), .MAX_KICKS(1)) dut (
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
    run_histogram(200);
    run_wordcount(5500, 1200, 1);
    run_histogram(NH * HBW);
    $display("map stalls %0d, emit stalls %0d, displacements %0d, failed insertions %0d, mode switches %0d, key pops %0d, average reads %0d, direct hits %0d",
             n_map_stall, n_emit_stall, n_kick, n_fail, n_mode_switch, n_pops, n_avg, n_direct_hits);
    chk(n_map_stall > 0, "no Map accelerator ever waited");
    chk(n_emit_stall > 0, "the emit queue never held a write");
    chk(n_kick > 0, "no cuckoo displacement");
    chk(n_fail > 0, "no failed insertion");
    chk(n_mode_switch >= 2, "mode not switched both ways");
    chk(wc_long_words > 0, "no long word");
    chk(n_pops > 0, "key FIFO never popped");
    chk(n_avg > 0, "no averaging read");
    chk(n_direct_hits > 0, "no direct-mode hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
