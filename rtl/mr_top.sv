// MapReduce accelerator platform: Map accelerators + shared Reduce accelerator.
//
// NUM_HIST Histogram and NUM_WC Word Count Map accelerators, each with its
// own input block RAM bank, emit (key, value) pairs over one shared AXI4-Lite
// bus into a single configurable Reduce accelerator. The host (outside this
// module) is one more master on that bus and also drives the bank load port
// and the start signals:
//   1. load each bank (load_we/load_sel/load_addr/load_data) and its length
//      (len_we/load_sel/len_data: pixels for Histogram, bytes for Word Count);
//   2. set the Reduce accelerator's mode through host_req (CTRL register):
//      direct mode and accumulation for Histogram, hashing for Word Count;
//   3. pulse hist_start or wc_start and wait for hist_done or wc_done and
//      for STATUS.busy to fall;
//   4. read the results: look up known keys, or pop the unique keys from the
//      key FIFO and look each one up.
// Only one group of Map accelerators should run at a time, because the two
// applications need different Reduce modes. load_sel counts the Histogram
// accelerators first, then the Word Count ones; bus master / emit slot i is
// Map accelerator i and slot NUM_HIST + NUM_WC is the host.
// The kernel counts default to the largest ones evaluated for each
// application; the bank sizes to the evaluated input size split evenly over
// them (Word Count with room for cutting at word breaks).
// The overall arrangement (Map accelerators with local memories, a shared
// AXI bus, one Reduce co-processor with a key FIFO) follows the published
// platform; the bank load port, the length registers, the start/done
// signals and the ev_* monitoring outputs are this design's own.
// Timing: every pair costs two single AXI writes on the shared bus, and with
// several accelerators the bus is the limit: at full size the Histogram Map
// stage takes 5.53 M clocks for 921,600 pairs, 6 clocks per pair
// (ev_map_stall shows the waiting; ev_emit_stall a full Reduce queue).
module mr_top
  import mr_pkg::*;
#(
  parameter int unsigned NUM_HIST        = 8,
  parameter int unsigned NUM_WC          = 32,
  parameter int unsigned HIST_BANK_WORDS = 38400,   // 640 x 480 pixels / 8
  parameter int unsigned WC_BANK_WORDS   = 768,     // 3072 bytes >= 90094 / 32
  parameter int unsigned ADDR_W          = 12,
  parameter int unsigned QDEPTH          = 16,
  parameter int unsigned MAX_KICKS       = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // host: bank loading
  input  logic        load_we,
  input  logic        len_we,
  input  logic [7:0]  load_sel,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic [31:0] len_data,
  // host: Map stage control
  input  logic        hist_start,
  input  logic        wc_start,
  output logic        hist_done,
  output logic        wc_done,
  output logic [31:0] wc_long_words,   // words too long for a key, all Word Count accelerators
  // host: bus master port into the Reduce accelerator
  input  axil_req_t   host_req,
  output axil_rsp_t   host_rsp,
  // events, for monitoring
  output logic        ev_map_stall,    // some Map accelerator waits to emit
  output logic        ev_emit_stall,   // the Reduce emit queue holds a write
  output logic        ev_kick,         // a cuckoo displacement starts
  output logic        ev_ins_fail      // a cuckoo insertion gave up
);

  localparam int unsigned NM  = NUM_HIST + NUM_WC + 1;
  localparam int unsigned HBW = $clog2(HIST_BANK_WORDS);
  localparam int unsigned WBW = $clog2(WC_BANK_WORDS);

  axil_req_t m_req [NM];
  axil_rsp_t m_rsp [NM];
  axil_req_t s_req;
  axil_rsp_t s_rsp;

  logic [NUM_HIST-1:0] h_done, h_stall;
  logic [NUM_WC-1:0]   w_done, w_stall;
  logic [31:0]         w_long [NUM_WC];
  logic [HBW:0]        h_len [NUM_HIST];
  logic [WBW+2:0]      w_len [NUM_WC];

  // Length registers, written by the host.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_HIST; i++) h_len[i] <= '0;
      for (int i = 0; i < NUM_WC; i++)   w_len[i] <= '0;
    end else if (len_we) begin
      for (int i = 0; i < NUM_HIST; i++)
        if (int'(load_sel) == i) h_len[i] <= len_data[HBW:0];
      for (int i = 0; i < NUM_WC; i++)
        if (int'(load_sel) == NUM_HIST + i) w_len[i] <= len_data[WBW+2:0];
    end
  end

  for (genvar i = 0; i < NUM_HIST; i++) begin : g_hist
    map_histogram #(.SLOT(i), .BANK_WORDS(HIST_BANK_WORDS)) u_map (
      .clk, .rst_n,
      .load_we(load_we && int'(load_sel) == i), .load_addr(load_addr[HBW-1:0]), .load_data,
      .start(hist_start), .len(h_len[i]), .done(h_done[i]), .stall(h_stall[i]),
      .axi_req(m_req[i]), .axi_rsp(m_rsp[i])
    );
  end

  for (genvar i = 0; i < NUM_WC; i++) begin : g_wc
    map_wordcount #(.SLOT(NUM_HIST + i), .BANK_WORDS(WC_BANK_WORDS)) u_map (
      .clk, .rst_n,
      .load_we(load_we && int'(load_sel) == NUM_HIST + i), .load_addr(load_addr[WBW-1:0]), .load_data,
      .start(wc_start), .len(w_len[i]), .done(w_done[i]), .stall(w_stall[i]),
      .long_words(w_long[i]), .axi_req(m_req[NUM_HIST + i]), .axi_rsp(m_rsp[NUM_HIST + i])
    );
  end

  assign m_req[NM-1] = host_req;
  assign host_rsp    = m_rsp[NM-1];

  axil_interconnect #(.N(NM)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  reduce_accel #(.ADDR_W(ADDR_W), .NUM_SLOTS(NM), .QDEPTH(QDEPTH), .MAX_KICKS(MAX_KICKS)) u_reduce (
    .clk, .rst_n, .axi_req(s_req), .axi_rsp(s_rsp),
    .emit_stall(ev_emit_stall), .kick(ev_kick), .ins_fail(ev_ins_fail)
  );

  always_comb begin
    wc_long_words = '0;
    for (int i = 0; i < NUM_WC; i++) wc_long_words += w_long[i];
  end

  assign hist_done    = &h_done;
  assign wc_done      = &w_done;
  assign ev_map_stall = (|h_stall) || (|w_stall);

endmodule
