// Configurable Reduce accelerator (Reduce co-processor).
//
// Replaces the software Reduce threads by one unit that stores every
// intermediate key with its merged value. Map accelerators write (key, value)
// pairs to its AXI4-Lite slave; the pairs wait in a small emit queue and the
// control unit merges them into a scratchpad of two block RAMs T1 and T2
// (2**ADDR_W rows of key 64 / tags 8 / value 32 bits each) using cuckoo
// hashing, or, in direct mode, using the key itself as the row index. Each
// newly stored key also enters the unique-key FIFO, so that after the Map
// stage the host can list all keys without knowing them in advance.
//
// The four published configurations are run-time modes of one instance
// (CTRL register): hashing on or off, and readout of the accumulated value
// or of the average value / count.
//
// Timing: see reduce_ctrl (2 clocks per emit that hits, 2 more per cuckoo
// displacement) and reduce_axi_if (1 clock per bus transfer). After reset the
// tables are cleared for 2**ADDR_W clocks, during which STATUS.busy is high
// and emits wait in the queue. QDEPTH and the FIFO depth (one entry per
// table row, enough for every key the tables can hold) are this design's
// choices.
module reduce_accel
  import mr_pkg::*;
#(
  parameter int unsigned ADDR_W    = 12,
  parameter int unsigned NUM_SLOTS = 8,
  parameter int unsigned QDEPTH    = 16,
  parameter int unsigned MAX_KICKS = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axi_req,
  output axil_rsp_t axi_rsp,
  output logic      emit_stall,   // an emit write is held by a full queue
  output logic      kick,         // a cuckoo displacement is starting
  output logic      ins_fail      // an insertion gave up
);

  localparam int unsigned KF_DEPTH = 2 * (2 ** ADDR_W);
  localparam int unsigned KF_CW    = $clog2(KF_DEPTH) + 1;
  localparam int unsigned Q_CW     = $clog2(QDEPTH) + 1;

  logic cfg_hash_en, cfg_avg_en, clear_req, look_req, look_done, res_hit;
  key_t look_key;
  val_t res_value;
  logic [CNT_W-1:0] res_cnt;
  logic q_push, q_full, q_pop, q_empty;
  emit_t q_in, q_out;
  logic [Q_CW-1:0] q_count;
  logic kf_push, kf_full, kf_flush, kf_pop, kf_empty, kf_ovf;
  key_t kf_key, kf_head;
  logic [KF_CW-1:0] kf_count;
  logic ctrl_busy, fail, sat, range_err;
  kv_row_t fail_row;
  logic [31:0] n_emits, n_kicks, n_kicks_q;

  logic              t1_we, t2_we, t1_re, t2_re;
  logic [ADDR_W-1:0] t1_waddr, t2_waddr, t1_raddr, t2_raddr;
  kv_row_t           t1_wdata, t2_wdata, t1_rdata, t2_rdata;

  reduce_axi_if #(.NUM_SLOTS(NUM_SLOTS), .KF_CW(KF_CW)) u_axi (
    .clk, .rst_n, .axi_req, .axi_rsp,
    .cfg_hash_en, .cfg_avg_en, .clear_req, .look_req, .look_key,
    .q_push, .q_data(q_in), .q_full, .emit_stall,
    .busy(ctrl_busy || (q_count != '0)), .look_done, .res_hit, .res_value, .res_cnt,
    .fail, .fail_row, .sat, .range_err, .kf_ovf, .n_emits, .n_kicks,
    .kf_head, .kf_empty, .kf_count, .kf_pop
  );

  // Emit queue (the key/value registers waiting for the control unit).
  sync_fifo #(.WIDTH($bits(emit_t)), .DEPTH(QDEPTH)) u_emitq (
    .clk, .rst_n, .flush(1'b0), .push(q_push), .din(q_in), .full(q_full),
    .pop(q_pop), .dout(q_out), .empty(q_empty), .count(q_count)
  );

  reduce_ctrl #(.ADDR_W(ADDR_W), .MAX_KICKS(MAX_KICKS)) u_ctrl (
    .clk, .rst_n, .cfg_hash_en, .cfg_avg_en, .clear_req,
    .q_valid(!q_empty), .q_data(q_out), .q_pop,
    .look_req, .look_key, .look_done, .res_hit, .res_value, .res_cnt,
    .kf_push, .kf_key, .kf_full, .kf_flush,
    .busy(ctrl_busy), .fail, .fail_row, .sat, .range_err, .kf_ovf, .n_emits, .n_kicks,
    .t1_we, .t2_we, .t1_waddr, .t2_waddr, .t1_wdata, .t2_wdata,
    .t1_re, .t2_re, .t1_raddr, .t2_raddr, .t1_rdata, .t2_rdata
  );

  // Cuckoo tables T1 and T2.
  bram_sdp #(.WIDTH($bits(kv_row_t)), .DEPTH(2 ** ADDR_W)) u_t1 (
    .clk, .we(t1_we), .waddr(t1_waddr), .wdata(t1_wdata), .re(t1_re), .raddr(t1_raddr), .rdata(t1_rdata)
  );
  bram_sdp #(.WIDTH($bits(kv_row_t)), .DEPTH(2 ** ADDR_W)) u_t2 (
    .clk, .we(t2_we), .waddr(t2_waddr), .wdata(t2_wdata), .re(t2_re), .raddr(t2_raddr), .rdata(t2_rdata)
  );

  // Unique-key FIFO.
  sync_fifo #(.WIDTH(KEY_W), .DEPTH(KF_DEPTH)) u_keys (
    .clk, .rst_n, .flush(kf_flush), .push(kf_push), .din(kf_key), .full(kf_full),
    .pop(kf_pop), .dout(kf_head), .empty(kf_empty), .count(kf_count)
  );

  // Event outputs for monitoring.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_kicks_q <= '0;
    else        n_kicks_q <= n_kicks;
  end
  assign kick     = n_kicks != n_kicks_q;
  assign ins_fail = fail;

endmodule
