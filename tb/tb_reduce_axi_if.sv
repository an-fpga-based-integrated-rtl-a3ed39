// Testbench for reduce_axi_if on its own: the control unit and FIFOs are
// played by the testbench. Checks emit slots (per-master KEY kept apart),
// back-pressure when the queue is full, CTRL/CMD decoding, the RESULT,
// STATUS, FAIL and STATS layouts, and popping the key FIFO by reading.
module tb_reduce_axi_if;
  import mr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  axil_req_t hreq = '0;
  axil_rsp_t hrsp;
  logic cfg_hash_en, cfg_avg_en, clear_req, look_req, q_push, emit_stall, kf_pop;
  key_t look_key;
  emit_t q_data;
  logic q_full = 0, busy = 0, look_done = 0, res_hit = 0, fail = 0, sat = 0, range_err = 0, kf_ovf = 0;
  val_t res_value = '0;
  logic [CNT_W-1:0] res_cnt = '0;
  kv_row_t fail_row = '0;
  logic [31:0] n_emits = '0, n_kicks = '0;
  key_t kf_head = '0;
  logic kf_empty = 1;
  logic [13:0] kf_count = '0;

  reduce_axi_if #(.NUM_SLOTS(3), .KF_CW(14)) dut (.clk, .rst_n, .axi_req(hreq), .axi_rsp(hrsp), .*);

  always #5 clk = ~clk;
  `include "axil_host_tasks.svh"

  emit_t pushed [$];
  int n_clear = 0, n_look = 0, n_pop = 0, n_stall = 0;
  always @(negedge clk) begin
    if (q_push) pushed.push_back(q_data);
    if (clear_req) n_clear++;
    if (look_req) n_look++;
    if (kf_pop) n_pop++;
    if (emit_stall) n_stall++;
  end

  task automatic expect64(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [63:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // emit slots
    axw(slot_key_addr(0), 64'hAAAA_0000_0000_0001);
    axw(slot_key_addr(2), 64'hCCCC_0000_0000_0003);
    axw(slot_val_addr(0), 64'd11);
    axw(slot_val_addr(2), 64'd33);
    axw(slot_val_addr(0), 64'd12);
    expect64("pushes", 64'(pushed.size()), 3);
    if (pushed.size() == 3) begin
      expect64("push0 key", pushed[0].key, 64'hAAAA_0000_0000_0001); expect64("push0 val", 64'(pushed[0].value), 11);
      expect64("push1 key", pushed[1].key, 64'hCCCC_0000_0000_0003); expect64("push1 val", 64'(pushed[1].value), 33);
      expect64("push2 key", pushed[2].key, 64'hAAAA_0000_0000_0001); expect64("push2 val", 64'(pushed[2].value), 12);
    end
    // back-pressure
    q_full = 1;
    fork
      axw(slot_val_addr(1), 64'd5);
      begin repeat (10) @(negedge clk); q_full = 0; end
    join
    expect64("stall cycles", 64'(n_stall >= 8), 1);
    expect64("push after stall", 64'(pushed.size()), 4);
    // CTRL
    axw(REG_CTRL, 64'b110);
    expect64("cfg", {cfg_avg_en, cfg_hash_en}, 2'b10);
    expect64("clear pulses", 64'(n_clear), 1);
    axr(REG_CTRL, r); expect64("ctrl read", r, 64'b10);
    axw(REG_CTRL, 64'b001);
    expect64("clear pulses", 64'(n_clear), 1);
    // lookup
    axw(REG_LKEY, 64'h1234_5678_9ABC_DEF0);
    axw(REG_CMD, 64'd1);
    expect64("look pulses", 64'(n_look), 1);
    expect64("look key", look_key, 64'h1234_5678_9ABC_DEF0);
    axr(REG_STATUS, r); expect64("status before done", r[ST_LOOK_DONE], 0);
    @(negedge clk); res_hit = 1; res_value = 32'hDEAD_BEEF; res_cnt = 7'd42; look_done = 1;
    @(negedge clk); look_done = 0;
    axr(REG_STATUS, r); expect64("status done", r[ST_LOOK_DONE], 1);
    axr(REG_RESULT, r); expect64("result", r, {23'b0, 1'b1, 1'b0, 7'd42, 32'hDEAD_BEEF});
    // sticky bits and fail entry
    busy = 1;
    @(negedge clk); fail = 1; fail_row = '{key: 64'h77, cnt: 7'd3, valid: 1'b1, value: 32'd99}; sat = 1; range_err = 1; kf_ovf = 1;
    @(negedge clk); fail = 0; sat = 0; range_err = 0; kf_ovf = 0;
    axr(REG_STATUS, r); expect64("status sticky", r[5:0], 6'b111111);
    axr(REG_FAIL_KEY, r); expect64("fail key", r, 64'h77);
    axr(REG_FAIL_VAL, r); expect64("fail val", r, {25'b0, 7'd3, 32'd99});
    axw(REG_CTRL, 64'b101);
    busy = 0;
    axr(REG_STATUS, r); expect64("status cleared", r[5:0], 6'b000010);
    // stats and FIFO
    n_emits = 32'd1000; n_kicks = 32'd77;
    axr(REG_STATS, r); expect64("stats", r, {32'd77, 32'd1000});
    kf_count = 14'd9; kf_head = 64'h5555; kf_empty = 0;
    axr(REG_FIFO_CNT, r); expect64("fifo cnt", r, 9);
    axr(REG_FIFO_POP, r); expect64("fifo pop", r, 64'h5555);
    expect64("pop pulses", 64'(n_pop), 1);
    kf_empty = 1;
    axr(REG_FIFO_POP, r); expect64("pop empty", r, 0);
    expect64("pop pulses", 64'(n_pop), 1);
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
