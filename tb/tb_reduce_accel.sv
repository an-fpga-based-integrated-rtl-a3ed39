// Testbench for reduce_accel through its AXI4-Lite port, on small tables
// (2 x 32 rows) and a 4-entry emit queue.
//   1. emits written while the reset clear sweep runs fill the queue: the
//      bus write is held (emit_stall) and nothing is lost;
//   2. hashing mode, three masters' slots interleaved: lookups return the
//      sums and counts, the key FIFO lists every distinct key exactly once;
//   3. averaging readout;
//   4. direct mode: keys as indices, an out-of-range key sets STATUS.range;
//   5. overfill in hashing mode: STATUS.fail is set, the reported entry is
//      not in the tables, displacements are counted in STATS.
module tb_reduce_accel;
  import mr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  axil_req_t hreq = '0;
  axil_rsp_t hrsp;
  logic emit_stall, kick, ins_fail;
  int n_stall = 0, n_kick = 0, n_fail = 0;

  reduce_accel #(.ADDR_W(5), .NUM_SLOTS(3), .QDEPTH(4), .MAX_KICKS(16)) dut (
    .clk, .rst_n, .axi_req(hreq), .axi_rsp(hrsp), .emit_stall, .kick, .ins_fail);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (emit_stall) n_stall++;
    if (kick) n_kick++;
    if (ins_fail) n_fail++;
  end

  `include "axil_host_tasks.svh"

  bit [31:0] ref_sum [logic [63:0]];
  int        ref_cnt [logic [63:0]];

  task automatic add_ref(logic [63:0] k, logic [31:0] v);
    if (!ref_sum.exists(k)) begin ref_sum[k] = 0; ref_cnt[k] = 0; end
    ref_sum[k] += v; ref_cnt[k]++;
  endtask

  task automatic check_all(bit avg);
    bit h; logic [31:0] v; int c;
    foreach (ref_sum[k]) begin
      host_lookup(k, h, v, c);
      checks++;
      if (!h || c != ref_cnt[k] || v != (avg ? ref_sum[k] / ref_cnt[k] : ref_sum[k])) begin
        failures++; $display("key %h: hit %b v %0d c %0d, exp sum %0d cnt %0d avg %b", k, h, v, c, ref_sum[k], ref_cnt[k], avg);
      end
    end
  endtask

  initial begin
    logic [63:0] keys [16];
    logic [63:0] r, st;
    bit h; logic [31:0] v; int c, nk;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. emits during the reset clear
    foreach (keys[i]) keys[i] = {$urandom, $urandom};
    for (int i = 0; i < 10; i++) begin
      host_emit(0, keys[i % 16], 32'(i + 1)); add_ref(keys[i % 16], 32'(i + 1));
    end
    wait_not_busy();
    checks++;
    if (n_stall == 0) begin failures++; $display("queue never stalled a write"); end
    check_all(0);

    // 2. interleaved slots
    for (int i = 0; i < 90; i++) begin
      logic [63:0] k0, k1; logic [31:0] v0, v1;
      k0 = keys[$urandom_range(15)]; k1 = keys[$urandom_range(15)];
      v0 = $urandom_range(999); v1 = $urandom_range(999);
      axw(slot_key_addr(1), k0);
      axw(slot_key_addr(2), k1);
      axw(slot_val_addr(2), 64'(v1)); add_ref(k1, v1);
      axw(slot_val_addr(1), 64'(v0)); add_ref(k0, v0);
    end
    wait_not_busy();
    check_all(0);
    axr(REG_FIFO_CNT, r);
    checks++;
    if (r != 64'(ref_sum.size())) begin failures++; $display("FIFO count %0d exp %0d", r, ref_sum.size()); end
    nk = int'(r);
    for (int i = 0; i < nk; i++) begin
      axr(REG_FIFO_POP, r);
      checks++;
      if (!ref_sum.exists(r)) begin failures++; $display("FIFO key %h unknown", r); end
      else ref_cnt[r] += 1000;  // mark seen
    end
    foreach (ref_cnt[k]) begin
      checks++;
      if (ref_cnt[k] < 1000 || ref_cnt[k] >= 2000) begin failures++; $display("key %h listed %0d times", k, ref_cnt[k] / 1000); end
      ref_cnt[k] = ref_cnt[k] % 1000;
    end
    axr(REG_FIFO_CNT, r);
    checks++;
    if (r != 0) begin failures++; $display("FIFO not empty after popping"); end

    // 3. averages
    host_config(1, 1, 0);
    check_all(1);

    // 4. direct mode
    host_config(0, 0, 1);
    ref_sum.delete(); ref_cnt.delete();
    for (int i = 0; i < 120; i++) begin
      logic [63:0] k; logic [31:0] vv;
      k = 64'($urandom_range(63)); vv = $urandom_range(100);
      host_emit(i % 3, k, vv); add_ref(k, vv);
    end
    host_emit(0, 64'd64, 32'd1);
    wait_not_busy();
    check_all(0);
    axr(REG_STATUS, st);
    checks++;
    if (!st[ST_RANGE]) begin failures++; $display("range error not flagged"); end
    host_lookup(64'd64, h, v, c);
    checks++;
    if (h) begin failures++; $display("out-of-range key found"); end

    // 5. overfill
    host_config(1, 0, 1);
    axr(REG_STATUS, st);
    checks++;
    if (st[ST_RANGE] || st[ST_FAIL]) begin failures++; $display("sticky bits not cleared"); end
    for (int i = 0; i < 90; i++) host_emit(0, {$urandom, $urandom}, 32'(i));
    wait_not_busy();
    axr(REG_STATUS, st);
    axr(REG_FAIL_KEY, r);
    host_lookup(r, h, v, c);
    checks += 3;
    if (!st[ST_FAIL] || n_fail == 0) begin failures++; $display("overfill without failure"); end
    if (h) begin failures++; $display("failed key %h still stored", r); end
    axr(REG_STATS, r);
    if (r[63:32] == 0 || n_kick == 0) begin failures++; $display("no displacements counted"); end
    $display("stalls %0d kicks %0d fails %0d", n_stall, n_kick, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
