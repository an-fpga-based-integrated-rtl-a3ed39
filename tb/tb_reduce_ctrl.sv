// Testbench for reduce_ctrl with its two table RAMs, on small tables
// (2 x 16 rows) so that cuckoo displacements and failed insertions occur.
// The emit queue is modelled here as a first-word fall-through list and the
// unique-key FIFO as a captured list. Reference: an associative array of
// key -> (sum, count).
//   phase 1: hashing, 12 keys emitted many times: lookups return sums and
//            counts, every key appears once in the key FIFO, emits that hit
//            take 2 clocks each, a lookup answers within 4 clocks;
//   phase 2: averaging readout of the same keys;
//   phase 3: clear, then 40 distinct keys into 32 rows: displacements and
//            failures happen, and every key is either found or reported;
//   phase 4: direct mode, keys used as row index, and a key out of range.
module tb_reduce_ctrl;
  import mr_pkg::*;
  localparam int unsigned AW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_hash_en = 1, cfg_avg_en = 0, clear_req = 0;
  logic q_valid, q_pop;
  emit_t q_data;
  logic look_req = 0, look_done, res_hit;
  key_t look_key = '0;
  val_t res_value;
  logic [CNT_W-1:0] res_cnt;
  logic kf_push, kf_full, kf_flush, busy, fail, sat, range_err, kf_ovf;
  key_t kf_key;
  kv_row_t fail_row;
  logic [31:0] n_emits, n_kicks;
  logic t1_we, t2_we, t1_re, t2_re;
  logic [AW-1:0] t1_waddr, t2_waddr, t1_raddr, t2_raddr;
  kv_row_t t1_wdata, t2_wdata, t1_rdata, t2_rdata;

  reduce_ctrl #(.ADDR_W(AW), .MAX_KICKS(16)) dut (.*);
  bram_sdp #(.WIDTH($bits(kv_row_t)), .DEPTH(2 ** AW)) t1 (.clk, .we(t1_we), .waddr(t1_waddr), .wdata(t1_wdata), .re(t1_re), .raddr(t1_raddr), .rdata(t1_rdata));
  bram_sdp #(.WIDTH($bits(kv_row_t)), .DEPTH(2 ** AW)) t2 (.clk, .we(t2_we), .waddr(t2_waddr), .wdata(t2_wdata), .re(t2_re), .raddr(t2_raddr), .rdata(t2_rdata));

  always #5 clk = ~clk;

  // Emit queue model.
  emit_t eq [$];
  assign q_valid = eq.size() > 0;
  assign q_data  = eq.size() > 0 ? eq[0] : '0;
  assign kf_full = 1'b0;
  key_t kf_list [$];
  kv_row_t fails [$];
  int n_fail = 0, n_sat = 0;
  // Sampled at the falling edge, when the DUT outputs are settled. A pop seen
  // in one clock removes the head in the next one, after the DUT took it.
  bit pop_d = 0;
  always @(negedge clk) begin
    if (pop_d) void'(eq.pop_front());
    pop_d = q_pop;
    if (kf_flush) kf_list.delete();
    if (kf_push) kf_list.push_back(kf_key);
    if (fail) begin fails.push_back(fail_row); n_fail++; $display("%0d fail %h %0d", cyc, fail_row.key, fail_row.value); end
    if (sat) n_sat++;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit [31:0] ref_sum [key_t];
  int        ref_cnt [key_t];

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic lookup(key_t k, output bit h, output bit [31:0] v, output int c, output int lat);
    @(negedge clk); look_key = k; look_req = 1;
    @(negedge clk); look_req = 0;
    lat = 1;
    while (!look_done) begin @(negedge clk); lat++; end
    h = res_hit; v = res_value; c = res_cnt;
  endtask

  task automatic emit(key_t k, val_t v);
    eq.push_back('{key: k, value: v});
    if (!ref_sum.exists(k)) begin ref_sum[k] = 0; ref_cnt[k] = 0; end
    ref_sum[k] += v; ref_cnt[k]++;
  endtask

  initial begin
    key_t keys [12];
    bit h; bit [31:0] v; int c, lat, t0, t1c, found;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait_idle();      // reset clear sweep

    // ---- phase 1 ----
    foreach (keys[i]) keys[i] = {$urandom, $urandom};
    for (int i = 0; i < 12; i++) emit(keys[i], $urandom_range(1000));
    wait_idle();
    t0 = cyc;
    for (int i = 0; i < 120; i++) emit(keys[i % 12], $urandom_range(1000));
    wait_idle();
    t1c = cyc - t0;
    checks++;
    if (t1c > 2 * 120 + 4) begin failures++; $display("120 hit emits took %0d clocks", t1c); end
    foreach (keys[i]) begin
      lookup(keys[i], h, v, c, lat);
      checks += 2;
      if (!h || v != ref_sum[keys[i]] || c != ref_cnt[keys[i]]) begin
        failures++; $display("key %h: hit %b value %0d cnt %0d, exp %0d %0d", keys[i], h, v, c, ref_sum[keys[i]], ref_cnt[keys[i]]);
      end
      if (lat > 4) begin failures++; $display("lookup latency %0d", lat); end
    end
    checks++;
    if (kf_list.size() != 12) begin failures++; $display("key FIFO holds %0d keys", kf_list.size()); end
    foreach (kf_list[i]) begin
      checks++;
      if (!ref_sum.exists(kf_list[i])) begin failures++; $display("unknown key %h in FIFO", kf_list[i]); end
    end
    lookup(64'h1234, h, v, c, lat);
    checks++;
    if (h) begin failures++; $display("hit on a key never emitted"); end

    // ---- phase 2: averaging ----
    cfg_avg_en = 1;
    foreach (keys[i]) begin
      lookup(keys[i], h, v, c, lat);
      checks++;
      if (!h || v != ref_sum[keys[i]] / ref_cnt[keys[i]]) begin
        failures++; $display("avg key %h: %0d exp %0d", keys[i], v, ref_sum[keys[i]] / ref_cnt[keys[i]]);
      end
    end
    cfg_avg_en = 0;

    // ---- phase 3: overfill ----
    @(negedge clk); clear_req = 1; @(negedge clk); clear_req = 0;
    wait_idle();
    ref_sum.delete(); ref_cnt.delete(); fails.delete();
    checks++;
    if (kf_list.size() != 0) begin failures++; $display("key FIFO not flushed by clear"); end
    for (int i = 0; i < 40; i++) emit({$urandom, $urandom}, 32'(i + 1));
    wait_idle();
    checks += 2;
    if (n_kicks == 0) begin failures++; $display("no cuckoo displacement seen"); end
    if (n_fail == 0) begin failures++; $display("no failed insertion seen"); end
    found = 0;
    foreach (ref_sum[k]) begin
      bit reported;
      reported = 0;
      foreach (fails[j]) if (fails[j].key == k && fails[j].value == ref_sum[k]) reported = 1;
      lookup(k, h, v, c, lat);
      checks++;
      if (h) found++;
      if (h == reported || (h && v != ref_sum[k])) begin
        failures++; $display("key %h: hit %b value %0d reported %b exp %0d", k, h, v, reported, ref_sum[k]);
      end
    end
    checks++;
    if (found + fails.size() != 40 || found > 32) begin failures++; $display("found %0d + failed %0d", found, fails.size()); end
    $display("overfill: %0d stored, %0d failed, %0d displacements", found, fails.size(), n_kicks);

    // ---- phase 4: direct mode ----
    @(negedge clk); cfg_hash_en = 0; clear_req = 1; @(negedge clk); clear_req = 0;
    wait_idle();
    ref_sum.delete(); ref_cnt.delete();
    for (int i = 0; i < 200; i++) emit(64'($urandom_range(31)), $urandom_range(50));
    eq.push_back('{key: 64'd32, value: 32'd5});   // outside 2 x 16 rows
    wait_idle();
    for (int k = 0; k < 32; k++) begin
      lookup(64'(k), h, v, c, lat);
      checks++;
      if (h != ref_sum.exists(64'(k)) || (h && (v != ref_sum[64'(k)] || c != ref_cnt[64'(k)]))) begin
        failures++; $display("direct key %0d: hit %b %0d/%0d", k, h, v, c);
      end
    end
    lookup(64'd32, h, v, c, lat);
    checks++;
    if (h) begin failures++; $display("out-of-range key stored"); end
    checks++;
    if (kf_list.size() != ref_sum.size()) begin failures++; $display("direct: %0d keys in FIFO, exp %0d", kf_list.size(), ref_sum.size()); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
