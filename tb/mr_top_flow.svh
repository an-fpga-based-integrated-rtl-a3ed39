// Host flow for the mr_top testbenches: loading the Map banks, running the
// Histogram and Word Count applications, and checking every reduced result
// against a reference computed here. The including module provides clk,
// the mr_top instance "dut" and its host signals, NH / NW (accelerator
// counts), HBW / WBW (bank words), and the counters checks / failures.
// Entries that the Reduce accelerator gives up on (failed insertion) are
// kept in a software table, as a host would; results are hardware plus
// software.

int n_map_stall = 0, n_emit_stall = 0, n_kick = 0, n_fail = 0;
int n_mode_switch = 0, n_pops = 0, n_avg = 0, n_direct_hits = 0;
bit cur_hash = 1;
int sw_val [logic [63:0]];

always @(negedge clk) begin
  if (ev_map_stall) n_map_stall++;
  if (ev_emit_stall) n_emit_stall++;
  if (ev_kick) n_kick++;
  if (ev_ins_fail) begin
    kv_row_t fr;
    fr = dut.u_reduce.u_ctrl.fail_row;
    n_fail++;
    if (!sw_val.exists(fr.key)) sw_val[fr.key] = 0;
    sw_val[fr.key] += int'(fr.value);
  end
end

task automatic chk(bit ok, string msg);
  checks++;
  if (!ok) begin failures++; $display("FAIL: %s", msg); end
endtask

task automatic mode(bit hash_en, bit avg_en, bit clear, bit wait_clear);
  if (hash_en != cur_hash) n_mode_switch++;
  cur_hash = hash_en;
  axw(REG_CTRL, {61'd0, clear, avg_en, hash_en});
  if (clear && wait_clear) wait_not_busy();
endtask

task automatic load_bank(int sel, logic [31:0] words [], int nwords, int len);
  for (int a = 0; a < nwords; a++) begin
    @(negedge clk);
    load_we = 1; load_sel = 8'(sel); load_addr = 32'(a); load_data = words[a];
  end
  @(negedge clk);
  load_we = 0; len_we = 1; load_sel = 8'(sel); len_data = 32'(len);
  @(negedge clk);
  len_we = 0;
endtask

// ---- Histogram: npix pixels spread over the NH banks, direct mode ----
task automatic run_histogram(int npix);
  int hist [768];
  int per, base, n, cyc0;
  bit h; logic [31:0] v; int c;
  foreach (hist[i]) hist[i] = 0;
  per = (npix + NH - 1) / NH;
  base = 0;
  for (int b = 0; b < NH; b++) begin
    logic [31:0] words [];
    n = (npix - base < per) ? npix - base : per;
    words = new[n > 0 ? n : 1];
    for (int i = 0; i < n; i++) begin
      words[i] = {8'h00, 24'($urandom)};
      hist[words[i][7:0]]++; hist[256 + words[i][15:8]]++; hist[512 + words[i][23:16]]++;
    end
    load_bank(b, words, n, n);
    base += n;
  end
  mode(0, 0, 1, 1);
  cyc0 = cyc;
  @(negedge clk); hist_start = 1; @(negedge clk); hist_start = 0;
  while (!hist_done) @(negedge clk);
  wait_not_busy();
  $display("histogram: %0d pixels, %0d emits, Map stage %0d clocks", npix, 3 * npix, cyc - cyc0);
  for (int k = 0; k < 768; k++) begin
    host_lookup(64'(k), h, v, c);
    chk(h == (hist[k] > 0) && (!h || v == 32'(hist[k])),
        $sformatf("histogram key %0d: hit %b value %0d, exp %0d", k, h, v, hist[k]));
    if (h) n_direct_hits++;
  end
endtask

// ---- Word Count: about nbytes of text over the NW banks, hashing mode ----
task automatic run_wordcount(int nbytes, int nvocab, bit start_during_clear);
  string vocab [];
  int expc [logic [63:0]];
  int exp_long, per, cyc0, nk;
  string seps = " ,.\n;:!?-0123456789";
  string lets = "abcdefghijklmnopqrstuvwxyzABCDEFGHIJKLMNOPQRSTUVWXYZ";
  logic [63:0] r;
  bit seen [logic [63:0]];
  bit h; logic [31:0] v; int c;

  vocab = new[nvocab];
  foreach (vocab[i]) begin
    int wl;
    wl = ($urandom_range(99) < 10) ? $urandom_range(14, 9) : $urandom_range(8, 1);
    vocab[i] = "";
    for (int j = 0; j < wl; j++) vocab[i] = {vocab[i], string'(lets[$urandom_range(lets.len() - 1)])};
  end
  exp_long = 0;
  per = (nbytes + NW - 1) / NW;
  if (per > WBW * 4) per = WBW * 4;
  for (int b = 0; b < NW; b++) begin
    byte text [$];
    logic [31:0] words [];
    // words and separators until the chunk is full; chunks end at a separator
    forever begin
      string w;
      logic [63:0] key;
      int sl;
      w = vocab[$urandom_range(nvocab - 1)];
      sl = $urandom_range(2, 1);
      if (text.size() + w.len() + sl > per) break;
      key = 0;
      for (int j = 0; j < w.len(); j++) begin
        byte ch;
        ch = w[j];
        text.push_back(($urandom_range(1) && ch >= "A" && ch <= "Z") ? ch + 8'd32 : ch);
        if (j < 8) key[8*j +: 8] = (ch >= "a" && ch <= "z") ? ch - 8'd32 : ch;
      end
      if (w.len() > 8) exp_long++;
      else begin
        if (!expc.exists(key)) expc[key] = 0;
        expc[key]++;
      end
      for (int j = 0; j < sl; j++) text.push_back(seps[$urandom_range(seps.len() - 1)]);
    end
    words = new[(text.size() + 3) / 4 + 1];
    foreach (words[i]) words[i] = '0;
    foreach (text[i]) words[i / 4][8 * (i % 4) +: 8] = text[i];
    load_bank(NH + b, words, words.size(), text.size());
  end
  sw_val.delete();
  mode(1, 0, 1, !start_during_clear);
  cyc0 = cyc;
  @(negedge clk); wc_start = 1; @(negedge clk); wc_start = 0;
  while (!wc_done) @(negedge clk);
  wait_not_busy();
  $display("word count: %0d distinct words, %0d long, Map stage %0d clocks, %0d failed insertions",
           expc.size(), exp_long, cyc - cyc0, n_fail);
  chk(wc_long_words == 32'(exp_long), $sformatf("long words %0d exp %0d", wc_long_words, exp_long));
  // every distinct key must come out of the key FIFO
  axr(REG_FIFO_CNT, r);
  nk = int'(r);
  for (int i = 0; i < nk; i++) begin
    axr(REG_FIFO_POP, r);
    n_pops++;
    seen[r] = 1;
  end
  chk(seen.size() == expc.size(), $sformatf("%0d distinct keys listed, exp %0d", seen.size(), expc.size()));
  foreach (seen[k]) chk(expc.exists(k), $sformatf("listed key %h was never emitted", k));
  foreach (expc[k]) chk(seen.exists(k), $sformatf("key %h (count %0d, software %0d) not listed", k, expc[k], sw_val.exists(k) ? sw_val[k] : -1));
  foreach (expc[k]) begin
    int total;
    host_lookup(k, h, v, c);
    total = (h ? int'(v) : 0) + (sw_val.exists(k) ? sw_val[k] : 0);
    chk(total == expc[k], $sformatf("word %h: hw %0d (hit %b) + sw %0d, exp %0d", k, v, h,
        sw_val.exists(k) ? sw_val[k] : 0, expc[k]));
  end
  // averaging readout: every emitted value is 1, so each mean is 1
  mode(1, 1, 0, 0);
  foreach (expc[k]) begin
    if (n_avg >= 20) break;
    host_lookup(k, h, v, c);
    if (h) begin
      n_avg++;
      chk(v == 1, $sformatf("average of %h is %0d", k, v));
    end
  end
endtask
