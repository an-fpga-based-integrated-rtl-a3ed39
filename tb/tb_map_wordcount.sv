// Testbench for map_wordcount: random text of words (mixed case, some with
// apostrophes, some longer than 8 characters) and separators, loaded into
// the bank; the emitted keys must be the words of up to 8 characters, in
// order, upper-cased and packed first character low, each with value 1, and
// long_words must count the rest. Texts that end inside a word and lengths
// that are not a multiple of 4 are included.
module tb_map_wordcount;
  import mr_pkg::*;
  localparam int unsigned BW = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load_we = 0, start = 0, done, stall;
  logic [5:0] load_addr = '0;
  logic [31:0] load_data = '0;
  logic [8:0] len = '0;
  logic [31:0] long_words;
  axil_req_t axi_req;
  axil_rsp_t axi_rsp;
  logic got; int unsigned got_slot; logic [63:0] got_key; logic [31:0] got_val;
  logic [63:0] exp_keys [$];
  int n_long;

  map_wordcount #(.SLOT(1), .BANK_WORDS(BW)) dut (.*);
  axil_sink #(.NSLOT(4)) sink (.clk, .req(axi_req), .rsp(axi_rsp), .got, .got_slot, .got_key, .got_val);

  always #5 clk = ~clk;
  always @(negedge clk) if (got) begin
    checks++;
    if (exp_keys.size() == 0) begin failures++; $display("extra key %h", got_key); end
    else begin
      logic [63:0] e;
      e = exp_keys.pop_front();
      if (got_key !== e || got_val != 1 || got_slot != 1) begin failures++; $display("key %h exp %h", got_key, e); end
    end
  end

  // Reference word splitter.
  task automatic split(byte text [], int n);
    logic [63:0] k; int wl; byte c;
    k = 0; wl = 0; n_long = 0;
    for (int i = 0; i <= n; i++) begin
      c = (i < n) ? text[i] : 8'h20;
      if (c >= "a" && c <= "z") c = c - 32;
      if ((c >= "A" && c <= "Z") || c == 8'h27) begin
        if (wl < 8) k[8*wl +: 8] = c;
        wl++;
      end else if (wl > 0) begin
        if (wl <= 8) exp_keys.push_back(k); else n_long++;
        k = 0; wl = 0;
      end
    end
  endtask

  task automatic run(int n, bit end_in_word);
    byte text [];
    string seps = " ,.\n-0123456789";
    string lets = "abcdefghijklmnopqrstuvwxyzABCDEFGHIJKLMNOPQRSTUVWXYZ'";
    int i = 0;
    text = new[BW * 4];
    while (i < BW * 4) begin
      int wl = $urandom_range(99) < 15 ? $urandom_range(12, 9) : $urandom_range(8, 1);
      for (int j = 0; j < wl && i < BW * 4; j++) text[i++] = lets[$urandom_range(lets.len() - 1)];
      for (int j = 0; j < $urandom_range(2, 1) && i < BW * 4; j++) text[i++] = seps[$urandom_range(seps.len() - 1)];
    end
    if (end_in_word) text[n - 1] = "q";
    for (int a = 0; a < BW; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = 6'(a);
      load_data = {text[4*a+3], text[4*a+2], text[4*a+1], text[4*a]};
    end
    exp_keys.delete();
    split(text, n);
    @(negedge clk); load_we = 0; len = 9'(n); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);   // done must mean every pair is delivered
    checks += 2;
    if (exp_keys.size() != 0) begin failures++; $display("n=%0d: %0d words not emitted", n, exp_keys.size()); end
    if (long_words != n_long) begin failures++; $display("n=%0d: long words %0d exp %0d", n, long_words, n_long); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(256, 0); run(203, 1); run(1, 1); run(0, 0); run(97, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
