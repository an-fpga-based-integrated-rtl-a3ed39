// Testbench for reduce_hash: both hash variants against a reference fold
// computed here from per-address-bit key masks, plus spread
// checks: random keys, and upper-case word keys as the Word Count accelerator
// makes them, must both use many addresses.
//
// The reference builds, for each address bit, the mask of key bits that
// feed it, independently of the fold loops in the design.
module tb_reduce_hash;
  import mr_pkg::*;
  localparam int unsigned AW = 12;
  int checks = 0, failures = 0;
  key_t key;
  logic [AW-1:0] a1, a2;
  bit [AW-1:0] seen1 [$];

  reduce_hash #(.ADDR_W(AW), .VARIANT(1)) dut1 (.key, .addr(a1));
  reduce_hash #(.ADDR_W(AW), .VARIANT(2)) dut2 (.key, .addr(a2));

  // Reference: per address bit, the mask of key bits that feed it.
  function automatic bit [AW-1:0] ref_h(bit [63:0] k, int v);
    bit [AW-1:0] h = '0;
    for (int a = 0; a < AW; a++) begin
      bit [63:0] mask = '0;
      for (int b = 0; b < 64; b++)
        if (v == 1 ? (b % AW == a) : (((7 * b) + (b / AW)) % AW == a)) mask[b] = 1'b1;
      h[a] = ^(k & mask);
    end
    return h;
  endfunction

  initial begin
    int distinct1, distinct2, diff;
    bit used1 [4096], used2 [4096];
    distinct1 = 0; distinct2 = 0; diff = 0;
    for (int i = 0; i < 2000; i++) begin
      key = {$urandom, $urandom};
      if (i < 8) key = 64'(i);          // small keys too
      #1;
      checks += 2;
      if (a1 !== ref_h(key, 1)) begin failures++; $display("h1 mismatch key=%h got %h", key, a1); end
      if (a2 !== ref_h(key, 2)) begin failures++; $display("h2 mismatch key=%h got %h", key, a2); end
      if (!used1[a1]) begin used1[a1] = 1; distinct1++; end
      if (!used2[a2]) begin used2[a2] = 1; distinct2++; end
      if (a1 != a2) diff++;
    end
    // 2000 random keys over 4096 rows should touch well over 1000 rows.
    checks += 3;
    if (distinct1 < 1200) begin failures++; $display("h1 spread too small: %0d", distinct1); end
    if (distinct2 < 1200) begin failures++; $display("h2 spread too small: %0d", distinct2); end
    if (diff < 1900) begin failures++; $display("h1 and h2 agree too often: %0d differ", diff); end
    // Text keys: 2000 words of 3 to 8 letters, first letter in the low byte.
    distinct1 = 0; distinct2 = 0;
    foreach (used1[i]) begin used1[i] = 0; used2[i] = 0; end
    for (int i = 0; i < 2000; i++) begin
      int n;
      n = 3 + $urandom_range(5);
      key = '0;
      for (int c = 0; c < n; c++) key[8*c +: 8] = 8'("A" + $urandom_range(25));
      #1;
      checks += 2;
      if (a1 !== ref_h(key, 1)) begin failures++; $display("h1 mismatch key=%h got %h", key, a1); end
      if (a2 !== ref_h(key, 2)) begin failures++; $display("h2 mismatch key=%h got %h", key, a2); end
      if (!used1[a1]) begin used1[a1] = 1; distinct1++; end
      if (!used2[a2]) begin used2[a2] = 1; distinct2++; end
    end
    checks += 2;
    if (distinct1 < 1200) begin failures++; $display("h1 spread on words too small: %0d", distinct1); end
    if (distinct2 < 1200) begin failures++; $display("h2 spread on words too small: %0d", distinct2); end
    $display("rows used by 2000 word keys: T1 %0d, T2 %0d", distinct1, distinct2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
