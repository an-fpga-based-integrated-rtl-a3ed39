// Testbench for hit_compare: equal / unequal keys, valid set / clear.
//
// How: random rows and keys, with the key forced equal half the time and
// the valid bit random; the expected hit is worked out from the fields.
// Purely combinational, checked after a #1 settle.
module tb_hit_compare;
  import mr_pkg::*;
  int checks = 0, failures = 0;
  kv_row_t row;
  key_t key;
  logic hit;

  hit_compare dut (.row, .key, .hit);

  initial begin
    for (int i = 0; i < 400; i++) begin
      bit same, v;
      row   = {$urandom, $urandom, $urandom, $urandom};
      v     = $urandom_range(1);
      same  = $urandom_range(1);
      row.valid = v;
      key = same ? row.key : row.key ^ (64'h1 << $urandom_range(63));
      #1;
      checks++;
      if (hit !== (v && same)) begin failures++; $display("row key %h key %h valid %b hit %b", row.key, key, v, hit); end
    end
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
