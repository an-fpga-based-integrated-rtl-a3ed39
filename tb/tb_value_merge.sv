// Testbench for value_merge: accumulation on a hit, fresh row on a miss,
// count saturation at 127.
//
// How: random rows, keys and values; the expected row is built field by
// field from the inputs. Combinational, checked after a #1 settle.
module tb_value_merge;
  import mr_pkg::*;
  int checks = 0, failures = 0;
  kv_row_t old_row, new_row;
  logic hit, sat;
  key_t key;
  val_t value;

  value_merge dut (.old_row, .hit, .key, .value, .new_row, .sat);

  initial begin
    for (int i = 0; i < 500; i++) begin
      bit [31:0] ev; bit [6:0] ec; bit es;
      old_row = {$urandom, $urandom, $urandom, $urandom};
      if (i % 5 == 0) old_row.cnt = 7'd127;
      hit   = $urandom_range(1);
      key   = {$urandom, $urandom};
      value = $urandom;
      #1;
      if (hit) begin
        ev = old_row.value + value;
        es = (old_row.cnt == 7'd127);
        ec = es ? 7'd127 : old_row.cnt + 7'd1;
      end else begin
        ev = value; ec = 7'd1; es = 0;
      end
      checks++;
      if (new_row.key !== key || new_row.valid !== 1'b1 || new_row.value !== ev ||
          new_row.cnt !== ec || sat !== es) begin
        failures++;
        $display("hit=%b old=%h/%0d val=%h -> %h/%0d sat=%b, exp %h/%0d sat=%b",
                 hit, old_row.value, old_row.cnt, value, new_row.value, new_row.cnt, sat, ev, ec, es);
      end
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
