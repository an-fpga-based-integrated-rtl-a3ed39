// Accumulator of the Reduce accelerator (the "+" behind each table).
//
// Builds the row written back for an emitted (key, value):
//   - hit:  stored value + emitted value, count + 1 (the count saturates at
//           its 7-bit maximum and sat is raised),
//   - miss: a fresh valid row with the emitted key and value and count 1.
// The sum wraps modulo 2^32. Counting happens in both processing modes; the
// averaging mode divides by the count when a key is read. Combinational.
//
// The published design shows an adder per table; keeping a merge count in
// the tag byte (bits 7:1, next to the valid bit 0) is this implementation's
// choice, needed for the averaging configurations.
module value_merge
  import mr_pkg::*;
(
  input  kv_row_t old_row,
  input  logic    hit,
  input  key_t    key,
  input  val_t    value,
  output kv_row_t new_row,
  output logic    sat
);
  always_comb begin
    sat = 1'b0;
    new_row.key   = key;
    new_row.valid = 1'b1;
    if (hit) begin
      new_row.value = old_row.value + value;
      if (&old_row.cnt) begin
        new_row.cnt = old_row.cnt;
        sat         = 1'b1;
      end else begin
        new_row.cnt = old_row.cnt + 1'b1;
      end
    end else begin
      new_row.value = value;
      new_row.cnt   = CNT_W'(1);
    end
  end
endmodule
