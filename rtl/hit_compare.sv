// Hit comparator of one cuckoo table.
//
// A row read from a table is a hit for the requested key when its valid tag
// bit is set and its stored 64-bit key equals the requested one. One instance
// sits behind each table (Hit1, Hit2). Combinational.
//
// This is exactly the comparator the published design describes (key equal
// and valid bit 1); only the row layout (valid in tag bit 0) is this
// implementation's choice.
module hit_compare
  import mr_pkg::*;
(
  input  kv_row_t row,
  input  key_t    key,
  output logic    hit
);
  assign hit = row.valid && (row.key == key);
endmodule
