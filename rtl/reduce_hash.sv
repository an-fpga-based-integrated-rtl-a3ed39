// Hash unit of the Reduce accelerator (Hash1 or Hash2).
//
// Maps a 64-bit key to a table address with XOR logic only, as the design
// calls for "simple XOR functions", then truncates the result to the ADDR_W
// address bits (the "trunc." stage in front of each table). The two variants
// differ so that two keys that collide in one table usually do not collide
// in the other:
//   VARIANT 1: the key is cut into ADDR_W-bit pieces, which are XORed
//              together (key bit b lands on address bit b mod ADDR_W).
//   VARIANT 2: key bit b lands on address bit (MUL*b + b/ADDR_W) mod ADDR_W,
//              with MUL = 7 (5 when ADDR_W is a multiple of 7), so every
//              piece is scattered with a different stride and offset.
// Each address bit is thus the XOR of a fixed set of key bits. The choice
// matters for text keys: ASCII letters vary only in their low five bits, and
// folds on byte or 16-bit boundaries leave address bits nearly constant or
// make the two hashes collide together, which shows up as failed cuckoo
// insertions at low table load.
// The exact XOR network is this implementation's choice; the published design
// names only its kind. Purely combinational, no latency.
module reduce_hash
  import mr_pkg::*;
#(
  parameter int unsigned ADDR_W  = 12,
  parameter int unsigned VARIANT = 1
) (
  input  key_t              key,
  output logic [ADDR_W-1:0] addr
);

  localparam int unsigned NPIECE = (KEY_W + ADDR_W - 1) / ADDR_W;
  localparam int unsigned MUL    = (ADDR_W % 7 == 0) ? 5 : 7;

  logic [NPIECE*ADDR_W-1:0] key_ext;
  logic [ADDR_W-1:0]        pieces, scattered;

  always_comb begin
    key_ext = (NPIECE*ADDR_W)'(key);
    pieces  = '0;
    for (int unsigned i = 0; i < NPIECE; i++) pieces ^= key_ext[i*ADDR_W +: ADDR_W];
    scattered = '0;
    for (int unsigned b = 0; b < KEY_W; b++)
      scattered[(MUL * b + b / ADDR_W) % ADDR_W] ^= key[b];
    addr = (VARIANT == 1) ? pieces : scattered;
  end

  initial assert (ADDR_W >= 2 && ADDR_W <= KEY_W) else $error("reduce_hash: ADDR_W out of range");

endmodule
