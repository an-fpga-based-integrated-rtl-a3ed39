// Shared types and constants of the MapReduce accelerator platform.
//
// A Map accelerator emits (key, value) pairs; one Reduce accelerator merges
// all values of a key in a scratchpad of two cuckoo-hash block RAMs. Every
// scratchpad row holds a 64-bit key, 8 tag bits and a 32-bit value (104 bits),
// as the published design specifies. Tag bit 0 marks the row valid; bits 7:1
// are this implementation's own use of the spare tag bits: a saturating count
// of the values merged into the row, which the averaging mode divides by.
//
// The bus between the Map accelerators, the host and the Reduce accelerator is
// AXI4-Lite with a 64-bit data path (a key fits in one beat). Its channels are
// carried as two packed structs, one per direction. The register map of the
// Reduce accelerator is defined here as well.
package mr_pkg;

  localparam int unsigned KEY_W  = 64;
  localparam int unsigned VAL_W  = 32;
  localparam int unsigned TAG_W  = 8;
  localparam int unsigned CNT_W  = TAG_W - 1;   // count kept in tag bits 7:1
  localparam int unsigned AXI_AW = 16;          // byte address width of the bus
  localparam int unsigned AXI_DW = 64;          // data width of the bus

  typedef logic [KEY_W-1:0] key_t;
  typedef logic [VAL_W-1:0] val_t;

  // One scratchpad row: key, tags (count + valid), value = 104 bits.
  typedef struct packed {
    key_t             key;
    logic [CNT_W-1:0] cnt;
    logic             valid;
    val_t             value;
  } kv_row_t;

  // A pending emit from a Map accelerator.
  typedef struct packed {
    key_t key;
    val_t value;
  } emit_t;

  // AXI4-Lite, master to slave.
  typedef struct packed {
    logic              aw_valid;
    logic [AXI_AW-1:0] aw_addr;
    logic              w_valid;
    logic [AXI_DW-1:0] w_data;
    logic              b_ready;
    logic              ar_valid;
    logic [AXI_AW-1:0] ar_addr;
    logic              r_ready;
  } axil_req_t;

  // AXI4-Lite, slave to master.
  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic              b_valid;
    logic [1:0]        b_resp;
    logic              ar_ready;
    logic              r_valid;
    logic [AXI_DW-1:0] r_data;
    logic [1:0]        r_resp;
  } axil_rsp_t;

  localparam axil_req_t AXIL_REQ_IDLE = '0;

  // Register map of the Reduce accelerator (byte addresses, 8-byte registers).
  localparam logic [AXI_AW-1:0] REG_CTRL      = 16'h0000; // W: [0] hash_en [1] avg_en [2] clear (self-clearing); R: config
  localparam logic [AXI_AW-1:0] REG_STATUS    = 16'h0008; // R: see reduce_axi_if
  localparam logic [AXI_AW-1:0] REG_LKEY      = 16'h0010; // W: key to look up
  localparam logic [AXI_AW-1:0] REG_CMD       = 16'h0018; // W: [0] start lookup of REG_LKEY
  localparam logic [AXI_AW-1:0] REG_RESULT    = 16'h0020; // R: [31:0] value or average, [38:32] count, [40] hit
  localparam logic [AXI_AW-1:0] REG_FIFO_CNT  = 16'h0028; // R: number of keys in the unique-key FIFO
  localparam logic [AXI_AW-1:0] REG_FIFO_POP  = 16'h0030; // R: head key of the FIFO; the read removes it
  localparam logic [AXI_AW-1:0] REG_FAIL_KEY  = 16'h0038; // R: key left without a slot by a failed insertion
  localparam logic [AXI_AW-1:0] REG_FAIL_VAL  = 16'h0040; // R: [31:0] its value, [38:32] its count
  localparam logic [AXI_AW-1:0] REG_STATS     = 16'h0048; // R: [31:0] emits merged, [63:32] cuckoo displacements
  localparam logic [AXI_AW-1:0] REG_SLOT_BASE = 16'h0100; // per-master emit slots, 16 bytes each
  // Slot s: KEY at REG_SLOT_BASE + 16*s, VALUE at +8. Writing VALUE emits the pair.

  // STATUS bits.
  localparam int unsigned ST_BUSY      = 0;  // queue not empty, FSM active or clearing
  localparam int unsigned ST_LOOK_DONE = 1;  // last lookup finished
  localparam int unsigned ST_FAIL      = 2;  // sticky: an insertion gave up
  localparam int unsigned ST_CNT_SAT   = 3;  // sticky: a row count saturated
  localparam int unsigned ST_RANGE     = 4;  // sticky: direct-mode key outside the tables
  localparam int unsigned ST_FIFO_OVF  = 5;  // sticky: unique-key FIFO was full

  function automatic logic [AXI_AW-1:0] slot_key_addr(int unsigned s);
    return REG_SLOT_BASE + AXI_AW'(16 * s);
  endfunction

  function automatic logic [AXI_AW-1:0] slot_val_addr(int unsigned s);
    return REG_SLOT_BASE + AXI_AW'(16 * s + 8);
  endfunction

endpackage
