// Simple dual-port block RAM: one write port, one read port, one clock.
//
// Used for the two cuckoo tables T1/T2 of the Reduce accelerator (104-bit
// rows), for the unique-key FIFO storage and for the private input bank of
// every Map accelerator. The read is synchronous: rdata shows mem[raddr] one
// clock after re is high, and holds otherwise. A read of the address written
// in the same cycle returns the old contents (read-first). The contents are
// not reset; the users clear what they read.
//
// The published design asks for block RAMs holding key, tags and value; the
// port arrangement and read-first behaviour are this implementation's
// choices, written so that FPGA tools infer a block RAM.
module bram_sdp #(
  parameter int unsigned WIDTH = 104,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
