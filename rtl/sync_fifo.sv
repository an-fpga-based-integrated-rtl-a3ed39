// Synchronous FIFO on a block RAM with a registered head.
//
// Serves as the unique-key FIFO of the Reduce accelerator (the hardware
// equivalent of the key list kept by software) and as the queue of pending
// emits. push writes din when the FIFO is not full; pop removes the head when
// it is not empty. The head is always presented on dout while empty is low
// (first-word fall-through), so a reader sees a new head one to two clocks
// after a push into an empty FIFO. flush empties it in one clock. count is
// the number of stored words, including the one on dout.
//
// How: words live in a bram_sdp; the head register is refilled from it by a
// read issued as soon as the head is free or popped, so a stream of pops
// runs at one word per clock. The published design names a key FIFO and says
// what enters it; its depth, block-RAM storage and fall-through head are
// this implementation's choices. Pushing when full or popping when empty is
// ignored (an assertion flags the latter).
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic [AW:0]      count
);

  // Storage holds the words behind the head register.
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      mcount;        // words in memory (not yet in the head)
  logic             head_valid;
  logic             rd_pending;    // a memory read is landing this clock
  logic [WIDTH-1:0] mem_q, head_q;
  logic             do_push, do_pop, mem_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = !head_valid;
  assign dout    = head_q;
  assign do_push = push && !full;
  assign do_pop  = pop && head_valid;
  // Fetch the next word when the head is (or becomes) free and none is in flight.
  assign mem_rd  = (mcount != 0) && !rd_pending && (!head_valid || do_pop);

  bram_sdp #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_mem (
    .clk, .we(do_push), .waddr(wptr), .wdata(din),
    .re(mem_rd), .raddr(rptr), .rdata(mem_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; mcount <= '0; count <= '0;
      head_valid <= 1'b0; rd_pending <= 1'b0; head_q <= '0;
    end else if (flush) begin
      wptr <= '0; rptr <= '0; mcount <= '0; count <= '0;
      head_valid <= 1'b0; rd_pending <= 1'b0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (mem_rd)  rptr <= rptr + 1'b1;
      mcount <= mcount + (AW+1)'(do_push) - (AW+1)'(mem_rd);
      count  <= count  + (AW+1)'(do_push) - (AW+1)'(do_pop);
      rd_pending <= mem_rd;
      if (rd_pending) begin
        head_q     <= mem_q;
        head_valid <= 1'b1;
      end else if (do_pop) begin
        head_valid <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop while empty");

endmodule
