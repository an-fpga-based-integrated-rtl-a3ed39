// Word Count Map accelerator.
//
// Finds the words of its chunk of a text and emits each one with value 1.
// The chunk sits in a private block RAM bank, four characters per 32-bit
// word, the first character in bits 7:0. After start it scans bytes
// 0 .. len-1, one per clock. Letters (folded to upper case) and the
// apostrophe build a word; any other byte, and the end of the chunk, ends it.
// A word of 1 to 8 characters is emitted with the key holding its characters,
// the first in bits 7:0 and zero bytes above the last. Longer words do not fit
// the 64-bit keys of the Reduce accelerator; they are counted in long_words
// and left to software, the split the published design describes for keys
// of 9 bytes and more. The character classes and key packing are this
// design's choices. The host must cut the text into chunks at word breaks.
// Timing: one byte per clock plus 2 clocks per bank word read; the scan waits
// while an emitted word is not yet taken by the emit interface. done rises
// once the last word has been written to the Reduce accelerator (the emit
// interface is idle again) and stays high until the next start.
module map_wordcount
  import mr_pkg::*;
#(
  parameter int unsigned SLOT       = 0,
  parameter int unsigned BANK_WORDS = 768,
  localparam int unsigned BW        = $clog2(BANK_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // bank load port
  input  logic          load_we,
  input  logic [BW-1:0] load_addr,
  input  logic [31:0]   load_data,
  // control
  input  logic          start,
  input  logic [BW+2:0] len,          // bytes in the bank
  output logic          done,
  output logic          stall,        // a word waits for the emit interface
  output logic [31:0]   long_words,   // words of 9 or more characters seen
  // bus
  output axil_req_t     axi_req,
  input  axil_rsp_t     axi_rsp
);

  typedef enum logic [2:0] {W_IDLE, W_READ, W_SCAN, W_EMIT, W_DONE} wstate_t;
  wstate_t state;

  logic [BW+2:0] pos, len_q;
  logic          re, rd_valid;
  logic [31:0]   rdata, word_q;
  logic [7:0]    c, cu;
  logic          is_wc;
  key_t          key_acc, e_key;
  logic [4:0]    wlen;          // characters so far, saturates at 9
  logic          e_ready, e_valid, last, fin;

  bram_sdp #(.WIDTH(32), .DEPTH(BANK_WORDS)) u_bank (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_data),
    .re(re), .raddr(pos[BW+1:2]), .rdata(rdata)
  );

  assign re = (state == W_READ) && !rd_valid;

  // Current character and its class.
  always_comb begin
    c = word_q[8*pos[1:0] +: 8];
    cu = (c >= "a" && c <= "z") ? c - 8'd32 : c;
    is_wc = (cu >= "A" && cu <= "Z") || (cu == 8'h27);
  end

  assign last    = (pos + 1'b1 == len_q);
  assign e_valid = (state == W_EMIT);
  assign stall   = e_valid && !e_ready;

  axil_emit_master #(.SLOT(SLOT)) u_emit (
    .clk, .rst_n, .emit_valid(e_valid), .emit_ready(e_ready),
    .emit_key(e_key), .emit_value(VAL_W'(1)), .axi_req, .axi_rsp
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= W_IDLE; pos <= '0; len_q <= '0; rd_valid <= 1'b0; word_q <= '0;
      key_acc <= '0; e_key <= '0; wlen <= '0; done <= 1'b0; long_words <= '0; fin <= 1'b0;
    end else begin
      rd_valid <= re;
      unique case (state)
        W_IDLE: if (start) begin
          pos <= '0; len_q <= len; key_acc <= '0; wlen <= '0; long_words <= '0; fin <= 1'b0;
          done  <= (len == '0);
          state <= (len == '0) ? W_IDLE : W_READ;
        end
        W_READ: if (rd_valid) begin
          word_q <= rdata;
          state  <= W_SCAN;
        end
        W_SCAN: begin
          // A word ends at a separator, or at the last byte of the chunk.
          if (is_wc) begin
            if (wlen < 5'd8) key_acc[8*wlen[2:0] +: 8] <= cu;
            if (wlen < 5'd9) wlen <= wlen + 1'b1;
          end
          if ((!is_wc || last) && (wlen != 0 || is_wc)) begin
            // Word complete: emit it if it fits in a key.
            if (wlen + 5'(is_wc) <= 5'd8) begin
              e_key <= key_acc;
              if (is_wc) e_key[8*wlen[2:0] +: 8] <= cu;
              state <= W_EMIT;
            end else begin
              long_words <= long_words + 1'b1;
              state <= last ? W_DONE : (pos[1:0] == 2'd3 ? W_READ : W_SCAN);
            end
            key_acc <= '0;
            wlen    <= '0;
          end else begin
            state <= last ? W_DONE : (pos[1:0] == 2'd3 ? W_READ : W_SCAN);
          end
          if (!last) pos <= pos + 1'b1;
          fin <= last;
        end
        W_EMIT: if (e_ready) begin
          // Unless the chunk is finished, pos already points at the next byte.
          state <= fin ? W_DONE : (pos[1:0] == 2'd0 ? W_READ : W_SCAN);
        end
        W_DONE: if (e_ready) begin
          // the last word has been written to the Reduce accelerator
          done  <= 1'b1;
          state <= W_IDLE;
        end
        default: state <= W_IDLE;
      endcase
    end
  end

endmodule
