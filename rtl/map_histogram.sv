// Histogram Map accelerator.
//
// Counts how often each intensity occurs in each colour channel of an RGB
// image. Its chunk of the image sits in a private block RAM bank, one pixel
// per 32-bit word {8'h00, R, G, B}, loaded through the load port. After
// start it reads pixels 0 .. len-1 and for each emits three pairs, value 1:
//   key = B, key = 256 + G, key = 512 + R.
// The keys are small integers, so the Reduce accelerator is used in direct
// mode (hashing off), where the key is the table row: a constant offset
// per colour keeps the three channels apart, as the published design
// suggests. The offset order blue, green, red is this design's choice.
// Timing: 2 clocks per pixel read, then one emit per channel; the emit
// interface limits the rate. done rises once the last pair has been written
// to the Reduce accelerator (the emit interface is idle again) and stays
// high until the next start.
module map_histogram
  import mr_pkg::*;
#(
  parameter int unsigned SLOT       = 0,
  parameter int unsigned BANK_WORDS = 38400,
  localparam int unsigned BW        = $clog2(BANK_WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  // bank load port
  input  logic        load_we,
  input  logic [BW-1:0] load_addr,
  input  logic [31:0] load_data,
  // control
  input  logic        start,
  input  logic [BW:0] len,          // pixels in the bank
  output logic        done,
  output logic        stall,        // a pair waits for the emit interface
  // bus
  output axil_req_t   axi_req,
  input  axil_rsp_t   axi_rsp
);

  typedef enum logic [1:0] {H_IDLE, H_READ, H_EMIT, H_DRAIN} hstate_t;
  hstate_t state;

  logic [BW:0]   idx, len_q;
  logic [1:0]    ch;
  logic          re, rd_valid;
  logic [31:0]   rdata, pix;
  logic          e_valid, e_ready;
  key_t          e_key;

  bram_sdp #(.WIDTH(32), .DEPTH(BANK_WORDS)) u_bank (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_data),
    .re(re), .raddr(idx[BW-1:0]), .rdata(rdata)
  );

  assign re      = (state == H_READ) && !rd_valid;
  assign pix     = rdata;
  assign e_valid = (state == H_EMIT);
  assign stall   = e_valid && !e_ready;

  always_comb begin
    unique case (ch)
      2'd0:    e_key = KEY_W'(pix[7:0]);
      2'd1:    e_key = KEY_W'(10'd256 + {2'b0, pix[15:8]});
      default: e_key = KEY_W'(10'd512 + {2'b0, pix[23:16]});
    endcase
  end

  axil_emit_master #(.SLOT(SLOT)) u_emit (
    .clk, .rst_n, .emit_valid(e_valid), .emit_ready(e_ready),
    .emit_key(e_key), .emit_value(VAL_W'(1)), .axi_req, .axi_rsp
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= H_IDLE; idx <= '0; len_q <= '0; ch <= '0; rd_valid <= 1'b0; done <= 1'b0;
    end else begin
      rd_valid <= re;
      unique case (state)
        H_IDLE: if (start) begin
          idx   <= '0;
          len_q <= len;
          done  <= (len == '0);
          state <= (len == '0) ? H_IDLE : H_READ;
        end
        H_READ: if (rd_valid) begin
          ch    <= '0;
          state <= H_EMIT;
        end
        H_EMIT: if (e_ready) begin
          if (ch == 2'd2) begin
            idx <= idx + 1'b1;
            if (idx + 1'b1 == len_q) begin
              state <= H_DRAIN;
            end else begin
              state <= H_READ;
            end
          end else begin
            ch <= ch + 1'b1;
          end
        end
        H_DRAIN: if (e_ready) begin
          // the last pair has been written to the Reduce accelerator
          done  <= 1'b1;
          state <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
    end
  end

endmodule
