// Host-side AXI4-Lite tasks shared by the testbenches that talk to the
// Reduce accelerator. The including module provides clk, hreq (axil_req_t,
// driven here) and hrsp (axil_rsp_t). Signals change at the falling edge
// and are sampled there, so every handshake completes at a rising edge.

task automatic axw(input logic [15:0] a, input logic [63:0] d);
  @(negedge clk);
  hreq.aw_valid = 1; hreq.w_valid = 1; hreq.aw_addr = a; hreq.w_data = d;
  #1;
  while (!(hrsp.aw_ready && hrsp.w_ready)) begin @(negedge clk); #1; end
  @(negedge clk);
  hreq.aw_valid = 0; hreq.w_valid = 0; hreq.b_ready = 1;
  #1;
  while (!hrsp.b_valid) begin @(negedge clk); #1; end
  @(negedge clk);
  hreq.b_ready = 0;
endtask

task automatic axr(input logic [15:0] a, output logic [63:0] d);
  @(negedge clk);
  hreq.ar_valid = 1; hreq.ar_addr = a;
  #1;
  while (!hrsp.ar_ready) begin @(negedge clk); #1; end
  @(negedge clk);
  hreq.ar_valid = 0; hreq.r_ready = 1;
  #1;
  while (!hrsp.r_valid) begin @(negedge clk); #1; end
  d = hrsp.r_data;
  @(negedge clk);
  hreq.r_ready = 0;
endtask

task automatic host_emit(input int unsigned slot, input logic [63:0] k, input logic [31:0] v);
  axw(slot_key_addr(slot), k);
  axw(slot_val_addr(slot), 64'(v));
endtask

task automatic wait_not_busy();
  logic [63:0] st;
  do axr(REG_STATUS, st); while (st[ST_BUSY]);
endtask

// Look a key up; returns hit, value (or average) and count.
task automatic host_lookup(input logic [63:0] k, output bit hit, output logic [31:0] v, output int c);
  logic [63:0] st, r;
  axw(REG_LKEY, k);
  axw(REG_CMD, 64'd1);
  do axr(REG_STATUS, st); while (!st[ST_LOOK_DONE]);
  axr(REG_RESULT, r);
  hit = r[40]; v = r[31:0]; c = int'(r[38:32]);
endtask

// Set the mode and clear the tables and the key FIFO.
task automatic host_config(input bit hash_en, input bit avg_en, input bit clear);
  axw(REG_CTRL, {61'd0, clear, avg_en, hash_en});
  if (clear) wait_not_busy();
endtask
