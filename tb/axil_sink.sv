// Testbench helper: an AXI4-Lite slave that plays the Reduce accelerator's
// emit slots. It accepts writes after a random delay, keeps one KEY register
// per slot and, on a write to a slot's VALUE register, reports the pair on
// got/got_slot/got_key/got_val for one clock. B responses also come after a
// random delay. Reads return the address, for bus tests.
module axil_sink
  import mr_pkg::*;
#(
  parameter int unsigned NSLOT = 64,
  parameter int unsigned STALL_PCT = 50
) (
  input  logic        clk,
  input  axil_req_t   req,
  output axil_rsp_t   rsp,
  output logic        got,
  output int unsigned got_slot,
  output logic [63:0] got_key,
  output logic [31:0] got_val
);
  logic [63:0] keyreg [NSLOT];
  bit b_pend, r_pend;

  initial begin
    rsp = '0; got = 0; got_slot = 0; got_key = '0; got_val = '0;
    b_pend = 0; r_pend = 0;
    foreach (keyreg[i]) keyreg[i] = '0;
  end

  // Everything is updated with nonblocking assignments at the rising edge,
  // from the values before the edge, like a clocked slave.
  always @(posedge clk) begin
    bit aw_acc, ar_acc, bp, rp;
    int unsigned s;
    aw_acc = rsp.aw_ready && req.aw_valid && req.w_valid;
    ar_acc = rsp.ar_ready && req.ar_valid;
    got <= 0;
    if (aw_acc) begin
      s = (int'(req.aw_addr) - int'(REG_SLOT_BASE)) / 16;
      if (req.aw_addr >= REG_SLOT_BASE && s < NSLOT) begin
        if (!req.aw_addr[3]) keyreg[s] <= req.w_data;
        else begin
          got <= 1; got_slot <= s; got_key <= keyreg[s]; got_val <= req.w_data[31:0];
        end
      end
    end
    bp = (b_pend || aw_acc) && !(rsp.b_valid && req.b_ready);
    rp = (r_pend || ar_acc) && !(rsp.r_valid && req.r_ready);
    b_pend <= bp;
    r_pend <= rp;
    rsp.b_valid  <= (rsp.b_valid && !req.b_ready) || (bp && $urandom_range(99) >= STALL_PCT);
    rsp.r_valid  <= (rsp.r_valid && !req.r_ready) || (rp && $urandom_range(99) >= STALL_PCT);
    if (ar_acc) rsp.r_data <= 64'(req.ar_addr);
    aw_acc = !bp && $urandom_range(99) >= STALL_PCT;
    rsp.aw_ready <= aw_acc;
    rsp.w_ready  <= aw_acc;
    rsp.ar_ready <= !rp && $urandom_range(99) >= STALL_PCT;
  end
endmodule
