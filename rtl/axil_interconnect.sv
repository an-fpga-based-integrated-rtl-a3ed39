// Shared AXI4-Lite bus: N masters onto one slave, round-robin arbitration.
//
// Joins the Map accelerators and the host to the Reduce accelerator's slave
// port. Writes and reads are arbitrated separately. A master that presents
// AW and W together (writes) or AR (reads) is granted in round-robin order
// starting after the last winner; the grant is registered, the winner's
// request is then passed to the slave, and the grant is held until the
// response handshake (B or R) completes. A write therefore occupies the bus
// for at least three clocks. Masters that are not granted see READY low,
// which is how contention stalls them. The published design shows the bus
// only by name; this arbiter is the simplest one that shares it.
module axil_interconnect
  import mr_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req [N],
  output axil_rsp_t m_rsp [N],
  output axil_req_t s_req,
  input  axil_rsp_t s_rsp
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          w_busy, w_sent, r_busy, r_sent;
  logic [IW-1:0] w_own, r_own, w_last, r_last;
  logic [N-1:0]  w_reqv, r_reqv;
  logic [IW-1:0] w_pick, r_pick;
  logic          w_any, r_any;

  // Round-robin choice: the first requester after the last winner.
  function automatic logic [IW:0] rr_pick(logic [N-1:0] reqv, logic [IW-1:0] last);
    logic [IW:0] res;
    int unsigned idx;
    res = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (!res[IW] && reqv[idx]) res = {1'b1, IW'(idx)};
    end
    return res;
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      w_reqv[i] = m_req[i].aw_valid && m_req[i].w_valid;
      r_reqv[i] = m_req[i].ar_valid;
    end
    {w_any, w_pick} = rr_pick(w_reqv, w_last);
    {r_any, r_pick} = rr_pick(r_reqv, r_last);
  end

  always_comb begin
    s_req = AXIL_REQ_IDLE;
    for (int unsigned i = 0; i < N; i++) m_rsp[i] = '0;
    if (w_busy) begin
      s_req.aw_addr  = m_req[w_own].aw_addr;
      s_req.w_data   = m_req[w_own].w_data;
      s_req.aw_valid = !w_sent && m_req[w_own].aw_valid;
      s_req.w_valid  = !w_sent && m_req[w_own].w_valid;
      s_req.b_ready  = w_sent && m_req[w_own].b_ready;
      m_rsp[w_own].aw_ready = !w_sent && s_rsp.aw_ready;
      m_rsp[w_own].w_ready  = !w_sent && s_rsp.w_ready;
      m_rsp[w_own].b_valid  = w_sent && s_rsp.b_valid;
      m_rsp[w_own].b_resp   = s_rsp.b_resp;
    end
    if (r_busy) begin
      s_req.ar_addr  = m_req[r_own].ar_addr;
      s_req.ar_valid = !r_sent && m_req[r_own].ar_valid;
      s_req.r_ready  = r_sent && m_req[r_own].r_ready;
      m_rsp[r_own].ar_ready = !r_sent && s_rsp.ar_ready;
      m_rsp[r_own].r_valid  = r_sent && s_rsp.r_valid;
      m_rsp[r_own].r_data   = s_rsp.r_data;
      m_rsp[r_own].r_resp   = s_rsp.r_resp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy <= 1'b0; w_sent <= 1'b0; w_own <= '0; w_last <= IW'(N - 1);
      r_busy <= 1'b0; r_sent <= 1'b0; r_own <= '0; r_last <= IW'(N - 1);
    end else begin
      if (!w_busy) begin
        if (w_any) begin
          w_busy <= 1'b1; w_own <= w_pick; w_last <= w_pick; w_sent <= 1'b0;
        end
      end else if (!w_sent) begin
        if (s_req.aw_valid && s_rsp.aw_ready) w_sent <= 1'b1;
      end else if (s_rsp.b_valid && s_req.b_ready) begin
        w_busy <= 1'b0;
      end
      if (!r_busy) begin
        if (r_any) begin
          r_busy <= 1'b1; r_own <= r_pick; r_last <= r_pick; r_sent <= 1'b0;
        end
      end else if (!r_sent) begin
        if (s_req.ar_valid && s_rsp.ar_ready) r_sent <= 1'b1;
      end else if (s_rsp.r_valid && s_req.r_ready) begin
        r_busy <= 1'b0;
      end
    end
  end

endmodule
