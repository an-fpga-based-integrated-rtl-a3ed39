// Testbench for axil_interconnect: four emit masters compete for one slave
// with random delays; every pair of every master must arrive intact, the
// masters must each be served, and a host-style read through master 3 must
// return its data. Round-robin fairness: with all masters busy, no master
// waits for more than N-1 other grants.
module tb_axil_interconnect;
  import mr_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  axil_req_t m_req [N];
  axil_rsp_t m_rsp [N];
  axil_req_t s_req;
  axil_rsp_t s_rsp;
  logic ev [N-1];
  logic rdy [N-1];
  key_t ek [N-1];
  val_t evl [N-1];
  logic got; int unsigned got_slot; logic [63:0] got_key; logic [31:0] got_val;
  emit_t sent [N-1][$];
  int n_got [N-1];
  int since [N-1];

  axil_interconnect #(.N(N)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);
  axil_sink #(.NSLOT(8), .STALL_PCT(20)) sink (.clk, .req(s_req), .rsp(s_rsp), .got, .got_slot, .got_key, .got_val);

  for (genvar i = 0; i < N - 1; i++) begin : g_m
    axil_emit_master #(.SLOT(i)) u_m (.clk, .rst_n, .emit_valid(ev[i]), .emit_ready(rdy[i]),
      .emit_key(ek[i]), .emit_value(evl[i]), .axi_req(m_req[i]), .axi_rsp(m_rsp[i]));
  end

  always #5 clk = ~clk;

  // Host master 3 signals
  axil_req_t hreq;
  axil_rsp_t hrsp;
  assign m_req[N-1] = hreq;
  assign hrsp = m_rsp[N-1];
  `include "axil_host_tasks.svh"

  always @(negedge clk) if (got) begin
    emit_t e;
    checks++;
    if (got_slot >= N - 1 || sent[got_slot].size() == 0) begin failures++; $display("stray pair on slot %0d", got_slot); end
    else begin
      e = sent[got_slot].pop_front();
      n_got[got_slot]++;
      if (got_key !== e.key || got_val !== e.value) begin failures++; $display("slot %0d got %h/%h exp %h/%h", got_slot, got_key, got_val, e.key, e.value); end
      // fairness: count pairs delivered to others since this slot's last one
      for (int j = 0; j < N - 1; j++) if (j != int'(got_slot)) since[j]++;
      since[got_slot] = 0;
    end
  end

  for (genvar i = 0; i < N - 1; i++) begin : g_drv
    initial begin
      ev[i] = 0; ek[i] = '0; evl[i] = '0;
      wait (rst_n);
      for (int k = 0; k < 100; k++) begin
        @(negedge clk);
        ev[i] = 1; ek[i] = {$urandom, $urandom}; evl[i] = $urandom;
        #1;
        while (!rdy[i]) begin @(negedge clk); #1; end
        sent[i].push_back('{key: ek[i], value: evl[i]});
        @(negedge clk);
        ev[i] = 0;
      end
    end
  end

  initial begin
    logic [63:0] r;
    int maxwait;
    hreq = '0;
    foreach (n_got[i]) begin n_got[i] = 0; since[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    maxwait = 0;
    repeat (50) begin
      axr(16'h0123, r);
      checks++;
      if (r != 64'h0123) begin failures++; $display("read returned %h", r); end
      foreach (since[j]) if (since[j] > maxwait) maxwait = since[j];
    end
    repeat (6000) @(negedge clk);
    foreach (n_got[i]) begin
      checks++;
      if (n_got[i] != 100) begin failures++; $display("master %0d delivered %0d pairs", i, n_got[i]); end
    end
    checks++;
    if (maxwait > 2 * (N - 1)) begin failures++; $display("a master waited for %0d other pairs", maxwait); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
