// Testbench for axil_emit_master: random pairs with random emit_valid gaps
// against a slave with random delays; every pair must arrive once, in order,
// on the master's own slot, and emit_ready must be low while a pair is out.
//
// How: axil_sink plays the slave; the testbench keeps a queue of sent
// pairs and pops it as pairs arrive. Timing checked: emit_ready stays low
// while a pair is still on its way (KEY and VALUE writes, two B responses).
module tb_axil_emit_master;
  import mr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, emit_valid = 0, emit_ready;
  key_t emit_key = '0;
  val_t emit_value = '0;
  axil_req_t axi_req;
  axil_rsp_t axi_rsp;
  logic got; int unsigned got_slot; logic [63:0] got_key; logic [31:0] got_val;
  emit_t sent [$];
  int n_got = 0;

  axil_emit_master #(.SLOT(5)) dut (.*);
  axil_sink #(.NSLOT(8)) sink (.clk, .req(axi_req), .rsp(axi_rsp), .got, .got_slot, .got_key, .got_val);

  always #5 clk = ~clk;

  always @(negedge clk) if (got) begin
    emit_t e;
    n_got++;
    checks++;
    if (sent.size() == 0) begin failures++; $display("unexpected pair"); end
    else begin
      e = sent.pop_front();
      if (got_slot != 5 || got_key !== e.key || got_val !== e.value) begin
        failures++; $display("slot %0d %h/%h exp %h/%h", got_slot, got_key, got_val, e.key, e.value);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      while ($urandom_range(2) == 0) @(negedge clk);
      emit_valid = 1; emit_key = {$urandom, $urandom}; emit_value = $urandom;
      #1;
      while (!emit_ready) begin @(negedge clk); #1; end
      sent.push_back('{key: emit_key, value: emit_value});
      @(negedge clk);
      emit_valid = 0;
      checks++;
      if (emit_ready) begin failures++; $display("ready while a pair is in flight"); end
    end
    repeat (100) @(negedge clk);
    checks++;
    if (n_got != 200) begin failures++; $display("%0d pairs arrived", n_got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
