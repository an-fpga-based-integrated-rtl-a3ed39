// Emit interface of a Map accelerator: emit(key, value) over AXI4-Lite.
//
// The hardware form of the Map side's "emit intermediate" call. A pair is
// taken when emit_valid and emit_ready are both high; it is then written to
// the Reduce accelerator as two single-beat writes to this master's own emit
// slot, KEY first, VALUE second (the VALUE write queues the pair). emit_ready
// is high only when no pair is in flight, so a Map accelerator that emits
// faster than the bus and the Reduce accelerator accept simply waits.
// Timing: at least 2 x (bus arbitration + transfer + response) clocks per
// pair. Only the write channel is used. The two-write protocol and the slot
// addressing are this design's own.
module axil_emit_master
  import mr_pkg::*;
#(
  parameter int unsigned SLOT = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      emit_valid,
  output logic      emit_ready,
  input  key_t      emit_key,
  input  val_t      emit_value,
  output axil_req_t axi_req,
  input  axil_rsp_t axi_rsp
);

  typedef enum logic [2:0] {E_IDLE, E_KEY, E_KEY_B, E_VAL, E_VAL_B} estate_t;
  estate_t state;
  key_t    key_q;
  val_t    val_q;

  assign emit_ready = (state == E_IDLE);

  always_comb begin
    axi_req = AXIL_REQ_IDLE;
    unique case (state)
      E_KEY: begin
        axi_req.aw_valid = 1'b1; axi_req.w_valid = 1'b1;
        axi_req.aw_addr  = slot_key_addr(SLOT);
        axi_req.w_data   = key_q;
      end
      E_VAL: begin
        axi_req.aw_valid = 1'b1; axi_req.w_valid = 1'b1;
        axi_req.aw_addr  = slot_val_addr(SLOT);
        axi_req.w_data   = AXI_DW'(val_q);
      end
      E_KEY_B, E_VAL_B: axi_req.b_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE; key_q <= '0; val_q <= '0;
    end else begin
      unique case (state)
        E_IDLE:  if (emit_valid) begin key_q <= emit_key; val_q <= emit_value; state <= E_KEY; end
        E_KEY:   if (axi_rsp.aw_ready && axi_rsp.w_ready) state <= E_KEY_B;
        E_KEY_B: if (axi_rsp.b_valid) state <= E_VAL;
        E_VAL:   if (axi_rsp.aw_ready && axi_rsp.w_ready) state <= E_VAL_B;
        E_VAL_B: if (axi_rsp.b_valid) state <= E_IDLE;
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
