// AXI4-Lite slave and register file of the Reduce accelerator.
//
// Every bus master (Map accelerator or host) owns an emit slot of two 8-byte
// registers, KEY and VALUE; writing VALUE queues the pair (slot KEY, VALUE)
// for the control unit. Because each master has its own KEY register, the
// two writes of masters sharing the bus may interleave freely. When the emit
// queue is full the write is held (AWREADY/WREADY low) until a place frees:
// this back-pressure reaches the Map accelerators through the bus.
// Further registers (addresses in mr_pkg) set the mode (hashing, averaging),
// start a table clear, start a lookup and return its result, pop the unique
// keys one per read, return the entry left over by a failed insertion, and
// report status and event counts.
//
// Timing: a write is taken in the clock when both AW and W are valid and the
// response is offered the next clock; a read answers one clock after AR.
// Both responses are always OKAY. Only one write and one read are open at a
// time. The per-master key/value slots follow the register list of the
// published block diagram; the address map and the status bits are this
// design's own.
module reduce_axi_if
  import mr_pkg::*;
#(
  parameter int unsigned NUM_SLOTS = 8,
  parameter int unsigned KF_CW     = 14     // width of the key FIFO count
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        axi_req,
  output axil_rsp_t        axi_rsp,
  // configuration and commands
  output logic             cfg_hash_en,
  output logic             cfg_avg_en,
  output logic             clear_req,
  output logic             look_req,
  output key_t             look_key,
  // emit queue
  output logic             q_push,
  output emit_t            q_data,
  input  logic             q_full,
  output logic             emit_stall,     // an emit write is being held
  // control unit results and events
  input  logic             busy,
  input  logic             look_done,
  input  logic             res_hit,
  input  val_t             res_value,
  input  logic [CNT_W-1:0] res_cnt,
  input  logic             fail,
  input  kv_row_t          fail_row,
  input  logic             sat,
  input  logic             range_err,
  input  logic             kf_ovf,
  input  logic [31:0]      n_emits,
  input  logic [31:0]      n_kicks,
  // unique-key FIFO
  input  key_t             kf_head,
  input  logic             kf_empty,
  input  logic [KF_CW-1:0] kf_count,
  output logic             kf_pop
);

  key_t slot_key [NUM_SLOTS];
  logic look_done_q, st_fail, st_sat, st_range, st_ovf;
  kv_row_t fail_q;
  logic              b_valid_q, r_valid_q, rd_go;
  logic [AXI_DW-1:0] r_data_q;

  // ---- write channel ----
  logic [AXI_AW-1:0] waddr;
  logic              w_is_slot, w_is_val, wr_go;
  int unsigned       w_slot;

  assign waddr     = axi_req.aw_addr;
  assign w_is_slot = (waddr >= REG_SLOT_BASE) &&
                     (waddr <  REG_SLOT_BASE + AXI_AW'(16 * NUM_SLOTS));
  logic [AXI_AW-1:0] woff;
  assign woff      = waddr - REG_SLOT_BASE;
  assign w_slot    = int'(woff[AXI_AW-1:4]);
  assign w_is_val  = w_is_slot && waddr[3];

  always_comb begin
    wr_go      = axi_req.aw_valid && axi_req.w_valid && !b_valid_q;
    emit_stall = wr_go && w_is_val && q_full;
    if (emit_stall) wr_go = 1'b0;
  end

  always_comb begin
    axi_rsp          = '0;
    axi_rsp.aw_ready = wr_go;
    axi_rsp.w_ready  = wr_go;
    axi_rsp.b_valid  = b_valid_q;
    axi_rsp.ar_ready = rd_go;
    axi_rsp.r_valid  = r_valid_q;
    axi_rsp.r_data   = r_data_q;
  end

  assign q_push       = wr_go && w_is_val;
  assign q_data.key   = slot_key[w_slot < NUM_SLOTS ? w_slot : 0];
  assign q_data.value = axi_req.w_data[VAL_W-1:0];
  assign clear_req    = wr_go && waddr == REG_CTRL && axi_req.w_data[2];
  assign look_req     = wr_go && waddr == REG_CMD && axi_req.w_data[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid_q <= 1'b0;
      cfg_hash_en <= 1'b1; cfg_avg_en <= 1'b0; look_key <= '0;
      for (int i = 0; i < NUM_SLOTS; i++) slot_key[i] <= '0;
    end else begin
      if (wr_go) b_valid_q <= 1'b1;
      else if (axi_req.b_ready) b_valid_q <= 1'b0;
      if (wr_go) begin
        if (w_is_slot && !waddr[3]) slot_key[w_slot] <= axi_req.w_data;
        if (waddr == REG_LKEY) look_key <= axi_req.w_data;
        if (waddr == REG_CTRL) begin
          cfg_hash_en <= axi_req.w_data[0];
          cfg_avg_en  <= axi_req.w_data[1];
        end
      end
    end
  end

  // ---- status ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      look_done_q <= 1'b0; st_fail <= 1'b0; st_sat <= 1'b0; st_range <= 1'b0; st_ovf <= 1'b0;
      fail_q <= '0;
    end else begin
      if (look_req) look_done_q <= 1'b0;
      else if (look_done) look_done_q <= 1'b1;
      if (clear_req) begin
        st_fail <= 1'b0; st_sat <= 1'b0; st_range <= 1'b0; st_ovf <= 1'b0;
      end else begin
        if (fail) begin st_fail <= 1'b1; fail_q <= fail_row; end
        if (sat) st_sat <= 1'b1;
        if (range_err) st_range <= 1'b1;
        if (kf_ovf) st_ovf <= 1'b1;
      end
    end
  end

  // ---- read channel ----
  logic [AXI_DW-1:0] rmux;

  assign rd_go            = axi_req.ar_valid && !r_valid_q;
  assign kf_pop           = rd_go && axi_req.ar_addr == REG_FIFO_POP && !kf_empty;

  always_comb begin
    rmux = '0;
    unique case (axi_req.ar_addr)
      REG_CTRL:     rmux = AXI_DW'({cfg_avg_en, cfg_hash_en});
      REG_STATUS:   begin
        rmux[ST_BUSY]      = busy;
        rmux[ST_LOOK_DONE] = look_done_q;
        rmux[ST_FAIL]      = st_fail;
        rmux[ST_CNT_SAT]   = st_sat;
        rmux[ST_RANGE]     = st_range;
        rmux[ST_FIFO_OVF]  = st_ovf;
      end
      REG_RESULT:   rmux = {23'b0, res_hit, 1'b0, res_cnt, res_value};
      REG_FIFO_CNT: rmux = AXI_DW'(kf_count);
      REG_FIFO_POP: rmux = kf_empty ? '0 : kf_head;
      REG_FAIL_KEY: rmux = fail_q.key;
      REG_FAIL_VAL: rmux = {25'b0, fail_q.cnt, fail_q.value};
      REG_STATS:    rmux = {n_kicks, n_emits};
      default:      rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid_q <= 1'b0;
      r_data_q  <= '0;
    end else begin
      if (rd_go) begin
        r_valid_q <= 1'b1;
        r_data_q  <= rmux;
      end else if (axi_req.r_ready) begin
        r_valid_q <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) b_valid_q && !axi_req.b_ready |=> b_valid_q)
    else $error("reduce_axi_if: B response dropped");

endmodule
