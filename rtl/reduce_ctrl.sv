// Control unit of the Reduce accelerator: the FSM that runs cuckoo hashing.
//
// The FSM owns both table RAMs (T1, T2), the two hash units, the two hit
// comparators, the accumulator and the average unit. It serves, one at a
// time, the pending emits of the Map accelerators and the lookups of the host.
//
// Emit (hashing on): both tables are read at h1(key) and h2(key). On a hit
// in either table the row is rewritten with value + new value (the "+" of
// the table). On a miss the key is new: it is pushed into the unique-key FIFO
// and written to T1[h1(key)]. If that slot held another entry, the entry is
// moved to its slot in T2, whose occupant moves to its slot in T1, and so on
// until an empty slot is found. After MAX_KICKS displacements the FSM gives
// up: the entry still without a slot is returned in fail_row and fail pulses,
// leaving the caller to rehash or keep that entry in software.
// Emit (hashing off, direct mode): the key itself is the index; key bit
// ADDR_W picks T1 or T2 and the low ADDR_W bits the row. Larger keys raise
// range_err and are dropped.
// Lookup: the same two reads; the hit row's value is returned, or, with
// averaging on, value / count from the average unit.
// After reset and on every clear the FSM writes empty rows to all addresses
// (2**ADDR_W clocks) and flushes the unique-key FIFO.
//
// Timing: an emit that hits takes 2 clocks (read, write back); a miss takes
// 2 clocks plus 2 per displacement; a lookup 2 clocks, plus DW+1 clocks of
// division when averaging. The table RAMs have a 1-clock synchronous read.
// The algorithm, row format, hit test and accumulator follow the published
// design; the state encoding, the request priority (clear, then lookup, then
// emit), MAX_KICKS and the direct-mode table split are this design's choices.
module reduce_ctrl
  import mr_pkg::*;
#(
  parameter int unsigned ADDR_W    = 12,
  parameter int unsigned MAX_KICKS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration (Table 2/3 modes)
  input  logic              cfg_hash_en,
  input  logic              cfg_avg_en,
  input  logic              clear_req,     // pulse: clear tables and key FIFO
  // pending emits (first-word fall-through queue)
  input  logic              q_valid,
  input  emit_t             q_data,
  output logic              q_pop,
  // host lookup
  input  logic              look_req,      // pulse
  input  key_t              look_key,
  output logic              look_done,     // pulse
  output logic              res_hit,
  output val_t              res_value,
  output logic [CNT_W-1:0]  res_cnt,
  // unique-key FIFO
  output logic              kf_push,
  output key_t              kf_key,
  input  logic              kf_full,
  output logic              kf_flush,
  // events and state
  output logic              busy,          // FSM not idle or a request pending
  output logic              fail,          // pulse: insertion gave up
  output kv_row_t           fail_row,
  output logic              sat,           // pulse: a count saturated
  output logic              range_err,     // pulse: direct-mode key too large
  output logic              kf_ovf,        // pulse: FIFO full on a new key
  output logic [31:0]       n_emits,
  output logic [31:0]       n_kicks,
  // table RAMs
  output logic              t1_we, t2_we,
  output logic [ADDR_W-1:0] t1_waddr, t2_waddr,
  output kv_row_t           t1_wdata, t2_wdata,
  output logic              t1_re, t2_re,
  output logic [ADDR_W-1:0] t1_raddr, t2_raddr,
  input  kv_row_t           t1_rdata, t2_rdata
);

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_EMIT, S_KICK1, S_KICK2, S_LOOK, S_DIV} state_t;
  state_t state;

  key_t              cur_key;
  val_t              cur_val;
  logic [ADDR_W-1:0] a1_q, a2_q;        // addresses of the current reads
  kv_row_t           ev;                 // entry being moved
  logic [$clog2(MAX_KICKS+1)-1:0] kicks;
  logic [ADDR_W-1:0] clr_addr;
  logic              clr_pend, look_pend;

  // Hash units and their input selection.
  key_t              h1_in, h2_in;
  logic [ADDR_W-1:0] h1_out, h2_out, a1, a2;

  reduce_hash #(.ADDR_W(ADDR_W), .VARIANT(1)) u_hash1 (.key(h1_in), .addr(h1_out));
  reduce_hash #(.ADDR_W(ADDR_W), .VARIANT(2)) u_hash2 (.key(h2_in), .addr(h2_out));

  key_t req_key;
  assign req_key = look_pend ? look_key : q_data.key;

  always_comb begin
    h1_in = req_key;
    h2_in = req_key;
    if (state == S_KICK2) h1_in = t2_rdata.key;
    if (state == S_EMIT || state == S_KICK1) h2_in = t1_rdata.key;
  end

  // In direct mode both tables are read at the key's low bits.
  assign a1 = cfg_hash_en ? h1_out : req_key[ADDR_W-1:0];
  assign a2 = cfg_hash_en ? h2_out : req_key[ADDR_W-1:0];

  // Hit comparators and accumulators.
  logic    hit1, hit2;
  kv_row_t m1_row, m2_row;
  logic    m1_sat, m2_sat;

  hit_compare u_cmp1 (.row(t1_rdata), .key(cur_key), .hit(hit1));
  hit_compare u_cmp2 (.row(t2_rdata), .key(cur_key), .hit(hit2));
  value_merge u_acc1 (.old_row(t1_rdata), .hit(hit1), .key(cur_key), .value(cur_val), .new_row(m1_row), .sat(m1_sat));
  value_merge u_acc2 (.old_row(t2_rdata), .hit(hit2), .key(cur_key), .value(cur_val), .new_row(m2_row), .sat(m2_sat));

  // Direct mode: which table, and is the key in range.
  logic dsel, d_range_ok;
  assign dsel       = cur_key[ADDR_W];
  assign d_range_ok = (cur_key >> (ADDR_W + 1)) == '0;

  // Average unit.
  logic div_start, div_busy, div_done;
  val_t div_q, div_dividend;
  logic [CNT_W-1:0] div_divisor;
  avg_divider #(.DW(VAL_W), .SW(CNT_W)) u_avg (
    .clk, .rst_n, .start(div_start), .dividend(div_dividend), .divisor(div_divisor),
    .busy(div_busy), .done(div_done), .quot(div_q)
  );

  // Row found by a lookup.
  logic    lk_hit;
  kv_row_t lk_row;
  always_comb begin
    if (!cfg_hash_en) begin
      lk_row = dsel ? t2_rdata : t1_rdata;
      lk_hit = d_range_ok && (dsel ? hit2 : hit1);
    end else begin
      lk_row = hit1 ? t1_rdata : t2_rdata;
      lk_hit = hit1 || hit2;
    end
  end

  assign div_dividend = lk_row.value;
  assign div_divisor  = lk_row.cnt;
  assign div_start    = (state == S_LOOK) && cfg_avg_en && lk_hit;

  assign busy = (state != S_IDLE) || clr_pend || look_pend || q_valid;

  // Combinational part: RAM ports and pulses.
  always_comb begin
    t1_we = 1'b0; t1_waddr = a1_q; t1_wdata = '0;
    t2_we = 1'b0; t2_waddr = a2_q; t2_wdata = '0;
    t1_re = 1'b0; t1_raddr = a1;
    t2_re = 1'b0; t2_raddr = a2;
    q_pop = 1'b0;
    kf_push = 1'b0; kf_key = cur_key; kf_ovf = 1'b0;
    sat = 1'b0; range_err = 1'b0;
    kf_flush = 1'b0;
    unique case (state)
      S_CLEAR: begin
        t1_we = 1'b1; t1_waddr = clr_addr;
        t2_we = 1'b1; t2_waddr = clr_addr;
        kf_flush = (clr_addr == '0);
      end
      S_IDLE: begin
        if (!clr_pend && (look_pend || q_valid)) begin
          t1_re = 1'b1;
          t2_re = 1'b1;
          q_pop = !look_pend;
        end
      end
      S_EMIT: begin
        if (!cfg_hash_en) begin
          if (!d_range_ok) begin
            range_err = 1'b1;
          end else begin
            t1_we = !dsel;    t1_wdata = m1_row;
            t2_we = dsel;     t2_wdata = m2_row;
            sat   = dsel ? m2_sat : m1_sat;
            kf_push = !(dsel ? hit2 : hit1);
          end
        end else if (hit1) begin
          t1_we = 1'b1; t1_wdata = m1_row; sat = m1_sat;
        end else if (hit2) begin
          t2_we = 1'b1; t2_wdata = m2_row; sat = m2_sat;
        end else begin
          // New key: place it in T1, read the T2 home of any entry it evicts.
          kf_push  = 1'b1;
          t1_we    = 1'b1; t1_wdata = m1_row;
          t2_re    = t1_rdata.valid;
          t2_raddr = h2_out;
        end
        kf_ovf = kf_push && kf_full;
        kf_push = kf_push && !kf_full;
      end
      S_KICK2: begin
        t2_we = 1'b1; t2_wdata = ev;
        if (t2_rdata.valid && kicks != MAX_KICKS[$bits(kicks)-1:0]) begin
          t1_re = 1'b1; t1_raddr = h1_out;
        end
      end
      S_KICK1: begin
        t1_we = 1'b1; t1_wdata = ev;
        if (t1_rdata.valid && kicks != MAX_KICKS[$bits(kicks)-1:0]) begin
          t2_re = 1'b1; t2_raddr = h2_out;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR; clr_addr <= '0; clr_pend <= 1'b0; look_pend <= 1'b0;
      cur_key <= '0; cur_val <= '0; a1_q <= '0; a2_q <= '0; ev <= '0; kicks <= '0;
      look_done <= 1'b0; res_hit <= 1'b0; res_value <= '0; res_cnt <= '0;
      fail <= 1'b0; fail_row <= '0; n_emits <= '0; n_kicks <= '0;
    end else begin
      look_done <= 1'b0;
      fail      <= 1'b0;
      if (clear_req) clr_pend  <= 1'b1;
      if (look_req)  look_pend <= 1'b1;
      unique case (state)
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (&clr_addr) state <= S_IDLE;
        end
        S_IDLE: begin
          if (clr_pend) begin
            clr_pend <= 1'b0;
            clr_addr <= '0;
            state    <= S_CLEAR;
          end else if (look_pend || q_valid) begin
            cur_key <= req_key;
            cur_val <= q_data.value;
            a1_q    <= a1;
            a2_q    <= a2;
            state   <= look_pend ? S_LOOK : S_EMIT;
          end
        end
        S_EMIT: begin
          state <= S_IDLE;
          if (cfg_hash_en || d_range_ok) n_emits <= n_emits + 1'b1;
          if (cfg_hash_en && !hit1 && !hit2 && t1_rdata.valid) begin
            ev      <= t1_rdata;
            a2_q    <= h2_out;
            kicks   <= ($bits(kicks))'(1);
            n_kicks <= n_kicks + 1'b1;
            state   <= S_KICK2;
          end
        end
        S_KICK2, S_KICK1: begin
          state <= S_IDLE;
          if ((state == S_KICK2) ? t2_rdata.valid : t1_rdata.valid) begin
            ev <= (state == S_KICK2) ? t2_rdata : t1_rdata;
            if (kicks == MAX_KICKS[$bits(kicks)-1:0]) begin
              fail     <= 1'b1;
              fail_row <= (state == S_KICK2) ? t2_rdata : t1_rdata;
            end else begin
              kicks   <= kicks + 1'b1;
              n_kicks <= n_kicks + 1'b1;
              if (state == S_KICK2) begin
                a1_q  <= h1_out;
                state <= S_KICK1;
              end else begin
                a2_q  <= h2_out;
                state <= S_KICK2;
              end
            end
          end
        end
        S_LOOK: begin
          look_pend <= 1'b0;
          res_hit   <= lk_hit;
          res_cnt   <= lk_hit ? lk_row.cnt : '0;
          res_value <= lk_hit ? lk_row.value : '0;
          if (div_start) begin
            state <= S_DIV;
          end else begin
            look_done <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_DIV: begin
          if (div_done) begin
            res_value <= div_q;
            look_done <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A lookup request must not arrive while one is still being served.
  assert property (@(posedge clk) disable iff (!rst_n) look_req |-> !look_pend)
    else $error("reduce_ctrl: lookup issued while another is pending");

endmodule
