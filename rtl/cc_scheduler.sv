// Scheduling circuits of an NPRC-CC: time slot table, scheduler and the
// multiplexer in front of the I/O controller.
//
// The time slot table (TST) is a small memory written at initialisation.
// Its rows, sorted by start time, describe one hyper-period: a periodic
// request (SLOT_P, with the P-space address of the request), a budget
// reserved for a hard real-time sporadic request (SLOT_HRT), or the start
// of free time (SLOT_FREE). The scheduler keeps its position in the
// hyper-period (`slot_time`), advanced on every global timer tick and
// wrapped at `hp_len`, and a pointer `cur` to the next row to serve.
//  * When `slot_time` reaches the start of a SLOT_P row, the request's
//    operations, staged beforehand in the P-space shadow buffer, are passed
//    one by one to the I/O controller and removed from the shadow buffer.
//    The next periodic request is prefetched as soon as the shadow buffer
//    is free again (the row after the last one is row 0 of the next
//    hyper-period).
//  * At the start of a SLOT_HRT row the most urgent request of the HRT
//    pool is issued; if that pool is empty the budget becomes free time.
//  * In free time the more urgent of the two pools' Next requests is
//    issued (ties go to HRT), but only if one operation, OP_TICKS ticks,
//    fits before the start of the next row; otherwise it is held back.
// Events are one-cycle pulses. `ev_overrun` flags rows left unserved when
// the hyper-period wrapped. Comparing time with the table, removal from
// the shadow buffers, free-slot use by priority and the fit check follow
// the architecture; the pointer-and-prefetch mechanism, the tie rule and
// the wrap handling are this design's choices.
module cc_scheduler
  import nprc_pkg::*;
#(
  parameter int unsigned N_SLOTS  = 64,
  parameter int unsigned P_AW     = 12,
  parameter int unsigned OP_TICKS = 3,
  parameter int unsigned T_AW     = $clog2(N_SLOTS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic            run,
  input  logic [15:0]     hp_len,
  input  logic [6:0]      n_slots,
  // time slot table write port
  input  logic            t_wr_en,
  input  logic [T_AW-1:0] t_wr_idx,
  input  tst_entry_t      t_wr_data,
  // P-space
  output logic            p_fetch_req,
  output logic [P_AW-1:0] p_fetch_id,
  input  logic            p_fetch_ready,
  input  logic            p_loaded,
  input  logic            p_sh_valid,
  input  logic [31:0]     p_sh_op,
  output logic            p_sh_pop,
  // S-space pools
  input  logic            hrt_any,
  input  logic            hrt_next_valid,
  input  spor_req_t       hrt_next,
  output logic            hrt_take,
  input  logic            srt_next_valid,
  input  spor_req_t       srt_next,
  output logic            srt_take,
  // I/O controller
  output logic            io_op_valid,
  output logic [31:0]     io_op,
  input  logic            io_op_ready,
  // observation
  output logic [15:0]     slot_time,
  output logic            ev_p_start,
  output logic            ev_hrt_slot,
  output logic            ev_spor_free,
  output logic            ev_defer,
  output logic            ev_overrun
);
  typedef enum logic {S_IDLE, S_P} sstate_e;

  tst_entry_t tst [N_SLOTS];

  always_ff @(posedge clk) begin
    if (t_wr_en) tst[t_wr_idx] <= t_wr_data;
  end

  sstate_e       st;
  logic [6:0]    cur;
  logic          pf_valid;
  logic [T_AW-1:0] pf_idx;
  logic          wrap_pend;

  wire        pending = (cur < n_slots);
  wire [T_AW-1:0] cur_i = cur[T_AW-1:0];
  tst_entry_t e, e0, te;
  logic [T_AW-1:0] tgt;
  logic        tgt_ok;

  always_comb begin
    e      = tst[cur_i];
    e0     = tst[0];
    tgt    = pending ? cur_i : '0;
    tgt_ok = (n_slots != 7'd0);
    te     = tst[tgt];
  end

  wire wrap      = run && tick && ({1'b0, slot_time} + 17'd1 >= {1'b0, hp_len});
  wire start_hit = pending && (slot_time >= e.start);

  // Ticks of free time left before the next row starts.
  logic [16:0] remaining;
  always_comb begin
    if (pending)               remaining = {1'b0, e.start} - {1'b0, slot_time};
    else if (n_slots == 7'd0)  remaining = 17'h1FFFF;
    else                       remaining = {1'b0, hp_len} - {1'b0, slot_time} + {1'b0, e0.start};
  end
  wire fits = (remaining >= 17'(OP_TICKS));

  // Sporadic candidate for free time: higher priority wins, HRT on a tie.
  wire use_hrt = hrt_next_valid && (!srt_next_valid || hrt_next.prio >= srt_next.prio);
  wire cand    = hrt_next_valid || srt_next_valid;

  // Decisions of this cycle.
  logic do_skip, do_p_go, do_hrt, do_hrt_empty, do_free;
  always_comb begin
    do_skip = 1'b0; do_p_go = 1'b0; do_hrt = 1'b0; do_hrt_empty = 1'b0; do_free = 1'b0;
    if (run && st == S_IDLE) begin
      if (pending && e.typ == SLOT_FREE)
        do_skip = 1'b1;
      else if (start_hit && e.typ == SLOT_P)
        do_p_go = pf_valid && (pf_idx == cur_i);
      else if (start_hit && e.typ == SLOT_HRT) begin
        if (hrt_next_valid)  do_hrt = io_op_ready;
        else if (!hrt_any)   do_hrt_empty = 1'b1;
      end else if (!start_hit)
        do_free = cand && fits && io_op_ready;
    end
  end

  assign ev_defer = run && st == S_IDLE && !start_hit && !(pending && e.typ == SLOT_FREE)
                    && cand && !fits && io_op_ready;

  // Multiplexer to the I/O controller.
  always_comb begin
    io_op_valid = 1'b0;
    io_op       = '0;
    p_sh_pop    = 1'b0;
    hrt_take    = 1'b0;
    srt_take    = 1'b0;
    if (st == S_P) begin
      io_op_valid = p_sh_valid;
      io_op       = p_sh_op;
      p_sh_pop    = p_sh_valid && io_op_ready;
    end else if (do_hrt) begin
      io_op_valid = 1'b1;
      io_op       = hrt_next.op;
      hrt_take    = 1'b1;
    end else if (do_free) begin
      io_op_valid = 1'b1;
      io_op       = use_hrt ? hrt_next.op : srt_next.op;
      hrt_take    = use_hrt;
      srt_take    = !use_hrt;
    end
  end

  assign p_fetch_req = run && st == S_IDLE && tgt_ok && te.typ == SLOT_P
                       && !(pf_valid && pf_idx == tgt) && p_fetch_ready;
  assign p_fetch_id  = P_AW'(te.req_id);

  wire p_done = (st == S_P) && p_loaded && !p_sh_valid;

  assign ev_p_start   = do_p_go;
  assign ev_hrt_slot  = do_hrt;
  assign ev_spor_free = do_free;
  assign ev_overrun   = wrap && st == S_IDLE && pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cur       <= '0;
      slot_time <= '0;
      pf_valid  <= 1'b0;
      pf_idx    <= '0;
      wrap_pend <= 1'b0;
    end else if (!run) begin
      st        <= S_IDLE;
      cur       <= '0;
      slot_time <= '0;
      wrap_pend <= 1'b0;
    end else begin
      if (tick) slot_time <= wrap ? '0 : slot_time + 1'b1;
      if (p_fetch_req) begin
        pf_valid <= 1'b1;
        pf_idx   <= tgt;
      end
      if (do_p_go) st <= S_P;
      if (p_done) begin
        st       <= S_IDLE;
        pf_valid <= 1'b0;
      end
      // row pointer
      if (wrap) begin
        if (st == S_P && !p_done) wrap_pend <= 1'b1;
        else begin
          cur       <= '0;
          wrap_pend <= 1'b0;
        end
      end else if (p_done) begin
        cur       <= wrap_pend ? '0 : cur + 1'b1;
        wrap_pend <= 1'b0;
      end else if (do_skip || do_hrt || do_hrt_empty) begin
        cur <= cur + 1'b1;
      end
    end
  end

  a_one_source: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({p_sh_pop, hrt_take, srt_take}));
endmodule
