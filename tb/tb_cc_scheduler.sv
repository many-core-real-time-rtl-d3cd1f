// Self-checking test of cc_scheduler with small models of the P-space,
// the two pools and the I/O controller around it. One timer tick per
// cycle, a hyper-period of 200 ticks with two periodic rows, two HRT
// budget rows and one free row, and random sporadic traffic over three
// hyper-periods. Checked for every operation the scheduler issues:
//  * the first operation of a periodic request starts at its row's start
//    time (at most 2 ticks later) and all its operations follow in order;
//  * an HRT row with a waiting HRT request issues it at the row's start;
//  * a sporadic operation issued in free time is the most urgent one
//    waiting (HRT wins ties) and ends before the next reserved row;
//  * no operation is issued while the I/O controller is busy.
// Each mechanism (periodic start, HRT budget use, free-time sporadic,
// held-back sporadic, empty HRT budget) must occur at least once.
module tb_cc_scheduler;
  import nprc_pkg::*;
  localparam int unsigned OPT = 10, OPC = 8, HP = 200;
  logic clk = 0, rst_n = 0;
  logic run = 0; logic [15:0] hp_len = HP[15:0]; logic [6:0] n_slots = 5;
  logic t_wr_en = 0; logic [5:0] t_wr_idx = 0; tst_entry_t t_wr_data = '0;
  logic p_fetch_req, p_fetch_ready, p_loaded, p_sh_valid, p_sh_pop;
  logic [11:0] p_fetch_id; logic [31:0] p_sh_op;
  logic hrt_any, hrt_next_valid, hrt_take, srt_next_valid, srt_take;
  spor_req_t hrt_next, srt_next;
  logic io_op_valid, io_op_ready; logic [31:0] io_op;
  logic [15:0] slot_time;
  logic ev_p_start, ev_hrt_slot, ev_spor_free, ev_defer, ev_overrun;
  int checks = 0, failures = 0;

  cc_scheduler #(.N_SLOTS(64), .P_AW(12), .OP_TICKS(OPT)) dut (
    .clk, .rst_n, .tick(1'b1), .run, .hp_len, .n_slots, .t_wr_en, .t_wr_idx, .t_wr_data,
    .p_fetch_req, .p_fetch_id, .p_fetch_ready, .p_loaded, .p_sh_valid, .p_sh_op, .p_sh_pop,
    .hrt_any, .hrt_next_valid, .hrt_next, .hrt_take, .srt_next_valid, .srt_next, .srt_take,
    .io_op_valid, .io_op, .io_op_ready, .slot_time,
    .ev_p_start, .ev_hrt_slot, .ev_spor_free, .ev_defer, .ev_overrun);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- time slot table used by the test
  tst_entry_t rows [5];
  initial begin
    rows[0] = '{typ: SLOT_P,    req_id: 14'h010, start: 16'd20};
    rows[1] = '{typ: SLOT_HRT,  req_id: 14'h0,   start: 16'd60};
    rows[2] = '{typ: SLOT_FREE, req_id: 14'h0,   start: 16'd80};
    rows[3] = '{typ: SLOT_P,    req_id: 14'h020, start: 16'd120};
    rows[4] = '{typ: SLOT_HRT,  req_id: 14'h0,   start: 16'd170};
  end
  // number of operations of the periodic request at address id
  function automatic int nops(input logic [11:0] id); return (id == 12'h010) ? 2 : 3; endfunction

  // ---- P-space model: loads a request 3 cycles after the fetch
  int          p_q [$];
  int          p_delay = 0;
  logic [11:0] p_id;
  assign p_fetch_ready = (p_delay == 0) && (p_q.size() == 0);
  assign p_sh_valid    = (p_q.size() != 0);
  assign p_sh_op       = p_sh_valid ? 32'(p_q[0]) : 32'h0;
  always @(posedge clk) begin
    if (p_sh_pop) void'(p_q.pop_front());
    if (p_fetch_req && p_fetch_ready) begin p_delay <= 3; p_id <= p_fetch_id; p_loaded <= 0; end
    else if (p_delay == 1) begin
      for (int k = 0; k < nops(p_id); k++) p_q.push_back(int'({4'h1, 12'(p_id), 16'(k)}));
      p_delay <= 0; p_loaded <= 1;
    end else if (p_delay > 1) p_delay <= p_delay - 1;
  end

  // ---- pool models: most urgent first, oldest among equals
  spor_req_t hq [$], sq [$];
  function automatic int best(input spor_req_t q [$]);
    int b = 0;
    for (int i = 1; i < q.size(); i++) if (q[i].prio > q[b].prio) b = i;
    return b;
  endfunction
  assign hrt_any        = hq.size() != 0;
  assign hrt_next_valid = hq.size() != 0;
  assign srt_next_valid = sq.size() != 0;
  assign hrt_next       = hrt_next_valid ? hq[best(hq)] : '0;
  assign srt_next       = srt_next_valid ? sq[best(sq)] : '0;

  // ---- I/O controller model: busy for OPC cycles after each operation
  int io_busy = 0;
  assign io_op_ready = (io_busy == 0);

  // ---- checker
  int  n_p_start = 0, n_hrt_slot = 0, n_free = 0, n_defer = 0, n_hrt_empty = 0;
  int  p_expect_k = 0;
  int  seq = 0;
  function automatic int next_reserved_start(input int t);
    // earliest start of a P or HRT row at or after t (next hyper-period's first row if none)
    for (int r = 0; r < 5; r++) if (rows[r].typ != SLOT_FREE && int'(rows[r].start) > t) return rows[r].start;
    return HP + rows[0].start;
  endfunction
  function automatic bit at_row_start(input int t, input slot_type_e ty);
    for (int r = 0; r < 5; r++) if (rows[r].typ == ty && t >= rows[r].start && t <= rows[r].start + 2) return 1;
    return 0;
  endfunction

  always @(posedge clk) begin
    if (run) begin
      if (ev_p_start)   n_p_start++;
      if (ev_defer)     n_defer++;
      check(!ev_overrun, "no row left unserved");
      if (io_busy > 0) io_busy <= io_busy - 1;
      if (io_op_valid && io_op_ready) begin
        int t;
        t = int'(slot_time);
        io_busy <= OPC - 1;
        case (io_op[31:28])
          4'h1: begin
            if (io_op[15:0] == 0) check(at_row_start(t, SLOT_P), $sformatf("periodic request starts at tick %0d", t));
            check(int'(io_op[15:0]) == p_expect_k, "periodic operations in order");
            p_expect_k = (int'(io_op[15:0]) + 1 == nops(io_op[27:16])) ? 0 : p_expect_k + 1;
          end
          4'h2, 4'h3: begin
            if (ev_hrt_slot) begin
              n_hrt_slot++;
              check(at_row_start(t, SLOT_HRT), "HRT budget used at its row");
              check(hrt_take && io_op == hq[best(hq)].op, "HRT budget serves the most urgent HRT request");
            end else begin
              n_free++;
              check(t + OPT <= next_reserved_start(t), $sformatf("sporadic at %0d fits before %0d", t, next_reserved_start(t)));
              if (hq.size() != 0 && (sq.size() == 0 || hq[best(hq)].prio >= sq[best(sq)].prio))
                check(hrt_take && io_op == hq[best(hq)].op, "free time takes most urgent (HRT)");
              else
                check(srt_take && io_op == sq[best(sq)].op, "free time takes most urgent (SRT)");
            end
            if (hrt_take) hq.delete(best(hq));
            if (srt_take) sq.delete(best(sq));
          end
          default: check(0, "unknown operation issued");
        endcase
      end
      // an HRT row whose pool is empty lets the budget go
      for (int r = 0; r < 5; r++)
        if (rows[r].typ == SLOT_HRT && int'(slot_time) == rows[r].start && hq.size() == 0) n_hrt_empty++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 5; r++) begin
      @(negedge clk); t_wr_en = 1; t_wr_idx = 6'(r); t_wr_data = rows[r];
    end
    @(negedge clk); t_wr_en = 0;
    run = 1;
    // three hyper-periods of random sporadic arrivals
    for (int c = 0; c < 3 * HP; c++) begin
      @(negedge clk);
      if ($urandom_range(0, 24) == 0 && c < HP / 4)
        hq.push_back('{prio: 8'($urandom_range(0, 7)), op: {4'h2, 28'(seq++)}});
      if ($urandom_range(0, 9) == 0)
        sq.push_back('{prio: 8'($urandom_range(0, 7)), op: {4'h3, 28'(seq++)}});
    end
    @(negedge clk) run = 0;
    check(n_p_start == 6, $sformatf("%0d periodic starts, expected 6", n_p_start));
    check(n_hrt_slot > 0, "HRT budget used");
    check(n_free > 0, "free-time sporadic issued");
    check(n_defer > 0, "sporadic held back before a reserved row");
    check(n_hrt_empty > 0, "empty HRT budget released");
    $display("periodic=%0d hrt_budget=%0d free=%0d held=%0d hrt_empty=%0d",
             n_p_start, n_hrt_slot, n_free, n_defer, n_hrt_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
