// NPRC-CC: a full-duplex real-time I/O controller that replaces a
// conventional I/O controller on the network.
//
// Request path:
//   manager port -> loader -> P-space / S-space -> scheduling circuits ->
//   I/O controller -> I/O pins.
//  * P-space (p_space) holds the periodic requests pre-loaded at
//    initialisation and stages the next one in its shadow buffer.
//  * S-space holds two sporadic pools (io_pool), HRT and SRT, each a
//    priority queue with an arbiter and a Next shadow register.
//  * The scheduling circuits (cc_scheduler) follow a time slot table
//    against the global timer and pick, every time the device is free,
//    what the I/O controller runs next.
//  * The I/O controller (spi_io_ctrl) is an SPI master without FIFO.
// Response path: pass-through. The answer of a read operation goes from
// the I/O controller's single response register straight to the manager
// port as a one-flit packet; nothing is queued on the way back.
// Sizes: POOL_DEPTH = 50 per pool gives the 100 buffered I/O operations
// of the evaluated configuration; P_MEM_WORDS = 4096 words is the 16 KB of
// RAM reported for the controller. SHADOW_DEPTH, N_SLOTS, the SPI clock
// divider and the tick length are this design's choices. OP_TICKS, the
// worst-case length of one I/O operation in timer ticks (rounded up, plus
// one tick for the partly elapsed current tick), is derived from them.
// The pool fill levels, the scheduler's position in the hyper-period and
// the controller's busy flag are kept as internal signals for observation
// even where no logic here reads them.
module nprc_cc
  import nprc_pkg::*;
#(
  parameter int unsigned P_MEM_WORDS  = 4096,
  parameter int unsigned SHADOW_DEPTH = 16,
  parameter int unsigned POOL_DEPTH   = 50,
  parameter int unsigned N_SLOTS      = 64,
  parameter int unsigned SPI_CLK_DIV  = 2,
  parameter int unsigned TICK_DIV     = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  // manager port: requests in
  input  logic  req_valid,
  output logic  req_ready,
  input  flit_t req_flit,
  // manager port: responses out
  output logic  resp_valid,
  input  logic  resp_ready,
  output flit_t resp_flit,
  // I/O pins
  output logic  spi_sclk,
  output logic  spi_cs_n,
  output logic  spi_mosi,
  input  logic  spi_miso,
  // observation (one-cycle event pulses)
  output logic  ev_p_start,
  output logic  ev_hrt_slot,
  output logic  ev_spor_free,
  output logic  ev_defer,
  output logic  ev_overrun,
  output logic  ev_pool_full
);
  localparam int unsigned P_AW      = $clog2(P_MEM_WORDS);
  localparam int unsigned T_AW      = $clog2(N_SLOTS);
  localparam int unsigned OP_CYCLES = 64 * SPI_CLK_DIV;
  localparam int unsigned OP_TICKS  = (OP_CYCLES + TICK_DIV - 1) / TICK_DIV + 1;

  logic            p_wr_en;
  logic [P_AW-1:0] p_wr_addr;
  logic [31:0]     p_wr_data;
  logic            t_wr_en;
  logic [T_AW-1:0] t_wr_idx;
  tst_entry_t      t_wr_data;
  logic            hrt_push, hrt_ready, srt_push, srt_ready;
  spor_req_t       push_data;
  logic            run;
  logic [15:0]     hp_len;
  logic [6:0]      n_slots;

  cc_loader #(.P_AW(P_AW), .T_AW(T_AW)) u_loader (
    .clk, .rst_n,
    .in_valid(req_valid), .in_ready(req_ready), .in_flit(req_flit),
    .p_wr_en, .p_wr_addr, .p_wr_data,
    .t_wr_en, .t_wr_idx, .t_wr_data,
    .hrt_push, .hrt_ready, .srt_push, .srt_ready, .push_data,
    .run, .hp_len, .n_slots
  );

  logic            p_fetch_req, p_fetch_ready, p_loaded, p_sh_valid, p_sh_pop;
  logic [P_AW-1:0] p_fetch_id;
  logic [31:0]     p_sh_op;

  p_space #(.MEM_WORDS(P_MEM_WORDS), .SHADOW_DEPTH(SHADOW_DEPTH), .AW(P_AW)) u_pspace (
    .clk, .rst_n,
    .wr_en(p_wr_en), .wr_addr(p_wr_addr), .wr_data(p_wr_data),
    .fetch_req(p_fetch_req), .fetch_id(p_fetch_id), .fetch_ready(p_fetch_ready),
    .loaded(p_loaded),
    .sh_valid(p_sh_valid), .sh_op(p_sh_op), .sh_pop(p_sh_pop)
  );

  logic      hrt_next_valid, srt_next_valid, hrt_take, srt_take;
  spor_req_t hrt_next, srt_next;
  logic [$clog2(POOL_DEPTH+1)-1:0] hrt_count, srt_count;

  io_pool #(.DEPTH(POOL_DEPTH)) u_hrt_pool (
    .clk, .rst_n,
    .push_valid(hrt_push), .push_ready(hrt_ready), .push_data,
    .next_valid(hrt_next_valid), .next_req(hrt_next), .take(hrt_take),
    .count(hrt_count)
  );

  io_pool #(.DEPTH(POOL_DEPTH)) u_srt_pool (
    .clk, .rst_n,
    .push_valid(srt_push), .push_ready(srt_ready), .push_data,
    .next_valid(srt_next_valid), .next_req(srt_next), .take(srt_take),
    .count(srt_count)
  );

  logic        io_op_valid, io_op_ready, io_busy;
  logic [31:0] io_op;
  logic [15:0] slot_time;

  cc_scheduler #(.N_SLOTS(N_SLOTS), .P_AW(P_AW), .OP_TICKS(OP_TICKS), .T_AW(T_AW)) u_sched (
    .clk, .rst_n, .tick, .run, .hp_len, .n_slots,
    .t_wr_en, .t_wr_idx, .t_wr_data,
    .p_fetch_req, .p_fetch_id, .p_fetch_ready, .p_loaded, .p_sh_valid, .p_sh_op, .p_sh_pop,
    .hrt_any(hrt_count != '0), .hrt_next_valid, .hrt_next, .hrt_take,
    .srt_next_valid, .srt_next, .srt_take,
    .io_op_valid, .io_op, .io_op_ready,
    .slot_time,
    .ev_p_start, .ev_hrt_slot, .ev_spor_free, .ev_defer, .ev_overrun
  );

  logic [31:0] resp_data;

  spi_io_ctrl #(.CLK_DIV(SPI_CLK_DIV)) u_ioc (
    .clk, .rst_n,
    .op_valid(io_op_valid), .op_ready(io_op_ready), .op(io_op), .busy(io_busy),
    .resp_valid, .resp_ready, .resp_data,
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso)
  );

  assign resp_flit    = '{last: 1'b1, data: resp_data};
  assign ev_pool_full = req_valid && !req_ready;
endmodule
