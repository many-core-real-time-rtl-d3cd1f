// NPRC-I/O hardware: the I/O side of a many-core network-on-chip.
//
// Top level. A bank of N_CC NPRC-CC real-time I/O controllers sits behind
// the I/O-Ring, whose N_SUB subordinate ports are brought out to be wired
// to the home ports of the mesh routers that carry no processor or memory.
// Processors reach the ring's configuration registers through the APB port
// and so choose, at run-time, which router each controller appears on; all
// controllers share one global timer. Each controller drives one SPI
// device. The mesh routers, processors, memory and devices are outside this
// module. Defaults follow the evaluated platform: a 10 x 6 mesh with 32
// processors in the central 8 x 4 block leaves the 28 border routers free
// (N_SUB = 28), and the ring serves 16 controllers (N_CC = 16).
// The event outputs are one-cycle pulses per controller (see nprc_cc).
// The ring's decoded per-port selection (ring_sel) is not used here; the
// same information is read back through APB.
module nprc_io
  import nprc_pkg::*;
#(
  parameter int unsigned N_SUB        = 28,
  parameter int unsigned N_CC         = 16,
  parameter int unsigned P_MEM_WORDS  = 4096,
  parameter int unsigned SHADOW_DEPTH = 16,
  parameter int unsigned POOL_DEPTH   = 50,
  parameter int unsigned N_SLOTS      = 64,
  parameter int unsigned SPI_CLK_DIV  = 2,
  parameter int unsigned TICK_DIV     = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  // APB port to the I/O-Ring configuration registers
  input  logic [11:0] paddr,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // router home ports
  input  logic        rt_req_valid  [N_SUB],
  output logic        rt_req_ready  [N_SUB],
  input  flit_t       rt_req_flit   [N_SUB],
  output logic        rt_resp_valid [N_SUB],
  input  logic        rt_resp_ready [N_SUB],
  output flit_t       rt_resp_flit  [N_SUB],
  // I/O pins, one SPI device per controller
  output logic        spi_sclk [N_CC],
  output logic        spi_cs_n [N_CC],
  output logic        spi_mosi [N_CC],
  input  logic        spi_miso [N_CC],
  // global time and per-controller events
  output logic [31:0] time_now,
  output logic        ring_linked  [N_SUB],
  output logic        ev_p_start   [N_CC],
  output logic        ev_hrt_slot  [N_CC],
  output logic        ev_spor_free [N_CC],
  output logic        ev_defer     [N_CC],
  output logic        ev_overrun   [N_CC],
  output logic        ev_pool_full [N_CC]
);
  logic tick;

  global_timer #(.TICK_DIV(TICK_DIV), .TIME_W(32)) u_timer (
    .clk, .rst_n, .tick, .now(time_now)
  );

  logic       m_req_valid  [N_CC];
  logic       m_req_ready  [N_CC];
  flit_t      m_req_flit   [N_CC];
  logic       m_resp_valid [N_CC];
  logic       m_resp_ready [N_CC];
  flit_t      m_resp_flit  [N_CC];
  logic [7:0] ring_sel     [N_SUB];

  io_ring #(.N_SUB(N_SUB), .N_MGR(N_CC)) u_ring (
    .clk, .rst_n,
    .paddr, .psel, .penable, .pwrite, .pwdata, .prdata, .pready, .pslverr,
    .sub_req_valid(rt_req_valid), .sub_req_ready(rt_req_ready), .sub_req_flit(rt_req_flit),
    .sub_resp_valid(rt_resp_valid), .sub_resp_ready(rt_resp_ready), .sub_resp_flit(rt_resp_flit),
    .mgr_req_valid(m_req_valid), .mgr_req_ready(m_req_ready), .mgr_req_flit(m_req_flit),
    .mgr_resp_valid(m_resp_valid), .mgr_resp_ready(m_resp_ready), .mgr_resp_flit(m_resp_flit),
    .sel(ring_sel), .linked(ring_linked)
  );

  for (genvar c = 0; c < N_CC; c++) begin : g_cc
    nprc_cc #(
      .P_MEM_WORDS(P_MEM_WORDS), .SHADOW_DEPTH(SHADOW_DEPTH), .POOL_DEPTH(POOL_DEPTH),
      .N_SLOTS(N_SLOTS), .SPI_CLK_DIV(SPI_CLK_DIV), .TICK_DIV(TICK_DIV)
    ) u_cc (
      .clk, .rst_n, .tick,
      .req_valid(m_req_valid[c]), .req_ready(m_req_ready[c]), .req_flit(m_req_flit[c]),
      .resp_valid(m_resp_valid[c]), .resp_ready(m_resp_ready[c]), .resp_flit(m_resp_flit[c]),
      .spi_sclk(spi_sclk[c]), .spi_cs_n(spi_cs_n[c]), .spi_mosi(spi_mosi[c]), .spi_miso(spi_miso[c]),
      .ev_p_start(ev_p_start[c]), .ev_hrt_slot(ev_hrt_slot[c]), .ev_spor_free(ev_spor_free[c]),
      .ev_defer(ev_defer[c]), .ev_overrun(ev_overrun[c]), .ev_pool_full(ev_pool_full[c])
    );
  end
endmodule
