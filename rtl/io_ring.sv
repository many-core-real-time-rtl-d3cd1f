// I/O-Ring: run-time reconfigurable crossbar between router home ports and
// NPRC-CCs.
//
// Subordinate ports face the home ports of the routers that have no local
// client; manager ports face the NPRC-CCs. Each subordinate port owns a
// multiplexer over all manager ports, steered by its 8-bit field in the
// configuration registers (io_ring_cfg, on APB). A link is one-to-one: if
// two subordinate ports name the same manager port, the lower-numbered one
// gets it and the other stays unlinked. Requests flow from a subordinate
// port to its linked manager port, responses flow back the same link.
// Unlinked subordinate ports hold their requests (ready low) and see no
// responses; unlinked manager ports see no requests.
// Timing: the data paths are purely combinational, so a flit crosses the
// ring in the same clock cycle and the controller behaves as if it were
// mounted on the router's home port. A configuration write changes the
// links from the next cycle on; changing a link in the middle of a packet
// is the software's responsibility to avoid.
module io_ring
  import nprc_pkg::*;
#(
  parameter int unsigned N_SUB = 28,
  parameter int unsigned N_MGR = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // APB configuration port
  input  logic [11:0] paddr,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // subordinate ports (router home ports)
  input  logic        sub_req_valid  [N_SUB],
  output logic        sub_req_ready  [N_SUB],
  input  flit_t       sub_req_flit   [N_SUB],
  output logic        sub_resp_valid [N_SUB],
  input  logic        sub_resp_ready [N_SUB],
  output flit_t       sub_resp_flit  [N_SUB],
  // manager ports (NPRC-CCs)
  output logic        mgr_req_valid  [N_MGR],
  input  logic        mgr_req_ready  [N_MGR],
  output flit_t       mgr_req_flit   [N_MGR],
  input  logic        mgr_resp_valid [N_MGR],
  output logic        mgr_resp_ready [N_MGR],
  input  flit_t       mgr_resp_flit  [N_MGR],
  // current links, for observation
  output logic [7:0]  sel    [N_SUB],
  output logic        linked [N_SUB]
);
  localparam int unsigned SW = (N_SUB > 1) ? $clog2(N_SUB) : 1;
  localparam int unsigned MW = (N_MGR > 1) ? $clog2(N_MGR) : 1;

  io_ring_cfg #(.N_SUB(N_SUB)) u_cfg (
    .pclk(clk), .presetn(rst_n),
    .paddr, .psel, .penable, .pwrite, .pwdata, .prdata, .pready, .pslverr,
    .sel
  );

  // Owner of each manager port: the lowest subordinate port selecting it.
  logic          own_v [N_MGR];
  logic [SW-1:0] own   [N_MGR];

  always_comb begin
    for (int m = 0; m < N_MGR; m++) begin
      own_v[m] = 1'b0;
      own[m]   = '0;
      for (int s = N_SUB - 1; s >= 0; s--) begin
        if (sel[s] == 8'(m)) begin
          own_v[m] = 1'b1;
          own[m]   = SW'(s);
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < N_SUB; s++) begin
      logic [MW-1:0] m;
      m = sel[s][MW-1:0];
      linked[s] = (sel[s] < 8'(N_MGR)) && own_v[m] && (own[m] == SW'(s));
      sub_req_ready[s]  = linked[s] && mgr_req_ready[m];
      sub_resp_valid[s] = linked[s] && mgr_resp_valid[m];
      sub_resp_flit[s]  = mgr_resp_flit[m];
    end
    for (int m = 0; m < N_MGR; m++) begin
      mgr_req_valid[m]  = own_v[m] && sub_req_valid[own[m]];
      mgr_req_flit[m]   = sub_req_flit[own[m]];
      mgr_resp_ready[m] = own_v[m] && sub_resp_ready[own[m]];
    end
  end
endmodule
