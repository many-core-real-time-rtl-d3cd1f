// Self-checking test of io_ring: configures the multiplexers over APB
// (including a conflicting and an out-of-range setting), reads the
// registers back, and for random port activity compares every manager-side
// and subordinate-side output with a reference model computed in the test.
// The data paths are combinational, so outputs are compared in the same
// cycle as the inputs change.
module tb_io_ring;
  import nprc_pkg::*;
  localparam int unsigned NS = 6, NM = 4;
  logic clk = 0, rst_n = 0;
  logic [11:0] paddr = 0; logic psel = 0, penable = 0, pwrite = 0;
  logic [31:0] pwdata = 0, prdata; logic pready, pslverr;
  logic  s_rv [NS], s_rr [NS], s_pv [NS], s_pr [NS];
  flit_t s_rf [NS], s_pf [NS];
  logic  m_rv [NM], m_rr [NM], m_pv [NM], m_pr [NM];
  flit_t m_rf [NM], m_pf [NM];
  logic [7:0] sel [NS]; logic linked [NS];
  int checks = 0, failures = 0;
  logic [7:0] cfg [NS];

  io_ring #(.N_SUB(NS), .N_MGR(NM)) dut (.clk, .rst_n,
    .paddr, .psel, .penable, .pwrite, .pwdata, .prdata, .pready, .pslverr,
    .sub_req_valid(s_rv), .sub_req_ready(s_rr), .sub_req_flit(s_rf),
    .sub_resp_valid(s_pv), .sub_resp_ready(s_pr), .sub_resp_flit(s_pf),
    .mgr_req_valid(m_rv), .mgr_req_ready(m_rr), .mgr_req_flit(m_rf),
    .mgr_resp_valid(m_pv), .mgr_resp_ready(m_pr), .mgr_resp_flit(m_pf),
    .sel, .linked);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb(input bit wr, input logic [11:0] a, input logic [31:0] d, output logic [31:0] q, output logic err);
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1 q = prdata; err = pslverr;
    check(pready, "pready");
    @(posedge clk); #1 psel = 0; penable = 0;
  endtask

  task automatic set_cfg();
    logic [31:0] q; logic e;
    for (int r = 0; r < (NS + 3) / 4; r++) begin
      logic [31:0] w = '1;
      for (int b = 0; b < 4; b++) if (4 * r + b < NS) w[8*b +: 8] = cfg[4*r + b];
      apb(1, 12'(4 * r), w, q, e);
      check(!e, "no error in range");
      apb(0, 12'(4 * r), 0, q, e);
      check(q == w, $sformatf("readback reg %0d %h expected %h", r, q, w));
    end
  endtask

  // reference model
  function automatic int owner(input int m);
    for (int s = 0; s < NS; s++) if (cfg[s] == 8'(m)) return s;
    return -1;
  endfunction

  task automatic compare();
    for (int s = 0; s < NS; s++) begin
      bit lk = (cfg[s] < NM) && owner(cfg[s]) == s;
      check(linked[s] == lk, $sformatf("linked[%0d]", s));
      check(s_rr[s] == (lk && m_rr[cfg[s]]), $sformatf("sub %0d req ready", s));
      check(s_pv[s] == (lk && m_pv[cfg[s]]), $sformatf("sub %0d resp valid", s));
      if (lk) check(s_pf[s] == m_pf[cfg[s]], $sformatf("sub %0d resp flit", s));
    end
    for (int m = 0; m < NM; m++) begin
      int o = owner(m);
      check(m_rv[m] == (o >= 0 && s_rv[o]), $sformatf("mgr %0d req valid", m));
      check(m_pr[m] == (o >= 0 && s_pr[o]), $sformatf("mgr %0d resp ready", m));
      if (o >= 0) check(m_rf[m] == s_rf[o], $sformatf("mgr %0d req flit", m));
    end
  endtask

  task automatic traffic(input int n);
    repeat (n) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        s_rv[s] = 1'($urandom); s_pr[s] = 1'($urandom);
        s_rf[s] = '{last: 1'($urandom), data: $urandom};
      end
      for (int m = 0; m < NM; m++) begin
        m_pv[m] = 1'($urandom); m_rr[m] = 1'($urandom);
        m_pf[m] = '{last: 1'($urandom), data: $urandom};
      end
      #1 compare();
    end
  endtask

  initial begin
    logic [31:0] q; logic e;
    for (int s = 0; s < NS; s++) begin s_rv[s] = 0; s_pr[s] = 0; s_rf[s] = '0; end
    for (int m = 0; m < NM; m++) begin m_pv[m] = 0; m_rr[m] = 0; m_pf[m] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // after reset nothing is linked
    for (int s = 0; s < NS; s++) cfg[s] = 8'hFF;
    traffic(10);
    // one-to-one links, one port unlinked
    cfg = '{8'd2, 8'hFF, 8'd0, 8'd3, 8'd1, 8'hFF};
    set_cfg(); traffic(50);
    // conflict: ports 1 and 4 both select manager 1, port 5 out of range
    cfg = '{8'd3, 8'd1, 8'd2, 8'd0, 8'd1, 8'd9};
    set_cfg(); traffic(50);
    // random reconfigurations
    repeat (10) begin
      for (int s = 0; s < NS; s++) cfg[s] = 8'($urandom_range(0, NM));
      set_cfg(); traffic(20);
    end
    apb(1, 12'h40, 32'h0, q, e);
    check(e, "pslverr beyond the last register");
    traffic(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
