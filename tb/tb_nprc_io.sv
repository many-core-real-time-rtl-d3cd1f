// End-to-end test of the NPRC-I/O top level at reduced size (6 router
// ports, 3 controllers). Processors are represented by the test driving
// the router home ports.
//  1. The I/O-Ring is configured over APB: router port 0 -> controller 2,
//     port 3 -> controller 0, port 5 -> controller 1; port 1 stays unlinked.
//  2. Through its router port, each controller receives a periodic request,
//     a time slot table (periodic row, HRT budget row, free row) and a run
//     command.
//  3. Sporadic HRT and SRT read requests are sent from the router ports,
//     including a burst that fills an SRT pool and an HRT request timed
//     just before an HRT row.
//  4. At run-time controller 2 is moved from router port 0 to port 4, and
//     more sporadic requests are sent through port 4.
// Checked: every answer appears at the router port linked to the answering
// controller at that moment (the device model puts its controller number
// in the answer), the number of answers equals the number of read
// operations the devices executed, an unlinked port is held off, and each
// mechanism happened at least once: ring reconfiguration, periodic start,
// HRT budget use, free-time sporadic, held-back sporadic, full-pool
// back-pressure, unlinked-port hold. No time slot row may be missed.
module tb_nprc_io;
  import nprc_pkg::*;
  localparam int unsigned NS = 6, NC = 3, TDIV = 8, HP = 200, PD = 8;
  logic clk = 0, rst_n = 0;
  logic [11:0] paddr = 0; logic psel = 0, penable = 0, pwrite = 0;
  logic [31:0] pwdata = 0, prdata; logic pready, pslverr;
  logic  rq_v [NS], rq_r [NS], rs_v [NS], rs_r [NS];
  flit_t rq_f [NS], rs_f [NS];
  logic  sclk [NC], cs_n [NC], mosi [NC], miso [NC];
  logic [31:0] time_now;
  logic  linked [NS];
  logic  e_p [NC], e_h [NC], e_f [NC], e_d [NC], e_o [NC], e_full [NC];
  logic [31:0] rxw [NC]; logic fdone [NC]; logic [15:0] frames [NC];
  int checks = 0, failures = 0;

  nprc_io #(.N_SUB(NS), .N_CC(NC), .P_MEM_WORDS(256), .SHADOW_DEPTH(4), .POOL_DEPTH(PD),
            .N_SLOTS(16), .SPI_CLK_DIV(2), .TICK_DIV(TDIV)) dut (
    .clk, .rst_n, .paddr, .psel, .penable, .pwrite, .pwdata, .prdata, .pready, .pslverr,
    .rt_req_valid(rq_v), .rt_req_ready(rq_r), .rt_req_flit(rq_f),
    .rt_resp_valid(rs_v), .rt_resp_ready(rs_r), .rt_resp_flit(rs_f),
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .time_now, .ring_linked(linked),
    .ev_p_start(e_p), .ev_hrt_slot(e_h), .ev_spor_free(e_f), .ev_defer(e_d),
    .ev_overrun(e_o), .ev_pool_full(e_full));

  for (genvar c = 0; c < NC; c++) begin : g_dev
    spi_dev_model #(.DEV_ID(8'(c))) dev (.clk, .rst_n, .sclk(sclk[c]), .cs_n(cs_n[c]),
      .mosi(mosi[c]), .miso(miso[c]), .rx_word(rxw[c]), .frame_done(fdone[c]), .frames(frames[c]));
  end

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- ring configuration as the test believes it to be
  logic [7:0] cfg [NS];
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(posedge clk); #1 psel = 0; penable = 0;
  endtask
  int n_reconf = 0;
  task automatic configure();
    for (int r = 0; r < (NS + 3) / 4; r++) begin
      logic [31:0] w = '1;
      for (int b = 0; b < 4; b++) if (4 * r + b < NS) w[8*b +: 8] = cfg[4*r + b];
      apb_write(12'(4 * r), w);
    end
    n_reconf++;
  endtask
  function automatic int port_of(input int c);
    for (int s = 0; s < NS; s++) if (cfg[s] == 8'(c)) return s;
    return -1;
  endfunction

  // ---- router-side packet driver, one packet at a time per port
  task automatic send(input int s, input logic [31:0] d [$]);
    for (int i = 0; i < d.size(); i++) begin
      @(negedge clk);
      rq_v[s] = 1; rq_f[s] = '{last: (i == d.size() - 1), data: d[i]};
      @(posedge clk);
      while (!rq_r[s]) @(posedge clk);
      #1;
    end
    rq_v[s] = 0;
  endtask

  // ---- monitors
  int n_resp = 0, n_reads = 0, n_p = 0, n_h = 0, n_f = 0, n_d = 0, n_o = 0, n_full = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) if (rs_v[s] && rs_r[s]) begin
      n_resp++;
      check(rs_f[s].data[31:24] == 8'hA5 && cfg[s] == rs_f[s].data[23:16],
            $sformatf("answer %h at router port %0d linked to controller %0d", rs_f[s].data, s, cfg[s]));
    end
    for (int c = 0; c < NC; c++) begin
      if (fdone[c] && rxw[c][31]) n_reads++;
      if (e_p[c]) n_p++;
      if (e_h[c]) n_h++;
      if (e_f[c]) n_f++;
      if (e_d[c]) n_d++;
      if (e_o[c]) n_o++;
      if (e_full[c]) n_full++;
    end
  end

  task automatic init_cc(input int c);
    logic [31:0] pk [$];
    tst_entry_t row [3];
    logic [31:0] op1, op2;
    int s;
    s = port_of(c);
    op1 = 32'h8100_0001 | (32'(c) << 16);
    op2 = 32'h8100_0002 | (32'(c) << 16);
    pk = {32'h1000_0000, 32'd2, op1, op2}; send(s, pk);
    row[0] = '{typ: SLOT_P,    req_id: 14'h000, start: 16'(10 + 5 * c)};
    row[1] = '{typ: SLOT_HRT,  req_id: 14'h000, start: 16'd80};
    row[2] = '{typ: SLOT_FREE, req_id: 14'h000, start: 16'd100};
    pk = {32'h2000_0000};
    for (int i = 0; i < 3; i++) pk.push_back(32'(row[i]));
    send(s, pk);
  endtask

  initial begin
    logic [31:0] pk [$];
    int n_hold = 0;
    for (int s = 0; s < NS; s++) begin rq_v[s] = 0; rq_f[s] = '0; rs_r[s] = 1; end
    for (int s = 0; s < NS; s++) cfg[s] = 8'hFF;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // 1. ring configuration
    cfg[0] = 8'd2; cfg[3] = 8'd0; cfg[5] = 8'd1;
    configure();
    @(posedge clk); #1;
    check(linked[0] && linked[3] && linked[5] && !linked[1], "links after configuration");
    // unlinked port holds its request
    rq_v[1] = 1; rq_f[1] = '{last: 1, data: 32'h4000_0000};
    repeat (4) begin @(posedge clk); #1; if (!rq_r[1]) n_hold++; end
    rq_v[1] = 0;
    check(n_hold == 4, "unlinked port held off");
    // 2. initialise all controllers, then start them together
    for (int c = 0; c < NC; c++) init_cc(c);
    for (int c = 0; c < NC; c++) begin
      pk = {32'h4103_0000 + 32'(HP)}; send(port_of(c), pk);
    end
    // 3. sporadic traffic
    repeat (100) @(posedge clk);
    pk = {32'h3000_0002};
    for (int i = 0; i < PD + 3; i++) pk.push_back(32'h8E00_0000 + 32'(i));
    send(port_of(0), pk);                                       // fills controller 0's SRT pool
    pk = {32'h3100_0004, 32'h8F00_0001}; send(port_of(1), pk);  // HRT to controller 1
    pk = {32'h3000_0001, 32'h8F00_0002}; send(port_of(2), pk);  // SRT to controller 2
    wait (dut.g_cc[1].u_cc.u_sched.slot_time == 16'd70);
    pk = {32'h3100_0006, 32'h8F00_0003}; send(port_of(1), pk);  // HRT just before the HRT row
    // 4. move controller 2 from router port 0 to port 4 at run-time
    wait (time_now > 32'(HP + 20));
    wait (cs_n[2]);
    cfg[0] = 8'hFF; cfg[4] = 8'd2;
    configure();
    @(posedge clk); #1;
    check(linked[4] && !linked[0], "controller 2 moved to router port 4");
    pk = {32'h3000_0003, 32'h8F00_0004, 32'h8F00_0005}; send(4, pk);
    wait (time_now > 32'(3 * HP));
    for (int c = 0; c < NC; c++) begin
      pk = {32'h4003_0000 + 32'(HP)}; send(port_of(c), pk);
    end
    repeat (400) @(posedge clk);
    check(n_resp == n_reads, $sformatf("%0d answers for %0d read operations", n_resp, n_reads));
    // periodic: 2 reads x 3 controllers x 3 hyper-periods; sporadic reads: 11 + 3 + 2
    check(n_reads == 18 + 16, $sformatf("%0d read operations executed", n_reads));
    check(n_p == 9, $sformatf("%0d periodic starts", n_p));
    check(n_reconf >= 2, "ring reconfigured at run-time");
    check(n_h > 0, "HRT budget used");
    check(n_f > 0, "free-time sporadic");
    check(n_d > 0, "sporadic held back");
    check(n_full > 0, "full pool back-pressure");
    check(n_hold > 0, "unlinked port held off");
    check(n_o == 0, "no time slot row missed");
    $display("reconfig=%0d periodic=%0d hrt_budget=%0d free=%0d held=%0d pool_full=%0d unlinked_hold=%0d answers=%0d",
             n_reconf, n_p, n_h, n_f, n_d, n_full, n_hold, n_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
