// Full-size run of the NPRC-I/O top level with every parameter at its
// default (28 router ports, 16 controllers, 1 us timer tick at 100 MHz).
// One complete operation end to end: the I/O-Ring is configured over APB
// (router port 27 -> controller 15, router port 0 -> controller 0),
// controller 15 receives a periodic read request, a time slot table and a
// run command through router port 27, and sporadic read requests are sent
// to both controllers (controller 0 runs with an empty time slot table,
// so all of its time is free). Checked: the periodic request starts at its row in
// each of two hyper-periods, every read executed by a device is answered
// at the router port linked to its controller, and nothing else answers.
module tb_nprc_io_full;
  import nprc_pkg::*;
  localparam int unsigned NS = 28, NC = 16, HP = 20;
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

  nprc_io dut (
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

  logic [7:0] cfg [NS];
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(posedge clk); #1 psel = 0; penable = 0;
  endtask

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

  int n_resp = 0, n_reads = 0, n_p = 0, n_o = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) if (rs_v[s] && rs_r[s]) begin
      n_resp++;
      check(rs_f[s].data[31:24] == 8'hA5 && cfg[s] == rs_f[s].data[23:16],
            $sformatf("answer %h at router port %0d", rs_f[s].data, s));
    end
    for (int c = 0; c < NC; c++) begin
      if (fdone[c] && rxw[c][31]) n_reads++;
      if (e_p[c]) begin
        n_p++;
        check(c == 15 && dut.g_cc[15].u_cc.u_sched.slot_time == 16'd5, "periodic start at its row");
      end
      if (e_o[c]) n_o++;
    end
  end

  initial begin
    logic [31:0] pk [$];
    tst_entry_t row;
    for (int s = 0; s < NS; s++) begin rq_v[s] = 0; rq_f[s] = '0; rs_r[s] = 1; cfg[s] = 8'hFF; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cfg[27] = 8'd15; cfg[0] = 8'd0;
    apb_write(12'h000, 32'hFFFF_FF00);
    apb_write(12'h018, 32'h0FFF_FFFF);
    @(posedge clk); #1;
    check(linked[27] && linked[0], "links configured");
    pk = {32'h1000_0040, 32'd1, 32'h80F0_0001}; send(27, pk);
    row = '{typ: SLOT_P, req_id: 14'h040, start: 16'd5};
    pk = {32'h2000_0000, 32'(row)}; send(27, pk);
    pk = {32'h4101_0000 + 32'(HP)}; send(27, pk);
    pk = {32'h3000_0003, 32'h80F0_0002}; send(27, pk);
    pk = {32'h4100_0000 + 32'(HP)}; send(0, pk);            // controller 0: no reserved rows
    pk = {32'h3100_0001, 32'h8000_0003, 32'h8000_0004}; send(0, pk);
    wait (time_now > 32'(2 * HP + 2));
    pk = {32'h4001_0000 + 32'(HP)}; send(27, pk);
    repeat (400) @(posedge clk);
    check(n_p == 2, $sformatf("%0d periodic starts", n_p));
    check(n_reads == 5, $sformatf("%0d read operations", n_reads));
    check(n_resp == n_reads, $sformatf("%0d answers", n_resp));
    check(n_o == 0, "no row missed");
    $display("periodic=%0d reads=%0d answers=%0d", n_p, n_reads, n_resp);
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
