// End-to-end test of one NPRC-CC with an SPI device model.
// Initialisation packets load two periodic requests into P-space and a
// four-row time slot table (periodic, HRT budget, periodic, free) and
// start the controller; sporadic HRT and SRT requests then arrive over the
// manager port, one burst large enough to fill the SRT pool. Over three
// hyper-periods the test checks that
//  * every periodic request starts at its row's start time,
//  * the device receives exactly the expected operations (each periodic
//    operation once per hyper-period, each sporadic operation once),
//  * every read operation's answer comes back on the response path, in
//    device order and with the device's data,
//  * every mechanism occurred: periodic start, HRT budget use, free-time
//    sporadic, held-back sporadic, full pool back-pressure; no overrun.
module tb_nprc_cc;
  import nprc_pkg::*;
  localparam int unsigned TDIV = 8, HP = 200, PD = 8;
  logic clk = 0, rst_n = 0;
  logic tick; logic [31:0] now;
  logic req_valid = 0, req_ready; flit_t req_flit = '0;
  logic resp_valid, resp_ready = 1; flit_t resp_flit;
  logic sclk, cs_n, mosi, miso;
  logic ev_p_start, ev_hrt_slot, ev_spor_free, ev_defer, ev_overrun, ev_pool_full;
  logic [31:0] rx_word; logic frame_done; logic [15:0] frames;
  int checks = 0, failures = 0;

  global_timer #(.TICK_DIV(TDIV)) u_tmr (.clk, .rst_n, .tick, .now);
  nprc_cc #(.P_MEM_WORDS(256), .SHADOW_DEPTH(4), .POOL_DEPTH(PD), .N_SLOTS(16),
            .SPI_CLK_DIV(2), .TICK_DIV(TDIV)) dut (
    .clk, .rst_n, .tick, .req_valid, .req_ready, .req_flit, .resp_valid, .resp_ready, .resp_flit,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .ev_p_start, .ev_hrt_slot, .ev_spor_free, .ev_defer, .ev_overrun, .ev_pool_full);
  spi_dev_model #(.DEV_ID(8'h77)) dev (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso,
    .rx_word, .frame_done, .frames);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic send(input logic [31:0] d [$]);
    for (int i = 0; i < d.size(); i++) begin
      @(negedge clk);
      req_valid = 1; req_flit = '{last: (i == d.size() - 1), data: d[i]};
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      #1;
    end
    req_valid = 0;
  endtask

  // ---- bookkeeping
  int n_ops_dev [logic [31:0]];     // operations seen by the device
  logic [31:0] resp_expect [$];     // answers expected, in device order
  logic [31:0] resp_got [$];        // answers received
  int n_p = 0, n_hrt = 0, n_free = 0, n_defer = 0, n_full = 0, n_over = 0, n_resp = 0;
  logic [15:0] p_starts [2] = '{16'd10, 16'd120};

  always @(posedge clk) if (rst_n) begin
    if (frame_done) begin
      n_ops_dev[rx_word] = n_ops_dev.exists(rx_word) ? n_ops_dev[rx_word] + 1 : 1;
      if (rx_word[31]) resp_expect.push_back({8'hA5, 8'h77, frames - 16'd1});
    end
    if (resp_valid && resp_ready) begin
      n_resp++;
      resp_got.push_back(resp_flit.data);
      check(resp_flit.last, "response is a one-flit packet");
    end
    if (ev_p_start) begin
      n_p++;
      check(dut.u_sched.slot_time == p_starts[0] || dut.u_sched.slot_time == p_starts[1],
            $sformatf("periodic request starts at tick %0d", dut.u_sched.slot_time));
    end
    if (ev_hrt_slot)  n_hrt++;
    if (ev_spor_free) n_free++;
    if (ev_defer)     n_defer++;
    if (ev_pool_full) n_full++;
    if (ev_overrun)   n_over++;
  end

  logic [31:0] spor_ops [$];

  initial begin
    logic [31:0] pk [$];
    tst_entry_t  row [4];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // periodic request A at 0x00: two reads; request B at 0x10: one write
    pk = {32'h1000_0000, 32'd2, 32'h8A00_0001, 32'h8A00_0002}; send(pk);
    pk = {32'h1000_0010, 32'd1, 32'h0B00_0001};                send(pk);
    // time slot table
    row[0] = '{typ: SLOT_P,    req_id: 14'h000, start: 16'd10};
    row[1] = '{typ: SLOT_HRT,  req_id: 14'h000, start: 16'd60};
    row[2] = '{typ: SLOT_P,    req_id: 14'h010, start: 16'd120};
    row[3] = '{typ: SLOT_FREE, req_id: 14'h000, start: 16'd160};
    pk = {32'h2000_0000};
    for (int i = 0; i < 4; i++) pk.push_back(32'(row[i]));
    send(pk);
    // run, 4 rows, hyper-period HP
    pk = {32'h4104_0000 + 32'(HP)}; send(pk);
    // sporadic requests
    repeat (200) @(posedge clk);
    pk = {32'h3100_0005, 32'h8C00_0001}; send(pk);            // HRT, prio 5
    spor_ops.push_back(32'h8C00_0001);
    pk = {32'h3000_0003};                                      // SRT burst, prio 3
    for (int i = 0; i < PD + 4; i++) begin pk.push_back(32'h8D00_0000 + 32'(i)); spor_ops.push_back(32'h8D00_0000 + 32'(i)); end
    send(pk);
    // second HRT request arrives too close to the HRT row for free time
    wait (now > 32'(HP));
    wait (dut.u_sched.slot_time == 16'd50);
    pk = {32'h3100_0009, 32'h0C00_0002}; send(pk);            // HRT write, prio 9
    spor_ops.push_back(32'h0C00_0002);
    // run three hyper-periods in all, then stop
    wait (now >= 32'(3 * HP + 2));
    pk = {32'h4004_0000 + 32'(HP)}; send(pk);
    repeat (300) @(posedge clk);
    // device saw every operation the expected number of times
    check(n_ops_dev.exists(32'h8A00_0001) && n_ops_dev[32'h8A00_0001] == 3, "request A op 1 three times");
    check(n_ops_dev.exists(32'h8A00_0002) && n_ops_dev[32'h8A00_0002] == 3, "request A op 2 three times");
    check(n_ops_dev.exists(32'h0B00_0001) && n_ops_dev[32'h0B00_0001] == 3, "request B three times");
    foreach (spor_ops[i])
      check(n_ops_dev.exists(spor_ops[i]) && n_ops_dev[spor_ops[i]] == 1, $sformatf("sporadic %h once", spor_ops[i]));
    check(n_ops_dev.num() == 3 + spor_ops.size(), "no other operation");
    check(n_resp == 6 + PD + 5 && resp_expect.size() == n_resp, $sformatf("%0d responses", n_resp));
    foreach (resp_got[i])
      check(i < resp_expect.size() && resp_got[i] == resp_expect[i], $sformatf("response %0d = %h", i, resp_got[i]));
    check(n_p == 6, $sformatf("%0d periodic starts", n_p));
    check(n_hrt > 0, "HRT budget used");
    check(n_free > 0, "free-time sporadic");
    check(n_defer > 0, "sporadic held back");
    check(n_full > 0, "pool full back-pressure");
    check(n_over == 0, "no overrun");
    $display("periodic=%0d hrt_budget=%0d free=%0d held=%0d pool_full=%0d responses=%0d",
             n_p, n_hrt, n_free, n_defer, n_full, n_resp);
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
