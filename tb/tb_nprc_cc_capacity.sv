// Capacity workload for one NPRC-CC at its default size: the controller is
// stopped while 50 HRT and 50 SRT sporadic operations (the 100 buffered I/O
// operations of the evaluated configuration) are sent with random
// priorities. The controller is then started with five HRT budgets two
// ticks apart, too close for any sporadic operation to fit between them.
// The device must receive the five most urgent HRT operations first and
// then the rest in priority order: higher priority first, HRT before SRT on
// equal priority, arrival order within a pool. A 101st operation must be
// held off until free time takes an SRT operation out of the full pool.
// Every read must be answered.
module tb_nprc_cc_capacity;
  import nprc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tick; logic [31:0] now;
  logic req_valid = 0, req_ready; flit_t req_flit = '0;
  logic resp_valid, resp_ready = 1; flit_t resp_flit;
  logic sclk, cs_n, mosi, miso;
  logic ev_p_start, ev_hrt_slot, ev_spor_free, ev_defer, ev_overrun, ev_pool_full;
  logic [31:0] rx_word; logic frame_done; logic [15:0] frames;
  int checks = 0, failures = 0;

  global_timer u_tmr (.clk, .rst_n, .tick, .now);
  nprc_cc dut (
    .clk, .rst_n, .tick, .req_valid, .req_ready, .req_flit, .resp_valid, .resp_ready, .resp_flit,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .ev_p_start, .ev_hrt_slot, .ev_spor_free, .ev_defer, .ev_overrun, .ev_pool_full);
  spi_dev_model #(.DEV_ID(8'h01)) dev (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso,
    .rx_word, .frame_done, .frames);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // one flit; returns whether it was accepted within `patience` cycles
  task automatic put(input logic [31:0] d, input bit last, input int patience, output bit ok);
    @(negedge clk);
    req_valid = 1; req_flit = '{last: last, data: d};
    ok = 0;
    for (int i = 0; i < patience && !ok; i++) begin
      @(posedge clk);
      if (req_ready) ok = 1;
    end
    #1 req_valid = 0;
  endtask

  logic [31:0] order [$];      // expected device order
  logic [31:0] seen  [$];
  int n_resp = 0;
  always @(posedge clk) if (rst_n) begin
    if (frame_done) seen.push_back(rx_word);
    if (resp_valid) n_resp++;
  end

  initial begin
    logic [31:0] hops [$], sops [$];
    bit ok;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 50; i++) begin
      hops.push_back({1'(i % 2), 7'h10, 8'($urandom_range(0, 15)), 16'(i)});
      sops.push_back({1'(i % 3 == 0), 7'h20, 8'($urandom_range(0, 15)), 16'(i)});
    end
    // one HRT packet and one SRT packet; each operation carries its priority
    foreach (hops[i]) begin
      put(32'h3100_0000 | 32'(hops[i][23:16]), 0, 10, ok); check(ok, "HRT header accepted");
      put(hops[i], 1, 10, ok);                              check(ok, "HRT operation accepted");
    end
    foreach (sops[i]) begin
      put(32'h3000_0000 | 32'(sops[i][23:16]), 0, 10, ok); check(ok, "SRT header accepted");
      put(sops[i], 1, 10, ok);                              check(ok, "SRT operation accepted");
    end
    check(dut.hrt_count == 50 && dut.srt_count == 50, "100 operations buffered");
    // table: HRT budgets at ticks 0, 2, 4, 6 and 8. The gaps are shorter
    // than one operation, so sporadic work waits until after tick 8.
    put(32'h2000_0000, 0, 10, ok);
    for (int r = 0; r < 5; r++) begin
      put(32'({SLOT_HRT, 14'h0, 16'(2 * r)}), r == 4, 10, ok);
      check(ok, "table row accepted");
    end
    // expected order: each HRT budget takes the most urgent HRT operation,
    // then free time serves both pools by priority, HRT first on ties
    for (int r = 0; r < 5; r++) begin
      int top;
      top = 0;
      foreach (hops[i]) if (hops[i][23:16] > hops[top][23:16]) top = i;
      order.push_back(hops[top]);
      hops.delete(top);
    end
    for (int p = 15; p >= 0; p--) begin
      foreach (hops[i]) if (hops[i][23:16] == 8'(p)) order.push_back(hops[i]);
      foreach (sops[i]) if (sops[i][23:16] == 8'(p)) order.push_back(sops[i]);
    end
    // run, 5 rows, hyper-period 1000 ticks
    put(32'h4105_0000 | 32'd1000, 1, 10, ok);
    check(ok, "control accepted");
    // a 101st operation (SRT, priority 1) is held off while the SRT pool is
    // full, i.e. until free time takes the first SRT operation after tick 8; it then
    // ranks after every remaining operation of priority 1 or more
    put(32'h3000_0001, 0, 10, ok);
    check(ok, "101st header accepted");
    fork
      begin
        put(32'h2001_0BAD, 1, 5000, ok);
        check(ok, "101st operation accepted once an SRT slot frees");
        check(dut.srt_count == 50 && dut.hrt_count == 45 && dut.u_sched.slot_time >= 16'd8,
              "101st taken only after the HRT budgets");
      end
      begin
        repeat (500) @(posedge clk);
        check(ev_pool_full && !req_ready, "101st operation held off");
      end
    join
    begin
      int k = 5;
      while (k < order.size() && order[k][23:16] >= 8'd1) k++;
      order.insert(k, 32'h2001_0BAD);
    end
    wait (seen.size() == order.size());
    repeat (10) @(posedge clk);
    foreach (order[i]) check(seen[i] == order[i], $sformatf("operation %0d: %h expected %h", i, seen[i], order[i]));
    begin
      int reads = 0;
      foreach (order[i]) if (order[i][31]) reads++;
      check(n_resp == reads, $sformatf("%0d answers for %0d reads", n_resp, reads));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
