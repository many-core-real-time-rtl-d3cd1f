// Self-checking test of cc_loader: sends P-space, time-slot-table,
// sporadic and control packets and checks every write, every pool push
// (class, priority and operation), the control registers, and that a full
// pool stalls the port without losing or repeating a request.
module tb_cc_loader;
  import nprc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  flit_t in_flit = '0;
  logic p_wr_en; logic [11:0] p_wr_addr; logic [31:0] p_wr_data;
  logic t_wr_en; logic [5:0] t_wr_idx; tst_entry_t t_wr_data;
  logic hrt_push, srt_push, hrt_ready = 1, srt_ready = 1;
  spor_req_t push_data;
  logic run; logic [15:0] hp_len; logic [6:0] n_slots;
  int checks = 0, failures = 0;

  cc_loader #(.P_AW(12), .T_AW(6)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_flit,
    .p_wr_en, .p_wr_addr, .p_wr_data, .t_wr_en, .t_wr_idx, .t_wr_data,
    .hrt_push, .hrt_ready, .srt_push, .srt_ready, .push_data, .run, .hp_len, .n_slots);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // observed side effects, in order
  logic [63:0] seen [$];
  always @(posedge clk) begin
    if (p_wr_en)             seen.push_back({4'h1, 4'h0, 12'h0, 12'(p_wr_addr), p_wr_data});
    if (t_wr_en)             seen.push_back({4'h2, 4'h0, 18'h0, 6'(t_wr_idx), 32'(t_wr_data)});
    if (hrt_push && hrt_ready) seen.push_back({4'h3, 4'h1, 16'h0, push_data.prio, push_data.op});
    if (srt_push && srt_ready) seen.push_back({4'h3, 4'h0, 16'h0, push_data.prio, push_data.op});
  end
  logic [63:0] expct [$];

  task automatic send(input logic [31:0] d [$]);
    for (int i = 0; i < d.size(); i++) begin
      @(negedge clk);
      in_valid = 1; in_flit = '{last: (i == d.size() - 1), data: d[i]};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
  endtask

  initial begin
    logic [31:0] pk [$];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    check(!run && n_slots == 0, "control reset");
    // P-space write of 4 words at 0x123
    pk = {32'h1000_0123, 32'hAAAA_0001, 32'hAAAA_0002, 32'hAAAA_0003, 32'hAAAA_0004};
    for (int i = 0; i < 4; i++) expct.push_back({4'h1, 4'h0, 12'h0, 12'h123 + 12'(i), 32'hAAAA_0001 + 32'(i)});
    send(pk);
    // time slot table rows 5 and 6
    pk = {32'h2000_0005, 32'h4000_0A00, 32'h8000_0D00};
    expct.push_back({4'h2, 4'h0, 18'h0, 6'd5, 32'h4000_0A00});
    expct.push_back({4'h2, 4'h0, 18'h0, 6'd6, 32'h8000_0D00});
    send(pk);
    // SRT sporadic, priority 7, two operations
    pk = {32'h3000_0007, 32'h8000_0011, 32'h0000_0022};
    expct.push_back({4'h3, 4'h0, 16'h0, 8'd7, 32'h8000_0011});
    expct.push_back({4'h3, 4'h0, 16'h0, 8'd7, 32'h0000_0022});
    send(pk);
    // HRT sporadic, priority 200, with the HRT pool full for a while
    hrt_ready = 0;
    fork
      begin
        pk = {32'h3100_00C8, 32'h8000_0033};
        send(pk);
      end
      begin
        repeat (8) begin @(posedge clk); #1; check(!hrt_push || !in_ready, "stall while pool full"); end
        hrt_ready = 1;
      end
    join
    expct.push_back({4'h3, 4'h1, 16'h0, 8'd200, 32'h8000_0033});
    // control: run, 3 slots, hyper-period 0x1000
    pk = {32'h4103_1000};
    send(pk);
    @(posedge clk); #1;
    check(run && n_slots == 7'd3 && hp_len == 16'h1000, "control registers");
    repeat (3) @(posedge clk);
    check(seen.size() == expct.size(), $sformatf("%0d effects, expected %0d", seen.size(), expct.size()));
    for (int i = 0; i < expct.size() && i < seen.size(); i++)
      check(seen[i] == expct[i], $sformatf("effect %0d: %h expected %h", i, seen[i], expct[i]));
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
