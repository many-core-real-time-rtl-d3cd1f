// Self-checking test of io_pool: requests pushed with random priorities
// must be taken out in priority order (oldest first among equals), a more
// urgent late arrival must overtake waiting ones, the pool must refuse
// pushes when full, and pushes and takes in the same cycle must lose
// nothing. A reference model in the test keeps the expected queue.
module tb_io_pool;
  import nprc_pkg::*;
  localparam int unsigned D = 8;
  logic clk = 0, rst_n = 0;
  logic push_valid = 0, push_ready, next_valid, take = 0;
  spor_req_t push_data = '0, next_req;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  spor_req_t model [$];
  int seq = 0;

  io_pool #(.DEPTH(D)) dut (.clk, .rst_n, .push_valid, .push_ready, .push_data,
    .next_valid, .next_req, .take, .count);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // The Next register is refreshed from the chain one cycle late, so a
  // request pushed in the previous cycle cannot be the winner yet.
  int fresh = -1;

  // index of the expected winner in the model queue
  function automatic int best();
    int b = -1;
    for (int i = 0; i < model.size(); i++)
      if (int'(model[i].op) != fresh && (b < 0 || model[i].prio > model[b].prio)) b = i;
    return b;
  endfunction

  // one clock cycle with optional push and take
  task automatic cycle(input bit do_push, input logic [7:0] p, input bit do_take);
    int b;
    @(negedge clk);
    push_valid = do_push;
    push_data  = '{prio: p, op: 32'(seq)};
    take       = do_take && next_valid;
    if (take) begin
      b = best();
      check(b >= 0, "Next valid only with an eligible request");
      if (b < 0) b = 0;
      check(next_req == model[b], $sformatf("next %h/%0d expected %h/%0d",
            next_req.op, next_req.prio, model[b].op, model[b].prio));
      model.delete(b);
    end
    fresh = -1;
    if (do_push) begin
      check(push_ready == (model.size() + (take ? 1 : 0) < D), "push_ready matches occupancy");
      if (push_ready) begin model.push_back(push_data); fresh = seq; seq++; end
    end
    @(posedge clk); #1;
    push_valid = 0; take = 0;
    check(int'(count) == model.size(), $sformatf("count %0d expected %0d", count, model.size()));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // fill beyond capacity
    for (int i = 0; i < D + 2; i++) cycle(1, 8'($urandom_range(0, 3)), 0);
    cycle(0, 0, 0);
    // drain, all in priority order
    while (model.size() > 0) begin
      cycle(0, 0, 1);
      if (!next_valid) cycle(0, 0, 0);
    end
    // late urgent arrival overtakes
    cycle(1, 8'd5, 0); cycle(1, 8'd5, 0); cycle(0, 0, 0);
    cycle(1, 8'd9, 0); cycle(0, 0, 0);
    cycle(0, 0, 1);
    // random traffic with simultaneous push and take
    for (int i = 0; i < 400; i++) cycle($urandom_range(0, 1) == 1, 8'($urandom_range(0, 7)), $urandom_range(0, 2) != 0);
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
