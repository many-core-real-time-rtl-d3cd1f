// Self-checking test of p_space: writes several periodic requests into the
// memory, fetches them in a random order and checks that each request's
// operations come out of the shadow buffer complete and in order, that
// `loaded` rises n + 3 cycles after the fetch, that fetches are refused
// while the shadow buffer is not empty, and that over-long requests are cut
// to the shadow buffer depth.
module tb_p_space;
  localparam int unsigned W = 256, SD = 8, AW = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = 0;
  logic [31:0] wr_data = 0;
  logic fetch_req = 0, fetch_ready, loaded;
  logic [AW-1:0] fetch_id = 0;
  logic sh_valid, sh_pop = 0;
  logic [31:0] sh_op;
  int checks = 0, failures = 0;

  p_space #(.MEM_WORDS(W), .SHADOW_DEPTH(SD), .AW(AW)) dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .fetch_req, .fetch_id, .fetch_ready,
    .loaded, .sh_valid, .sh_op, .sh_pop);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // request r lives at address 32*r with r+1 operations (request 7: 12,
  // more than the shadow buffer holds); operation k of request r is
  // {r, k, 16'hBEEF}
  function automatic int nops(input int r); return (r == 7) ? 12 : r + 1; endfunction
  function automatic logic [31:0] opw(input int r, input int k);
    return {8'(r), 8'(k), 16'hBEEF};
  endfunction

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = d;
    @(posedge clk); #1 wr_en = 0;
  endtask

  task automatic fetch_and_drain(input int r);
    int cyc, n, got;
    n = (nops(r) > SD) ? SD : nops(r);
    @(negedge clk);
    check(fetch_ready, "fetch_ready when idle and empty");
    fetch_req = 1; fetch_id = AW'(32 * r);
    @(posedge clk); #1 fetch_req = 0;
    cyc = 1;
    while (!loaded) begin @(posedge clk); #1; if (!loaded) cyc++; end
    check(cyc == n + 3, $sformatf("request %0d loaded after %0d cycles, expected %0d", r, cyc, n + 3));
    check(!fetch_ready, "no fetch while shadow buffer holds a request");
    got = 0;
    while (sh_valid) begin
      check(sh_op == opw(r, got), $sformatf("req %0d op %0d = %h", r, got, sh_op));
      @(negedge clk) sh_pop = 1;
      @(posedge clk); #1 sh_pop = 0;
      got++;
    end
    check(got == n, $sformatf("request %0d gave %0d operations, expected %0d", r, got, n));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 8; r++) begin
      wr(32 * r, 32'(nops(r)));
      for (int k = 0; k < nops(r); k++) wr(32 * r + 1 + k, opw(r, k));
    end
    fetch_and_drain(3);
    fetch_and_drain(0);
    fetch_and_drain(7);
    for (int i = 0; i < 6; i++) fetch_and_drain($urandom_range(0, 6));
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
