// Self-checking test of global_timer: with TICK_DIV = 5 the tick must be
// high exactly every fifth cycle after reset and `now` must count ticks.
module tb_global_timer;
  localparam int unsigned DIV = 5;
  logic clk = 0, rst_n = 0;
  logic tick;
  logic [31:0] now;
  int checks = 0, failures = 0;
  int k = 0;

  global_timer #(.TICK_DIV(DIV)) dut (.clk, .rst_n, .tick, .now);

  always #5 clk = !clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (200) begin
      @(negedge clk);
      checks++;
      if (tick !== ((k % DIV) == DIV - 1) || now !== 32'(k / DIV)) begin
        failures++;
        $display("mismatch at cycle %0d: tick=%0b now=%0d", k, tick, now);
      end
      @(posedge clk);
      k++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
