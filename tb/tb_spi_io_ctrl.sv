// Self-checking test of spi_io_ctrl against an SPI device model: every
// operation word must arrive at the device intact, reads must return the
// device's answer, writes must return nothing, each operation must take
// 64*CLK_DIV cycles, and a pending answer must block the next operation.
module tb_spi_io_ctrl;
  import nprc_pkg::*;
  localparam int unsigned DIV = 2;
  logic clk = 0, rst_n = 0;
  logic op_valid = 0, op_ready, busy;
  logic [31:0] op = 0;
  logic resp_valid, resp_ready = 1;
  logic [31:0] resp_data;
  logic sclk, cs_n, mosi, miso;
  logic [31:0] rx_word;
  logic frame_done;
  logic [15:0] frames;
  int checks = 0, failures = 0;

  spi_io_ctrl #(.CLK_DIV(DIV)) dut (
    .clk, .rst_n, .op_valid, .op_ready, .op, .busy,
    .resp_valid, .resp_ready, .resp_data, .sclk, .cs_n, .mosi, .miso);
  spi_dev_model #(.DEV_ID(8'h3C)) dev (
    .clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .rx_word, .frame_done, .frames);

  always #5 clk = !clk;

  // response monitor
  int          n_resp = 0;
  logic [31:0] last_resp;
  always @(posedge clk) if (resp_valid && resp_ready) begin n_resp++; last_resp = resp_data; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_op(input logic [31:0] w, input logic expect_resp);
    int cyc, r0;
    logic [15:0] fno;
    fno = frames;
    r0  = n_resp;
    @(negedge clk);
    op = w; op_valid = 1;
    @(posedge clk);               // accepted here (op_ready is high)
    check(op_ready, "op_ready high when idle");
    @(negedge clk) op_valid = 0;
    cyc = 1;
    while (!cs_n) begin @(posedge clk); #1; if (!cs_n) cyc++; end
    check(cyc == 64 * DIV, $sformatf("operation took %0d cycles, expected %0d", cyc, 64 * DIV));
    repeat (2) @(posedge clk);
    check(rx_word == w, $sformatf("device got %h expected %h", rx_word, w));
    if (expect_resp) begin
      check(resp_valid || n_resp == r0 + 1, "read gives response");
      check((resp_valid ? resp_data : last_resp) == {8'hA5, 8'h3C, fno},
            $sformatf("response %h", resp_valid ? resp_data : last_resp));
    end else begin
      check(!resp_valid && n_resp == r0, "write gives no response");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(op_ready && cs_n && !busy, "idle after reset");
    run_op(32'h1234_5678, 0);
    run_op(32'h8000_00FF, 1);
    // block the response path: the next operation must wait
    resp_ready = 0;
    @(negedge clk);
    run_op(32'hC0DE_0001, 1);
    @(negedge clk);
    op = 32'h0000_0042; op_valid = 1;
    repeat (5) begin @(posedge clk); #1; check(!busy && !op_ready, "blocked while answer pending"); end
    check(resp_valid && resp_data == {8'hA5, 8'h3C, 16'd2}, "answer held");
    @(negedge clk) resp_ready = 1;
    @(posedge clk); #1;
    check(!resp_valid, "answer taken");
    @(posedge clk); #1;
    check(busy, "next operation starts");
    op_valid = 0;
    for (int i = 0; i < 6; i++) begin
      logic [31:0] w;
      w = $urandom;
      wait (op_ready);
      run_op(w, w[31]);
      @(posedge clk);
      if (resp_valid) @(posedge clk);
    end
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
