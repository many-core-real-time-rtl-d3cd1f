// Test model of an SPI I/O device (mode 0, 32-bit frames), sampled in the
// system clock domain; the master's SCLK half period must be at least two
// clock cycles. While cs_n is low it shifts out `reply` MSB first (the
// first bit is presented when cs_n falls, each next one after a falling
// SCLK edge) and shifts in MOSI on each rising edge. When cs_n rises it
// reports the received frame on `rx_word` with a one-cycle `frame_done`.
// `reply` is {8'hA5, DEV_ID, frame number}, so a test can predict every
// answer.
module spi_dev_model #(
  parameter logic [7:0] DEV_ID = 8'h00
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  output logic [31:0] rx_word,
  output logic        frame_done,
  output logic [15:0] frames
);
  logic        sclk_q, cs_q;
  logic [31:0] tx, rx;

  assign miso = tx[31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q <= 1'b0; cs_q <= 1'b1; tx <= '0; rx <= '0;
      rx_word <= '0; frame_done <= 1'b0; frames <= '0;
    end else begin
      sclk_q     <= sclk;
      cs_q       <= cs_n;
      frame_done <= 1'b0;
      if (cs_q && !cs_n) begin
        tx <= {8'hA5, DEV_ID, frames};
      end else if (!cs_n && sclk_q && !sclk) begin
        tx <= {tx[30:0], 1'b0};
      end
      if (!cs_n && !sclk_q && sclk) rx <= {rx[30:0], mosi};
      if (!cs_q && cs_n) begin
        rx_word    <= rx;
        frame_done <= 1'b1;
        frames     <= frames + 1'b1;
      end
    end
  end
endmodule
