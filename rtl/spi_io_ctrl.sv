// I/O controller: a FIFO-less SPI master (mode 0) executing one I/O
// operation at a time.
//
// The NPRC-CC is agnostic of the protocol of the I/O controller behind it;
// SPI is used here as the concrete example, and the controller keeps no
// request FIFO, because requests wait in the P-space and S-space where they
// can be prioritised. An accepted 32-bit operation word is shifted out MSB
// first on `mosi` while `cs_n` is low; `miso` is sampled on each rising
// `sclk` edge. Bit 31 of the operation is the read flag: for a read the
// 32 bits received are offered on the response port, which is a single
// pass-through register (no queue). A new operation is refused while that
// register still holds an undelivered answer.
// Timing: `sclk` toggles every CLK_DIV cycles, so an operation accepted at
// edge t releases `cs_n` and raises `op_ready` again at edge
// t + OP_CYCLES, OP_CYCLES = 64*CLK_DIV; the answer is valid from then on.
module spi_io_ctrl
  import nprc_pkg::*;
#(
  parameter int unsigned CLK_DIV = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // operation in
  input  logic        op_valid,
  output logic        op_ready,
  input  logic [31:0] op,
  output logic        busy,
  // response out (pass-through)
  output logic        resp_valid,
  input  logic        resp_ready,
  output logic [31:0] resp_data,
  // SPI pins
  output logic        sclk,
  output logic        cs_n,
  output logic        mosi,
  input  logic        miso
);
  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [DW-1:0] div;
  logic [6:0]    edges;      // sclk edges done in this operation
  logic [31:0]   tx, rx;
  logic          rd;

  assign busy     = !cs_n;
  assign op_ready = cs_n && !resp_valid;
  assign mosi     = tx[31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_n       <= 1'b1;
      sclk       <= 1'b0;
      div        <= '0;
      edges      <= '0;
      tx         <= '0;
      rx         <= '0;
      rd         <= 1'b0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
    end else begin
      if (resp_valid && resp_ready) resp_valid <= 1'b0;
      if (cs_n) begin
        if (op_valid && op_ready) begin
          cs_n  <= 1'b0;
          tx    <= op;
          rd    <= op[OP_READ_BIT];
          div   <= '0;
          edges <= '0;
        end
      end else if (div == DW'(CLK_DIV - 1)) begin
        div  <= '0;
        sclk <= !sclk;
        edges <= edges + 1'b1;
        if (!sclk) begin
          rx <= {rx[30:0], miso};            // rising edge: sample
        end else begin
          tx <= {tx[30:0], 1'b0};            // falling edge: shift
        end
        if (edges == 7'd63) begin
          cs_n <= 1'b1;
          if (rd) begin
            resp_valid <= 1'b1;
            resp_data  <= rx;                // last bit sampled one edge earlier
          end
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  // An answer is held until the response path takes it.
  a_resp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid && !resp_ready |=> resp_valid && $stable(resp_data));
endmodule
