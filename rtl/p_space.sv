// P-space: store and stage the pre-loaded periodic I/O requests.
//
// Three parts, as in the NPRC-CC architecture: a memory module (a single
// 32-bit wide memory bank plus its controller, which gives the write port
// used at initialisation and the read port used by the fetcher), a fetcher,
// and a shadow buffer. A periodic request is stored as a header word whose
// bits [7:0] give the number of I/O operations, followed by those operation
// words (the header layout is this design's choice). When the scheduler asks
// for request `fetch_id` (the header's word address), the fetcher reads the
// header, then reads each operation and writes it into the shadow buffer,
// i.e. it decomposes the request into I/O operations. `loaded` rises when
// the whole request is in the shadow buffer and stays high until the next
// fetch. Counts larger than SHADOW_DEPTH are cut to SHADOW_DEPTH.
// Timing: memory reads take one cycle; a request of n operations is loaded
// n + 3 cycles after `fetch_req` is accepted. `fetch_ready` is high only
// while the fetcher is idle and the shadow buffer is empty.
module p_space #(
  parameter int unsigned MEM_WORDS    = 4096,
  parameter int unsigned SHADOW_DEPTH = 16,
  parameter int unsigned AW           = $clog2(MEM_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // initialisation writes (from the loader)
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  // fetch request (from the scheduler)
  input  logic          fetch_req,
  input  logic [AW-1:0] fetch_id,
  output logic          fetch_ready,
  output logic          loaded,
  // shadow buffer read side (to the scheduler's multiplexer)
  output logic          sh_valid,
  output logic [31:0]   sh_op,
  input  logic          sh_pop
);
  typedef enum logic [1:0] {F_IDLE, F_HDR, F_OPS} fstate_e;

  logic [31:0]   mem [MEM_WORDS];
  logic [31:0]   rd_q;
  logic          rd_en;
  logic [AW-1:0] rd_addr;

  fstate_e       st;
  logic [AW-1:0] addr;
  logic [7:0]    left;        // operations still to read
  logic          pend;        // a read issued last cycle returns now
  logic          sh_full;
  logic [$clog2(SHADOW_DEPTH+1)-1:0] sh_count;

  // Memory controller: one write port, one synchronous read port.
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_q <= mem[rd_addr];
  end

  assign fetch_ready = (st == F_IDLE) && !sh_valid;

  always_comb begin
    rd_en   = 1'b0;
    rd_addr = addr;
    if (st == F_IDLE && fetch_req && fetch_ready) begin
      rd_en   = 1'b1;
      rd_addr = fetch_id;
    end else if (st == F_OPS && left != 8'd0) begin
      rd_en = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= F_IDLE;
      addr   <= '0;
      left   <= '0;
      pend   <= 1'b0;
      loaded <= 1'b0;
    end else begin
      case (st)
        F_IDLE: if (fetch_req && fetch_ready) begin
          st     <= F_HDR;
          addr   <= fetch_id + 1'b1;
          loaded <= 1'b0;
        end
        F_HDR: begin
          // header word is in rd_q now
          left <= (rd_q[7:0] > 8'(SHADOW_DEPTH)) ? 8'(SHADOW_DEPTH) : rd_q[7:0];
          pend <= 1'b0;
          st   <= F_OPS;
        end
        F_OPS: begin
          pend <= rd_en;
          if (rd_en) begin
            addr <= addr + 1'b1;
            left <= left - 1'b1;
          end
          if (left == 8'd0 && !pend) begin
            st     <= F_IDLE;
            loaded <= 1'b1;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  shadow_fifo #(.DEPTH(SHADOW_DEPTH), .WIDTH(32)) u_shadow (
    .clk, .rst_n,
    .clear   (1'b0),
    .wr_en   (st == F_OPS && pend),
    .wr_data (rd_q),
    .full    (sh_full),
    .rd_valid(sh_valid),
    .rd_pop  (sh_pop),
    .rd_data (sh_op),
    .count   (sh_count)
  );

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (st == F_OPS && pend) |-> !sh_full);
endmodule
