// Loader of an NPRC-CC: the receive side of the controller's manager port.
//
// Decodes the packets arriving from the I/O-Ring (see nprc_pkg for the
// command set). Sporadic requests issued by processors at run-time are
// pushed into the HRT or the SRT pool, one pool entry per payload flit, all
// with the header's priority; the port is held (ready low) while the target
// pool is full, so nothing is lost. Initialisation packets sent before
// run-time write the P-space memory and the time slot table, and a control
// flit sets the hyper-period length, the number of used time-slot-table
// rows and the run flag. Pushing sporadic requests is the loader's role in
// the architecture; routing the initialisation packets through the same
// decoder is this design's choice.
// Timing: one flit per cycle; a header is consumed in one cycle, each
// payload flit in one cycle unless a pool is full.
module cc_loader
  import nprc_pkg::*;
#(
  parameter int unsigned P_AW = 12,
  parameter int unsigned T_AW = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  // packet input from the manager port
  input  logic            in_valid,
  output logic            in_ready,
  input  flit_t           in_flit,
  // P-space initialisation
  output logic            p_wr_en,
  output logic [P_AW-1:0] p_wr_addr,
  output logic [31:0]     p_wr_data,
  // time slot table initialisation
  output logic            t_wr_en,
  output logic [T_AW-1:0] t_wr_idx,
  output tst_entry_t      t_wr_data,
  // sporadic pools
  output logic            hrt_push,
  input  logic            hrt_ready,
  output logic            srt_push,
  input  logic            srt_ready,
  output spor_req_t       push_data,
  // control registers
  output logic            run,
  output logic [15:0]     hp_len,
  output logic [6:0]      n_slots
);
  logic              in_pkt;      // header seen, payload follows
  cmd_e              cmd;
  logic [15:0]       addr;
  logic              hrt_cls;
  logic [PRIO_W-1:0] prio;

  wire cmd_e hdr_cmd = cmd_e'(in_flit.data[31:28]);

  always_comb begin
    in_ready = 1'b1;
    if (in_pkt && cmd == CMD_SPOR) in_ready = hrt_cls ? hrt_ready : srt_ready;
  end

  wire acc     = in_valid && in_ready;
  wire payload = acc && in_pkt;

  assign p_wr_en   = payload && cmd == CMD_PWRITE;
  assign p_wr_addr = addr[P_AW-1:0];
  assign p_wr_data = in_flit.data;
  assign t_wr_en   = payload && cmd == CMD_TWRITE;
  assign t_wr_idx  = addr[T_AW-1:0];
  assign t_wr_data = tst_entry_t'(in_flit.data);
  assign hrt_push  = payload && cmd == CMD_SPOR && hrt_cls;
  assign srt_push  = payload && cmd == CMD_SPOR && !hrt_cls;
  assign push_data = '{prio: prio, op: in_flit.data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt  <= 1'b0;
      cmd     <= CMD_NOP;
      addr    <= '0;
      hrt_cls <= 1'b0;
      prio    <= '0;
      run     <= 1'b0;
      hp_len  <= 16'hFFFF;
      n_slots <= '0;
    end else if (acc) begin
      if (!in_pkt) begin
        cmd     <= hdr_cmd;
        addr    <= in_flit.data[15:0];
        hrt_cls <= in_flit.data[24];
        prio    <= in_flit.data[PRIO_W-1:0];
        in_pkt  <= !in_flit.last;
        if (hdr_cmd == CMD_CTRL) begin
          run     <= in_flit.data[24];
          n_slots <= in_flit.data[22:16];
          hp_len  <= in_flit.data[15:0];
        end
      end else begin
        addr   <= addr + 1'b1;
        in_pkt <= !in_flit.last;
      end
    end
  end
endmodule
