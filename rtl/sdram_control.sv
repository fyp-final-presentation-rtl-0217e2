// Four-port SDRAM frame-buffer controller.
// Two write ports and two read ports, 16 bits each, share one single-data-rate
// SDRAM. Every port has its own clock and a 512-word dual-clock FIFO, so the
// camera side can write and the display side can read in real time while the
// SDRAM runs on its own faster clock. Each port walks a ring of addresses from
// its start address (ADDR) up to MAX_ADDR and back; LOAD returns the port to
// its start address and empties its FIFO (used once per frame).
//
// Scheduling. After the power-up sequence (wait, precharge all, two
// auto-refreshes, mode register: burst length 1, CAS latency CL) the
// controller sits in IDLE. A due refresh always wins. Otherwise the four ports
// are served round robin; a write port asks for service when its FIFO holds at
// least as many words as its next burst moves, a read port when its FIFO has
// room for them. A
// burst opens the row (ACTIVE), issues one READ or WRITE per clock on
// consecutive columns, waits for the last data and closes the row
// (PRECHARGE). A burst is cut short at the end of a row or at the port's
// MAX_ADDR, so it never needs a second row.
//
// Interface: the per-port signals follow one naming pattern for the two write
// ports (index 0 = port 1, 1 = port 2) and the two read ports; the SDRAM pins
// are split into o_dq/o_dq_oe/i_dq instead of a bidirectional bus.
// Addresses are word addresses laid out {bank, row, column}.
// Timing: read data appears on o_rd_data the clock after o_rd_data is
// requested with i_rd (FIFO registered output). o_refresh and o_burst pulse
// once per refresh and per burst, for monitoring.
//
// From the design: four 16-bit ports (2 write, 2 read), FIFO-buffered, with the
// per-port signal set DATA, WR/RD, ADDR, MAX_ADDR, LENGTH, LOAD and CLK.
// Own choices: the SDRAM geometry and timing parameters, burst length 1
// commands issued back to back, the round-robin arbiter and the request rule.
// A read burst overtaken by a LOAD of its port is finished on the bus but its
// words are dropped. A write port's LOAD should come when its data has been
// written (the camera's inter-frame gap): words still in its FIFO are lost.
module sdram_control
  import face_pkg::*;
#(
  parameter int unsigned BA_W         = 2,
  parameter int unsigned ROW_W        = 13,
  parameter int unsigned COL_W        = 10,
  parameter int unsigned DW           = 16,
  parameter int unsigned FIFO_DEPTH   = 512,
  parameter int unsigned CL           = 2,
  parameter int unsigned T_RCD        = 2,
  parameter int unsigned T_RP         = 2,
  parameter int unsigned T_RFC        = 7,
  parameter int unsigned T_MRD        = 2,
  parameter int unsigned REF_INTERVAL = 750,
  parameter int unsigned INIT_WAIT    = 20000,
  localparam int unsigned AW = BA_W + ROW_W + COL_W,
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic                   i_clk,
  input  logic                   i_rst_n,
  // write ports
  input  logic [1:0]             i_wr_clk,
  input  logic [1:0]             i_wr,
  input  logic [1:0][DW-1:0]     i_wr_data,
  input  logic [1:0][AW-1:0]     i_wr_addr,
  input  logic [1:0][AW-1:0]     i_wr_max_addr,
  input  logic [1:0][LW-1:0]     i_wr_length,
  input  logic [1:0]             i_wr_load,
  output logic [1:0]             o_wr_full,
  // read ports
  input  logic [1:0]             i_rd_clk,
  input  logic [1:0]             i_rd,
  output logic [1:0][DW-1:0]     o_rd_data,
  input  logic [1:0][AW-1:0]     i_rd_addr,
  input  logic [1:0][AW-1:0]     i_rd_max_addr,
  input  logic [1:0][LW-1:0]     i_rd_length,
  input  logic [1:0]             i_rd_load,
  output logic [1:0]             o_rd_empty,
  // SDRAM pins
  output logic [ROW_W-1:0]       o_sa,
  output logic [BA_W-1:0]        o_ba,
  output logic                   o_cs_n,
  output logic                   o_ras_n,
  output logic                   o_cas_n,
  output logic                   o_we_n,
  output logic                   o_cke,
  output logic [DW/8-1:0]        o_dqm,
  output logic [DW-1:0]          o_dq,
  output logic                   o_dq_oe,
  input  logic [DW-1:0]          i_dq,
  // status
  output logic                   o_init_done,
  output logic                   o_refresh,
  output logic [3:0]             o_burst
);
  typedef enum logic [3:0] {
    ST_INIT_WAIT, ST_INIT_PRE, ST_INIT_REF1, ST_INIT_REF2, ST_INIT_MRS,
    ST_IDLE, ST_RW, ST_PRE, ST_WAIT
  } state_e;

  state_e     st, nxt;
  sdram_cmd_e cmd;
  logic [15:0] wait_cnt;
  logic [$clog2(INIT_WAIT+1)-1:0] init_cnt;
  logic [$clog2(REF_INTERVAL+1)-1:0] ref_cnt;
  logic        ref_req;

  // ------------------------------------------------------------------ FIFOs
  logic [1:0][DW-1:0] wf_q;
  logic [1:0][LW-1:0] wf_rcount, rf_wcount, wf_wcount_u, rf_rcount_u;
  logic [1:0]         wf_re, rf_we, wf_empty_u, rf_full_u;
  logic [1:0]         wload_s1, wload_s, rload_s1, rload_s;

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      wload_s1 <= '0; wload_s <= '0; rload_s1 <= '0; rload_s <= '0;
    end else begin
      wload_s1 <= i_wr_load; wload_s <= wload_s1;
      rload_s1 <= i_rd_load; rload_s <= rload_s1;
    end
  end

  for (genvar p = 0; p < 2; p++) begin : g_port
    async_fifo #(.W(DW), .DEPTH(FIFO_DEPTH)) u_wfifo (
      .i_wclk(i_wr_clk[p]), .i_wrst_n(i_rst_n && !i_wr_load[p]), .i_we(i_wr[p]),
      .i_wdata(i_wr_data[p]), .o_full(o_wr_full[p]), .o_wcount(wf_wcount_u[p]),
      .i_rclk(i_clk), .i_rrst_n(i_rst_n && !wload_s[p]), .i_re(wf_re[p]),
      .o_rdata(wf_q[p]), .o_empty(wf_empty_u[p]), .o_rcount(wf_rcount[p]));
    async_fifo #(.W(DW), .DEPTH(FIFO_DEPTH)) u_rfifo (
      .i_wclk(i_clk), .i_wrst_n(i_rst_n && !rload_s[p]), .i_we(rf_we[p]),
      .i_wdata(i_dq), .o_full(rf_full_u[p]), .o_wcount(rf_wcount[p]),
      .i_rclk(i_rd_clk[p]), .i_rrst_n(i_rst_n && !i_rd_load[p]), .i_re(i_rd[p]),
      .o_rdata(o_rd_data[p]), .o_empty(o_rd_empty[p]), .o_rcount(rf_rcount_u[p]));
  end

  // ------------------------------------------------------------- arbitration
  // port index: 0 = write 1, 1 = write 2, 2 = read 1, 3 = read 2
  logic [3:0]          req;
  logic [1:0]          rr, sel, pick;
  logic                pick_ok;
  logic [3:0][AW-1:0]  port_addr, start_addr, max_addr, bcnt, room_row, room_max;
  logic [3:0][LW-1:0]  length;
  logic [3:0][LW-1:0]  fill;   // words a port can hand over now (write) or take (read)

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      start_addr[p]   = i_wr_addr[p];   max_addr[p]   = i_wr_max_addr[p];   length[p]   = i_wr_length[p];
      start_addr[p+2] = i_rd_addr[p];   max_addr[p+2] = i_rd_max_addr[p];   length[p+2] = i_rd_length[p];
      fill[p]   = wload_s[p] ? '0 : wf_rcount[p];
      fill[p+2] = rload_s[p] ? '0 : LW'(FIFO_DEPTH) - rf_wcount[p];
    end
    // burst size of every port: LENGTH, cut at the row end and at the ring end
    for (int p = 0; p < 4; p++) begin
      room_row[p] = AW'(2 ** COL_W) - AW'(port_addr[p][COL_W-1:0]);
      room_max[p] = (max_addr[p] > port_addr[p]) ? max_addr[p] - port_addr[p] : AW'(1);
      bcnt[p]     = AW'(length[p]);
      if (room_row[p] < bcnt[p]) bcnt[p] = room_row[p];
      if (room_max[p] < bcnt[p]) bcnt[p] = room_max[p];
      req[p] = (length[p] != '0) && (AW'(fill[p]) >= bcnt[p]);
    end
    pick = rr;
    pick_ok = 1'b0;
    for (int k = 3; k >= 0; k--) begin
      if (req[2'(rr + 2'(k))]) begin
        pick = 2'(rr + 2'(k));
        pick_ok = 1'b1;
      end
    end
  end

  logic [AW-1:0] a_pick, cnt_pick, next_addr;
  always_comb begin
    a_pick    = port_addr[pick];
    cnt_pick  = bcnt[pick];
    next_addr = a_pick + cnt_pick;
    if (next_addr >= max_addr[pick]) next_addr = start_addr[pick];
  end

  // ------------------------------------------------------------ main FSM
  logic [AW-1:0] cur_addr;
  logic [LW-1:0] idx, cnt;
  logic          is_rd;
  logic [CL:0]   rd_pipe;
  logic [1:0]    rd_sel_q;
  logic          stale;      // read burst overtaken by a LOAD of its port

  always_comb begin
    wf_re = '0;
    if (!is_rd && !sel[1]) begin
      if ((st == ST_WAIT && nxt == ST_RW && wait_cnt == 0) || (st == ST_RW && idx != cnt - 1'b1))
        wf_re[sel[0]] = 1'b1;
    end
    rf_we = '0;
    if (rd_pipe[CL] && !stale) rf_we[rd_sel_q[0]] = 1'b1;
  end

  assign {o_cs_n, o_ras_n, o_cas_n, o_we_n} = cmd;
  assign o_cke = 1'b1;
  assign o_dqm = '0;

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      st <= ST_INIT_WAIT; nxt <= ST_IDLE; cmd <= CMD_NOP;
      wait_cnt <= '0; init_cnt <= '0; ref_cnt <= '0; ref_req <= 1'b0;
      o_sa <= '0; o_ba <= '0; o_dq <= '0; o_dq_oe <= 1'b0;
      rr <= '0; sel <= '0; cur_addr <= '0; idx <= '0; cnt <= '0; is_rd <= 1'b0;
      rd_pipe <= '0; rd_sel_q <= '0; stale <= 1'b0;
      o_init_done <= 1'b0; o_refresh <= 1'b0; o_burst <= '0;
      for (int p = 0; p < 4; p++) port_addr[p] <= '0;
    end else begin
      cmd       <= CMD_NOP;
      o_dq_oe   <= 1'b0;
      o_refresh <= 1'b0;
      o_burst   <= '0;
      rd_pipe   <= {rd_pipe[CL-1:0], 1'b0};
      // refresh timer
      if (o_init_done) begin
        if (ref_cnt == '0) begin
          ref_cnt <= ($bits(ref_cnt))'(REF_INTERVAL - 1);
          ref_req <= 1'b1;
        end else begin
          ref_cnt <= ref_cnt - 1'b1;
        end
      end

      unique case (st)
        ST_INIT_WAIT: begin
          if (init_cnt == ($bits(init_cnt))'(INIT_WAIT)) st <= ST_INIT_PRE;
          else init_cnt <= init_cnt + 1'b1;
        end
        ST_INIT_PRE: begin
          cmd <= CMD_PRE; o_sa <= '0; o_sa[10] <= 1'b1;
          st <= ST_WAIT; wait_cnt <= 16'(T_RP - 1); nxt <= ST_INIT_REF1;
        end
        ST_INIT_REF1: begin
          cmd <= CMD_REF;
          st <= ST_WAIT; wait_cnt <= 16'(T_RFC - 1); nxt <= ST_INIT_REF2;
        end
        ST_INIT_REF2: begin
          cmd <= CMD_REF;
          st <= ST_WAIT; wait_cnt <= 16'(T_RFC - 1); nxt <= ST_INIT_MRS;
        end
        ST_INIT_MRS: begin
          // burst length 1, sequential, CAS latency CL, programmed burst writes
          cmd <= CMD_MRS; o_sa <= ROW_W'({3'(CL), 4'b0000}); o_ba <= '0;
          st <= ST_WAIT; wait_cnt <= 16'(T_MRD - 1); nxt <= ST_IDLE;
        end
        ST_IDLE: begin
          o_init_done <= 1'b1;
          if (ref_req) begin
            ref_req <= 1'b0; cmd <= CMD_REF; o_refresh <= 1'b1;
            st <= ST_WAIT; wait_cnt <= 16'(T_RFC - 1); nxt <= ST_IDLE;
          end else if (pick_ok) begin
            sel      <= pick;
            rr       <= pick + 2'd1;
            is_rd    <= pick[1];
            cur_addr <= a_pick;
            cnt      <= LW'(cnt_pick);
            idx      <= '0;
            stale    <= 1'b0;
            port_addr[pick] <= next_addr;
            o_burst[pick]   <= 1'b1;
            cmd  <= CMD_ACT;
            o_ba <= a_pick[AW-1 -: BA_W];
            o_sa <= a_pick[COL_W +: ROW_W];
            st <= ST_WAIT; wait_cnt <= 16'(T_RCD - 2); nxt <= ST_RW;
          end
        end
        ST_RW: begin
          cmd  <= is_rd ? CMD_READ : CMD_WRITE;
          o_sa <= ROW_W'(cur_addr[COL_W-1:0] + COL_W'(idx));
          if (!is_rd) begin
            o_dq    <= wf_q[sel[0]];
            o_dq_oe <= 1'b1;
          end else begin
            rd_pipe[0] <= 1'b1;
            rd_sel_q   <= sel;
          end
          idx <= idx + 1'b1;
          if (idx == cnt - 1'b1) begin
            st <= ST_WAIT; wait_cnt <= 16'(CL); nxt <= ST_PRE;
          end
        end
        ST_PRE: begin
          cmd <= CMD_PRE; o_sa[10] <= 1'b0;
          st <= ST_WAIT; wait_cnt <= 16'(T_RP - 1); nxt <= ST_IDLE;
        end
        ST_WAIT: begin
          if (wait_cnt == '0) st <= nxt;
          else wait_cnt <= wait_cnt - 1'b1;
        end
        default: st <= ST_IDLE;
      endcase

      // LOAD returns a port to its start address; words of a read burst
      // still in flight for that port are dropped
      if (is_rd && rload_s[sel[0]] && st != ST_IDLE) stale <= 1'b1;
      for (int p = 0; p < 2; p++) begin
        if (wload_s[p]) port_addr[p]   <= start_addr[p];
        if (rload_s[p]) port_addr[p+2] <= start_addr[p+2];
      end
    end
  end

  initial assert (T_RCD >= 2 && CL >= 1) else $error("sdram_control: T_RCD >= 2 and CL >= 1 required");
endmodule
