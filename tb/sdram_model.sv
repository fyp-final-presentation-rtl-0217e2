// Behavioural model of a single-data-rate SDRAM (not synthesizable).
// Decodes ACTIVE, READ, WRITE, PRECHARGE, AUTO REFRESH and LOAD MODE on the
// rising clock edge, stores written words in a sparse array, and returns read
// data CL clocks after the READ command. It counts protocol errors: access
// to a bank with no open row, ACTIVE on a bank whose row is open, commands
// before the mode register is loaded, a REFRESH with a row open, and
// ACTIVE/READ/WRITE earlier than t_RCD or t_RP allow.
// Stands in for the board's SDRAM chip; its timing numbers are the ones the
// controller is built for, not those of a particular part.
module sdram_model #(
  parameter int BA_W = 2, parameter int ROW_W = 13, parameter int COL_W = 10,
  parameter int CL = 2, parameter int T_RCD = 2, parameter int T_RP = 2
) (
  input  logic             clk,
  input  logic [ROW_W-1:0] sa,
  input  logic [BA_W-1:0]  ba,
  input  logic             cs_n, ras_n, cas_n, we_n,
  input  logic [15:0]      dq_in,
  input  logic             dq_oe,
  output logic [15:0]      dq_out,
  output int               errors,
  output int               n_ref,
  output int               n_act,
  output int               n_rd,
  output int               n_wr,
  output bit               mode_set
);
  logic [15:0] mem [longint];
  bit          open_ [1 << BA_W];
  logic [ROW_W-1:0] row [1 << BA_W];
  longint      t_act [1 << BA_W], t_pre [1 << BA_W];
  longint      cyc = 0;
  logic [15:0] rpipe [CL-1];   // CL >= 2

  initial begin
    errors = 0; n_ref = 0; n_act = 0; n_rd = 0; n_wr = 0; mode_set = 0; dq_out = '0;
    for (int b = 0; b < (1 << BA_W); b++) begin open_[b] = 0; t_act[b] = -100; t_pre[b] = -100; end
    for (int i = 0; i < CL - 1; i++) rpipe[i] = '0;
  end

  function automatic longint key(input logic [BA_W-1:0] b, input logic [ROW_W-1:0] r, input logic [COL_W-1:0] c);
    return longint'({b, r, c});
  endfunction

  always @(posedge clk) begin
    logic [3:0] c;
    cyc++;
    // read pipeline: data leaves CL clocks after the command
    dq_out <= rpipe[CL-2];
    for (int i = CL - 2; i > 0; i--) rpipe[i] = rpipe[i-1];
    rpipe[0] = '0;
    c = {cs_n, ras_n, cas_n, we_n};
    case (c)
      4'b0000: mode_set = 1;
      4'b0011: begin
        if (!mode_set || open_[ba] || cyc - t_pre[ba] < T_RP) errors++;
        open_[ba] = 1; row[ba] = sa; t_act[ba] = cyc; n_act++;
      end
      4'b0101, 4'b0100: begin
        if (!open_[ba] || cyc - t_act[ba] < T_RCD) begin
          errors++;
          $display("sdram_model: access without open row / early (bank %0d)", ba);
        end
        if (c == 4'b0100) begin
          if (!dq_oe) errors++;
          mem[key(ba, row[ba], COL_W'(sa))] = dq_in; n_wr++;
        end else begin
          rpipe[0] = mem.exists(key(ba, row[ba], COL_W'(sa))) ? mem[key(ba, row[ba], COL_W'(sa))] : 16'h0;
          n_rd++;
        end
      end
      4'b0010: begin
        if (sa[10]) begin
          for (int b = 0; b < (1 << BA_W); b++) begin open_[b] = 0; t_pre[b] = cyc; end
        end else begin open_[ba] = 0; t_pre[ba] = cyc; end
      end
      4'b0001: begin
        n_ref++;
        for (int b = 0; b < (1 << BA_W); b++) if (open_[b]) errors++;
      end
      default: ;
    endcase
  end
endmodule
