// Dual-clock FIFO used on every port of the SDRAM frame buffer.
// Write and read pointers are kept in binary in their own clock domain and
// passed to the other domain in Gray code through two-flop synchronisers, so
// each side sees a pointer of the other that is at most a few clocks old and
// never torn. Full and empty are therefore conservative: the FIFO may look
// fuller or emptier than it is for a couple of clocks, never the reverse.
// Interface: write side (i_wclk, i_wrst_n, i_we, i_wdata, o_full, o_wcount);
// read side (i_rclk, i_rrst_n, i_re, o_rdata, o_empty, o_rcount). The two
// resets clear the FIFO; assert both together (each synchronous-release in its
// own domain) while neither side is active.
// Timing: o_rdata is registered, valid the clock after i_re. Writes while full
// and reads while empty are ignored.
// The per-port FIFO and its 512 x 16-bit size follow the design; the Gray-code
// structure is the usual one for such a FIFO.
module async_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic         i_wclk,
  input  logic         i_wrst_n,
  input  logic         i_we,
  input  logic [W-1:0] i_wdata,
  output logic         o_full,
  output logic [$clog2(DEPTH):0] o_wcount,
  input  logic         i_rclk,
  input  logic         i_rrst_n,
  input  logic         i_re,
  output logic [W-1:0] o_rdata,
  output logic         o_empty,
  output logic [$clog2(DEPTH):0] o_rcount
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_s1, rgray_s2, wgray_s1, wgray_s2;
  logic [AW:0]  rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  assign rbin_w   = gray2bin(rgray_s2);
  assign o_wcount = wbin - rbin_w;
  assign o_full   = o_wcount == (AW+1)'(DEPTH);

  always_ff @(posedge i_wclk) begin
    if (i_we && !o_full) mem[wbin[AW-1:0]] <= i_wdata;
  end

  always_ff @(posedge i_wclk or negedge i_wrst_n) begin
    if (!i_wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_s1 <= '0; rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (i_we && !o_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read domain
  assign wbin_r   = gray2bin(wgray_s2);
  assign o_rcount = wbin_r - rbin;
  assign o_empty  = o_rcount == '0;

  always_ff @(posedge i_rclk or negedge i_rrst_n) begin
    if (!i_rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_s1 <= '0; wgray_s2 <= '0; o_rdata <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (i_re && !o_empty) begin
        o_rdata <= mem[rbin[AW-1:0]];
        rbin    <= rbin + 1'b1;
        rgray   <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
