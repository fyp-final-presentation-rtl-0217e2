// Behavioural I2C slave (not synthesizable). Watches SCL and the wired-AND
// SDA line, detects START (including a repeated START) and STOP, shifts in
// bytes on SCL rising edges and pulls SDA low for the acknowledge bit unless
// nack_next is set, in which case the whole next transaction is refused.
// Every completed four-byte write is pushed into a queue for the testbench and
// stored in a register map. When an address byte arrives with the read bit
// set, the slave returns the 16-bit register named by the last register
// address written, MSB first, changing SDA on SCL falling edges, and stops
// driving once the master does not acknowledge a byte.
// Stands in for the camera's configuration interface; the NACK injection and
// the register map are testbench features.
module i2c_slave_model (
  input  logic scl,
  input  logic master_sda_oe,
  output logic sda,
  input  bit   nack_next
);
  logic        slave_oe = 0;
  logic [31:0] sh;
  int          nbits = 0, nbytes = 0;
  bit          active = 0, refuse = 0, in_ack = 0;
  logic [31:0] q[$];
  int          n_nacked = 0;
  // read side
  logic [15:0] regs [logic [7:0]];
  logic [7:0]  cur_reg = 0;
  logic [15:0] rsh;
  int          rbits = 0, n_reads = 0;
  bit          rd_pending = 0, reading = 0, in_mack = 0, mack = 0;

  assign sda = !(master_sda_oe || slave_oe);

  always @(negedge sda) if (scl) begin            // START or repeated START
    active = 1; nbits = 0; nbytes = 0; refuse = nack_next; in_ack = 0;
    rd_pending = 0; reading = 0; in_mack = 0; slave_oe <= 0;
  end
  always @(posedge sda) if (scl && active) begin  // STOP
    active = 0; slave_oe <= 0;
    if (nbytes == 4 && !refuse && !reading) begin
      q.push_back(sh);
      regs[sh[23:16]] = sh[15:0];
    end
    if (refuse) n_nacked++;
  end
  always @(posedge scl) if (active) begin
    if (reading) begin
      if (in_mack) mack = sda;                      // 0 = master acknowledged
    end else if (!in_ack && nbytes < 4) begin
      sh = {sh[30:0], sda};
      nbits++;
    end
  end
  always @(negedge scl) if (active) begin
    if (reading) begin
      if (in_mack) begin
        in_mack = 0;
        if (!mack && rbits < 16) slave_oe <= !rsh[15 - rbits];
        else begin slave_oe <= 0; reading = 0; active = 0; n_reads++; end
      end else begin
        rbits++;
        if (rbits % 8 == 0) begin slave_oe <= 0; in_mack = 1; end
        else slave_oe <= !rsh[15 - rbits];
      end
    end else if (in_ack) begin
      in_ack = 0;
      if (rd_pending) begin
        rd_pending = 0; reading = 1; rbits = 0;
        rsh = regs.exists(cur_reg) ? regs[cur_reg] : 16'h0000;
        slave_oe <= !rsh[15];
      end else slave_oe <= 0;
    end else if (nbits == 8) begin
      nbits = 0; nbytes++; in_ack = 1;
      slave_oe <= !refuse;
      if (nbytes == 1 && sh[0] && !refuse) rd_pending = 1;
      if (nbytes == 2) cur_reg = sh[7:0];
    end
  end
endmodule
