// Shared types and constants of the skin-colour face detector.
// The VGA timing numbers are the 640x480 figures the design is built around;
// the SDRAM command encoding is the standard JEDEC SDR-SDRAM one
// {cs_n, ras_n, cas_n, we_n}. Everything here is shared by several modules.
package face_pkg;
  // 640x480 VGA timing (pixels / lines)
  localparam int unsigned H_FRONT_DEF = 16;
  localparam int unsigned H_SYNC_DEF  = 96;
  localparam int unsigned H_BACK_DEF  = 48;
  localparam int unsigned H_ACT_DEF   = 640;
  localparam int unsigned V_FRONT_DEF = 11;
  localparam int unsigned V_SYNC_DEF  = 2;
  localparam int unsigned V_BACK_DEF  = 31;
  localparam int unsigned V_ACT_DEF   = 480;

  // SDRAM commands, {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_NOP   = 4'b0111,
    CMD_ACT   = 4'b0011,
    CMD_READ  = 4'b0101,
    CMD_WRITE = 4'b0100,
    CMD_PRE   = 4'b0010,
    CMD_REF   = 4'b0001,
    CMD_MRS   = 4'b0000
  } sdram_cmd_e;

  // One face result: valid flag and centroid
  typedef struct packed {
    logic        valid;
    logic [10:0] cx;
    logic [10:0] cy;
  } face_t;
endpackage
