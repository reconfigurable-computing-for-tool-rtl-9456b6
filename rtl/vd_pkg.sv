// vd_pkg: constants and types shared by the virtual digitising datapath.
//
// The Multi-Rotator (MR) works on n-bit two's complement coordinates; the
// main configuration evaluated for tool path work is n = 32 bits, because a
// 16-bit MR accumulates too much error for shoe last machining. The rotation
// step constants cos(dtheta) and sin(dtheta) are stored as (n+1)-bit signed
// fixed point numbers with n-1 fraction bits, so the LUT word "C + S", which
// approaches sqrt(2), still fits.
package vd_pkg;

  // Default data word length of the Multi-Rotator (bits per coordinate).
  localparam int unsigned MR_N_DEFAULT = 32;

  // Width of the rotation counter (rotations per round) and of the surface
  // point index.
  localparam int unsigned ROT_W_DEFAULT = 16;
  localparam int unsigned PT_W_DEFAULT  = 16;

  // Sequencing of one Multi-Rotator: idle, n serial MAC cycles, then the
  // final cycle where the add and subtract produce x', y' and the S-Regs are
  // reloaded with the new products.
  typedef enum logic [1:0] {
    MR_IDLE  = 2'd0,
    MR_MAC   = 2'd1,
    MR_FINAL = 2'd2
  } mr_state_e;

  // Sequencing of the torus distance unit.
  typedef enum logic [2:0] {
    TD_IDLE   = 3'd0,
    TD_PREP1  = 3'd1,
    TD_SQRT1  = 3'd2,
    TD_PREP2  = 3'd3,
    TD_SQRT2  = 3'd4,
    TD_OUT    = 3'd5
  } td_state_e;

  // Select code of the S-Reg input multiplexer.
  typedef enum logic [1:0] {
    SREG_SHIFT = 2'd0,  // shift one bit towards the LSB (serial MAC cycle)
    SREG_COORD = 2'd1,  // load a point coordinate (first rotation, theta0 = 0)
    SREG_ZERO  = 2'd2,  // load zero (sine products of the first rotation)
    SREG_PROD  = 2'd3   // load the product computed by the 2-C MAC
  } sreg_sel_e;

endpackage
