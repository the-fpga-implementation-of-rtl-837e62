// bb84_pkg: types and constants shared by the BB84 key-distribution logic.
//
// Basis encoding: 0 = rectilinear (H/V), 1 = diagonal (+45/-45).
// Laser/polarisation one-hot code: bit 0 = H, bit 1 = V, bit 2 = +45, bit 3 = -45.
// Classical messages are a type byte plus 16 data bits. The message set and the
// one-hot code are this design's own choices; the eight Alice states are the
// ones named for the top-level state machine of the protocol.
package bb84_pkg;

  localparam int unsigned MSG_DATA_W = 16;

  typedef enum logic [7:0] {
    MSG_START = 8'h01,  // Alice -> Bob: a round begins
    MSG_DET   = 8'h02,  // Bob -> Alice: slots in which a photon was detected
    MSG_BASES = 8'h03,  // Bob -> Alice: bases Bob measured with
    MSG_MATCH = 8'h04,  // Alice -> Bob: slots whose bases agreed (kept)
    MSG_CAL   = 8'h05   // Bob -> Alice: calibration bits (start of Bob's sifted key)
  } msg_type_e;

  typedef struct packed {
    msg_type_e             mtype;
    logic [MSG_DATA_W-1:0] data;
  } msg_t;

  // One-hot laser / polarisation codes
  localparam logic [3:0] POL_H   = 4'b0001;
  localparam logic [3:0] POL_V   = 4'b0010;
  localparam logic [3:0] POL_P45 = 4'b0100;
  localparam logic [3:0] POL_M45 = 4'b1000;

  // Alice's top-level Moore machine
  typedef enum logic [2:0] {
    A_IDLE, A_ENCODE, A_QTRANS, A_PREC1, A_COMPARE, A_PTRANS, A_PREC2, A_MISEST
  } alice_state_e;

  // Bob's control machine
  typedef enum logic [2:0] {
    B_GEN, B_IDLE, B_MEAS, B_SEND_DET, B_SEND_BASES, B_WAIT_MATCH, B_SIFT, B_KEY
  } bob_state_e;

  // Two steps of the 16-bit Galois LFSR x^16+x^14+x^13+x^11+1
  function automatic logic [15:0] lfsr_step(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
  endfunction

endpackage
