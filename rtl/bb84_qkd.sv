// bb84_qkd: BB84 quantum key distribution, Alice's and Bob's control logic.
//
// Alice (alice_top) draws random key bits and bases, drives four laser diodes
// (H, V, +45, -45) one slot at a time, and after Bob's report sifts the key,
// estimates the error rate from Bob's calibration bits and either abandons the
// key (above 11%) or streams it out. Bob (bob_ctrl) measures each slot in a
// random basis, reports detections and bases, sifts with Alice's comparison
// result and streams out his copy of the key. The two sides are separate
// circuits that share only clock and reset here; everything that crosses
// between them is a port: the laser drive (ld) and slot sync (ld_sync) leave
// Alice, the detector clicks (det) and received sync (bob_sync) enter Bob, who
// drives his analyser basis (basis_sel), and each side has its own serial
// classical-channel pair. An optical channel and a serial link outside close
// the loop. A round from start to key takes roughly 150 bit times of the
// classical link plus (SLOT_CYCLES+2)*N_SLOTS clocks.
module bb84_qkd #(
  parameter int unsigned N_SLOTS        = 15,
  parameter int unsigned CAL_BITS       = 2,
  parameter int unsigned ERR_THRESH_PCT = 11,
  parameter int unsigned SLOT_CYCLES    = 8,
  parameter int unsigned CLKS_PER_BIT   = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  // Alice: lasers and classical channel
  output logic [3:0]                   ld,
  output logic                         ld_sync,
  output logic                         alice_txd,
  input  logic                         alice_rxd,
  input  logic                         cfg_we,
  input  logic                         cfg_ram,
  input  logic                         cfg_addr,
  input  logic [3:0]                   cfg_data,
  output logic [2:0]                   alice_state,
  output logic [$clog2(N_SLOTS+1)-1:0] alice_num,
  output logic [$clog2(CAL_BITS+1)-1:0] alice_err_cnt,
  output logic                         alice_final_key,
  output logic                         alice_ldkey,
  output logic                         alice_done,
  output logic                         alice_abort,
  // Bob: detectors, analyser and classical channel
  input  logic                         bob_sync,
  input  logic [1:0]                   det,
  output logic                         basis_sel,
  output logic                         bob_txd,
  input  logic                         bob_rxd,
  output logic [2:0]                   bob_state,
  output logic [$clog2(N_SLOTS+1)-1:0] bob_num,
  output logic                         bob_final_key,
  output logic                         bob_ldkey,
  output logic                         bob_done
);
  alice_top #(
    .N_SLOTS(N_SLOTS), .CAL_BITS(CAL_BITS), .ERR_THRESH_PCT(ERR_THRESH_PCT),
    .SLOT_CYCLES(SLOT_CYCLES), .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_alice (
    .clk, .rst_n, .start, .ld, .ld_sync, .txd(alice_txd), .rxd(alice_rxd),
    .cfg_we, .cfg_ram, .cfg_addr, .cfg_data,
    .state(alice_state), .num(alice_num), .err_cnt(alice_err_cnt),
    .final_key(alice_final_key), .ldkey(alice_ldkey), .key_done(alice_done), .key_abort(alice_abort)
  );

  bob_ctrl #(
    .N_SLOTS(N_SLOTS), .CAL_BITS(CAL_BITS), .WINDOW_CYCLES(SLOT_CYCLES - 2), .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_bob (
    .clk, .rst_n, .sync(bob_sync), .det, .basis_sel, .txd(bob_txd), .rxd(bob_rxd),
    .state(bob_state), .num(bob_num), .final_key(bob_final_key), .ldkey(bob_ldkey), .key_done(bob_done)
  );
endmodule
