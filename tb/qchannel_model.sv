// qchannel_model: behavioural model (not synthesizable) of the optical path
// between Alice's four laser diodes and Bob's two single-photon detectors:
// laser, fibre, Bob's basis-switched polarisation analyser and detectors.
// Each laser pulse is a photon with basis (ld[2]|ld[3]) and bit (ld[1]|ld[3]).
// With probability loss_pct/100 it is lost. Otherwise, if Bob's analyser basis
// equals the photon's basis, the detector of the photon's bit clicks (flipped
// with probability err_pct/100); in the other basis a random detector clicks.
// Clicks and the slot sync reach Bob half a clock after they leave Alice.
module qchannel_model (
  input  logic       clk,
  input  logic [3:0] ld,
  input  logic       ld_sync,
  input  logic       basis_sel,
  input  int         loss_pct,
  input  int         err_pct,
  output logic [1:0] det,
  output logic       bob_sync
);
  int photons = 0, lost = 0, same_basis = 0, flipped = 0;

  initial begin
    det      = '0;
    bob_sync = 1'b0;
  end

  // sampled on the falling edge, so the model sees settled register outputs
  always @(negedge clk) begin
    logic pb, pv, b;
    bob_sync = ld_sync;
    det      = 2'b00;
    if (ld != 4'b0000) begin
      photons++;
      pb = ld[2] | ld[3];
      pv = ld[1] | ld[3];
      if (int'($urandom_range(99)) < loss_pct) begin
        lost++;
      end else begin
        if (basis_sel == pb) begin
          same_basis++;
          b = pv;
          if (int'($urandom_range(99)) < err_pct) begin b = !pv; flipped++; end
        end else begin
          b = 1'($urandom_range(1));
        end
        det = b ? 2'b10 : 2'b01;
      end
    end
  end
endmodule
