// sifter: original (sifted) key extraction.
//
// After a pulse on start the module walks the N_SLOTS time slots, one per
// clock. Where Bob detected a photon (valid[i]) and Alice's basis equals Bob's
// (alice_alphabet[i] == bob_alphabet[i]), the initial key bit ini_key[i] is
// stored as orig_key[num], match[i] is set and num is incremented; addr holds
// the index of the last slot kept. The comparison result match is what Alice
// returns to Bob. busy is high for N_SLOTS clocks and done pulses in the clock
// after the last slot, so results are final N_SLOTS+1 clocks after start.
// The slot-serial compare-and-append follows the protocol's key extraction
// logic; the valid mask (detected slots) is added here so that lost photons are
// excluded. Bob uses the same module with valid = Alice's match mask and his
// own bases on both basis inputs. Vectors are indexed bit i = slot i.
module sifter #(
  parameter int unsigned N_SLOTS = 15
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [N_SLOTS-1:0]           alice_alphabet,
  input  logic [N_SLOTS-1:0]           bob_alphabet,
  input  logic [N_SLOTS-1:0]           valid,
  input  logic [N_SLOTS-1:0]           ini_key,
  output logic [N_SLOTS-1:0]           orig_key,
  output logic [N_SLOTS-1:0]           match,
  output logic [$clog2(N_SLOTS+1)-1:0] num,
  output logic [$clog2(N_SLOTS)-1:0]   addr,
  output logic                         busy,
  output logic                         done
);
  localparam int unsigned IW = $clog2(N_SLOTS);

  logic [IW-1:0] i;
  logic          keep;

  assign keep = valid[i] && (alice_alphabet[i] == bob_alphabet[i]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i        <= '0;
      num      <= '0;
      addr     <= '0;
      orig_key <= '0;
      match    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (keep) begin
          orig_key[num[IW-1:0]] <= ini_key[i];
          match[i]              <= 1'b1;
          addr                  <= i;
          num                   <= num + 1'b1;
        end
        if (i == IW'(N_SLOTS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        i <= i + 1'b1;
      end else if (start) begin
        busy     <= 1'b1;
        i        <= '0;
        num      <= '0;
        addr     <= '0;
        orig_key <= '0;
        match    <= '0;
      end
    end
  end
endmodule
