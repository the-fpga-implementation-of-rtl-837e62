// random_data: Alice's (and Bob's) random data module.
//
// Before a transmission a pulse on gen fills a local memory of N_SLOTS entries,
// one per time slot, with a random key bit and a random basis bit taken from a
// 16-bit Galois LFSR (x^16+x^14+x^13+x^11+1). The LFSR advances two steps per
// slot: bit 0 after the first step is the key bit, bit 0 after the second the
// basis. One slot is written per clock, so ready rises N_SLOTS+1 cycles after
// gen. The LFSR keeps running from round to round; it is loaded with SEED at
// reset. The memory has a combinational read port (rd_addr -> rd_key/rd_basis)
// and is also presented whole as the vectors ini_key and alphabet (bit i = slot i).
// The source of randomness is this design's choice: a hardware generator that
// fills a local memory before communication is what the protocol asks for.
module random_data #(
  parameter int unsigned N_SLOTS = 15,
  parameter logic [15:0] SEED    = 16'hACE1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       gen,
  output logic                       busy,
  output logic                       ready,
  input  logic [$clog2(N_SLOTS)-1:0] rd_addr,
  output logic                       rd_key,
  output logic                       rd_basis,
  output logic [N_SLOTS-1:0]         ini_key,
  output logic [N_SLOTS-1:0]         alphabet
);
  import bb84_pkg::*;

  logic [15:0]                lfsr;
  logic [$clog2(N_SLOTS)-1:0] wa;
  logic [15:0]                s1, s2;

  assign s1 = lfsr_step(lfsr);
  assign s2 = lfsr_step(s1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr     <= (SEED == '0) ? 16'h0001 : SEED;
      wa       <= '0;
      busy     <= 1'b0;
      ready    <= 1'b0;
      ini_key  <= '0;
      alphabet <= '0;
    end else if (busy) begin
      lfsr         <= s2;
      ini_key[wa]  <= s1[0];
      alphabet[wa] <= s2[0];
      if (wa == $clog2(N_SLOTS)'(N_SLOTS - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
      wa <= wa + 1'b1;
    end else if (gen) begin
      busy  <= 1'b1;
      ready <= 1'b0;
      wa    <= '0;
    end
  end

  assign rd_key   = ini_key[rd_addr];
  assign rd_basis = alphabet[rd_addr];
endmodule
